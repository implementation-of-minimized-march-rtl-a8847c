// tb_mbist_top: end-to-end test of the BIST controller and its SRAM at a
// reduced size (8 rows x 4 columns x 8 bits, N = 32). Three runs: a clean
// run (error must stay low, memory must end all ones), a run in which one
// SRAM bit is overwritten behind the controller's back during element E3
// (error must rise), and a clean run again (error cleared by start). A start
// pulse while busy must be ignored. Each mechanism of the controller is
// counted and must occur: every instruction executed, the E4 branch back,
// the last-address inhibit after E3, address wrap between elements, row to
// column carry, a mismatch flagged, start ignored while busy, restart.
module tb_mbist_top;
  localparam int unsigned RB = 3, CB = 2, N = 1 << (RB + CB);

  logic clk = 0, rst_n = 0, bist_start = 0;
  logic bist_busy, bist_done, error, fail;
  logic [7:0] bist_expect_data, dout;
  int checks = 0, failures = 0;

  int n_instr [7];
  int n_branch, n_inhibit, n_wrap, n_carry, n_mismatch, n_ignored, n_restart;

  mbist_top #(.ROW_BITS(RB), .COL_BITS(CB)) dut (.*);

  always #5 clk = ~clk;

  // mechanism monitors on the controller's internal state
  logic [2:0] pc_q;
  logic [RB+CB-1:0] addr_q;
  logic issue_q, cond_last_q;
  always @(posedge clk) begin
    if (dut.u_ctrl.u_seq.issue) n_instr[dut.u_ctrl.pc]++;
    if (issue_q && dut.u_ctrl.u_seq.issue && pc_q == 3'd5 && dut.u_ctrl.pc == 3'd4) n_branch++;
    if (issue_q && pc_q == 3'd3 && dut.u_ctrl.pc == 3'd4 && addr_q == '1 && dut.u_ctrl.mem_addr == '1) n_inhibit++;
    if (issue_q && dut.u_ctrl.u_seq.issue && pc_q != dut.u_ctrl.pc &&
        ((addr_q == '1 && dut.u_ctrl.mem_addr == '0) || (addr_q == '0 && dut.u_ctrl.mem_addr == '1))) n_wrap++;
    if (issue_q && dut.u_ctrl.u_seq.issue && addr_q[RB-1:0] == '1 && dut.u_ctrl.mem_addr[RB-1:0] == '0 &&
        addr_q[RB+CB-1:RB] + 1'b1 == dut.u_ctrl.mem_addr[RB+CB-1:RB]) n_carry++;
    pc_q    <= dut.u_ctrl.pc;
    addr_q  <= dut.u_ctrl.mem_addr;
    issue_q <= dut.u_ctrl.u_seq.issue;
  end

  always @(negedge clk) if (fail) n_mismatch++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input bit inject, input bit poke);
    int cycles;
    bit injected;
    if (bist_done) n_restart++;
    @(negedge clk) bist_start = 1;
    @(negedge clk) bist_start = 0;
    cycles = 0; injected = 0;
    while (!bist_done) begin
      @(negedge clk);
      cycles++;
      if (poke && cycles == 100) begin bist_start = 1; n_ignored++; end
      else bist_start = 0;
      // flip bit 6 of word 9 once E3 has moved past it
      if (inject && !injected && dut.u_ctrl.pc == 3'd3 && dut.u_ctrl.mem_addr == 12) begin
        dut.u_sram.mem[9][6] = 1'b0;
        injected = 1;
      end
    end
    chk(cycles == 13 * N + 1, $sformatf("run took %0d cycles, expected %0d", cycles, 13 * N + 1));
    chk(error == inject, $sformatf("error=%0b with inject=%0b", error, inject));
    if (!inject)
      for (int a = 0; a < N; a++)
        chk(dut.u_sram.mem[a] == 8'hFF, $sformatf("word %0d = %h after the test", a, dut.u_sram.mem[a]));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(0, 1);
    run(1, 0);
    run(0, 0);
    for (int i = 0; i < 7; i++) chk(n_instr[i] > 0, $sformatf("instruction %0d never executed", i));
    chk(n_branch == 3 * (N - 1), $sformatf("branch back taken %0d times", n_branch));
    chk(n_inhibit == 3, $sformatf("last-address inhibit seen %0d times", n_inhibit));
    chk(n_wrap > 0, "address wrap never seen");
    chk(n_carry > 0, "row-to-column carry never seen");
    chk(n_mismatch == 1, $sformatf("%0d mismatches flagged", n_mismatch));
    chk(n_ignored > 0 && n_restart == 2, "start while busy / restart not exercised");
    $display("mechanisms: instr %0d %0d %0d %0d %0d %0d %0d, branch %0d, inhibit %0d, wrap %0d, carry %0d, mismatch %0d, ignored start %0d, restart %0d",
             n_instr[0], n_instr[1], n_instr[2], n_instr[3], n_instr[4], n_instr[5], n_instr[6],
             n_branch, n_inhibit, n_wrap, n_carry, n_mismatch, n_ignored, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * 13 * N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
