// tb_mbist_controller: the controller (4 rows x 4 columns x 8 bits) against
// a memory model in the testbench. Every cycle of a run is compared with the
// March mSR reference stream: enable, write enable, address, write data, and
// for reads the expected value shown one cycle later. The first run is
// fault-free and must end with error low after exactly 13N operations; in
// the second run one bit of a word is flipped after element E3 has written
// it, and the mismatch must be flagged exactly at the read of E4 that sees it.
module tb_mbist_controller;
  import mbist_pkg::*;
  import march_ref_pkg::*;
  localparam int unsigned RB = 2, CB = 2, N = 1 << (RB + CB), DW = 8;
  localparam int unsigned VICTIM = 5;

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, error, fail;
  logic [DW-1:0] bist_expect_data;
  logic mem_ce, mem_we;
  logic [RB+CB-1:0] mem_addr;
  logic [DW-1:0] mem_wdata, mem_rdata;
  logic [DW-1:0] mem [N];
  int checks = 0, failures = 0;
  bit corrupt;

  mbist_controller #(.ROW_BITS(RB), .COL_BITS(CB), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  // memory model: synchronous single port, one-cycle read latency
  always @(posedge clk) begin
    if (mem_ce && mem_we) mem[mem_addr] <= mem_wdata;
    if (mem_ce && !mem_we) mem_rdata <= mem[mem_addr];
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic run(input bit inject);
    ref_op_t ops[$];
    int fails_seen, fail_at, cyc;
    build_msr(N, ops);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    fails_seen = 0; fail_at = -1; cyc = 0;
    chk(busy && !done && !error, "busy after start");
    foreach (ops[i]) begin
      logic [DW-1:0] v;
      v = ops[i].value ? '1 : '0;
      #1;
      chk(mem_ce && (mem_we == ops[i].write) && (int'(mem_addr) == ops[i].addr) &&
          (!ops[i].write || mem_wdata == v),
          $sformatf("op %0d: ce=%0b we=%0b addr=%0d wdata=%h", i, mem_ce, mem_we, mem_addr, mem_wdata));
      if (i > 0 && !ops[i-1].write)
        chk(bist_expect_data == (ops[i-1].value ? '1 : '0), $sformatf("expect data at op %0d", i));
      if (fail) begin fails_seen++; fail_at = i - 1; end
      @(negedge clk);
      cyc++;
      // flip one bit of the victim after its E3 write
      if (inject && ops[i].elem == 3 && ops[i].addr == VICTIM) mem[VICTIM][3] = 1'b0;
    end
    #1;
    if (fail) begin fails_seen++; fail_at = ops.size() - 1; end
    chk(!mem_ce && busy && !done, "drain cycle");
    @(negedge clk);
    chk(done && !busy, "done one cycle after the last operation");
    chk(cyc == 13 * N, $sformatf("%0d operation cycles, expected %0d", cyc, 13 * N));
    if (!inject) begin
      chk(!error && fails_seen == 0, "fault-free run flagged an error");
    end else begin
      int exp_at;
      exp_at = -1;
      foreach (ops[i]) if (exp_at < 0 && ops[i].elem == 4 && ops[i].addr == VICTIM) exp_at = i;
      chk(error && fails_seen == 1 && fail_at == exp_at,
          $sformatf("injected fault: error=%0b fails=%0d at op %0d, expected op %0d", error, fails_seen, fail_at, exp_at));
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(0);
    run(1);
    run(0);   // error is cleared by the next start
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
