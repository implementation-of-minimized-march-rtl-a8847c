// tb_mbist_full: one complete March mSR run of mbist_top at its default size
// (1024 x 8 SRAM), with a 20 ns clock. Checks that the run takes 13 x 1024
// operation cycles plus one compare cycle, i.e. a test time of 266.24 us
// (complexity 13 = test time / (N x T_clock)), that error stays low, that
// bist_expect_data follows each read, and that the memory ends all ones.
module tb_mbist_full;
  localparam int unsigned N = 1024;
  localparam int unsigned T_CLK_NS = 20;

  logic clk = 0, rst_n = 0, bist_start = 0;
  logic bist_busy, bist_done, error, fail;
  logic [7:0] bist_expect_data, dout;
  int checks = 0, failures = 0;

  mbist_top dut (.*);

  always #10 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int cycles, ops, reads, fails;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk) bist_start = 1;
    @(negedge clk) bist_start = 0;
    cycles = 0; ops = 0; reads = 0; fails = 0;
    while (!bist_done) begin
      #1;
      if (dut.mem_ce) ops++;
      if (dut.mem_ce && !dut.mem_we) reads++;
      if (fail) fails++;
      @(negedge clk);
      cycles++;
    end
    chk(ops == 13 * N, $sformatf("%0d memory operations, expected %0d", ops, 13 * N));
    chk(reads == 7 * N, $sformatf("%0d reads, expected %0d", reads, 7 * N));
    chk(cycles == 13 * N + 1, $sformatf("%0d cycles, expected %0d", cycles, 13 * N + 1));
    chk(ops * T_CLK_NS == 266240, $sformatf("test time %0d ns, expected 266240 ns", ops * T_CLK_NS));
    chk(ops / N == 13, "complexity is not 13N");
    chk(!error && fails == 0, "fault-free memory flagged an error");
    for (int a = 0; a < N; a++)
      chk(dut.u_sram.mem[a] == 8'hFF, $sformatf("word %0d = %h after the test", a, dut.u_sram.mem[a]));
    $display("test time %0d ns for N = %0d at %0d ns clock", ops * T_CLK_NS, N, T_CLK_NS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (13 * N + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
