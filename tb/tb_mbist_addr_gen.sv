// tb_mbist_addr_gen: runs the address generator (4 rows x 4 columns) through
// an ascending sweep with wrap, an ascending sweep with last-address inhibit,
// a descending sweep with wrap, hold, and reload, checking the address and
// end-count flags every step against a linear counter model.
module tb_mbist_addr_gen;
  import mbist_pkg::*;
  localparam int unsigned RB = 2, CB = 2, N = 16;

  logic clk = 0, rst_n = 0, load = 0, step = 0, inhibit_last = 0;
  addr_cmd_e x_cmd = ADDR_HOLD, y_cmd = ADDR_HOLD;
  logic [RB-1:0] row;
  logic [CB-1:0] col;
  logic [RB+CB-1:0] addr;
  logic x_end, y_end, last_addr;
  int checks = 0, failures = 0;

  mbist_addr_gen #(.ROW_BITS(RB), .COL_BITS(CB)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_addr(input int a, input int dir, input string tag);
    bit xe, ye;
    xe = (dir > 0) ? ((a % 4) == 3) : (dir < 0) ? ((a % 4) == 0) : 0;
    ye = (dir > 0) ? ((a / 4) == 3) : (dir < 0) ? ((a / 4) == 0) : 0;
    checks++;
    if (int'(addr) != a || int'(row) != a % 4 || int'(col) != a / 4 ||
        x_end != xe || y_end != ye || last_addr != (xe && ye)) begin
      failures++;
      $display("FAIL %s: addr=%0d exp %0d x_end=%0b y_end=%0b", tag, addr, a, x_end, y_end);
    end
  endtask

  task automatic sweep(input int dir, input bit inh, input int start_a, input string tag);
    int a = start_a;
    x_cmd = (dir > 0) ? ADDR_INC : ADDR_DEC; y_cmd = x_cmd; inhibit_last = inh;
    for (int i = 0; i < N; i++) begin
      #1 expect_addr(a, dir, tag);
      step = 1;
      @(posedge clk); #1 step = 0;
      if (!(inh && i == N - 1)) a = (a + dir + N) % N;
    end
    #1 expect_addr(a, dir, {tag, " after"});
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    load = 1; @(posedge clk); #1 load = 0;
    sweep(1, 0, 0, "up wrap");
    sweep(1, 1, 0, "up inhibit");
    sweep(-1, 0, 15, "down wrap");
    // hold: no movement, no end count
    x_cmd = ADDR_HOLD; y_cmd = ADDR_HOLD; step = 1;
    @(posedge clk); #1 step = 0;
    expect_addr(15, 0, "hold");
    // reload
    load = 1; @(posedge clk); #1 load = 0;
    x_cmd = ADDR_INC; y_cmd = ADDR_INC;
    #1 expect_addr(0, 1, "load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
