// tb_sram_sp: random writes and reads on the default 1024 x 8 memory,
// compared with an associative-array model; checks the one-cycle read
// latency and that dout holds when the memory is idle or writing.
module tb_sram_sp;
  logic clk = 0, ce = 0, we = 0;
  logic [9:0] addr = 0;
  logic [7:0] wdata = 0, dout;
  int checks = 0, failures = 0;
  logic [7:0] model [int];

  sram_sp dut (.*);

  always #5 clk = ~clk;

  initial begin
    logic [7:0] last_read;
    bit have_read;
    have_read = 0;
    // fill every word first so that every read has a known value
    for (int a = 0; a < 1024; a++) begin
      ce = 1; we = 1; addr = 10'(a); wdata = 8'($urandom); model[a] = wdata;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 3000; i++) begin
      int op = $urandom_range(0, 2);
      ce = (op != 0); we = (op == 2);
      addr = 10'($urandom); wdata = 8'($urandom);
      @(posedge clk); #1;
      if (ce && !we) begin last_read = model[int'(addr)]; have_read = 1; end
      if (ce && we) model[int'(addr)] = wdata;
      if (have_read) begin
        checks++;
        if (dout != last_read) begin
          failures++;
          $display("FAIL read: dout=%h exp %h", dout, last_read);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
