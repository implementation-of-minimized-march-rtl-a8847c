// tb_mbist_comparator: random reads with one-cycle-late data, some of them
// wrong; checks fail in the cycle after each read, the sticky error flag,
// the registered expected value, and clear.
module tb_mbist_comparator;
  logic clk = 0, rst_n = 0, clear = 0, cmp_en = 0;
  logic [7:0] expect_data = 0, dout = 0, bist_expect_data;
  logic fail, error;
  int checks = 0, failures = 0;

  mbist_comparator dut (.*);

  always #5 clk = ~clk;

  initial begin
    bit prev_en, prev_bad, sticky;
    logic [7:0] prev_exp;
    repeat (2) @(posedge clk);
    rst_n = 1;
    prev_en = 0; prev_bad = 0; sticky = 0; prev_exp = 0;
    for (int i = 0; i < 400; i++) begin
      bit bad;
      @(negedge clk);
      // apply this cycle's inputs: read strobe/expect, and data for last read
      cmp_en      = ($urandom_range(0, 2) != 0);
      expect_data = 8'($urandom);
      bad         = prev_en && ($urandom_range(0, 19) == 0) && (i < 150 || i > 250);
      dout        = prev_en ? (bad ? prev_exp ^ 8'(1 << $urandom_range(0, 7)) : prev_exp) : 8'($urandom);
      clear       = (i == 200);
      #1;
      checks++;
      if (fail != bad || (prev_en && bist_expect_data != prev_exp) || error != sticky) begin
        failures++;
        $display("FAIL cycle %0d: fail=%0b exp %0b error=%0b exp %0b", i, fail, bad, error, sticky);
      end
      @(posedge clk);
      sticky = clear ? 0 : (sticky | bad);
      prev_en = cmp_en; prev_exp = expect_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
