// tb_mbist_data_gen: checks write and expect data for every combination of
// data commands and the write inversion, with the default all-zeros load
// values and with a non-zero checkerboard load overridden for the test.
module tb_mbist_data_gen;
  import mbist_pkg::*;
  localparam logic [7:0] LW = 8'h5A, LE = 8'hC3;

  logic clk = 0, rst_n = 0, load = 0, invert_write = 0;
  data_cmd_e write_cmd = DATA_REG, expect_cmd = DATA_REG;
  logic [7:0] wdata, expect_data, wdata2, expect_data2;
  int checks = 0, failures = 0;

  mbist_data_gen dut0 (.clk, .rst_n, .load, .write_cmd, .expect_cmd, .invert_write,
                       .wdata(wdata), .expect_data(expect_data));
  mbist_data_gen #(.DATA_W(8), .LOAD_WRITE_DATA(LW), .LOAD_EXPECT_DATA(LE)) dut1 (
                       .clk, .rst_n, .load, .write_cmd, .expect_cmd, .invert_write,
                       .wdata(wdata2), .expect_data(expect_data2));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    load = 1; @(posedge clk); #1 load = 0;
    for (int w = 0; w < 2; w++)
      for (int e = 0; e < 2; e++)
        for (int v = 0; v < 2; v++) begin
          logic [7:0] ew0, ee0, ew1, ee1;
          write_cmd = data_cmd_e'(w); expect_cmd = data_cmd_e'(e); invert_write = v[0];
          #1;
          ew0 = ((w ^ v) != 0) ? 8'hFF : 8'h00;
          ee0 = (e != 0) ? 8'hFF : 8'h00;
          ew1 = ((w ^ v) != 0) ? ~LW : LW;
          ee1 = (e != 0) ? ~LE : LE;
          checks++;
          if (wdata !== ew0 || expect_data !== ee0 || wdata2 !== ew1 || expect_data2 !== ee1) begin
            failures++;
            $display("FAIL w=%0d e=%0d inv=%0d: %h %h %h %h", w, e, v, wdata, expect_data, wdata2, expect_data2);
          end
        end
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
