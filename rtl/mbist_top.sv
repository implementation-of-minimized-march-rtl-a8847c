// mbist_top: March mSR memory BIST controller wired to its memory under test.
//
// A 1024 x 8 single-port SRAM (sram_sp) is driven by mbist_controller. A
// start pulse runs the 13N March mSR test on every word; bist_done rises one
// cycle after the last of the 13 x 1024 = 13312 memory operations (266.24 us
// with a 20 ns clock) and error tells whether any read mismatched. dout and
// bist_expect_data expose the compared values as in the controller's
// simulation. The memory is reached only through the BIST port here; the
// functional-mode path of a real chip is outside this design.
module mbist_top #(
  parameter int unsigned ROW_BITS = 7,
  parameter int unsigned COL_BITS = 3,
  parameter int unsigned DATA_W   = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bist_start,
  output logic              bist_busy,
  output logic              bist_done,
  output logic              error,
  output logic              fail,
  output logic [DATA_W-1:0] bist_expect_data,
  output logic [DATA_W-1:0] dout
);

  localparam int unsigned ADDR_W = ROW_BITS + COL_BITS;

  logic              mem_ce, mem_we;
  logic [ADDR_W-1:0] mem_addr;
  logic [DATA_W-1:0] mem_wdata;

  mbist_controller #(.ROW_BITS(ROW_BITS), .COL_BITS(COL_BITS), .DATA_W(DATA_W)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(bist_start),
    .busy(bist_busy), .done(bist_done), .error(error), .fail(fail),
    .bist_expect_data(bist_expect_data),
    .mem_ce(mem_ce), .mem_we(mem_we), .mem_addr(mem_addr),
    .mem_wdata(mem_wdata), .mem_rdata(dout)
  );

  sram_sp #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_sram (
    .clk(clk), .ce(mem_ce), .we(mem_we), .addr(mem_addr),
    .wdata(mem_wdata), .dout(dout)
  );

endmodule
