// mbist_comparator: read-data comparator and ERROR flag.
//
// The memory returns read data one cycle after the read is issued, so the
// comparator registers the read strobe and the expected value of the issue
// cycle, and in the next cycle compares the memory output with them. fail is
// that cycle's mismatch; error is sticky from the first mismatch until
// clear (the start of the next run). bist_expect_data shows the value the
// current memory output is compared with. The compare of each read against
// its expected value and the ERROR flag follow the description of the
// controller's simulation; the one-cycle pipeline matches the synchronous
// single-port memory and is this design's choice.
module mbist_comparator #(
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              cmp_en,       // a read is issued this cycle
  input  logic [DATA_W-1:0] expect_data,  // its expected value
  input  logic [DATA_W-1:0] dout,         // memory output, one cycle later
  output logic [DATA_W-1:0] bist_expect_data,
  output logic              fail,
  output logic              error
);

  logic cmp_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmp_q            <= 1'b0;
      bist_expect_data <= '0;
      error            <= 1'b0;
    end else begin
      cmp_q <= cmp_en;
      if (cmp_en) bist_expect_data <= expect_data;
      if (clear)     error <= 1'b0;
      else if (fail) error <= 1'b1;
    end
  end

  assign fail = cmp_q && (dout != bist_expect_data);

endmodule
