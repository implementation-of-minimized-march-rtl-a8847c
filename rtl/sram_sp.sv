// sram_sp: single-port synchronous SRAM, the memory under test.
//
// 2^ADDR_W words of DATA_W bits (1024 x 8 = 1 KB by default). On a rising
// edge with ce high it writes wdata to addr when we is high, otherwise it
// reads addr, and the word appears on dout after that edge (one-cycle read
// latency). dout holds its value when no read is made. The size is the one
// the controller was evaluated with; the port list and timing are this
// design's, as for a typical compiled single-port SRAM. Written as an array
// so that synthesis can map it to a memory.
module sram_sp #(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              ce,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] dout
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (ce) begin
      if (we) mem[addr] <= wdata;
      else    dout      <= mem[addr];
    end
  end

endmodule
