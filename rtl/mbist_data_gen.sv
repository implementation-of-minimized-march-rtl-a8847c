// mbist_data_gen: write-data and expect-data generator.
//
// Holds a write-data register and an expect-data register, both loaded at
// the start of a run (with LOAD_WRITE_DATA and LOAD_EXPECT_DATA, all zeros
// for March mSR). Each cycle it drives the write data as the register or its
// inverse, per the instruction's write-data command, inverted once more on
// the final write of a write-read-write-invert set; and the expected read
// data as the expect register or its inverse, per the expect-data command.
// This follows the algorithm's data setup; the register structure is the
// simplest that provides it.
//
// Timing: registers load on the rising edge with load high; the data outputs
// are combinational from the registers and the commands.
module mbist_data_gen
  import mbist_pkg::*;
#(
  parameter int unsigned          DATA_W           = 8,
  parameter logic [DATA_W-1:0]    LOAD_WRITE_DATA  = '0,
  parameter logic [DATA_W-1:0]    LOAD_EXPECT_DATA = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  data_cmd_e         write_cmd,
  input  data_cmd_e         expect_cmd,
  input  logic              invert_write,
  output logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] expect_data
);

  logic [DATA_W-1:0] write_reg, expect_reg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      write_reg  <= LOAD_WRITE_DATA;
      expect_reg <= LOAD_EXPECT_DATA;
    end else if (load) begin
      write_reg  <= LOAD_WRITE_DATA;
      expect_reg <= LOAD_EXPECT_DATA;
    end
  end

  assign wdata       = ((write_cmd == DATA_INV) != invert_write) ? ~write_reg : write_reg;
  assign expect_data = (expect_cmd == DATA_INV) ? ~expect_reg : expect_reg;

endmodule
