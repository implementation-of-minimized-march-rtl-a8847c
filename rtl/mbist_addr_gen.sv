// mbist_addr_gen: row/column address generator of the BIST controller.
//
// Two counters: X1 selects the row and Y1 the column. X1 counts on every
// address step; Y1 counts only when X1 wraps (carry-in from X1's carry-out),
// so the row changes fastest. Both start at their minimum on load. The
// commands INC/DEC/HOLD come from the current instruction. x_end/y_end flag
// the end count of each counter in the commanded direction (maximum when
// incrementing, zero when decrementing; never while holding); last_addr is
// both together. After the last word a counter wraps (max->0 or 0->max),
// unless inhibit_last is set, in which case the address stays where it is.
// The word address is {column, row}, so the sweep is in linear address
// order; the counter structure and carry chain follow the algorithm setup,
// the sizes and the address mapping are this design's choice.
//
// Timing: load and step act on the rising clock edge; the outputs are
// registered (address) or combinational from the registers (end flags).
module mbist_addr_gen
  import mbist_pkg::*;
#(
  parameter int unsigned ROW_BITS = 7,
  parameter int unsigned COL_BITS = 3
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         load,        // set row and column to minimum
  input  logic                         step,        // apply the commands
  input  addr_cmd_e                    x_cmd,
  input  addr_cmd_e                    y_cmd,
  input  logic                         inhibit_last,
  output logic [ROW_BITS-1:0]          row,
  output logic [COL_BITS-1:0]          col,
  output logic [ROW_BITS+COL_BITS-1:0] addr,
  output logic                         x_end,
  output logic                         y_end,
  output logic                         last_addr
);

  localparam logic [ROW_BITS-1:0] ROW_MAX = '1;
  localparam logic [COL_BITS-1:0] COL_MAX = '1;

  always_comb begin
    unique case (x_cmd)
      ADDR_INC: x_end = (row == ROW_MAX);
      ADDR_DEC: x_end = (row == '0);
      default:  x_end = 1'b0;
    endcase
    unique case (y_cmd)
      ADDR_INC: y_end = (col == COL_MAX);
      ADDR_DEC: y_end = (col == '0);
      default:  y_end = 1'b0;
    endcase
  end

  assign last_addr = x_end && y_end;
  assign addr      = {col, row};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row <= '0;
      col <= '0;
    end else if (load) begin
      row <= '0;
      col <= '0;
    end else if (step && !(inhibit_last && last_addr)) begin
      unique case (x_cmd)
        ADDR_INC: row <= row + 1'b1;
        ADDR_DEC: row <= row - 1'b1;
        default:  ;
      endcase
      // Y1 carry-in is X1's carry-out
      if (x_end) begin
        unique case (y_cmd)
          ADDR_INC: col <= col + 1'b1;
          ADDR_DEC: col <= col - 1'b1;
          default:  ;
        endcase
      end
    end
  end

endmodule
