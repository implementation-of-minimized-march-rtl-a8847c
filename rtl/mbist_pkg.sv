// mbist_pkg: types and constants shared by the memory BIST controller.
//
// The controller executes a hard-coded micro-program: a short list of
// instructions, each naming an operation set (a fixed sequence of one to
// three read/write operations applied to one memory word), how the row (X1)
// and column (Y1) address counters move after the word is done, which of the
// data register or its inverse is written and expected, and when the
// instruction ends or branches. The instruction fields follow the
// instruction format of the March mSR description; the encodings are this
// design's own.
package mbist_pkg;

  // Operation sets. Each takes one clock cycle per memory operation.
  //   WRITE_WRITE_FAST_ROW     : w(D)                 1 op per word
  //   WRITE_READ_WRITE_INVERT  : w(D) r(E) w(~D)      3 ops per word
  //   READ_READ                : r(E) r(E)            2 ops per word
  //   READ_MODIFY_WRITE        : r(E) w(D)            2 ops per word
  // D is the value selected by the write-data command, E the value selected
  // by the expect-data command.
  typedef enum logic [1:0] {
    OPS_WRITE_WRITE_FAST_ROW    = 2'd0,
    OPS_WRITE_READ_WRITE_INVERT = 2'd1,
    OPS_READ_READ               = 2'd2,
    OPS_READ_MODIFY_WRITE       = 2'd3
  } opset_e;

  // Address counter command, applied once the word's last operation is done.
  typedef enum logic [1:0] {
    ADDR_HOLD = 2'd0,
    ADDR_INC  = 2'd1,
    ADDR_DEC  = 2'd2
  } addr_cmd_e;

  // Data command: the data register as loaded, or its bitwise inverse.
  typedef enum logic {
    DATA_REG = 1'b0,
    DATA_INV = 1'b1
  } data_cmd_e;

  // Memory operation issued in one cycle.
  typedef enum logic [1:0] {
    MEM_IDLE  = 2'd0,
    MEM_READ  = 2'd1,
    MEM_WRITE = 2'd2
  } mem_op_e;

  localparam int unsigned PC_W      = 3;   // instruction pointer width
  localparam int unsigned STEP_W    = 2;   // operation index inside a set
  localparam int unsigned NUM_INSTR = 7;   // March mSR micro-program length

  typedef logic [PC_W-1:0] pc_t;

  // One micro-program instruction.
  typedef struct packed {
    opset_e    opset;        // operation set applied to each word
    addr_cmd_e x_cmd;        // row counter (X1) command
    addr_cmd_e y_cmd;        // column counter (Y1) command, stepped on X1 carry
    data_cmd_e expect_cmd;   // expected read data: register or inverse
    data_cmd_e write_cmd;    // write data: register or inverse
    logic      inhibit_last; // do not step the address after the last word
    logic      x_endcount;   // next condition: X1 has reached its end count
    logic      y_endcount;   // next condition: Y1 has reached its end count
    logic      branch_en;    // on an unmet next condition, jump to branch_to
    pc_t       branch_to;    //   (otherwise the instruction repeats)
    logic      last;         // final instruction of the algorithm
  } instr_t;

endpackage
