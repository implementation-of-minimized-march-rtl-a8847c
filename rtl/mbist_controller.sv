// mbist_controller: memory BIST controller with March mSR hard-coded.
//
// Runs the 13N March mSR test on a single-port synchronous memory:
//   {w0}; up(w1,r1,w0); up(r0,r0); up(w1); down(r1,w0,r0,w1); down(r1,r1)
// The sequencer walks the micro-program held in march_msr_rom; the operation
// set decoder turns the current instruction and step into this cycle's
// read or write; the address generator (row counter X1 carrying into column
// counter Y1) supplies the word address; the data generator supplies the
// write and expected data (register or inverse); the comparator checks each
// read one cycle later and keeps the sticky ERROR flag.
//
// Interface: start pulse in, busy/done/error/fail out, and a single-port
// memory port (mem_ce, mem_we, mem_addr, mem_wdata, mem_rdata with one-cycle
// read latency). Timing: one memory operation per clock, 13 x 2^(ROW_BITS +
// COL_BITS) operation cycles, done one cycle after the last operation.
// The algorithm, instruction set and block structure follow the published
// controller; the handshake, port names and encodings are this design's.
module mbist_controller
  import mbist_pkg::*;
#(
  parameter int unsigned ROW_BITS = 7,
  parameter int unsigned COL_BITS = 3,
  parameter int unsigned DATA_W   = 8,
  localparam int unsigned ADDR_W  = ROW_BITS + COL_BITS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic              error,
  output logic              fail,
  output logic [DATA_W-1:0] bist_expect_data,
  // memory port
  output logic              mem_ce,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic [DATA_W-1:0] mem_rdata
);

  pc_t               pc;
  logic [STEP_W-1:0] step;
  instr_t            instr;
  mem_op_e           op;
  logic              invert_write, last_step;
  logic              load, issue, addr_step;
  logic              x_end, y_end;
  logic [DATA_W-1:0] expect_data;

  march_msr_rom u_rom (.pc(pc), .instr(instr));

  mbist_opset u_opset (
    .opset(instr.opset), .step(step),
    .op(op), .invert_write(invert_write), .last_step(last_step)
  );

  mbist_sequencer u_seq (
    .clk(clk), .rst_n(rst_n), .start(start), .instr(instr),
    .last_step(last_step), .x_end(x_end), .y_end(y_end),
    .pc(pc), .step(step), .load(load), .issue(issue), .addr_step(addr_step),
    .busy(busy), .done(done)
  );

  mbist_addr_gen #(.ROW_BITS(ROW_BITS), .COL_BITS(COL_BITS)) u_addr (
    .clk(clk), .rst_n(rst_n), .load(load), .step(addr_step),
    .x_cmd(instr.x_cmd), .y_cmd(instr.y_cmd), .inhibit_last(instr.inhibit_last),
    .row(), .col(), .addr(mem_addr),
    .x_end(x_end), .y_end(y_end), .last_addr()
  );

  mbist_data_gen #(.DATA_W(DATA_W)) u_data (
    .clk(clk), .rst_n(rst_n), .load(load),
    .write_cmd(instr.write_cmd), .expect_cmd(instr.expect_cmd),
    .invert_write(invert_write),
    .wdata(mem_wdata), .expect_data(expect_data)
  );

  mbist_comparator #(.DATA_W(DATA_W)) u_cmp (
    .clk(clk), .rst_n(rst_n), .clear(load),
    .cmp_en(issue && (op == MEM_READ)), .expect_data(expect_data),
    .dout(mem_rdata), .bist_expect_data(bist_expect_data),
    .fail(fail), .error(error)
  );

  assign mem_ce = issue && (op != MEM_IDLE);
  assign mem_we = issue && (op == MEM_WRITE);

  // The micro-program never runs past its last instruction.
  a_pc_range: assert property (@(posedge clk) disable iff (!rst_n)
    issue |-> (pc < PC_W'(NUM_INSTR)));
  // A write is always an enabled memory cycle.
  a_we_ce: assert property (@(posedge clk) disable iff (!rst_n) mem_we |-> mem_ce);

endmodule
