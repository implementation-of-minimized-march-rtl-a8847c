// mbist_sequencer: micro-program sequencer of the BIST controller.
//
// Holds the instruction pointer (pc) and the operation index inside the
// current operation set (step). While running it issues one memory
// operation per cycle. On the last operation of a word it steps the address
// generator and evaluates the instruction's next conditions (X1 and/or Y1 at
// their end count): if they hold, it moves to the next instruction, or ends
// the run after the last one; if not, it repeats the instruction on the next
// word, or jumps to the branch target when the instruction has one. There is
// no idle cycle between instructions, so March mSR takes exactly 13N cycles.
// After the last operation one drain cycle lets the comparator check the
// final read, then done is raised.
//
// The next-condition, repeat and branch rules follow the algorithm's
// instruction format. The start/done handshake is this design's: a one-cycle
// start pulse in IDLE or DONE loads the address and data generators and
// starts at pc 0; start while busy is ignored; done stays high until the
// next start.
//
// Timing: start seen on edge t0 -> first operation in the cycle after t0;
// last operation in cycle 13N after t0; done high from edge t0 + 13N + 1.
module mbist_sequencer
  import mbist_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  instr_t            instr,      // instruction at pc
  input  logic              last_step,  // this cycle's op is the word's last
  input  logic              x_end,
  input  logic              y_end,
  output pc_t               pc,
  output logic [STEP_W-1:0] step,
  output logic              load,       // load address and data generators
  output logic              issue,      // an operation is issued this cycle
  output logic              addr_step,  // step the address this cycle
  output logic              busy,
  output logic              done
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN, S_DONE} state_e;
  state_e state;

  logic cond_met;
  assign cond_met  = (!instr.x_endcount || x_end) && (!instr.y_endcount || y_end);
  assign issue     = (state == S_RUN);
  assign addr_step = issue && last_step;
  assign load      = start && !busy;
  assign busy      = (state == S_RUN) || (state == S_DRAIN);
  assign done      = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      pc    <= '0;
      step  <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            state <= S_RUN;
            pc    <= '0;
            step  <= '0;
          end
        end
        S_RUN: begin
          if (!last_step) begin
            step <= step + 1'b1;
          end else begin
            step <= '0;
            if (cond_met) begin
              if (instr.last) state <= S_DRAIN;
              else            pc    <= pc + 1'b1;
            end else if (instr.branch_en) begin
              pc <= instr.branch_to;
            end
          end
        end
        S_DRAIN: state <= S_DONE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // busy and done are exclusive; a start while busy changes nothing.
  a_busy_done: assert property (@(posedge clk) disable iff (!rst_n) !(busy && done));
  a_start_busy: assert property (@(posedge clk) disable iff (!rst_n)
    (start && state == S_RUN) |=> (state != S_IDLE));

endmodule
