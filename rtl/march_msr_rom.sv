// march_msr_rom: the hard-coded March mSR micro-program.
//
// March mSR (13N):  {w0}; up(w1,r1,w0); up(r0,r0); up(w1); down(r1,w0,r0,w1);
// down(r1,r1). It is held as seven instructions (pc 0..6) that the sequencer
// steps through, one per March element except E4. E4 needs four operations
// per word, more than one operation set holds, so it is split in two:
// M4_r1w0 (pc 4) keeps the address and always falls through to M4_r0w1
// (pc 5), which steps the address down and branches back to M4_r1w0 until
// the lowest word is done. M3 (w1) inhibits the
// address step after its last word so that E4 starts at the highest address.
// Other instructions wrap their counters after the last word, which leaves
// the address at the first word of the next element.
//
// The instruction list, operation sets, data commands, address commands,
// next conditions, branch and address inhibit follow the published
// algorithm description; the binary encoding is this design's own.
//
// Interface: pc in, instr out, purely combinational (no timing of its own).
module march_msr_rom
  import mbist_pkg::*;
(
  input  pc_t    pc,
  output instr_t instr
);

  // Field order: opset, x_cmd, y_cmd, expect_cmd, write_cmd, inhibit_last,
  // x_endcount, y_endcount, branch_en, branch_to, last.
  always_comb begin
    unique case (pc)
      // M0 (w0), ascending
      3'd0: instr = '{OPS_WRITE_WRITE_FAST_ROW, ADDR_INC, ADDR_INC,
                      DATA_REG, DATA_REG, 1'b0, 1'b1, 1'b1, 1'b0, 3'd0, 1'b0};
      // M1 (w1,r1,w0), ascending
      3'd1: instr = '{OPS_WRITE_READ_WRITE_INVERT, ADDR_INC, ADDR_INC,
                      DATA_INV, DATA_INV, 1'b0, 1'b1, 1'b1, 1'b0, 3'd0, 1'b0};
      // M2 (r0,r0), ascending
      3'd2: instr = '{OPS_READ_READ, ADDR_INC, ADDR_INC,
                      DATA_REG, DATA_REG, 1'b0, 1'b1, 1'b1, 1'b0, 3'd0, 1'b0};
      // M3 (w1), ascending, address held after the last word
      3'd3: instr = '{OPS_WRITE_WRITE_FAST_ROW, ADDR_INC, ADDR_INC,
                      DATA_REG, DATA_INV, 1'b1, 1'b1, 1'b1, 1'b0, 3'd0, 1'b0};
      // M4_r1w0 (r1,w0), address held, no next condition
      3'd4: instr = '{OPS_READ_MODIFY_WRITE, ADDR_HOLD, ADDR_HOLD,
                      DATA_INV, DATA_REG, 1'b0, 1'b0, 1'b0, 1'b0, 3'd0, 1'b0};
      // M4_r0w1 (r0,w1), descending, branch back to M4_r1w0 until the end count
      3'd5: instr = '{OPS_READ_MODIFY_WRITE, ADDR_DEC, ADDR_DEC,
                      DATA_REG, DATA_INV, 1'b0, 1'b1, 1'b1, 1'b1, 3'd4, 1'b0};
      // M5 (r1,r1), descending, last instruction
      3'd6: instr = '{OPS_READ_READ, ADDR_DEC, ADDR_DEC,
                      DATA_INV, DATA_REG, 1'b0, 1'b1, 1'b1, 1'b0, 3'd0, 1'b1};
      default: instr = '{OPS_READ_READ, ADDR_HOLD, ADDR_HOLD,
                      DATA_REG, DATA_REG, 1'b0, 1'b0, 1'b0, 1'b0, 3'd0, 1'b1};
    endcase
  end

endmodule
