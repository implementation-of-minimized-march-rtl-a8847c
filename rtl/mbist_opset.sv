// mbist_opset: operation-set decoder.
//
// For the operation set of the current instruction and the index of the
// operation inside it (step), gives the memory operation of this cycle,
// whether the write data is the inverse of the write-data command's value,
// and whether this is the last operation on the current word. One memory
// operation is issued per clock cycle, so a set of k operations spends k
// cycles on each word.
//
//   WRITE_WRITE_FAST_ROW    : w(D)
//   WRITE_READ_WRITE_INVERT : w(D) r(E) w(~D)
//   READ_READ               : r(E) r(E)
//   READ_MODIFY_WRITE       : r(E) w(D)
//
// The four sets and their operation order follow the algorithm description.
// READ_MODIFY_WRITE is taken as two operations: the text describes it once
// as r,w,r and elsewhere uses it for the two-operation halves (r1,w0) and
// (r0,w1) of element E4; the latter is what gives the 13N total.
// Purely combinational.
module mbist_opset
  import mbist_pkg::*;
(
  input  opset_e              opset,
  input  logic [STEP_W-1:0]   step,
  output mem_op_e             op,
  output logic                invert_write,
  output logic                last_step
);

  always_comb begin
    op           = MEM_IDLE;
    invert_write = 1'b0;
    last_step    = 1'b1;
    unique case (opset)
      OPS_WRITE_WRITE_FAST_ROW: begin
        op = MEM_WRITE;
      end
      OPS_WRITE_READ_WRITE_INVERT: begin
        unique case (step)
          2'd0:    begin op = MEM_WRITE; last_step = 1'b0; end
          2'd1:    begin op = MEM_READ;  last_step = 1'b0; end
          default: begin op = MEM_WRITE; invert_write = 1'b1; end
        endcase
      end
      OPS_READ_READ: begin
        op        = MEM_READ;
        last_step = (step != 2'd0);
      end
      OPS_READ_MODIFY_WRITE: begin
        op        = (step == 2'd0) ? MEM_READ : MEM_WRITE;
        last_step = (step != 2'd0);
      end
      default: ;
    endcase
  end

endmodule
