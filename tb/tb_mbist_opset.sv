// tb_mbist_opset: exhaustive check of the operation-set decoder against the
// operation strings of the four sets: w, wrW (W = inverted write), rr, rw.
module tb_mbist_opset;
  import mbist_pkg::*;

  opset_e            opset;
  logic [STEP_W-1:0] step;
  mem_op_e           op;
  logic              invert_write, last_step;
  int checks = 0, failures = 0;

  mbist_opset dut (.opset(opset), .step(step), .op(op),
                   .invert_write(invert_write), .last_step(last_step));

  function automatic string seq_of(opset_e s);
    case (s)
      OPS_WRITE_WRITE_FAST_ROW:    return "w";
      OPS_WRITE_READ_WRITE_INVERT: return "wrW";
      OPS_READ_READ:               return "rr";
      default:                     return "rw";
    endcase
  endfunction

  initial begin
    for (int s = 0; s < 4; s++) begin
      string q;
      opset = opset_e'(s);
      q = seq_of(opset);
      for (int k = 0; k < q.len(); k++) begin
        step = STEP_W'(k);
        #1;
        checks++;
        if (op != ((q[k] == "r") ? MEM_READ : MEM_WRITE) ||
            invert_write != (q[k] == "W") ||
            last_step != (k == q.len() - 1)) begin
          failures++;
          $display("FAIL set %0d step %0d: op=%0d inv=%0d last=%0d", s, k, op, invert_write, last_step);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
