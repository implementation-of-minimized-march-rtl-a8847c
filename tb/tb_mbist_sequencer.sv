// tb_mbist_sequencer: drives the sequencer with the March mSR micro-program
// and operation-set decoder and a simple linear address model of 8 words.
// Every cycle of the run is compared with the reference operation stream:
// instruction, step and word address, with the address stepped only on the
// last operation of a word. Checks 13N issue cycles, done one cycle after
// the last operation, start ignored while busy, and a second run.
module tb_mbist_sequencer;
  import mbist_pkg::*;
  import march_ref_pkg::*;
  localparam int unsigned N = 8;

  logic clk = 0, rst_n = 0, start = 0;
  instr_t instr;
  mem_op_e op;
  logic invert_write, last_step, x_end, y_end;
  pc_t pc;
  logic [STEP_W-1:0] step;
  logic load, issue, addr_step, busy, done;
  int checks = 0, failures = 0;
  int maddr;   // address model

  march_msr_rom u_rom (.pc(pc), .instr(instr));
  mbist_opset u_ops (.opset(instr.opset), .step(step), .op(op),
                     .invert_write(invert_write), .last_step(last_step));
  mbist_sequencer dut (.*);

  // address model: single counter 0..N-1, end count at N-1 (up) or 0 (down)
  always_comb begin
    x_end = (instr.x_cmd == ADDR_INC) ? (maddr == N - 1) :
            (instr.x_cmd == ADDR_DEC) ? (maddr == 0) : 1'b0;
    y_end = x_end;
  end
  always_ff @(posedge clk) begin
    if (load) maddr <= 0;
    else if (addr_step && !(instr.inhibit_last && x_end)) begin
      if (instr.x_cmd == ADDR_INC) maddr <= (maddr + 1) % N;
      if (instr.x_cmd == ADDR_DEC) maddr <= (maddr + N - 1) % N;
    end
  end

  always #5 clk = ~clk;

  function automatic int exp_pc(ref_op_t o);
    if (o.elem < 4) return o.elem;
    if (o.elem == 4) return (o.k < 2) ? 4 : 5;
    return 6;
  endfunction

  task automatic run(input bit poke_start);
    ref_op_t ops[$];
    int cyc;
    build_msr(N, ops);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 0;
    foreach (ops[i]) begin
      int ek;
      ek = (ops[i].elem == 4) ? ops[i].k % 2 : ops[i].k;
      if (poke_start && i == 50) start = 1;   // must be ignored
      #1;
      checks++;
      if (!issue || int'(pc) != exp_pc(ops[i]) || int'(step) != ek || maddr != int'(ops[i].addr)) begin
        failures++;
        if (failures < 10)
          $display("FAIL op %0d: issue=%0b pc=%0d step=%0d addr=%0d exp pc=%0d step=%0d addr=%0d",
                   i, issue, pc, step, maddr, exp_pc(ops[i]), ek, ops[i].addr);
      end
      @(negedge clk) start = 0;
      cyc++;
    end
    // drain cycle, then done
    checks++;
    if (issue || !busy || done) begin failures++; $display("FAIL drain cycle"); end
    @(negedge clk);
    checks++;
    if (!done || busy || issue) begin failures++; $display("FAIL done not raised"); end
    checks++;
    if (cyc != 13 * N) begin failures++; $display("FAIL %0d cycles", cyc); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (busy || done || issue) begin failures++; $display("FAIL idle after reset"); end
    run(1);
    repeat (3) @(negedge clk);
    checks++;
    if (!done) begin failures++; $display("FAIL done not held"); end
    run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
