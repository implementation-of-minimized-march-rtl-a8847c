// tb_march_msr_rom: checks every instruction of the March mSR micro-program
// against a table written from the algorithm (operation set, address
// commands, data commands, inhibit, next conditions, branch, last flag), and
// that the operations per word add up to 13.
module tb_march_msr_rom;
  import mbist_pkg::*;

  pc_t    pc;
  instr_t instr;
  int checks = 0, failures = 0;

  march_msr_rom dut (.pc(pc), .instr(instr));

  // expected: opset, dir (+1 up, -1 down, 0 hold), expect value, write value,
  // inhibit, endcount, branch, branch target, last, ops per word
  typedef struct { opset_e os; int dir; bit ev; bit wv; bit inh; bit ec; bit br; int bt; bit last; int nops; } exp_t;
  exp_t tbl [7];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL pc=%0d %s", pc, what); end
  endtask

  initial begin
    int total;
    tbl[0] = '{OPS_WRITE_WRITE_FAST_ROW,     1, 0, 0, 0, 1, 0, 0, 0, 1};
    tbl[1] = '{OPS_WRITE_READ_WRITE_INVERT,  1, 1, 1, 0, 1, 0, 0, 0, 3};
    tbl[2] = '{OPS_READ_READ,                1, 0, 0, 0, 1, 0, 0, 0, 2};
    tbl[3] = '{OPS_WRITE_WRITE_FAST_ROW,     1, 0, 1, 1, 1, 0, 0, 0, 1};
    tbl[4] = '{OPS_READ_MODIFY_WRITE,        0, 1, 0, 0, 0, 0, 0, 0, 2};
    tbl[5] = '{OPS_READ_MODIFY_WRITE,       -1, 0, 1, 0, 1, 1, 4, 0, 2};
    tbl[6] = '{OPS_READ_READ,               -1, 1, 0, 0, 1, 0, 0, 1, 2};
    total = 0;
    for (int i = 0; i < 7; i++) begin
      addr_cmd_e ac;
      pc = pc_t'(i);
      #1;
      ac = (tbl[i].dir > 0) ? ADDR_INC : (tbl[i].dir < 0) ? ADDR_DEC : ADDR_HOLD;
      chk(instr.opset == tbl[i].os, "opset");
      chk(instr.x_cmd == ac && instr.y_cmd == ac, "address commands");
      if (tbl[i].os != OPS_WRITE_WRITE_FAST_ROW)
        chk((instr.expect_cmd == DATA_INV) == tbl[i].ev, "expect command");
      if (tbl[i].os != OPS_READ_READ)
        chk((instr.write_cmd == DATA_INV) == tbl[i].wv, "write command");
      chk(instr.inhibit_last == tbl[i].inh, "inhibit");
      chk(instr.x_endcount == tbl[i].ec && instr.y_endcount == tbl[i].ec, "next conditions");
      chk(instr.branch_en == tbl[i].br, "branch enable");
      if (tbl[i].br) chk(int'(instr.branch_to) == tbl[i].bt, "branch target");
      chk(instr.last == tbl[i].last, "last");
      total += tbl[i].nops;
    end
    checks++;
    if (total != 13) begin failures++; $display("FAIL complexity %0d", total); end
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
