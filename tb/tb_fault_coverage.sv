// tb_fault_coverage: fault-detection simulation of the March mSR controller
// at its default size (1024 x 8). Each of the 26 fault primitives of
// faulty_sram is injected in turn, a full BIST run is made, and the error
// flag at the end sets that FP's bit in one of seven detection flags (saf,
// tf, rdf, irf, drdf, cftr, cfdrd). The flags must equal the expected March
// mSR coverage: all of SAF, TF, RDF, IRF, DRDF and CFtr, and of CFdrd only
// <0;0r0/1/0> and <1;1r1/0/1> with the aggressor on either side (11000011):
// 22 of 26 FPs. A fault-free run must pass, and every run must take 13N
// operation cycles.
module tb_fault_coverage;
  localparam int unsigned RB = 7, CB = 3, AW = RB + CB, N = 1 << AW, DW = 8;
  localparam logic [AW-1:0] VICTIM = 10'd300, AGG_BELOW = 10'd123, AGG_ABOVE = 10'd777;

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, error, fail;
  logic [DW-1:0] bist_expect_data;
  logic mem_ce, mem_we;
  logic [AW-1:0] mem_addr, aggressor;
  logic [DW-1:0] mem_wdata, mem_rdata;
  int fp;
  int checks = 0, failures = 0;

  logic [1:0] saf_detect, tf_detect, rdf_detect, irf_detect, drdf_detect;
  logic [7:0] cftr_detect, cfdrd_detect;
  logic [25:0] detected;

  mbist_controller dut (.*);
  faulty_sram #(.ADDR_W(AW), .DATA_W(DW)) u_mem (
    .clk, .ce(mem_ce), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .dout(mem_rdata),
    .fp(fp), .victim(VICTIM), .aggressor(aggressor));

  always #10 clk = ~clk;   // 20 ns clock

  task automatic run_bist(output bit err, output int cycles);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    // count clock edges from the one that sampled start to the one that raised done
    cycles = 0;
    while (!done) begin @(negedge clk); cycles++; end
    err = error;
  endtask

  initial begin
    bit err;
    int cycles;
    aggressor = AGG_BELOW;
    fp = -1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_bist(err, cycles);
    checks++;
    if (err) begin failures++; $display("FAIL fault-free memory flagged"); end
    for (int f = 0; f < 26; f++) begin
      fp = f;
      aggressor = (f >= 10 && (f - 10) % 2 == 1) ? AGG_ABOVE : AGG_BELOW;
      run_bist(err, cycles);
      detected[f] = err;
      checks++;
      // start edge to done: 13N operations plus one compare cycle
      if (cycles != 13 * N + 1) begin failures++; $display("FAIL fp %0d took %0d cycles", f, cycles); end
    end
    {saf_detect, tf_detect, rdf_detect, irf_detect, drdf_detect} =
      {detected[0], detected[1], detected[2], detected[3], detected[4], detected[5],
       detected[6], detected[7], detected[8], detected[9]};
    for (int j = 0; j < 8; j++) begin
      cftr_detect[7 - j]  = detected[10 + j];
      cfdrd_detect[7 - j] = detected[18 + j];
    end
    $display("saf=%b tf=%b rdf=%b irf=%b drdf=%b cftr=%b cfdrd=%b",
             saf_detect, tf_detect, rdf_detect, irf_detect, drdf_detect, cftr_detect, cfdrd_detect);
    checks++;
    if ({saf_detect, tf_detect, rdf_detect, irf_detect, drdf_detect} != 10'b11_11_11_11_11) begin
      failures++; $display("FAIL single-cell coverage");
    end
    checks++;
    if (cftr_detect != 8'b1111_1111) begin failures++; $display("FAIL CFtr coverage"); end
    checks++;
    if (cfdrd_detect != 8'b1100_0011) begin failures++; $display("FAIL CFdrd coverage"); end
    checks++;
    if ($countones(detected) != 22) begin failures++; $display("FAIL %0d of 26 detected", $countones(detected)); end
    $display("fault coverage %0d/26, test time per run %0d ns", $countones(detected), 13 * N * 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (28 * (13 * N + 10)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
