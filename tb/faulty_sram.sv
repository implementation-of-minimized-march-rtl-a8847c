// faulty_sram: behavioural model of a single-port synchronous SRAM with one
// injected static fault primitive (FP), for fault-coverage simulation. Not
// synthesizable design logic: it is a test fixture.
//
// Same ports and timing as sram_sp (one-cycle read latency), plus the fault
// selection: fp selects one of 26 FPs (or none, fp < 0); the fault acts on
// bit FBIT of word victim, and coupling faults take bit FBIT of word
// aggressor as the aggressor cell. FPs, in the usual <S/F/R> notation
// (S sensitising operation, F faulty cell value, R read result), with
// coupling FPs written <a; S/F/R> for aggressor state a:
//    0 SAF <0>         1 SAF <1>
//    2 TF <0w1/0>      3 TF <1w0/1>
//    4 RDF <0r0/1/1>   5 RDF <1r1/0/0>
//    6 IRF <0r0/0/1>   7 IRF <1r1/1/0>
//    8 DRDF <0r0/1/0>  9 DRDF <1r1/0/1>
//   10..17 CFtr : j = fp-10, a = j/4, transition up (<a;0w1/0>) when
//                 (j/2)%2 == 0 else down (<a;1w0/1>)
//   18..25 CFdrd: j = fp-18, (a, y) = (j/4, (j/2)%2), <a; yry/~y/y>
// For both coupling groups j%2 == 0 means the aggressor word lies below
// the victim and j%2 == 1 above it; the testbench picks the addresses.
module faulty_sram #(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned FBIT   = 5
) (
  input  logic              clk,
  input  logic              ce,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] dout,
  // fault selection
  input  int                fp,
  input  logic [ADDR_W-1:0] victim,
  input  logic [ADDR_W-1:0] aggressor
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always @(posedge clk) begin
    if (ce) begin
      logic [DATA_W-1:0] word;
      logic old_b, new_b, a_b, rd_b;
      int j;
      word  = we ? wdata : mem[addr];
      old_b = mem[victim][FBIT];
      a_b   = mem[aggressor][FBIT];
      if (fp >= 0 && addr == victim) begin
        if (we) begin
          new_b = wdata[FBIT];
          if (fp == 2 && !old_b && new_b) new_b = 1'b0;                  // TF up
          if (fp == 3 && old_b && !new_b) new_b = 1'b1;                  // TF down
          if (fp >= 10 && fp <= 17) begin                                // CFtr
            j = fp - 10;
            if (a_b == j[2] && (((j / 2) % 2 == 0) ? (!old_b && new_b) : (old_b && !new_b)))
              new_b = old_b;
          end
          mem[addr] <= {wdata[DATA_W-1:FBIT+1], new_b, wdata[FBIT-1:0]};
        end else begin
          rd_b = old_b;
          case (fp)
            4, 5: if (old_b == fp[0]) begin rd_b = ~old_b; mem[victim][FBIT] <= ~old_b; end // RDF
            6, 7: if (old_b == fp[0]) rd_b = ~old_b;                                       // IRF
            8, 9: if (old_b == fp[0]) mem[victim][FBIT] <= ~old_b;                         // DRDF
            default: ;
          endcase
          if (fp >= 18 && fp <= 25) begin                                // CFdrd
            j = fp - 18;
            if (a_b == j[2] && old_b == j[1]) mem[victim][FBIT] <= ~old_b;
          end
          word[FBIT] = rd_b;
          dout <= word;
        end
      end else begin
        if (we) mem[addr] <= wdata;
        else    dout      <= word;
      end
      // stuck-at cell: the stored bit never leaves its stuck value
      if (fp == 0 || fp == 1) begin
        if (addr == victim && !we) dout[FBIT] <= fp[0];
      end
    end
    if (fp == 0 || fp == 1) mem[victim][FBIT] <= fp[0];
  end

endmodule
