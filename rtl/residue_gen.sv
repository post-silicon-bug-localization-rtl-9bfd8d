// residue_gen: combinational residue (value mod MOD) for MOD = 2^C - 1.
// IFRA stores residues instead of full values as auxiliary information:
// 2-bit residues (mod 3) of register names and 3-bit residues (mod 7) of
// operands, results and load/store data. Because 2^C = 1 (mod MOD), the
// residue of a word equals the residue of the sum of its C-bit chunks; the
// sum is folded a fixed number of times and the value MOD itself maps to 0.
// The document gives only the moduli; the chunk-folding structure is this
// design's choice. Purely combinational, no clock.
module residue_gen #(
  parameter int unsigned IN_W = 64,
  parameter int unsigned MOD  = 7     // must be 2^C - 1 (3, 7, 15, ...)
) (
  input  logic [IN_W-1:0]            value_i,
  output logic [$clog2(MOD+1)-1:0]   residue_o
);
  localparam int unsigned C      = $clog2(MOD + 1);
  localparam int unsigned NCHUNK = (IN_W + C - 1) / C;
  localparam int unsigned SUM_W  = C + $clog2(NCHUNK + 1) + 1;

  logic [NCHUNK*C-1:0] padded;
  logic [SUM_W-1:0]    sum;

  initial assert ((1 << C) - 1 == MOD) else $error("residue_gen: MOD must be 2^C-1");

  always_comb begin
    padded = '0;
    padded[IN_W-1:0] = value_i;
    sum = '0;
    for (int unsigned k = 0; k < NCHUNK; k++)
      sum = sum + SUM_W'(padded[k*C +: C]);
    // each fold maps sum to (sum mod 2^C) + (sum >> C), preserving the residue
    for (int unsigned f = 0; f < SUM_W; f++)
      sum = SUM_W'(sum[C-1:0]) + (sum >> C);
    residue_o = (sum[C-1:0] == C'(MOD)) ? '0 : sum[C-1:0];
  end
endmodule
