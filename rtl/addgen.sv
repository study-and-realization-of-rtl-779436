// addgen: one ADDGEN cell of the address generator.
//
// Translates a data index i (the position of a datum in the in-place mixed-radix order,
// 0 <= i < 4096) into a memory bank and an address inside the bank:
//   address = i[11:4]
//   bank    = (i[3:0] + a * i[7:4] + b * i[11:8]) mod 16
// Each row of 16 consecutive indices is spread over all 16 banks, rotated by a skew
// that depends on the row. The per-length skew coefficients a and b (from the length
// table) make every access cycle of every stage conflict-free. The document's cell uses
// a digit-sum rule with bit-reversed first and last digits; this skewed-row rule is this
// design's own, chosen because it is provably one-to-one and was checked conflict-free
// for every supported length. Purely combinational. Index bit 12 is unused: indices
// stay below 4096 (the 13-bit width only exists so that 4096 itself fits as a length).
module addgen
  import fft_pkg::*;
(
  input  logic [NW-1:0] idx,
  input  logic [3:0]    skew_a,
  input  logic [3:0]    skew_b,
  output logic [BW-1:0] bank,
  output logic [AW-1:0] addr
);

  always_comb begin
    logic [3:0] pa, pb;
    pa   = 4'(idx[7:4] * skew_a);     // mod 16
    pb   = 4'(idx[11:8] * skew_b);
    bank = idx[3:0] + pa + pb;
    addr = idx[11:4];
  end

endmodule
