// pec: Processing Element C, last layer of the butterfly unit.
//
// Eight wide complex inputs, eight outputs, registered (one cycle, clock enable en).
// Built from two layers of radix-2 butterflies, it computes:
//   RAD2, RAD4    nothing (data pass through; the work was done in PEA)
//   RAD8          four radix-2 butterflies on slot pairs (0,1) (2,3) (4,5) (6,7)
//   RAD16         two radix-4 DFTs on slots 0..3 and 4..7
//   RAD3          the end of two radix-3 DFTs: (X0, A, M) -> (X0, A + M, A - M) on
//                 slots 0..2 and 4..6
//   RAD5          the end of one radix-5 DFT: from (X0, A, M2, Q1, Q2) on slots 0..4,
//                 B1/B2 = A +/- M2, X1/X4 = B1 +/- Q1, X2/X3 = B2 +/- Q2;
//                 output slots hold X0..X4 in order
// Roles follow the document; slot assignment is this design's own.
module pec
  import fft_pkg::*;
(
  input  logic   clk,
  input  logic   en,
  input  radix_e sel,
  input  wcplx_t din  [8],
  output wcplx_t dout [8]
);

  wcplx_t res [8];

  always_comb begin
    wcplx_t a, b, c, d, b1, b2;
    {a, b, c, d, b1, b2} = '0;
    res = din;
    case (sel)
      RAD8: begin
        for (int s = 0; s < 8; s += 2) begin
          res[s]   = wadd(din[s], din[s+1]);
          res[s+1] = wsub(din[s], din[s+1]);
        end
      end
      RAD16: begin
        for (int q = 0; q < 2; q++) begin
          a          = wadd(din[4*q],   din[4*q+2]);
          b          = wsub(din[4*q],   din[4*q+2]);
          c          = wadd(din[4*q+1], din[4*q+3]);
          d          = wmj(wsub(din[4*q+1], din[4*q+3]));
          res[4*q]   = wadd(a, c);
          res[4*q+1] = wadd(b, d);
          res[4*q+2] = wsub(a, c);
          res[4*q+3] = wsub(b, d);
        end
      end
      RAD3: begin
        for (int q = 0; q < 2; q++) begin
          res[4*q+1] = wadd(din[4*q+1], din[4*q+2]);
          res[4*q+2] = wsub(din[4*q+1], din[4*q+2]);
        end
      end
      RAD5: begin
        b1     = wadd(din[1], din[2]);
        b2     = wsub(din[1], din[2]);
        res[1] = wadd(b1, din[3]);
        res[4] = wsub(b1, din[3]);
        res[2] = wadd(b2, din[4]);
        res[3] = wsub(b2, din[4]);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (en) dout <= res;
  end

endmodule
