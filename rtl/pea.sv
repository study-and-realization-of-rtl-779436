// pea: Processing Element A, first layer of the butterfly unit.
//
// Eight wide complex inputs, eight outputs, registered (one cycle, clock enable en).
// Built from two layers of radix-2 butterflies, reformulated radix-2 butterflies
// (b0 = a0 + a1, b1 = a0 - a1/2) and trivial -j multipliers, it computes:
//   RAD2          four radix-2 butterflies on slot pairs (0,1) (2,3) (4,5) (6,7)
//   RAD4/8/16     two radix-4 DFTs on slots 0..3 and 4..7
//   RAD3          the first half of two radix-3 DFTs (slots 0..2 and 4..6):
//                 X0 = x0 + (x1 + x2), A = x0 - (x1 + x2)/2, D = x1 - x2
//   RAD5          the first half of one radix-5 DFT (slots 0..4):
//                 x0, t1 = s1 + s2, t2 = s1 - s2, d1, d2 with s1/d1 = x1 +/- x4,
//                 s2/d2 = x2 +/- x3
// The roles (radix-4/radix-2 layers, reformulated radix-2 for radix-3/5, trivial
// multipliers) follow the document; the slot assignment and the exact split of the
// radix-3/5 algorithms between the three processing elements are this design's own.
module pea
  import fft_pkg::*;
(
  input  logic   clk,
  input  logic   en,
  input  radix_e sel,
  input  wcplx_t din  [8],
  output wcplx_t dout [8]
);

  wcplx_t res [8];

  // reformulated radix-2, second output: a - b/2
  function automatic wcplx_t rf_half(input wcplx_t a, input wcplx_t b);
    rf_half.re = a.re - (b.re >>> 1);
    rf_half.im = a.im - (b.im >>> 1);
  endfunction

  always_comb begin
    wcplx_t a, b, c, d, sm, s1, s2;
    {a, b, c, d, sm, s1, s2} = '0;
    for (int s = 0; s < 8; s++) res[s] = '0;
    case (sel)
      RAD2: begin
        for (int s = 0; s < 8; s += 2) begin
          res[s]   = wadd(din[s], din[s+1]);
          res[s+1] = wsub(din[s], din[s+1]);
        end
      end
      RAD3: begin
        for (int q = 0; q < 2; q++) begin
          sm           = wadd(din[4*q+1], din[4*q+2]);
          res[4*q]     = wadd(din[4*q], sm);
          res[4*q+1]   = rf_half(din[4*q], sm);
          res[4*q+2]   = wsub(din[4*q+1], din[4*q+2]);
        end
      end
      RAD5: begin
        s1     = wadd(din[1], din[4]);
        s2     = wadd(din[2], din[3]);
        res[0] = din[0];
        res[1] = wadd(s1, s2);
        res[2] = wsub(s1, s2);
        res[3] = wsub(din[1], din[4]);
        res[4] = wsub(din[2], din[3]);
      end
      default: begin  // RAD4, RAD8, RAD16: two radix-4 DFTs
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
    endcase
  end

  always_ff @(posedge clk) begin
    if (en) dout <= res;
  end

endmodule
