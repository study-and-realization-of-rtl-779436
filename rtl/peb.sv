// peb: Processing Element B, the multiplier layer of the butterfly unit.
//
// Sixteen wide complex inputs (slots 0..7 from the first PEA, 8..15 from the second),
// sixteen outputs, registered (one cycle, clock enable en). It holds all non-trivial
// constant multipliers of the butterfly unit and the radix-5 adders:
//   RAD2, RAD4    pass (this path acts as the delay line)
//   RAD8          slots 8h+4+k1 (second radix-4 of radix-8 number h) times W8^k1
//   RAD16         slot 8h+4q+k1 (radix-4 number n2 = 2h+q) times W16^(n2*k1)
//   RAD3          slot 8h+4q+2 (D) becomes M = -j*sin(2*pi/3)*D
//   RAD5          per PEA half h, from (x0, t1, t2, d1, d2):
//                 X0 = x0 + t1, A = x0 - t1/4, M2 = C*t2 with C = (cos u - cos 2u)/2,
//                 Q1 = -j(sin u*d1 + sin 2u*d2), Q2 = -j(sin 2u*d1 - sin u*d2), u = 2*pi/5
// Constants are Q1.14 (fft_pkg). The document gives the role of this block and a
// twiddle ROM selected by SEL; the constant set and their split are this design's own.
module peb
  import fft_pkg::*;
(
  input  logic   clk,
  input  logic   en,
  input  radix_e sel,
  input  wcplx_t din  [16],
  output wcplx_t dout [16]
);

  wcplx_t res [16];

  always_comb begin
    wcplx_t x0, t1, t2, d1, d2, a;
    {x0, t1, t2, d1, d2, a} = '0;
    res = din;
    case (sel)
      RAD8: begin
        for (int h = 0; h < 2; h++)
          for (int k1 = 0; k1 < 4; k1++)
            res[8*h+4+k1] = wtw16(din[8*h+4+k1], 2 * k1);
      end
      RAD16: begin
        for (int h = 0; h < 2; h++)
          for (int q = 0; q < 2; q++)
            for (int k1 = 0; k1 < 4; k1++)
              res[8*h+4*q+k1] = wtw16(din[8*h+4*q+k1], (2*h + q) * k1);
      end
      RAD3: begin
        for (int h = 0; h < 2; h++)
          for (int q = 0; q < 2; q++)
            res[8*h+4*q+2] = wmj(wscale(din[8*h+4*q+2], C_SQRT3_2));
      end
      RAD5: begin
        for (int h = 0; h < 2; h++) begin
          x0 = din[8*h];
          t1 = din[8*h+1];
          t2 = din[8*h+2];
          d1 = din[8*h+3];
          d2 = din[8*h+4];
          a.re = x0.re - (t1.re >>> 2);
          a.im = x0.im - (t1.im >>> 2);
          res[8*h]   = wadd(x0, t1);
          res[8*h+1] = a;
          res[8*h+2] = wscale(t2, C_R5_M2);
          res[8*h+3] = wmj(wadd(wscale(d1, C_SIN_2PI5), wscale(d2, C_SIN_4PI5)));
          res[8*h+4] = wmj(wsub(wscale(d1, C_SIN_4PI5), wscale(d2, C_SIN_2PI5)));
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (en) dout <= res;
  end

endmodule
