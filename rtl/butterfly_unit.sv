// butterfly_unit: the 16-input configurable butterfly of the FFT processor.
//
// Every cycle it takes 16 complex samples and computes, according to SEL, one radix-16,
// two radix-8, two radix-5, four radix-4, four radix-3 or eight radix-2 DFTs. Input
// lane t*r + n carries element n of DFT number t; output lane t*r + k carries bin k of
// that DFT. Each result is scaled by 2^-ceil(log2 r) (so a whole transform of length N
// is scaled by about 1/N), rounded and saturated to DW bits.
//
// Structure (as in the document): input switching, two Processing Elements A, then a
// Processing Element B (all non-trivial multipliers) beside which the other data simply
// pass (delay line), BC switching, two Processing Elements C, output switching. Radix-16
// is computed as 4 x 4 (radix-4 in PEA, twiddles W16^(n2*k1) in PEB, radix-4 in PEC),
// radix-8 as 4 x 2 (radix-4 in PEA, W8^k1 in PEB, radix-2 in PEC). The lane permutations
// of the switching blocks are this design's own. Pipeline: three register stages
// (PEA, PEB, PEC), so results appear 3 enabled cycles after their inputs; SEL travels
// with the data. Clock enable EN_BU stalls the whole pipeline.
module butterfly_unit
  import fft_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   en,
  input  radix_e sel,
  input  cplx_t  data_in  [LANES],
  output cplx_t  data_out [LANES]
);

  wcplx_t a_in  [2][8];
  wcplx_t a_out [2][8];
  wcplx_t b_in  [16];
  wcplx_t b_out [16];
  wcplx_t c_in  [2][8];
  wcplx_t c_out [2][8];
  radix_e sel_b, sel_c, sel_o;

  function automatic wcplx_t widen(input cplx_t x);
    widen.re = IW'(x.re);
    widen.im = IW'(x.im);
  endfunction

  function automatic logic signed [DW-1:0] narrow(input logic signed [IW-1:0] x,
                                                  input int unsigned sh);
    logic signed [IW:0] r;
    r = (IW+1)'(x) + ((IW+1)'(1) <<< (sh - 1));
    r = r >>> sh;
    if (r > (IW+1)'((1 <<< (DW-1)) - 1))      return {1'b0, {(DW-1){1'b1}}};
    else if (r < -(IW+1)'(1 <<< (DW-1)))      return {1'b1, {(DW-1){1'b0}}};
    else                                      return DW'(r);
  endfunction

  // input switching
  always_comb begin
    for (int h = 0; h < 2; h++)
      for (int j = 0; j < 8; j++) a_in[h][j] = '0;
    for (int h = 0; h < 2; h++) begin
      for (int q = 0; q < 2; q++) begin
        for (int j = 0; j < 4; j++) begin
          case (sel)
            RAD8:    a_in[h][4*q+j] = widen(data_in[8*h + 2*j + q]);
            RAD16:   a_in[h][4*q+j] = widen(data_in[4*j + 2*h + q]);
            RAD3:    if (j < 3) a_in[h][4*q+j] = widen(data_in[6*h + 3*q + j]);
            RAD5:    if (4*q + j < 5) a_in[h][4*q+j] = widen(data_in[5*h + 4*q + j]);
            default: a_in[h][4*q+j] = widen(data_in[8*h + 4*q + j]);
          endcase
        end
      end
    end
  end

  for (genvar h = 0; h < 2; h++) begin : g_pea
    pea u_pea (.clk, .en, .sel(sel), .din(a_in[h]), .dout(a_out[h]));
  end

  // AB switching: PEA h slot j -> PEB slot 8h+j
  always_comb begin
    for (int h = 0; h < 2; h++)
      for (int j = 0; j < 8; j++) b_in[8*h+j] = a_out[h][j];
  end

  peb u_peb (.clk, .en, .sel(sel_b), .din(b_in), .dout(b_out));

  // BC switching
  always_comb begin
    for (int h = 0; h < 2; h++) begin
      for (int j = 0; j < 8; j++) c_in[h][j] = b_out[8*h+j];
      case (sel_c)
        RAD8: begin
          for (int k1 = 0; k1 < 4; k1++) begin
            c_in[h][2*k1]   = b_out[8*h + k1];
            c_in[h][2*k1+1] = b_out[8*h + 4 + k1];
          end
        end
        RAD16: begin
          for (int q = 0; q < 2; q++)
            for (int n2 = 0; n2 < 4; n2++)
              c_in[h][4*q+n2] = b_out[8*(n2/2) + 4*(n2%2) + 2*h + q];
        end
        default: ;
      endcase
    end
  end

  for (genvar h = 0; h < 2; h++) begin : g_pec
    pec u_pec (.clk, .en, .sel(sel_c), .din(c_in[h]), .dout(c_out[h]));
  end

  // output switching, scaling and saturation
  always_comb begin
    int unsigned sh;
    sh = radix_shift(sel_o);
    for (int l = 0; l < LANES; l++) data_out[l] = '0;
    for (int h = 0; h < 2; h++) begin
      for (int j = 0; j < 8; j++) begin
        int lane;
        case (sel_o)
          RAD8:    lane = 8*h + j/2 + 4*(j%2);
          RAD16:   lane = 2*h + (j/4) + 4*(j%4);
          RAD3:    lane = (j%4 < 3) ? 6*h + 3*(j/4) + (j%4) : -1;
          RAD5:    lane = (j < 5) ? 5*h + j : -1;
          default: lane = 8*h + j;
        endcase
        if (lane >= 0) begin
          data_out[lane].re = narrow(c_out[h][j].re, sh);
          data_out[lane].im = narrow(c_out[h][j].im, sh);
        end
      end
    end
  end

  // SEL travels with the data through the three register stages
  always_ff @(posedge clk) begin
    if (rst) begin
      sel_b <= RAD2;
      sel_c <= RAD2;
      sel_o <= RAD2;
    end else if (en) begin
      sel_b <= sel;
      sel_c <= sel_b;
      sel_o <= sel_c;
    end
  end

endmodule
