// rot_angle_gen: rotation angle generator of the twiddle factor multiplier.
//
// Computes theta = 2*pi*k/N for the current transform length N, which the address
// generator's twiddle exponent k refers to (0 <= k < N, so 0 <= theta < 2*pi). As in the
// document, 2*pi/N is kept in a ROM as a 15-bit mantissa and a 4-bit exponent, and theta is
// a multiplication by k followed by a right shift:
//   coef(N) = man * 2^-(13 + sh),  2^14 <= man < 2^15,  theta = man * k * 2^-(13 + sh)
// The ROM has one entry per supported length (addressed by the length-table index) and
// is computed at elaboration from the length table. The document quotes the exponent
// range -9..0; with this normalisation it is 0..11 (sh). Output theta is unsigned with
// ZF fraction bits, registered: one cycle latency.
module rot_angle_gen
  import fft_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [LIDX_W-1:0] len_idx,
  input  logic [NW-1:0]     k,
  output logic [ZW-1:0]     theta
);

  localparam real TWO_PI = 6.28318530717958647692;

  typedef logic [18:0] rom_t [NUM_LENGTHS];   // {sh[3:0], man[14:0]}

  function automatic rom_t make_rom();
    rom_t t;
    for (int e = 0; e < NUM_LENGTHS; e++) begin
      real c;
      int  sh, man;
      c  = TWO_PI / real'(SUP_TABLE[e].n) * 8192.0;
      sh = 0;
      while (c < 16384.0 - 0.5) begin
        c  = c * 2.0;
        sh = sh + 1;
      end
      man = int'(c);
      if (man > 32767) man = 32767;
      t[e] = {4'(sh), 15'(man)};
    end
    return t;
  endfunction

  localparam rom_t COEF_ROM = make_rom();

  always_ff @(posedge clk) begin
    if (rst) begin
      theta <= '0;
    end else begin
      logic [18:0] ent;
      logic [3:0]  sh;
      logic [31:0] prod;
      ent  = COEF_ROM[len_idx];
      sh   = ent[18:15];
      prod = ({17'd0, ent[14:0]} * {19'd0, k}) << 3;
      if (sh != 0) prod = prod + (32'd1 << (sh - 1));
      theta <= ZW'(prod >> sh);
    end
  end

endmodule
