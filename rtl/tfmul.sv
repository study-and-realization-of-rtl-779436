// tfmul: twiddle factor multiplier of the FFT processor.
//
// Sixteen lanes, each a rotation angle generator followed by a radix-4 CORDIC rotator:
// lane l leaves with data_o[l] * exp(-j*2*pi*k[l]/N). When EN_C is low the angle is
// forced to zero (first stage and idle time) and the data only pass the pipeline. One
// CORDIC per lane and the angle generator feeding it follow the document. Latency:
// 1 (angle) + NROT + 2 (CORDIC) = NROT + 3 cycles (12 at DW = 16), one new set of 16
// per cycle.
module tfmul
  import fft_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              en_c,
  input  logic [LIDX_W-1:0] addr_c,              // length-table index (coefficient ROM address)
  input  logic [NW-1:0]     k      [LANES],      // twiddle exponent per lane
  input  cplx_t             data_o [LANES],      // data read from memory
  output cplx_t             data_c [LANES]       // rotated data to the butterfly unit
);

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic [ZW-1:0] theta;
    cplx_t         d_q;

    rot_angle_gen u_rag (
      .clk, .rst,
      .len_idx (addr_c),
      .k       (en_c ? k[l] : NW'(0)),
      .theta   (theta)
    );

    always_ff @(posedge clk) begin
      if (rst) d_q <= '0;
      else     d_q <= data_o[l];
    end

    cordic_rotator u_cordic (
      .clk, .rst,
      .theta (theta),
      .x_in  (d_q.re),
      .y_in  (d_q.im),
      .x_out (data_c[l].re),
      .y_out (data_c[l].im)
    );
  end

endmodule
