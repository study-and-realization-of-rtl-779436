// cordic_rotator: radix-4 pipelined CORDIC that multiplies a complex sample by
// exp(-j*theta).
//
// theta is unsigned, in radians with ZF fraction bits, 0 <= theta < 2*pi. A
// pre-processing stage removes the nearest multiple q*pi/2 (a trivial rotation of the
// data by (-j)^q) so that |theta'| <= pi/4. Then NROT = DW/2 + 1 radix-4 micro-rotations
// follow, each in its own pipeline stage (an x/y cell and a w cell):
//   sigma_i in {-2,-1,0,1,2} chosen from w_i = 4^i z_i by the selection function
//   x_(i+1) = x_i + sigma_i 4^-i y_i,  y_(i+1) = y_i - sigma_i 4^-i x_i
//   w_(i+1) = 4 (w_i - 4^i atan(sigma_i 4^-i))
// For i = 0 the thresholds are 5/8, 3/8, -1/2, -7/8; for i > 0 they are +-1/2, +-3/2.
// The scale factor is not constant: K = prod 1/sqrt(1 + sigma_i^2 16^-i) over the first
// DW/4 micro-rotations (later ones change it by less than 2^-DW) is formed from small
// per-rotation ROMs k_i[|sigma_i|] and multiplied into x and y in a final x/y cell.
// Structure and equations follow the document. Word widths (DW + 6 bits for x/y with 4
// guard fraction bits, ZF + 4 bits for w) and rounding are this design's own.
// Latency: NROT + 2 cycles; a new sample is accepted every cycle.
module cordic_rotator
  import fft_pkg::*;
#(
  parameter int XDW  = DW,               // data width of real/imaginary parts
  parameter int NROT = XDW / 2 + 1,      // micro-rotations
  parameter int NK   = XDW / 4           // micro-rotations with a scale ROM
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [ZW-1:0]        theta,
  input  logic signed [XDW-1:0] x_in,
  input  logic signed [XDW-1:0] y_in,
  output logic signed [XDW-1:0] x_out,
  output logic signed [XDW-1:0] y_out
);

  localparam int G   = 4;                // guard fraction bits on x/y
  localparam int XW  = XDW + 2 + G + 1;  // x/y width: gain up to ~2.6
  localparam int WW  = ZF + 4;           // w width: sign, 3 integer bits, ZF fraction
  localparam int KF  = 16;               // fraction bits of scale factors
  localparam real PI = 3.14159265358979323846;

  localparam int PI_4  = int'(PI / 4.0 * real'(1 << ZF));
  localparam int PI_2  = int'(PI / 2.0 * real'(1 << ZF));
  localparam int PI_1  = int'(PI * real'(1 << ZF));
  localparam int PI_34 = int'(PI * 0.75 * real'(1 << ZF));
  localparam int PI_54 = int'(PI * 1.25 * real'(1 << ZF));
  localparam int PI_74 = int'(PI * 1.75 * real'(1 << ZF));
  localparam int PI_21 = int'(PI * 2.0 * real'(1 << ZF));

  typedef int atab_t [NROT*3];
  typedef int ktab_t [NK*3];

  // 4^i * atan(s * 4^-i) for s = 0, 1, 2, with ZF fraction bits
  function automatic atab_t make_atab();
    atab_t t;
    for (int i = 0; i < NROT; i++)
      for (int s = 0; s < 3; s++)
        t[3*i+s] = int'($atan(real'(s) / (4.0 ** i)) * (4.0 ** i) * real'(1 << ZF));
    return t;
  endfunction

  // 1 / sqrt(1 + s^2 16^-i) for s = 0, 1, 2, with KF fraction bits
  function automatic ktab_t make_ktab();
    ktab_t t;
    for (int i = 0; i < NK; i++)
      for (int s = 0; s < 3; s++)
        t[3*i+s] = int'(real'(1 << KF) / $sqrt(1.0 + real'(s * s) / (16.0 ** i)));
    return t;
  endfunction

  localparam atab_t ATAB = make_atab();
  localparam ktab_t KTAB = make_ktab();

  logic signed [XW-1:0] xs [NROT+1];
  logic signed [XW-1:0] ys [NROT+1];
  logic signed [WW-1:0] ws [NROT+1];
  logic [1:0]           sg [NROT+1][NK];     // |sigma_i| carried to the scale stage

  // pre-processing block
  always_ff @(posedge clk) begin
    if (rst) begin
      xs[0] <= '0;
      ys[0] <= '0;
      ws[0] <= '0;
    end else begin
      logic signed [XW-1:0] x, y;
      logic signed [WW-1:0] t;
      x = XW'(x_in) <<< G;
      y = XW'(y_in) <<< G;
      t = WW'(signed'({1'b0, theta}));
      if (t < WW'(PI_4)) begin
        xs[0] <= x;  ys[0] <= y;  ws[0] <= t;
      end else if (t < WW'(PI_34)) begin
        xs[0] <= y;  ys[0] <= -x; ws[0] <= t - WW'(PI_2);
      end else if (t < WW'(PI_54)) begin
        xs[0] <= -x; ys[0] <= -y; ws[0] <= t - WW'(PI_1);
      end else if (t < WW'(PI_74)) begin
        xs[0] <= -y; ys[0] <= x;  ws[0] <= t - WW'(PI_2) - WW'(PI_1);
      end else begin
        xs[0] <= x;  ys[0] <= y;  ws[0] <= t - WW'(PI_21);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) for (int k = 0; k < NK; k++) sg[0][k] <= '0;
    else     for (int k = 0; k < NK; k++) sg[0][k] <= '0;
  end

  // micro-rotations: w cell (selection function, alpha ROM, x4) and x/y cell
  for (genvar i = 0; i < NROT; i++) begin : g_rot
    logic signed [2:0]    sigma;
    logic signed [XW-1:0] xsh, ysh;
    logic signed [WW-1:0] alpha;

    always_comb begin
      logic signed [WW-1:0] w;
      w = ws[i];
      if (i == 0) begin
        if      (w >= WW'(5 <<< (ZF - 3)))   sigma = 3'sd2;
        else if (w >= WW'(3 <<< (ZF - 3)))   sigma = 3'sd1;
        else if (w >= -WW'(4 <<< (ZF - 3)))  sigma = 3'sd0;
        else if (w >= -WW'(7 <<< (ZF - 3)))  sigma = -3'sd1;
        else                                 sigma = -3'sd2;
      end else begin
        if      (w >= WW'(3 <<< (ZF - 1)))   sigma = 3'sd2;
        else if (w >= WW'(1 <<< (ZF - 1)))   sigma = 3'sd1;
        else if (w >= -WW'(1 <<< (ZF - 1)))  sigma = 3'sd0;
        else if (w >= -WW'(3 <<< (ZF - 1)))  sigma = -3'sd1;
        else                                 sigma = -3'sd2;
      end
      xsh = xs[i] >>> (2 * i);
      ysh = ys[i] >>> (2 * i);
      case (sigma)
        3'sd2:   alpha = WW'(ATAB[3*i+2]);
        3'sd1:   alpha = WW'(ATAB[3*i+1]);
        -3'sd1:  alpha = -WW'(ATAB[3*i+1]);
        -3'sd2:  alpha = -WW'(ATAB[3*i+2]);
        default: alpha = '0;
      endcase
    end

    always_ff @(posedge clk) begin
      if (rst) begin
        xs[i+1] <= '0;
        ys[i+1] <= '0;
        ws[i+1] <= '0;
        for (int k = 0; k < NK; k++) sg[i+1][k] <= '0;
      end else begin
        case (sigma)
          3'sd2:   begin xs[i+1] <= xs[i] + (ysh <<< 1); ys[i+1] <= ys[i] - (xsh <<< 1); end
          3'sd1:   begin xs[i+1] <= xs[i] + ysh;         ys[i+1] <= ys[i] - xsh;         end
          -3'sd1:  begin xs[i+1] <= xs[i] - ysh;         ys[i+1] <= ys[i] + xsh;         end
          -3'sd2:  begin xs[i+1] <= xs[i] - (ysh <<< 1); ys[i+1] <= ys[i] + (xsh <<< 1); end
          default: begin xs[i+1] <= xs[i];               ys[i+1] <= ys[i];               end
        endcase
        ws[i+1] <= (ws[i] - alpha) <<< 2;
        for (int k = 0; k < NK; k++)
          sg[i+1][k] <= (k == i) ? ((sigma < 0) ? 2'(-sigma) : 2'(sigma)) : sg[i][k];
      end
    end
  end

  // scale factor computation and final x/y cell
  always_ff @(posedge clk) begin
    if (rst) begin
      x_out <= '0;
      y_out <= '0;
    end else begin
      logic [KF:0]            kk;
      logic [2*KF+1:0]        kp;
      logic signed [XW+KF+1:0] px, py;
      kk = (KF+1)'(1 << KF);
      for (int k = 0; k < NK; k++) begin
        kp = kk * (KF+1)'(KTAB[3*k+int'(sg[NROT][k])]);
        kk = (KF+1)'(kp >> KF);
      end
      px = (XW+KF+2)'(xs[NROT]) * (XW+KF+2)'(signed'({1'b0, kk}));
      py = (XW+KF+2)'(ys[NROT]) * (XW+KF+2)'(signed'({1'b0, kk}));
      px = (px + (XW+KF+2)'(1 <<< (KF + G - 1))) >>> (KF + G);
      py = (py + (XW+KF+2)'(1 <<< (KF + G - 1))) >>> (KF + G);
      x_out <= sat(px);
      y_out <= sat(py);
    end
  end

  function automatic logic signed [XDW-1:0] sat(input logic signed [XW+KF+1:0] v);
    if (v > (XW+KF+2)'((1 <<< (XDW-1)) - 1))   return {1'b0, {(XDW-1){1'b1}}};
    else if (v < -(XW+KF+2)'(1 <<< (XDW-1)))   return {1'b1, {(XDW-1){1'b0}}};
    else                                       return XDW'(v);
  endfunction

endmodule
