// tb_peb: self-checking testbench of Processing Element B.
//
// For every SEL value it drives sixteen random wide inputs, clocks once and compares the
// registered outputs with a real-arithmetic model of the multiplier layer: pass-through
// for radix-2/4, W8^k1 and W16^(n2*k1) twiddles for radix-8/16, -j*sin(2*pi/3) for
// radix-3 and the radix-5 middle step. Multiplied outputs may differ from the exact value
// by the rounding of the Q1.14 constants (tolerance 4 LSB); passed outputs must be exact.
// Also checks that EN low holds the outputs.
module tb_peb;
  import fft_pkg::*;

  localparam real PI = 3.14159265358979323846;

  logic   clk = 1'b0, en = 1'b0;
  radix_e sel = RAD2;
  wcplx_t din [16], dout [16];
  int checks = 0, failures = 0;

  peb dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // y = x * exp(-j*a)
  function automatic void rot(input real xr, input real xi, input real a,
                              output real yr, output real yi);
    yr = xr * $cos(a) + xi * $sin(a);
    yi = xi * $cos(a) - xr * $sin(a);
  endfunction

  function automatic void model(input radix_e s, input int xr [16], input int xi [16],
                                output real yr [16], output real yi [16]);
    real u;
    u = 2.0 * PI / 5.0;
    foreach (yr[i]) begin yr[i] = real'(xr[i]); yi[i] = real'(xi[i]); end
    case (s)
      RAD8:
        for (int h = 0; h < 2; h++)
          for (int k1 = 0; k1 < 4; k1++)
            rot(xr[8*h+4+k1], xi[8*h+4+k1], 2.0 * PI * k1 / 8.0, yr[8*h+4+k1], yi[8*h+4+k1]);
      RAD16:
        for (int h = 0; h < 2; h++)
          for (int q = 0; q < 2; q++)
            for (int k1 = 0; k1 < 4; k1++)
              rot(xr[8*h+4*q+k1], xi[8*h+4*q+k1], 2.0 * PI * ((2*h+q) * k1) / 16.0,
                  yr[8*h+4*q+k1], yi[8*h+4*q+k1]);
      RAD3:
        for (int h = 0; h < 2; h++)
          for (int q = 0; q < 2; q++) begin
            int i;
            i = 8*h + 4*q + 2;
            yr[i] = $sin(2.0 * PI / 3.0) * xi[i];
            yi[i] = -$sin(2.0 * PI / 3.0) * xr[i];
          end
      RAD5:
        for (int h = 0; h < 2; h++) begin
          int b;
          real c;
          b = 8 * h;
          c = ($cos(u) - $cos(2.0 * u)) / 2.0;
          yr[b]   = xr[b] + xr[b+1];            yi[b]   = xi[b] + xi[b+1];
          yr[b+1] = xr[b] - (xr[b+1] >>> 2);    yi[b+1] = xi[b] - (xi[b+1] >>> 2);
          yr[b+2] = c * xr[b+2];                yi[b+2] = c * xi[b+2];
          // -j*(s1*d1 + s2*d2) and -j*(s2*d1 - s1*d2)
          yr[b+3] =   $sin(u) * xi[b+3] + $sin(2.0*u) * xi[b+4];
          yi[b+3] = -($sin(u) * xr[b+3] + $sin(2.0*u) * xr[b+4]);
          yr[b+4] =   $sin(2.0*u) * xi[b+3] - $sin(u) * xi[b+4];
          yi[b+4] = -($sin(2.0*u) * xr[b+3] - $sin(u) * xr[b+4]);
        end
      default: ;
    endcase
  endfunction

  initial begin
    radix_e sels [6] = '{RAD2, RAD3, RAD4, RAD5, RAD8, RAD16};
    int  xr [16], xi [16];
    real yr [16], yi [16];
    foreach (din[i]) din[i] = '0;
    en = 1'b1;
    @(negedge clk);
    for (int it = 0; it < 600; it++) begin
      sel = sels[it % 6];
      foreach (xr[i]) begin
        xr[i] = $urandom_range(60000, 0) - 30000;
        xi[i] = $urandom_range(60000, 0) - 30000;
        din[i].re = IW'(xr[i]);
        din[i].im = IW'(xi[i]);
      end
      model(sel, xr, xi, yr, yi);
      @(posedge clk);
      #1;
      foreach (yr[i]) begin
        real er, ei;
        er = real'(dout[i].re) - yr[i];
        ei = real'(dout[i].im) - yi[i];
        if (er < 0.0) er = -er;
        if (ei < 0.0) ei = -ei;
        checks++;
        if (er > 4.0 || ei > 4.0) begin
          failures++;
          if (failures < 10)
            $display("sel=%s slot %0d: got (%0d,%0d) expected (%.1f,%.1f)", sel.name(), i,
                     dout[i].re, dout[i].im, yr[i], yi[i]);
        end
      end
      if (it % 50 == 0) begin
        int hr;
        hr = int'(dout[5].re);
        @(negedge clk);
        en = 1'b0;
        foreach (din[i]) din[i] = '0;
        @(posedge clk);
        #1;
        checks++;
        if (int'(dout[5].re) != hr) begin
          failures++;
          $display("outputs changed with EN low");
        end
        en = 1'b1;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
