// tb_pea: self-checking testbench of Processing Element A.
//
// For every SEL value it drives random wide inputs, clocks once with EN high and
// compares the eight registered outputs with an integer model written here from the
// definitions (radix-2 pairs, two radix-4 DFTs, first half of radix-3 and radix-5).
// It also checks the one-cycle latency (outputs change only at the clock edge) and that
// EN low holds the outputs.
module tb_pea;
  import fft_pkg::*;

  logic   clk = 1'b0, en = 1'b0;
  radix_e sel = RAD2;
  wcplx_t din [8], dout [8];
  int checks = 0, failures = 0;

  pea dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic void model(input radix_e s, input int xr [8], input int xi [8],
                                output int yr [8], output int yi [8]);
    foreach (yr[i]) begin yr[i] = 0; yi[i] = 0; end
    case (s)
      RAD2:
        for (int p = 0; p < 8; p += 2) begin
          yr[p] = xr[p] + xr[p+1];  yi[p] = xi[p] + xi[p+1];
          yr[p+1] = xr[p] - xr[p+1];  yi[p+1] = xi[p] - xi[p+1];
        end
      RAD3:
        for (int q = 0; q < 2; q++) begin
          int sr, si;
          sr = xr[4*q+1] + xr[4*q+2];  si = xi[4*q+1] + xi[4*q+2];
          yr[4*q] = xr[4*q] + sr;       yi[4*q] = xi[4*q] + si;
          yr[4*q+1] = xr[4*q] - (sr >>> 1);  yi[4*q+1] = xi[4*q] - (si >>> 1);
          yr[4*q+2] = xr[4*q+1] - xr[4*q+2]; yi[4*q+2] = xi[4*q+1] - xi[4*q+2];
        end
      RAD5: begin
        yr[0] = xr[0];                          yi[0] = xi[0];
        yr[1] = xr[1] + xr[4] + xr[2] + xr[3];  yi[1] = xi[1] + xi[4] + xi[2] + xi[3];
        yr[2] = xr[1] + xr[4] - xr[2] - xr[3];  yi[2] = xi[1] + xi[4] - xi[2] - xi[3];
        yr[3] = xr[1] - xr[4];                  yi[3] = xi[1] - xi[4];
        yr[4] = xr[2] - xr[3];                  yi[4] = xi[2] - xi[3];
      end
      default:  // radix-4 DFT X[k] = sum x[n] (-j)^(n*k) on each half
        for (int q = 0; q < 2; q++)
          for (int k = 0; k < 4; k++)
            for (int n = 0; n < 4; n++) begin
              int e;
              e = (n * k) % 4;
              case (e)
                0: begin yr[4*q+k] += xr[4*q+n]; yi[4*q+k] += xi[4*q+n]; end
                1: begin yr[4*q+k] += xi[4*q+n]; yi[4*q+k] -= xr[4*q+n]; end
                2: begin yr[4*q+k] -= xr[4*q+n]; yi[4*q+k] -= xi[4*q+n]; end
                default: begin yr[4*q+k] -= xi[4*q+n]; yi[4*q+k] += xr[4*q+n]; end
              endcase
            end
    endcase
  endfunction

  initial begin
    radix_e sels [6] = '{RAD2, RAD3, RAD4, RAD5, RAD8, RAD16};
    int xr [8], xi [8], yr [8], yi [8];
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
        checks++;
        if (int'(dout[i].re) != yr[i] || int'(dout[i].im) != yi[i]) begin
          failures++;
          if (failures < 10)
            $display("sel=%s slot %0d: got (%0d,%0d) expected (%0d,%0d)", sel.name(), i,
                     dout[i].re, dout[i].im, yr[i], yi[i]);
        end
      end
      // hold with EN low: new inputs must not reach the outputs
      if (it % 50 == 0) begin
        @(negedge clk);
        en = 1'b0;
        foreach (din[i]) din[i] = '0;
        @(posedge clk);
        #1;
        checks++;
        if (int'(dout[0].re) != yr[0] || int'(dout[0].im) != yi[0]) begin
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
