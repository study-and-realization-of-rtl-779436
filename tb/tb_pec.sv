// tb_pec: self-checking testbench of Processing Element C.
//
// For every SEL value it drives random wide inputs, clocks once and compares the
// registered outputs with an integer model written from the definitions: pass-through
// for radix-2/4, radix-2 pairs for radix-8, two radix-4 DFTs for radix-16, and the last
// additions of radix-3 and radix-5. All results are exact. Also checks that EN low holds
// the outputs.
module tb_pec;
  import fft_pkg::*;

  logic   clk = 1'b0, en = 1'b0;
  radix_e sel = RAD2;
  wcplx_t din [8], dout [8];
  int checks = 0, failures = 0;

  pec dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic void model(input radix_e s, input int xr [8], input int xi [8],
                                output int yr [8], output int yi [8]);
    yr = xr;
    yi = xi;
    case (s)
      RAD8:
        for (int p = 0; p < 8; p += 2) begin
          yr[p] = xr[p] + xr[p+1];    yi[p] = xi[p] + xi[p+1];
          yr[p+1] = xr[p] - xr[p+1];  yi[p+1] = xi[p] - xi[p+1];
        end
      RAD16:
        for (int q = 0; q < 2; q++)
          for (int k = 0; k < 4; k++) begin
            yr[4*q+k] = 0; yi[4*q+k] = 0;
            for (int n = 0; n < 4; n++)
              case ((n * k) % 4)
                0: begin yr[4*q+k] += xr[4*q+n]; yi[4*q+k] += xi[4*q+n]; end
                1: begin yr[4*q+k] += xi[4*q+n]; yi[4*q+k] -= xr[4*q+n]; end
                2: begin yr[4*q+k] -= xr[4*q+n]; yi[4*q+k] -= xi[4*q+n]; end
                default: begin yr[4*q+k] -= xi[4*q+n]; yi[4*q+k] += xr[4*q+n]; end
              endcase
          end
      RAD3:
        for (int q = 0; q < 2; q++) begin
          yr[4*q+1] = xr[4*q+1] + xr[4*q+2];  yi[4*q+1] = xi[4*q+1] + xi[4*q+2];
          yr[4*q+2] = xr[4*q+1] - xr[4*q+2];  yi[4*q+2] = xi[4*q+1] - xi[4*q+2];
        end
      RAD5: begin
        yr[1] = xr[1] + xr[2] + xr[3];  yi[1] = xi[1] + xi[2] + xi[3];
        yr[4] = xr[1] + xr[2] - xr[3];  yi[4] = xi[1] + xi[2] - xi[3];
        yr[2] = xr[1] - xr[2] + xr[4];  yi[2] = xi[1] - xi[2] + xi[4];
        yr[3] = xr[1] - xr[2] - xr[4];  yi[3] = xi[1] - xi[2] - xi[4];
      end
      default: ;
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
      if (it % 50 == 0) begin
        @(negedge clk);
        en = 1'b0;
        foreach (din[i]) din[i] = '0;
        @(posedge clk);
        #1;
        checks++;
        if (int'(dout[1].re) != yr[1]) begin
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
