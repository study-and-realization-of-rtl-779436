// tb_tfmul: self-checking testbench of the twiddle factor multiplier.
//
// Streams a new set of 16 random samples and 16 random exponents k < N every cycle for
// several lengths, and checks that NROT + 3 cycles later lane l holds
// data_o[l] * exp(-j*2*pi*k[l]/N) within 4 LSB (with EN_C high), or data_o[l] itself
// within 4 LSB (EN_C low: the angle is forced to zero). The comparison against the set
// sent exactly NROT + 3 cycles earlier checks the latency and the full rate.
module tb_tfmul;
  import fft_pkg::*;

  localparam real PI  = 3.14159265358979323846;
  localparam int  LAT = DW / 2 + 1 + 3;

  logic              clk = 1'b0, rst = 1'b1, en_c = 1'b0;
  logic [LIDX_W-1:0] addr_c = '0;
  logic [NW-1:0]     k [LANES];
  cplx_t             data_o [LANES], data_c [LANES];
  int checks = 0, failures = 0;

  tfmul dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  typedef struct {
    real yr [LANES];
    real yi [LANES];
  } exp_t;

  exp_t pipe [$];

  initial begin
    int e, n;
    exp_t x;
    foreach (k[l]) begin k[l] = '0; data_o[l] = '0; end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int it = 0; it < 3000; it++) begin
      if (it % 100 == 0) e = $urandom_range(NUM_LENGTHS - 1, 0);
      n      = int'(SUP_TABLE[e].n);
      addr_c = LIDX_W'(e);
      en_c   = (it % 7 != 3);
      foreach (k[l]) begin
        real a, xr, xi;
        k[l] = NW'($urandom_range(n - 1, 0));
        xr = real'($urandom_range(30000, 0)) - 15000.0;
        xi = real'($urandom_range(30000, 0)) - 15000.0;
        data_o[l].re = DW'(int'(xr));
        data_o[l].im = DW'(int'(xi));
        a = en_c ? 2.0 * PI * real'(k[l]) / real'(n) : 0.0;
        x.yr[l] = xr * $cos(a) + xi * $sin(a);
        x.yi[l] = xi * $cos(a) - xr * $sin(a);
      end
      pipe.push_back(x);
      @(negedge clk);
      if (pipe.size() > LAT) void'(pipe.pop_front());
      if (pipe.size() == LAT) begin
        foreach (data_c[l]) begin
          real er, ei;
          er = real'(data_c[l].re) - pipe[0].yr[l];
          ei = real'(data_c[l].im) - pipe[0].yi[l];
          checks++;
          if (er > 4.0 || er < -4.0 || ei > 4.0 || ei < -4.0) begin
            failures++;
            if (failures < 10)
              $display("lane %0d: got (%0d,%0d) expected (%.1f,%.1f)", l, data_c[l].re,
                       data_c[l].im, pipe[0].yr[l], pipe[0].yi[l]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
