// tb_butterfly_unit: self-checking testbench of the configurable butterfly unit.
//
// Streams a new set of 16 random samples every cycle with a random SEL (radix 2, 3, 4,
// 5, 8 or 16) and, three cycles later, compares every used output lane with the DFT of
// its group (16/r groups, but only 4 radix-3 and 2 radix-5 groups) computed here in real
// arithmetic and scaled by 2^-ceil(log2 r) (tolerance 3 LSB). Lane t*r + n in, lane t*r + k out. Checks the 3-cycle latency (the
// comparison is against the set sent exactly 3 cycles earlier), that unused lanes are
// zero, and that EN low freezes the pipeline.
module tb_butterfly_unit;
  import fft_pkg::*;

  localparam real PI = 3.14159265358979323846;
  localparam int  LAT = 3;

  logic   clk = 1'b0, rst = 1'b1, en = 1'b0;
  radix_e sel = RAD2;
  cplx_t  data_in [LANES], data_out [LANES];
  int checks = 0, failures = 0;
  int cnt_sel [6];

  butterfly_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic int rad_of(input radix_e s);
    case (s)
      RAD2: return 2;   RAD3: return 3;  RAD4: return 4;
      RAD5: return 5;   RAD8: return 8;  default: return 16;
    endcase
  endfunction

  // expected outputs of one set
  typedef struct {
    real yr [LANES];
    real yi [LANES];
    bit  used [LANES];
  } exp_t;

  function automatic exp_t model(input radix_e s, input int xr [LANES], input int xi [LANES]);
    exp_t e;
    int r, groups;
    real sc;
    r = rad_of(s);
    groups = (s == RAD3) ? 4 : (s == RAD5) ? 2 : LANES / r;   // 4 radix-3 or 2 radix-5
    sc = real'(1 << radix_shift(s));
    foreach (e.yr[l]) begin e.yr[l] = 0.0; e.yi[l] = 0.0; e.used[l] = 1'b0; end
    for (int t = 0; t < groups; t++)
      for (int k = 0; k < r; k++) begin
        real ar, ai;
        ar = 0.0; ai = 0.0;
        for (int n = 0; n < r; n++) begin
          real a;
          a = 2.0 * PI * real'((n * k) % r) / real'(r);
          ar += xr[t*r+n] * $cos(a) + xi[t*r+n] * $sin(a);
          ai += xi[t*r+n] * $cos(a) - xr[t*r+n] * $sin(a);
        end
        e.yr[t*r+k] = ar / sc;
        e.yi[t*r+k] = ai / sc;
        e.used[t*r+k] = 1'b1;
      end
    return e;
  endfunction

  exp_t pipe [$];

  task automatic check_out(input exp_t e);
    foreach (data_out[l]) begin
      real er, ei;
      checks++;
      if (!e.used[l]) begin
        if (data_out[l] != '0) begin
          failures++;
          $display("unused lane %0d not zero", l);
        end
      end else begin
        er = real'(data_out[l].re) - e.yr[l];
        ei = real'(data_out[l].im) - e.yi[l];
        if (er < 0.0) er = -er;
        if (ei < 0.0) ei = -ei;
        if (er > 3.0 || ei > 3.0) begin
          failures++;
          if (failures < 10)
            $display("lane %0d: got (%0d,%0d) expected (%.1f,%.1f)", l, data_out[l].re,
                     data_out[l].im, e.yr[l], e.yi[l]);
        end
      end
    end
  endtask

  initial begin
    radix_e sels [6] = '{RAD2, RAD3, RAD4, RAD5, RAD8, RAD16};
    int xr [LANES], xi [LANES];
    exp_t e;
    foreach (data_in[l]) data_in[l] = '0;
    foreach (cnt_sel[i]) cnt_sel[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    en  = 1'b1;
    for (int it = 0; it < 3000; it++) begin
      int si;
      si = $urandom_range(5, 0);
      sel = sels[si];
      cnt_sel[si]++;
      foreach (xr[l]) begin
        xr[l] = $urandom_range(32000, 0) - 16000;
        xi[l] = $urandom_range(32000, 0) - 16000;
        data_in[l].re = DW'(xr[l]);
        data_in[l].im = DW'(xi[l]);
      end
      pipe.push_back(model(sel, xr, xi));
      // a stall now and then: nothing may move
      if (it % 97 == 5) begin
        cplx_t held;
        held = data_out[0];
        en = 1'b0;
        @(negedge clk);
        checks++;
        if (data_out[0] != held) begin
          failures++;
          $display("pipeline moved with EN low");
        end
        en = 1'b1;
      end
      @(negedge clk);
      if (pipe.size() > LAT) void'(pipe.pop_front());
      if (pipe.size() == LAT) check_out(pipe[0]);
    end
    foreach (cnt_sel[i]) begin
      checks++;
      if (cnt_sel[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
