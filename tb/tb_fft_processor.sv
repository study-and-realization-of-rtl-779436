// tb_fft_processor: end-to-end test of the FFT processor at its default size.
//
// For a list of transform lengths (including 20, the worked example, and 4096, the
// largest) it starts a transform, feeds random samples on the lanes and in the order the
// processor asks for (IN_IDX), collects the output bins by OUT_IDX and compares them with
// a DFT computed here in real arithmetic, scaled by 2^-sum(ceil(log2 N_i)) for the stage
// radices of a greedy 16/8/4/2/5/3 factorisation, which must also appear on N_OUT,
// P_OUT and SMAX_OUT (N = 20: N = {4,5}, P = {1,2}). It checks that every bin appears once,
// the error bound, the cycle count from START to DONE against
// 1 + C_0 + sum_i (C_i + 16) + C_SMAX with C_i = N/(N_i*P_i), and that an unsupported
// length is ignored. It counts how often each mechanism happened: every radix, parallel
// butterflies (P > 1), twiddle rotation, ping-pong block switch, transforms of 3 or more
// stages and the rejection; a mechanism that never happened is a failure.
module tb_fft_processor;
  import fft_pkg::*;

  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [NW-1:0] mode = '0;
  logic supported, in_ready, out_valid, busy, done;
  logic [LANES-1:0] in_lane_vld, out_lane_vld;
  logic [NW-1:0] in_idx [LANES], out_idx [LANES];
  cplx_t data_in [LANES], data_out [LANES];
  logic [RW-1:0] n_out [MAX_STAGES], p_out [MAX_STAGES];
  logic [SW-1:0] smax_out, s_out;

  int checks = 0, failures = 0;
  int cnt_radix [6];
  int cnt_par = 0, cnt_twiddle = 0, cnt_switch = 0, cnt_deep = 0, cnt_reject = 0;

  fft_processor dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters (sampled inside the design)
  logic ctrl_q = 1'b0;
  always @(posedge clk) begin
    if (dut.en_bu) cnt_radix[int'(dut.sel)]++;
    if (busy && s_out > smax_out) begin
      failures++;
      $display("S_OUT beyond SMAX_OUT");
    end
    if (dut.en_bu && dut.par[dut.stage] > 1) cnt_par++;
    if (dut.en_c) cnt_twiddle++;
    if (dut.ctrl != ctrl_q) cnt_switch++;
    ctrl_q <= dut.ctrl;
  end

  // stage plan computed independently: greedy 16, 8, 4, 2, 5, 3
  function automatic void plan(input int n, output int nst, output int rad [8],
                               output int shift);
    int m;
    m = n; nst = 0; shift = 0;
    foreach (rad[i]) rad[i] = 0;
    while (m > 1) begin
      int r;
      if (m % 16 == 0) r = 16;
      else if (m % 8 == 0) r = 8;
      else if (m % 4 == 0) r = 4;
      else if (m % 2 == 0) r = 2;
      else if (m % 5 == 0) r = 5;
      else r = 3;
      rad[nst] = r;
      nst++;
      m = m / r;
      shift += (r == 2) ? 1 : (r <= 4) ? 2 : (r <= 8) ? 3 : 4;
    end
  endfunction

  // parallelism rule: as many DFTs as fit in 16 lanes, dividing the digit stride
  // (or the previous radix for the last stage)
  function automatic int par_of(input int rad [8], input int nst, input int i);
    int p, w;
    p = 16 / rad[i];
    if (p >= 8) p = 8; else if (p >= 4) p = 4; else if (p >= 2) p = 2; else p = 1;
    w = 1;
    for (int j = i + 1; j < nst; j++) w *= rad[j];
    while (p > 1) begin
      if (w > 1 && w % p == 0) break;
      if (w == 1 && i > 0 && rad[i-1] % p == 0) break;
      p /= 2;
    end
    return p;
  endfunction

  task automatic run_fft(input int n);
    real xr [], xi [];
    int  yr [], yi [];
    bit  seen [];
    int  nst, rad [8], shift, t0, t1, exp_cycles, maxerr_i;
    real maxerr, tol;
    xr = new[n]; xi = new[n]; yr = new[n]; yi = new[n]; seen = new[n];
    foreach (xr[i]) begin
      xr[i] = real'($urandom_range(16000, 0)) - 8000.0;
      xi[i] = real'($urandom_range(16000, 0)) - 8000.0;
    end
    plan(n, nst, rad, shift);
    if (nst >= 3) cnt_deep++;

    @(negedge clk);
    mode  = NW'(n);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t0 = $time / 10;
    // the stage plan shown on N_OUT / P_OUT / SMAX_OUT
    checks++;
    if (int'(smax_out) != nst - 1) begin
      failures++;
      $display("N=%0d: SMAX_OUT=%0d expected %0d", n, smax_out, nst - 1);
    end
    for (int i = 0; i < nst; i++) begin
      checks++;
      if (int'(n_out[i]) != rad[i] || int'(p_out[i]) != par_of(rad, nst, i)) begin
        failures++;
        $display("N=%0d stage %0d: N_OUT=%0d P_OUT=%0d expected %0d %0d", n, i, n_out[i],
                 p_out[i], rad[i], par_of(rad, nst, i));
      end
    end
    if (n == 20) begin
      checks++;
      if (!(n_out[0] == 4 && n_out[1] == 5 && p_out[0] == 1 && p_out[1] == 2)) begin
        failures++;
        $display("N=20 plan is not N = {4,5}, P = {1,2}");
      end
    end
    // load: answer the processor's index requests
    forever begin
      for (int l = 0; l < LANES; l++) begin
        data_in[l] = '0;
        if (in_lane_vld[l]) begin
          data_in[l].re = DW'(int'(xr[in_idx[l]]));
          data_in[l].im = DW'(int'(xi[in_idx[l]]));
        end
      end
      if (out_valid) begin
        for (int l = 0; l < LANES; l++) begin
          if (out_lane_vld[l]) begin
            if (seen[out_idx[l]]) begin
              failures++;
              $display("N=%0d bin %0d delivered twice", n, out_idx[l]);
            end
            seen[out_idx[l]] = 1'b1;
            yr[out_idx[l]] = data_out[l].re;
            yi[out_idx[l]] = data_out[l].im;
          end
        end
      end
      if (done) break;
      @(negedge clk);
    end
    t1 = $time / 10;
    // cycle count
    exp_cycles = 1 + n / (rad[0] * par_of(rad, nst, 0));
    for (int i = 0; i < nst; i++) exp_cycles += n / (rad[i] * par_of(rad, nst, i)) + 16;
    exp_cycles += n / (rad[nst-1] * par_of(rad, nst, nst - 1));
    checks++;
    if (t1 - t0 != exp_cycles) begin
      failures++;
      $display("N=%0d: %0d cycles from START to DONE, expected %0d", n, t1 - t0, exp_cycles);
    end
    // compare with the reference DFT
    maxerr = 0.0; maxerr_i = 0;
    tol = 6.0 + 3.0 * real'(nst);
    for (int k = 0; k < n; k++) begin
      real er, ei, e;
      er = 0.0; ei = 0.0;
      for (int i = 0; i < n; i++) begin
        real a;
        a  = 2.0 * PI * real'((longint'(i) * k) % n) / real'(n);
        er += xr[i] * $cos(a) + xi[i] * $sin(a);
        ei += xi[i] * $cos(a) - xr[i] * $sin(a);
      end
      er = er / real'(1 << shift);
      ei = ei / real'(1 << shift);
      checks++;
      if (!seen[k]) begin
        failures++;
        $display("N=%0d bin %0d never delivered", n, k);
      end else begin
        e = (real'(yr[k]) - er) ** 2 + (real'(yi[k]) - ei) ** 2;
        e = $sqrt(e);
        if (e > maxerr) begin maxerr = e; maxerr_i = k; end
        if (e > tol) begin
          failures++;
          if (failures < 20)
            $display("N=%0d bin %0d: got (%0d,%0d) expected (%.1f,%.1f)", n, k, yr[k], yi[k], er, ei);
        end
      end
    end
    $display("N=%0d stages=%0d cycles=%0d max error %.2f LSB (bin %0d)", n, nst, t1 - t0,
             maxerr, maxerr_i);
  endtask

  initial begin
    int lengths [] = '{20, 2, 3, 5, 8, 16, 12, 6, 10, 24, 32, 40, 60, 90, 120, 256, 360,
                       1000, 4096};
    foreach (data_in[l]) data_in[l] = '0;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    foreach (lengths[i]) run_fft(lengths[i]);

    // an unsupported length must not start the processor
    @(negedge clk);
    mode  = NW'(7);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (busy) begin
      failures++;
      $display("unsupported length 7 started the processor");
    end else cnt_reject++;

    $display("mechanisms: radix2=%0d radix3=%0d radix4=%0d radix5=%0d radix8=%0d radix16=%0d",
             cnt_radix[0], cnt_radix[1], cnt_radix[2], cnt_radix[3], cnt_radix[4], cnt_radix[5]);
    $display("mechanisms: parallel=%0d twiddle=%0d block_switch=%0d deep=%0d reject=%0d",
             cnt_par, cnt_twiddle, cnt_switch, cnt_deep, cnt_reject);
    foreach (cnt_radix[i]) begin
      checks++;
      if (cnt_radix[i] == 0) failures++;
    end
    checks += 5;
    if (cnt_par == 0) failures++;
    if (cnt_twiddle == 0) failures++;
    if (cnt_switch == 0) failures++;
    if (cnt_deep == 0) failures++;
    if (cnt_reject == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
