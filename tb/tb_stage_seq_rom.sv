// tb_stage_seq_rom: self-checking testbench of the stage sequence memory.
//
// Walks MODE through every value 0..4096. For lengths in the length table it checks
// SUPPORTED, LEN_IDX, the skew coefficients, that the radices multiply to N and follow
// the greedy 16/8/4/2/5/3 order, SMAX, the prefix products and strides, and the
// parallelism rule (largest power of two <= 16/N_i dividing the stride, or the previous
// radix for the last stage). For every other value it checks that SUPPORTED is low. The
// block is combinational; values are sampled 1 time unit after MODE changes.
module tb_stage_seq_rom;
  import fft_pkg::*;

  logic [NW-1:0]     mode = '0;
  logic              supported;
  logic [LIDX_W-1:0] len_idx;
  logic [SW-1:0]     smax;
  logic [RW-1:0]     radix  [MAX_STAGES];
  logic [RW-1:0]     par    [MAX_STAGES];
  logic [NW-1:0]     weight [MAX_STAGES];
  logic [NW-1:0]     pre    [MAX_STAGES];
  logic [3:0]        skew_a, skew_b;
  int checks = 0, failures = 0;

  stage_seq_rom dut (.*);

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 15) $display("N=%0d: %s", mode, msg);
  endtask

  initial begin
    int nsup;
    nsup = 0;
    for (int n = 0; n <= 4096; n++) begin
      int e;
      e = -1;
      for (int i = 0; i < NUM_LENGTHS; i++) if (int'(SUP_TABLE[i].n) == n) e = i;
      mode = NW'(n);
      #1;
      checks++;
      if (supported != (e >= 0)) fail("SUPPORTED wrong");
      if (e >= 0 && supported) begin
        int m, prod, w, prev;
        nsup++;
        checks++;
        if (int'(len_idx) != e || skew_a != SUP_TABLE[e].skew_a || skew_b != SUP_TABLE[e].skew_b)
          fail("length-table index or skews wrong");
        // radices: greedy order, product N, last stage SMAX
        m = n; prod = 1; prev = 17;
        for (int i = 0; i < MAX_STAGES; i++) begin
          int r;
          r = (m % 16 == 0) ? 16 : (m % 8 == 0) ? 8 : (m % 4 == 0) ? 4 : (m % 2 == 0) ? 2 :
              (m % 5 == 0) ? 5 : (m % 3 == 0) ? 3 : 0;
          if (m == 1) r = 0;
          checks++;
          if (int'(radix[i]) != r) fail($sformatf("radix[%0d]=%0d expected %0d", i, radix[i], r));
          if (r != 0) begin
            m = m / r;
            checks++;
            if (int'(pre[i]) != prod) fail($sformatf("pre[%0d] wrong", i));
            prod *= r;
          end
        end
        checks++;
        if (prod != n) fail("radices do not multiply to N");
        checks++;
        if (int'(smax) + 1 != (radix[int'(smax)] != 0 ? 1 : 0) * (int'(smax) + 1) ||
            (int'(smax) < MAX_STAGES - 1 && radix[int'(smax) + 1] != 0))
          fail("SMAX wrong");
        // strides and parallelism
        for (int i = 0; i <= int'(smax); i++) begin
          int p;
          w = 1;
          for (int j = i + 1; j <= int'(smax); j++) w *= int'(radix[j]);
          checks++;
          if (int'(weight[i]) != w) fail($sformatf("weight[%0d] wrong", i));
          p = 16 / int'(radix[i]);
          if (p >= 8) p = 8; else if (p >= 4) p = 4; else if (p >= 2) p = 2; else p = 1;
          while (p > 1 && !((w > 1 && w % p == 0) ||
                            (w == 1 && i > 0 && int'(radix[i-1]) % p == 0)))
            p /= 2;
          checks++;
          if (int'(par[i]) != p) fail($sformatf("par[%0d]=%0d expected %0d", i, par[i], p));
        end
      end
    end
    checks++;
    if (nsup != NUM_LENGTHS) fail($sformatf("%0d of %0d table entries found", nsup, NUM_LENGTHS));
    // the document's example: N = 20 -> N = {4, 5}, P = {1, 2}, SMAX = 1
    mode = NW'(20);
    #1;
    checks++;
    if (!(radix[0] == 4 && radix[1] == 5 && par[0] == 1 && par[1] == 2 && smax == 1))
      fail("20-point plan differs from N = {4,5}, P = {1,2}");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
