// tb_addr_gen: self-checking testbench of the address generator.
//
// The stage plan comes from the stage sequence memory. For every supported length and
// every stage it pulses START and follows the pattern until DONE, checking: W rises the
// cycle after START and stays high for exactly N/(N_s*P_s) cycles, DONE only in the last
// one; the lanes in use are the first N_s*P_s; lane t*N_s + n holds element n of a group
// (index = base + n * w_s, digit s of base zero); every index 0..N-1 appears exactly
// once; the bank/address pair is the ADDGEN mapping and no two valid lanes share a bank
// in a cycle; the twiddle exponent equals kp * n * w_s and the frequency index
// kp + n * pre_s, where kp is computed here from the index's digits above digit s.
module tb_addr_gen;
  import fft_pkg::*;

  logic              clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [NW-1:0]     mode = '0;
  logic              supported;
  logic [LIDX_W-1:0] len_idx;
  logic [SW-1:0]     smax, stage = '0;
  logic [RW-1:0]     radix [MAX_STAGES], par [MAX_STAGES];
  logic [NW-1:0]     weight [MAX_STAGES], pre [MAX_STAGES];
  logic [3:0]        skew_a, skew_b;
  logic              w, done;
  logic [LANES-1:0]  lane_vld;
  logic [NW-1:0]     idx [LANES], texp [LANES], fidx [LANES];
  logic [BW-1:0]     bank [LANES];
  logic [AW-1:0]     addr [LANES];
  int checks = 0, failures = 0;

  stage_seq_rom u_plan (.*);
  addr_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 15) $display("N=%0d stage %0d: %s", mode, stage, msg);
  endtask

  task automatic run_stage(input int n, input int s);
    bit seen [];
    int r, p, ws, ps, cycles, expc;
    seen = new[n];
    r  = int'(radix[s]);
    p  = int'(par[s]);
    ws = int'(weight[s]);
    ps = int'(pre[s]);
    expc = n / (r * p);
    stage = SW'(s);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 0;
    while (w && cycles <= expc) begin
      bit [BANKS-1:0] bused;
      bused = '0;
      cycles++;
      checks++;
      if (done != (cycles == expc)) fail("DONE in the wrong cycle");
      for (int ln = 0; ln < LANES; ln++) begin
        int t, e, base, kp, i, eb;
        t = ln / r;
        e = ln % r;
        checks++;
        if (lane_vld[ln] != (ln < r * p)) fail($sformatf("lane %0d valid wrong", ln));
        if (lane_vld[ln]) begin
          i    = int'(idx[ln]);
          base = int'(idx[t * r]);
          kp   = 0;
          for (int m = 0; m < s; m++) kp += ((i / int'(weight[m])) % int'(radix[m])) * int'(pre[m]);
          eb   = ((i % 16) + int'(skew_a) * ((i / 16) % 16) + int'(skew_b) * (i / 256)) % 16;
          checks += 5;
          if (i >= n || seen[i]) fail($sformatf("index %0d repeated or out of range", i));
          else seen[i] = 1'b1;
          if (i != base + e * ws || (base / ws) % r != 0) fail("lane does not follow its group");
          if (int'(bank[ln]) != eb || int'(addr[ln]) != i / 16) fail("bank/address mapping");
          if (bused[bank[ln]]) fail("bank conflict");
          bused[bank[ln]] = 1'b1;
          if (int'(texp[ln]) != kp * e * ws || int'(fidx[ln]) != kp + e * ps)
            fail($sformatf("lane %0d idx %0d: texp %0d fidx %0d, expected %0d %0d", ln, i,
                           texp[ln], fidx[ln], kp * e * ws, kp + e * ps));
        end
      end
      @(negedge clk);
    end
    checks += 2;
    if (cycles != expc) fail($sformatf("%0d cycles, expected %0d", cycles, expc));
    foreach (seen[i]) if (!seen[i]) begin fail($sformatf("index %0d missing", i)); break; end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int e = 0; e < NUM_LENGTHS; e++) begin
      mode = SUP_TABLE[e].n;
      #1;
      for (int s = 0; s <= int'(smax); s++) run_stage(int'(SUP_TABLE[e].n), s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
