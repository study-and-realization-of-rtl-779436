// tb_control_unit: self-checking testbench of the control unit.
//
// The two address generators are replaced by counters: after a START_L or START_R pulse
// the counter raises L_DONE or R_DONE in the C-th following cycle, with C = C_stage taken
// from a per-stage table and the STAGE output at the time of the pulse. For plans of 1
// to 5 stages it checks: an unsupported START is ignored; one load pass with L high, one
// read pass per stage, each write pass starting exactly PIPE_LAT cycles after its read
// pass, one read-out pass after the last stage; CTRL toggling at every pass boundary;
// EN_BU during the stages only, EN_C low in stage 0 and high later; SEL equal to the
// radix of the current stage; one DONE pulse; BUSY; and the total cycle count
// 1 + C_0 + sum_s (C_s + PIPE_LAT) + C_SMAX from START to DONE.
module tb_control_unit;
  import fft_pkg::*;

  localparam int PIPE_LAT = 16;

  logic              clk = 1'b0, rst = 1'b1, start = 1'b0, supported = 1'b0;
  logic [SW-1:0]     smax = '0;
  logic [RW-1:0]     radix [MAX_STAGES];
  logic [LIDX_W-1:0] len_idx = 7'd5;
  logic              l_done, r_done;
  logic              start_l, start_r, en_bu, en_c, ctrl, l, reading, busy, done;
  radix_e            sel;
  logic [LIDX_W-1:0] addr_c;
  logic [SW-1:0]     stage;
  int checks = 0, failures = 0;

  int cyc [MAX_STAGES];
  int cnt_l = 0, cnt_r = 0;

  control_unit #(.PIPE_LAT (PIPE_LAT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // address generator stand-ins
  assign l_done = (cnt_l == 1);
  assign r_done = (cnt_r == 1);
  always @(posedge clk) begin
    if (start_l)        cnt_l <= cyc[stage];
    else if (cnt_l > 0) cnt_l <= cnt_l - 1;
    if (start_r)        cnt_r <= cyc[stage];
    else if (cnt_r > 0) cnt_r <= cnt_r - 1;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 15) $display("%0t: %s", $time, msg);
  endtask

  task automatic run(input int ns);
    int t, n_sl, n_sr, n_done, n_toggle, exp_t, last_sr;
    logic ctrl_q;
    int rads [6] = '{16, 8, 5, 3, 2, 4};
    foreach (radix[i]) radix[i] = (i < ns) ? RW'(rads[(i + ns) % 6]) : '0;
    foreach (cyc[i]) cyc[i] = 2 + 3 * i + ns;
    smax = SW'(ns - 1);
    supported = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t = 0; n_sl = 0; n_sr = 0; n_done = 0; n_toggle = 0; last_sr = -100;
    ctrl_q = ctrl;
    while (n_done == 0 && t < 2000) begin
      t++;
      checks++;
      if (!busy) fail("BUSY low during a transform");
      if (start_l) begin
        n_sl++;
        checks++;
        if (n_sl == 1 && !l) fail("load pass without L");
        if (n_sl > 1 && t - last_sr != PIPE_LAT)
          fail($sformatf("write pass %0d cycles after its read pass", t - last_sr));
      end
      if (start_r) begin n_sr++; last_sr = t; end
      if (en_bu) begin
        checks += 2;
        if (sel != radix_code(radix[stage])) fail("SEL is not the radix of the stage");
        if (en_c != (stage != 0)) fail("EN_C wrong");
      end
      if (l && (en_bu || reading)) fail("L high outside the load phase");
      if (done) n_done++;
      @(negedge clk);
      if (ctrl != ctrl_q) n_toggle++;
      ctrl_q = ctrl;
    end
    exp_t = 1 + cyc[0] + cyc[ns - 1];
    for (int s = 0; s < ns; s++) exp_t += cyc[s] + PIPE_LAT;
    checks += 5;
    if (n_sl != ns + 1) fail($sformatf("%0d write passes, expected %0d", n_sl, ns + 1));
    if (n_sr != ns + 1) fail($sformatf("%0d read passes, expected %0d", n_sr, ns + 1));
    if (n_toggle != ns + 1) fail($sformatf("CTRL toggled %0d times, expected %0d", n_toggle, ns + 1));
    if (t != exp_t) fail($sformatf("%0d stages: DONE after %0d cycles, expected %0d", ns, t, exp_t));
    if (addr_c != len_idx) fail("ADDR_C is not the length index");
    @(negedge clk);
    checks++;
    if (busy || done) fail("not idle after DONE");
  endtask

  initial begin
    foreach (radix[i]) radix[i] = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // unsupported length: ignored
    supported = 1'b0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (busy) fail("started on an unsupported length");
    for (int ns = 1; ns <= 5; ns++) run(ns);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
