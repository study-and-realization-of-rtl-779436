// addr_gen: address generator of the FFT processor (used twice: load/write side and
// read side).
//
// After a one-cycle START pulse the generator walks through one stage's access pattern
// and, in every cycle of the GEN state, presents for each of the 16 lanes a data index,
// the bank and the bank address of that index, and the twiddle exponent needed by the
// twiddle factor multiplier. W is high while a pattern set is presented and DONE is high
// with the last set, as in the document's two-state FSM (IDLE, GEN). An internal indices
// generator counts the data groups; an array of 16 ADDGEN cells maps indices to banks.
//
// Access pattern of stage s (radix r = N_s, parallelism P, stride w = weight of digit s):
// the data index is written as the mixed-radix number of digits n_0 ... n_SMAX (n_0 most
// significant). A group is the r indices that differ only in digit s. Lane l = t*r + n
// carries element n of group t; P groups are served per cycle, N/(r*P) cycles in all.
// Digits above digit s already hold the frequency digits k_0..k_(s-1) of earlier stages;
// their digit-reversed value kp gives the twiddle exponent kp * n * w (angle
// 2*pi*kp*n*w/N) and the partial frequency index kp + n * pre_s, which for the last stage is
// the output frequency index. Groups that share a cycle differ in the low digits (w > 1)
// or in digit s-1 (w = 1); the stage plan guarantees no carry between them.
//
// Index order, the digit-reversed twiddle exponent and the group scheduling are this
// design's own reading of the document's index mapping (Eq. 1.9/1.10); the FSM follows
// the document. Timing: START in cycle c, first set in cycle c+1, outputs combinational
// from registers.
module addr_gen
  import fft_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [SW-1:0]     stage,                    // stage whose pattern is generated
  input  logic [RW-1:0]     radix  [MAX_STAGES],
  input  logic [RW-1:0]     par    [MAX_STAGES],
  input  logic [NW-1:0]     weight [MAX_STAGES],
  input  logic [NW-1:0]     pre    [MAX_STAGES],
  input  logic [3:0]        skew_a,
  input  logic [3:0]        skew_b,
  output logic              w,                        // a valid set is presented
  output logic              done,                     // last set of the pattern
  output logic [LANES-1:0]  lane_vld,                 // lanes in use (t*r+n < r*P)
  output logic [NW-1:0]     idx    [LANES],           // data index per lane
  output logic [BW-1:0]     bank   [LANES],
  output logic [AW-1:0]     addr   [LANES],
  output logic [NW-1:0]     texp   [LANES],           // twiddle exponent (of 2*pi/N)
  output logic [NW-1:0]     fidx   [LANES]            // partial frequency index
);

  typedef enum logic {IDLE, GEN} ag_state_e;
  ag_state_e state;

  logic [NW-1:0] lo, hi, gcnt;                 // group counters
  logic [RW-1:0] dig [MAX_STAGES];             // digits 0..stage-1 of the group
  logic [NW-1:0] kp;                           // digit-reversed value of those digits

  logic [RW-1:0] r, p;
  logic [NW-1:0] wt, pr_s, pr_m1, ngroups;
  logic          last;

  always_comb begin
    r       = radix[stage];
    p       = par[stage];
    wt      = weight[stage];
    pr_s    = pre[stage];
    pr_m1   = (stage == '0) ? NW'(0) : pre[stage - SW'(1)];
    ngroups = NW'(pr_s * wt);
    last    = (gcnt + NW'(p)) >= ngroups;
    kp      = '0;
    for (int m = 0; m < MAX_STAGES; m++)
      if (m < int'(stage)) kp = NW'(kp + dig[m] * pre[m]);
  end

  assign w    = (state == GEN);
  assign done = (state == GEN) && last;

  // FSM and indices generator
  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      lo    <= '0;
      hi    <= '0;
      gcnt  <= '0;
      for (int m = 0; m < MAX_STAGES; m++) dig[m] <= '0;
    end else begin
      case (state)
        IDLE: begin
          if (start) state <= GEN;
          lo   <= '0;
          hi   <= '0;
          gcnt <= '0;
          for (int m = 0; m < MAX_STAGES; m++) dig[m] <= '0;
        end
        GEN: begin
          gcnt <= NW'(gcnt + p);
          if (last) begin
            state <= IDLE;
          end else begin
            logic          carry;
            logic [RW:0]   sum;
            logic [RW-1:0] inc;
            if (wt > 1) begin
              if (lo + NW'(p) >= wt) begin
                lo    <= '0;
                hi    <= hi + 1'b1;
                inc   = 5'd1;
                carry = 1'b1;
              end else begin
                lo    <= NW'(lo + p);
                inc   = 5'd0;
                carry = 1'b0;
              end
            end else begin
              hi    <= NW'(hi + p);
              inc   = p;
              carry = 1'b1;
            end
            // add inc to digit stage-1 and ripple the carry towards digit 0
            for (int m = MAX_STAGES - 1; m >= 0; m--) begin
              if (m < int'(stage) && carry) begin
                if (m == int'(stage) - 1) sum = dig[m] + inc;
                else                      sum = dig[m] + 1'b1;
                if (sum >= {1'b0, radix[m]}) begin
                  dig[m] <= RW'(sum - radix[m]);
                  carry  = 1'b1;
                end else begin
                  dig[m] <= RW'(sum);
                  carry  = 1'b0;
                end
              end
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // per-lane indices
  logic [NW-1:0] lane_idx [LANES];

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      logic [4:0]    t, n;
      logic [NW-1:0] kpt;
      case (r)
        5'd2:    begin t = 5'(l / 2);  n = 5'(l % 2);  end
        5'd3:    begin t = 5'(l / 3);  n = 5'(l % 3);  end
        5'd4:    begin t = 5'(l / 4);  n = 5'(l % 4);  end
        5'd5:    begin t = 5'(l / 5);  n = 5'(l % 5);  end
        5'd8:    begin t = 5'(l / 8);  n = 5'(l % 8);  end
        default: begin t = 5'(l / 16); n = 5'(l % 16); end
      endcase
      lane_vld[l] = (state == GEN) && (t < p);
      if (wt > 1) begin
        lane_idx[l] = NW'(hi * wt * r + n * wt + lo + t);
        kpt         = kp;
      end else begin
        lane_idx[l] = NW'((hi + NW'(t)) * r + n);
        kpt         = NW'(kp + t * pr_m1);
      end
      texp[l] = NW'(kpt * n * wt);
      fidx[l] = NW'(kpt + n * pr_s);
      if (!lane_vld[l]) begin
        lane_idx[l] = '0;
        texp[l]     = '0;
        fidx[l]     = '0;
      end
    end
  end

  assign idx = lane_idx;

  // ADDGEN array
  for (genvar l = 0; l < LANES; l++) begin : g_addgen
    addgen u_addgen (
      .idx    (lane_idx[l]),
      .skew_a (skew_a),
      .skew_b (skew_b),
      .bank   (bank[l]),
      .addr   (addr[l])
    );
  end

endmodule
