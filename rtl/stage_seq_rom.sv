// stage_seq_rom: stage sequence memory of the FFT processor.
//
// For the requested transform length MODE it returns the plan of the mixed-radix
// decomposition N = N_0 * N_1 * ... * N_SMAX: the radix of every stage, its
// parallelism P (how many radix-N_i operations the butterfly unit runs per cycle),
// SMAX (index of the last stage), the index of the length in the length table (this
// addresses the twiddle coefficient ROM) and the two bank-skew coefficients.
//
// As in the document, P_i is the number of parallel operations the butterfly unit
// offers for the radix (16/N_i, rounded down to a power of two) reduced until it
// divides the number of groups. This design's own choices: stages are taken greedily
// as radix 16, 8, 4, 2, then 5, then 3 (20 = 4 x 5 gives N = {4,5}, P = {1,2} as in the
// document's example); P_i must also divide the stride w_i of the stage's digit (or,
// for the last stage, the radix of the stage before it) so that the address generator
// never needs a carry between parallel groups. The plans are computed at elaboration
// into a ROM with one entry per supported length; the lookup is combinational (a
// comparison of MODE with the length table, then a ROM read).
//
// Outputs per stage i: radix[i], par[i], weight[i] = N_(i+1)*...*N_SMAX (stride of the
// stage's digit in the data index) and pre[i] = N_0*...*N_(i-1).
module stage_seq_rom
  import fft_pkg::*;
(
  input  logic [NW-1:0]     mode,                   // requested length N
  output logic              supported,              // N is in the length table
  output logic [LIDX_W-1:0] len_idx,                // index into the length table
  output logic [SW-1:0]     smax,                   // index of the last stage
  output logic [RW-1:0]     radix  [MAX_STAGES],    // N_i
  output logic [RW-1:0]     par    [MAX_STAGES],    // P_i
  output logic [NW-1:0]     weight [MAX_STAGES],    // stride of digit i
  output logic [NW-1:0]     pre    [MAX_STAGES],    // product of the radices before stage i
  output logic [3:0]        skew_a,
  output logic [3:0]        skew_b
);

  localparam int NE = NUM_LENGTHS * MAX_STAGES;

  typedef logic [RW-1:0] rrom_t [NE];
  typedef logic [NW-1:0] nrom_t [NE];
  typedef logic [SW-1:0] srom_t [NUM_LENGTHS];

  function automatic int max_par(input int r);
    case (r)
      2:       return 8;
      3, 4:    return 4;
      5, 8:    return 2;
      default: return 1;
    endcase
  endfunction

  // One field of the plan of length n: WHAT = 0 radix, 1 parallelism, 2 stride,
  // 3 prefix product of stage i, 4 index of the last stage.
  function automatic int plan_val(input int n, input int what, input int i);
    int rad [MAX_STAGES];
    int m, ns, w, pr, p;
    // greedy factorisation: 16, 8, 4, 2, then 5, then 3
    m  = n;
    ns = 0;
    for (int s = 0; s < MAX_STAGES; s++) begin
      rad[s] = 0;
      if (m > 1) begin
        if (m % 16 == 0)     rad[s] = 16;
        else if (m % 8 == 0) rad[s] = 8;
        else if (m % 4 == 0) rad[s] = 4;
        else if (m % 2 == 0) rad[s] = 2;
        else if (m % 5 == 0) rad[s] = 5;
        else                 rad[s] = 3;
        m  = m / rad[s];
        ns = s;
      end
    end
    w  = 1;
    pr = 1;
    for (int s = 0; s < MAX_STAGES; s++) begin
      if (s > i && rad[s] != 0) w = w * rad[s];
      if (s < i && rad[s] != 0) pr = pr * rad[s];
    end
    // parallelism: halve until it divides the stride (or the previous radix)
    p = max_par(rad[i]);
    for (int k = 0; k < 3; k++) begin
      if (p > 1) begin
        if (w > 1) begin
          if (w % p != 0) p = p / 2;
        end else if (i == 0 || rad[i-1] % p != 0) begin
          p = p / 2;
        end
      end
    end
    if (rad[i] == 0) p = 0;
    case (what)
      0:       return rad[i];
      1:       return p;
      2:       return w;
      3:       return pr;
      default: return ns;
    endcase
  endfunction

  function automatic rrom_t make_rrom(input int what);
    rrom_t t;
    for (int e = 0; e < NE; e++)
      t[e] = RW'(plan_val(int'(SUP_TABLE[e / MAX_STAGES].n), what, e % MAX_STAGES));
    return t;
  endfunction

  function automatic nrom_t make_nrom(input int what);
    nrom_t t;
    for (int e = 0; e < NE; e++)
      t[e] = NW'(plan_val(int'(SUP_TABLE[e / MAX_STAGES].n), what, e % MAX_STAGES));
    return t;
  endfunction

  function automatic srom_t make_srom();
    srom_t t;
    for (int e = 0; e < NUM_LENGTHS; e++) t[e] = SW'(plan_val(int'(SUP_TABLE[e].n), 4, 0));
    return t;
  endfunction

  localparam rrom_t RADIX_ROM  = make_rrom(0);
  localparam rrom_t PAR_ROM    = make_rrom(1);
  localparam nrom_t WEIGHT_ROM = make_nrom(2);
  localparam nrom_t PRE_ROM    = make_nrom(3);
  localparam srom_t SMAX_ROM   = make_srom();

  always_comb begin
    supported = 1'b0;
    len_idx   = '0;
    skew_a    = '0;
    skew_b    = '0;
    for (int e = 0; e < NUM_LENGTHS; e++) begin
      if (SUP_TABLE[e].n == mode) begin
        supported = 1'b1;
        len_idx   = LIDX_W'(e);
        skew_a    = SUP_TABLE[e].skew_a;
        skew_b    = SUP_TABLE[e].skew_b;
      end
    end
  end

  assign smax = SMAX_ROM[len_idx];

  for (genvar i = 0; i < MAX_STAGES; i++) begin : g_stage
    logic [LIDX_W+SW-1:0] a;
    assign a         = {len_idx, SW'(i)};
    assign radix[i]  = RADIX_ROM[a];
    assign par[i]    = PAR_ROM[a];
    assign weight[i] = WEIGHT_ROM[a];
    assign pre[i]    = PRE_ROM[a];
  end

endmodule
