// fft_processor: memory-based mixed-radix FFT/DFT processor (top level).
//
// Computes the DFT X[k] = sum_n x[n] exp(-j*2*pi*n*k/N) of one block of N complex
// samples, for any length N in the length table of fft_pkg (products of 2, 3 and 5 up to
// 4096). N = N_0 * ... * N_SMAX is split into radix-16/8/5/4/3/2 stages (stage sequence
// memory). The samples live in a ping-pong memory of two blocks of 16 banks x 256 words;
// each stage reads 16 samples per cycle from one block, rotates them by their twiddle
// factors (16 CORDIC rotators), runs P parallel radix-N_i DFTs in the butterfly unit and
// writes the results in place into the other block. Two address generators produce
// conflict-free bank/address sets: the read generator for memory reads, the load
// generator for memory writes (input samples and stage results). The control unit
// sequences load, stages and read-out. Each stage scales by 2^-ceil(log2 N_i).
//
// Interface. Pulse START with MODE = N while idle. During the load phase (IN_READY high)
// the processor asks, in each cycle, for the samples whose indices it shows on IN_IDX for
// the lanes marked in IN_LANE_VLD; they must be on DATA_IN in the same cycle (N_0 * P_0
// samples per cycle, in the order of the first stage's access pattern). After the last
// stage, OUT_VALID marks cycles in which DATA_OUT carries the bins whose frequency
// indices are on OUT_IDX, for the lanes in OUT_LANE_VLD (N_SMAX * P_SMAX per cycle).
// DONE pulses with the last read-out data. Unsupported lengths are ignored (SUPPORTED
// low). N_OUT, P_OUT and SMAX_OUT show the stage plan of MODE (of the running transform
// while busy) and S_OUT the current stage, as in the document's 20-point waveform.
//
// Timing, with C_i = N / (N_i * P_i) access cycles of stage i and L = PIPE_LAT = 16:
// DONE comes 1 + C_0 + sum_i (C_i + L) + C_SMAX cycles after the START cycle (setup, load,
// every stage's read pass plus pipeline, read-out), e.g. 47 cycles for N = 20 and 1329
// for N = 4096. The block structure, signal names and scheme follow the document; the
// bank mapping, lane order and latencies are this design's own. Both address generators
// are the same module, so a few of their outputs stay unconnected here: the data indices
// of the read side, and the twiddle exponents and frequency indices of the load side.
module fft_processor
  import fft_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [NW-1:0]     mode,
  output logic              supported,
  input  cplx_t             data_in      [LANES],
  output logic              in_ready,
  output logic [LANES-1:0]  in_lane_vld,
  output logic [NW-1:0]     in_idx       [LANES],
  output cplx_t             data_out     [LANES],
  output logic              out_valid,
  output logic [LANES-1:0]  out_lane_vld,
  output logic [NW-1:0]     out_idx      [LANES],
  output logic              busy,
  output logic              done,
  output logic [RW-1:0]     n_out        [MAX_STAGES],   // stage radices N_i of MODE
  output logic [RW-1:0]     p_out        [MAX_STAGES],   // stage parallelism P_i
  output logic [SW-1:0]     smax_out,                    // index of the last stage
  output logic [SW-1:0]     s_out                        // current stage
);

  localparam int NROT      = DW / 2 + 1;
  localparam int TF_LAT    = NROT + 3;
  localparam int BU_LAT    = 3;
  localparam int PIPE_LAT  = 1 + TF_LAT + BU_LAT;

  // stage sequence memory
  logic [NW-1:0]     mode_q, mode_sel;
  logic              sup;
  logic [LIDX_W-1:0] len_idx;
  logic [SW-1:0]     smax;
  logic [RW-1:0]     radix  [MAX_STAGES];
  logic [RW-1:0]     par    [MAX_STAGES];
  logic [NW-1:0]     weight [MAX_STAGES];
  logic [NW-1:0]     pre    [MAX_STAGES];
  logic [3:0]        skew_a, skew_b;

  // control
  logic              cu_done;
  logic              start_l, start_r, en_bu, en_c, ctrl, l, reading, cu_busy;
  radix_e            sel;
  logic [LIDX_W-1:0] addr_c;
  logic [SW-1:0]     stage;

  // address generators
  logic              l_w, l_done, r_w, r_done;
  logic [LANES-1:0]  l_vld, r_vld;
  logic [NW-1:0]     l_idx [LANES], r_idx [LANES];
  logic [BW-1:0]     l_bank [LANES], r_bank [LANES];
  logic [AW-1:0]     l_addr [LANES], r_addr [LANES];
  logic [NW-1:0]     l_texp [LANES], r_texp [LANES];
  logic [NW-1:0]     l_fidx [LANES], r_fidx [LANES];

  // datapath
  cplx_t             data_o [LANES];     // memory -> twiddle multiplier
  cplx_t             data_c [LANES];     // twiddle multiplier -> butterfly unit
  cplx_t             data_i [LANES];     // butterfly unit -> memory
  logic [NW-1:0]     texp_q [LANES];
  logic              rd_q;
  logic [LANES-1:0]  r_vld_q;
  logic [NW-1:0]     fidx_q [LANES];

  always_ff @(posedge clk) begin
    if (rst)                 mode_q <= '0;
    else if (start && !busy) mode_q <= mode;
  end

  assign mode_sel = busy ? mode_q : mode;

  stage_seq_rom u_ssm (
    .mode (mode_sel), .supported (sup), .len_idx, .smax, .radix, .par, .weight, .pre,
    .skew_a, .skew_b
  );

  assign supported = sup;

  control_unit #(.PIPE_LAT (PIPE_LAT)) u_cu (
    .clk, .rst, .start, .supported (sup), .smax, .radix, .len_idx,
    .l_done, .r_done, .start_l, .start_r, .en_bu, .en_c, .sel, .ctrl, .addr_c,
    .l, .stage, .reading, .busy (cu_busy), .done (cu_done)
  );

  assign busy = cu_busy;

  addr_gen u_ag_load (
    .clk, .rst, .start (start_l), .stage, .radix, .par, .weight, .pre, .skew_a, .skew_b,
    .w (l_w), .done (l_done), .lane_vld (l_vld), .idx (l_idx), .bank (l_bank),
    .addr (l_addr), .texp (l_texp), .fidx (l_fidx)
  );

  addr_gen u_ag_read (
    .clk, .rst, .start (start_r), .stage, .radix, .par, .weight, .pre, .skew_a, .skew_b,
    .w (r_w), .done (r_done), .lane_vld (r_vld), .idx (r_idx), .bank (r_bank),
    .addr (r_addr), .texp (r_texp), .fidx (r_fidx)
  );

  pingpong_memory u_mem (
    .clk, .rst, .ctrl, .load (l), .wr (l_vld), .bank_load (l_bank),
    .address_load (l_addr), .data_in, .data_i, .re (r_vld), .bank_read (r_bank),
    .address_read (r_addr), .data_out (data_o)
  );

  // twiddle exponents and output indices follow the memory read latency
  always_ff @(posedge clk) begin
    if (rst) begin
      rd_q    <= 1'b0;
      done    <= 1'b0;
      r_vld_q <= '0;
      for (int i = 0; i < LANES; i++) begin
        texp_q[i] <= '0;
        fidx_q[i] <= '0;
      end
    end else begin
      rd_q    <= reading && r_w;
      done    <= cu_done;
      r_vld_q <= r_vld;
      texp_q  <= r_texp;
      fidx_q  <= r_fidx;
    end
  end

  tfmul u_tfmul (
    .clk, .rst, .en_c, .addr_c, .k (texp_q), .data_o, .data_c
  );

  butterfly_unit u_bu (
    .clk, .rst, .en (en_bu), .sel, .data_in (data_c), .data_out (data_i)
  );

  assign in_ready     = l && l_w;
  assign in_lane_vld  = l ? l_vld : '0;
  assign in_idx       = l_idx;
  assign data_out     = data_o;
  assign out_valid    = rd_q;
  assign out_lane_vld = rd_q ? r_vld_q : '0;
  assign out_idx      = fidx_q;
  assign n_out        = radix;
  assign p_out        = par;
  assign smax_out     = smax;
  assign s_out        = stage;

endmodule
