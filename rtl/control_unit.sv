// control_unit: central controller of the FFT processor.
//
// A five-state FSM, as in the document: IDLE waits for START; SETUP starts the load
// address generator (START_L) and raises L; LOAD waits for its DONE (L_DONE) while the
// input samples are written; WORK runs the stages; READ starts the read address
// generator (START_R) on the output pattern and waits for R_DONE. It also drives EN_BU
// (butterfly enable), EN_C (twiddle multiplier enable, from the second stage on), SEL
// (radix of the current stage), CTRL (memory block being written) and ADDR_C (address
// of the twiddle coefficient ROM, the length-table index).
//
// In WORK, each stage s starts the read address generator; the same pulse, delayed by
// PIPE_LAT cycles (memory read + twiddle multiplier + butterfly), starts the load
// address generator, which then writes the results in place into the other memory
// block. When that write pass ends (L_DONE) the next stage starts in the same cycle with
// CTRL toggled, or READ follows after stage SMAX. Starting the write pass by a delayed
// pulse, CTRL = block written and the DONE pulse at the end of READ are this design's
// own choices. START_L, START_R, L and DONE are combinational from the state (Mealy),
// as in the document's FSM; everything else is registered.
module control_unit
  import fft_pkg::*;
#(
  parameter int PIPE_LAT = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic              supported,
  input  logic [SW-1:0]     smax,
  input  logic [RW-1:0]     radix [MAX_STAGES],
  input  logic [LIDX_W-1:0] len_idx,
  input  logic              l_done,
  input  logic              r_done,
  output logic              start_l,
  output logic              start_r,
  output logic              en_bu,
  output logic              en_c,
  output radix_e            sel,
  output logic              ctrl,
  output logic [LIDX_W-1:0] addr_c,
  output logic              l,            // load phase: memory writes take data_in
  output logic [SW-1:0]     stage,        // stage whose pattern the generators produce
  output logic              reading,      // READ state
  output logic              busy,
  output logic              done
);

  typedef enum logic [2:0] {IDLE, SETUP, LOAD, WORK, READ} cu_state_e;
  cu_state_e state;

  logic [PIPE_LAT-1:0] sdel;              // start_r delayed towards start_l
  logic [SW-1:0]       s;

  always_comb begin
    start_l = 1'b0;
    start_r = 1'b0;
    l       = 1'b0;
    done    = 1'b0;
    case (state)
      SETUP: begin
        start_l = 1'b1;
        l       = 1'b1;
      end
      LOAD: begin
        l = 1'b1;
        if (l_done) start_r = 1'b1;
      end
      WORK: begin
        start_l = sdel[PIPE_LAT-1];
        if (l_done) start_r = 1'b1;
      end
      READ: begin
        if (r_done) done = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      s     <= '0;
      ctrl  <= 1'b0;
      sdel  <= '0;
    end else begin
      // only the start of a stage's read pass is delayed into a write pass
      sdel <= {sdel[PIPE_LAT-2:0],
               l_done && (state == LOAD || (state == WORK && s != smax))};
      case (state)
        IDLE: begin
          s    <= '0;
          ctrl <= 1'b0;
          if (start && supported) state <= SETUP;
        end
        SETUP: state <= LOAD;
        LOAD: begin
          if (l_done) begin
            state <= WORK;
            ctrl  <= 1'b1;
          end
        end
        WORK: begin
          if (l_done) begin
            ctrl <= ~ctrl;
            if (s == smax) state <= READ;
            else           s     <= s + 1'b1;
          end
        end
        READ: begin
          if (r_done) state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign stage   = s;
  assign en_bu   = (state == WORK);
  assign en_c    = (state == WORK) && (s != '0);
  assign sel     = radix_code(radix[s]);
  assign addr_c  = len_idx;
  assign reading = (state == READ);
  assign busy    = (state != IDLE);

endmodule
