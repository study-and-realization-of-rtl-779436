// mem_block: one block of the processor's data memory.
//
// BANKS (16) independent banks of DEPTH (256) complex words. In every cycle each bank can
// be written at one address and read at one address; the read data appears one cycle
// later (synchronous read). Sixteen data can thus be written and sixteen read per cycle,
// as long as they fall in different banks. The bank organisation (16 x 256) follows the
// document; the single write port plus single read port per bank and the registered read
// are this design's own choices. Bank contents are not reset.
module mem_block
  import fft_pkg::*;
#(
  parameter int NBANKS = BANKS,
  parameter int DEPTH  = BANK_DEPTH
) (
  input  logic                     clk,
  input  logic [NBANKS-1:0]        we,
  input  logic [$clog2(DEPTH)-1:0] waddr [NBANKS],
  input  cplx_t                    wdata [NBANKS],
  input  logic [$clog2(DEPTH)-1:0] raddr [NBANKS],
  output cplx_t                    rdata [NBANKS]
);

  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    cplx_t mem [DEPTH];

    always_ff @(posedge clk) begin
      if (we[b]) mem[waddr[b]] <= wdata[b];
      rdata[b] <= mem[raddr[b]];
    end
  end

endmodule
