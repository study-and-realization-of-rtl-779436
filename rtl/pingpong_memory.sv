// pingpong_memory: the processor's "ping-pong" data memory.
//
// Two mem_block instances; CTRL selects the block that is written (CTRL = 0: block 0),
// the other block is read. During a stage the processor reads one block and writes the
// results into the other, then CTRL toggles. A control block routes the 16 write lanes to
// the banks named by bank_load/address_load and the 16 read lanes to the banks named by
// bank_read/address_read; a multiplexer selects the read block and puts each bank's data
// back on the lane that asked for it. WR and RE (per lane) say which lanes carry a valid
// address. Read data (data_out, lane order) is valid one cycle after the read address.
// Write data comes from data_in while LOAD is high (input samples) and from data_i (the
// butterfly unit) otherwise.
//
// The structure (two blocks, control block, output mux, CTRL/RE/WR) follows the
// document; lane/bank crossbars and the one-cycle read latency are this design's own.
// An assertion flags two valid lanes addressing one bank in the same cycle.
module pingpong_memory
  import fft_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              ctrl,                      // block being written
  input  logic              load,                      // write data_in instead of data_i
  input  logic [LANES-1:0]  wr,                        // write lane valid
  input  logic [BW-1:0]     bank_load    [LANES],
  input  logic [AW-1:0]     address_load [LANES],
  input  cplx_t             data_in      [LANES],
  input  cplx_t             data_i       [LANES],
  input  logic [LANES-1:0]  re,                        // read lane valid
  input  logic [BW-1:0]     bank_read    [LANES],
  input  logic [AW-1:0]     address_read [LANES],
  output cplx_t             data_out     [LANES]
);

  logic [BANKS-1:0] we0, we1;
  logic [AW-1:0]    waddr [BANKS];
  cplx_t            wdata [BANKS];
  logic [AW-1:0]    raddr [BANKS];
  cplx_t            rdata0 [BANKS];
  cplx_t            rdata1 [BANKS];
  logic             ctrl_q;
  logic [BW-1:0]    rbank_q [LANES];

  // control block: lane -> bank routing
  always_comb begin
    logic [BANKS-1:0] we;
    we = '0;
    for (int b = 0; b < BANKS; b++) begin
      waddr[b] = '0;
      wdata[b] = '0;
      raddr[b] = '0;
    end
    for (int l = 0; l < LANES; l++) begin
      if (wr[l]) begin
        we[bank_load[l]]    = 1'b1;
        waddr[bank_load[l]] = address_load[l];
        wdata[bank_load[l]] = load ? data_in[l] : data_i[l];
      end
      if (re[l]) raddr[bank_read[l]] = address_read[l];
    end
    we0 = ctrl ? '0 : we;
    we1 = ctrl ? we : '0;
  end

  mem_block u_block0 (.clk, .we(we0), .waddr, .wdata, .raddr, .rdata(rdata0));
  mem_block u_block1 (.clk, .we(we1), .waddr, .wdata, .raddr, .rdata(rdata1));

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl_q <= 1'b0;
      for (int l = 0; l < LANES; l++) rbank_q[l] <= '0;
    end else begin
      ctrl_q <= ctrl;
      for (int l = 0; l < LANES; l++) rbank_q[l] <= bank_read[l];
    end
  end

  // output mux: read block is the one not being written; bank -> lane routing
  always_comb begin
    for (int l = 0; l < LANES; l++)
      data_out[l] = ctrl_q ? rdata0[rbank_q[l]] : rdata1[rbank_q[l]];
  end

  // conflict-free access: no two valid lanes may use one bank in one cycle
  always_ff @(posedge clk) begin
    if (!rst) begin
      for (int a = 0; a < LANES; a++)
        for (int c = a + 1; c < LANES; c++) begin
          assert (!(wr[a] && wr[c] && bank_load[a] == bank_load[c]))
            else $error("write bank conflict: lanes %0d and %0d", a, c);
          assert (!(re[a] && re[c] && bank_read[a] == bank_read[c]))
            else $error("read bank conflict: lanes %0d and %0d", a, c);
        end
    end
  end

endmodule
