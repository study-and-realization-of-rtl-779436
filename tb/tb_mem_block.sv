// tb_mem_block: self-checking testbench of one data-memory block.
//
// First fills every word of every bank (16 writes per cycle), then runs random cycles in
// which each bank is written with probability 1/2 at a random address and read at a
// random address. A model array gives the expected read data one cycle after the read
// address (the value before a write in the same cycle). Checks the one-cycle read
// latency, bank independence and write enables.
module tb_mem_block;
  import fft_pkg::*;

  logic            clk = 1'b0;
  logic [BANKS-1:0] we = '0;
  logic [AW-1:0]   waddr [BANKS], raddr [BANKS];
  cplx_t           wdata [BANKS], rdata [BANKS];
  int checks = 0, failures = 0;

  cplx_t model [BANKS][BANK_DEPTH];

  mem_block dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    cplx_t expd [BANKS];
    foreach (waddr[b]) begin waddr[b] = '0; raddr[b] = '0; wdata[b] = '0; end
    // fill
    for (int a = 0; a < BANK_DEPTH; a++) begin
      @(negedge clk);
      we = '1;
      foreach (waddr[b]) begin
        waddr[b] = AW'(a);
        wdata[b] = cplx_t'($urandom);
        model[b][a] = wdata[b];
      end
    end
    @(negedge clk);
    we = '0;
    // random traffic
    for (int it = 0; it < 5000; it++) begin
      @(negedge clk);
      foreach (waddr[b]) begin
        raddr[b] = AW'($urandom_range(BANK_DEPTH - 1, 0));
        expd[b]  = model[b][raddr[b]];
        we[b]    = $urandom_range(1, 0) != 0;
        waddr[b] = AW'($urandom_range(BANK_DEPTH - 1, 0));
        wdata[b] = cplx_t'($urandom);
        if (we[b]) model[b][waddr[b]] = wdata[b];
      end
      @(posedge clk);
      #1;
      foreach (rdata[b]) begin
        checks++;
        if (rdata[b] != expd[b]) begin
          failures++;
          if (failures < 10)
            $display("bank %0d addr %0d: read %h expected %h", b, raddr[b], rdata[b], expd[b]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
