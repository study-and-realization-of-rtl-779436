// tb_pingpong_memory: self-checking testbench of the ping-pong data memory.
//
// Each cycle drives a random conflict-free set of write lanes (a random permutation of
// the banks, random addresses, random lane-valid bits, data from DATA_IN when LOAD is
// high and from DATA_I otherwise) and a random conflict-free set of read lanes. CTRL
// toggles every 64 cycles, as between two stages. A model of both blocks checks that
// writes go only to the block selected by CTRL, that reads come from the other block,
// and that each read lane gets its datum one cycle later. It counts writes with LOAD
// high and low and block switches; none of them may be missing.
module tb_pingpong_memory;
  import fft_pkg::*;

  logic             clk = 1'b0, rst = 1'b1, ctrl = 1'b0, load = 1'b1;
  logic [LANES-1:0] wr = '0, re = '0;
  logic [BW-1:0]    bank_load [LANES], bank_read [LANES];
  logic [AW-1:0]    address_load [LANES], address_read [LANES];
  cplx_t            data_in [LANES], data_i [LANES], data_out [LANES];
  int checks = 0, failures = 0;
  int n_load = 0, n_bu = 0, n_switch = 0;

  cplx_t model [2][BANKS][BANK_DEPTH];

  pingpong_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic void perm(output logic [BW-1:0] p [LANES]);
    foreach (p[i]) p[i] = BW'(i);
    for (int i = LANES - 1; i > 0; i--) begin
      int j;
      logic [BW-1:0] t;
      j = $urandom_range(i, 0);
      t = p[i]; p[i] = p[j]; p[j] = t;
    end
  endfunction

  initial begin
    cplx_t    expd [LANES];
    logic [LANES-1:0] re_q;
    foreach (data_in[l]) begin
      data_in[l] = '0; data_i[l] = '0; bank_load[l] = '0; bank_read[l] = '0;
      address_load[l] = '0; address_read[l] = '0;
    end
    // fill both blocks through the lanes
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int blk = 0; blk < 2; blk++)
      for (int a = 0; a < BANK_DEPTH; a++) begin
        ctrl = blk[0];
        load = 1'b1;
        wr   = '1;
        re   = '0;
        perm(bank_load);
        foreach (data_in[l]) begin
          address_load[l] = AW'(a);
          data_in[l] = cplx_t'($urandom);
          model[blk][bank_load[l]][a] = data_in[l];
        end
        @(negedge clk);
      end
    // random traffic
    re_q = '0;
    for (int it = 0; it < 4000; it++) begin
      if (it % 64 == 0) begin ctrl = ~ctrl; n_switch++; end
      load = $urandom_range(1, 0) != 0;
      wr   = LANES'($urandom);
      re   = LANES'($urandom);
      perm(bank_load);
      perm(bank_read);
      foreach (data_in[l]) begin
        address_load[l] = AW'($urandom);
        address_read[l] = AW'($urandom);
        data_in[l] = cplx_t'($urandom);
        data_i[l]  = cplx_t'($urandom);
        expd[l] = model[!ctrl][bank_read[l]][address_read[l]];
      end
      foreach (data_in[l])
        if (wr[l]) begin
          model[ctrl][bank_load[l]][address_load[l]] = load ? data_in[l] : data_i[l];
          if (load) n_load++; else n_bu++;
        end
      re_q = re;
      @(posedge clk);
      #1;
      foreach (data_out[l]) begin
        if (re_q[l]) begin
          checks++;
          if (data_out[l] != expd[l]) begin
            failures++;
            if (failures < 10)
              $display("cycle %0d lane %0d: read %h expected %h", it, l, data_out[l], expd[l]);
          end
        end
      end
      @(negedge clk);
    end
    checks += 3;
    if (n_load == 0) failures++;
    if (n_bu == 0) failures++;
    if (n_switch < 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
