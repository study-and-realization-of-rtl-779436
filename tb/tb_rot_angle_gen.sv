// tb_rot_angle_gen: self-checking testbench of the rotation angle generator.
//
// For every supported length N (all entries of the length table) and random exponents
// 0 <= k < N (plus k = 0 and k = N-1) it checks that THETA, one cycle after K and
// LEN_IDX are applied, equals 2*pi*k/N in radians with ZF fraction bits, within
// 2 LSB + a relative error of 2^-14 (the 15-bit mantissa). Inputs change every cycle,
// so the one-cycle latency is checked as well.
module tb_rot_angle_gen;
  import fft_pkg::*;

  localparam real PI = 3.14159265358979323846;

  logic              clk = 1'b0, rst = 1'b1;
  logic [LIDX_W-1:0] len_idx = '0;
  logic [NW-1:0]     k = '0;
  logic [ZW-1:0]     theta;
  int checks = 0, failures = 0;

  rot_angle_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    real exp_q;
    int  n, pk, pn;
    bit  have;
    have = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int e = 0; e < NUM_LENGTHS; e++) begin
      n = int'(SUP_TABLE[e].n);
      for (int j = 0; j < 40; j++) begin
        len_idx = LIDX_W'(e);
        k = (j == 0) ? '0 : (j == 1) ? NW'(n - 1) : NW'($urandom_range(n - 1, 0));
        @(posedge clk);
        #1;
        // theta now belongs to this k
        exp_q = 2.0 * PI * real'(k) / real'(n) * real'(1 << ZF);
        checks++;
        if ((real'(theta) - exp_q) > 2.0 + exp_q / 16384.0 ||
            (exp_q - real'(theta)) > 2.0 + exp_q / 16384.0) begin
          failures++;
          if (failures < 10)
            $display("N=%0d k=%0d: theta=%0d expected %.1f", n, k, theta, exp_q);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
