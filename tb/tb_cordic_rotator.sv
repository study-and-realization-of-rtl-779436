// tb_cordic_rotator: self-checking test of the radix-4 CORDIC rotator.
// Drives one random (angle, sample) pair per cycle, including the quadrant boundaries,
// and compares every output, NROT + 2 cycles later, with x*exp(-j*theta) computed with
// real arithmetic. Allowed error: 4 LSB per component.
module tb_cordic_rotator;
  import fft_pkg::*;

  localparam int NROT = DW / 2 + 1;
  localparam int LAT  = NROT + 2;
  localparam int NVEC = 2000;
  localparam real PI  = 3.14159265358979323846;

  logic clk = 1'b0, rst = 1'b1;
  logic [ZW-1:0] theta;
  logic signed [DW-1:0] x_in, y_in, x_out, y_out;
  int checks = 0, failures = 0, cycle = 0;

  real exp_x [$], exp_y [$];

  cordic_rotator dut (.clk, .rst, .theta, .x_in, .y_in, .x_out, .y_out);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sent = 0;
    theta = '0; x_in = '0; y_in = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int v = 0; v < NVEC + LAT; v++) begin
      @(negedge clk);
      if (v < NVEC) begin
        real th, xr, yr;
        if (v < 16) theta = ZW'(int'(real'(v) * PI / 8.0 * 65536.0));
        else        theta = ZW'($urandom_range(int'(2.0 * PI * 65536.0) - 1, 0));
        x_in = DW'($urandom_range(40000, 0) - 20000);
        y_in = DW'($urandom_range(40000, 0) - 20000);
        th = real'(theta) / 65536.0;
        xr = real'(x_in); yr = real'(y_in);
        exp_x.push_back(xr * $cos(th) + yr * $sin(th));
        exp_y.push_back(yr * $cos(th) - xr * $sin(th));
        sent++;
      end
      if (v >= LAT) begin
        real ex, ey;
        ex = exp_x.pop_front();
        ey = exp_y.pop_front();
        checks++;
        if ((real'(x_out) - ex > 4.0) || (ex - real'(x_out) > 4.0) ||
            (real'(y_out) - ey > 4.0) || (ey - real'(y_out) > 4.0)) begin
          failures++;
          if (failures < 10)
            $display("mismatch vector %0d: got (%0d,%0d) expected (%f,%f)", v - LAT, x_out, y_out, ex, ey);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
