// tb_addgen: self-checking testbench of the ADDGEN cell.
//
// For all 256 skew pairs (a, b) it maps every index 0..4095 and checks that the address
// is idx[11:4], that the bank follows (idx[3:0] + a*idx[7:4] + b*idx[11:8]) mod 16, and
// that the mapping is one-to-one (no two indices share bank and address). The cell is
// combinational; outputs are sampled 1 time unit after the inputs change.
module tb_addgen;
  import fft_pkg::*;

  logic [NW-1:0] idx = '0;
  logic [3:0]    skew_a = '0, skew_b = '0;
  logic [BW-1:0] bank;
  logic [AW-1:0] addr;
  int checks = 0, failures = 0;

  addgen dut (.*);

  initial begin
    #100000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    bit used [4096];
    for (int a = 0; a < 16; a++) begin
      for (int b = 0; b < 16; b++) begin
        foreach (used[i]) used[i] = 1'b0;
        skew_a = 4'(a);
        skew_b = 4'(b);
        for (int i = 0; i < 4096; i++) begin
          int eb;
          idx = NW'(i);
          #1;
          eb = ((i % 16) + a * ((i / 16) % 16) + b * (i / 256)) % 16;
          checks++;
          if (int'(addr) != i / 16 || int'(bank) != eb || used[{addr, bank}]) begin
            failures++;
            if (failures < 10)
              $display("a=%0d b=%0d idx=%0d: bank %0d addr %0d (expected bank %0d)", a, b, i,
                       bank, addr, eb);
          end
          used[{addr, bank}] = 1'b1;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
