// tb_nve_saturate: self-checking test of the Saturate stage. Random 17-bit
// accumulators (including values far outside the potential range) are
// captured on ld and compared with floor(acc / 4) clamped to [-512, 511];
// cycles without ld or with en low must leave the O Regs unchanged.
module tb_nve_saturate;
  import nve_pkg::*;
  logic clk = 0, rst_n = 0, en, ld;
  acc_t acc [16];
  pot_t pot [16];
  int exp_p [16];
  int checks = 0, failures = 0, n_clip = 0;

  nve_saturate dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1; ld = 0;
    for (int k = 0; k < 16; k++) begin acc[k] = '0; exp_p[k] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      en = ($urandom % 4) != 0;
      ld = $urandom % 2;
      for (int k = 0; k < 16; k++) begin
        int v, q;
        acc[k] = ($urandom % 2) ? acc_t'($urandom) : acc_t'($signed(12'($urandom)));
        v = int'(acc[k]);
        q = (v >= 0) ? v / 4 : -((-v + 3) / 4);
        if (en && ld) begin
          if (q > 511 || q < -512) n_clip++;
          exp_p[k] = (q > 511) ? 511 : (q < -512) ? -512 : q;
        end
      end
      @(posedge clk); #1;
      for (int k = 0; k < 16; k++) begin
        checks++;
        if (int'(pot[k]) != exp_p[k]) begin
          failures++;
          $display("FAIL t=%0d lane %0d pot %0d exp %0d", t, k, pot[k], exp_p[k]);
        end
      end
    end
    checks++;
    if (n_clip == 0) begin failures++; $display("FAIL clamp never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
