// tb_nve_vmacc: self-checking test of the 16-lane vector MACC. The same
// broadcast weight and op with per-lane random inputs; each lane is compared
// with a reference accumulator (truncated product, saturation) every cycle,
// and a 3x3 kernel on known inputs is checked against a direct sum.
module tb_nve_vmacc;
  import nve_pkg::*;
  logic clk = 0, rst_n = 0, en, clr_ovf;
  ex_op_e op;
  wgt_t w;
  pix_t x [16];
  acc_t acc [16];
  logic ovf;
  int checks = 0, failures = 0;
  ex_op_e r_op;
  longint r_opnd [16], r_acc [16];

  nve_vmacc dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint trunc_prod(input wgt_t wv, input pix_t xv);
    longint p;
    p = longint'(wv) * longint'({1'b0, xv});
    return (p >= 0) ? p / 256 : -((-p + 255) / 256);
  endfunction

  initial begin
    en = 1; clr_ovf = 0; op = EX_NOP; w = '0;
    r_op = EX_NOP;
    for (int k = 0; k < 16; k++) begin x[k] = '0; r_opnd[k] = 0; r_acc[k] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      en = ($urandom % 5) != 0;
      op = ($urandom % 12 == 0) ? EX_BIAS : EX_MAC;
      w = wgt_t'($signed(11'($urandom)));
      for (int k = 0; k < 16; k++) x[k] = pix_t'($urandom);
      if (en) begin
        for (int k = 0; k < 16; k++) begin
          if (r_op == EX_BIAS) r_acc[k] = r_opnd[k];
          else if (r_op == EX_MAC) begin
            longint s;
            s = r_acc[k] + r_opnd[k];
            r_acc[k] = (s > 65535) ? 65535 : (s < -65536) ? -65536 : s;
          end
          r_opnd[k] = (op == EX_BIAS) ? longint'(w) : trunc_prod(w, x[k]);
        end
        r_op = op;
      end
      @(posedge clk); #1;
      for (int k = 0; k < 16; k++) begin
        checks++;
        if (longint'(acc[k]) !== r_acc[k]) begin
          failures++;
          $display("FAIL t=%0d lane %0d acc %0d exp %0d", t, k, acc[k], r_acc[k]);
        end
      end
    end
    // Directed: bias 1.0 then 9 taps of weight 0.25 on inputs (k+1)/256*16.
    begin
      longint expv;
      @(negedge clk); en = 1; op = EX_BIAS; w = 16'sd256;
      for (int tap = 0; tap < 9; tap++) begin
        @(negedge clk); op = EX_MAC; w = 16'sd64;
        for (int k = 0; k < 16; k++) x[k] = 8'((k + tap) * 16);
      end
      @(negedge clk); op = EX_NOP;
      @(negedge clk);
      for (int k = 0; k < 16; k++) begin
        expv = 256;
        for (int tap = 0; tap < 9; tap++) expv += (64 * ((k + tap) * 16 % 256)) / 256;
        checks++;
        if (longint'(acc[k]) !== expv) begin
          failures++;
          $display("FAIL 3x3 lane %0d acc %0d exp %0d", k, acc[k], expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
