// tb_nve_pe: self-checking test of one MACC lane. A reference computes the
// truncated product floor(w * x / 256), the saturating 17-bit accumulation
// and the sticky overflow flag, delayed by the two pipeline stages. Random
// operands (small and full-range weights, so overflow in both directions
// occurs) with random stalls; the accumulator is checked every cycle and the
// two-cycle op-to-result latency explicitly.
module tb_nve_pe;
  import nve_pkg::*;
  logic clk = 0, rst_n = 0, en, clr_ovf;
  ex_op_e op;
  wgt_t w;
  pix_t x;
  acc_t acc;
  logic ovf;
  int checks = 0, failures = 0, n_ovf = 0;
  // reference pipeline
  ex_op_e r_op;
  longint r_opnd, r_acc;
  logic r_ovf;

  nve_pe dut (.*);
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
    // floor division by 256
    return (p >= 0) ? p / 256 : -((-p + 255) / 256);
  endfunction

  initial begin
    en = 1; clr_ovf = 0; op = EX_NOP; w = '0; x = '0;
    r_op = EX_NOP; r_opnd = 0; r_acc = 0; r_ovf = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      en = ($urandom % 5) != 0;
      clr_ovf = ($urandom % 200) == 0;
      op = ($urandom % 10 == 0) ? EX_BIAS : (($urandom % 6 == 0) ? EX_NOP : EX_MAC);
      w = ($urandom % 3 == 0) ? wgt_t'($urandom) : wgt_t'($signed(12'($urandom)));
      x = pix_t'($urandom);
      // reference: stage 2 uses the previous stage-1 contents
      if (clr_ovf) r_ovf = 0;
      if (en) begin
        if (r_op == EX_BIAS) r_acc = r_opnd;
        else if (r_op == EX_MAC) begin
          longint s;
          s = r_acc + r_opnd;
          if (s > 65535) begin r_acc = 65535; r_ovf = 1; n_ovf++; end
          else if (s < -65536) begin r_acc = -65536; r_ovf = 1; n_ovf++; end
          else r_acc = s;
        end
        r_op = op;
        r_opnd = (op == EX_BIAS) ? longint'(w) : trunc_prod(w, x);
      end
      @(posedge clk); #1;
      checks += 2;
      if (longint'(acc) !== r_acc || ovf !== r_ovf) begin
        failures++;
        $display("FAIL t=%0d acc %0d exp %0d ovf %b exp %b", t, acc, r_acc, ovf, r_ovf);
      end
    end
    // Latency: bias then one MAC; acc changes exactly two edges after issue.
    @(negedge clk); en = 1; clr_ovf = 1; op = EX_BIAS; w = 16'sd256; x = 8'd0;
    @(negedge clk); clr_ovf = 0; op = EX_MAC; w = 16'sd512; x = 8'd128;  // +1.0 * 0.5... = 256
    @(negedge clk); op = EX_NOP;
    checks++; if (acc !== 17'sd256) begin failures++; $display("FAIL bias latency %0d", acc); end
    @(negedge clk);
    checks++; if (acc !== 17'sd512) begin failures++; $display("FAIL mac latency %0d", acc); end
    checks++; if (n_ovf == 0) begin failures++; $display("FAIL overflow never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
