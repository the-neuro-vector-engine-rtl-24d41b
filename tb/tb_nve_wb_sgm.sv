// tb_nve_wb_sgm: self-checking test of the activation stage. Loads a sigmoid
// table (entry i = min(255, floor(256 / (1 + exp(-p)))), p = signed(i) / 64),
// then drives random potentials with WB_LO / WB_HI / NOP and stalls, and
// checks the eight output bytes against the table and out_valid timing.
module tb_nve_wb_sgm;
  import nve_pkg::*;
  logic clk = 0, rst_n = 0, en, lut_we;
  wb_op_e op;
  pot_t pot [16];
  logic [9:0] lut_addr;
  logic [7:0] lut_data;
  logic [63:0] out_data, exp_d;
  logic out_valid, exp_v;
  logic [7:0] tbl [1024];
  int checks = 0, failures = 0, n_lo = 0, n_hi = 0;

  nve_wb_sgm dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1; op = WB_NOP; lut_we = 0; lut_addr = 0; lut_data = 0; exp_d = 0; exp_v = 0;
    for (int k = 0; k < 16; k++) pot[k] = '0;
    for (int i = 0; i < 1024; i++) begin
      real p, y;
      int v;
      p = real'($signed(10'(i))) / 64.0;
      y = 256.0 / (1.0 + $exp(-p));
      v = int'($floor(y));
      tbl[i] = (v > 255) ? 8'd255 : 8'(v);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); lut_we = 1; lut_addr = 10'(i); lut_data = tbl[i];
    end
    @(negedge clk); lut_we = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      en = ($urandom % 5) != 0;
      op = wb_op_e'($urandom % 3);
      for (int k = 0; k < 16; k++) pot[k] = pot_t'($urandom);
      if (en) begin
        exp_v = (op != WB_NOP);
        if (op != WB_NOP) begin
          for (int k = 0; k < 8; k++)
            exp_d[8*k +: 8] = tbl[(op == WB_HI) ? pot[k+8] : pot[k]];
          if (op == WB_LO) n_lo++; else n_hi++;
        end
      end
      @(posedge clk); #1;
      checks += 2;
      if (out_valid !== exp_v || out_data !== exp_d) begin
        failures++;
        $display("FAIL t=%0d out %h/%b exp %h/%b", t, out_data, out_valid, exp_d, exp_v);
      end
    end
    // Sigmoid sanity: potential 0 maps to 0.5.
    checks++;
    if (tbl[0] != 8'd128) begin failures++; $display("FAIL sigmoid(0) = %0d", tbl[0]); end
    $display("lookups lo=%0d hi=%0d", n_lo, n_hi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
