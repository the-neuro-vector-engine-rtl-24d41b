// tb_nve_wreg: self-checking test of the weight register. Random sequences
// of W_SET, W_SHIFT, NOP and stalls; the broadcast entry w0 is compared with
// a four-entry queue model after every cycle.
module tb_nve_wreg;
  import nve_pkg::*;
  logic clk = 0, rst_n = 0, en;
  w_op_e op;
  logic [63:0] din;
  wgt_t w0;
  logic [15:0] q [4];
  int checks = 0, failures = 0;

  nve_wreg dut (.clk, .rst_n, .en, .op, .din, .w0);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1; op = W_NOP; din = '0;
    for (int k = 0; k < 4; k++) q[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      en  = ($urandom % 6) != 0;
      op  = w_op_e'($urandom % 3);
      din = {$urandom, $urandom};
      if (en) begin
        if (op == W_SET) for (int k = 0; k < 4; k++) q[k] = din[16*k +: 16];
        else if (op == W_SHIFT) begin
          for (int k = 0; k < 3; k++) q[k] = q[k+1];
          q[3] = '0;
        end
      end
      @(posedge clk); #1;
      checks++;
      if (w0 !== q[0]) begin
        failures++;
        $display("FAIL t=%0d w0 %h exp %h", t, w0, q[0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
