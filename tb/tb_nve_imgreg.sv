// tb_nve_imgreg: self-checking test of the image vector register with its
// shift-in register. A 23-entry model (lanes 0-15, shift-in 16-22) follows
// random loads, shifts, shift-in loads (alone and together with a shift) and
// stalls; all 16 lanes are compared every cycle. A directed part then walks a
// 3-tap row as in the 3x3 schedule and checks lane k sees input k+s.
module tb_nve_imgreg;
  import nve_pkg::*;
  logic clk = 0, rst_n = 0, en, si_set;
  img_op_e op;
  logic [63:0] din_a, din_b;
  pix_t img [16];
  logic [7:0] m [23];
  logic [7:0] row [24];
  int checks = 0, failures = 0, n_bypass = 0;

  nve_imgreg dut (.clk, .rst_n, .en, .op, .si_set, .din_a, .din_b, .img);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step_model();
    logic [7:0] n [23];
    n = m;
    if (en) begin
      if (si_set) for (int k = 0; k < 7; k++) n[16+k] = din_b[8*k +: 8];
      if (op == IMG_SET) begin
        for (int k = 0; k < 8; k++) begin
          n[k] = din_a[8*k +: 8];
          n[8+k] = din_b[8*k +: 8];
        end
      end else if (op == IMG_SHIFT) begin
        // shift the whole 23-entry chain, shift-in already replaced if loaded
        for (int k = 0; k < 22; k++) n[k] = (k < 15) ? m[k+1] : n[k+1];
        n[22] = '0;
        if (si_set) n_bypass++;
      end
    end
    m = n;
  endtask

  task automatic cmp(input int t);
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (img[k] !== m[k]) begin
        failures++;
        $display("FAIL t=%0d lane %0d got %h exp %h", t, k, img[k], m[k]);
      end
    end
  endtask

  initial begin
    en = 1; si_set = 0; op = IMG_NOP; din_a = '0; din_b = '0;
    for (int k = 0; k < 23; k++) m[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      en = ($urandom % 6) != 0;
      op = img_op_e'($urandom % 3);
      si_set = $urandom % 2;
      din_a = {$urandom, $urandom};
      din_b = {$urandom, $urandom};
      step_model();
      @(posedge clk); #1;
      cmp(t);
    end
    // Directed: a row of 18 inputs, three taps.
    for (int k = 0; k < 24; k++) row[k] = 8'(k * 7 + 3);
    @(negedge clk);
    en = 1; si_set = 0; op = IMG_SET;
    for (int k = 0; k < 8; k++) begin din_a[8*k +: 8] = row[k]; din_b[8*k +: 8] = row[8+k]; end
    @(negedge clk);
    op = IMG_SHIFT; si_set = 1;
    for (int k = 0; k < 8; k++) din_b[8*k +: 8] = row[16+k];
    for (int s = 0; s < 3; s++) begin
      for (int k = 0; k < 16; k++) begin
        checks++;
        if (img[k] !== row[k+s]) begin
          failures++;
          $display("FAIL tap %0d lane %0d got %h exp %h", s, k, img[k], row[k+s]);
        end
      end
      @(negedge clk);
      si_set = 0;
    end
    checks++;
    if (n_bypass == 0) begin failures++; $display("FAIL no shift-in bypass exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
