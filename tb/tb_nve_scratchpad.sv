// tb_nve_scratchpad: self-checking test of the 1024 x 64-bit scratchpad.
// Fills words through port A, then issues random mixes of port A writes,
// port A reads and port B reads against a reference array, checking the
// one-cycle read latency, that rdata holds between reads and that en = 0
// freezes both ports.
module tb_nve_scratchpad;
  localparam int DEPTH = 1024;
  logic clk = 0, en, a_en, a_we, b_en;
  logic [9:0] a_addr, b_addr;
  logic [63:0] a_wdata, a_rdata, b_rdata;
  logic [63:0] ref_mem [DEPTH];
  logic [63:0] exp_a, exp_b;
  int checks = 0, failures = 0;

  nve_scratchpad dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    en = 1; a_en = 0; a_we = 0; b_en = 0; a_addr = 0; b_addr = 0; a_wdata = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = 10'(i); a_wdata = {$urandom, $urandom};
      ref_mem[i] = a_wdata;
    end
    @(negedge clk); a_en = 0; a_we = 0;
    for (int t = 0; t < 3000; t++) begin
      logic do_rd_a, do_rd_b;
      @(negedge clk);
      en = ($urandom % 8) != 0;
      a_en = $urandom % 2; a_we = $urandom % 2; b_en = $urandom % 2;
      a_addr = 10'($urandom); b_addr = ($urandom % 4 == 0) ? a_addr : 10'($urandom);
      a_wdata = {$urandom, $urandom};
      do_rd_a = en && a_en && !a_we;
      do_rd_b = en && b_en;
      if (do_rd_a) exp_a = ref_mem[a_addr];
      if (do_rd_b) exp_b = ref_mem[b_addr];   // old word on a same-cycle write
      if (en && a_en && a_we) ref_mem[a_addr] = a_wdata;
      @(posedge clk); #1;
      if (t > 0 || do_rd_a) chk(a_rdata, exp_a, "port A");
      if (t > 0 || do_rd_b) chk(b_rdata, exp_b, "port B");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
