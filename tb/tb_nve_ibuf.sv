// tb_nve_ibuf: self-checking test of the 512 x 54-bit instruction buffer:
// full program load, then random fetches with interleaved writes; checks the
// one-cycle fetch latency and that rdata holds while re is low.
module tb_nve_ibuf;
  logic clk = 0, we, re;
  logic [8:0] waddr, raddr;
  logic [53:0] wdata, rdata, exp_d;
  logic [53:0] ref_mem [512];
  int checks = 0, failures = 0;

  nve_ibuf dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0; exp_d = 0;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      we = 1; waddr = 9'(i); wdata = {22'($urandom), $urandom};
      ref_mem[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      re = ($urandom % 4) != 0; raddr = 9'($urandom);
      we = ($urandom % 5) == 0; waddr = 9'($urandom); wdata = {22'($urandom), $urandom};
      if (re) exp_d = ref_mem[raddr];
      if (we) ref_mem[waddr] = wdata;
      @(posedge clk); #1;
      checks++;
      if (rdata !== exp_d) begin
        failures++;
        $display("FAIL t=%0d rdata %h exp %h", t, rdata, exp_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
