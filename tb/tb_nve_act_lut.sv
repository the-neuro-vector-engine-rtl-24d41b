// tb_nve_act_lut: self-checking test of one 1024 x 8-bit activation table.
// Writes every entry with a value derived from its address, then reads
// random addresses (with writes interleaved) and checks the registered read
// and that rdata holds while re is low.
module tb_nve_act_lut;
  logic clk = 0, we, re;
  logic [9:0] waddr, raddr;
  logic [7:0] wdata, rdata, exp_d;
  logic [7:0] ref_mem [1024];
  int checks = 0, failures = 0;
  bit seen = 0;

  nve_act_lut dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0; exp_d = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      we = 1; waddr = 10'(i); wdata = 8'((i * 37 + 11) ^ (i >> 3));
      ref_mem[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      re = $urandom % 2; raddr = 10'($urandom);
      we = ($urandom % 4) == 0; waddr = 10'($urandom); wdata = 8'($urandom);
      if (re) begin exp_d = ref_mem[raddr]; seen = 1; end
      if (we) ref_mem[waddr] = wdata;
      @(posedge clk); #1;
      if (seen) checks++;
      if (seen && rdata !== exp_d) begin
        failures++;
        $display("FAIL t=%0d rdata %h exp %h", t, rdata, exp_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
