// tb_nve_ctrl: self-checking test of the VLIW controller with its
// instruction buffer. A 7-word program (prolog, 3-word body looped three
// times, an explicit offset advance, an input-bus write and a halt) tags each
// word with its index in the reserved field. Checks: the executed word order
// (the loop branch costs no cycle), the modulo addresses of each pass,
// stalls on a missing input word and on a blocked output bus, in_ready,
// busy/done, and the total cycle count.
module tb_nve_ctrl;
  import nve_pkg::*;
  logic clk = 0, rst_n = 0, start, busy, done;
  logic cfg_we;
  cfg_e cfg_addr;
  logic [15:0] cfg_wdata;
  logic ib_re;
  logic [8:0] ib_raddr;
  logic [53:0] ib_rdata;
  logic in_valid, in_ready, out_valid, out_ready, en;
  instr_t ins;
  logic [9:0] pa_phys, pb_phys;
  logic prog_we;
  logic [8:0] prog_addr;
  logic [53:0] prog_data;
  int checks = 0, failures = 0;
  int trace [$];
  int phys_trace [$];
  int n_in_stall = 0, n_out_stall = 0, cycles = 0, n_done = 0;

  nve_ibuf u_ib (.clk, .we(prog_we), .waddr(prog_addr), .wdata(prog_data),
                 .re(ib_re), .raddr(ib_raddr), .rdata(ib_rdata));
  nve_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic put(input int a, input instr_t w);
    @(negedge clk); prog_we = 1; prog_addr = 9'(a); prog_data = w;
    @(negedge clk); prog_we = 0;
  endtask

  task automatic cfg(input cfg_e a, input int v);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = 16'(v);
    @(negedge clk); cfg_we = 0;
  endtask

  // monitor executed words
  always @(posedge clk) if (rst_n && en && ins.rsv != 0) begin
    trace.push_back(int'(ins.rsv));
    if (ins.pa != PA_NOP) phys_trace.push_back(int'(pa_phys));
  end
  always @(posedge clk) if (rst_n && busy) begin
    cycles++;
    if (!en && ins.pa == PA_WRITE && !in_valid) n_in_stall++;
    if (!en && out_valid && !out_ready) n_out_stall++;
  end
  always @(posedge clk) if (done) n_done++;

  initial begin
    instr_t w;
    int exp_trace [$] = '{1, 2, 3, 4, 2, 3, 4, 2, 3, 4, 5, 6, 7};
    int exp_phys [$];
    start = 0; cfg_we = 0; cfg_addr = CFG_LOOP_START; cfg_wdata = 0;
    in_valid = 0; out_valid = 0; out_ready = 1; prog_we = 0; prog_addr = 0; prog_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    w = '0; w.rsv = 1; w.pa = PA_READ; w.pa_addr = 10'd5;               put(0, w);
    w = '0; w.rsv = 2; w.pa = PA_READ; w.pa_mod = 1; w.pa_addr = 10'd2;  put(1, w);
    w = '0; w.rsv = 3;                                                   put(2, w);
    w = '0; w.rsv = 4; w.pa = PA_READ; w.pa_mod = 1; w.pa_addr = 10'd9;  put(3, w);
    w = '0; w.rsv = 5; w.ctl = CTL_ADV;                                  put(4, w);
    w = '0; w.rsv = 6; w.pa = PA_WRITE; w.pa_mod = 1; w.pa_addr = 10'd0; put(5, w);
    w = '0; w.rsv = 7; w.ctl = CTL_HALT;                                 put(6, w);
    cfg(CFG_LOOP_START, 1); cfg(CFG_LOOP_END, 3); cfg(CFG_LOOP_COUNT, 3);
    cfg(CFG_IMG_BASE, 100); cfg(CFG_IMG_LEN, 10); cfg(CFG_IMG_STRIDE, 3);
    // offsets 0,3,6 in the three passes, then 9 -> ADV -> 2
    exp_phys = '{5, 102, 109, 105, 102, 108, 105, 102};
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    chk(busy, "busy after start");
    // block the output bus for a few cycles during the loop
    repeat (3) @(negedge clk);
    out_valid = 1; out_ready = 0;
    repeat (4) @(negedge clk);
    out_ready = 1;
    @(negedge clk); out_valid = 0;
    // supply the input word late
    wait (ins.rsv == 6);
    repeat (5) @(negedge clk);
    chk(ins.rsv == 6 && !en && in_ready, $sformatf("held on missing input: word %0d en %b in_ready %b", ins.rsv, en, in_ready));
    in_valid = 1;
    #1 chk(in_ready && en, "in_ready when input offered");
    @(negedge clk); in_valid = 0;
    wait (!busy);
    repeat (3) @(negedge clk);
    chk(trace.size() == exp_trace.size(), $sformatf("trace length %0d", trace.size()));
    foreach (exp_trace[i]) if (i < trace.size())
      chk(trace[i] == exp_trace[i], $sformatf("word %0d is %0d exp %0d", i, trace[i], exp_trace[i]));
    chk(phys_trace.size() == exp_phys.size(), $sformatf("phys length %0d", phys_trace.size()));
    foreach (exp_phys[i]) if (i < phys_trace.size())
      chk(phys_trace[i] == exp_phys[i], $sformatf("addr %0d is %0d exp %0d", i, phys_trace[i], exp_phys[i]));
    chk(n_done == 1, "one done pulse");
    chk(n_in_stall == 4, $sformatf("input stall cycles %0d", n_in_stall));
    chk(n_out_stall == 4, $sformatf("output stall cycles %0d", n_out_stall));
    // 1 fetch cycle + 13 words + stall cycles
    chk(cycles == 14 + n_in_stall + n_out_stall, $sformatf("cycles %0d", cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
