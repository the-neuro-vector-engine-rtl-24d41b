// tb_nve_top: end-to-end test of the cluster running a software-pipelined
// 3x3 convolution (16 neighbouring outputs per 10-cycle steady-state pass,
// 144 MACs), with all parameters at their defaults.
//
// The program: prolog writes the 3x3 weights + bias (3 words) and the first
// three image rows (18 columns, 3 words each) from the input bus into the
// scratchpad, then runs a first pass with saturation/lookup disabled; the
// hardware loop repeats the 10-word body for the remaining rows, each pass
// writing one new image row into a 4-row circular region (modulo addressing)
// and emitting the previous row's 16 activations as two 64-bit beats; the
// epilog drains the last row and writes one result word back into the
// scratchpad through the activation feedback path.
//
// Expected outputs are computed here from the arithmetic definition
// (truncated products, 17-bit saturating accumulation, potential clamp,
// sigmoid table). Run 1 uses moderate weights without bus stalls and checks
// the 10-cycle steady-state rate; run 2 uses large weights so accumulators
// overflow, with random input and output stalls. Each mechanism (input stall,
// output stall, loop branch, modulo wrap, shift-in bypass, potential clamp,
// accumulator overflow, feedback write) is counted and must occur.
module tb_nve_top;
  import nve_pkg::*;
  localparam int NROWS = 8;             // output rows per run
  localparam int IMG_BASE = 16, IMG_LEN = 12;
  localparam int FB_ADDR = 100;

  logic clk = 0, rst_n = 0, start, busy, done, ovf;
  logic cfg_we; logic [2:0] cfg_addr; logic [15:0] cfg_wdata;
  logic prog_we; logic [8:0] prog_addr; logic [53:0] prog_data;
  logic lut_we; logic [9:0] lut_addr; logic [7:0] lut_data;
  logic [63:0] in_data, out_data;
  logic in_valid, in_ready, out_valid, out_ready;

  nve_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_in_stall = 0, n_out_stall = 0, n_branch = 0, n_wrap = 0, n_bypass = 0;
  int n_clamp = 0, n_ovf_runs = 0, n_feedback = 0;
  logic [7:0] tbl [1024];
  logic [63:0] in_q [$];
  logic [63:0] out_q [$];
  int out_t [$];
  int cyc = 0;
  bit stall_in_en = 0, stall_out_en = 0;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- program construction ----------------
  function automatic instr_t nop();
    return '0;
  endfunction

  // One body word of the steady state. k: position 3..9, 0..2 (Fig.-style
  // numbering); first: disable saturate/lookup (first pass).
  function automatic instr_t body(input int k, input bit first);
    instr_t w = '0;
    case (k)
      3: begin w.pa = PA_READ; w.pa_addr = 10'd1; w.img = IMG_SET; w.w = W_SHIFT; w.ex = EX_BIAS; end
      4: begin w.pa = PA_READ; w.pa_mod = 1; w.pa_addr = 10'd3; w.pb_en = 1; w.pb_mod = 1; w.pb_addr = 10'd4;
               w.si_set = 1; w.img = IMG_SHIFT; w.w = W_SHIFT; w.ex = EX_MAC; w.sat = !first; end
      5: begin w.pa = PA_WRITE; w.pa_mod = 1; w.pa_addr = 10'd9; w.pb_en = 1; w.pb_mod = 1; w.pb_addr = 10'd5;
               w.img = IMG_SHIFT; w.w = W_SET; w.ex = EX_MAC; w.wb = first ? WB_NOP : WB_LO; end
      6: begin w.pa = PA_READ; w.pa_addr = 10'd2; w.img = IMG_SET; w.w = W_SHIFT; w.ex = EX_MAC;
               w.wb = first ? WB_NOP : WB_HI; end
      7: begin w.pa = PA_READ; w.pa_mod = 1; w.pa_addr = 10'd6; w.pb_en = 1; w.pb_mod = 1; w.pb_addr = 10'd7;
               w.si_set = 1; w.img = IMG_SHIFT; w.w = W_SHIFT; w.ex = EX_MAC; end
      8: begin w.pa = PA_WRITE; w.pa_mod = 1; w.pa_addr = 10'd10; w.pb_en = 1; w.pb_mod = 1; w.pb_addr = 10'd8;
               w.img = IMG_SHIFT; w.w = W_SET; w.ex = EX_MAC; end
      9: begin w.img = IMG_SET; w.w = W_SHIFT; w.ex = EX_MAC; end
      0: begin w.pa = PA_READ; w.pa_addr = 10'd0; w.si_set = 1; w.img = IMG_SHIFT; w.w = W_SHIFT; w.ex = EX_MAC; end
      1: begin w.pa = PA_READ; w.pa_mod = 1; w.pa_addr = 10'd3; w.pb_en = 1; w.pb_mod = 1; w.pb_addr = 10'd4;
               w.img = IMG_SHIFT; w.w = W_SHIFT; w.ex = EX_MAC; end
      2: begin w.pa = PA_WRITE; w.pa_mod = 1; w.pa_addr = 10'd11; w.pb_en = 1; w.pb_mod = 1; w.pb_addr = 10'd5;
               w.w = W_SET; w.ex = EX_MAC; if (first) w.ctl = CTL_ADV; end
      default: ;
    endcase
    return w;
  endfunction

  int pc;
  int loop_start, loop_end;
  task automatic emit(input instr_t w);
    @(negedge clk); prog_we = 1; prog_addr = 9'(pc); prog_data = w;
    pc++;
  endtask

  task automatic cfg(input cfg_e a, input int v);
    @(negedge clk); cfg_we = 1; cfg_addr = 3'(a); cfg_wdata = 16'(v);
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic load_program();
    instr_t w;
    pc = 0;
    // weights and bias, absolute addresses 0..2
    for (int i = 0; i < 3; i++) begin w = '0; w.pa = PA_WRITE; w.pa_addr = 10'(i); emit(w); end
    // image rows 0..2 into the circular region
    for (int i = 0; i < 9; i++) begin w = '0; w.pa = PA_WRITE; w.pa_mod = 1; w.pa_addr = 10'(i); emit(w); end
    // reads for the first pass: weights word 0, row 0
    w = '0; w.pa = PA_READ; w.pa_addr = 10'd0; emit(w);
    w = '0; w.pa = PA_READ; w.pa_mod = 1; w.pa_addr = 10'd0; w.pb_en = 1; w.pb_mod = 1; w.pb_addr = 10'd1; emit(w);
    w = '0; w.pb_en = 1; w.pb_mod = 1; w.pb_addr = 10'd2; w.w = W_SET; emit(w);
    // first pass, no output
    for (int k = 3; k <= 9; k++) emit(body(k, 1));
    for (int k = 0; k <= 2; k++) emit(body(k, 1));
    // steady state
    loop_start = pc;
    for (int k = 3; k <= 9; k++) emit(body(k, 0));
    for (int k = 0; k <= 2; k++) emit(body(k, 0));
    loop_end = pc - 1;
    // epilog: drain the last row, feed one result word back
    w = '0; emit(w);
    w = '0; w.sat = 1; emit(w);
    w = '0; w.wb = WB_LO; emit(w);
    w = '0; w.wb = WB_HI; w.pa = PA_WRITE; w.pa_src = 1; w.pa_addr = 10'(FB_ADDR); emit(w);
    w = '0; emit(w);
    w = '0; w.ctl = CTL_HALT; emit(w);
    @(negedge clk); prog_we = 0;
    cfg(CFG_LOOP_START, loop_start); cfg(CFG_LOOP_END, loop_end); cfg(CFG_LOOP_COUNT, NROWS - 1);
    cfg(CFG_IMG_BASE, IMG_BASE); cfg(CFG_IMG_LEN, IMG_LEN); cfg(CFG_IMG_STRIDE, 3);
  endtask

  // ---------------- reference ----------------
  logic [7:0] img [NROWS + 3][18];
  logic signed [15:0] wt [9];
  logic signed [15:0] bias;
  logic [7:0] exp_out [NROWS][16];
  bit run_ovf;

  function automatic longint tprod(input logic signed [15:0] wv, input logic [7:0] xv);
    longint p;
    p = longint'(wv) * longint'({1'b0, xv});
    return (p >= 0) ? p / 256 : -((-p + 255) / 256);
  endfunction

  task automatic make_data(input int scale);
    bias = 16'($signed(($urandom % 512)) - 256);
    for (int i = 0; i < 9; i++)
      wt[i] = (scale > 10000) ? 16'($urandom % scale) : 16'($signed(int'($urandom % (2 * scale)) - scale));
    for (int r = 0; r < NROWS + 3; r++)
      for (int c = 0; c < 18; c++) img[r][c] = 8'($urandom);
    run_ovf = 0;
    for (int m = 0; m < NROWS; m++)
      for (int j = 0; j < 16; j++) begin
        longint acc, q;
        acc = longint'(bias);
        for (int kr = 0; kr < 3; kr++)
          for (int kc = 0; kc < 3; kc++) begin
            acc += tprod(wt[3*kr + kc], img[m + kr][j + kc]);
            if (acc > 65535) begin acc = 65535; run_ovf = 1; end
            if (acc < -65536) begin acc = -65536; run_ovf = 1; end
          end
        q = (acc >= 0) ? acc / 4 : -((-acc + 3) / 4);
        if (q > 511 || q < -512) n_clamp++;
        q = (q > 511) ? 511 : (q < -512) ? -512 : q;
        exp_out[m][j] = tbl[10'(q)];
      end
    // input stream: weights, then rows (3 words each), one dummy row at the end
    in_q.delete();
    in_q.push_back({16'h0, wt[1], wt[0], bias});
    in_q.push_back({16'h0, wt[4], wt[3], wt[2]});
    in_q.push_back({wt[8], wt[7], wt[6], wt[5]});
    for (int r = 0; r < NROWS + 3; r++) begin
      logic [63:0] w0, w1, w2;
      for (int c = 0; c < 8; c++) begin w0[8*c +: 8] = img[r][c]; w1[8*c +: 8] = img[r][8 + c]; end
      w2 = {48'h0, img[r][17], img[r][16]};
      in_q.push_back(w0); in_q.push_back(w1); in_q.push_back(w2);
    end
  endtask

  // ---------------- bus drivers and monitors ----------------
  always @(negedge clk) begin
    in_valid  <= (in_q.size() != 0) && !(stall_in_en && ($urandom % 3 == 0));
    in_data   <= (in_q.size() != 0) ? in_q[0] : 64'h0;
    out_ready <= !(stall_out_en && ($urandom % 3 == 0));
  end
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) void'(in_q.pop_front());
    if (out_valid && out_ready) begin out_q.push_back(out_data); out_t.push_back(cyc); end
    if (busy && dut.u_ctrl.ins.pa == PA_WRITE && !dut.u_ctrl.ins.pa_src && !in_valid) n_in_stall++;
    if (out_valid && !out_ready) n_out_stall++;
    if (dut.u_ctrl.en && dut.u_ctrl.ib_re && dut.u_ctrl.pc == 9'(loop_end)
        && dut.u_ctrl.iter_left != 0) n_branch++;
    if (dut.u_ctrl.en && dut.u_ctrl.advance
        && int'(dut.u_ctrl.iter_off) + 3 >= IMG_LEN) n_wrap++;
    if (dut.u_ctrl.en && dut.u_ctrl.ins.si_set && dut.u_ctrl.ins.img == IMG_SHIFT) n_bypass++;
    if (dut.en && dut.u_ctrl.ins.pa == PA_WRITE && dut.u_ctrl.ins.pa_src) n_feedback++;
  end

  task automatic run(input int scale, input bit stalls, input bit check_rate);
    int t0;
    make_data(scale);
    out_q.delete(); out_t.delete();
    stall_in_en = stalls; stall_out_en = stalls;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    t0 = cyc;
    wait (done);
    @(negedge clk);
    chk(!busy, "idle after done");
    chk(out_q.size() == 2 * NROWS, $sformatf("beats %0d exp %0d", out_q.size(), 2 * NROWS));
    for (int m = 0; m < NROWS && 2 * m + 1 < out_q.size(); m++)
      for (int j = 0; j < 16; j++) begin
        logic [7:0] got;
        got = out_q[2 * m + j / 8][8 * (j % 8) +: 8];
        chk(got == exp_out[m][j], $sformatf("row %0d lane %0d got %0d exp %0d", m, j, got, exp_out[m][j]));
      end
    // feedback word = last row, lanes 0-7
    if (out_q.size() >= 2)
      chk(dut.u_sp.mem[FB_ADDR] == out_q[2 * NROWS - 2], "feedback word in scratchpad");
    chk(ovf == run_ovf, $sformatf("overflow flag %b exp %b", ovf, run_ovf));
    if (ovf) n_ovf_runs++;
    chk(in_q.size() == 0, "all input words consumed");
    if (check_rate) begin
      // steady state: one 16-lane row per 10 cycles
      for (int m = 1; m < NROWS - 1; m++)
        chk(out_t[2 * m + 2] - out_t[2 * m] == 10,
            $sformatf("row spacing %0d cycles", out_t[2 * m + 2] - out_t[2 * m]));
      // whole run: fetch + 12 load + 3 + 10*NROWS + 6 epilog
      $display("run cycles %0d", cyc - t0);
      chk(cyc - t0 <= 1 + 12 + 3 + 10 * NROWS + 6 + 2, $sformatf("run length %0d", cyc - t0));
    end
  endtask

  initial begin
    start = 0; cfg_we = 0; cfg_addr = 0; cfg_wdata = 0; prog_we = 0; prog_addr = 0; prog_data = 0;
    lut_we = 0; lut_addr = 0; lut_data = 0;
    for (int i = 0; i < 1024; i++) begin
      real p, y;
      int v;
      p = real'($signed(10'(i))) / 64.0;
      y = 256.0 / (1.0 + $exp(-p));
      v = int'($floor(y));
      tbl[i] = (v > 255) ? 8'd255 : 8'(v);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); lut_we = 1; lut_addr = 10'(i); lut_data = tbl[i];
    end
    @(negedge clk); lut_we = 0;
    load_program();
    run(600, 0, 1);       // weights within +-2.3
    run(30000, 1, 0);     // positive weights up to 117: overflow, bus stalls
    chk(n_in_stall > 0, "input stall seen");
    chk(n_out_stall > 0, "output stall seen");
    chk(n_branch == 2 * (NROWS - 2), $sformatf("loop branches %0d", n_branch));
    chk(n_wrap > 0, "modulo wrap seen");
    chk(n_bypass > 0, "shift-in bypass seen");
    chk(n_clamp > 0, "potential clamp seen");
    chk(n_ovf_runs > 0, "accumulator overflow seen");
    chk(n_feedback == 2, "feedback writes");
    $display("mechanisms: in_stall=%0d out_stall=%0d branch=%0d wrap=%0d bypass=%0d clamp=%0d ovf_runs=%0d feedback=%0d",
             n_in_stall, n_out_stall, n_branch, n_wrap, n_bypass, n_clamp, n_ovf_runs, n_feedback);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
