// tb_nve_layers: runs one 16-output strip of every layer of the two
// published benchmark networks (face detection and speed-sign recognition,
// four layers each) on the cluster at its default sizes.
//
// For each layer the testbench
//   1. loads a one-word loader program whose hardware loop writes the
//      weights (absolute addresses 0..) and the image rows (from word 128)
//      into the scratchpad from the input bus, using modulo addressing with
//      stride 1 as a post-incrementing pointer;
//   2. generates a compute program with a small list scheduler: one loop
//      pass computes one output row of 16 neighbouring outputs (bias, then
//      N_i x N_k x N_l MACs), placing every weight-word load, image-row load
//      and shift-in load at the latest cycle whose scratchpad port is free
//      (reads two cycles ahead of the register load), followed by Saturate
//      and two lookups. Passes move down the image by modulo addressing;
//   3. checks every output byte against a direct evaluation of the layer
//      (truncated products, potential clamp, sigmoid table) and that passes
//      come out exactly one body length apart.
// Stride-2 layers are run in polyphase form: even and odd input columns are
// stored as separate maps, so the kernel becomes two kernels of half the
// width and each pass advances two rows. Feature maps are cut to a few rows;
// the 5x5 speed-sign layer runs with 16 input maps (as the figure of the
// network shows) in this form, and with the 40 maps of the layer table in a
// second form where the hardware loop runs over input maps: each map's
// image rows and weights form one block, so a single modulo offset steps
// through both, the bias is set before the loop and the lookup follows it.
module tb_nve_layers;
  import nve_pkg::*;
  localparam int IMG_BASE = 128;
  localparam int NPASS = 3;

  logic clk = 0, rst_n = 0, start, busy, done, ovf;
  logic cfg_we; logic [2:0] cfg_addr; logic [15:0] cfg_wdata;
  logic prog_we; logic [8:0] prog_addr; logic [53:0] prog_data;
  logic lut_we; logic [9:0] lut_addr; logic [7:0] lut_data;
  logic [63:0] in_data, out_data;
  logic in_valid, in_ready, out_valid, out_ready;

  nve_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [7:0] tbl [1024];
  logic [63:0] in_q [$];
  logic [63:0] out_q [$];
  int out_t [$];
  int cyc = 0;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // bus models: no stalls here (tb_nve_top covers them)
  always @(negedge clk) begin
    in_valid <= in_q.size() != 0;
    in_data  <= (in_q.size() != 0) ? in_q[0] : 64'h0;
  end
  assign out_ready = 1'b1;
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) void'(in_q.pop_front());
    if (out_valid && out_ready) begin out_q.push_back(out_data); out_t.push_back(cyc); end
  end

  task automatic cfg(input cfg_e a, input int v);
    @(negedge clk); cfg_we = 1; cfg_addr = 3'(a); cfg_wdata = 16'(v);
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic put(input int a, input instr_t w);
    @(negedge clk); prog_we = 1; prog_addr = 9'(a); prog_data = w;
    @(negedge clk); prog_we = 0;
  endtask

  task automatic go();
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
  endtask

  function automatic longint tprod(input int wv, input int xv);
    longint p;
    p = longint'(wv) * longint'(xv);
    return (p >= 0) ? p / 256 : -((-p + 255) / 256);
  endfunction

  // ---------------- one layer ----------------
  // original layer data
  int x [][][];   // [map][row][col]
  int wt [][][];  // [map][kr][kc]
  int bias;

  task automatic run_layer(input string name, input int ni, input int nk, input int nl, input int s);
    int nip, nlp, t_taps, nrows, ncols, rowwords, nwwords, body_len, t, last_op;
    int stream [$];
    int mapof [$], krof [$], kcof [$];
    bit a_busy [512], b_busy [512];
    instr_t body [512];
    int exp_o [NPASS][16];
    int mac_cycles;

    nip = ni * s; nlp = nl / s;
    if (s == 1) nlp = nl;
    nrows = s * (NPASS - 1) + nk;
    ncols = s * 15 + nl;
    rowwords = 3 * nip;
    // ---- data
    x = new[ni]; wt = new[ni];
    foreach (x[i]) begin
      x[i] = new[nrows];
      foreach (x[i][r]) begin
        x[i][r] = new[ncols];
        foreach (x[i][r][c]) x[i][r][c] = int'($urandom % 256);
      end
      wt[i] = new[nk];
      foreach (wt[i][r]) begin
        int lim;
        lim = 60000 / (ni * nk * nl);
        if (lim > 2000) lim = 2000;
        wt[i][r] = new[nl];
        foreach (wt[i][r][c]) wt[i][r][c] = int'($urandom % (2 * lim + 1)) - lim;
      end
    end
    bias = int'($urandom % 512) - 256;
    // ---- reference
    for (int m = 0; m < NPASS; m++)
      for (int n = 0; n < 16; n++) begin
        longint acc, q;
        acc = bias;
        for (int i = 0; i < ni; i++)
          for (int kr = 0; kr < nk; kr++)
            for (int kc = 0; kc < nl; kc++)
              acc += tprod(wt[i][kr][kc], x[i][s * m + kr][s * n + kc]);
        chk(acc <= 65535 && acc >= -65536, "reference stays in accumulator range");
        q = (acc >= 0) ? acc / 4 : -((-acc + 3) / 4);
        q = (q > 511) ? 511 : (q < -512) ? -512 : q;
        exp_o[m][n] = int'(tbl[10'(q)]);
      end
    // ---- tap order (polyphase map i' = i*s + phase), weight stream
    stream.push_back(bias);
    for (int kr = 0; kr < nk; kr++)
      for (int ip = 0; ip < nip; ip++)
        for (int kc = 0; kc < nlp; kc++) begin
          int i, ph;
          i = ip / s; ph = ip % s;
          mapof.push_back(ip); krof.push_back(kr); kcof.push_back(kc);
          stream.push_back(wt[i][kr][s * kc + ph]);
        end
    t_taps = mapof.size();
    nwwords = (stream.size() + 3) / 4;
    // ---- input stream for the loader: weights, padding, image
    in_q.delete();
    for (int k = 0; k < IMG_BASE; k++) begin
      logic [63:0] wd = '0;
      for (int e = 0; e < 4; e++)
        if (4 * k + e < stream.size()) wd[16 * e +: 16] = 16'(stream[4 * k + e]);
      in_q.push_back(wd);
    end
    for (int r = 0; r < nrows; r++)
      for (int ip = 0; ip < nip; ip++)
        for (int wdi = 0; wdi < 3; wdi++) begin
          logic [63:0] wd = '0;
          for (int b = 0; b < 8; b++) begin
            int c, src;
            c = 8 * wdi + b;                 // polyphase column
            src = s * c + (ip % s);          // original column
            if (src < ncols) wd[8 * b +: 8] = 8'(x[ip / s][r][src]);
          end
          in_q.push_back(wd);
        end
    chk(IMG_BASE + nrows * rowwords <= 1024, "data fits the scratchpad");
    chk(nwwords <= IMG_BASE, "weights fit below the image");
    // ---- loader program
    begin
      instr_t w;
      int nload;
      nload = in_q.size();
      w = '0; w.pa = PA_WRITE; w.pa_mod = 1; put(0, w);
      w = '0; w.ctl = CTL_HALT; put(1, w);
      cfg(CFG_LOOP_START, 0); cfg(CFG_LOOP_END, 0); cfg(CFG_LOOP_COUNT, nload);
      cfg(CFG_IMG_BASE, 0); cfg(CFG_IMG_LEN, 1023); cfg(CFG_IMG_STRIDE, 1);
      go();
      chk(in_q.size() == 0, $sformatf("%s: loader consumed the input", name));
    end
    // ---- schedule the compute body
    for (int c = 0; c < 512; c++) begin a_busy[c] = 0; b_busy[c] = 0; body[c] = '0; end
    t = 2; last_op = -1;
    for (int q = 0; q <= t_taps; q++) begin
      bit need_w, new_grp, need_si, ok;
      int lo, uw, ui, vs;
      need_w  = (q % 4) == 0;
      new_grp = (q >= 1) && (kcof[q - 1] == 0);
      need_si = new_grp && nlp > 1;
      lo = (last_op < 2) ? 2 : last_op;
      if (t < last_op + 1) t = last_op + 1;
      if (t < 3) t = 3;
      forever begin
        ok = 1; uw = -1; ui = -1; vs = -1;
        if (need_w) begin
          for (int u = t - 1; u >= lo; u--) if (!a_busy[u - 2]) begin uw = u; break; end
          if (uw < 0) ok = 0;
        end
        if (ok && new_grp) begin
          for (int u = t - 1; u >= lo; u--)
            if (!a_busy[u - 2] && !b_busy[u - 2] && !(need_w && u == uw)) begin ui = u; break; end
          if (ui < 0) ok = 0;
        end
        if (ok && need_si) begin
          for (int v = t; v >= lo; v--)
            if (!b_busy[v - 2] && !(v == ui)) begin vs = v; break; end
          if (vs < 0) ok = 0;
        end
        if (ok) break;
        t++;
      end
      if (need_w) begin
        a_busy[uw - 2] = 1;
        body[uw].w = W_SET;
        body[uw - 2].pa = PA_READ; body[uw - 2].pa_addr = 10'(q / 4);
      end
      if (new_grp) begin
        int f;
        f = (krof[q - 1] * nip + mapof[q - 1]) * 3;
        a_busy[ui - 2] = 1; b_busy[ui - 2] = 1;
        body[ui].img = IMG_SET;
        body[ui - 2].pa = PA_READ; body[ui - 2].pa_mod = 1; body[ui - 2].pa_addr = 10'(f);
        body[ui - 2].pb_en = 1; body[ui - 2].pb_mod = 1; body[ui - 2].pb_addr = 10'(f + 1);
        if (need_si) begin
          b_busy[vs - 2] = 1;
          body[vs].si_set = 1;
          body[vs - 2].pb_en = 1; body[vs - 2].pb_mod = 1; body[vs - 2].pb_addr = 10'(f + 2);
        end
      end
      body[t].ex = (q == 0) ? EX_BIAS : EX_MAC;
      if ((q + 1) % 4 != 0) body[t].w = W_SHIFT;
      if (q >= 1 && kcof[q - 1] != nlp - 1) body[t].img = IMG_SHIFT;
      last_op = t;
    end
    body[last_op + 2].sat = 1;
    body[last_op + 3].wb = WB_LO;
    body[last_op + 4].wb = WB_HI;
    body_len = last_op + 5;
    mac_cycles = t_taps;
    chk(body_len + 3 <= 512, $sformatf("%s: program of %0d words fits", name, body_len + 3));
    for (int c = 0; c < body_len; c++) put(c, body[c]);
    put(body_len, instr_t'('0));
    put(body_len + 1, instr_t'('0));
    begin instr_t w; w = '0; w.ctl = CTL_HALT; put(body_len + 2, w); end
    cfg(CFG_LOOP_START, 0); cfg(CFG_LOOP_END, body_len - 1); cfg(CFG_LOOP_COUNT, NPASS);
    cfg(CFG_IMG_BASE, IMG_BASE); cfg(CFG_IMG_LEN, 1024 - IMG_BASE); cfg(CFG_IMG_STRIDE, s * rowwords);
    out_q.delete(); out_t.delete();
    go();
    // ---- check
    chk(out_q.size() == 2 * NPASS, $sformatf("%s: %0d beats", name, out_q.size()));
    for (int m = 0; m < NPASS && 2 * m + 1 < out_q.size(); m++)
      for (int n = 0; n < 16; n++) begin
        int got;
        got = int'(out_q[2 * m + n / 8][8 * (n % 8) +: 8]);
        chk(got == exp_o[m][n], $sformatf("%s: row %0d col %0d got %0d exp %0d", name, m, n, got, exp_o[m][n]));
      end
    for (int m = 1; m < NPASS && 2 * m < out_t.size(); m++)
      chk(out_t[2 * m] - out_t[2 * m - 2] == body_len,
          $sformatf("%s: pass spacing %0d exp %0d", name, out_t[2 * m] - out_t[2 * m - 2], body_len));
    chk(!ovf, $sformatf("%s: no overflow", name));
    $display("%s: Ni=%0d Nk=%0d Nl=%0d S=%0d taps=%0d body=%0d cycles/16 outputs, MAC stage busy %0d%%",
             name, ni, nk, nl, s, t_taps, body_len, (100 * (mac_cycles + 1)) / body_len);
  endtask


  // One output row of a layer whose taps exceed one loop body: the bias is
  // set in the prolog, the hardware loop runs once per input map (each map's
  // rows and weights stored as one block, so one modulo offset addresses
  // both), and the epilog saturates and looks up the 16 results.
  task automatic run_layer_maploop(input string name, input int ni, input int nk, input int nl);
    int t_taps, ncols, imgwords, wwords, blk, body_len, t, last_op, pro;
    bit a_busy [512], b_busy [512];
    instr_t body [512];
    int exp_o [16];
    ncols = 15 + nl;
    t_taps = nk * nl;
    imgwords = 3 * nk;
    wwords = (t_taps + 3) / 4;
    blk = imgwords + wwords;
    x = new[ni]; wt = new[ni];
    foreach (x[i]) begin
      x[i] = new[nk];
      foreach (x[i][r]) begin
        x[i][r] = new[ncols];
        foreach (x[i][r][c]) x[i][r][c] = int'($urandom % 256);
      end
      wt[i] = new[nk];
      foreach (wt[i][r]) begin
        int lim;
        lim = 60000 / (ni * nk * nl);
        wt[i][r] = new[nl];
        foreach (wt[i][r][c]) wt[i][r][c] = int'($urandom % (2 * lim + 1)) - lim;
      end
    end
    bias = int'($urandom % 512) - 256;
    for (int n = 0; n < 16; n++) begin
      longint acc, q;
      acc = bias;
      for (int i = 0; i < ni; i++)
        for (int kr = 0; kr < nk; kr++)
          for (int kc = 0; kc < nl; kc++)
            acc += tprod(wt[i][kr][kc], x[i][kr][n + kc]);
      chk(acc <= 65535 && acc >= -65536, "reference stays in accumulator range");
      q = (acc >= 0) ? acc / 4 : -((-acc + 3) / 4);
      q = (q > 511) ? 511 : (q < -512) ? -512 : q;
      exp_o[n] = int'(tbl[10'(q)]);
    end
    // loader stream: bias word, padding, then per map [rows][weights]
    in_q.delete();
    in_q.push_back({48'h0, 16'(bias)});
    for (int k = 1; k < IMG_BASE; k++) in_q.push_back(64'h0);
    for (int i = 0; i < ni; i++) begin
      for (int r = 0; r < nk; r++)
        for (int wdi = 0; wdi < 3; wdi++) begin
          logic [63:0] wd = '0;
          for (int b = 0; b < 8; b++)
            if (8 * wdi + b < ncols) wd[8 * b +: 8] = 8'(x[i][r][8 * wdi + b]);
          in_q.push_back(wd);
        end
      for (int k = 0; k < wwords; k++) begin
        logic [63:0] wd = '0;
        for (int e = 0; e < 4; e++)
          if (4 * k + e < t_taps) wd[16 * e +: 16] = 16'(wt[i][(4 * k + e) / nl][(4 * k + e) % nl]);
        in_q.push_back(wd);
      end
    end
    chk(IMG_BASE + ni * blk <= 1024, $sformatf("%s: %0d data words fit the scratchpad", name, IMG_BASE + ni * blk));
    begin
      instr_t w;
      int nload;
      nload = in_q.size();
      w = '0; w.pa = PA_WRITE; w.pa_mod = 1; put(0, w);
      w = '0; w.ctl = CTL_HALT; put(1, w);
      cfg(CFG_LOOP_START, 0); cfg(CFG_LOOP_END, 0); cfg(CFG_LOOP_COUNT, nload);
      cfg(CFG_IMG_BASE, 0); cfg(CFG_IMG_LEN, 1023); cfg(CFG_IMG_STRIDE, 1);
      go();
      chk(in_q.size() == 0, $sformatf("%s: loader consumed the input", name));
    end
    // prolog: read bias word, load W, set accumulators
    pro = 4;
    for (int c = 0; c < 512; c++) begin a_busy[c] = 0; b_busy[c] = 0; body[c] = '0; end
    body[0].pa = PA_READ; body[0].pa_addr = 10'd0;
    body[2].w = W_SET;
    body[3].ex = EX_BIAS;
    // loop body: one input map
    t = 3; last_op = -1;
    for (int q = 0; q < t_taps; q++) begin
      bit need_w, new_grp, need_si, ok;
      int lo, uw, ui, vs, kc;
      kc = q % nl;
      need_w  = (q % 4) == 0;
      new_grp = kc == 0;
      need_si = new_grp && nl > 1;
      lo = (last_op < 2) ? 2 : last_op;
      if (t < last_op + 1) t = last_op + 1;
      forever begin
        ok = 1; uw = -1; ui = -1; vs = -1;
        if (need_w) begin
          for (int u = t - 1; u >= lo; u--) if (!a_busy[u - 2]) begin uw = u; break; end
          if (uw < 0) ok = 0;
        end
        if (ok && new_grp) begin
          for (int u = t - 1; u >= lo; u--)
            if (!a_busy[u - 2] && !b_busy[u - 2] && !(need_w && u == uw)) begin ui = u; break; end
          if (ui < 0) ok = 0;
        end
        if (ok && need_si) begin
          for (int v = t; v >= lo; v--)
            if (!b_busy[v - 2] && !(v == ui)) begin vs = v; break; end
          if (vs < 0) ok = 0;
        end
        if (ok) break;
        t++;
      end
      if (need_w) begin
        a_busy[uw - 2] = 1;
        body[pro + uw].w = W_SET;
        body[pro + uw - 2].pa = PA_READ; body[pro + uw - 2].pa_mod = 1;
        body[pro + uw - 2].pa_addr = 10'(imgwords + q / 4);
      end
      if (new_grp) begin
        int f;
        f = (q / nl) * 3;
        a_busy[ui - 2] = 1; b_busy[ui - 2] = 1;
        body[pro + ui].img = IMG_SET;
        body[pro + ui - 2].pa = PA_READ; body[pro + ui - 2].pa_mod = 1; body[pro + ui - 2].pa_addr = 10'(f);
        body[pro + ui - 2].pb_en = 1; body[pro + ui - 2].pb_mod = 1; body[pro + ui - 2].pb_addr = 10'(f + 1);
        if (need_si) begin
          b_busy[vs - 2] = 1;
          body[pro + vs].si_set = 1;
          body[pro + vs - 2].pb_en = 1; body[pro + vs - 2].pb_mod = 1; body[pro + vs - 2].pb_addr = 10'(f + 2);
        end
      end
      body[pro + t].ex = EX_MAC;
      if ((q + 1) % 4 != 0) body[pro + t].w = W_SHIFT;
      if (kc != nl - 1) body[pro + t].img = IMG_SHIFT;
      last_op = t;
    end
    body_len = last_op + 1;
    // epilog
    body[pro + body_len + 1].sat = 1;
    body[pro + body_len + 2].wb = WB_LO;
    body[pro + body_len + 3].wb = WB_HI;
    body[pro + body_len + 5].ctl = CTL_HALT;
    chk(pro + body_len + 6 <= 512, $sformatf("%s: program fits", name));
    for (int c = 0; c < pro + body_len + 6; c++) put(c, body[c]);
    cfg(CFG_LOOP_START, pro); cfg(CFG_LOOP_END, pro + body_len - 1); cfg(CFG_LOOP_COUNT, ni);
    cfg(CFG_IMG_BASE, IMG_BASE); cfg(CFG_IMG_LEN, 1024 - IMG_BASE); cfg(CFG_IMG_STRIDE, blk);
    out_q.delete(); out_t.delete();
    begin
      int c0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      c0 = cyc;
      wait (done);
      @(negedge clk);
      // fetch + prolog + ni passes + epilog up to the halt
      chk(cyc - c0 == 1 + pro + ni * body_len + 6,
          $sformatf("%s: %0d cycles exp %0d", name, cyc - c0, 1 + pro + ni * body_len + 6));
    end
    chk(out_q.size() == 2, $sformatf("%s: %0d beats", name, out_q.size()));
    if (out_q.size() == 2)
      for (int n = 0; n < 16; n++) begin
        int got;
        got = int'(out_q[n / 8][8 * (n % 8) +: 8]);
        chk(got == exp_o[n], $sformatf("%s: col %0d got %0d exp %0d", name, n, got, exp_o[n]));
      end
    chk(!ovf, $sformatf("%s: no overflow", name));
    $display("%s: Ni=%0d Nk=%0d Nl=%0d, loop over input maps, body=%0d cycles per map, %0d MACs, MAC stage busy %0d%%",
             name, ni, nk, nl, body_len, ni * t_taps, (100 * t_taps) / body_len);
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
    run_layer("face L1", 1, 6, 6, 2);
    run_layer("face L2", 2, 4, 4, 2);
    run_layer("face L3", 1, 6, 6, 1);
    run_layer("face L4", 14, 1, 1, 1);
    run_layer("speed L1", 1, 6, 6, 2);
    run_layer("speed L2", 3, 6, 6, 2);
    run_layer("speed L3", 16, 5, 5, 1);
    run_layer("speed L4", 80, 1, 1, 1);
    run_layer_maploop("speed L3, 40 maps", 40, 5, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
