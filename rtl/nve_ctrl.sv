// nve_ctrl: VLIW controller of the cluster.
//
// The program is one 54-bit word per cycle. Each word carries one issue slot
// per pipeline stage (scratchpad write/read, Reg Op, Vector MACC, Saturate,
// WB Sgm) and every slot acts on its own stage in the cycle the word
// executes; the program itself accounts for the latency between stages, as
// in the published software-pipelined 3x3 convolution. This follows the
// published control scheme; the encoding (nve_pkg::instr_t) is this design's.
//
// Fetch: after start the PC runs from 0. The instruction buffer read is
// registered, so the word fetched in cycle t executes in cycle t+1. A
// zero-overhead hardware loop repeats the words loop_start..loop_end
// loop_count times (a count of 0 acts as 1): the branch is taken at fetch
// time, so it costs no cycle. The last word of every pass and every word with
// ctl = CTL_ADV advance the modulo offset by img_stride, wrapping at img_len;
// two nve_agu instances turn the address fields into scratchpad addresses.
// CTL_HALT stops the program (the word after it is discarded) and pulses done.
//
// Stall (this design's choice): the whole pipeline holds (en = 0) while the
// executing word writes from the input bus and in_valid is low, or while the
// output bus holds a result that out_ready has not taken. in_ready is high
// in the cycle the input word is written. Configuration registers are written
// through cfg_we/cfg_addr/cfg_wdata.
module nve_ctrl
  import nve_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  output logic             done,
  // configuration
  input  logic             cfg_we,
  input  cfg_e             cfg_addr,
  input  logic [15:0]      cfg_wdata,
  // instruction buffer
  output logic             ib_re,
  output logic [PCW-1:0]   ib_raddr,
  input  logic [IW-1:0]    ib_rdata,
  // bus handshakes
  input  logic             in_valid,
  output logic             in_ready,
  input  logic             out_valid,
  input  logic             out_ready,
  // decoded slots
  output logic             en,
  output instr_t           ins,
  output logic [SP_AW-1:0] pa_phys,
  output logic [SP_AW-1:0] pb_phys
);
  logic [PCW-1:0]   loop_start, loop_end;
  logic [15:0]      loop_count;
  logic [SP_AW-1:0] img_base, img_len, img_stride;

  logic             running;
  logic [PCW-1:0]   pc;
  logic [15:0]      iter_left;
  logic             ivalid;      // ib_rdata holds a word to execute
  logic             lend_q;      // that word is the last of a loop pass
  logic [SP_AW-1:0] iter_off;
  logic             stall, need_in, out_block;
  logic             halt, advance;
  logic [SP_AW:0]   off_sum;

  // Configuration registers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      loop_start <= '0; loop_end <= '0; loop_count <= 16'd1;
      img_base <= '0; img_len <= SP_AW'(SP_DEPTH - 1); img_stride <= '0;
    end else if (cfg_we) begin
      unique case (cfg_addr)
        CFG_LOOP_START: loop_start <= cfg_wdata[PCW-1:0];
        CFG_LOOP_END:   loop_end   <= cfg_wdata[PCW-1:0];
        CFG_LOOP_COUNT: loop_count <= cfg_wdata;
        CFG_IMG_BASE:   img_base   <= cfg_wdata[SP_AW-1:0];
        CFG_IMG_LEN:    img_len    <= cfg_wdata[SP_AW-1:0];
        CFG_IMG_STRIDE: img_stride <= cfg_wdata[SP_AW-1:0];
        default: ;
      endcase
    end
  end

  // Executing word: a NOP unless a fetched word is pending.
  assign ins = ivalid ? instr_t'(ib_rdata) : '0;

  assign need_in   = ins.pa == PA_WRITE && !ins.pa_src;
  assign out_block = out_valid && !out_ready;
  assign stall     = (need_in && !in_valid) || out_block;
  assign en        = !stall;
  assign in_ready  = need_in && !out_block;
  assign halt      = ins.ctl == CTL_HALT;
  assign advance   = ivalid && (lend_q || ins.ctl == CTL_ADV);

  // Fetch.
  assign ib_re    = running && en && !halt;
  assign ib_raddr = pc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0; pc <= '0; iter_left <= '0;
      ivalid <= 1'b0; lend_q <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!running) begin
        ivalid <= 1'b0;
        if (start) begin
          running   <= 1'b1;
          pc        <= '0;
          iter_left <= (loop_count == 16'd0) ? 16'd0 : loop_count - 16'd1;
        end
      end else if (en) begin
        if (halt) begin
          running <= 1'b0;
          ivalid  <= 1'b0;
          done    <= 1'b1;
        end else begin
          ivalid <= 1'b1;
          lend_q <= (pc == loop_end);
          if (pc == loop_end && iter_left != 16'd0) begin
            pc        <= loop_start;
            iter_left <= iter_left - 16'd1;
          end else begin
            pc <= pc + PCW'(1);
          end
        end
      end
    end
  end

  assign busy = running;

  // Modulo iteration offset.
  assign off_sum = {1'b0, iter_off} + {1'b0, img_stride};
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 iter_off <= '0;
    else if (!running && start) iter_off <= '0;
    else if (en && advance)
      iter_off <= (off_sum >= {1'b0, img_len}) ? SP_AW'(off_sum - {1'b0, img_len})
                                               : off_sum[SP_AW-1:0];
  end

  nve_agu #(.AW(SP_AW)) u_agu_a (
    .mode(ins.pa_mod), .field(ins.pa_addr), .iter_off, .base(img_base),
    .len(img_len), .addr(pa_phys)
  );
  nve_agu #(.AW(SP_AW)) u_agu_b (
    .mode(ins.pb_mod), .field(ins.pb_addr), .iter_off, .base(img_base),
    .len(img_len), .addr(pb_phys)
  );

  // Handshake rules: an input word is only taken when it is offered, and a
  // stalled pipeline never consumes one.
  a_in_taken_valid: assert property (@(posedge clk) disable iff (!rst_n)
    (in_ready && en) |-> in_valid);
  a_no_take_on_stall: assert property (@(posedge clk) disable iff (!rst_n)
    stall |-> !(in_ready && in_valid && !en));
endmodule
