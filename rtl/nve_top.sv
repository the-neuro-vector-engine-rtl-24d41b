// nve_top: one Neuro Vector Engine compute cluster.
//
// A 16-lane SIMD convolution engine: neighbouring output neurons of a tile
// strip sit in the 16 lanes, are set to the bias and then accumulate y <- y +
// x * w once per kernel tap, with the weight broadcast and the inputs walked
// across the lanes by a shifting vector register. Data path, left to right:
//   scratchpad (1024 x 64 bit; port A read/write, port B read)
//   -> read register -> Reg Op: weight register W0-3, image register 0-15
//      with shift-in register 16-22
//   -> Vector MACC, 16 two-stage PEs (16 x 8 bit truncated, 17-bit acc)
//   -> Saturate to 10-bit potentials (O Reg 0-15)
//   -> WB Sgm: 8 activation LUTs, 8 results per cycle on the 64-bit output
//      bus, also fed back to the scratchpad write port (layer merging).
// A VLIW controller (nve_ctrl) with a 512 x 54-bit instruction buffer and a
// hardware loop drives one slot per stage. Structure and sizes follow the
// published design; the instruction encoding, the bus handshakes, the stall
// rule and the configuration/program/LUT loading ports are this design's.
//
// Timing seen by a program: a scratchpad read issued in cycle t can be loaded
// into a Reg Op register in t+2 (the read is registered twice); a Reg Op
// update in t is used by the MACC in t+1; a MACC op in t changes the
// accumulators at the end of t+1, so Saturate may read them in t+2; a WB slot
// in t puts eight activations on the output bus in t+1.
// Buses: in_data is written when in_valid && in_ready; out_data is offered
// with out_valid and held until out_ready. Any wait holds the whole pipeline.
module nve_top
  import nve_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // control and status
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic              ovf,
  // controller configuration
  input  logic              cfg_we,
  input  logic [2:0]        cfg_addr,
  input  logic [15:0]       cfg_wdata,
  // program loading
  input  logic              prog_we,
  input  logic [PCW-1:0]    prog_addr,
  input  logic [IW-1:0]     prog_data,
  // activation table loading (all eight LUTs)
  input  logic              lut_we,
  input  logic [PW-1:0]     lut_addr,
  input  logic [XW-1:0]     lut_data,
  // input bus
  input  logic [BUS_W-1:0]  in_data,
  input  logic              in_valid,
  output logic              in_ready,
  // output bus
  output logic [BUS_W-1:0]  out_data,
  output logic              out_valid,
  input  logic              out_ready
);
  logic             en;
  instr_t           ins;
  logic [SP_AW-1:0] pa_phys, pb_phys;
  logic             ib_re;
  logic [PCW-1:0]   ib_raddr;
  logic [IW-1:0]    ib_rdata;
  logic [BUS_W-1:0] a_rdata, b_rdata, rd_a_q, rd_b_q;
  wgt_t             w0;
  pix_t             img [LANES];
  acc_t             acc [LANES];
  pot_t             pot [LANES];

  nve_ibuf #(.DEPTH(IB_DEPTH), .IW(IW)) u_ibuf (
    .clk, .we(prog_we), .waddr(prog_addr), .wdata(prog_data),
    .re(ib_re), .raddr(ib_raddr), .rdata(ib_rdata)
  );

  nve_ctrl u_ctrl (
    .clk, .rst_n, .start, .busy, .done,
    .cfg_we, .cfg_addr(cfg_e'(cfg_addr)), .cfg_wdata,
    .ib_re, .ib_raddr, .ib_rdata,
    .in_valid, .in_ready, .out_valid, .out_ready,
    .en, .ins, .pa_phys, .pb_phys
  );

  // DataBuffer stage.
  nve_scratchpad #(.DEPTH(SP_DEPTH), .WIDTH(BUS_W)) u_sp (
    .clk, .en,
    .a_en(ins.pa != PA_NOP), .a_we(ins.pa == PA_WRITE), .a_addr(pa_phys),
    .a_wdata(ins.pa_src ? out_data : in_data), .a_rdata,
    .b_en(ins.pb_en), .b_addr(pb_phys), .b_rdata
  );

  // Read register between the scratchpad and the Reg Op stage.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_a_q <= '0;
      rd_b_q <= '0;
    end else if (en) begin
      rd_a_q <= a_rdata;
      rd_b_q <= b_rdata;
    end
  end

  // Reg Op stage.
  nve_wreg #(.NWR(NW)) u_wreg (
    .clk, .rst_n, .en, .op(ins.w), .din(rd_a_q), .w0
  );
  nve_imgreg #(.NL(LANES), .NS(NSI)) u_img (
    .clk, .rst_n, .en, .op(ins.img), .si_set(ins.si_set),
    .din_a(rd_a_q), .din_b(rd_b_q), .img
  );

  // Vector MACC stage.
  nve_vmacc #(.NL(LANES)) u_vmacc (
    .clk, .rst_n, .en, .op(ins.ex), .w(w0), .x(img),
    .clr_ovf(start && !busy), .acc, .ovf
  );

  // Saturate stage.
  nve_saturate #(.NL(LANES)) u_sat (
    .clk, .rst_n, .en, .ld(ins.sat), .acc, .pot
  );

  // WB Sgm stage.
  nve_wb_sgm #(.NL(LANES), .NT(NLUT)) u_wb (
    .clk, .rst_n, .en, .op(ins.wb), .pot,
    .lut_we, .lut_addr, .lut_data, .out_data, .out_valid
  );

  // Output bus: a result not yet taken stays unchanged.
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (out_valid && !out_ready) |=> (out_valid && $stable(out_data)));
endmodule
