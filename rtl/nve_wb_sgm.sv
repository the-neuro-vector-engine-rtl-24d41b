// nve_wb_sgm: WB Sgm stage, eight activation lookups in parallel.
//
// WB_LO looks up O Reg 0-7, WB_HI O Reg 8-15, each through its own 1024 x 8
// table (nve_act_lut); lane k of the selected half lands in byte k of the
// 64-bit output word. A whole 16-lane result therefore takes two WB slots.
// The result is registered: out_data/out_valid change at the end of the WB
// cycle, and out_valid stays high only for the cycle after a lookup (while
// en is low everything holds, which is how the output bus back-pressure
// stalls the pipeline). The same word feeds the output bus and the write
// port of the scratchpad (layer merging). All eight tables are written
// together through lut_we/lut_addr/lut_data (this design's choice).
module nve_wb_sgm
  import nve_pkg::*;
#(
  parameter int unsigned NL = 16,
  parameter int unsigned NT = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  wb_op_e              op,
  input  pot_t                pot [NL],
  input  logic                lut_we,
  input  logic [PW-1:0]       lut_addr,
  input  logic [XW-1:0]       lut_data,
  output logic [NT*XW-1:0]    out_data,
  output logic                out_valid
);
  logic re;
  assign re = en && (op == WB_LO || op == WB_HI);

  for (genvar g = 0; g < int'(NT); g++) begin : g_lut
    pot_t idx;
    assign idx = (op == WB_HI) ? pot[g + NT] : pot[g];
    nve_act_lut #(.DEPTH(LUT_DEPTH), .DW(XW)) u_lut (
      .clk, .we(lut_we), .waddr(lut_addr), .wdata(lut_data),
      .re, .raddr(idx), .rdata(out_data[g*XW +: XW])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   out_valid <= 1'b0;
    else if (en)  out_valid <= re;
  end
endmodule
