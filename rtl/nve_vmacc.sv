// nve_vmacc: the Vector MACC stage, y <- y + x * w over 16 lanes.
//
// One operation (EX slot) and one weight (W Reg 0) are broadcast to all
// lanes; each lane takes its own input from the image register. EX_BIAS sets
// all accumulators to the broadcast value, which is how a tile strip of
// neighbouring neurons is initialised to the bias. Every lane is an nve_pe
// (two-stage pipeline: op in cycle t, accumulators updated at the end of
// t+1). The lane overflow flags are ORed into one status bit (this design's
// choice).
module nve_vmacc
  import nve_pkg::*;
#(
  parameter int unsigned NL = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  ex_op_e op,
  input  wgt_t   w,
  input  pix_t   x   [NL],
  input  logic   clr_ovf,
  output acc_t   acc [NL],
  output logic   ovf
);
  logic [NL-1:0] lane_ovf;

  for (genvar g = 0; g < int'(NL); g++) begin : g_pe
    nve_pe u_pe (
      .clk, .rst_n, .en, .op, .w, .x(x[g]), .clr_ovf,
      .acc(acc[g]), .ovf(lane_ovf[g])
    );
  end

  assign ovf = |lane_ovf;
endmodule
