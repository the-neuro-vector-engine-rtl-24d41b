// nve_saturate: Saturate stage with output registers O Reg 0-15.
//
// When ld is high, each 17-bit accumulator (9 integer, 8 fraction bits) is
// converted to the 10-bit potential format and stored: the two lowest
// fraction bits are dropped (rounding towards minus infinity) and the result
// is clamped to [-512, 511], i.e. SIII.FFFFFF, range [-8, 8). Saturating
// before the lookup follows the published design; the split into 3 integer
// and 6 fraction bits is this design's reading of the format. The registers
// change at the end of the cycle in which ld is high and hold otherwise.
module nve_saturate
  import nve_pkg::*;
#(
  parameter int unsigned NL = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic ld,
  input  acc_t acc [NL],
  output pot_t pot [NL]
);
  localparam int unsigned PFRAC = PW - 4;            // fraction bits of the potential
  localparam int unsigned DROP  = 8 - PFRAC;          // accumulator has 8 fraction bits
  localparam int unsigned SHW  = ACCW - DROP;
  localparam logic signed [SHW-1:0] PMAX = SHW'((1 << (PW - 1)) - 1);
  localparam logic signed [SHW-1:0] PMIN = -SHW'(1 << (PW - 1));

  pot_t sat [NL];

  always_comb begin
    for (int k = 0; k < int'(NL); k++) begin
      logic signed [SHW-1:0] s;
      s = SHW'(acc[k] >>> DROP);
      if (s > PMAX)      sat[k] = pot_t'(PMAX);
      else if (s < PMIN) sat[k] = pot_t'(PMIN);
      else               sat[k] = pot_t'(s);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(NL); k++) pot[k] <= '0;
    end else if (en && ld) begin
      for (int k = 0; k < int'(NL); k++) pot[k] <= sat[k];
    end
  end
endmodule
