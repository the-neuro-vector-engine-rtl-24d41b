// nve_wreg: L0 weight register (W Reg 0-3) of the Reg Op stage.
//
// W_SET loads four 16-bit weights from one scratchpad word (entry k from bits
// 16k+15:16k). W_SHIFT moves every entry down by one (W[k] <= W[k+1], zero
// into the top), so a word of weights is consumed one per cycle. Entry 0 is
// broadcast to all 16 MACC lanes and is also the bias for the EX_BIAS
// operation. The load/shift/broadcast behaviour follows the published
// schedule; the word packing and the reset to zero are this design's choice.
// Updates take effect at the clock edge, so the EX stage sees them one cycle
// after the Reg Op slot.
module nve_wreg
  import nve_pkg::*;
#(
  parameter int unsigned NWR = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  w_op_e                 op,
  input  logic [NWR*WW-1:0]     din,
  output wgt_t                  w0
);
  wgt_t w [NWR];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(NWR); k++) w[k] <= '0;
    end else if (en) begin
      unique case (op)
        W_SET:   for (int k = 0; k < int'(NWR); k++) w[k] <= din[k*WW +: WW];
        W_SHIFT: begin
          for (int k = 0; k < int'(NWR) - 1; k++) w[k] <= w[k+1];
          w[NWR-1] <= '0;
        end
        default: ;
      endcase
    end
  end

  assign w0 = w[0];
endmodule
