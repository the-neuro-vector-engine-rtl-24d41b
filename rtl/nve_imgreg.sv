// nve_imgreg: L0 image vector register of the Reg Op stage.
//
// Sixteen 8-bit lanes (IMG Reg 0-15) feed the 16 MACC PEs; a 7-entry shift-in
// register (IMG Reg 16-22) extends them so that a kernel row of up to 8
// columns can be walked without extra loads. IMG_SET loads lanes 0-7 from the
// port A word and lanes 8-15 from the port B word (byte k = lane k). IMG_SHIFT
// moves all lanes down by one: img[k] <= img[k+1], img[15] <= si[0], and the
// shift-in register shifts with it. si_set loads the shift-in register from
// bytes 0-6 of the port B word. If si_set and IMG_SHIFT come together, byte 0
// of the new word goes directly into lane 15 and bytes 1-6 into the shift-in
// register, as the published 3x3 schedule needs. That bypass, the byte order
// and the reset to zero are this design's reading. Updates take effect at the
// clock edge.
module nve_imgreg
  import nve_pkg::*;
#(
  parameter int unsigned NL = 16,
  parameter int unsigned NS = 7
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  img_op_e               op,
  input  logic                  si_set,
  input  logic [BUS_W-1:0]      din_a,
  input  logic [BUS_W-1:0]      din_b,
  output pix_t                  img [NL]
);
  localparam int unsigned HALF = NL / 2;
  pix_t lane [NL];
  pix_t si   [NS];
  pix_t si_src [NS];   // shift-in contents feeding a shift this cycle
  pix_t si_new [NS];   // shift-in contents loaded this cycle

  always_comb begin
    for (int k = 0; k < int'(NS); k++) begin
      si_new[k] = din_b[k*XW +: XW];
      si_src[k] = si_set ? si_new[k] : si[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(NL); k++) lane[k] <= '0;
      for (int k = 0; k < int'(NS); k++) si[k] <= '0;
    end else if (en) begin
      unique case (op)
        IMG_SET: begin
          for (int k = 0; k < int'(HALF); k++) begin
            lane[k]      <= din_a[k*XW +: XW];
            lane[k+HALF] <= din_b[k*XW +: XW];
          end
        end
        IMG_SHIFT: begin
          for (int k = 0; k < int'(NL) - 1; k++) lane[k] <= lane[k+1];
          lane[NL-1] <= si_src[0];
        end
        default: ;
      endcase
      if (op == IMG_SHIFT) begin
        for (int k = 0; k < int'(NS) - 1; k++) si[k] <= si_src[k+1];
        si[NS-1] <= '0;
      end else if (si_set) begin
        for (int k = 0; k < int'(NS); k++) si[k] <= si_new[k];
      end
    end
  end

  assign img = lane;
endmodule
