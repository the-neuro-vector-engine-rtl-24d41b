// nve_pe: one multiply-accumulate lane of the vector MACC stage.
//
// Arithmetic (published formats): weight SIIIIIII.FFFFFFFF (16 bit, signed),
// input .FFFFFFFF (8 bit, unsigned fraction), accumulator with 9 integer bits
// and 8 fraction bits (17 bit, signed). The 16 x 8 multiply is truncated: the
// 16 low fraction bits of the full product are cut to 8 by an arithmetic
// shift (rounding towards minus infinity). The MAC is pipelined in two stages
// as in the published design: stage 1 registers the product (or, for EX_BIAS,
// the bias) together with the operation; stage 2 writes the accumulator.
// Overflow check (this design's reading of "a hardware check to prevent
// overflow"): a sum outside the 17-bit range saturates to the nearest limit
// and sets the sticky flag ovf, cleared by clr_ovf.
// Timing: an op issued in cycle t changes acc at the end of cycle t+1.
module nve_pe
  import nve_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  ex_op_e op,
  input  wgt_t  w,
  input  pix_t  x,
  input  logic  clr_ovf,
  output acc_t  acc,
  output logic  ovf
);
  localparam int unsigned PRW = WW + XW + 1;         // full signed product
  localparam acc_t ACC_MAX = {1'b0, {(ACCW-1){1'b1}}};
  localparam acc_t ACC_MIN = {1'b1, {(ACCW-1){1'b0}}};

  logic signed [PRW-1:0]  prod_full;
  acc_t                   prod_trunc;
  ex_op_e                 op_q;
  acc_t                   opnd_q;   // truncated product or bias
  logic signed [ACCW:0]   sum;      // one guard bit

  assign prod_full  = w * $signed({1'b0, x});
  assign prod_trunc = acc_t'(prod_full >>> XW);

  // Stage 1: multiply.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q   <= EX_NOP;
      opnd_q <= '0;
    end else if (en) begin
      op_q   <= op;
      opnd_q <= (op == EX_BIAS) ? acc_t'(w) : prod_trunc;
    end
  end

  // Stage 2: accumulate with saturation.
  assign sum = {acc[ACCW-1], acc} + {opnd_q[ACCW-1], opnd_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      ovf <= 1'b0;
    end else begin
      if (clr_ovf) ovf <= 1'b0;
      if (en) begin
        unique case (op_q)
          EX_BIAS: acc <= opnd_q;
          EX_MAC: begin
            if (sum[ACCW] != sum[ACCW-1]) begin
              acc <= sum[ACCW] ? ACC_MIN : ACC_MAX;
              ovf <= 1'b1;
            end else begin
              acc <= sum[ACCW-1:0];
            end
          end
          default: ;
        endcase
      end
    end
  end
endmodule
