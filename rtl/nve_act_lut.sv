// nve_act_lut: one activation-function lookup memory, 1024 entries of 8 bit.
//
// The 10-bit potential, taken as an unsigned number, addresses the table; the
// entry is the 8-bit activation (.FFFFFFFF). Size follows the published
// design. The table is loaded through the write port (this design's choice;
// typically with a sigmoid). The read is registered: rdata is valid in the
// cycle after re and holds until the next read. Contents are not reset.
module nve_act_lut #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned DW    = 8,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end
endmodule
