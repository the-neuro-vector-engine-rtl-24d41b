// nve_ibuf: instruction buffer, 512 VLIW words of 54 bits.
//
// Holds the whole program: prolog, the steady-state body that the hardware
// loop repeats, and the epilog. Written through the program port (this
// design's choice) and read by the fetch unit with a registered read: the
// word addressed in cycle t is on rdata in cycle t+1 and holds while re is
// low. Sizes follow the published design. Contents are not reset.
module nve_ibuf #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned IW    = 54,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [IW-1:0] wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [IW-1:0] rdata
);
  logic [IW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end
endmodule
