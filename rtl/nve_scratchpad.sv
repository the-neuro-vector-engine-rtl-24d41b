// nve_scratchpad: L1 local buffer of the cluster, 1024 words of 64 bits (8 kB).
//
// Port A either writes (new input data or fed-back activations) or reads;
// port B only reads. The published design uses a dual-port SRAM with 64-bit
// accesses; here it is a memory array with the same ports. Reads are
// registered: data appears on a_rdata/b_rdata in the cycle after the read and
// is held until the next read on that port. A read and a write of the same
// word in one cycle return the old word (this design's choice). en = 0 holds
// everything (global pipeline stall). Contents are not reset.
module nve_scratchpad #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 64,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  input  logic             b_en,
  input  logic [AW-1:0]    b_addr,
  output logic [WIDTH-1:0] b_rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en && a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      else      a_rdata     <= mem[a_addr];
    end
  end

  always_ff @(posedge clk) begin
    if (en && b_en) b_rdata <= mem[b_addr];
  end
endmodule
