// nve_agu: scratchpad address generation for one port.
//
// Absolute mode passes the instruction's address field through. Modulo mode
// places the field inside a circular image region: addr = base + ((field +
// iter_off) mod len), where iter_off is the offset the controller advances by
// a stride once per steady-state iteration. The same instruction thus reads
// and writes successive image rows in later iterations while the region
// recycles the oldest row, as the published tile-strip schedule requires.
// field and iter_off are expected below len, so the modulo is one compare and
// one subtraction. The exact address form is this design's own. Purely
// combinational.
module nve_agu #(
  parameter int unsigned AW = 10
) (
  input  logic          mode,
  input  logic [AW-1:0] field,
  input  logic [AW-1:0] iter_off,
  input  logic [AW-1:0] base,
  input  logic [AW-1:0] len,
  output logic [AW-1:0] addr
);
  logic [AW:0] sum;
  logic [AW:0] wrapped;

  always_comb begin
    sum     = {1'b0, field} + {1'b0, iter_off};
    wrapped = (sum >= {1'b0, len}) ? sum - {1'b0, len} : sum;
    addr    = mode ? base + wrapped[AW-1:0] : field;
  end
endmodule
