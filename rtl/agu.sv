// agu: base-plus-displacement address adder of the four-format ISA.
//
// Combinational. ea = base + zero-extended 10-bit displacement, modulo
// 2^ADDR_W. The ISA addresses every memory operand this way; the 16-bit
// address width matches its 16-bit registers. Treating the displacement
// as unsigned is this design's choice (the ISA does not give its sign).
module agu #(
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned DISP_W = 10
) (
  input  logic [ADDR_W-1:0] base,
  input  logic [DISP_W-1:0] disp,
  output logic [ADDR_W-1:0] ea
);

  assign ea = base + ADDR_W'(disp);

endmodule
