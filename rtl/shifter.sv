// shifter: one-place shifter after the ALU, feeding the C bus.
//
// Combinational. Control as in the lecture's SHIFT coding:
//   00 pass, 01 shift right (logical, zero in), 10 shift left (zero in),
//   11 rotate. The lecture leaves code 11 undefined and suggests a
//   rotate; this design rotates left by one place.
// The shifter exists so that microcode can run shift-and-add multiply
// and shift-and-subtract divide loops.
module shifter
  import mic_pkg::*;
#(
  parameter int unsigned DATA_W = mic_pkg::WORD_W
) (
  input  sh_op_e            op,
  input  logic [DATA_W-1:0] d,
  output logic [DATA_W-1:0] q
);

  always_comb begin
    unique case (op)
      SH_NONE: q = d;
      SH_SHR:  q = {1'b0, d[DATA_W-1:1]};
      SH_SHL:  q = {d[DATA_W-2:0], 1'b0};
      SH_ROT:  q = {d[DATA_W-2:0], d[DATA_W-1]};
      default: q = d;
    endcase
  end

endmodule
