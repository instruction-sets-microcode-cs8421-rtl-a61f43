// alu: the datapath's arithmetic/logic unit.
//
// Combinational. Two-bit control as in the lecture's ALU coding:
//   00 pass A, 01 A + B, 10 A AND B, 11 NOT A (one's complement).
// Status outputs follow the lecture: N = 1 when the result is negative
// (its top bit set, two's complement), Z = 1 when the result is zero.
// They are taken from the ALU result, before the shifter. The carry out
// of ADD is dropped; the lecture defines no carry flag.
module alu
  import mic_pkg::*;
#(
  parameter int unsigned DATA_W = mic_pkg::WORD_W
) (
  input  alu_op_e           op,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic [DATA_W-1:0] y,
  output logic              n,
  output logic              z
);

  always_comb begin
    unique case (op)
      ALU_PASS: y = a;
      ALU_ADD:  y = a + b;
      ALU_AND:  y = a & b;
      ALU_NOT:  y = ~a;
      default:  y = a;
    endcase
  end

  assign n = y[DATA_W-1];
  assign z = (y == '0);

endmodule
