// regset: the register set of the microprogrammed CPU.
//
// Holds 16 general-purpose registers (codes 00000-01111), the instruction
// register IR (11110) and the program counter PC (11111). Two
// combinational read ports drive the A and B buses; one write port takes
// the C bus, written on the rising clock edge when c_we is high.
// Two of the lecture's unused codes read constants for the microcode:
// 10000 reads 0 and 10001 reads +1. The remaining unused codes read 0.
// Writing to a code that names no register (a constant or an unused
// code) changes nothing, so microcode that wants no register write names
// 10000 as its C register; this is this design's choice, since the
// lecture's microinstruction has no separate register-write bit.
// Reset (synchronous, active low) clears every register, so the PC
// starts at address 0.
module regset
  import mic_pkg::*;
#(
  parameter int unsigned DATA_W = mic_pkg::WORD_W,
  parameter int unsigned NUM_GP = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  rsel_t             a_sel,
  input  rsel_t             b_sel,
  input  rsel_t             c_sel,
  input  logic              c_we,
  input  logic [DATA_W-1:0] c_data,
  output logic [DATA_W-1:0] a_bus,
  output logic [DATA_W-1:0] b_bus,
  output logic [DATA_W-1:0] ir,
  output logic [DATA_W-1:0] pc
);

  logic [DATA_W-1:0] gp [NUM_GP];
  logic [DATA_W-1:0] ir_q, pc_q;

  function automatic logic [DATA_W-1:0] read_reg(rsel_t sel);
    if (32'(sel) < NUM_GP) return gp[sel[$clog2(NUM_GP)-1:0]];
    unique case (sel)
      R_ZERO:  return '0;
      R_ONE:   return DATA_W'(1);
      R_IR:    return ir_q;
      R_PC:    return pc_q;
      default: return '0;
    endcase
  endfunction

  assign a_bus = read_reg(a_sel);
  assign b_bus = read_reg(b_sel);
  assign ir    = ir_q;
  assign pc    = pc_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NUM_GP); i++) gp[i] <= '0;
      ir_q <= '0;
      pc_q <= '0;
    end else if (c_we) begin
      if (32'(c_sel) < NUM_GP) gp[c_sel[$clog2(NUM_GP)-1:0]] <= c_data;
      else if (c_sel == R_IR)  ir_q <= c_data;
      else if (c_sel == R_PC)  pc_q <= c_data;
    end
  end

endmodule
