// isa_pkg: the four instruction formats of the register/memory ISA.
//
// Every instruction starts with two format bits, then an op-code whose
// width depends on the format, then 5-bit register fields (R = register,
// B = base register) and 10-bit displacements (D):
//   A  00 | Op 6 | R1 | B2 | D2                 28 bits, 48 instructions
//   B  01 | Op 4 | R1 | R2                      16 bits, 16 instructions
//   C  10 | Op 7 | R1 | R2 | B3 | D3            34 bits, 96 instructions
//   D  11 | Op 4 | R1 | B2 | D2 | B3 | D3       41 bits, 16 instructions
// A memory operand is addressed as base register + displacement.
// An instruction is presented left-aligned in a 41-bit window (its
// format bits in bits 40:39); bits beyond its length are ignored.
package isa_pkg;

  localparam int unsigned INSN_W = 41;  // longest format (D)
  localparam int unsigned REG_W  = 5;   // register / base field
  localparam int unsigned DISP_W = 10;  // displacement field
  localparam int unsigned OP_W   = 7;   // widest op-code (C)

  typedef enum logic [1:0] {
    FMT_A = 2'b00,
    FMT_B = 2'b01,
    FMT_C = 2'b10,
    FMT_D = 2'b11
  } fmt_e;

  // Operation classes, in the order of the ISA's operation table.
  typedef enum logic [2:0] {
    IC_STORE   = 3'd0,  // Mem  <- R1            (A, 8)
    IC_LOAD    = 3'd1,  // R1   <- Mem           (A, 8)
    IC_RR      = 3'd2,  // R1   <- R1 OP R2      (B, 16)
    IC_RM      = 3'd3,  // R1   <- R1 OP Mem     (A, 32)
    IC_RM2     = 3'd4,  // R2   <- R1 OP Mem     (C, 32)
    IC_MRR     = 3'd5,  // Mem  <- R1 OP R2      (C, 64)
    IC_MM      = 3'd6,  // Mem2 <- R1 OP Mem1    (D, 16)
    IC_ILLEGAL = 3'd7   // unassigned op-code
  } iclass_e;

  localparam int unsigned LEN_A = 28;
  localparam int unsigned LEN_B = 16;
  localparam int unsigned LEN_C = 34;
  localparam int unsigned LEN_D = 41;

endpackage
