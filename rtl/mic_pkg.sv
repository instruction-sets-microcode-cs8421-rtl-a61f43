// mic_pkg: types and encodings shared by the microprogrammed CPU.
//
// The CPU is a 16-bit, three-bus machine controlled by horizontal
// microcode. Each microinstruction drives every mux, latch and register
// strobe of the datapath for one microcycle and carries an 8-bit
// micro-address used by conditional jumps.
//
// Field encodings taken from the lecture's control codings:
//   A mux    0 = A latch, 1 = MDR
//   C mux    0 = C bus (shifter), 1 = MDR
//   MAR mux  0 = C bus, 1 = B bus
//   COND     00 none, 01 jump if N, 10 jump if Z, 11 always
//   ALU      00 pass A, 01 ADD, 10 AND, 11 complement A
//   SHIFT    00 pass, 01 SHR, 10 SHL, 11 rotate (this design: rotate left)
//   Register codes 00000-01111 = R0-R15, 10000 = constant 0,
//   10001 = constant +1, 11110 = IR, 11111 = PC.
// The field order follows the lecture's fetch table (A, C, MAR muxes,
// COND, ALU, SHFT, MAR, MDR, A, B, C, micro-address). The fields ALATCH
// (listed in the lecture's bit budget), RD, WR and DISP (memory strobes
// and op-code dispatch, which the lecture requires but does not encode)
// are this design's additions, placed after MDR.
package mic_pkg;

  localparam int unsigned WORD_W    = 16;  // register width
  localparam int unsigned UADDR_W   = 8;   // micro-address width, 256 words
  localparam int unsigned REG_SEL_W = 5;   // register code width
  localparam int unsigned OPC_W     = 6;   // IR[15:10]: 2 format bits + 4 op bits

  typedef logic [WORD_W-1:0]    word_t;
  typedef logic [UADDR_W-1:0]   uaddr_t;
  typedef logic [REG_SEL_W-1:0] rsel_t;

  typedef enum logic [1:0] {
    COND_NONE = 2'b00,
    COND_N    = 2'b01,
    COND_Z    = 2'b10,
    COND_ALW  = 2'b11
  } cond_e;

  typedef enum logic [1:0] {
    ALU_PASS = 2'b00,
    ALU_ADD  = 2'b01,
    ALU_AND  = 2'b10,
    ALU_NOT  = 2'b11
  } alu_op_e;

  typedef enum logic [1:0] {
    SH_NONE = 2'b00,
    SH_SHR  = 2'b01,
    SH_SHL  = 2'b10,
    SH_ROT  = 2'b11
  } sh_op_e;

  // Register codes.
  localparam rsel_t R_ZERO = 5'b10000;
  localparam rsel_t R_ONE  = 5'b10001;
  localparam rsel_t R_IR   = 5'b11110;
  localparam rsel_t R_PC   = 5'b11111;

  typedef struct packed {
    logic    amux;    // 0 A latch, 1 MDR
    logic    cmux;    // 0 shifter, 1 MDR
    logic    marmux;  // 0 C bus, 1 B bus
    cond_e   cond;
    alu_op_e alu;
    sh_op_e  shft;
    logic    mar;     // 1 = load MAR
    logic    mdr;     // 1 = load MDR from the C bus
    logic    alatch;  // 1 = A latch takes the A bus, 0 = keeps its value
    logic    rd;      // memory read into MDR
    logic    wr;      // memory write of MDR
    logic    disp;    // next micro-address from the IR op-code
    rsel_t   a;       // register onto the A bus
    rsel_t   b;       // register onto the B bus
    rsel_t   c;       // register written from the C mux
    uaddr_t  addr;    // jump target
  } uinstr_t;

  localparam int unsigned UINSTR_W = $bits(uinstr_t);  // 38

  // Microcycle phases: fetch the microinstruction, latch the buses,
  // execute (ALU, shifter, register/MAR/MDR/memory writes, next address).
  typedef enum logic [1:0] {
    PH_FETCH = 2'd0,
    PH_READ  = 2'd1,
    PH_EXEC  = 2'd2
  } phase_e;

endpackage
