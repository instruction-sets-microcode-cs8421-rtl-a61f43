// ucode_pkg: microinstruction builders and the demonstration microprogram
// used by the CPU testbenches.
//
// The microprogram interprets a small accumulator machine whose 16-bit
// instructions are {2'b01, op[3:0], x[9:0]}: the format/op bits are the
// dispatch op-code, x a direct memory address. R0 is the accumulator AC,
// R15 holds the address mask 0x03FF, R1-R4 are scratch.
//   op 0 LODD AC <- M[x]        op 1 STOD M[x] <- AC
//   op 2 ADDD AC <- AC + M[x]   op 3 ANDD AC <- AC & M[x]
//   op 4 JUMP PC <- x           op 5 JZER if AC == 0 PC <- x
//   op 6 JNEG if AC < 0 PC <- x op 7 MULD AC <- AC * M[x] (shift/add loop)
//   op 8 NOTA AC <- ~AC         op 9 ROTL AC <- AC rotated left
//   op 10 DIVD AC <- AC / M[x], remainder in R3 (restoring shift/subtract
//        loop, 16 steps; operands below 2^15, divisor not 0)
//   op 15 HALT (micro-loop at UA_HALT)
// Micro-addresses: 0x00-0x0D build the mask, 0x10-0x13 fetch/dispatch,
// 0x40 + 4*op the routines, 0x80-0x86 the multiply loop, 0x90-0xA3 the divide loop.
package ucode_pkg;
  import mic_pkg::*;

  localparam uaddr_t UA_FETCH = 8'h10;
  localparam uaddr_t UA_HALT  = 8'h7C;

  localparam logic [3:0] OP_LODD = 4'd0, OP_STOD = 4'd1, OP_ADDD = 4'd2,
                         OP_ANDD = 4'd3, OP_JUMP = 4'd4, OP_JZER = 4'd5,
                         OP_JNEG = 4'd6, OP_MULD = 4'd7, OP_NOTA = 4'd8,
                         OP_ROTL = 4'd9, OP_DIVD = 4'd10, OP_HALT = 4'd15;

  localparam rsel_t AC = 5'd0, MASK = 5'd15;

  function automatic word_t minst(logic [3:0] op, logic [9:0] x);
    return {2'b01, op, x};
  endfunction

  // Microinstruction that does nothing: no register written (C = const 0).
  function automatic uinstr_t u_nop();
    uinstr_t u;
    u = '0;
    u.a = R_ZERO; u.b = R_ZERO; u.c = R_ZERO;
    return u;
  endfunction

  // C <- shift(A op B), A latch loaded.
  function automatic uinstr_t u_op(rsel_t a, rsel_t b, rsel_t c, alu_op_e op, sh_op_e sh);
    uinstr_t u;
    u = u_nop();
    u.alatch = 1'b1;
    u.a = a; u.b = b; u.c = c; u.alu = op; u.shft = sh;
    return u;
  endfunction

  function automatic uinstr_t u_jmp(uinstr_t u0, cond_e cond, uaddr_t addr);
    uinstr_t u;
    u = u0;
    u.cond = cond; u.addr = addr;
    return u;
  endfunction

  // The lecture's fetch microinstruction: MAR <- PC, PC <- PC + 1.
  function automatic uinstr_t u_fetch();
    uinstr_t u;
    u = u_op(R_ONE, R_PC, R_PC, ALU_ADD, SH_NONE);
    u.marmux = 1'b1; u.mar = 1'b1;
    return u;
  endfunction

  // MAR <- IR & MASK (address field of the macro-instruction).
  function automatic uinstr_t u_mar_x();
    uinstr_t u;
    u = u_op(R_IR, MASK, R_ZERO, ALU_AND, SH_NONE);
    u.mar = 1'b1;
    return u;
  endfunction

  function automatic uinstr_t u_rd();
    uinstr_t u;
    u = u_nop();
    u.rd = 1'b1;
    return u;
  endfunction

  // Register c <- MDR through the C mux.
  function automatic uinstr_t u_from_mdr(rsel_t c);
    uinstr_t u;
    u = u_nop();
    u.cmux = 1'b1; u.c = c;
    return u;
  endfunction

  // C <- MDR op B through the A mux.
  function automatic uinstr_t u_mdr_op(rsel_t b, rsel_t c, alu_op_e op);
    uinstr_t u;
    u = u_op(R_ZERO, b, c, op, SH_NONE);
    u.amux = 1'b1;
    return u;
  endfunction

  function automatic uinstr_t ucode_word(int unsigned addr);
    uinstr_t u;
    u = u_nop();
    if (addr == 0) u = u_op(R_ONE, R_ZERO, MASK, ALU_PASS, SH_NONE);        // MASK = 1
    else if (addr <= 10) u = u_op(MASK, R_ZERO, MASK, ALU_PASS, SH_SHL);    // MASK <<= 1 (x10)
    else if (addr == 11) u = u_op(MASK, R_ZERO, MASK, ALU_NOT, SH_NONE);    // ~0x0400
    else if (addr == 12) u = u_op(MASK, R_ONE, MASK, ALU_ADD, SH_NONE);     // +1
    else if (addr == 13) u = u_jmp(u_op(MASK, R_ZERO, MASK, ALU_NOT, SH_NONE), COND_ALW, UA_FETCH);
    else begin
      unique case (addr)
        // fetch / decode
        32'h10: u = u_fetch();
        32'h11: u = u_rd();
        32'h12: u = u_from_mdr(R_IR);
        32'h13: begin u = u_nop(); u.disp = 1'b1; end
        // LODD
        32'h40: u = u_mar_x();
        32'h41: u = u_rd();
        32'h42: u = u_jmp(u_from_mdr(AC), COND_ALW, UA_FETCH);
        // STOD
        32'h44: u = u_mar_x();
        32'h45: begin u = u_op(AC, R_ZERO, R_ZERO, ALU_PASS, SH_NONE); u.mdr = 1'b1; end
        32'h46: begin u = u_jmp(u_nop(), COND_ALW, UA_FETCH); u.wr = 1'b1; end
        // ADDD
        32'h48: u = u_mar_x();
        32'h49: u = u_rd();
        32'h4A: u = u_jmp(u_mdr_op(AC, AC, ALU_ADD), COND_ALW, UA_FETCH);
        // ANDD
        32'h4C: u = u_mar_x();
        32'h4D: u = u_rd();
        32'h4E: u = u_jmp(u_mdr_op(AC, AC, ALU_AND), COND_ALW, UA_FETCH);
        // JUMP
        32'h50: u = u_jmp(u_op(R_IR, MASK, R_PC, ALU_AND, SH_NONE), COND_ALW, UA_FETCH);
        // JZER
        32'h54: u = u_jmp(u_op(AC, R_ZERO, R_ZERO, ALU_PASS, SH_NONE), COND_Z, 8'h50);
        32'h55: u = u_jmp(u_nop(), COND_ALW, UA_FETCH);
        // JNEG
        32'h58: u = u_jmp(u_op(AC, R_ZERO, R_ZERO, ALU_PASS, SH_NONE), COND_N, 8'h50);
        32'h59: u = u_jmp(u_nop(), COND_ALW, UA_FETCH);
        // MULD: R1 = multiplicand, R2 = multiplier, R3 = product
        32'h5C: u = u_mar_x();
        32'h5D: u = u_rd();
        32'h5E: u = u_from_mdr(5'd2);
        32'h5F: u = u_jmp(u_op(AC, R_ZERO, 5'd1, ALU_PASS, SH_NONE), COND_ALW, 8'h80);
        32'h80: u = u_op(R_ZERO, R_ZERO, 5'd3, ALU_PASS, SH_NONE);
        32'h81: u = u_jmp(u_op(5'd2, R_ZERO, R_ZERO, ALU_PASS, SH_NONE), COND_Z, 8'h86);
        32'h82: begin  // test bit 0 of R2, kept in the A latch from 0x81
          u = u_jmp(u_op(R_PC, R_ONE, R_ZERO, ALU_AND, SH_NONE), COND_Z, 8'h84);
          u.alatch = 1'b0;
        end
        32'h83: u = u_op(5'd3, 5'd1, 5'd3, ALU_ADD, SH_NONE);
        32'h84: u = u_op(5'd1, R_ZERO, 5'd1, ALU_PASS, SH_SHL);
        32'h85: u = u_jmp(u_op(5'd2, R_ZERO, 5'd2, ALU_PASS, SH_SHR), COND_ALW, 8'h81);
        32'h86: u = u_jmp(u_op(5'd3, R_ZERO, AC, ALU_PASS, SH_NONE), COND_ALW, UA_FETCH);
        // NOTA, ROTL
        32'h60: u = u_jmp(u_op(AC, R_ZERO, AC, ALU_NOT, SH_NONE), COND_ALW, UA_FETCH);
        32'h64: u = u_jmp(u_op(AC, R_ZERO, AC, ALU_PASS, SH_ROT), COND_ALW, UA_FETCH);
        // DIVD: R1 = dividend/quotient, R2 = divisor, R3 = remainder,
        // R4 = step count, R6 = -divisor, R7 = trial remainder, R8 = -1
        32'h68: u = u_mar_x();
        32'h69: u = u_rd();
        32'h6A: u = u_from_mdr(5'd2);
        32'h6B: u = u_jmp(u_nop(), COND_ALW, 8'h90);
        32'h90: u = u_op(5'd2, R_ZERO, 5'd6, ALU_NOT, SH_NONE);
        32'h91: u = u_op(5'd6, R_ONE, 5'd6, ALU_ADD, SH_NONE);
        32'h92: u = u_op(AC, R_ZERO, 5'd1, ALU_PASS, SH_NONE);
        32'h93: u = u_op(R_ZERO, R_ZERO, 5'd3, ALU_PASS, SH_NONE);
        32'h94: u = u_op(R_ZERO, R_ZERO, 5'd8, ALU_NOT, SH_NONE);
        32'h95: u = u_op(R_ONE, R_ZERO, 5'd4, ALU_PASS, SH_SHL);
        32'h96: u = u_op(5'd4, R_ZERO, 5'd4, ALU_PASS, SH_SHL);
        32'h97: u = u_op(5'd4, R_ZERO, 5'd4, ALU_PASS, SH_SHL);
        32'h98: u = u_op(5'd4, R_ZERO, 5'd4, ALU_PASS, SH_SHL);
        32'h99: u = u_op(5'd3, R_ZERO, 5'd3, ALU_PASS, SH_SHL);
        32'h9A: u = u_jmp(u_op(5'd1, R_ZERO, R_ZERO, ALU_PASS, SH_NONE), COND_N, 8'h9C);
        32'h9B: u = u_jmp(u_nop(), COND_ALW, 8'h9D);
        32'h9C: u = u_op(5'd3, R_ONE, 5'd3, ALU_ADD, SH_NONE);
        32'h9D: u = u_op(5'd1, R_ZERO, 5'd1, ALU_PASS, SH_SHL);
        32'h9E: u = u_jmp(u_op(5'd3, 5'd6, 5'd7, ALU_ADD, SH_NONE), COND_N, 8'hA1);
        32'h9F: u = u_op(5'd7, R_ZERO, 5'd3, ALU_PASS, SH_NONE);
        32'hA0: u = u_op(5'd1, R_ONE, 5'd1, ALU_ADD, SH_NONE);
        32'hA1: u = u_jmp(u_op(5'd4, 5'd8, 5'd4, ALU_ADD, SH_NONE), COND_Z, 8'hA3);
        32'hA2: u = u_jmp(u_nop(), COND_ALW, 8'h99);
        32'hA3: u = u_jmp(u_op(5'd1, R_ZERO, AC, ALU_PASS, SH_NONE), COND_ALW, UA_FETCH);
        // HALT
        32'h7C: u = u_jmp(u_nop(), COND_ALW, UA_HALT);
        default: u = u_nop();
      endcase
    end
    return u;
  endfunction

endpackage
