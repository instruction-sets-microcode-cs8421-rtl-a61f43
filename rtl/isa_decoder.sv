// isa_decoder: field extraction and classification for the four-format ISA.
//
// Combinational. From a left-aligned instruction (see isa_pkg) it gives
// the format, the op-code, every register, base and displacement field
// of that format (fields the format lacks read 0), the instruction
// length in bits, the operation class and, within the class, the
// operation number (variant).
// Format widths and field order follow the ISA's four format diagrams.
// How op-codes are shared out between the classes of one format is not
// given; this design numbers them in the order of the operation table:
//   A: op 0-7 store, 8-15 load, 16-47 R1 <- R1 OP Mem, 48-63 illegal
//   B: op 0-15 R1 <- R1 OP R2
//   C: op 0-31 R2 <- R1 OP Mem, 32-95 Mem <- R1 OP R2, 96-127 illegal
//   D: op 0-15 Mem2 <- R1 OP Mem1
module isa_decoder
  import isa_pkg::*;
(
  input  logic [INSN_W-1:0] insn,
  output fmt_e              fmt,
  output logic [OP_W-1:0]   op,
  output logic [REG_W-1:0]  r1,
  output logic [REG_W-1:0]  r2,
  output logic [REG_W-1:0]  b2,
  output logic [DISP_W-1:0] d2,
  output logic [REG_W-1:0]  b3,
  output logic [DISP_W-1:0] d3,
  output logic [5:0]        len,
  output iclass_e           iclass,
  output logic [5:0]        variant,
  output logic              illegal
);

  assign fmt = fmt_e'(insn[40:39]);

  always_comb begin
    op = '0; r1 = '0; r2 = '0; b2 = '0; d2 = '0; b3 = '0; d3 = '0;
    len = '0; iclass = IC_ILLEGAL; variant = '0;
    unique case (fmt)
      FMT_A: begin
        op  = {1'b0, insn[38:33]};
        r1  = insn[32:28];
        b2  = insn[27:23];
        d2  = insn[22:13];
        len = 6'(LEN_A);
        if (op < 7'd8) begin
          iclass = IC_STORE; variant = 6'(op);
        end else if (op < 7'd16) begin
          iclass = IC_LOAD;  variant = 6'(op - 7'd8);
        end else if (op < 7'd48) begin
          iclass = IC_RM;    variant = 6'(op - 7'd16);
        end
      end
      FMT_B: begin
        op      = {3'b0, insn[38:35]};
        r1      = insn[34:30];
        r2      = insn[29:25];
        len     = 6'(LEN_B);
        iclass  = IC_RR;
        variant = 6'(op);
      end
      FMT_C: begin
        op  = insn[38:32];
        r1  = insn[31:27];
        r2  = insn[26:22];
        b3  = insn[21:17];
        d3  = insn[16:7];
        len = 6'(LEN_C);
        if (op < 7'd32) begin
          iclass = IC_RM2; variant = 6'(op);
        end else if (op < 7'd96) begin
          iclass = IC_MRR; variant = 6'(op - 7'd32);
        end
      end
      FMT_D: begin
        op      = {3'b0, insn[38:35]};
        r1      = insn[34:30];
        b2      = insn[29:25];
        d2      = insn[24:15];
        b3      = insn[14:10];
        d3      = insn[9:0];
        len     = 6'(LEN_D);
        iclass  = IC_MM;
        variant = 6'(op);
      end
      default: ;
    endcase
  end

  assign illegal = (iclass == IC_ILLEGAL);

endmodule
