// top: the two designs of this project side by side.
//
// 1. The microprogrammed CPU (mic_cpu): a 16-bit three-bus datapath run by
//    a 256-word writable control store. Its system bus (MAR/MDR) and the
//    control-store load port are brought out; main memory is external.
// 2. The four-format register/memory ISA front end: an instruction
//    decoder (isa_decoder), the ISA's 32 x 16 register file (isa_regfile)
//    and two base-plus-displacement adders (agu). For the instruction on
//    isa_insn it gives, in the same clock, the decoded fields, the values
//    of registers R1 and R2, and the addresses of the first (B2 + D2) and
//    second (B3 + D3) memory operand. Registers are written through
//    isa_we/isa_waddr/isa_wdata.
// The two parts share only clock and reset.
module top
  import mic_pkg::*;
  import isa_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // microprogrammed CPU
  input  logic                cs_we,
  input  uaddr_t              cs_waddr,
  input  uinstr_t             cs_wdata,
  input  logic                run,
  output word_t               mem_addr,
  output logic                mem_rd,
  output logic                mem_wr,
  output word_t               mem_wdata,
  input  word_t               mem_rdata,
  output uaddr_t              upc,
  output logic                ucycle_done,
  output logic                ujump,
  output word_t               pc,
  output word_t               ir,
  // four-format ISA front end
  input  logic [INSN_W-1:0]   isa_insn,
  input  logic                isa_we,
  input  logic [REG_W-1:0]    isa_waddr,
  input  logic [15:0]         isa_wdata,
  output fmt_e                isa_fmt,
  output logic [OP_W-1:0]     isa_op,
  output logic [REG_W-1:0]    isa_r1,
  output logic [REG_W-1:0]    isa_r2,
  output logic [REG_W-1:0]    isa_b2,
  output logic [REG_W-1:0]    isa_b3,
  output logic [5:0]          isa_len,
  output iclass_e             isa_iclass,
  output logic [5:0]          isa_variant,
  output logic                isa_illegal,
  output logic [15:0]         isa_r1_val,
  output logic [15:0]         isa_r2_val,
  output logic [15:0]         isa_ea2,
  output logic [15:0]         isa_ea3
);

  mic_cpu u_cpu (
    .clk         (clk),
    .rst_n       (rst_n),
    .cs_we       (cs_we),
    .cs_waddr    (cs_waddr),
    .cs_wdata    (cs_wdata),
    .run         (run),
    .mem_addr    (mem_addr),
    .mem_rd      (mem_rd),
    .mem_wr      (mem_wr),
    .mem_wdata   (mem_wdata),
    .mem_rdata   (mem_rdata),
    .upc         (upc),
    .ucycle_done (ucycle_done),
    .ujump       (ujump),
    .pc          (pc),
    .ir          (ir)
  );

  logic [DISP_W-1:0] d2, d3;

  isa_decoder u_dec (
    .insn    (isa_insn),
    .fmt     (isa_fmt),
    .op      (isa_op),
    .r1      (isa_r1),
    .r2      (isa_r2),
    .b2      (isa_b2),
    .d2      (d2),
    .b3      (isa_b3),
    .d3      (d3),
    .len     (isa_len),
    .iclass  (isa_iclass),
    .variant (isa_variant),
    .illegal (isa_illegal)
  );

  logic [15:0] base2, base3;

  isa_regfile #(.NUM_REGS(32), .DATA_W(16)) u_isa_rf (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (isa_we),
    .waddr (isa_waddr),
    .wdata (isa_wdata),
    .ra_r1 (isa_r1),
    .ra_r2 (isa_r2),
    .ra_b2 (isa_b2),
    .ra_b3 (isa_b3),
    .rd_r1 (isa_r1_val),
    .rd_r2 (isa_r2_val),
    .rd_b2 (base2),
    .rd_b3 (base3)
  );

  agu #(.ADDR_W(16), .DISP_W(DISP_W)) u_agu2 (
    .base (base2),
    .disp (d2),
    .ea   (isa_ea2)
  );

  agu #(.ADDR_W(16), .DISP_W(DISP_W)) u_agu3 (
    .base (base3),
    .disp (d3),
    .ea   (isa_ea3)
  );

endmodule
