// mic_cpu: microprogrammed 16-bit CPU.
//
// Machine instructions are interpreted by microcode held in a 256-word
// control store. The microsequencer fetches one 38-bit horizontal
// microinstruction per microcycle (three clocks: fetch, read, execute),
// the datapath carries it out, and the next micro-address comes from the
// jump codes on the ALU's N/Z bits or from a dispatch on the IR op-code.
// A machine-instruction fetch is itself microcode; the lecture's example
//   MAR <- PC, PC <- PC + 1  (A bus = +1, B bus = PC, ALU add,
//                             MAR mux = B bus, C = PC)
// is one microinstruction.
//
// Interface:
//   cs_we/cs_waddr/cs_wdata  load the control store (hold run low meanwhile)
//   run                      1 = execute microcode
//   mem_*                    system bus: address = MAR, write data = MDR;
//                            mem_rd / mem_wr pulse for one clock in the
//                            execute phase and a read returns its data
//                            in that same clock
//   upc, ucycle_done, ujump  micro PC, last clock of a microcycle, and
//                            whether that microcycle's jump is taken
//   pc, ir                   program counter and instruction register
// Reset is synchronous and active low; execution starts at micro-address 0
// with every register, the PC included, cleared.
module mic_cpu
  import mic_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cs_we,
  input  uaddr_t        cs_waddr,
  input  uinstr_t       cs_wdata,
  input  logic          run,
  output word_t         mem_addr,
  output logic          mem_rd,
  output logic          mem_wr,
  output word_t         mem_wdata,
  input  word_t         mem_rdata,
  output uaddr_t        upc,
  output logic          ucycle_done,
  output logic          ujump,
  output word_t         pc,
  output word_t         ir
);

  uinstr_t cs_rdata, mir;
  phase_e  phase;
  logic    n, z;

  control_store #(.DEPTH(1 << UADDR_W)) u_cs (
    .clk   (clk),
    .we    (cs_we),
    .waddr (cs_waddr),
    .wdata (cs_wdata),
    .raddr (upc),
    .rdata (cs_rdata)
  );

  microsequencer u_seq (
    .clk      (clk),
    .rst_n    (rst_n),
    .run      (run),
    .cs_rdata (cs_rdata),
    .n        (n),
    .z        (z),
    .ir_opc   (ir[WORD_W-1 -: OPC_W]),
    .upc      (upc),
    .mir      (mir),
    .phase    (phase),
    .exec     (ucycle_done),
    .taken    (ujump)
  );

  datapath #(.DATA_W(WORD_W)) u_dp (
    .clk       (clk),
    .rst_n     (rst_n),
    .mir       (mir),
    .phase     (phase),
    .run       (run),
    .n         (n),
    .z         (z),
    .ir        (ir),
    .pc        (pc),
    .mem_addr  (mem_addr),
    .mem_rd    (mem_rd),
    .mem_wr    (mem_wr),
    .mem_wdata (mem_wdata),
    .mem_rdata (mem_rdata)
  );

endmodule
