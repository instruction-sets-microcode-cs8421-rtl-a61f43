// datapath: the three-bus datapath of the microprogrammed CPU.
//
// Structure (the lecture's final datapath): the register set drives the
// A and B buses; the A bus feeds the A LATCH and the B bus the B LATCH;
// the A MUX chooses the A latch or the MDR as the ALU's left input, the
// B latch is its right input; the ALU result passes the SHIFTER onto the
// C bus; the C MUX chooses the C bus or the MDR as the value written back
// into the register set. The MAR is loaded through the MAR MUX from the
// C bus or the B bus (B latch); the MDR is loaded from the C bus or, on a
// memory read, from the system bus, and is the data of a memory write.
//
// Timing, with phase and exec from the microsequencer:
//   end of PH_READ : A latch <= A bus when mir.alatch, B latch <= B bus
//   end of PH_EXEC : register mir.c <= C mux; MAR <= MAR mux when mir.mar;
//                    MDR <= mem_rdata when mir.rd, else C bus when mir.mdr
// Memory strobes mem_rd / mem_wr are high during PH_EXEC only and use the
// MAR and MDR values held at the start of that microinstruction, so an
// address loaded into MAR is used by the next microinstruction. Memory
// answers a read in the same clock (no wait states): the lecture does not
// describe the bus protocol, so this is this design's choice. The B latch
// has no control bit in the lecture's bit list and loads every microcycle.
module datapath
  import mic_pkg::*;
#(
  parameter int unsigned DATA_W = mic_pkg::WORD_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  uinstr_t           mir,
  input  phase_e            phase,
  input  logic              run,
  output logic              n,
  output logic              z,
  output logic [DATA_W-1:0] ir,
  output logic [DATA_W-1:0] pc,
  output logic [DATA_W-1:0] mem_addr,
  output logic              mem_rd,
  output logic              mem_wr,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic [DATA_W-1:0] mem_rdata
);

  logic [DATA_W-1:0] a_bus, b_bus;
  logic [DATA_W-1:0] alatch_q, blatch_q;
  logic [DATA_W-1:0] amux_out, alu_y, c_bus, cmux_out, marmux_out;
  logic [DATA_W-1:0] mar_q, mdr_q;
  logic              rd_ph, ex_ph;

  assign rd_ph = run && (phase == PH_READ);
  assign ex_ph = run && (phase == PH_EXEC);

  regset #(.DATA_W(DATA_W)) u_regset (
    .clk    (clk),
    .rst_n  (rst_n),
    .a_sel  (mir.a),
    .b_sel  (mir.b),
    .c_sel  (mir.c),
    .c_we   (ex_ph),
    .c_data (cmux_out),
    .a_bus  (a_bus),
    .b_bus  (b_bus),
    .ir     (ir),
    .pc     (pc)
  );

  // A and B latches.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      alatch_q <= '0;
      blatch_q <= '0;
    end else if (rd_ph) begin
      if (mir.alatch) alatch_q <= a_bus;
      blatch_q <= b_bus;
    end
  end

  assign amux_out = mir.amux ? mdr_q : alatch_q;

  alu #(.DATA_W(DATA_W)) u_alu (
    .op (mir.alu),
    .a  (amux_out),
    .b  (blatch_q),
    .y  (alu_y),
    .n  (n),
    .z  (z)
  );

  shifter #(.DATA_W(DATA_W)) u_shifter (
    .op (mir.shft),
    .d  (alu_y),
    .q  (c_bus)
  );

  assign cmux_out   = mir.cmux   ? mdr_q    : c_bus;
  assign marmux_out = mir.marmux ? blatch_q : c_bus;

  // MAR and MDR.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mar_q <= '0;
      mdr_q <= '0;
    end else if (ex_ph) begin
      if (mir.mar) mar_q <= marmux_out;
      if (mir.rd)       mdr_q <= mem_rdata;
      else if (mir.mdr) mdr_q <= c_bus;
    end
  end

  assign mem_addr  = mar_q;
  assign mem_wdata = mdr_q;
  assign mem_rd    = ex_ph && mir.rd;
  assign mem_wr    = ex_ph && mir.wr;

  // A microinstruction may not read memory into the MDR and load the MDR
  // from the C bus at once, nor read and write memory at once.
  assert property (@(posedge clk) disable iff (!rst_n) ex_ph |-> !(mir.rd && mir.mdr))
    else $error("datapath: RD and MDR set in one microinstruction");
  assert property (@(posedge clk) disable iff (!rst_n) ex_ph |-> !(mir.rd && mir.wr))
    else $error("datapath: RD and WR set in one microinstruction");

endmodule
