// microsequencer: micro program counter, microinstruction register and
// next-address logic.
//
// Every microinstruction takes three clocks (a microcycle):
//   PH_FETCH  MIR <= control store[MPC]
//   PH_READ   the datapath latches the A and B buses (A/B latches)
//   PH_EXEC   ALU and shifter settle, the datapath writes its registers,
//             memory is strobed, and MPC <= next micro-address
// The next micro-address follows the lecture's jump codes, tested on the
// ALU status bits of this same microinstruction:
//   COND 00 -> MPC + 1, 01 -> ADDR if N, 10 -> ADDR if Z, 11 -> ADDR.
// The lecture states that the machine op-code is the micro-store address
// where its microcode starts. This design adds a DISP bit for that: when
// set, the next address is {IR[15:10], 2'b00}, the two format bits and
// four op bits of a 16-bit (format B) instruction, giving each op-code a
// group of four microinstructions. DISP takes priority over COND.
// run = 0 freezes the sequencer (used while the store is being loaded).
// Reset (synchronous, active low) sets MPC to 0 and clears the MIR.
module microsequencer
  import mic_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 run,
  input  uinstr_t              cs_rdata,
  input  logic                 n,
  input  logic                 z,
  input  logic [OPC_W-1:0]     ir_opc,
  output uaddr_t               upc,
  output uinstr_t              mir,
  output phase_e               phase,
  output logic                 exec,
  output logic                 taken
);

  uaddr_t next_upc;

  always_comb begin
    unique case (mir.cond)
      COND_NONE: taken = 1'b0;
      COND_N:    taken = n;
      COND_Z:    taken = z;
      COND_ALW:  taken = 1'b1;
      default:   taken = 1'b0;
    endcase
    if (mir.disp)   next_upc = {ir_opc, 2'b00};
    else if (taken) next_upc = mir.addr;
    else            next_upc = upc + 1'b1;
  end

  assign exec = run && (phase == PH_EXEC);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      upc   <= '0;
      mir   <= '0;
      phase <= PH_FETCH;
    end else if (run) begin
      unique case (phase)
        PH_FETCH: begin
          mir   <= cs_rdata;
          phase <= PH_READ;
        end
        PH_READ:  phase <= PH_EXEC;
        PH_EXEC: begin
          upc   <= next_upc;
          phase <= PH_FETCH;
        end
        default:  phase <= PH_FETCH;
      endcase
    end
  end

endmodule
