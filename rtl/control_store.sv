// control_store: the micro-store of the microprogrammed CPU.
//
// 256 microinstructions (8-bit micro-address, as in the lecture), each
// UINSTR_W = 38 bits wide. The read port is combinational: the
// microsequencer registers the word it reads into its microinstruction
// register. The write port (one word per clock when we is high) loads
// the microprogram before the CPU runs; the lecture treats the store as
// fixed contents and does not say how it is filled, so the load port is
// this design's choice. Contents are not reset.
module control_store
  import mic_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  uinstr_t       wdata,
  input  logic [AW-1:0] raddr,
  output uinstr_t       rdata
);

  uinstr_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
