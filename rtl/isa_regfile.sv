// isa_regfile: general-purpose register file of the four-format ISA.
//
// NUM_REGS registers of DATA_W bits (32 x 16, the ISA's register count and
// width), named by 5-bit fields. Four combinational read ports serve one
// instruction's operands at once: R1, R2 and the two base registers B2
// and B3 used for base + displacement addressing. One write port stores
// a result on the rising clock edge when we is high. How many ports the
// register file has, and its reset, are this design's choices; reset
// (synchronous, active low) clears every register.
module isa_regfile #(
  parameter int unsigned NUM_REGS = 32,
  parameter int unsigned DATA_W   = 16,
  parameter int unsigned AW       = $clog2(NUM_REGS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [AW-1:0]     ra_r1,
  input  logic [AW-1:0]     ra_r2,
  input  logic [AW-1:0]     ra_b2,
  input  logic [AW-1:0]     ra_b3,
  output logic [DATA_W-1:0] rd_r1,
  output logic [DATA_W-1:0] rd_r2,
  output logic [DATA_W-1:0] rd_b2,
  output logic [DATA_W-1:0] rd_b3
);

  logic [DATA_W-1:0] regs [NUM_REGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NUM_REGS); i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  assign rd_r1 = regs[ra_r1];
  assign rd_r2 = regs[ra_r2];
  assign rd_b2 = regs[ra_b2];
  assign rd_b3 = regs[ra_b3];

endmodule
