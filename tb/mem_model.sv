// mem_model: behavioural main memory on the CPU's system bus.
//
// DEPTH 16-bit words, addressed by the low address bits. Reads are
// combinational (data valid in the clock of mem_rd); writes happen on the
// rising edge while mem_wr is high. Contents start at zero; testbenches
// fill m[] directly.
module mem_model #(
  parameter int unsigned DEPTH = 4096
) (
  input  logic        clk,
  input  logic [15:0] addr,
  input  logic        rd,
  input  logic        wr,
  input  logic [15:0] wdata,
  output logic [15:0] rdata
);

  logic [15:0] m [DEPTH];
  int unsigned reads, writes;

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) m[i] = '0;
    reads = 0;
    writes = 0;
  end

  assign rdata = m[addr[$clog2(DEPTH)-1:0]];

  always @(posedge clk) begin
    if (wr) begin
      m[addr[$clog2(DEPTH)-1:0]] <= wdata;
      writes <= writes + 1;
    end
    if (rd) reads <= reads + 1;
  end

endmodule
