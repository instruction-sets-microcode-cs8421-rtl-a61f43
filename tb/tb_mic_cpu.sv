// tb_mic_cpu: the CPU with its control store loaded with the
// demonstration microprogram (ucode_pkg), running a macro program that
// multiplies eight random pairs of numbers with the microcoded
// shift-and-add MULD and divides eight more with the shift-and-subtract
// DIVD, storing each result. Checks products (mod 2^16), quotients and
// the last remainder, the timing of the first instruction fetch (the 14-word
// mask set-up plus fetch, read and IR load = 17 microinstructions of
// 3 clocks) and that the first instruction lands in IR.
module tb_mic_cpu;
  import mic_pkg::*;
  import ucode_pkg::*;

  logic    clk = 0, rst_n = 0, cs_we = 0, run = 0;
  uaddr_t  cs_waddr = '0, upc;
  uinstr_t cs_wdata = '0;
  word_t   mem_addr, mem_wdata, mem_rdata, pc, ir;
  logic    mem_rd, mem_wr, ucycle_done, ujump;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mic_cpu dut (.*);
  mem_model #(.DEPTH(1024)) u_mem (.clk(clk), .addr(mem_addr), .rd(mem_rd), .wr(mem_wr),
                                   .wdata(mem_wdata), .rdata(mem_rdata));

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  word_t xa [8], xb [8], na [8], nd [8];

  initial begin
    int clocks;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      cs_we = 1; cs_waddr = uaddr_t'(a); cs_wdata = ucode_word(a);
    end
    @(negedge clk);
    cs_we = 0;
    for (int i = 0; i < 8; i++) begin
      xa[i] = (i == 0) ? 16'd0 : (i == 1) ? 16'hFFFF : word_t'($urandom);
      xb[i] = (i == 0) ? 16'd123 : (i == 1) ? 16'hFFFF : word_t'($urandom_range(0, 4095));
      u_mem.m[200 + 2*i] = xa[i];
      u_mem.m[201 + 2*i] = xb[i];
      u_mem.m[3*i]     = minst(OP_LODD, 10'(200 + 2*i));
      u_mem.m[3*i + 1] = minst(OP_MULD, 10'(201 + 2*i));
      u_mem.m[3*i + 2] = minst(OP_STOD, 10'(300 + i));
    end
    for (int i = 0; i < 8; i++) begin
      na[i] = (i == 0) ? 16'd0 : (i == 1) ? 16'h7FFF : word_t'($urandom_range(0, 32767));
      nd[i] = (i == 0) ? 16'd5 : (i == 1) ? 16'd1 : (i == 2) ? 16'h7FFF : word_t'($urandom_range(1, 300));
      u_mem.m[400 + 2*i] = na[i];
      u_mem.m[401 + 2*i] = nd[i];
      u_mem.m[24 + 3*i] = minst(OP_LODD, 10'(400 + 2*i));
      u_mem.m[25 + 3*i] = minst(OP_DIVD, 10'(401 + 2*i));
      u_mem.m[26 + 3*i] = minst(OP_STOD, 10'(500 + i));
    end
    u_mem.m[48] = minst(OP_HALT, 10'd0);
    @(negedge clk);
    run = 1;
    clocks = 0;
    while (ir != u_mem.m[0]) begin
      @(negedge clk);
      clocks++;
    end
    chk(clocks == 17 * 3, $sformatf("first instruction in IR after 51 clocks, got %0d", clocks));
    while (!(ucycle_done && upc == UA_HALT)) @(posedge clk);
    run = 0;
    for (int i = 0; i < 8; i++)
      chk(u_mem.m[300 + i] == word_t'((32'(xa[i]) * 32'(xb[i])) % 65536),
          $sformatf("product %0d: %0d * %0d = %0d", i, xa[i], xb[i], u_mem.m[300 + i]));
    for (int i = 0; i < 8; i++)
      chk(u_mem.m[500 + i] == na[i] / nd[i],
          $sformatf("quotient %0d: %0d / %0d = %0d", i, na[i], nd[i], u_mem.m[500 + i]));
    chk(dut.u_dp.u_regset.gp[3] == na[7] % nd[7], "remainder of the last division in R3");
    chk(pc == 16'd49, "PC after HALT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
