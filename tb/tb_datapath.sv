// tb_datapath: runs the datapath through microcycles (phase driven here)
// and compares it, after every microinstruction, with a reference model
// of the register-transfer rules written in this testbench: registers,
// A/B latches, MAR, MDR, the memory strobes and the N/Z flags.
// Directed part: the fetch microinstruction MAR <- PC, PC <- PC + 1, the
// exercise R4 <- R1 AND R2, a memory write of MDR and an A latch hold.
// Random part: 3000 random microinstructions against the model.
module tb_datapath;
  import mic_pkg::*;

  logic    clk = 0, rst_n = 0, run = 1, n, z, mem_rd, mem_wr;
  uinstr_t mir = '0;
  phase_e  phase = PH_FETCH;
  word_t   ir, pc, mem_addr, mem_wdata, mem_rdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  // memory answers with a value derived from the address
  assign mem_rdata = word_t'(mem_addr * 16'd7 + 16'h1234);

  datapath dut (.*);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model ----
  word_t r [32];
  word_t al, bl, mar, mdr;

  function automatic word_t rd_ref(rsel_t s);
    if (s < 16 || s == 30 || s == 31) return r[s];
    if (s == 17) return 16'd1;
    return 16'd0;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Run one microinstruction on the DUT and on the model, then compare.
  task automatic step(uinstr_t u);
    word_t amux, res, sh, cval, mem_seen_addr;
    logic  en, ez, saw_rd, saw_wr;
    // model
    if (u.alatch) al = rd_ref(u.a);
    bl = rd_ref(u.b);
    amux = u.amux ? mdr : al;
    case (u.alu)
      ALU_PASS: res = amux;
      ALU_ADD:  res = amux + bl;
      ALU_AND:  res = amux & bl;
      default:  res = ~amux;
    endcase
    en = res[15]; ez = (res == 0);
    case (u.shft)
      SH_NONE: sh = res;
      SH_SHR:  sh = res >> 1;
      SH_SHL:  sh = res << 1;
      default: sh = {res[14:0], res[15]};
    endcase
    cval = u.cmux ? mdr : sh;
    mem_seen_addr = mar;
    // DUT
    @(negedge clk); mir = u; phase = PH_FETCH;
    @(negedge clk); phase = PH_READ;
    @(negedge clk); phase = PH_EXEC;
    #1;
    chk(n == en && z == ez, "N/Z flags");
    chk(mem_rd == u.rd && mem_wr == u.wr && mem_addr == mem_seen_addr, "memory strobes and address");
    if (u.wr) chk(mem_wdata == mdr, "write data = MDR");
    @(negedge clk); phase = PH_FETCH;
    // model register updates
    if (u.c < 16 || u.c == 30 || u.c == 31) r[u.c] = cval;
    if (u.mar) mar = u.marmux ? bl : sh;
    if (u.rd) mdr = word_t'(mem_seen_addr * 16'd7 + 16'h1234);
    else if (u.mdr) mdr = sh;
    for (int i = 0; i < 16; i++)
      chk(dut.u_regset.gp[i] == r[i], $sformatf("R%0d", i));
    chk(pc == r[31] && ir == r[30], "PC/IR");
    chk(mem_addr == mar && mem_wdata == mdr, "MAR/MDR");
  endtask

  initial begin
    uinstr_t u;
    for (int i = 0; i < 32; i++) r[i] = '0;
    al = '0; bl = '0; mar = '0; mdr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // R1 <- mem[MAR=0] via RD then C mux from MDR; R2 likewise at MAR=1
    u = '0; u.rd = 1; u.c = R_ZERO; step(u);
    u = '0; u.cmux = 1; u.c = 5'd1; step(u);
    u = '0; u.alatch = 1; u.a = R_ONE; u.marmux = 1; u.mar = 1; u.b = R_ONE; u.c = R_ZERO; step(u);
    u = '0; u.rd = 1; u.c = R_ZERO; step(u);
    u = '0; u.cmux = 1; u.c = 5'd2; step(u);
    chk(dut.u_regset.gp[1] == 16'h1234 && dut.u_regset.gp[2] == 16'h123B, "operands loaded");
    // The lecture's exercise: R4 <- R1 AND R2.
    u = '0; u.alatch = 1; u.alu = ALU_AND; u.a = 5'd1; u.b = 5'd2; u.c = 5'd4; step(u);
    chk(dut.u_regset.gp[4] == (16'h1234 & 16'h123B), "R4 = R1 AND R2");
    // PC <- 5 (PC = +1 shifted left twice plus one)
    u = '0; u.alatch = 1; u.a = R_ONE; u.shft = SH_SHL; u.c = R_PC; step(u);
    u = '0; u.alatch = 1; u.a = R_PC; u.shft = SH_SHL; u.c = R_PC; step(u);
    u = '0; u.alatch = 1; u.a = R_ONE; u.b = R_PC; u.alu = ALU_ADD; u.c = R_PC; step(u);
    // The lecture's fetch word: 0 0 1 00 01 00 1 0 10001 11111 11111
    u = '0; u.marmux = 1; u.alu = ALU_ADD; u.mar = 1; u.alatch = 1;
    u.a = 5'b10001; u.b = 5'b11111; u.c = 5'b11111; step(u);
    chk(mem_addr == 16'd5 && pc == 16'd6, "fetch: MAR <- PC, PC <- PC + 1");
    // A latch hold: latch R1, then AND with A field naming R2 but alatch = 0
    u = '0; u.alatch = 1; u.a = 5'd1; u.c = R_ZERO; step(u);
    u = '0; u.alatch = 0; u.a = 5'd2; u.b = R_ONE; u.alu = ALU_ADD; u.c = 5'd5; step(u);
    chk(dut.u_regset.gp[5] == 16'h1235, "A latch held R1");
    // MDR <- R4 from the C bus, then write it
    u = '0; u.alatch = 1; u.a = 5'd4; u.mdr = 1; u.c = R_ZERO; step(u);
    u = '0; u.wr = 1; u.c = R_ZERO; step(u);
    // random microinstructions
    for (int k = 0; k < 3000; k++) begin
      u = uinstr_t'({$urandom, $urandom});
      if (u.rd) begin u.mdr = 0; u.wr = 0; end
      step(u);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
