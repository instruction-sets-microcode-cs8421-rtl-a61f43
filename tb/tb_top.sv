// tb_top: end-to-end test of the whole design at its default sizes.
//
// CPU part: loads the demonstration microprogram (ucode_pkg) into the
// control store, puts a macro program and its data in a behavioural
// memory, runs until the microcode reaches its HALT loop, and checks the
// memory results and accumulator against values worked out by hand.
// Along the way it counts how often each datapath and sequencing
// mechanism was used (every ALU and shifter code, each jump code taken
// and not taken, dispatch, each setting of the A, C and MAR muxes, A
// latch hold, MDR load, memory read and write) and fails any that never
// happened. It also checks that every microinstruction takes 3 clocks.
// ISA part: fills the ISA register file, presents one instruction of
// each format and checks the decoded fields, the R1/R2 operand values and
// both base + displacement addresses.
module tb_top;
  import mic_pkg::*;
  import isa_pkg::*;
  import ucode_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    cs_we, run;
  uaddr_t  cs_waddr;
  uinstr_t cs_wdata;
  word_t   mem_addr, mem_wdata, mem_rdata, pc, ir;
  logic    mem_rd, mem_wr, ucycle_done, ujump;
  uaddr_t  upc;

  logic [INSN_W-1:0] isa_insn;
  logic              isa_we;
  logic [REG_W-1:0]  isa_waddr;
  logic [15:0]       isa_wdata, isa_r1_val, isa_r2_val, isa_ea2, isa_ea3;
  fmt_e              isa_fmt;
  logic [OP_W-1:0]   isa_op;
  logic [REG_W-1:0]  isa_r1, isa_r2, isa_b2, isa_b3;
  logic [5:0]        isa_len, isa_variant;
  iclass_e           isa_iclass;
  logic              isa_illegal;

  top dut (.*);

  mem_model #(.DEPTH(4096)) u_mem (
    .clk(clk), .addr(mem_addr), .rd(mem_rd), .wr(mem_wr),
    .wdata(mem_wdata), .rdata(mem_rdata)
  );

  int checks = 0, failures = 0;
  int cycles = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) cycles <= cycles + 1;

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, sampled in the execute clock of each microinstruction.
  int n_alu[4], n_sh[4], n_taken[4], n_nottaken[4];
  int n_disp, n_amux[2], n_cmux[2], n_marmux[2], n_hold, n_mdr, n_rd, n_wr, n_uinstr;
  int last_done, bad_len;
  uinstr_t m;
  assign m = dut.u_cpu.u_seq.mir;

  initial begin
    for (int i = 0; i < 4; i++) begin
      n_alu[i] = 0; n_sh[i] = 0; n_taken[i] = 0; n_nottaken[i] = 0;
    end
    for (int i = 0; i < 2; i++) begin
      n_amux[i] = 0; n_cmux[i] = 0; n_marmux[i] = 0;
    end
    n_disp = 0; n_hold = 0; n_mdr = 0; n_rd = 0; n_wr = 0; n_uinstr = 0;
    last_done = -1; bad_len = 0;
  end

  always @(posedge clk) begin
    if (run && ucycle_done) begin
      n_uinstr++;
      if (last_done >= 0 && cycles - last_done != 3) bad_len++;
      last_done = cycles;
      n_alu[m.alu]++;
      n_sh[m.shft]++;
      if (m.disp) n_disp++;
      else if (ujump) n_taken[m.cond]++;
      else n_nottaken[m.cond]++;
      if (!m.cmux) n_amux[m.amux]++;
      n_cmux[m.cmux]++;
      if (m.mar) n_marmux[m.marmux]++;
      if (!m.alatch && !m.amux && !m.cmux && (m.cond == COND_N || m.cond == COND_Z)) n_hold++;
      if (m.mdr) n_mdr++;
      if (m.rd) n_rd++;
      if (m.wr) n_wr++;
    end
  end

  // Macro program (addresses in words).
  task automatic load_program();
    u_mem.m[0]  = minst(OP_LODD, 10'd100);
    u_mem.m[1]  = minst(OP_MULD, 10'd101);
    u_mem.m[2]  = minst(OP_STOD, 10'd102);
    u_mem.m[3]  = minst(OP_ADDD, 10'd103);
    u_mem.m[4]  = minst(OP_JNEG, 10'd6);
    u_mem.m[5]  = minst(OP_HALT, 10'd0);
    u_mem.m[6]  = minst(OP_ANDD, 10'd104);
    u_mem.m[7]  = minst(OP_NOTA, 10'd0);
    u_mem.m[8]  = minst(OP_ROTL, 10'd0);
    u_mem.m[9]  = minst(OP_STOD, 10'd105);
    u_mem.m[10] = minst(OP_LODD, 10'd106);
    u_mem.m[11] = minst(OP_JZER, 10'd13);
    u_mem.m[12] = minst(OP_HALT, 10'd0);
    u_mem.m[13] = minst(OP_LODD, 10'd108);
    u_mem.m[14] = minst(OP_ADDD, 10'd107);
    u_mem.m[15] = minst(OP_STOD, 10'd109);
    u_mem.m[16] = minst(OP_JNEG, 10'd5);
    u_mem.m[17] = minst(OP_JZER, 10'd19);
    u_mem.m[18] = minst(OP_JUMP, 10'd14);
    u_mem.m[19] = minst(OP_HALT, 10'd0);
    u_mem.m[100] = 16'd7;
    u_mem.m[101] = 16'd6;
    u_mem.m[103] = 16'hFFCE;   // -50
    u_mem.m[104] = 16'h00F0;
    u_mem.m[106] = 16'd0;
    u_mem.m[107] = 16'hFFFF;   // -1
    u_mem.m[108] = 16'd3;
    u_mem.m[109] = 16'hAAAA;
  endtask

  function automatic logic [INSN_W-1:0] left(logic [INSN_W-1:0] v, int unsigned len);
    return v << (INSN_W - len);
  endfunction

  initial begin
    int halt_seen;
    cs_we = 0; run = 0; cs_waddr = '0; cs_wdata = '0;
    isa_insn = '0; isa_we = 0; isa_waddr = '0; isa_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Load the control store.
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      cs_we = 1; cs_waddr = uaddr_t'(a); cs_wdata = ucode_word(a);
    end
    @(negedge clk);
    cs_we = 0;
    load_program();
    @(negedge clk);
    run = 1;
    halt_seen = 0;
    while (halt_seen < 3) begin
      @(posedge clk);
      if (ucycle_done && upc == UA_HALT) halt_seen++;
    end
    run = 0;
    @(posedge clk);

    check(dut.u_cpu.u_dp.u_regset.gp[15] == 16'h03FF, "mask register R15 = 0x03FF");
    check(u_mem.m[102] == 16'd42, $sformatf("M[102] = 7*6 = 42, got %0d", u_mem.m[102]));
    check(u_mem.m[105] == 16'hFE1F, $sformatf("M[105] = 0xFE1F, got %h", u_mem.m[105]));
    check(u_mem.m[109] == 16'd0, $sformatf("M[109] = 0, got %h", u_mem.m[109]));
    check(dut.u_cpu.u_dp.u_regset.gp[0] == 16'd0, "AC = 0 at halt");
    check(pc == 16'd20, $sformatf("PC = 20 after HALT at 19, got %0d", pc));
    check(ir == minst(OP_HALT, 10'd0), "IR holds HALT");
    check(bad_len == 0, "every microinstruction takes 3 clocks");

    // Every mechanism must have happened.
    for (int i = 0; i < 4; i++) begin
      check(n_alu[i] > 0, $sformatf("ALU code %0d used", i));
      check(n_sh[i] > 0, $sformatf("shift code %0d used", i));
    end
    check(n_taken[COND_N] > 0,    "jump on N taken");
    check(n_nottaken[COND_N] > 0, "jump on N not taken");
    check(n_taken[COND_Z] > 0,    "jump on Z taken");
    check(n_nottaken[COND_Z] > 0, "jump on Z not taken");
    check(n_taken[COND_ALW] > 0,  "unconditional jump");
    check(n_nottaken[COND_NONE] > 0, "sequential next address");
    check(n_disp == 27, $sformatf("one dispatch per macro-instruction (27), got %0d", n_disp));
    check(n_amux[0] > 0 && n_amux[1] > 0, "A mux both inputs");
    check(n_cmux[0] > 0 && n_cmux[1] > 0, "C mux both inputs");
    check(n_marmux[0] > 0 && n_marmux[1] > 0, "MAR mux both inputs");
    check(n_hold > 0, "A latch held across a microinstruction");
    check(n_mdr > 0, "MDR loaded from C bus");
    check(n_rd > 0 && n_wr > 0, "memory read and write");
    check(u_mem.writes == 5, $sformatf("5 memory writes, got %0d", u_mem.writes));
    $display("mechanisms: alu %0d/%0d/%0d/%0d shift %0d/%0d/%0d/%0d N %0d/%0d Z %0d/%0d ALW %0d disp %0d hold %0d rd %0d wr %0d uinstr %0d",
             n_alu[0], n_alu[1], n_alu[2], n_alu[3], n_sh[0], n_sh[1], n_sh[2], n_sh[3],
             n_taken[1], n_nottaken[1], n_taken[2], n_nottaken[2], n_taken[3], n_disp,
             n_hold, n_rd, n_wr, n_uinstr);

    // ISA front end: register i holds 0x100 * i + 3, then one instruction
    // of each format.
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      isa_we = 1; isa_waddr = REG_W'(i); isa_wdata = 16'(256 * i + 3);
    end
    @(negedge clk);
    isa_we = 0;
    // A: op 20 (R1 <- R1 OP Mem, variant 4), R1 = 3, B2 = 7, D2 = 0x155
    isa_insn = left({2'b00, 6'd20, 5'd3, 5'd7, 10'h155}, 28);
    #1;
    check(isa_fmt == FMT_A && isa_len == 6'd28 && isa_iclass == IC_RM && isa_variant == 6'd4
          && isa_r1 == 5'd3 && isa_b2 == 5'd7 && isa_r1_val == 16'h0303
          && isa_ea2 == 16'h0703 + 16'h155 && !isa_illegal, "format A decode");
    // B: op 9, R1 = 17, R2 = 30
    isa_insn = left({2'b01, 4'd9, 5'd17, 5'd30}, 16);
    #1;
    check(isa_fmt == FMT_B && isa_len == 6'd16 && isa_iclass == IC_RR && isa_op == 7'd9
          && isa_r1 == 5'd17 && isa_r2 == 5'd30 && isa_r1_val == 16'h1103 && isa_r2_val == 16'h1E03,
          "format B decode and operands");
    // C: op 40 (Mem <- R1 OP R2, variant 8), R1 1, R2 2, B3 31, D3 0x3FF
    isa_insn = left({2'b10, 7'd40, 5'd1, 5'd2, 5'd31, 10'h3FF}, 34);
    #1;
    check(isa_fmt == FMT_C && isa_len == 6'd34 && isa_iclass == IC_MRR && isa_variant == 6'd8
          && isa_b3 == 5'd31 && isa_ea3 == 16'h1F03 + 16'h3FF, "format C decode");
    @(negedge clk);
    isa_we = 1; isa_waddr = 5'd31; isa_wdata = 16'hFF00;
    @(negedge clk);
    isa_we = 0;
    #1;
    check(isa_ea3 == 16'h02FF, "format C address after a register write wraps");
    // D: op 15, R1 4, B2 5, D2 6, B3 8, D3 9
    isa_insn = {2'b11, 4'd15, 5'd4, 5'd5, 10'd6, 5'd8, 10'd9};
    #1;
    check(isa_fmt == FMT_D && isa_len == 6'd41 && isa_iclass == IC_MM && isa_r1 == 5'd4
          && isa_b2 == 5'd5 && isa_b3 == 5'd8 && isa_ea2 == 16'h0503 + 16'd6
          && isa_ea3 == 16'h0803 + 16'd9, "format D decode");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
