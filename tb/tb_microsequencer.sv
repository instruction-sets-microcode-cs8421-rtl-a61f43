// tb_microsequencer: drives the sequencer from a random control store
// held here, with random N, Z and IR op-code, and checks for each
// microcycle: the three phases in order, the MIR equal to the word at
// MPC, exec only in the execute phase, and the next MPC chosen by the
// jump code or the dispatch exactly as the jump rules say. Also checks
// that run = 0 freezes it and that reset returns MPC to 0.
module tb_microsequencer;
  import mic_pkg::*;

  logic    clk = 0, rst_n = 0, run = 0, n = 0, z = 0, exec, taken;
  logic [OPC_W-1:0] ir_opc = '0;
  uinstr_t cs_rdata, mir;
  uaddr_t  upc;
  phase_e  phase;
  uinstr_t store [256];
  int checks = 0, failures = 0;
  int n_kind [5];

  always #5 clk = ~clk;
  assign cs_rdata = store[upc];

  microsequencer dut (.*);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    uaddr_t pc_before, exp_next;
    for (int i = 0; i < 256; i++) begin
      store[i] = uinstr_t'({$urandom, $urandom});
      store[i].disp = ($urandom_range(0, 7) == 0);
    end
    for (int i = 0; i < 5; i++) n_kind[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(upc == 0 && phase == PH_FETCH, "reset state");
    run = 1;
    for (int k = 0; k < 3000; k++) begin
      // phase FETCH
      chk(phase == PH_FETCH && !exec, "fetch phase");
      pc_before = upc;
      if ($urandom_range(0, 9) == 0) begin
        // hold run low for a few clocks: nothing may change
        run = 0;
        repeat (3) @(negedge clk);
        chk(phase == PH_FETCH && upc == pc_before, "run=0 holds");
        run = 1;
      end
      @(negedge clk);
      chk(phase == PH_READ && mir == store[pc_before] && !exec, "read phase, MIR loaded");
      @(negedge clk);
      chk(phase == PH_EXEC && exec, "exec phase");
      n = 1'($urandom); z = 1'($urandom); ir_opc = OPC_W'($urandom);
      #1;
      if (mir.disp) begin exp_next = {ir_opc, 2'b00}; n_kind[4]++; end
      else if (mir.cond == COND_ALW || (mir.cond == COND_N && n) || (mir.cond == COND_Z && z)) begin
        exp_next = mir.addr; n_kind[mir.cond]++;
      end else begin
        exp_next = pc_before + 8'd1; n_kind[0]++;
      end
      @(negedge clk);
      chk(upc == exp_next, $sformatf("next MPC from %0d cond %0d disp %0d n%0d z%0d: got %0d exp %0d",
          pc_before, mir.cond, mir.disp, n, z, upc, exp_next));
    end
    for (int i = 0; i < 5; i++) chk(n_kind[i] > 0, $sformatf("next-address kind %0d seen", i));
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    chk(upc == 0 && phase == PH_FETCH, "reset again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
