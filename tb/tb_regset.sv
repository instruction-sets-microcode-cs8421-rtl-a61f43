// tb_regset: random writes and reads of every register code against a
// model: 16 general registers, IR, PC, constants 0 and +1, unused codes
// reading 0 and ignoring writes, and reset clearing everything.
module tb_regset;
  import mic_pkg::*;

  logic  clk = 0, rst_n = 0, c_we = 0;
  rsel_t a_sel = '0, b_sel = '0, c_sel = '0;
  word_t c_data = '0, a_bus, b_bus, ir, pc;
  int    checks = 0, failures = 0;
  word_t model [32];

  always #5 clk = ~clk;

  regset dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t expect_rd(rsel_t s);
    if (s == 5'd16) return 16'd0;
    if (s == 5'd17) return 16'd1;
    return model[s];
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 32; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // after reset everything reads 0 except constant +1
    for (int i = 0; i < 32; i++) begin
      a_sel = rsel_t'(i); b_sel = rsel_t'(31 - i);
      #1;
      chk(a_bus == expect_rd(rsel_t'(i)) && b_bus == expect_rd(rsel_t'(31 - i)), $sformatf("reset read %0d", i));
    end
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      c_sel  = rsel_t'($urandom_range(0, 31));
      c_data = word_t'($urandom);
      c_we   = ($urandom_range(0, 3) != 0);
      a_sel  = rsel_t'($urandom_range(0, 31));
      b_sel  = rsel_t'($urandom_range(0, 31));
      #1;
      chk(a_bus == expect_rd(a_sel), $sformatf("A read code %0d", a_sel));
      chk(b_bus == expect_rd(b_sel), $sformatf("B read code %0d", b_sel));
      @(posedge clk);
      if (c_we && (c_sel < 16 || c_sel == 5'd30 || c_sel == 5'd31)) model[c_sel] = c_data;
      #1;
      chk(ir == model[30] && pc == model[31], "IR/PC outputs");
    end
    @(negedge clk);
    rst_n = 0;
    @(posedge clk); #1;
    rst_n = 1;
    a_sel = 5'd31; b_sel = 5'd5; #1;
    chk(a_bus == 0 && b_bus == 0, "reset clears PC and R5");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
