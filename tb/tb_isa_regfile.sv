// tb_isa_regfile: random writes and four-port reads of the ISA register
// file against an array model, plus reset clearing all registers.
module tb_isa_regfile;
  logic        clk = 0, rst_n = 0, we = 0;
  logic [4:0]  waddr = '0, ra_r1 = '0, ra_r2 = '0, ra_b2 = '0, ra_b3 = '0;
  logic [15:0] wdata = '0, rd_r1, rd_r2, rd_b2, rd_b3;
  logic [15:0] model [32];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  isa_regfile dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 32; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 5'($urandom); wdata = 16'($urandom);
      ra_r1 = 5'($urandom); ra_r2 = 5'($urandom); ra_b2 = 5'($urandom); ra_b3 = 5'($urandom);
      #1;
      chk(rd_r1 == model[ra_r1] && rd_r2 == model[ra_r2], "R1/R2 ports");
      chk(rd_b2 == model[ra_b2] && rd_b3 == model[ra_b3], "B2/B3 ports");
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    @(negedge clk);
    we = 0; rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      ra_b3 = 5'(i); #1;
      chk(rd_b3 == 0, "cleared by reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
