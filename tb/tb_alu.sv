// tb_alu: random and corner-case test of the ALU's four operations and
// its N/Z flags against a reference computed here.
module tb_alu;
  import mic_pkg::*;

  alu_op_e op;
  word_t   a, b, y;
  logic    n, z;
  int      checks = 0, failures = 0;

  alu dut (.op(op), .a(a), .b(b), .y(y), .n(n), .z(z));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(alu_op_e o, word_t av, word_t bv);
    word_t exp;
    int    s;
    op = o; a = av; b = bv;
    #1;
    case (o)
      ALU_PASS: exp = av;
      ALU_ADD:  begin s = int'(av) + int'(bv); exp = word_t'(s % 65536); end
      ALU_AND:  begin
        exp = '0;
        for (int i = 0; i < 16; i++) exp[i] = av[i] & bv[i];
      end
      default:  exp = 16'hFFFF - av;
    endcase
    checks++;
    if (y !== exp || n !== (exp >= 16'h8000) || z !== (exp == 0)) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h y=%h n=%b z=%b exp=%h", o, av, bv, y, n, z, exp);
    end
  endtask

  initial begin
    try(ALU_ADD, 16'hFFFF, 16'h0001);   // wraps to zero: Z
    try(ALU_ADD, 16'h7FFF, 16'h0001);   // becomes negative: N
    try(ALU_NOT, 16'hFFFF, 16'h1234);   // complement to zero
    try(ALU_AND, 16'hF0F0, 16'h0F0F);   // zero
    try(ALU_PASS, 16'h8000, 16'h0000);  // negative pass
    for (int i = 0; i < 2000; i++)
      try(alu_op_e'($urandom_range(0, 3)), word_t'($urandom), word_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
