// tb_shifter: checks pass, shift right, shift left and rotate left on
// random words, bit by bit against a reference built here.
module tb_shifter;
  import mic_pkg::*;

  sh_op_e op;
  word_t  d, q;
  int     checks = 0, failures = 0;

  shifter dut (.op(op), .d(d), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(sh_op_e o, word_t dv);
    word_t exp;
    op = o; d = dv;
    #1;
    case (o)
      SH_NONE: exp = dv;
      SH_SHR:  exp = word_t'(dv / 2);
      SH_SHL:  exp = word_t'((32'(dv) * 2) % 65536);
      default: exp = word_t'((32'(dv) * 2) % 65536 + 32'(dv >= 16'h8000));
    endcase
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL op=%0d d=%h q=%h exp=%h", o, dv, q, exp);
    end
  endtask

  initial begin
    try(SH_ROT, 16'h8001);
    try(SH_SHL, 16'h8001);
    try(SH_SHR, 16'h8001);
    for (int i = 0; i < 2000; i++) try(sh_op_e'($urandom_range(0, 3)), word_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
