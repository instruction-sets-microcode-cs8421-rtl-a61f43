// tb_agu: base + 10-bit displacement against a reference sum modulo 2^16.
module tb_agu;
  logic [15:0] base, ea;
  logic [9:0]  disp;
  int checks = 0, failures = 0;

  agu dut (.base(base), .disp(disp), .ea(ea));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      base = (i == 0) ? 16'hFFFF : 16'($urandom);
      disp = (i == 0) ? 10'h3FF : 10'($urandom);
      #1;
      checks++;
      if (int'(ea) != (int'(base) + int'(disp)) % 65536) begin
        failures++;
        $display("FAIL base=%h disp=%h ea=%h", base, disp, ea);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
