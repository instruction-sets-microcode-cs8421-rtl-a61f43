// tb_isa_decoder: builds random instructions of all four formats by
// appending fields one after another (most significant first), then
// checks every decoded field, the length, the class, the variant number
// and the illegal flag for the op-code ranges of each format.
module tb_isa_decoder;
  import isa_pkg::*;

  logic [INSN_W-1:0] insn;
  fmt_e              fmt;
  logic [OP_W-1:0]   op;
  logic [REG_W-1:0]  r1, r2, b2, b3;
  logic [DISP_W-1:0] d2, d3;
  logic [5:0]        len, variant;
  iclass_e           iclass;
  logic              illegal;
  int checks = 0, failures = 0;

  isa_decoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Append a field of width w to a bit string held in an integer.
  longint unsigned acc;
  int unsigned     used;
  function automatic void put(longint unsigned v, int unsigned w);
    acc  = (acc << w) | (v & ((64'd1 << w) - 1));
    used = used + w;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int k = 0; k < 4000; k++) begin
      int unsigned f, o, vr1, vr2, vb2, vd2, vb3, vd3, ow;
      iclass_e ec; int unsigned ev;
      f = k % 4;
      vr1 = $urandom_range(0, 31); vr2 = $urandom_range(0, 31);
      vb2 = $urandom_range(0, 31); vb3 = $urandom_range(0, 31);
      vd2 = $urandom_range(0, 1023); vd3 = $urandom_range(0, 1023);
      ow = (f == 0) ? 6 : (f == 2) ? 7 : 4;
      o = $urandom_range(0, (1 << ow) - 1);
      acc = 0; used = 0;
      put(f, 2); put(o, ow);
      case (f)
        0: begin put(vr1, 5); put(vb2, 5); put(vd2, 10); end
        1: begin put(vr1, 5); put(vr2, 5); end
        2: begin put(vr1, 5); put(vr2, 5); put(vb3, 5); put(vd3, 10); end
        default: begin put(vr1, 5); put(vb2, 5); put(vd2, 10); put(vb3, 5); put(vd3, 10); end
      endcase
      insn = INSN_W'(acc << (INSN_W - used));
      // junk in the bits after the instruction
      for (int i = 0; i < INSN_W - int'(used); i++) insn[i] = 1'($urandom);
      // expected class
      ec = IC_ILLEGAL; ev = 0;
      case (f)
        0: if (o < 8) begin ec = IC_STORE; ev = o; end
           else if (o < 16) begin ec = IC_LOAD; ev = o - 8; end
           else if (o < 48) begin ec = IC_RM; ev = o - 16; end
        1: begin ec = IC_RR; ev = o; end
        2: if (o < 32) begin ec = IC_RM2; ev = o; end
           else if (o < 96) begin ec = IC_MRR; ev = o - 32; end
        default: begin ec = IC_MM; ev = o; end
      endcase
      #1;
      chk(int'(fmt) == f && int'(op) == o && int'(len) == used, $sformatf("fmt/op/len k=%0d", k));
      chk(iclass == ec && (ec == IC_ILLEGAL || int'(variant) == ev) && illegal == (ec == IC_ILLEGAL),
          $sformatf("class k=%0d f=%0d op=%0d", k, f, o));
      chk(int'(r1) == vr1, "R1 field");
      case (f)
        0: chk(int'(b2) == vb2 && int'(d2) == vd2, "A base/disp");
        1: chk(int'(r2) == vr2, "B R2");
        2: chk(int'(r2) == vr2 && int'(b3) == vb3 && int'(d3) == vd3, "C fields");
        default: chk(int'(b2) == vb2 && int'(d2) == vd2 && int'(b3) == vb3 && int'(d3) == vd3, "D fields");
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
