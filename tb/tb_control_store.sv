// tb_control_store: writes random microinstructions to all 256 words
// and reads them back in a shuffled order.
module tb_control_store;
  import mic_pkg::*;

  logic    clk = 0, we = 0;
  uaddr_t  waddr = '0, raddr = '0;
  uinstr_t wdata = '0, rdata;
  uinstr_t model [256];
  int      checks = 0, failures = 0;

  always #5 clk = ~clk;

  control_store dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < 256; i++) begin
        @(negedge clk);
        we = 1; waddr = uaddr_t'(i);
        wdata = uinstr_t'({$urandom, $urandom});
        model[i] = wdata;
      end
      @(negedge clk);
      we = 0;
      for (int i = 0; i < 256; i++) begin
        raddr = uaddr_t'((i * 37 + pass) % 256);
        #1;
        checks++;
        if (rdata !== model[raddr]) begin
          failures++;
          $display("FAIL addr %0d", raddr);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
