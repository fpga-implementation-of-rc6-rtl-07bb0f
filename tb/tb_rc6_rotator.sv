// tb_rc6_rotator: checks the barrel rotator against shift-based rotation for
// every amount and random words.
module tb_rc6_rotator;
  logic [31:0] din, dout;
  logic [4:0]  amt;
  int checks = 0, failures = 0;

  rc6_rotator #(.WIDTH(32)) dut (.din, .amt, .dout);

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 32; n++) begin
      for (int i = 0; i < 40; i++) begin
        logic [31:0] v, e;
        v = (i == 0) ? 32'h0000_0001 : (i == 1) ? 32'h8000_0001 : $urandom;
        din = v;
        amt = 5'(n);
        #1;
        e = (n == 0) ? v : ((v << n) | (v >> (32 - n)));
        checks++;
        if (dout !== e) begin
          failures++;
          $display("FAIL din=%h amt=%0d dout=%h expected=%h", v, n, dout, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
