// tb_rc6_quad: checks f(X) = X(2X+1) mod 2^32 against a full 64-bit product,
// for edge values and random words.
module tb_rc6_quad;
  logic [31:0] x, f;
  int checks = 0, failures = 0;

  rc6_quad #(.WIDTH(32)) dut (.x, .f);

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] v);
    logic [63:0] p;
    x = v;
    #1;
    p = 64'(v) * (64'(v) * 64'd2 + 64'd1);
    checks++;
    if (f !== p[31:0]) begin
      failures++;
      $display("FAIL x=%h f=%h expected=%h", v, f, p[31:0]);
    end
  endtask

  initial begin
    check(32'h0); check(32'h1); check(32'hFFFF_FFFF); check(32'h8000_0000);
    check(32'h0001_0000); check(32'h5555_5555); check(32'hAAAA_AAAA);
    for (int i = 0; i < 32; i++) check(32'h1 << i);
    for (int i = 0; i < 3000; i++) check($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
