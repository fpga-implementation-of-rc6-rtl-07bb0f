// tb_rc6_key_schedule: runs the key expansion datapath with a behavioural
// model of the S array and the step sequence of the control unit (one load,
// 2r+4 init steps, 3*(2r+4) mixing steps), then compares every round key with
// the reference expansion. Keys of 16, 24 and 32 bytes are tried.
module tb_rc6_key_schedule;
  import rc6_pkg::*;
  import rc6_ref_pkg::*;

  localparam int R = 20;
  localparam int T = 2*R + 4;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One key-schedule instance per key length; each drives its own S model.
  logic [255:0] key;
  logic         load, init_step, mix_step;
  int           addr;

  word_t s16 [T], s24 [T], s32 [T];
  word_t wd16, wd24, wd32;
  logic  we16, we24, we32;

  rc6_key_schedule #(.KEY_BYTES(16)) dut16 (.clk, .rst, .key_in(key[127:0]), .load, .init_step,
    .mix_step, .s_rdata(s16[addr]), .s_wdata(wd16), .s_we(we16));
  rc6_key_schedule #(.KEY_BYTES(24)) dut24 (.clk, .rst, .key_in(key[191:0]), .load, .init_step,
    .mix_step, .s_rdata(s24[addr]), .s_wdata(wd24), .s_we(we24));
  rc6_key_schedule #(.KEY_BYTES(32)) dut32 (.clk, .rst, .key_in(key[255:0]), .load, .init_step,
    .mix_step, .s_rdata(s32[addr]), .s_wdata(wd32), .s_we(we32));

  always_ff @(posedge clk) begin
    if (we16) s16[addr] <= wd16;
    if (we24) s24[addr] <= wd24;
    if (we32) s32[addr] <= wd32;
  end

  task automatic expand_and_check(logic [255:0] k);
    sarr_t e16, e24, e32;
    @(negedge clk);
    key = k; load = 1; addr = 0;
    @(negedge clk);
    load = 0;
    for (int i = 0; i < T; i++) begin
      init_step = 1; addr = i;
      @(negedge clk);
    end
    init_step = 0;
    for (int p = 0; p < 3; p++)
      for (int i = 0; i < T; i++) begin
        mix_step = 1; addr = i;
        @(negedge clk);
      end
    mix_step = 0; addr = 0;
    e16 = expand(k, 16, R);
    e24 = expand(k, 24, R);
    e32 = expand(k, 32, R);
    for (int i = 0; i < T; i++) begin
      checks += 3;
      if (s16[i] !== e16[i]) begin failures++; $display("FAIL 16B S[%0d]=%h exp %h", i, s16[i], e16[i]); end
      if (s24[i] !== e24[i]) begin failures++; $display("FAIL 24B S[%0d]=%h exp %h", i, s24[i], e24[i]); end
      if (s32[i] !== e32[i]) begin failures++; $display("FAIL 32B S[%0d]=%h exp %h", i, s32[i], e32[i]); end
    end
  endtask

  initial begin
    load = 0; init_step = 0; mix_step = 0; addr = 0; key = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    expand_and_check('0);
    expand_and_check({128'h0, 128'h78675645_34231201_efcdab89_67452301});
    for (int n = 0; n < 6; n++)
      expand_and_check({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
