// tb_rc6_datapath: drives the block datapath with round keys from the
// reference expansion and the control sequence (load with pair 0 or r+1,
// r rounds, one post step), then compares the output with the reference
// encryption and decryption, including the published RC6 test vectors.
module tb_rc6_datapath;
  import rc6_pkg::*;
  import rc6_ref_pkg::*;

  localparam int R = 20;
  logic   clk = 0;
  block_t blk_in, blk_out;
  word_t  s_even, s_odd;
  mode_e  mode;
  logic   load, round_en, post_en;
  sarr_t  s;
  int checks = 0, failures = 0;

  rc6_datapath dut (.clk, .blk_in, .s_even, .s_odd, .mode, .load, .round_en, .post_en, .blk_out);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [127:0] din, bit dec, output logic [127:0] dout);
    @(negedge clk);
    blk_in = din; mode = dec ? MODE_DEC : MODE_ENC; load = 1;
    s_even = dec ? s[2*R+2] : s[0];
    s_odd  = dec ? s[2*R+3] : s[1];
    @(negedge clk);
    load = 0; blk_in = {4{$urandom}};
    for (int i = 1; i <= R; i++) begin
      int k;
      k = dec ? R + 1 - i : i;
      round_en = 1; s_even = s[2*k]; s_odd = s[2*k+1];
      @(negedge clk);
    end
    round_en = 0; post_en = 1;
    s_even = dec ? s[0] : s[2*R+2];
    s_odd  = dec ? s[1] : s[2*R+3];
    @(negedge clk);
    post_en = 0;
    dout = blk_out;
  endtask

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [127:0] pt, ct, out;
    load = 0; round_en = 0; post_en = 0; mode = MODE_ENC; blk_in = '0;
    // Published RC6-32/20/16 vectors (byte strings, first byte leftmost).
    s = expand('0, 16, R);
    run('0, 0, out);
    check("vector 1 enc", out, bytes_le(128'h8fc3a536_56b1f778_c129df4e_9848a41e));
    run(bytes_le(128'h8fc3a536_56b1f778_c129df4e_9848a41e), 1, out);
    check("vector 1 dec", out, '0);
    s = expand({128'h0, bytes_le(128'h01234567_89abcdef_01122334_45566778)}, 16, R);
    run(bytes_le(128'h02132435_46576879_8a9bacbd_cedfe0f1), 0, out);
    check("vector 2 enc", out, bytes_le(128'h524e192f_4715c623_1f51f636_7ea43f18));
    for (int n = 0; n < 40; n++) begin
      s = expand({128'h0, $urandom, $urandom, $urandom, $urandom}, 16, R);
      pt = {$urandom, $urandom, $urandom, $urandom};
      run(pt, 0, ct);
      check("random enc", ct, encrypt(pt, s, R));
      run(ct, 1, out);
      check("random dec", out, pt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
