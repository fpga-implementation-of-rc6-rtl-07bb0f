// tb_rc6_main: exercises the RC6 main module through its handshakes:
// key expansion and ready latency, the published RC6-32/20/16 vectors in
// both directions, random keys and blocks against the reference model,
// data_write latency, holding results while full is high, and a key change
// between blocks.
module tb_rc6_main;
  import rc6_ref_pkg::*;

  localparam int R = 20;
  logic         clk = 0, rst = 1;
  logic [127:0] key_in, data_in, data_out;
  logic         key_avail, key_read, data_avail, data_read, enc_dec, full, data_write, ready;
  int checks = 0, failures = 0;
  int n_stall = 0;

  rc6_main dut (.clk, .rst, .key_in, .key_avail, .key_read, .data_in, .data_avail, .data_read,
    .enc_dec, .full, .data_out, .data_write, .ready);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic load_key(logic [127:0] k);
    int cyc;
    cyc = 0;
    @(negedge clk);
    key_in = k; key_avail = 1;
    #1;
    check("key_read", 128'(key_read), 128'd1);
    do begin
      @(negedge clk);
      key_avail = 0; key_in = {4{$urandom}};
      cyc++;
    end while (!ready && cyc < 1000);
    check("ready latency", 128'(cyc), 128'(1 + 4*(2*R+4)));
  endtask

  task automatic run(logic [127:0] din, bit dec, int hold, output logic [127:0] dout);
    int cyc;
    cyc = 0;
    @(negedge clk);
    data_in = din; enc_dec = dec; data_avail = 1; full = (hold > 0);
    #1;
    check("data_read", 128'(data_read), 128'd1);
    do begin
      @(negedge clk);
      data_avail = 0; data_in = {4{$urandom}}; enc_dec = 1'($urandom);
      cyc++;
      if (cyc > R + 2) n_stall++;
      if (cyc == R + 2 + hold) full = 0;
      #1;
    end while (!data_write && cyc < 1000);
    dout = data_out;
    check("data_write latency", 128'(cyc), 128'(unsigned'(R + 2 + hold)));
  endtask

  initial begin
    logic [127:0] k, pt, ct, out;
    sarr_t s;
    key_avail = 0; data_avail = 0; full = 0; enc_dec = 0; key_in = 0; data_in = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // vector 1: zero key, zero plaintext
    load_key('0);
    run('0, 0, 0, out);
    check("vector 1 enc", out, bytes_le(128'h8fc3a536_56b1f778_c129df4e_9848a41e));
    run(out, 1, 0, out);
    check("vector 1 dec", out, '0);
    // vector 2
    load_key(bytes_le(128'h01234567_89abcdef_01122334_45566778));
    run(bytes_le(128'h02132435_46576879_8a9bacbd_cedfe0f1), 0, 0, out);
    check("vector 2 enc", out, bytes_le(128'h524e192f_4715c623_1f51f636_7ea43f18));
    run(bytes_le(128'h524e192f_4715c623_1f51f636_7ea43f18), 1, 5, out);
    check("vector 2 dec", out, bytes_le(128'h02132435_46576879_8a9bacbd_cedfe0f1));
    // random keys and blocks
    for (int n = 0; n < 8; n++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      s = expand({128'h0, k}, 16, R);
      load_key(k);
      for (int b = 0; b < 4; b++) begin
        pt = {$urandom, $urandom, $urandom, $urandom};
        run(pt, 0, (b == 1) ? 9 : 0, ct);
        check("random enc", ct, encrypt(pt, s, R));
        run(ct, 1, (b == 2) ? 4 : 0, out);
        check("random dec", out, pt);
      end
    end
    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL full never stalled the unit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
