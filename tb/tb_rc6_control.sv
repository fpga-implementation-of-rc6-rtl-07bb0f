// tb_rc6_control: checks the control unit's sequencing on its own: key
// expansion step counts and addresses, the ready latency, the key-pair
// addresses of an encryption and of a decryption, the data_write latency,
// holding the result while full is high, and a new key taking priority over
// waiting data.
module tb_rc6_control;
  import rc6_pkg::*;

  localparam int R = 20;
  localparam int T = 2*R + 4;
  logic       clk = 0, rst = 1;
  logic       key_avail, key_read, data_avail, data_read, full, data_write, ready;
  mode_e      enc_dec, mode;
  logic       ks_load, ks_init_step, ks_mix_step, dp_load, dp_round, dp_post;
  logic [5:0] ks_addr;
  logic [4:0] pair_addr;
  int checks = 0, failures = 0;

  rc6_control #(.ROUNDS(R)) dut (.clk, .rst, .key_avail, .key_read, .data_avail, .data_read,
    .enc_dec, .full, .data_write, .ready, .ks_load, .ks_init_step, .ks_mix_step, .ks_addr,
    .pair_addr, .mode, .dp_load, .dp_round, .dp_post);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Key expansion: counts from the key_read cycle to ready.
  task automatic do_key();
    int cyc, n_init, n_mix, addr_err;
    n_init = 0; n_mix = 0; addr_err = 0; cyc = 0;
    @(negedge clk);
    key_avail = 1;
    #1;
    check("key_read", int'(key_read), 1);
    check("ks_load with key_read", int'(ks_load), 1);
    do begin
      @(negedge clk);
      key_avail = 0;
      cyc++;
      if (ks_init_step) begin
        if (ks_addr != 6'(n_init)) addr_err++;
        n_init++;
      end
      if (ks_mix_step) begin
        if (ks_addr != 6'(n_mix % T)) addr_err++;
        n_mix++;
      end
    end while (!ready && cyc < 1000);
    check("init steps", n_init, T);
    check("mix steps", n_mix, 3*T);
    check("key address errors", addr_err, 0);
    check("ready latency", cyc, 1 + 4*T);
  endtask

  // One block; full is held high for hold cycles when the result is due.
  task automatic do_block(mode_e m, int hold);
    int cyc, rounds, pair_err;
    cyc = 0; rounds = 0; pair_err = 0;
    @(negedge clk);
    data_avail = 1; enc_dec = m; full = (hold > 0);
    #1;
    check("data_read", int'(data_read), 1);
    check("load pair", int'(pair_addr), (m == MODE_DEC) ? R + 1 : 0);
    while (!data_write && cyc < 1000) begin
      @(negedge clk);
      data_avail = 0; enc_dec = (m == MODE_DEC) ? MODE_ENC : MODE_DEC;   // pin may change now
      cyc++;
      if (cyc == R + 2 + hold) full = 0;
      #1;
      if (dp_round) begin
        rounds++;
        if (int'(pair_addr) != ((m == MODE_DEC) ? R + 1 - rounds : rounds)) pair_err++;
        if (mode != m) pair_err++;
      end
      if (dp_post) check("post pair", int'(pair_addr), (m == MODE_DEC) ? 0 : R + 1);
    end
    check("rounds", rounds, R);
    check("round pair/mode errors", pair_err, 0);
    check("data_write latency", cyc, R + 2 + hold);
  endtask

  initial begin
    key_avail = 0; data_avail = 0; full = 0; enc_dec = MODE_ENC;
    repeat (3) @(negedge clk);
    rst = 0;
    // data before any key is ignored
    data_avail = 1;
    repeat (5) @(negedge clk);
    check("no data_read without key", int'(data_read), 0);
    data_avail = 0;
    do_key();
    do_block(MODE_ENC, 0);
    do_block(MODE_DEC, 0);
    do_block(MODE_ENC, 7);
    do_block(MODE_DEC, 3);
    // key and data both waiting: the key goes first
    @(negedge clk);
    key_avail = 1; data_avail = 1;
    #1;
    check("key before data", int'(key_read), 1);
    check("no data_read with key", int'(data_read), 0);
    @(negedge clk);
    key_avail = 0; data_avail = 0;
    repeat (4*T) @(negedge clk);
    check("ready after second key", int'(ready), 1);
    do_key();
    do_block(MODE_ENC, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
