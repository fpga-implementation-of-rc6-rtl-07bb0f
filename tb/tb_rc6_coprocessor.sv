// tb_rc6_coprocessor: end-to-end test of the crypto-coprocessor at its
// default parameters. A behavioural microcontroller sends 128-bit frames bit
// by bit and fetches results bit by bit with the four-phase handshakes. The
// test covers: the built-in key expanded after reset, encryption and
// decryption (switching mode between frames), a new key sent as a key frame,
// the cipher holding a result while the output converter is full, and the
// sender stalling while the input converter holds a block. Every result is
// compared with the reference model, and each of those mechanisms is counted;
// one that never happens counts as a failure.
module tb_rc6_coprocessor;
  import rc6_ref_pkg::*;

  localparam int R = 20;
  localparam logic [127:0] BUILTIN_KEY = 128'hefcdab10_32547698_efcdab10_32547698;

  logic clk = 0, rst = 1;
  logic mcu_sin_req, mcu_sin_data, mcu_key_sel, mcu_dec, fpga_sin_ack;
  logic mcu_sout_req, fpga_sout_ack, fpga_sout_data, fpga_sout_valid, fpga_ready;
  int checks = 0, failures = 0;
  int n_keyexp = 0, n_enc = 0, n_dec = 0, n_mode_switch = 0, n_out_stall = 0, n_in_stall = 0;

  rc6_coprocessor dut (.clk, .rst, .mcu_sin_req, .mcu_sin_data, .mcu_key_sel, .mcu_dec,
    .fpga_sin_ack, .mcu_sout_req, .fpga_sout_ack, .fpga_sout_data, .fpga_sout_valid, .fpga_ready);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism monitors.
  logic ready_q = 0;
  always @(posedge clk) begin
    ready_q <= fpga_ready;
    if (!rst && fpga_ready && !ready_q) n_keyexp++;
    if (dut.full && dut.u_main.u_control.state == 3'd6) n_out_stall++;
    if (mcu_sin_req && !fpga_sin_ack && dut.in_avail) n_in_stall++;
  end

  task automatic send_frame(logic [127:0] v, bit key_sel, bit dec);
    for (int i = 0; i < 128; i++) begin
      repeat ($urandom_range(1, 20)) #1;
      mcu_sin_data = v[i]; mcu_key_sel = key_sel; mcu_dec = dec;
      repeat ($urandom_range(1, 5)) #1;
      mcu_sin_req = 1;
      wait (fpga_sin_ack);
      repeat ($urandom_range(1, 20)) #1;
      mcu_sin_req = 0;
      wait (!fpga_sin_ack);
    end
  endtask

  task automatic receive_frame(output logic [127:0] v);
    wait (fpga_sout_valid);
    for (int i = 0; i < 128; i++) begin
      repeat ($urandom_range(1, 20)) #1;
      mcu_sout_req = 1;
      wait (fpga_sout_ack);
      repeat ($urandom_range(1, 5)) #1;
      v[i] = fpga_sout_data;
      mcu_sout_req = 0;
      wait (!fpga_sout_ack);
    end
  endtask

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Expected results, in order, for the receiving side.
  logic [127:0] expq [$];
  bit           last_dec = 0;

  task automatic send_data(logic [127:0] v, bit dec, logic [127:0] exp);
    expq.push_back(exp);
    if (dec != last_dec) n_mode_switch++;
    last_dec = dec;
    if (dec) n_dec++; else n_enc++;
    send_frame(v, 0, dec);
  endtask

  int n_expected = 0;
  bit sender_done = 0;

  // Receiver: runs alongside the sender; sometimes pauses so results pile up.
  initial begin
    logic [127:0] got;
    mcu_sout_req = 0;
    @(negedge rst);
    forever begin
      receive_frame(got);
      if (expq.size() == 0) begin
        failures++; $display("FAIL unexpected result %h", got);
      end else begin
        check("result", got, expq.pop_front());
      end
      n_expected++;
      if (n_expected == 3) #40000;  // let the next results back up
    end
  end

  initial begin
    logic [127:0] pt, ct, k;
    sarr_t s;
    int cyc;
    mcu_sin_req = 0; mcu_sin_data = 0; mcu_key_sel = 0; mcu_dec = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // built-in key expanded after reset
    cyc = 0;
    while (!fpga_ready && cyc < 1000) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 1 + 4*(2*R+4)) begin failures++; $display("FAIL ready after reset at %0d", cyc); end
    s = expand({128'h0, BUILTIN_KEY}, 16, R);
    pt = bytes_le(128'h075978AB_DEA78639_46BCFA27_3D763DEC);
    ct = encrypt(pt, s, R);
    send_data(pt, 0, ct);
    send_data(ct, 1, pt);
    for (int n = 0; n < 4; n++) begin
      pt = {$urandom, $urandom, $urandom, $urandom};
      send_data(pt, 1'(n % 2), (n % 2 != 0) ? decrypt(pt, s, R) : encrypt(pt, s, R));
    end
    // new key over the link
    k = {$urandom, $urandom, $urandom, $urandom};
    send_frame(k, 1, 0);
    s = expand({128'h0, k}, 16, R);
    for (int n = 0; n < 3; n++) begin
      pt = {$urandom, $urandom, $urandom, $urandom};
      ct = encrypt(pt, s, R);
      send_data(pt, 0, ct);
      send_data(ct, 1, pt);
    end
    wait (expq.size() == 0);
    repeat (20) @(negedge clk);
    checks++;
    if (n_expected != 12) begin failures++; $display("FAIL received %0d results", n_expected); end
    $display("mechanisms: key expansions=%0d enc=%0d dec=%0d mode switches=%0d output-full stall cycles=%0d input stall cycles=%0d",
             n_keyexp, n_enc, n_dec, n_mode_switch, n_out_stall, n_in_stall);
    checks += 6;
    if (n_keyexp < 2)      begin failures++; $display("FAIL key reload never happened"); end
    if (n_enc == 0)        begin failures++; $display("FAIL no encryption"); end
    if (n_dec == 0)        begin failures++; $display("FAIL no decryption"); end
    if (n_mode_switch == 0) begin failures++; $display("FAIL no mode switch"); end
    if (n_out_stall == 0)  begin failures++; $display("FAIL output full never stalled the cipher"); end
    if (n_in_stall == 0)   begin failures++; $display("FAIL input never stalled the sender"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
