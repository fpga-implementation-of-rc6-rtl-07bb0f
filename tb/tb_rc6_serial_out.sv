// tb_rc6_serial_out: loads random blocks into the output converter and has a
// behavioural receiver fetch them bit by bit with the four-phase handshake at
// random speeds; checks each received block, that full stays high until the
// last bit is taken, and that sout_valid announces every block.
module tb_rc6_serial_out;
  logic         clk = 0, rst = 1;
  logic [127:0] blk_in;
  logic         blk_write, full, sout_req, sout_ack, sout_data, sout_valid;
  int checks = 0, failures = 0;

  rc6_serial_out dut (.clk, .rst, .blk_in, .blk_write, .full, .sout_req, .sout_ack,
    .sout_data, .sout_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic receive_frame(output logic [127:0] v, output int full_low);
    full_low = 0;
    for (int i = 0; i < 128; i++) begin
      repeat ($urandom_range(1, 30)) #1;
      sout_req = 1;
      wait (sout_ack);
      repeat ($urandom_range(1, 10)) #1;
      v[i] = sout_data;
      if (i < 127 && !full) full_low++;
      sout_req = 0;
      wait (!sout_ack);
    end
  endtask

  initial begin
    logic [127:0] sent, got;
    int full_low;
    blk_write = 0; blk_in = 0; sout_req = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 8; n++) begin
      sent = (n == 0) ? 128'h1 : (n == 1) ? {1'b1, 127'h0} : {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk);
      checks++;
      if (full || sout_valid) begin failures++; $display("FAIL busy before block %0d", n); end
      blk_in = sent; blk_write = 1;
      @(negedge clk);
      blk_write = 0; blk_in = {4{$urandom}};
      checks += 2;
      if (!full) begin failures++; $display("FAIL full not set"); end
      if (!sout_valid) begin failures++; $display("FAIL sout_valid not set"); end
      receive_frame(got, full_low);
      checks += 2;
      if (got !== sent) begin failures++; $display("FAIL block %0d got %h expected %h", n, got, sent); end
      if (full_low != 0) begin failures++; $display("FAIL full dropped early %0d times", full_low); end
      repeat (4) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
