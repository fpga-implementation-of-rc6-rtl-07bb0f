// tb_rc6_serial_in: a behavioural sender performs the four-phase handshake
// with random delays and sends random 128-bit frames with random tags; the
// testbench checks each assembled block, its tag, that no bit is acknowledged
// while a block waits (sender stall), and the number of handshakes per block.
module tb_rc6_serial_in;
  logic         clk = 0, rst = 1;
  logic         sin_req, sin_data, sin_ack, blk_avail, blk_read;
  logic [1:0]   sin_tag, blk_tag;
  logic [127:0] blk_out;
  int checks = 0, failures = 0;
  int n_stall = 0;

  rc6_serial_in #(.TAG_W(2)) dut (.clk, .rst, .sin_req, .sin_data, .sin_tag, .sin_ack,
    .blk_out, .blk_tag, .blk_avail, .blk_read);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sender: bit 0 first. Its timing is unrelated to clk.
  task automatic send_frame(logic [127:0] v, logic [1:0] tag);
    for (int i = 0; i < 128; i++) begin
      repeat ($urandom_range(1, 30)) #1;
      sin_data = v[i]; sin_tag = tag;
      repeat ($urandom_range(1, 7)) #1;
      sin_req = 1;
      wait (sin_ack);
      repeat ($urandom_range(1, 30)) #1;
      sin_req = 0; sin_data = 1'($urandom); sin_tag = 2'($urandom);
      wait (!sin_ack);
    end
  endtask

  logic [127:0] frames [8];
  logic [1:0]   tags   [8];

  // Receiver: reads each block, sometimes late so that the sender stalls.
  initial begin
    blk_read = 0;
    @(negedge rst);
    for (int n = 0; n < 8; n++) begin
      int wait_cyc;
      @(negedge clk);
      while (!blk_avail) @(negedge clk);
      checks += 2;
      if (blk_out !== frames[n]) begin failures++; $display("FAIL frame %0d got %h expected %h", n, blk_out, frames[n]); end
      if (blk_tag !== tags[n]) begin failures++; $display("FAIL tag %0d got %b expected %b", n, blk_tag, tags[n]); end
      wait_cyc = (n % 2 != 0) ? 200 : 0;
      for (int c = 0; c < wait_cyc; c++) begin
        @(negedge clk);
        if (sin_req && !sin_ack) n_stall++;
        if (sin_ack && !blk_avail) begin failures++; $display("FAIL acknowledged while blocked"); end
      end
      blk_read = 1;
      @(negedge clk);
      blk_read = 0;
    end
    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL sender never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sin_req = 0; sin_data = 0; sin_tag = 0;
    for (int n = 0; n < 8; n++) begin
      frames[n] = {$urandom, $urandom, $urandom, $urandom};
      tags[n]   = 2'(n);
    end
    frames[0] = 128'h1;
    frames[1] = 128'h8000_0000_0000_0000_0000_0000_0000_0000;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 8; n++) send_frame(frames[n], tags[n]);
  end
endmodule
