// rc6_serial_out: parallel-to-serial output converter of the coprocessor.
//
// A finished 128-bit block is taken in one cycle (blk_write) into four
// 32-bit registers. The microcontroller then fetches it one bit per request
// with a four-phase handshake:
//   1. the receiver raises sout_req;
//   2. this block drives the next bit on sout_data and raises sout_ack;
//   3. the receiver reads the bit and lowers sout_req;
//   4. this block lowers sout_ack and moves to the following bit.
// Bits go out in the same order rc6_serial_in takes them: bit 0 of word A
// first, bit 31 of word D last. sout_valid tells the receiver that a block is
// waiting. full is high from blk_write until the last bit has been taken;
// the cipher unit holds its next result while full is high.
// Four 32-bit registers sent bit by bit on request follow the original design;
// the handshake protocol, bit order and sout_valid are this design's choices.
module rc6_serial_out
  import rc6_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  // cipher side
  input  logic [127:0] blk_in,
  input  logic         blk_write,
  output logic         full,
  // microcontroller side
  input  logic         sout_req,
  output logic         sout_ack,
  output logic         sout_data,
  output logic         sout_valid
);

  word_t      regs [4];
  logic [6:0] nbits;
  logic       req_s;

  rc6_sync #(.WIDTH(1)) u_sync_req (.clk, .rst, .din(sout_req), .dout(req_s));

  wire give_bit = req_s && !sout_ack && sout_valid;
  wire done_bit = !req_s && sout_ack;

  always_ff @(posedge clk) begin
    if (rst) begin
      sout_ack   <= 1'b0;
      sout_data  <= 1'b0;
      sout_valid <= 1'b0;
      nbits      <= '0;
    end else begin
      if (blk_write && !sout_valid) begin
        sout_valid <= 1'b1;
        nbits      <= '0;
      end else if (give_bit) begin
        sout_ack  <= 1'b1;
        sout_data <= regs[0][0];
      end else if (done_bit) begin
        sout_ack <= 1'b0;
        nbits    <= nbits + 1'b1;
        if (nbits == 7'd127) sout_valid <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (blk_write && !sout_valid) begin
      {regs[3], regs[2], regs[1], regs[0]} <= blk_in;
    end else if (done_bit) begin
      regs[3] <= {1'b0, regs[3][31:1]};
      for (int k = 0; k < 3; k++) regs[k] <= {regs[k+1][0], regs[k][31:1]};
    end
  end

  assign full = sout_valid;

  // The cipher side must respect full.
  assert property (@(posedge clk) disable iff (rst) blk_write |-> !sout_valid);

endmodule
