// rc6_serial_in: serial-to-parallel input converter of the coprocessor.
//
// The microcontroller sends a 128-bit block one bit at a time with a
// four-phase request/acknowledge handshake, which tolerates the two devices
// running from unrelated clocks:
//   1. the sender puts the bit on sin_data (and the block's tag bits on
//      sin_tag) and raises sin_req;
//   2. this block shifts the bit in and raises sin_ack;
//   3. the sender lowers sin_req; 4. this block lowers sin_ack.
// sin_req is synchronized to clk here; sin_data and sin_tag are stable while
// sin_req is high and are sampled only then.
// Bits fill four 32-bit buffers, least significant bit of word A first and
// most significant bit of word D last, so a byte-serial sender that sends each
// byte LSB first delivers the block in RC6 byte order.
// When the 128th bit arrives the block is presented on blk_out with blk_avail
// high, together with the tag sampled with that bit, until blk_read. While a
// block waits, the next bit is not acknowledged: the sender stalls.
// Bit-serial input into four 32-bit buffers follows the original design; the
// handshake protocol, bit order and tag lines are this design's choices.
module rc6_serial_in
  import rc6_pkg::*;
#(
  parameter int unsigned TAG_W = 2
) (
  input  logic             clk,
  input  logic             rst,
  // microcontroller side
  input  logic             sin_req,
  input  logic             sin_data,
  input  logic [TAG_W-1:0] sin_tag,
  output logic             sin_ack,
  // cipher side
  output logic [127:0]     blk_out,
  output logic [TAG_W-1:0] blk_tag,
  output logic             blk_avail,
  input  logic             blk_read
);

  word_t      buffer [4];
  logic [6:0] nbits;
  logic       req_s;

  rc6_sync #(.WIDTH(1)) u_sync_req (.clk, .rst, .din(sin_req), .dout(req_s));

  wire take_bit = req_s && !sin_ack && !blk_avail;

  always_ff @(posedge clk) begin
    if (rst) begin
      sin_ack   <= 1'b0;
      nbits     <= '0;
      blk_avail <= 1'b0;
      blk_tag   <= '0;
    end else begin
      if (take_bit) begin
        sin_ack <= 1'b1;
        nbits   <= nbits + 1'b1;
        if (nbits == 7'd127) begin
          blk_avail <= 1'b1;
          blk_tag   <= sin_tag;
        end
      end else if (!req_s && sin_ack) begin
        sin_ack <= 1'b0;
      end
      if (blk_read && blk_avail) blk_avail <= 1'b0;
    end
  end

  // Shift right through the four buffers: a new bit enters at the top of D
  // and, after 128 bits, the first one sits in bit 0 of A.
  always_ff @(posedge clk) begin
    if (take_bit) begin
      buffer[3] <= {sin_data, buffer[3][31:1]};
      for (int k = 0; k < 3; k++) buffer[k] <= {buffer[k+1][0], buffer[k][31:1]};
    end
  end

  assign blk_out = {buffer[3], buffer[2], buffer[1], buffer[0]};

  // A bit is acknowledged only once per request.
  assert property (@(posedge clk) disable iff (rst) take_bit |=> sin_ack);

endmodule
