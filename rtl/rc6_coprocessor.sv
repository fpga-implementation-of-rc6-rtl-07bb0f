// rc6_coprocessor: RC6 crypto-coprocessor for a microcontroller bus.
//
// The microcontroller hands the coprocessor 128-bit blocks bit by bit,
// the coprocessor encrypts or decrypts each block with RC6-32/r/16 and hands
// the result back bit by bit. Three parts in a row:
//   rc6_serial_in   serial-to-parallel input (four 32-bit buffers),
//   rc6_main        key schedule plus cipher,
//   rc6_serial_out  parallel-to-serial output (four 32-bit registers).
// Both serial links use a four-phase req/ack handshake (see those modules),
// so the microcontroller's clock need not be related to clk.
//
// Keys: after reset the coprocessor expands the built-in key DEFAULT_KEY, so
// it works with a fixed, pre-agreed key without any key transfer. The
// microcontroller may send a new key as an ordinary 128-bit frame with
// mcu_key_sel high; that key is expanded before the next data block.
// mcu_dec selects decryption (1) or encryption (0) for a data frame; both tag
// lines are sampled with the last bit of the frame. fpga_ready is high when a
// key is expanded and the cipher can accept data.
// Timing per block (r = 20): 128 input handshakes, 22 clk cycles of cipher,
// 128 output handshakes. A key expansion takes 177 cycles.
// The input / cipher / output split follows the original design; the built-in
// key register, key frames and the tag lines are this design's choices.
module rc6_coprocessor
  import rc6_pkg::*;
#(
  parameter int unsigned   ROUNDS      = 20,
  parameter logic [127:0]  DEFAULT_KEY = 128'hefcdab10_32547698_efcdab10_32547698
) (
  input  logic clk,
  input  logic rst,
  // microcontroller -> coprocessor
  input  logic mcu_sin_req,
  input  logic mcu_sin_data,
  input  logic mcu_key_sel,
  input  logic mcu_dec,
  output logic fpga_sin_ack,
  // coprocessor -> microcontroller
  input  logic mcu_sout_req,
  output logic fpga_sout_ack,
  output logic fpga_sout_data,
  output logic fpga_sout_valid,
  // status
  output logic fpga_ready
);

  logic [127:0] in_blk, out_blk, key_reg;
  logic [1:0]   in_tag;          // {key frame, decrypt}
  logic         in_avail, in_read;
  logic         key_pending, key_read;
  logic         data_avail, data_read, data_write, full;

  rc6_serial_in #(.TAG_W(2)) u_serial_in (
    .clk, .rst,
    .sin_req (mcu_sin_req),
    .sin_data(mcu_sin_data),
    .sin_tag ({mcu_key_sel, mcu_dec}),
    .sin_ack (fpga_sin_ack),
    .blk_out (in_blk),
    .blk_tag (in_tag),
    .blk_avail(in_avail),
    .blk_read(in_read)
  );

  // Key register: loaded with the built-in key at reset and with every key
  // frame; key_pending offers it to the cipher until it is read.
  wire take_key_frame = in_avail && in_tag[1] && !key_pending;

  always_ff @(posedge clk) begin
    if (rst) begin
      key_reg     <= DEFAULT_KEY;
      key_pending <= 1'b1;
    end else if (take_key_frame) begin
      key_reg     <= in_blk;
      key_pending <= 1'b1;
    end else if (key_read) begin
      key_pending <= 1'b0;
    end
  end

  assign data_avail = in_avail && !in_tag[1];
  assign in_read    = take_key_frame || data_read;

  rc6_main #(.ROUNDS(ROUNDS), .KEY_BYTES(16)) u_main (
    .clk, .rst,
    .key_in    (key_reg),
    .key_avail (key_pending),
    .key_read,
    .data_in   (in_blk),
    .data_avail,
    .data_read,
    .enc_dec   (in_tag[0]),
    .full,
    .data_out  (out_blk),
    .data_write,
    .ready     (fpga_ready)
  );

  rc6_serial_out u_serial_out (
    .clk, .rst,
    .blk_in   (out_blk),
    .blk_write(data_write),
    .full,
    .sout_req (mcu_sout_req),
    .sout_ack (fpga_sout_ack),
    .sout_data(fpga_sout_data),
    .sout_valid(fpga_sout_valid)
  );

endmodule
