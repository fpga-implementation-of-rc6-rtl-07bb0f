// rc6_control: control unit of the RC6 main module.
//
// One state machine sequences both the key expansion and the cipher. Two
// counters are used: cnt, the word index during key expansion and the round
// index during a block, and pass, the number of completed mixing passes.
//
//   IDLE   no key yet. When key_avail is high: pulse key_read, load the key.
//   INIT   2r+4 cycles, cnt = 0 .. 2r+3: S[cnt] = P32 + cnt*Q32.
//   MIX    3 passes of 2r+4 cycles over S (3*max(c, 2r+4) steps; this design
//          requires c <= 2r+4, i.e. keys of at most 8r+16 bytes).
//   READY  ready = 1. A new key (key_avail) takes priority and restarts the
//          expansion; otherwise data_avail pulses data_read, latches enc_dec
//          and performs the first whitening step.
//   ROUND  r cycles, cnt = 1 .. r. Encryption reads key pair cnt, decryption
//          key pair r+1-cnt.
//   POST   one cycle: last whitening step into the output register.
//   WRITE  wait while full is high; then pulse data_write and return to READY.
//
// Timing: ready rises 1 + 4*(2r+4) cycles after key_read (177 for r = 20).
// data_write comes r+2 cycles after data_read when full is low (22 for r = 20).
// ready stays high from the end of the key expansion until a new key is read.
// The cipher sequence (whitening, r rounds, whitening) and the two counters
// follow the original control unit; the state list and cycle counts are this
// design's own.
module rc6_control
  import rc6_pkg::*;
#(
  parameter int unsigned ROUNDS = 20,
  localparam int unsigned NWORDS = 2*ROUNDS + 4,
  localparam int unsigned NPAIRS = ROUNDS + 2,
  localparam int unsigned AW     = $clog2(NWORDS),
  localparam int unsigned PW     = $clog2(NPAIRS)
) (
  input  logic          clk,
  input  logic          rst,
  // handshakes of the main module
  input  logic          key_avail,
  output logic          key_read,
  input  logic          data_avail,
  output logic          data_read,
  input  mode_e         enc_dec,
  input  logic          full,
  output logic          data_write,
  output logic          ready,
  // key schedule control
  output logic          ks_load,
  output logic          ks_init_step,
  output logic          ks_mix_step,
  output logic [AW-1:0] ks_addr,
  // datapath control
  output logic [PW-1:0] pair_addr,
  output mode_e         mode,
  output logic          dp_load,
  output logic          dp_round,
  output logic          dp_post
);

  typedef enum logic [2:0] {
    ST_IDLE, ST_INIT, ST_MIX, ST_READY, ST_ROUND, ST_POST, ST_WRITE
  } state_e;

  state_e        state;
  logic [AW-1:0] cnt;
  logic [1:0]    pass;
  mode_e         mode_q;

  wire last_word = (cnt == AW'(NWORDS - 1));
  wire take_key  = (state == ST_IDLE || state == ST_READY) && key_avail;
  wire take_data = (state == ST_READY) && !key_avail && data_avail;

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= ST_IDLE;
      cnt    <= '0;
      pass   <= '0;
      mode_q <= MODE_ENC;
      ready  <= 1'b0;
    end else begin
      unique case (state)
        ST_IDLE, ST_READY: begin
          if (take_key) begin
            state <= ST_INIT;
            cnt   <= '0;
            ready <= 1'b0;
          end else if (take_data) begin
            state  <= ST_ROUND;
            cnt    <= AW'(1);
            mode_q <= enc_dec;
          end
        end
        ST_INIT: begin
          cnt <= last_word ? '0 : cnt + 1'b1;
          if (last_word) begin
            state <= ST_MIX;
            pass  <= '0;
          end
        end
        ST_MIX: begin
          cnt <= last_word ? '0 : cnt + 1'b1;
          if (last_word) begin
            pass <= pass + 1'b1;
            if (pass == 2'd2) begin
              state <= ST_READY;
              ready <= 1'b1;
            end
          end
        end
        ST_ROUND: begin
          cnt <= cnt + 1'b1;
          if (cnt == AW'(ROUNDS)) state <= ST_POST;
        end
        ST_POST:  state <= ST_WRITE;
        ST_WRITE: if (!full) state <= ST_READY;
        default:  state <= ST_IDLE;
      endcase
    end
  end

  assign key_read     = take_key;
  assign ks_load      = take_key;
  assign data_read    = take_data;
  assign data_write   = (state == ST_WRITE) && !full;
  assign ks_init_step = (state == ST_INIT);
  assign ks_mix_step  = (state == ST_MIX);
  assign ks_addr      = cnt;
  assign dp_load      = take_data;
  assign dp_round     = (state == ST_ROUND);
  assign dp_post      = (state == ST_POST);

  // During the load cycle the mode comes straight from the pin; afterwards
  // the value latched with the block is used.
  assign mode = take_data ? enc_dec : mode_q;

  always_comb begin
    pair_addr = '0;
    if (take_data) begin
      pair_addr = (enc_dec == MODE_DEC) ? PW'(NPAIRS - 1) : '0;
    end else if (state == ST_ROUND) begin
      pair_addr = (mode_q == MODE_DEC) ? PW'(ROUNDS + 1 - cnt) : PW'(cnt);
    end else if (state == ST_POST) begin
      pair_addr = (mode_q == MODE_DEC) ? '0 : PW'(NPAIRS - 1);
    end
  end

endmodule
