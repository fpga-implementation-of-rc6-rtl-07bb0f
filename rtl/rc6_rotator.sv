// rc6_rotator: variable left rotation of a W-bit word, built as a
// logarithmic barrel rotator.
//
// The rotation is split into log2(W) stages. Stage k rotates its input left by
// 2^k positions when bit k of the amount is set and passes it through
// otherwise, so each output bit of each stage is a single 2-to-1 multiplexer:
// 5 x 32 = 160 multiplexers for W = 32, instead of 32 one-stage 32-to-1
// multiplexers. A right rotation by n is obtained by the caller as a left
// rotation by (W - n) mod W.
//
// Interface: purely combinational. din is rotated left by amt (only the low
// log2(W) bits matter, as in RC6).
module rc6_rotator #(
  parameter int unsigned WIDTH = 32,
  localparam int unsigned LG   = $clog2(WIDTH)
) (
  input  logic [WIDTH-1:0] din,
  input  logic [LG-1:0]    amt,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] stage [LG+1];

  assign stage[0] = din;

  for (genvar k = 0; k < LG; k++) begin : g_stage
    localparam int unsigned SH = 1 << k;
    // Left rotation by 2^k, then a 2-to-1 choice per bit.
    wire [WIDTH-1:0] rotated = {stage[k][WIDTH-1-SH:0], stage[k][WIDTH-1:WIDTH-SH]};
    assign stage[k+1] = amt[k] ? rotated : stage[k];
  end

  assign dout = stage[LG];

endmodule
