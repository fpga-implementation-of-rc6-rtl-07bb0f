// rc6_sync: two-flip-flop synchronizer for level signals that come from
// another clock domain (here the microcontroller's handshake lines).
// Each bit of din is sampled independently; dout follows din two clk edges
// later. Reset clears the chain.
module rc6_sync #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= '0;
      dout <= '0;
    end else begin
      meta <= din;
      dout <= meta;
    end
  end

endmodule
