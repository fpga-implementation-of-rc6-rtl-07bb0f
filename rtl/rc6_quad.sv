// rc6_quad: the RC6 quadratic function f(X) = X * (2X + 1) mod 2^W.
//
// RC6 never needs a general multiplier: f(X) = 2*X^2 + X, so the product is
// built as an array squarer. The square of X is the sum of the diagonal terms
// x_i * 2^(2i) and, once for each pair i < j, the cross term x_i*x_j*2^(i+j+1).
// Doubling the square shifts every term left by one. Each row i of the array
// below holds x_i * 2^(2i+1) (diagonal, doubled) plus the cross terms
// x_i * x_j * 2^(i+j+2) for j > i, truncated to W bits; the rows and X itself
// are summed modulo 2^W. Only the bits below W are kept, so rows whose weight
// is at or above 2^W vanish, which makes the array roughly a quarter of a full
// W x W multiplier.
//
// Interface: purely combinational, x in, f out. No clock, no latency.
module rc6_quad #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] x,
  output logic [WIDTH-1:0] f
);

  // Partial-product row i: the doubled diagonal bit and the doubled cross terms
  // of bit i with every higher bit, all taken modulo 2^WIDTH.
  logic [WIDTH-1:0] row [WIDTH];

  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      row[i] = '0;
      if (2*i + 1 < WIDTH) row[i][2*i+1] = x[i];
      for (int j = i + 1; j < WIDTH; j++) begin
        if (i + j + 2 < WIDTH) row[i][i+j+2] = x[i] & x[j];
      end
    end
  end

  // Sum of the rows plus X itself.
  always_comb begin
    logic [WIDTH-1:0] acc;
    acc = x;
    for (int i = 0; i < WIDTH; i++) acc = acc + row[i];
    f = acc;
  end

endmodule
