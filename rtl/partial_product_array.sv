// Partial-product generator: an N x N array of AND gates.
//
// Row j of the output holds the multiplicand a gated by multiplier bit b[j]:
//   pp[j][i] = a[i] & b[j]     (weight i + j)
// All N*N partial products are formed in parallel, as in every multiplier of
// this family. Combinational; no clock, no reset.
module partial_product_array #(
  parameter int unsigned N = mult_pkg::DEFAULT_N
) (
  input  logic [N-1:0] a,            // multiplicand
  input  logic [N-1:0] b,            // multiplier
  output logic [N-1:0] pp [N]        // pp[j] = a & {N{b[j]}}
);

  always_comb begin
    for (int j = 0; j < N; j++) begin
      pp[j] = a & {N{b[j]}};
    end
  end

endmodule
