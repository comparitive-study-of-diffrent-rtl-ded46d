// Unsigned N x N Braun array multiplier (carry-save array).
//
// Partial products a_i & b_j come from an AND-gate array. Row 0 of the array
// is the partial-product row a & b_0 itself. Each further row j (1..N-1)
// is a row of N full adders: cell i adds partial product a_i b_j, the sum of
// cell i+1 of the row above (0 for the leftmost cell) and the carry of cell i
// of the row above. Carries therefore move down the array (carry save)
// instead of along a row, so a row costs one full-adder delay. The low
// product bit of each row is product bit j; the sum and carry vectors left
// after the last row are merged by an N-bit ripple-carry adder into product
// bits N..2N-1.
//
//   a       : multiplicand, N bits, unsigned
//   b       : multiplier,   N bits, unsigned
//   p       : product,     2N bits
// Combinational: p is valid one array delay after a and b settle. No clock.
//
// The structure follows the classic Braun array. Using full adders with a 0
// input where a half adder would do (row 1 and the leftmost cells) is this
// design's own simplification; synthesis removes the constant inputs.
module array_multiplier #(
  parameter int unsigned N = mult_pkg::DEFAULT_N
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  if (N < 2) begin : g_bad_n
    $error("array_multiplier needs N >= 2");
  end

  logic [N-1:0] pp [N];

  partial_product_array #(.N(N)) u_pp (.a(a), .b(b), .pp(pp));

  for (genvar j = 0; j < N; j++) begin : row
    logic [N-1:0] s;   // sum outputs of row j, cell i has weight i+j
    logic [N-1:0] c;   // carry outputs of row j, cell i has weight i+j+1

    if (j == 0) begin : g_pp_row
      assign s = pp[0];
      assign c = '0;
    end else begin : g_fa_row
      for (genvar i = 0; i < N; i++) begin : col
        logic s_above;
        if (i < N - 1) begin : g_inner
          assign s_above = row[j-1].s[i+1];
        end else begin : g_left
          assign s_above = 1'b0;
        end
        full_adder u_fa (
          .a(pp[j][i]), .b(s_above), .cin(row[j-1].c[i]),
          .s(s[i]), .cout(c[i])
        );
      end
    end

    assign p[j] = s[0];
  end

  logic final_cout;  // always 0: the product fits in 2N bits

  ripple_carry_adder #(.W(N), .REVERSIBLE(1'b0)) u_rca (
    .x   ({1'b0, row[N-1].s[N-1:1]}),
    .y   (row[N-1].c),
    .cin (1'b0),
    .sum (p[2*N-1:N]),
    .cout(final_cout)
  );

endmodule
