// Unsigned N x N array multiplier built from TSG reversible gates.
//
// The array is the Braun carry-save array of the plain multiplier, with every
// full adder replaced by a TSG reversible gate whose third input is tied to 0
// (the gate then delivers sum and carry on two outputs and two garbage
// outputs). The final ripple-carry adder is built from TSG gates too.
//
//   a       : multiplicand, N bits, unsigned
//   b       : multiplier,   N bits, unsigned
//   p       : product,     2N bits
// Combinational: p is valid one array delay after a and b settle. No clock.
//
// Replacing the full adders by TSG gates is the defining idea of this
// variant. How its partial products are formed is left open; they are made
// here with the same AND-gate array as in the other multipliers, which is
// this design's choice.
// The garbage outputs are left unconnected: they carry no result.
module reversible_multiplier #(
  parameter int unsigned N = mult_pkg::DEFAULT_N
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  if (N < 2) begin : g_bad_n
    $error("reversible_multiplier needs N >= 2");
  end

  logic [N-1:0] pp [N];

  partial_product_array #(.N(N)) u_pp (.a(a), .b(b), .pp(pp));

  for (genvar j = 0; j < N; j++) begin : row
    logic [N-1:0] s;   // sum outputs of row j, cell i has weight i+j
    logic [N-1:0] c;   // carry outputs of row j, cell i has weight i+j+1

    if (j == 0) begin : g_pp_row
      assign s = pp[0];
      assign c = '0;
    end else begin : g_tsg_row
      for (genvar i = 0; i < N; i++) begin : col
        logic s_above;
        logic garbage_p, garbage_q;  // reversible garbage outputs, unused
        if (i < N - 1) begin : g_inner
          assign s_above = row[j-1].s[i+1];
        end else begin : g_left
          assign s_above = 1'b0;
        end
        tsg_gate u_tsg (
          .a(pp[j][i]), .b(s_above), .c(1'b0), .d(row[j-1].c[i]),
          .p(garbage_p), .q(garbage_q), .r(s[i]), .s(c[i])
        );
      end
    end

    assign p[j] = s[0];
  end

  logic final_cout;  // always 0: the product fits in 2N bits

  ripple_carry_adder #(.W(N), .REVERSIBLE(1'b1)) u_rca (
    .x   ({1'b0, row[N-1].s[N-1:1]}),
    .y   (row[N-1].c),
    .cin (1'b0),
    .sum (p[2*N-1:N]),
    .cout(final_cout)
  );

endmodule
