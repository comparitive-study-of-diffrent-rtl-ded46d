// Unsigned N x N column-bypass multiplier (low-power Braun array).
//
// Same carry-save array as the plain Braun multiplier, but every full adder
// is a modified cell (bypass_full_adder) enabled by the multiplicand bit of
// its column. Column i of the array holds the cells that add the partial
// products a_i b_j (j = 1..N-1). If a_i is 0 all of those partial products
// are 0, the column's first carry-in is 0 and so every carry of the column is
// 0: each cell's result is just the sum arriving from the row above. The
// whole column is then bypassed: its cells pass that sum through a
// multiplexer and their adders are isolated, so they do not switch. Saving
// that switching is the point of the design; the multiplexers lengthen the
// critical path.
//
// The carries leaving the last row are ANDed with their column's a_i before
// the final ripple-carry adder, so a bypassed column always hands on a carry
// of 0. The final adder is a plain N-bit ripple-carry adder.
//
//   a       : multiplicand, N bits, unsigned; a[i] enables column i
//   b       : multiplier,   N bits, unsigned
//   p       : product,     2N bits
// Combinational: p is valid one array delay after a and b settle. No clock.
//
// The published scheme numbers the bypassed column i+1 for multiplicand bit
// a_i; here columns are numbered from 0, so a[i] controls column i. The
// bypass condition, the modified cell and the last-row AND gates follow that
// scheme; the gate-level isolation buffers are this design's choice.
module column_bypass_multiplier #(
  parameter int unsigned N = mult_pkg::DEFAULT_N
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  if (N < 2) begin : g_bad_n
    $error("column_bypass_multiplier needs N >= 2");
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
        bypass_full_adder u_cell (
          .en   (a[i]),
          .pp   (pp[j][i]),
          .s_in (s_above),
          .c_in (row[j-1].c[i]),
          .s_out(s[i]),
          .c_out(c[i])
        );
      end
    end

    assign p[j] = s[0];
  end

  // AND gates on the last row's carries: a bypassed column passes carry 0.
  logic [N-1:0] last_carry;
  assign last_carry = row[N-1].c & a;

  logic final_cout;  // always 0: the product fits in 2N bits

  ripple_carry_adder #(.W(N), .REVERSIBLE(1'b0)) u_rca (
    .x   ({1'b0, row[N-1].s[N-1:1]}),
    .y   (last_carry),
    .cin (1'b0),
    .sum (p[2*N-1:N]),
    .cout(final_cout)
  );

endmodule
