// The three compared N x N multipliers, side by side.
//
// The comparison covers three ways of building the same unsigned array
// multiplier: the plain Braun carry-save array, the low-power column-bypass
// array, and an array whose full adders are TSG reversible gates. They are
// independent circuits, so each has its own operand and product ports; tie
// the operand ports together to compare them on the same input stream.
//
//   arr_a, arr_b -> arr_p : Braun array multiplier
//   byp_a, byp_b -> byp_p : column-bypass multiplier
//   rev_a, rev_b -> rev_p : reversible (TSG) multiplier
// All paths are combinational; there is no clock and no reset.
module multiplier_top #(
  parameter int unsigned N = mult_pkg::DEFAULT_N
) (
  input  logic [N-1:0]   arr_a,
  input  logic [N-1:0]   arr_b,
  output logic [2*N-1:0] arr_p,
  input  logic [N-1:0]   byp_a,
  input  logic [N-1:0]   byp_b,
  output logic [2*N-1:0] byp_p,
  input  logic [N-1:0]   rev_a,
  input  logic [N-1:0]   rev_b,
  output logic [2*N-1:0] rev_p
);

  array_multiplier #(.N(N)) u_array (
    .a(arr_a), .b(arr_b), .p(arr_p)
  );

  column_bypass_multiplier #(.N(N)) u_bypass (
    .a(byp_a), .b(byp_b), .p(byp_p)
  );

  reversible_multiplier #(.N(N)) u_reversible (
    .a(rev_a), .b(rev_b), .p(rev_p)
  );

endmodule
