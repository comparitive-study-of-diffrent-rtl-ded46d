// One-bit full adder, the basic cell of the Braun array multiplier.
//
// Adds three bits of equal weight and returns a sum bit and a carry bit one
// weight higher. Purely combinational; no clock, no reset.
//
//   a, b, cin : the three addend bits
//   s         : a ^ b ^ cin
//   cout      : majority(a, b, cin)
//
// The gate-level form (two XORs, AND-OR majority) is the textbook one; the
// cell is used unchanged in the plain array, in the column-bypass array (inside
// its modified cell) and in the final ripple-carry adders.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);

  logic ab_x;

  always_comb begin
    ab_x = a ^ b;
    s    = ab_x ^ cin;
    cout = (a & b) | (ab_x & cin);
  end

endmodule
