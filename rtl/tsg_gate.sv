// TSG reversible gate (4 inputs, 4 outputs).
//
// A reversible gate maps its 4 input bits one-to-one onto its 4 output bits,
// so no input information is lost. The reversible multiplier uses one TSG
// gate wherever the plain array uses a full adder: with input c tied to 0,
// the gate computes
//   r = a ^ b ^ d          (sum)
//   s = (a & b) | ((a ^ b) & d)   (carry)
// and p, q are garbage outputs that exist only to keep the mapping one-to-one.
//
// The general equations are those of the TSG gate as published in the
// reversible-logic literature:
//   p = a
//   q = (~a & ~c) ^ ~b
//   r = q ^ d
//   s = (q & d) ^ ((a & b) ^ c)
// Combinational; no clock, no reset.
module tsg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);

  always_comb begin
    p = a;
    q = (~a & ~c) ^ ~b;
    r = q ^ d;
    s = (q & d) ^ ((a & b) ^ c);
  end

endmodule
