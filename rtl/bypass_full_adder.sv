// Modified full adder of the column-bypass multiplier.
//
// A plain full adder with two input isolation buffers and a 2-to-1 output
// multiplexer. While en (the multiplicand bit a_i of this column) is 1 the
// cell is an ordinary full adder of pp, s_in and c_in. While en is 0 the
// column's partial product is 0 and its incoming carry is 0, so the cell's
// result is simply s_in: the multiplexer passes s_in straight to s_out and
// the isolation buffers hold the adder's s_in and c_in pins at 0, so the
// adder does not switch while the column is idle.
//
// The published column-bypass cell uses tri-state buffers for isolation. A tri-state
// net inside programmable logic is implemented as gating anyway, so here each
// buffer is an AND gate with en; the adder's inputs then sit at a defined 0
// instead of floating. That is this design's own choice.
//
// c_out of a bypassed cell is 0 here. The multiplier still forces the
// last-row carries to 0 with AND gates, as the column-bypass scheme asks.
// Combinational; no clock, no reset.
module bypass_full_adder (
  input  logic en,     // column enable: multiplicand bit a_i
  input  logic pp,     // partial product a_i & b_j of this cell
  input  logic s_in,   // sum from the row above
  input  logic c_in,   // carry from the row above, same column
  output logic s_out,
  output logic c_out
);

  logic s_iso, c_iso;  // adder inputs behind the isolation buffers
  logic fa_s;

  always_comb begin
    s_iso = en & s_in;
    c_iso = en & c_in;
  end

  full_adder u_fa (
    .a(pp), .b(s_iso), .cin(c_iso), .s(fa_s), .cout(c_out)
  );

  // 2-to-1 multiplexer: bypass path when the column is disabled.
  always_comb s_out = en ? fa_s : s_in;

endmodule
