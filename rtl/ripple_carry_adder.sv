// W-bit ripple-carry adder, the final stage of the array multipliers.
//
// The carry-save rows of an array multiplier leave a sum vector and a carry
// vector; this adder merges them into the upper half of the product. Bit k
// adds x[k], y[k] and the carry from bit k-1; the carry ripples from bit 0
// to bit W-1 and leaves as cout.
//
// REVERSIBLE selects the cell: 0 builds the adder from ordinary full adders,
// 1 from TSG reversible gates (third input tied to 0), as the reversible
// multiplier replaces every full adder by a TSG gate.
// Combinational; no clock, no reset.
module ripple_carry_adder #(
  parameter int unsigned W          = mult_pkg::DEFAULT_N,
  parameter bit          REVERSIBLE = 1'b0
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  for (genvar k = 0; k < W; k++) begin : bitpos
    logic ci;   // carry into this bit
    logic co;   // carry out of this bit

    if (k == 0) begin : g_first
      assign ci = cin;
    end else begin : g_next
      assign ci = bitpos[k-1].co;
    end

    if (REVERSIBLE) begin : g_tsg
      logic garbage_p, garbage_q;  // reversible garbage outputs, unused
      tsg_gate u_cell (
        .a(x[k]), .b(y[k]), .c(1'b0), .d(ci),
        .p(garbage_p), .q(garbage_q), .r(sum[k]), .s(co)
      );
    end else begin : g_fa
      full_adder u_cell (
        .a(x[k]), .b(y[k]), .cin(ci), .s(sum[k]), .cout(co)
      );
    end
  end

  assign cout = bitpos[W-1].co;

endmodule
