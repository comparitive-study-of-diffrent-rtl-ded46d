// Self-checking testbench of tsg_gate.
// Checks, over all 16 inputs: the gate is reversible (16 distinct outputs),
// p copies a, q is a ^ b when c = 0 and ~b when c = 1, and with c = 0 the
// outputs r and s are the sum and carry of a + b + d (the full-adder use).
module tsg_gate_tb;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  bit seen [16];

  tsg_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[k]) seen[k] = 1'b0;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      // one-to-one mapping
      checks++;
      if (seen[{p, q, r, s}]) begin
        failures++;
        $display("FAIL not reversible: output %b repeats (input %b)", {p, q, r, s}, v[3:0]);
      end
      seen[{p, q, r, s}] = 1'b1;
      checks++;
      if (p !== a) begin failures++; $display("FAIL p != a for %b", v[3:0]); end
      checks++;
      if (q !== (c ? ~b : (a ^ b))) begin failures++; $display("FAIL q for %b", v[3:0]); end
      if (!c) begin
        int unsigned total;
        total = int'(a) + int'(b) + int'(d);
        checks++;
        if ({s, r} !== 2'(total)) begin
          failures++;
          $display("FAIL full-adder use a=%b b=%b d=%b got s=%b r=%b", a, b, d, s, r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
