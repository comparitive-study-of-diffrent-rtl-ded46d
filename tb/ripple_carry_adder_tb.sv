// Self-checking testbench of ripple_carry_adder: both cell variants (full
// adders and TSG reversible gates) at W = 4, all 512 combinations of x, y
// and cin, compared with the integer sum.
module ripple_carry_adder_tb;
  localparam int unsigned W = 4;
  logic [W-1:0] x, y, sum_fa, sum_tsg;
  logic         cin, cout_fa, cout_tsg;
  int checks = 0, failures = 0;

  ripple_carry_adder #(.W(W), .REVERSIBLE(1'b0)) dut_fa (
    .x(x), .y(y), .cin(cin), .sum(sum_fa), .cout(cout_fa)
  );
  ripple_carry_adder #(.W(W), .REVERSIBLE(1'b1)) dut_tsg (
    .x(x), .y(y), .cin(cin), .sum(sum_tsg), .cout(cout_tsg)
  );

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2 * W + 1)); v++) begin
      int unsigned want;
      {cin, x, y} = (2 * W + 1)'(v);
      #1;
      want = int'(x) + int'(y) + int'(cin);
      checks++;
      if ({cout_fa, sum_fa} !== (W + 1)'(want)) begin
        failures++;
        $display("FAIL fa  %0d+%0d+%0d = %0d", x, y, cin, {cout_fa, sum_fa});
      end
      checks++;
      if ({cout_tsg, sum_tsg} !== (W + 1)'(want)) begin
        failures++;
        $display("FAIL tsg %0d+%0d+%0d = %0d", x, y, cin, {cout_tsg, sum_tsg});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
