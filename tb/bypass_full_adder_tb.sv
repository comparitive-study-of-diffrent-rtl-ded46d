// Self-checking testbench of bypass_full_adder, all 16 input combinations.
// Enabled (en = 1): s_out and c_out are the sum and carry of pp + s_in + c_in.
// Bypassed (en = 0): s_out equals s_in, c_out is 0, and the inner adder's
// sum and carry inputs are held at 0 by the isolation buffers.
module bypass_full_adder_tb;
  logic en, pp, s_in, c_in, s_out, c_out;
  int checks = 0, failures = 0;

  bypass_full_adder dut (
    .en(en), .pp(pp), .s_in(s_in), .c_in(c_in), .s_out(s_out), .c_out(c_out)
  );

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {en, pp, s_in, c_in} = 4'(v);
      #1;
      if (en) begin
        int unsigned total;
        total = int'(pp) + int'(s_in) + int'(c_in);
        checks++;
        if ({c_out, s_out} !== 2'(total)) begin
          failures++;
          $display("FAIL enabled pp=%b s_in=%b c_in=%b got c=%b s=%b", pp, s_in, c_in, c_out, s_out);
        end
      end else begin
        checks++;
        if (s_out !== s_in || c_out !== 1'b0) begin
          failures++;
          $display("FAIL bypass s_in=%b got c=%b s=%b", s_in, c_out, s_out);
        end
        checks++;
        if (dut.u_fa.b !== 1'b0 || dut.u_fa.cin !== 1'b0) begin
          failures++;
          $display("FAIL bypass: adder inputs not isolated (s_in=%b c_in=%b)", s_in, c_in);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
