// Self-checking testbench of partial_product_array: every operand pair of
// the 4-bit default, each partial product compared with the bit product
// a[i] * b[j].
module partial_product_array_tb;
  localparam int unsigned N = 4;
  logic [N-1:0] a, b;
  logic [N-1:0] pp [N];
  int checks = 0, failures = 0;

  partial_product_array dut (.a(a), .b(b), .pp(pp));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = 0; va < (1 << N); va++) begin
      for (int vb = 0; vb < (1 << N); vb++) begin
        a = N'(va);
        b = N'(vb);
        #1;
        for (int j = 0; j < N; j++) begin
          for (int i = 0; i < N; i++) begin
            checks++;
            if (pp[j][i] !== 1'(((va >> i) & 1) * ((vb >> j) & 1))) begin
              failures++;
              $display("FAIL a=%h b=%h pp[%0d][%0d]=%b", a, b, j, i, pp[j][i]);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
