// Self-checking testbench of the Braun array multiplier.
// The default 4x4 instance is checked on all 256 operand pairs, including
// 13 x 13 = 169 (1101 x 1101 = 10101001); an 8x8 instance is checked on
// 3000 random pairs and on the corner operands 0 and 255. Expected products
// are integer products. The multiplier is combinational, so each product
// is checked in the same time step as its operands (zero latency).
module array_multiplier_tb;
  localparam int unsigned N  = 4;
  localparam int unsigned NB = 8;
  logic [N-1:0]    a,  b;
  logic [2*N-1:0]  p;
  logic [NB-1:0]   ab, bb;
  logic [2*NB-1:0] pb;
  int checks = 0, failures = 0;

  array_multiplier dut (.a(a), .b(b), .p(p));
  array_multiplier #(.N(NB)) dut_wide (.a(ab), .b(bb), .p(pb));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_wide(input logic [NB-1:0] x, input logic [NB-1:0] y);
    ab = x;
    bb = y;
    #1;
    checks++;
    if (pb !== (2*NB)'(int'(x) * int'(y))) begin
      failures++;
      $display("FAIL %0dx%0d: %0d * %0d = %0d", NB, NB, x, y, pb);
    end
  endtask

  initial begin
    ab = '0;
    bb = '0;
    for (int va = 0; va < (1 << N); va++) begin
      for (int vb = 0; vb < (1 << N); vb++) begin
        a = N'(va);
        b = N'(vb);
        #1;
        checks++;
        if (p !== (2*N)'(va * vb)) begin
          failures++;
          $display("FAIL %0d * %0d = %0d", va, vb, p);
        end
      end
    end
    a = 4'b1101;
    b = 4'b1101;
    #1;
    checks++;
    if (p !== 8'b1010_1001) begin
      failures++;
      $display("FAIL 1101 x 1101 = %b", p);
    end
    check_wide('0, '0);
    check_wide('1, '1);
    check_wide('1, 8'h01);
    for (int k = 0; k < 3000; k++) check_wide(NB'($urandom), NB'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
