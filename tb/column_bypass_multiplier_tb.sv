// Self-checking testbench of the column-bypass multiplier.
// The default 4x4 instance is checked on all 256 operand pairs, including
// 13 x 13 = 169; an 8x8 instance on 3000 random pairs and corner operands.
// Expected products are integer products, checked in the same time step as
// the operands (the multiplier is combinational).
// For the 4x4 instance it also checks the bypass itself: in every cell of a
// column whose multiplicand bit is 0, the adder's sum and carry inputs must
// be 0 (isolated), and it counts how often each column was bypassed and how
// often it was active; a column that never did either counts as a failure.
module column_bypass_multiplier_tb;
  localparam int unsigned N  = 4;
  localparam int unsigned NB = 8;
  logic [N-1:0]    a,  b;
  logic [2*N-1:0]  p;
  logic [NB-1:0]   ab, bb;
  logic [2*NB-1:0] pb;
  int checks = 0, failures = 0;
  int bypassed [N];
  int active   [N];

  column_bypass_multiplier dut (.a(a), .b(b), .p(p));
  column_bypass_multiplier #(.N(NB)) dut_wide (.a(ab), .b(bb), .p(pb));

  // Adder inputs of every array cell of the 4x4 instance, flattened:
  // bit (j-1)*N + i is the cell of row j, column i.
  logic [(N-1)*N-1:0] cell_b, cell_cin;
`define TAP_CELL(J, I) \
  assign cell_b[(J-1)*N+I]   = dut.row[J].g_fa_row.col[I].u_cell.u_fa.b; \
  assign cell_cin[(J-1)*N+I] = dut.row[J].g_fa_row.col[I].u_cell.u_fa.cin;
  `TAP_CELL(1, 0) `TAP_CELL(1, 1) `TAP_CELL(1, 2) `TAP_CELL(1, 3)
  `TAP_CELL(2, 0) `TAP_CELL(2, 1) `TAP_CELL(2, 2) `TAP_CELL(2, 3)
  `TAP_CELL(3, 0) `TAP_CELL(3, 1) `TAP_CELL(3, 2) `TAP_CELL(3, 3)
`undef TAP_CELL

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
    foreach (bypassed[i]) begin bypassed[i] = 0; active[i] = 0; end
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
        for (int i = 0; i < N; i++) begin
          if (a[i]) begin
            active[i]++;
          end else begin
            bypassed[i]++;
            for (int j = 1; j < N; j++) begin
              checks++;
              if (cell_b[(j-1)*N+i] !== 1'b0 || cell_cin[(j-1)*N+i] !== 1'b0) begin
                failures++;
                $display("FAIL a=%b b=%b: cell row %0d col %0d not isolated", a, b, j, i);
              end
            end
          end
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
    for (int i = 0; i < N; i++) begin
      $display("column %0d: bypassed %0d times, active %0d times", i, bypassed[i], active[i]);
      checks++;
      if (bypassed[i] == 0 || active[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
