// End-to-end testbench of multiplier_top at its default size (4x4).
//
// The three multipliers get the same operands: first all 256 operand pairs,
// then 2000 random pairs. Every product is compared with the integer product
// in the same time step as the operands (all three are combinational).
// A last phase of 500 steps gives each multiplier its own random operands,
// to show that the three sets of ports are independent.
//
// Mechanisms counted (a mechanism that never happens is a failure):
//   - each column of the bypass multiplier bypassed (a[i] = 0) and active;
//   - all columns active at once (a = 1111) and all bypassed at once (a = 0).
//
// Switching activity: on every operand change the testbench counts how many
// sum and carry inputs of the array's full adders toggle, in the plain Braun
// array and in the column-bypass array. Isolating bypassed columns must give
// the bypass array fewer toggles than the plain one over the random stream;
// the counts are printed.
module multiplier_top_tb;
  localparam int unsigned N = mult_pkg::DEFAULT_N;
  localparam int unsigned CELLS = (N - 1) * N;

  logic [N-1:0]   a, b;
  logic [N-1:0]   arr_a, arr_b, byp_a, byp_b, rev_a, rev_b;
  bit             split = 1'b0;   // 1: each multiplier gets its own operands
  logic [2*N-1:0] arr_p, byp_p, rev_p;
  int checks = 0, failures = 0;
  int bypassed [N];
  int active   [N];
  int all_active = 0, all_bypassed = 0;
  longint toggles_arr = 0, toggles_byp = 0;

  multiplier_top dut (
    .arr_a(arr_a), .arr_b(arr_b), .arr_p(arr_p),
    .byp_a(byp_a), .byp_b(byp_b), .byp_p(byp_p),
    .rev_a(rev_a), .rev_b(rev_b), .rev_p(rev_p)
  );

  logic [N-1:0] arr_a_s, arr_b_s, rev_a_s, rev_b_s;  // operands of the split phase
  always_comb begin
    byp_a = a;
    byp_b = b;
    arr_a = split ? arr_a_s : a;
    arr_b = split ? arr_b_s : b;
    rev_a = split ? rev_a_s : a;
    rev_b = split ? rev_b_s : b;
  end

  // Sum and carry inputs of every full adder in the two arrays (4x4 layout),
  // flattened: bit (j-1)*N + i is the cell of row j, column i.
  logic [CELLS-1:0] arr_s_in, arr_c_in, byp_s_in, byp_c_in;
`define TAP_CELL(J, I) \
  assign arr_s_in[(J-1)*N+I] = dut.u_array.row[J].g_fa_row.col[I].u_fa.b; \
  assign arr_c_in[(J-1)*N+I] = dut.u_array.row[J].g_fa_row.col[I].u_fa.cin; \
  assign byp_s_in[(J-1)*N+I] = dut.u_bypass.row[J].g_fa_row.col[I].u_cell.u_fa.b; \
  assign byp_c_in[(J-1)*N+I] = dut.u_bypass.row[J].g_fa_row.col[I].u_cell.u_fa.cin;
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

  logic [CELLS-1:0] prev_arr_s, prev_arr_c, prev_byp_s, prev_byp_c;

  task automatic apply(input logic [N-1:0] x, input logic [N-1:0] y, input bit count_toggles);
    logic [2*N-1:0] want;
    a = x;
    b = y;
    #1;
    want = (2*N)'(int'(x) * int'(y));
    checks++;
    if (arr_p !== (2*N)'(int'(arr_a) * int'(arr_b))) begin
      failures++;
      $display("FAIL array      %0d*%0d=%0d", arr_a, arr_b, arr_p);
    end
    checks++;
    if (byp_p !== want) begin failures++; $display("FAIL bypass     %0d*%0d=%0d", x, y, byp_p); end
    checks++;
    if (rev_p !== (2*N)'(int'(rev_a) * int'(rev_b))) begin
      failures++;
      $display("FAIL reversible %0d*%0d=%0d", rev_a, rev_b, rev_p);
    end
    for (int i = 0; i < N; i++) begin
      if (x[i]) active[i]++;
      else      bypassed[i]++;
    end
    if (x == '1) all_active++;
    if (x == '0) all_bypassed++;
    if (count_toggles) begin
      toggles_arr += $countones(arr_s_in ^ prev_arr_s) + $countones(arr_c_in ^ prev_arr_c);
      toggles_byp += $countones(byp_s_in ^ prev_byp_s) + $countones(byp_c_in ^ prev_byp_c);
    end
    prev_arr_s = arr_s_in;
    prev_arr_c = arr_c_in;
    prev_byp_s = byp_s_in;
    prev_byp_c = byp_c_in;
  endtask

  initial begin
    if (N != 4) begin
      $display("this testbench taps the 4x4 array");
      failures++;
    end
    foreach (bypassed[i]) begin bypassed[i] = 0; active[i] = 0; end
    for (int va = 0; va < (1 << N); va++)
      for (int vb = 0; vb < (1 << N); vb++)
        apply(N'(va), N'(vb), 1'b0);
    for (int k = 0; k < 2000; k++)
      apply(N'($urandom), N'($urandom), 1'b1);

    split = 1'b1;
    for (int k = 0; k < 500; k++) begin
      arr_a_s = N'($urandom);
      arr_b_s = N'($urandom);
      rev_a_s = N'($urandom);
      rev_b_s = N'($urandom);
      apply(N'($urandom), N'($urandom), 1'b0);
    end

    for (int i = 0; i < N; i++) begin
      $display("column %0d: bypassed %0d times, active %0d times", i, bypassed[i], active[i]);
      checks++;
      if (bypassed[i] == 0 || active[i] == 0) failures++;
    end
    $display("all columns active: %0d, all columns bypassed: %0d", all_active, all_bypassed);
    checks++;
    if (all_active == 0 || all_bypassed == 0) failures++;
    $display("adder input toggles over 2000 random operand pairs: array %0d, column bypass %0d",
             toggles_arr, toggles_byp);
    checks++;
    if (!(toggles_byp < toggles_arr)) begin
      failures++;
      $display("FAIL column bypass does not reduce adder input switching");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
