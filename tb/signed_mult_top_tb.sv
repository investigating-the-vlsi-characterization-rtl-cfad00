// signed_mult_top_tb: end-to-end test of both multipliers at full size
// (N = 64, the top's defaults).
//
// Both multipliers get the same operand pairs and each product is compared
// with the simulator's 128-bit signed multiplication and with the other
// multiplier's product. The operands are:
//   - the two worked examples of the Booth method, -3 x 5 = -15 and
//     -3 x -4 = 12, sign-extended to 64 bits;
//   - the 16-bit sample 21845 x -21846 = -477225870;
//   - the 64-bit sample 4199068790813088450 x -2390644373132781435;
//   - the corners 0, 1, -1, most positive and most negative;
//   - 20 samples held 5 ns each (a 100 ns activity window), then random pairs.
// The test counts how often each Booth digit (0, +A, +2A, -A, -2A, including
// the 111 group that means 0) and each Baugh-Wooley sign case (signs of x
// and y) occurred, and counts a failure for any that never did.
// One product per clock; a watchdog ends the run after a fixed cycle count.
module signed_mult_top_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int N = 64;

  logic clk = 1'b0;
  always #2.5 clk = ~clk;   // 5 ns per sample

  logic [N-1:0]   x, y;
  logic [2*N-1:0] bw_p, mbe_p;
  int checks = 0, failures = 0;

  // Mechanism counters.
  int dig_cnt[5];           // index: digit + 2, i.e. -2A, -A, 0, +A, +2A
  int grp111_cnt = 0;       // the all-ones group, read as 0
  int sign_cnt[4];          // {x<0, y<0}

  signed_mult_top dut (
    .bw_x (x), .bw_y (y), .bw_p (bw_p),
    .mbe_x(x), .mbe_y(y), .mbe_p(mbe_p)
  );

  task automatic apply(logic [N-1:0] xa, logic [N-1:0] ya);
    logic signed [2*N-1:0] xe, ye, expv;
    logic [N:0] yz;
    x = xa;
    y = ya;
    @(posedge clk);
    xe = (2*N)'($signed(xa));
    ye = (2*N)'($signed(ya));
    expv = xe * ye;
    checks += 3;
    if (bw_p !== expv) begin
      failures++;
      $display("FAIL baugh-wooley %0d x %0d = %0d, expected %0d", xe, ye, $signed(bw_p), expv);
    end
    if (mbe_p !== expv) begin
      failures++;
      $display("FAIL booth %0d x %0d = %0d, expected %0d", xe, ye, $signed(mbe_p), expv);
    end
    if (mbe_p !== bw_p) failures++;
    // Mechanism coverage, worked out from the operands alone.
    sign_cnt[{xa[N-1], ya[N-1]}]++;
    yz = {ya, 1'b0};
    for (int k = 0; k < N / 2; k++) begin
      logic [2:0] g;
      g = yz[2*k +: 3];
      dig_cnt[-2 * int'(g[2]) + int'(g[1]) + int'(g[0]) + 2]++;
      if (g == 3'b111) grp111_cnt++;
    end
  endtask

  task automatic expect_value(string what, logic [2*N-1:0] got, longint expv);
    checks++;
    if ($signed(got) != 128'(expv)) begin
      failures++;
      $display("FAIL %s: got %0d, expected %0d", what, $signed(got), expv);
    end
  endtask

  initial begin
    logic [N-1:0] corner[5];
    foreach (dig_cnt[i]) dig_cnt[i] = 0;
    foreach (sign_cnt[i]) sign_cnt[i] = 0;
    @(posedge clk);

    // Worked examples, checked against the published results too.
    apply(-64'sd3, 64'sd5);
    expect_value("booth -3 x 5", mbe_p, -15);
    expect_value("baugh-wooley -3 x 5", bw_p, -15);
    apply(-64'sd3, -64'sd4);
    expect_value("booth -3 x -4", mbe_p, 12);
    expect_value("baugh-wooley -3 x -4", bw_p, 12);
    apply(64'sd21845, -64'sd21846);
    expect_value("booth 21845 x -21846", mbe_p, -477225870);
    expect_value("baugh-wooley 21845 x -21846", bw_p, -477225870);
    apply(64'sd4199068790813088450, -64'sd2390644373132781435);

    corner[0] = '0;
    corner[1] = 64'd1;
    corner[2] = '1;
    corner[3] = {1'b0, {(N-1){1'b1}}};
    corner[4] = {1'b1, {(N-1){1'b0}}};
    foreach (corner[i])
      foreach (corner[j])
        apply(corner[i], corner[j]);

    // 20 samples over a 100 ns window.
    for (int t = 0; t < 20; t++) apply({$urandom, $urandom}, {$urandom, $urandom});
    // Random pairs, with narrow operands mixed in.
    for (int t = 0; t < 5000; t++) begin
      logic [N-1:0] a, b;
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      if (t % 4 == 1) a = N'($signed(a[15:0]));
      if (t % 4 == 2) b = N'($signed(b[7:0]));
      apply(a, b);
    end

    // Every mechanism must have been exercised.
    foreach (dig_cnt[i]) begin
      $display("booth digit %0d: %0d times", i - 2, dig_cnt[i]);
      checks++;
      if (dig_cnt[i] == 0) failures++;
    end
    $display("booth group 111 (zero): %0d times", grp111_cnt);
    checks++;
    if (grp111_cnt == 0) failures++;
    foreach (sign_cnt[i]) begin
      $display("sign case x<0=%0d y<0=%0d: %0d times", i[1], i[0], sign_cnt[i]);
      checks++;
      if (sign_cnt[i] == 0) failures++;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
