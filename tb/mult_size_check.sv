// mult_size_check: test driver for one N x N signed multiplier.
//
// Instantiates bw_mult (BOOTH = 0) or booth_mult (BOOTH = 1) at strength N
// and, once `start` is high, applies one operand pair per clock: every pair
// when N <= 8, otherwise the corner values (0, +-1, most positive, most
// negative) crossed with each other, then NRAND random pairs. Each product
// is compared with the simulator's own 2N-bit signed multiplication. Raises
// `done` when finished; `checks` and `failures` count the comparisons.
module mult_size_check #(
  parameter int N     = 4,
  parameter bit BOOTH = 1'b0,
  parameter int NRAND = 2000
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures
);
  logic [N-1:0]   x, y;
  logic [2*N-1:0] p;

  if (BOOTH) begin : g_booth
    booth_mult #(.N(N)) dut (.x(x), .y(y), .p(p));
  end else begin : g_bw
    bw_mult #(.N(N)) dut (.x(x), .y(y), .p(p));
  end

  task automatic check_one(logic [N-1:0] xa, logic [N-1:0] ya);
    logic signed [2*N-1:0] xe, ye, expv;
    x = xa;
    y = ya;
    @(posedge clk);
    xe = (2*N)'($signed(xa));
    ye = (2*N)'($signed(ya));
    expv = xe * ye;
    checks++;
    if (p !== expv) begin
      failures++;
      if (failures < 5)
        $display("FAIL %s N=%0d x=%0d y=%0d p=%0d expected=%0d",
                 BOOTH ? "booth" : "baugh-wooley", N, $signed(xa), $signed(ya),
                 $signed(p), $signed(expv));
    end
  endtask

  function automatic logic [N-1:0] rand_op();
    logic [N-1:0] v;
    v = '0;
    for (int k = 0; k < (N + 31) / 32; k++) v = (v << 32) | N'($urandom);
    return v;
  endfunction

  initial begin
    logic [N-1:0] corner[6];
    done = 1'b0;
    checks = 0;
    failures = 0;
    corner[0] = '0;
    corner[1] = N'(1);
    corner[2] = '1;
    corner[3] = {1'b0, {(N-1){1'b1}}};
    corner[4] = {1'b1, {(N-1){1'b0}}};
    corner[5] = {1'b1, {(N-2){1'b0}}, 1'b1};
    wait (start);
    if (N <= 8) begin
      for (int a = 0; a < (1 << N); a++)
        for (int b = 0; b < (1 << N); b++)
          check_one(N'(a), N'(b));
    end else begin
      foreach (corner[i])
        foreach (corner[j])
          check_one(corner[i], corner[j]);
      for (int t = 0; t < NRAND; t++)
        check_one(rand_op(), rand_op());
    end
    done = 1'b1;
  end
endmodule
