// bw_mult_tb: self-checking test of the modified Baugh-Wooley multiplier at every
// strength characterized: 4x4, 8x8, 16x16, 32x32 and 64x64 (the default).
//
// The 4- and 8-bit instances are checked on every operand pair; the larger
// ones on all pairs of corner operands and on random pairs. Products are
// compared with the simulator's signed multiplication. The multiplier is
// combinational, so each product must be valid one clock after its
// operands are applied. A watchdog ends the run after a fixed cycle count.
module bw_mult_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NS = 5;
  localparam int SIZES[NS] = '{4, 8, 16, 32, 64};
  logic start = 1'b0;
  logic [NS-1:0] done;
  int c[NS], f[NS];
  int checks, failures;

  for (genvar i = 0; i < NS; i++) begin : g_size
    mult_size_check #(.N(SIZES[i]), .BOOTH(0), .NRAND(3000)) u_chk (
      .clk(clk), .start(start), .done(done[i]), .checks(c[i]), .failures(f[i])
    );
  end

  initial begin
    repeat (2) @(posedge clk);
    start = 1'b1;
    wait (&done);
    @(posedge clk);   // let the counters settle through the ports
    checks = 0;
    failures = 0;
    for (int i = 0; i < NS; i++) begin
      $display("N=%0d checks=%0d failures=%0d", SIZES[i], c[i], f[i]);
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c.sum() + 0, f.sum() + 1);
    $finish;
  end
endmodule
