// mbe_pp_gen_tb: checks the Booth partial-product generator.
//
// For every digit in {-2..+2} and many multiplicands, the row value
// signed(pp) + neg_lsb must equal digit * a. Run at N = 8 (all 256
// multiplicands) and at the default N = 64 (random and corner multiplicands).
// Watchdog after a fixed number of clock cycles.
module mbe_pp_gen_tb;
  import mbe_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam mbe_sel_t SELS[5] = '{'{neg:1'b0, two:1'b0, one:1'b0},
                                   '{neg:1'b0, two:1'b0, one:1'b1},
                                   '{neg:1'b0, two:1'b1, one:1'b0},
                                   '{neg:1'b1, two:1'b0, one:1'b1},
                                   '{neg:1'b1, two:1'b1, one:1'b0}};
  localparam int DIG[5] = '{0, 1, 2, -1, -2};

  // N = 8
  logic [7:0] a8;  mbe_sel_t s8;  logic [8:0] pp8;  logic n8;
  mbe_pp_gen #(.N(8)) dut8 (.a(a8), .sel(s8), .pp(pp8), .neg_lsb(n8));

  // N = 64 (default)
  logic [63:0] a64; mbe_sel_t s64; logic [64:0] pp64; logic n64;
  mbe_pp_gen dut64 (.a(a64), .sel(s64), .pp(pp64), .neg_lsb(n64));

  initial begin
    for (int d = 0; d < 5; d++) begin
      for (int v = 0; v < 256; v++) begin
        longint expv, got;
        a8 = 8'(v);
        s8 = SELS[d];
        @(posedge clk);
        expv = longint'(DIG[d]) * longint'($signed(a8));
        got  = longint'($signed(pp8)) + longint'(n8);
        checks++;
        if (got != expv) begin
          failures++;
          if (failures < 10) $display("FAIL N=8 a=%0d digit=%0d got=%0d", $signed(a8), DIG[d], got);
        end
      end
      for (int t = 0; t < 200; t++) begin
        logic signed [66:0] e67, g67;
        case (t)
          0: a64 = 64'h8000_0000_0000_0000;
          1: a64 = 64'h7FFF_FFFF_FFFF_FFFF;
          2: a64 = '1;
          3: a64 = '0;
          default: a64 = {$urandom, $urandom};
        endcase
        s64 = SELS[d];
        @(posedge clk);
        e67 = 67'(DIG[d]) * 67'($signed(a64));
        g67 = 67'($signed(pp64)) + 67'(n64);
        checks++;
        if (g67 != e67) begin
          failures++;
          if (failures < 10) $display("FAIL N=64 a=%h digit=%0d", a64, DIG[d]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
