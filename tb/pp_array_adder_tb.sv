// pp_array_adder_tb: checks the carry-save array plus final adder.
//
// Random rows, including all-ones rows that make long carry chains, are
// added by the block and by the simulator's own arithmetic; the results must
// agree modulo 2^W. Two sizes: W = 16 with 5 rows, and the default W = 128
// with 33 rows. Watchdog after a fixed number of clock cycles.
module pp_array_adder_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [4:0][15:0] r16;  logic [15:0] s16;
  pp_array_adder #(.W(16), .ROWS(5)) dut16 (.rows(r16), .sum(s16));

  logic [32:0][127:0] r128; logic [127:0] s128;
  pp_array_adder dut128 (.rows(r128), .sum(s128));

  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [15:0] e16;
      e16 = '0;
      for (int r = 0; r < 5; r++) begin
        r16[r] = (t % 7 == 0) ? '1 : 16'($urandom);
        e16 += r16[r];
      end
      @(posedge clk);
      checks++;
      if (s16 !== e16) begin
        failures++;
        if (failures < 10) $display("FAIL W=16 got=%h exp=%h", s16, e16);
      end
    end
    for (int t = 0; t < 300; t++) begin
      logic [127:0] e128;
      e128 = '0;
      for (int r = 0; r < 33; r++) begin
        r128[r] = (t % 5 == 0) ? '1 : {$urandom, $urandom, $urandom, $urandom};
        if (t % 3 == 0 && r % 2 == 1) r128[r] = '0;
        e128 += r128[r];
      end
      @(posedge clk);
      checks++;
      if (s128 !== e128) begin
        failures++;
        if (failures < 10) $display("FAIL W=128 got=%h exp=%h", s128, e128);
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
