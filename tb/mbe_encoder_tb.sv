// mbe_encoder_tb: exhaustive check of the radix-4 Booth encoder.
//
// For all eight groups {b3,b2,b1} the digit carried by the select lines must
// equal -2*b3 + b2 + b1, at most one of one/two may be set, and a zero digit
// must not assert neg. A slow clock paces the stimulus; a watchdog ends the
// run if it stalls.
module mbe_encoder_tb;
  import mbe_pkg::*;

  logic       clk = 1'b0;
  logic [2:0] grp;
  mbe_sel_t   sel;
  int checks = 0, failures = 0;

  mbe_encoder dut (.grp(grp), .sel(sel));

  always #5 clk = ~clk;

  // Expected digit straight from the operation table.
  function automatic int table_digit(logic [2:0] g);
    case (g)
      3'b000: return 0;
      3'b001: return 1;
      3'b010: return 1;
      3'b011: return 2;
      3'b100: return -2;
      3'b101: return -1;
      3'b110: return -1;
      default: return 0;
    endcase
  endfunction

  initial begin
    for (int g = 0; g < 8; g++) begin
      grp = 3'(g);
      @(posedge clk);
      checks++;
      if (mbe_digit(sel) != table_digit(grp)) begin
        failures++;
        $display("FAIL grp=%b digit=%0d expected=%0d", grp, mbe_digit(sel), table_digit(grp));
      end
      checks++;
      if (sel.one && sel.two) begin
        failures++;
        $display("FAIL grp=%b one and two both set", grp);
      end
      checks++;
      if (table_digit(grp) == 0 && sel.neg) begin
        failures++;
        $display("FAIL grp=%b zero digit with neg set", grp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
