// tb_dbb_full_subtractor: exhaustive self-checking test of the one-bit DBB
// full subtractor. All eight input combinations are applied; each result is
// compared with the integer value a - b - c (difference = its low bit,
// borrow = its sign) and with the conventional borrow expression
// ~a&b | b&c | ~a&c, both computed here independently of the cell.
// A time-based watchdog ends the run with a failure if it ever hangs.
module tb_dbb_full_subtractor;

  logic a, b, c;
  logic d, bout;
  int   checks   = 0;
  int   failures = 0;

  dbb_full_subtractor dut (.a(a), .b(b), .c(c), .d(d), .bout(bout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int   r;
    logic exp_d, exp_b, conv_b;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      r      = int'(a) - int'(b) - int'(c);
      exp_d  = r[0];
      exp_b  = (r < 0);
      conv_b = (~a & b) | (b & c) | (~a & c);
      checks++;
      if (d !== exp_d) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b: d=%0b expected %0b", a, b, c, d, exp_d);
      end
      checks++;
      if (bout !== exp_b) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b: bout=%0b expected %0b", a, b, c, bout, exp_b);
      end
      checks++;
      if (bout !== conv_b) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b: bout=%0b differs from conventional %0b",
                 a, b, c, bout, conv_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
