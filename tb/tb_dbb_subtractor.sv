// tb_dbb_subtractor: end-to-end test of the DBB subtractor at its default
// width. Every combination of a, b and bin is applied (2**(2*WIDTH+1)
// vectors); diff and bout are compared with the integer result of
// a - b - bin computed here. It also counts how often each behaviour of the
// ripple-borrow chain occurs and fails if one never does: a borrow out of the
// top bit, a result with no borrow, a borrow in that changes the result, and
// a borrow that ripples through every cell (a == b with bin = 1).
// A time-based watchdog ends the run with a failure if it ever hangs.
module tb_dbb_subtractor;

  localparam int unsigned W = 4;  // must match the subtractor's default WIDTH

  logic [W-1:0] a, b, diff;
  logic         bin, bout;
  int           checks   = 0;
  int           failures = 0;

  int n_borrow_out  = 0;
  int n_no_borrow   = 0;
  int n_borrow_in   = 0;
  int n_full_ripple = 0;

  dbb_subtractor dut (.a(a), .b(b), .bin(bin), .diff(diff), .bout(bout));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic count_event(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else begin
      $display("%s: %0d times", what, n);
    end
  endtask

  initial begin : stimulus
    longint r;
    logic [W-1:0] exp_d;
    logic         exp_b;
    if ($bits(diff) != W) begin
      failures++;
      $display("FAIL subtractor width %0d, testbench expects %0d", $bits(diff), W);
    end
    for (int va = 0; va < (1 << W); va++)
      for (int vb = 0; vb < (1 << W); vb++)
        for (int vc = 0; vc < 2; vc++) begin
          a   = W'(va);
          b   = W'(vb);
          bin = 1'(vc);
          #1;
          r     = longint'(va) - longint'(vb) - longint'(vc);
          exp_d = W'(r);
          exp_b = (r < 0);
          checks++;
          if (diff !== exp_d || bout !== exp_b) begin
            failures++;
            $display("FAIL %0d - %0d - %0d: got diff=%0d bout=%0b expected diff=%0d bout=%0b",
                     va, vb, vc, diff, bout, exp_d, exp_b);
          end
          if (bout) n_borrow_out++;
          else      n_no_borrow++;
          if (vc == 1 && diff != W'(va - vb)) n_borrow_in++;
          if (vc == 1 && va == vb && bout && &diff) n_full_ripple++;
        end
    count_event("borrow out of top bit", n_borrow_out);
    count_event("no borrow", n_no_borrow);
    count_event("borrow in changes result", n_borrow_in);
    count_event("borrow ripples through all cells", n_full_ripple);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
