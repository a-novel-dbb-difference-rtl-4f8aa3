// tb_dbb_widths: runs the DBB subtractor at the three operand sizes it is
// evaluated at, 1, 4 and 8 bits. Each size is tested exhaustively over all
// a, b and borrow-in values against the integer result of a - b - bin
// computed here; the 8-bit case is 131072 vectors.
// A time-based watchdog ends the run with a failure if it ever hangs.
module tb_dbb_widths;

  int checks   = 0;
  int failures = 0;

  logic [0:0] a1, b1, d1;
  logic [3:0] a4, b4, d4;
  logic [7:0] a8, b8, d8;
  logic       bin1, bin4, bin8, bo1, bo4, bo8;

  dbb_subtractor #(.WIDTH(1)) u_w1 (.a(a1), .b(b1), .bin(bin1), .diff(d1), .bout(bo1));
  dbb_subtractor #(.WIDTH(4)) u_w4 (.a(a4), .b(b4), .bin(bin4), .diff(d4), .bout(bo4));
  dbb_subtractor #(.WIDTH(8)) u_w8 (.a(a8), .b(b8), .bin(bin8), .diff(d8), .bout(bo8));

  initial begin : watchdog
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Compare one result with the integer reference; w is the operand width.
  function automatic void check(int w, int va, int vb, int vc, int got_d, logic got_b);
    int r = va - vb - vc;
    int exp_d = r & ((1 << w) - 1);
    logic exp_b = (r < 0);
    checks++;
    if (got_d != exp_d || got_b !== exp_b) begin
      failures++;
      $display("FAIL width %0d: %0d - %0d - %0d gave diff=%0d bout=%0b, expected %0d/%0b",
               w, va, vb, vc, got_d, got_b, exp_d, exp_b);
    end
  endfunction

  initial begin : stimulus
    for (int va = 0; va < 2; va++)
      for (int vb = 0; vb < 2; vb++)
        for (int vc = 0; vc < 2; vc++) begin
          a1 = 1'(va); b1 = 1'(vb); bin1 = 1'(vc);
          #1 check(1, va, vb, vc, int'(d1), bo1);
        end
    for (int va = 0; va < 16; va++)
      for (int vb = 0; vb < 16; vb++)
        for (int vc = 0; vc < 2; vc++) begin
          a4 = 4'(va); b4 = 4'(vb); bin4 = 1'(vc);
          #1 check(4, va, vb, vc, int'(d4), bo4);
        end
    for (int va = 0; va < 256; va++)
      for (int vb = 0; vb < 256; vb++)
        for (int vc = 0; vc < 2; vc++) begin
          a8 = 8'(va); b8 = 8'(vb); bin8 = 1'(vc);
          #1 check(8, va, vb, vc, int'(d8), bo8);
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
