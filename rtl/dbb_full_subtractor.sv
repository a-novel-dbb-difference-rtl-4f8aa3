// dbb_full_subtractor: one-bit difference-based-borrow (DBB) full subtractor.
//
// Computes a - b - c for single bits. The difference is the usual three-input
// parity, d = a ^ b ^ c. The borrow is not built from the three pairwise
// products of a conventional full subtractor (~a&b | b&c | ~a&c); instead it
// reuses the difference that is already there:
//
//     bout = (~a & c) | (b & d)
//
// The term b & d covers the two cases in which b alone causes the borrow
// (a=0,b=1,c=0) or b together with c does (a=1,b=1,c=1); ~a & c covers a
// borrow in that meets a zero minuend. This needs one inverter, two 2-input
// ANDs and one 2-input OR behind the two XORs, and both outputs share the
// same parity path. The equations are those of the DBB cell; the signal
// names are this design's own.
//
// Interface: a (minuend), b (subtrahend), c (borrow in); d (difference),
// bout (borrow out). Purely combinational, no clock and no reset.
module dbb_full_subtractor (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic d,
  output logic bout
);

  logic ab_x;  // a ^ b, first stage of the parity tree

  always_comb begin
    ab_x = a ^ b;
    d    = ab_x ^ c;
    bout = (~a & c) | (b & d);
  end

endmodule
