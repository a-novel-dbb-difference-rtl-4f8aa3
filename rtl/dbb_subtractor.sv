// dbb_subtractor: WIDTH-bit subtractor built from DBB full subtractor cells.
//
// Computes {bout, diff} such that diff = (a - b - bin) mod 2**WIDTH and bout
// is 1 exactly when a < b + bin (unsigned), i.e. when the subtraction needs a
// borrow from beyond the top bit. Bit i is one dbb_full_subtractor cell; its
// borrow out feeds the borrow in of bit i+1, so the borrow ripples from bit 0
// to bit WIDTH-1 and the worst-case path crosses every cell once.
//
// The cell equations and the 1, 4 and 8 bit sizes follow the DBB subtractor
// design; the 4-bit size is the default because that is the size laid out.
// The ripple-borrow chaining of the cells and the external borrow input bin
// are this design's own choices (a borrow-in lets several instances be
// chained into a wider subtractor).
//
// Interface: a, b (WIDTH bits, unsigned), bin (borrow into bit 0); diff
// (WIDTH bits), bout (borrow out of bit WIDTH-1). Purely combinational, no
// clock and no reset.
module dbb_subtractor #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             bin,
  output logic [WIDTH-1:0] diff,
  output logic             bout
);

  // borrow[i] enters bit i; borrow[WIDTH] leaves the top bit.
  logic [WIDTH:0] borrow;

  assign borrow[0] = bin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    dbb_full_subtractor u_cell (
      .a   (a[i]),
      .b   (b[i]),
      .c   (borrow[i]),
      .d   (diff[i]),
      .bout(borrow[i+1])
    );
  end

  assign bout = borrow[WIDTH];

endmodule
