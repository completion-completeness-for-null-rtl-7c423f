// ncl_thand0: THand0 gate, the DATA0 rail of the input-complete dual-rail AND.
//
// Sets when AB + BC + AD is true and clears only when A, B, C and D are all 0,
// holding its output otherwise (NCL hysteresis, written as a latch on
// purpose). With A = X0, B = Y0, C = X1, D = Y1 it asserts for X*Y = 0 only
// after both operands are DATA. Inputs a[0..3] are A..D. No clock.
// A lint check can report that it finds no latch in the always_latch
// block: the hold case is reached only through the set/clear condition,
// which that check does not follow. Synthesis infers one latch bit, as
// intended.
module ncl_thand0 (
  input  logic [3:0] a,  // {D, C, B, A}
  output logic       z
);

  logic set_c, clr_c;

  always_comb begin
    set_c = (a[0] & a[1]) | (a[1] & a[2]) | (a[0] & a[3]);
    clr_c = (a == 4'b0000);
  end

  always_latch begin
    if (set_c || clr_c) z = set_c;
  end

endmodule
