// ncl_th24comp: TH24comp gate, set function (A + B)(C + D).
//
// Sets once at least one of A, B and at least one of C, D is asserted; clears
// only when all four inputs are 0; holds otherwise (NCL hysteresis, written as
// a latch on purpose). Wired to both rails of X (A, B) and of Y (C, D) it
// signals "X and Y are both DATA", which the revised GEN_S7 uses to become
// input-complete with respect to X and Y. Inputs a[0..3] are A..D. No clock.
module ncl_th24comp (
  input  logic [3:0] a,  // {D, C, B, A}
  output logic       z
);

  logic set_c, clr_c;

  always_comb begin
    set_c = (a[0] | a[1]) & (a[2] | a[3]);
    clr_c = (a == 4'b0000);
  end

  always_latch begin
    if (set_c || clr_c) z = set_c;
  end

endmodule
