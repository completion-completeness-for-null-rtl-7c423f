// ncl_and_complete: input-complete dual-rail AND, Z = X * Y.
//
// Z0 = THand0(A = X0, B = Y0, C = X1, D = Y1), set on X0Y0 + Y0X1 + X0Y1, so
// DATA0 appears only when both operands are DATA; Z1 = TH22(X1, Y1). The
// output therefore never leaves NULL before both inputs are DATA, and never
// returns to NULL before both inputs are NULL. Gate choice and pin wiring as
// drawn for the complete AND in the document. No clock.
module ncl_and_complete
  import ncl_pkg::*;
(
  input  dr_t x,
  input  dr_t y,
  output dr_t z
);

  ncl_thand0 u_thand0 (.a({y.r1, x.r1, y.r0, x.r0}), .z(z.r0));
  ncl_th #(.N(2), .M(2)) u_th22 (.rst(1'b0), .a({y.r1, x.r1}), .z(z.r1));

endmodule
