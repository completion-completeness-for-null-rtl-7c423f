// ncl_full_adder: dual-rail NCL full adder, input-complete in X, Y and Z.
//
// Carry: Co1 = TH23(X1, Y1, Z1), Co0 = TH23(X0, Y0, Z0) (majority per rail).
// Sum:   S1 = TH34w2(Co0, X1, Y1, Z1), S0 = TH34w2(Co1, X0, Y0, Z0), the
// weight-2 input being the opposite-rail carry. Each sum rail needs all three
// inputs to be DATA before it can assert, which makes the sum input-complete.
// The document only names this block "FA" and states that it is input-complete
// in X, Y and Z; this gate structure is the standard NCL full adder and is a
// choice of this design. No clock.
module ncl_full_adder
  import ncl_pkg::*;
(
  input  dr_t x,
  input  dr_t y,
  input  dr_t z,
  output dr_t s,
  output dr_t co
);

  ncl_th #(.N(3), .M(2)) u_co1 (.rst(1'b0), .a({z.r1, y.r1, x.r1}), .z(co.r1));
  ncl_th #(.N(3), .M(2)) u_co0 (.rst(1'b0), .a({z.r0, y.r0, x.r0}), .z(co.r0));

  ncl_th #(.N(4), .M(3), .W0(2)) u_s1 (.rst(1'b0), .a({z.r1, y.r1, x.r1, co.r0}), .z(s.r1));
  ncl_th #(.N(4), .M(3), .W0(2)) u_s0 (.rst(1'b0), .a({z.r0, y.r0, x.r0, co.r1}), .z(s.r0));

endmodule
