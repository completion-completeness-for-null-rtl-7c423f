// gen_s7: GEN_S7 component of the last multiplier stage, S = C OR maj(X, Y, Z).
//
// S is product bit 7: the incoming carry C, or the carry out of X + Y + Z
// (in a 4x4 product both are never 1 together). All versions share two
// TH44w2 gates whose weight-2 input is C0: G0 = C0 * maj(X0, Y0, Z0) and
// G1 = C0 * maj(X1, Y1, Z1).
//   GEN_S7_ORIG: S0 = G0, S1 = TH12(C1, G1). C = DATA1 asserts S1 on its own,
//                so the gate is input-complete only with respect to C.
//   GEN_S7_X:    S1 = TH34w32(G1 weight 3, C1 weight 2, X0, X1): C = DATA1
//                must now wait for X to be DATA.
//   GEN_S7_XY:   T = TH24comp(X1, X0, Y0, Y1) = "X and Y are DATA";
//                S0 = TH22(G0, T), S1 = TH33w2(T weight 2, C1, G1), so every
//                output needs C, X and Y.
// The gate types and wiring follow the three GEN_S7 schematics of the
// document; reading C0 drawn twice into a "4" gate as the weight-2 input of a
// TH44w2 is this design's interpretation of the drawings. No clock.
module gen_s7
  import ncl_pkg::*;
#(
  parameter gen_s7_e VARIANT = GEN_S7_ORIG
) (
  input  dr_t c,
  input  dr_t x,
  input  dr_t y,
  input  dr_t z,
  output dr_t s
);

  logic g0, g1;

  ncl_th #(.N(4), .M(4), .W0(2)) u_g0 (.rst(1'b0), .a({z.r0, y.r0, x.r0, c.r0}), .z(g0));
  ncl_th #(.N(4), .M(4), .W0(2)) u_g1 (.rst(1'b0), .a({z.r1, y.r1, x.r1, c.r0}), .z(g1));

  if (VARIANT == GEN_S7_ORIG) begin : g_orig
    assign s.r0 = g0;
    ncl_th #(.N(2), .M(1)) u_th12 (.rst(1'b0), .a({g1, c.r1}), .z(s.r1));
  end else if (VARIANT == GEN_S7_X) begin : g_x
    assign s.r0 = g0;
    ncl_th #(.N(4), .M(3), .W0(3), .W1(2)) u_th34w32 (
      .rst(1'b0), .a({x.r1, x.r0, c.r1, g1}), .z(s.r1));
  end else begin : g_xy
    logic t;
    ncl_th24comp u_th24comp (.a({y.r1, y.r0, x.r0, x.r1}), .z(t));
    ncl_th #(.N(2), .M(2)) u_th22 (.rst(1'b0), .a({t, g0}), .z(s.r0));
    ncl_th #(.N(3), .M(3), .W0(2)) u_th33w2 (.rst(1'b0), .a({g1, c.r1, t}), .z(s.r1));
  end

endmodule
