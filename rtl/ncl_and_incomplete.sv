// ncl_and_incomplete: input-incomplete dual-rail AND, Z = X * Y.
//
// Z0 = TH12(X0, Y0): DATA0 appears as soon as either operand is DATA0, without
// waiting for the other operand. Z1 = TH22(X1, Y1). Two gates, as drawn for
// the incomplete AND in the document; it is smaller than the complete version
// but lets its output change while one input is still NULL, which is what
// makes bit-wise completion around it unsafe unless the completion sets are
// widened. No clock.
module ncl_and_incomplete
  import ncl_pkg::*;
(
  input  dr_t x,
  input  dr_t y,
  output dr_t z
);

  ncl_th #(.N(2), .M(1)) u_th12 (.rst(1'b0), .a({y.r0, x.r0}), .z(z.r0));
  ncl_th #(.N(2), .M(2)) u_th22 (.rst(1'b0), .a({y.r1, x.r1}), .z(z.r1));

endmodule
