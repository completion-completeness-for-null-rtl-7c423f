// pp_gen4x4: partial-product generation stage of a 4x4 unsigned multiplier.
//
// Eight dual-rail operand registers hold X(3:0) and Y(3:0). Sixteen AND
// functions form p[4*i+j] = X(j) * Y(i), each into its own output register.
// Completion is bit-wise: every operand bit is used by four products, so each
// of the eight operand registers takes Ki from a TH44 joining the Ko lines of
// those four product registers (X(j): p[j], p[4+j], p[8+j], p[12+j];
// Y(i): p[4i .. 4i+3]).
//
// Input-completeness of the whole stage needs only the four diagonal ANDs
// X(i)*Y(i) to be complete. With ALL_COMPLETE_ANDS = 0 the other twelve are
// the incomplete AND, and the stage is then not completion-complete, as in
// the six-AND stage. Widening the completion sets would need gates of more
// than four inputs (an extra logic level), so the chosen fix, and the
// default, is ALL_COMPLETE_ANDS = 1: every AND is complete. Handshake:
// rfd = 1, rfn = 0; registers reset to NULL. No clock.
//
// Lint tools report combinational loops here: every handshake runs from an
// output register's Ko through a completion gate back to an input register's
// Ki, and NCL registers and completion gates are state-holding threshold
// gates. These loops are how a self-timed stage sequences its wavefronts and
// are intended.
module pp_gen4x4
  import ncl_pkg::*;
#(
  parameter bit ALL_COMPLETE_ANDS = 1'b1
) (
  input  logic       rst,
  input  dr_t  [3:0] x,
  input  dr_t  [3:0] y,
  output logic [3:0] ko_x,
  output logic [3:0] ko_y,
  output dr_t [15:0] p,
  input  logic [15:0] ki_p
);

  dr_t  [3:0]  xr, yr;
  dr_t  [15:0] pf;
  logic [15:0] ko_p;
  logic [3:0]  ki_x, ki_y;

  for (genvar b = 0; b < 4; b++) begin : g_in
    ncl_reg u_reg_x (.rst(rst), .d(x[b]), .ki(ki_x[b]), .q(xr[b]), .ko(ko_x[b]));
    ncl_reg u_reg_y (.rst(rst), .d(y[b]), .ki(ki_y[b]), .q(yr[b]), .ko(ko_y[b]));
  end

  for (genvar i = 0; i < 4; i++) begin : g_row      // Y(i)
    for (genvar j = 0; j < 4; j++) begin : g_col    // X(j)
      if (ALL_COMPLETE_ANDS || i == j) begin : g_c
        ncl_and_complete u_and (.x(xr[j]), .y(yr[i]), .z(pf[4*i+j]));
      end else begin : g_i
        ncl_and_incomplete u_and (.x(xr[j]), .y(yr[i]), .z(pf[4*i+j]));
      end
      ncl_reg u_reg (.rst(rst), .d(pf[4*i+j]), .ki(ki_p[4*i+j]), .q(p[4*i+j]),
                     .ko(ko_p[4*i+j]));
    end
  end

  for (genvar b = 0; b < 4; b++) begin : g_comp
    ncl_completion #(.N(4)) u_cx (
      .ko_in({ko_p[12+b], ko_p[8+b], ko_p[4+b], ko_p[b]}), .ko_out(ki_x[b]));
    ncl_completion #(.N(4)) u_cy (.ko_in(ko_p[4*b +: 4]), .ko_out(ki_y[b]));
  end

endmodule
