// mult_final_stage: last stage of a dual-rail pipelined 4x4 unsigned multiplier.
//
// Input registers hold C (carry from the previous column) and X, Y, Z (the
// bits summed in column 6). A full adder forms S(6) = X xor Y xor Z and the
// GEN_S7 component forms S(7) = C or carry(X, Y, Z); each goes through its own
// output register. The full adder's carry is not needed here (GEN_S7 rebuilds
// it), so co is left unused.
//
// Completion is bit-wise. X, Y and Z are used by both outputs, so their
// registers take Ki from a completion component (TH22) joining Ko(7) and
// Ko(6). C is used only by GEN_S7. With C_IN_SHARED_SET = 0 register C takes
// Ki straight from Ko(7): because the original GEN_S7 answers C = DATA1
// without waiting for X, Y, Z, C can then cycle to its next DATA while old X,
// Y, Z are still present, and the two wavefronts mix. With C_IN_SHARED_SET = 1
// (the default, the fix chosen for this stage, no extra gates) register C
// also takes Ki from the shared completion component. The other fix, a GEN_S7
// that is complete in X and Y, is GEN = GEN_S7_XY (GEN_S7_X is the
// insufficient half-fix). Handshake: rfd = 1, rfn = 0; registers reset to
// NULL. No clock.
//
// Lint tools report combinational loops here: every handshake runs from an
// output register's Ko through a completion gate back to an input register's
// Ki, and NCL registers and completion gates are state-holding threshold
// gates. These loops are how a self-timed stage sequences its wavefronts and
// are intended.
module mult_final_stage
  import ncl_pkg::*;
#(
  parameter bit      C_IN_SHARED_SET = 1'b1,
  parameter gen_s7_e GEN             = GEN_S7_ORIG
) (
  input  logic rst,
  input  dr_t  c,
  input  dr_t  x,
  input  dr_t  y,
  input  dr_t  z,
  output logic ko_c,
  output logic ko_x,
  output logic ko_y,
  output logic ko_z,
  output dr_t  s7,
  output dr_t  s6,
  input  logic ki7,
  input  logic ki6
);

  dr_t  cr, xr, yr, zr;
  dr_t  s7f, s6f, co_unused;
  logic ko7, ko6, k_xyz, ki_c;

  ncl_reg u_reg_c (.rst(rst), .d(c), .ki(ki_c),  .q(cr), .ko(ko_c));
  ncl_reg u_reg_x (.rst(rst), .d(x), .ki(k_xyz), .q(xr), .ko(ko_x));
  ncl_reg u_reg_y (.rst(rst), .d(y), .ki(k_xyz), .q(yr), .ko(ko_y));
  ncl_reg u_reg_z (.rst(rst), .d(z), .ki(k_xyz), .q(zr), .ko(ko_z));

  gen_s7 #(.VARIANT(GEN)) u_gen_s7 (.c(cr), .x(xr), .y(yr), .z(zr), .s(s7f));
  ncl_full_adder u_fa (.x(xr), .y(yr), .z(zr), .s(s6f), .co(co_unused));

  ncl_reg u_reg_s7 (.rst(rst), .d(s7f), .ki(ki7), .q(s7), .ko(ko7));
  ncl_reg u_reg_s6 (.rst(rst), .d(s6f), .ki(ki6), .q(s6), .ko(ko6));

  ncl_completion #(.N(2)) u_comp (.ko_in({ko7, ko6}), .ko_out(k_xyz));

  assign ki_c = C_IN_SHARED_SET ? k_xyz : ko7;

endmodule
