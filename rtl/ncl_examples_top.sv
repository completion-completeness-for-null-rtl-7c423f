// ncl_examples_top: the three bit-wise-completion NCL stages, side by side.
//
// and6_stage (all six ANDs of a 4-bit input), mult_final_stage (bits 7 and 6
// of a 4x4 product) and pp_gen4x4 (the sixteen partial products of a 4x4
// product) are independent circuits, each made completion-complete by the fix
// chosen for it: widened completion sets in the six-AND stage, a shared
// completion set for the carry register in the multiplier's last stage, and
// all-complete ANDs in the partial-product stage. Each stage keeps its own
// dual-rail data ports and Ko/Ki handshake lines (rfd = 1, rfn = 0); only
// reset, which puts every register at NULL, is common. No clock.
//
// Lint tools report combinational loops here: every handshake runs from an
// output register's Ko through a completion gate back to an input register's
// Ki, and NCL registers and completion gates are state-holding threshold
// gates. These loops are how a self-timed stage sequences its wavefronts and
// are intended.
module ncl_examples_top
  import ncl_pkg::*;
(
  input  logic        rst,
  // six-AND stage
  input  dr_t  [3:0]  and6_x,
  output logic [3:0]  and6_ko_x,
  output dr_t  [5:0]  and6_a,
  input  logic [5:0]  and6_ki_a,
  // multiplier last stage
  input  dr_t         mfs_c,
  input  dr_t         mfs_x,
  input  dr_t         mfs_y,
  input  dr_t         mfs_z,
  output logic        mfs_ko_c,
  output logic        mfs_ko_x,
  output logic        mfs_ko_y,
  output logic        mfs_ko_z,
  output dr_t         mfs_s7,
  output dr_t         mfs_s6,
  input  logic        mfs_ki7,
  input  logic        mfs_ki6,
  // partial-product generation
  input  dr_t  [3:0]  pp_x,
  input  dr_t  [3:0]  pp_y,
  output logic [3:0]  pp_ko_x,
  output logic [3:0]  pp_ko_y,
  output dr_t  [15:0] pp_p,
  input  logic [15:0] pp_ki_p
);

  and6_stage u_and6 (
    .rst(rst), .x(and6_x), .ko_x(and6_ko_x), .a(and6_a), .ki_a(and6_ki_a));

  mult_final_stage u_mfs (
    .rst(rst), .c(mfs_c), .x(mfs_x), .y(mfs_y), .z(mfs_z),
    .ko_c(mfs_ko_c), .ko_x(mfs_ko_x), .ko_y(mfs_ko_y), .ko_z(mfs_ko_z),
    .s7(mfs_s7), .s6(mfs_s6), .ki7(mfs_ki7), .ki6(mfs_ki6));

  pp_gen4x4 u_pp (
    .rst(rst), .x(pp_x), .y(pp_y), .ko_x(pp_ko_x), .ko_y(pp_ko_y),
    .p(pp_p), .ki_p(pp_ki_p));

endmodule
