// and6_stage: NCL pipeline stage producing all six 2-input ANDs of X(3:0).
//
// Four dual-rail input registers hold X(3:0); six AND functions feed six
// output registers A(5:0):
//   A(5) = X3*X2 (complete)   A(4) = X3*X1   A(3) = X2*X1
//   A(2) = X3*X0              A(1) = X2*X0   A(0) = X1*X0 (complete)
// Only A(5) and A(0) need input-complete ANDs for the stage as a whole to be
// input-complete; the other four use the smaller input-incomplete AND unless
// ALL_COMPLETE_ANDS is set.
//
// Completion is bit-wise: input register X(b) takes its Ki from a completion
// component joining the Ko lines of the output registers whose AND uses X(b).
// With COMPLETION = CSET_PARTITION these are exactly those three outputs
// (TH33). That arrangement is not completion-complete with the incomplete
// ANDs: while X(0) is still NULL, X(3) and X(2) can be released to NULL and
// then to their next DATA, which meets the old X(1) in A(3). With
// COMPLETION = CSET_EXTENDED (the default, the fix chosen for this stage) the
// sets of X(3) and X(2) also take Ko of A(0), and those of X(1) and X(0) also
// take Ko of A(5) (TH44), so no input is released before all of A is DATA.
// The alternative fix, all-complete ANDs, is ALL_COMPLETE_ANDS = 1.
// COMPLETION = CSET_FULLWORD builds the full-word baseline instead: one
// completion tree (TH44 then TH33, two gate levels) joins all six output Ko
// lines and drives every input register's Ki. It is completion-complete by
// construction, but its completion path is one gate level longer. The four
// input Ko lines stay separate outputs in every arrangement; a preceding
// stage joins whichever of them it needs.
//
// The exact assignment of A(4)..A(1) to bit pairs is this design's reading;
// the document fixes A(5), A(3) and A(0). Handshake: Ko/Ki are rfd = 1,
// rfn = 0; every register resets to NULL. No clock.
//
// Lint tools report combinational loops here: every handshake runs from an
// output register's Ko through a completion gate back to an input register's
// Ki, and NCL registers and completion gates are state-holding threshold
// gates. These loops are how a self-timed stage sequences its wavefronts and
// are intended.
module and6_stage
  import ncl_pkg::*;
#(
  parameter and6_cset_e COMPLETION        = CSET_EXTENDED,
  parameter bit         ALL_COMPLETE_ANDS = 1'b0
) (
  input  logic      rst,
  input  dr_t [3:0] x,
  output logic [3:0] ko_x,
  output dr_t [5:0] a,
  input  logic [5:0] ki_a
);

  // Operand bits of each AND: A(k) = X(HI[k]) * X(LO[k]).
  localparam int HI [6] = '{1, 2, 3, 2, 3, 3};  // index k = 0..5
  localparam int LO [6] = '{0, 0, 0, 1, 1, 2};

  dr_t [3:0] xr;   // input register outputs
  dr_t [5:0] af;   // AND outputs
  logic [5:0] ko_a;
  logic [3:0] ki_x;

  for (genvar b = 0; b < 4; b++) begin : g_in
    ncl_reg u_reg (.rst(rst), .d(x[b]), .ki(ki_x[b]), .q(xr[b]), .ko(ko_x[b]));
  end

  for (genvar k = 0; k < 6; k++) begin : g_and
    if (ALL_COMPLETE_ANDS || k == 0 || k == 5) begin : g_c
      ncl_and_complete u_and (.x(xr[HI[k]]), .y(xr[LO[k]]), .z(af[k]));
    end else begin : g_i
      ncl_and_incomplete u_and (.x(xr[HI[k]]), .y(xr[LO[k]]), .z(af[k]));
    end
    ncl_reg u_reg (.rst(rst), .d(af[k]), .ki(ki_a[k]), .q(a[k]), .ko(ko_a[k]));
  end

  // Bit-wise completion sets: outputs that use each input bit.
  //   X3: A5 A4 A2   X2: A5 A3 A1   X1: A4 A3 A0   X0: A2 A1 A0
  if (COMPLETION == CSET_PARTITION) begin : g_part
    ncl_completion #(.N(3)) u_c3 (.ko_in({ko_a[5], ko_a[4], ko_a[2]}), .ko_out(ki_x[3]));
    ncl_completion #(.N(3)) u_c2 (.ko_in({ko_a[5], ko_a[3], ko_a[1]}), .ko_out(ki_x[2]));
    ncl_completion #(.N(3)) u_c1 (.ko_in({ko_a[4], ko_a[3], ko_a[0]}), .ko_out(ki_x[1]));
    ncl_completion #(.N(3)) u_c0 (.ko_in({ko_a[2], ko_a[1], ko_a[0]}), .ko_out(ki_x[0]));
  end else if (COMPLETION == CSET_FULLWORD) begin : g_full
    logic ki_all;
    ncl_completion #(.N(6)) u_c (.ko_in(ko_a), .ko_out(ki_all));
    assign ki_x = {4{ki_all}};
  end else begin : g_ext
    ncl_completion #(.N(4)) u_c3 (.ko_in({ko_a[5], ko_a[4], ko_a[2], ko_a[0]}), .ko_out(ki_x[3]));
    ncl_completion #(.N(4)) u_c2 (.ko_in({ko_a[5], ko_a[3], ko_a[1], ko_a[0]}), .ko_out(ki_x[2]));
    ncl_completion #(.N(4)) u_c1 (.ko_in({ko_a[5], ko_a[4], ko_a[3], ko_a[0]}), .ko_out(ki_x[1]));
    ncl_completion #(.N(4)) u_c0 (.ko_in({ko_a[5], ko_a[2], ko_a[1], ko_a[0]}), .ko_out(ki_x[0]));
  end

endmodule
