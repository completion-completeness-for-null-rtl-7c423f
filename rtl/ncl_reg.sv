// ncl_reg: one-bit dual-rail NCL register with reset to NULL.
//
// Each rail passes through a TH22 gate (a 2-input C-element) whose second
// input is Ki: with Ki = rfd (1) a DATA value on d is captured and held until
// d returns to NULL and Ki has become rfn (0); with Ki = rfn a NULL is passed
// and held until Ki returns to rfd and d carries DATA again. Ko is the NOR of
// the two output rails: rfd while the register holds NULL, rfn while it holds
// DATA. rst forces both rails to 0 (NULL), so Ko starts as rfd. The register
// is built the usual NCL way (the document names it and gives its handshake
// but not its gates). No clock; all timing comes from the handshake.
//
// Inside a stage, Ko feeds back through completion gates to the Ki of the
// registers before it; lint tools report that path as a combinational loop.
// It is the intended self-timed handshake.
module ncl_reg
  import ncl_pkg::*;
(
  input  logic rst,
  input  dr_t  d,
  input  logic ki,
  output dr_t  q,
  output logic ko
);

  ncl_th #(.N(2), .M(2)) u_th22_r1 (.rst(rst), .a({ki, d.r1}), .z(q.r1));
  ncl_th #(.N(2), .M(2)) u_th22_r0 (.rst(rst), .a({ki, d.r0}), .z(q.r0));

  assign ko = (q == DR_NULL) ? RFD : RFN;  // NOR of the two rails

  // A dual-rail value never has both rails asserted. It can only happen when
  // the input changes DATA value without passing through NULL, i.e. when two
  // wavefronts mix upstream; this is reported but simulation continues so a
  // testbench can observe the consequences.
  always_comb begin
    if (!rst) assert (!(q.r1 && q.r0)) else $warning("ncl_reg: both rails asserted");
  end

endmodule
