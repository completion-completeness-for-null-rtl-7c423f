// ncl_completion: completion component joining the Ko lines of a completion set.
//
// The output goes to rfd (1) once every input is rfd and to rfn (0) once every
// input is rfn, holding its value in between: an N-input C-element. Up to four
// inputs this is a single THnn gate (TH22, TH33, TH44 in the bit-wise stages).
// Because NCL gates have at most four inputs, a wider set is built as a two-
// level tree: full groups of four go through TH44 gates and the leftover
// inputs feed the second-level gate directly when it then has at most four
// inputs (for N = 6 this gives a TH44 followed by a TH33); otherwise the
// leftovers get a gate of their own. N is limited to 16. No clock.
module ncl_completion #(
  parameter int unsigned N = 4  // inputs in the completion set, 1..16
) (
  input  logic [N-1:0] ko_in,
  output logic         ko_out
);

  localparam int unsigned G  = N / 4;           // full groups of four
  localparam int unsigned R  = N % 4;           // leftover inputs
  localparam bit          RG = (G + R > 4);     // leftovers need their own gate
  localparam int unsigned L2 = RG ? G + 1 : G + R;  // second-level inputs

  initial assert (N >= 1 && N <= 16) else $error("ncl_completion: N must be 1..16");

  if (N <= 4) begin : g_single
    ncl_th #(.N(N), .M(N)) u_th (.rst(1'b0), .a(ko_in), .z(ko_out));
  end else begin : g_tree
    logic [L2-1:0] lvl2;
    for (genvar g = 0; g < G; g++) begin : g_grp
      ncl_th #(.N(4), .M(4)) u_th44 (.rst(1'b0), .a(ko_in[4*g +: 4]), .z(lvl2[g]));
    end
    if (R > 0) begin : g_left
      if (RG) begin : g_own
        ncl_th #(.N(R), .M(R)) u_thr (.rst(1'b0), .a(ko_in[N-1 -: R]), .z(lvl2[G]));
      end else begin : g_direct
        assign lvl2[L2-1 -: R] = ko_in[N-1 -: R];
      end
    end
    ncl_th #(.N(L2), .M(L2)) u_top (.rst(1'b0), .a(lvl2), .z(ko_out));
  end

endmodule
