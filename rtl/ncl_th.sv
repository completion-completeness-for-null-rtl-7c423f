// ncl_th: NCL threshold gate with hysteresis, THmn with optional input weights.
//
// The output asserts once the weighted number of asserted inputs reaches the
// threshold M, and deasserts only when every input is 0; in between it holds
// its value. This hysteresis is what lets an NCL circuit tell one DATA
// wavefront from the next, so it is the intended behaviour and is written as
// a latch (set/clear with hold); lint tools report it as a latch, and the
// loops that form through the handshake wires of a stage are likewise part of
// self-timed operation. Weights W0..W3 follow the usual THmnWw naming, e.g.
// TH44w2 is N=4, M=4, W0=2 and TH34w32 is N=4, M=3, W0=3, W1=2. A TH22 with
// rst is the reset-to-NULL gate of an NCL register; rst forces the output to
// 0 and is tied low in combinational gates.
//
// A lint check can report that it finds no latch in the always_latch
// block: the hold case is reached only through the set/clear condition,
// which that check does not follow. Synthesis infers one latch bit, as
// intended.
//
// Timing: no clock. The output follows the inputs combinationally.
module ncl_th #(
  parameter int unsigned N  = 2,  // number of inputs, 1..4
  parameter int unsigned M  = 2,  // threshold
  parameter int unsigned W0 = 1,
  parameter int unsigned W1 = 1,
  parameter int unsigned W2 = 1,
  parameter int unsigned W3 = 1
) (
  input  logic         rst,
  input  logic [N-1:0] a,
  output logic         z
);

  localparam int unsigned WSUM = W0 + ((N > 1) ? W1 : 0) + ((N > 2) ? W2 : 0)
                               + ((N > 3) ? W3 : 0);

  initial begin
    assert (N >= 1 && N <= 4) else $error("ncl_th: N must be 1..4");
    assert (M >= 1) else $error("ncl_th: M must be at least 1");
  end

  logic [7:0] weight_sum;
  logic       set_c, clr_c;

  always_comb begin
    logic [3:0] ax;
    ax = '0;
    ax[N-1:0] = a;
    weight_sum = (ax[0] ? 8'(W0) : 8'd0) + (ax[1] ? 8'(W1) : 8'd0)
               + (ax[2] ? 8'(W2) : 8'd0) + (ax[3] ? 8'(W3) : 8'd0);
    set_c = (weight_sum >= 8'(M));
    clr_c = (ax == 4'b0000);
  end

  always_latch begin
    if (rst)                z = 1'b0;
    else if (set_c || clr_c) z = set_c;
  end

  // WSUM is only used to catch thresholds no input set can reach.
  initial assert (WSUM >= M) else $error("ncl_th: threshold above total weight");

endmodule
