// tb_and6_stage: self-checking test of the six-AND stage with bit-wise completion.
//
// Five arrangements of the stage are each run under three timings:
//   arrangement 0: TH33 partition sets, incomplete ANDs (not completion-complete)
//   arrangement 1: TH44 extended sets,  incomplete ANDs (default)
//   arrangement 2: TH33 partition sets, all-complete ANDs
//   arrangement 3: TH44 extended sets,  all-complete ANDs
//   arrangement 4: full-word completion, incomplete ANDs (the baseline)
//   timing 0: random, every output acknowledged independently
//   timing 1: the race of the completion-completeness argument: X(0) slow to
//             deliver DATA, everything else fast, outputs independent
//   timing 2: random, outputs acknowledged as one word (lockstep receivers)
// Every instance has its own asynchronous environment with the same 40 random
// wavefronts; wavefront 0 is X(3:0) = 0, 0, 1, 1 and wavefront 1 has X(2) = 1,
// X(1) = 0, the values of the worked example. Each output's n-th DATA value
// is compared with the AND of the bits of wavefront n, computed here.
// Checks:
//   - arrangements 1, 2, 3 never deliver a wrong value under any timing;
//   - arrangement 4 never delivers a wrong value under any timing;
//   - arrangements 2 and 4 deliver all 40 wavefronts under every timing;
//   - arrangements 1 and 3 deliver all 40 wavefronts with lockstep receivers.
//     With independent receivers they can stall: the widened TH44 sets
//     overlap, so one input bit can be released into the next wavefront
//     while another bit's TH44 has not yet seen all of its outputs NULL;
//     an output of the new wavefront then turns one of that TH44's inputs
//     back to rfn and its all-rfd moment never comes. Stalls are reported;
//   - arrangement 0 under the race delivers at least one wrong value.
module tb_and6_stage;
  import ncl_pkg::*;

  localparam int W = 40;
  localparam int NA = 5;      // arrangements
  localparam int NCFG = 3 * NA;  // arrangement = i % NA, timing = i / NA
  localparam int HI [6] = '{1, 2, 3, 2, 3, 3};
  localparam int LO [6] = '{0, 0, 0, 1, 1, 2};

  logic rst, start, stop;
  int checks = 0, failures = 0;

  dr_t  [3:0] x    [NCFG];
  logic [3:0] ko_x [NCFG];
  dr_t  [5:0] a    [NCFG];
  logic [5:0] ki_a [NCFG];
  logic       done [NCFG];
  int         errs [NCFG];

  logic [3:0] vals [W];
  logic [5:0] refs [W];

  for (genvar i = 0; i < NCFG; i++) begin : g_cfg
    and6_stage #(
      .COMPLETION        ((i % NA == 4) ? CSET_FULLWORD :
                          ((i % NA) % 2 == 1) ? CSET_EXTENDED : CSET_PARTITION),
      .ALL_COMPLETE_ANDS ((i % NA == 2 || i % NA == 3) ? 1'b1 : 1'b0)
    ) dut (.rst(rst), .x(x[i]), .ko_x(ko_x[i]), .a(a[i]), .ki_a(ki_a[i]));
    tb_ncl_env #(.NI(4), .NO(6), .W(W)) env (
      .start(start), .stop(stop), .in_d(x[i]), .ko_in(ko_x[i]),
      .out_q(a[i]), .ki_out(ki_a[i]), .done(done[i]));
    initial begin
      #1;
      env.vals = vals;
      if (i / NA == 1) env.dmax_data[0] = 60;
      if (i / NA == 2) env.lockstep = 1'b1;
      wait (stop);
      #1 errs[i] = env.check(refs);
    end
  end

  // Arrangements that must deliver every wavefront under timing t.
  function automatic logic must_finish(input int i);
    int ar = i % NA;
    return ar == 2 || ar == 4 || (ar != 0 && i / NA == 2);
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic all_done;
    int t;
    rst = 1'b1;
    start = 1'b0;
    stop = 1'b0;
    foreach (vals[w]) vals[w] = 4'($urandom);
    vals[0] = 4'b0011;
    vals[1] = 4'b0100;
    foreach (vals[w]) for (int k = 0; k < 6; k++) refs[w][k] = vals[w][HI[k]] & vals[w][LO[k]];
    #2 rst = 1'b0;
    #1 start = 1'b1;
    t = 0;
    do begin
      #10;
      t += 10;
      all_done = 1'b1;
      for (int i = 0; i < NCFG; i++)
        if (must_finish(i) && !done[i]) all_done = 1'b0;
    end while (!all_done && t < 200000);
    #2000;
    stop = 1'b1;
    #10;
    for (int i = 0; i < NCFG; i++) begin
      $display("arrangement %0d, timing %0d: finished=%0b wrong output bits=%0d",
               i % NA, i / NA, done[i], errs[i]);
      if ((i % NA) != 0) check(errs[i] == 0, $sformatf("arrangement %0d timing %0d wrong values", i % NA, i / NA));
      if (must_finish(i))
        check(done[i], $sformatf("arrangement %0d timing %0d did not finish", i % NA, i / NA));
    end
    check(errs[NA] > 0, "the race did not make arrangement 0 deliver a wrong value");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
