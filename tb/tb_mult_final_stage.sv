// tb_mult_final_stage: self-checking test of the multiplier's last stage.
//
// Five arrangements, each under three timings:
//   arrangement 0: register C on its own Ki (Ko(7)), original GEN_S7
//   arrangement 1: register C in the shared completion set, original GEN_S7
//                  (default)
//   arrangement 2: register C on its own Ki, GEN_S7 complete in X
//   arrangement 3: register C on its own Ki, GEN_S7 complete in X and Y
//   arrangement 4: register C in the shared set, GEN_S7 complete in X and Y
//   timing 0: random, independent receivers for S(7) and S(6)
//   timing 1: the race of the completion-completeness argument: C and X
//             fast, Y and Z slow to return to NULL (standing in for the slow
//             full adder: old Y, Z stay at the GEN_S7 inputs)
//   timing 2: random, lockstep receivers
// Inputs are C, X, Y, Z from 48 random wavefronts; the first two are the
// worked example (C = 1, X = Y = Z = 0, then C = 0, X = Y = Z = 1). Expected
// outputs, computed here: S(6) = X xor Y xor Z, S(7) = C or maj(X, Y, Z).
// Checks: arrangements 1, 3 and 4 never deliver a wrong value and deliver
// every wavefront under every timing; arrangements 0 and 2 deliver at least
// one wrong value under the race (two wavefronts mixing in GEN_S7).
module tb_mult_final_stage;
  import ncl_pkg::*;

  localparam int W = 48;
  localparam int NA = 5;
  localparam int NCFG = 3 * NA;     // arrangement = i % NA, timing = i / NA
  localparam bit      SHARED [NA] = '{1'b0, 1'b1, 1'b0, 1'b0, 1'b1};
  localparam gen_s7_e GENV   [NA] = '{GEN_S7_ORIG, GEN_S7_ORIG, GEN_S7_X, GEN_S7_XY, GEN_S7_XY};
  localparam bit      GOOD   [NA] = '{1'b0, 1'b1, 1'b0, 1'b1, 1'b1};

  logic rst, start, stop;
  int checks = 0, failures = 0;

  dr_t  [3:0] in_d [NCFG];
  logic [3:0] ko   [NCFG];
  dr_t  [1:0] s    [NCFG];
  logic [1:0] ki   [NCFG];
  logic       done [NCFG];
  int         errs [NCFG];

  logic [3:0] vals [W];   // {Z, Y, X, C}
  logic [1:0] refs [W];   // {S7, S6}

  for (genvar i = 0; i < NCFG; i++) begin : g_cfg
    mult_final_stage #(.C_IN_SHARED_SET(SHARED[i % NA]), .GEN(GENV[i % NA])) dut (
      .rst(rst), .c(in_d[i][0]), .x(in_d[i][1]), .y(in_d[i][2]), .z(in_d[i][3]),
      .ko_c(ko[i][0]), .ko_x(ko[i][1]), .ko_y(ko[i][2]), .ko_z(ko[i][3]),
      .s7(s[i][1]), .s6(s[i][0]), .ki7(ki[i][1]), .ki6(ki[i][0]));
    tb_ncl_env #(.NI(4), .NO(2), .W(W)) env (
      .start(start), .stop(stop), .in_d(in_d[i]), .ko_in(ko[i]),
      .out_q(s[i]), .ki_out(ki[i]), .done(done[i]));
    initial begin
      #1;
      env.vals = vals;
      if (i / NA == 1) begin
        env.dmax_data = '{1, 1, 1, 1};
        env.dmax_null = '{0, 0, 80, 80};
        env.dmax_out  = '{0, 0};
      end
      if (i / NA == 2) env.lockstep = 1'b1;
      wait (stop);
      #1 errs[i] = env.check(refs);
    end
  end

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
    vals[0] = 4'b0001;
    vals[1] = 4'b1110;
    foreach (vals[w]) begin
      logic c, x, y, z;
      {z, y, x, c} = vals[w];
      refs[w] = {c | (x & y) | (x & z) | (y & z), x ^ y ^ z};
    end
    #2 rst = 1'b0;
    #1 start = 1'b1;
    t = 0;
    do begin
      #10;
      t += 10;
      all_done = 1'b1;
      for (int i = 0; i < NCFG; i++) if (GOOD[i % NA] && !done[i]) all_done = 1'b0;
    end while (!all_done && t < 200000);
    #2000;
    stop = 1'b1;
    #10;
    for (int i = 0; i < NCFG; i++) begin
      $display("arrangement %0d, timing %0d: finished=%0b wrong output bits=%0d",
               i % NA, i / NA, done[i], errs[i]);
      if (GOOD[i % NA]) begin
        check(errs[i] == 0, $sformatf("arrangement %0d timing %0d wrong values", i % NA, i / NA));
        check(done[i], $sformatf("arrangement %0d timing %0d did not finish", i % NA, i / NA));
      end
    end
    check(errs[NA + 0] > 0, "the race did not make arrangement 0 deliver a wrong value");
    check(errs[NA + 2] > 0, "the race did not make arrangement 2 deliver a wrong value");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
