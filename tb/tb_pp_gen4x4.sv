// tb_pp_gen4x4: self-checking test of the 4x4 partial-product stage.
//
// Two arrangements, each under three timings:
//   arrangement 0: all sixteen ANDs complete (default)
//   arrangement 1: only the four diagonal ANDs complete (not completion-
//                  complete)
//   timing 0: random, independent receivers for the sixteen products
//   timing 1: race: operand bit X(0) slow to deliver DATA, all else fast
//   timing 2: random, lockstep receivers
// Operands X, Y come from 40 random wavefronts. Product p[4i+j] of wavefront
// n must equal X(j) AND Y(i) of wavefront n, computed here. Checks:
// arrangement 0 delivers every wavefront, all correct, under every timing;
// arrangement 1 delivers at least one wrong product under the race.
module tb_pp_gen4x4;
  import ncl_pkg::*;

  localparam int W = 40;
  localparam int NCFG = 6;   // arrangement = i % 2, timing = i / 2

  logic rst, start, stop;
  int checks = 0, failures = 0;

  dr_t  [7:0]  in_d [NCFG];   // [3:0] = X, [7:4] = Y
  logic [7:0]  ko   [NCFG];
  dr_t  [15:0] p    [NCFG];
  logic [15:0] ki   [NCFG];
  logic        done [NCFG];
  int          errs [NCFG];

  logic [7:0]  vals [W];
  logic [15:0] refs [W];

  for (genvar i = 0; i < NCFG; i++) begin : g_cfg
    pp_gen4x4 #(.ALL_COMPLETE_ANDS((i % 2) == 0)) dut (
      .rst(rst), .x(in_d[i][3:0]), .y(in_d[i][7:4]), .ko_x(ko[i][3:0]),
      .ko_y(ko[i][7:4]), .p(p[i]), .ki_p(ki[i]));
    tb_ncl_env #(.NI(8), .NO(16), .W(W)) env (
      .start(start), .stop(stop), .in_d(in_d[i]), .ko_in(ko[i]),
      .out_q(p[i]), .ki_out(ki[i]), .done(done[i]));
    initial begin
      #1;
      env.vals = vals;
      if (i / 2 == 1) env.dmax_data[0] = 60;
      if (i / 2 == 2) env.lockstep = 1'b1;
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
    foreach (vals[w]) vals[w] = 8'($urandom);
    foreach (vals[w])
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) refs[w][4*i+j] = vals[w][j] & vals[w][4+i];
    #2 rst = 1'b0;
    #1 start = 1'b1;
    t = 0;
    do begin
      #10;
      t += 10;
      all_done = done[0] && done[2] && done[4];
    end while (!all_done && t < 200000);
    #2000;
    stop = 1'b1;
    #10;
    for (int i = 0; i < NCFG; i++) begin
      $display("arrangement %0d, timing %0d: finished=%0b wrong product bits=%0d",
               i % 2, i / 2, done[i], errs[i]);
      if ((i % 2) == 0) begin
        check(errs[i] == 0, $sformatf("complete ANDs, timing %0d: wrong values", i / 2));
        check(done[i], $sformatf("complete ANDs, timing %0d: did not finish", i / 2));
      end
    end
    check(errs[3] > 0, "the race did not make the incomplete-AND stage deliver a wrong value");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
