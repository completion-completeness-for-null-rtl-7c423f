// tb_ncl_examples_top: end-to-end test of the three stages in the top level,
// all at their default (completion-complete) arrangements.
//
// Each stage gets its own asynchronous environment and 64 random wavefronts,
// and every delivered output is compared with values computed here (the six
// ANDs of X; S(6) = X xor Y xor Z and S(7) = C or maj(X, Y, Z); the sixteen
// X(j) AND Y(i)). The six-AND stage uses lockstep receivers (with fully
// independent receivers its widened completion sets can stall, see its own
// testbench); the other two use independent receivers with random delays.
// The testbench also counts, by sampling inside the stages, how often each
// mechanism of bit-wise completion happened, and fails if one never did:
//   - an incomplete AND in the six-AND stage output DATA0 early, while one
//     operand register was still NULL;
//   - the widened TH44 set held X(3) at rfd although A(5:1) were all DATA,
//     because A(0) was not yet DATA;
//   - GEN_S7 output DATA while X, Y or Z was still NULL (C = DATA1);
//   - the shared completion set held register C although Ko(7) was rfn;
//   - in the partial-product stage, some operand register was released
//     (Ki = rfn) while another was still held at rfd (bit-wise completion).
module tb_ncl_examples_top;
  import ncl_pkg::*;

  localparam int W = 64;
  localparam int HI [6] = '{1, 2, 3, 2, 3, 3};
  localparam int LO [6] = '{0, 0, 0, 1, 1, 2};

  logic rst, start, stop;
  int checks = 0, failures = 0;

  dr_t  [3:0]  and6_x;
  logic [3:0]  and6_ko_x;
  dr_t  [5:0]  and6_a;
  logic [5:0]  and6_ki_a;
  dr_t  [3:0]  mfs_in;     // C, X, Y, Z
  logic [3:0]  mfs_ko;
  dr_t  [1:0]  mfs_s;      // S6, S7
  logic [1:0]  mfs_ki;
  dr_t  [7:0]  pp_in;
  logic [7:0]  pp_ko;
  dr_t  [15:0] pp_p;
  logic [15:0] pp_ki_p;
  logic        done_and6, done_mfs, done_pp;

  ncl_examples_top dut (
    .rst(rst),
    .and6_x(and6_x), .and6_ko_x(and6_ko_x), .and6_a(and6_a), .and6_ki_a(and6_ki_a),
    .mfs_c(mfs_in[0]), .mfs_x(mfs_in[1]), .mfs_y(mfs_in[2]), .mfs_z(mfs_in[3]),
    .mfs_ko_c(mfs_ko[0]), .mfs_ko_x(mfs_ko[1]), .mfs_ko_y(mfs_ko[2]), .mfs_ko_z(mfs_ko[3]),
    .mfs_s7(mfs_s[1]), .mfs_s6(mfs_s[0]), .mfs_ki7(mfs_ki[1]), .mfs_ki6(mfs_ki[0]),
    .pp_x(pp_in[3:0]), .pp_y(pp_in[7:4]), .pp_ko_x(pp_ko[3:0]), .pp_ko_y(pp_ko[7:4]),
    .pp_p(pp_p), .pp_ki_p(pp_ki_p));

  tb_ncl_env #(.NI(4), .NO(6), .W(W)) env_and6 (
    .start(start), .stop(stop), .in_d(and6_x), .ko_in(and6_ko_x),
    .out_q(and6_a), .ki_out(and6_ki_a), .done(done_and6));
  tb_ncl_env #(.NI(4), .NO(2), .W(W)) env_mfs (
    .start(start), .stop(stop), .in_d(mfs_in), .ko_in(mfs_ko),
    .out_q(mfs_s), .ki_out(mfs_ki), .done(done_mfs));
  tb_ncl_env #(.NI(8), .NO(16), .W(W)) env_pp (
    .start(start), .stop(stop), .in_d(pp_in), .ko_in(pp_ko),
    .out_q(pp_p), .ki_out(pp_ki_p), .done(done_pp));

  logic [3:0]  v_and6 [W];
  logic [5:0]  r_and6 [W];
  logic [3:0]  v_mfs  [W];
  logic [1:0]  r_mfs  [W];
  logic [7:0]  v_pp   [W];
  logic [15:0] r_pp   [W];

  // Mechanism counters, sampled every time unit.
  int n_early_and, n_th44_hold, n_gen_early, n_c_held, n_pp_bitwise;

  // Early outputs are counted when the output turns DATA, not while it is
  // held during the following NULL phase.
  initial begin
    logic [5:0] and_was;
    logic       gen_was;
    n_early_and = 0; n_th44_hold = 0; n_gen_early = 0; n_c_held = 0; n_pp_bitwise = 0;
    and_was = '0;
    gen_was = 1'b0;
    wait (start);
    while (!stop) begin
      #1;
      for (int k = 1; k < 5; k++)
        if (dr_is_data(dut.u_and6.af[k]) && !and_was[k] &&
            (dr_is_null(dut.u_and6.xr[HI[k]]) || dr_is_null(dut.u_and6.xr[LO[k]])))
          n_early_and++;
      if (dut.u_and6.ko_a[5:1] == 5'b00000 && dut.u_and6.ko_a[0] == RFD && dut.u_and6.ki_x[3] == RFD)
        n_th44_hold++;
      for (int k = 0; k < 6; k++) and_was[k] = dr_is_data(dut.u_and6.af[k]);
      if (dr_is_data(dut.u_mfs.s7f) && !gen_was &&
          (dr_is_null(dut.u_mfs.xr) || dr_is_null(dut.u_mfs.yr) || dr_is_null(dut.u_mfs.zr)))
        n_gen_early++;
      gen_was = dr_is_data(dut.u_mfs.s7f);
      if (dut.u_mfs.ko7 == RFN && dut.u_mfs.ki_c == RFD) n_c_held++;
      if ((dut.u_pp.ki_x != 4'hF && dut.u_pp.ki_x != 4'h0) ||
          (dut.u_pp.ki_y != 4'hF && dut.u_pp.ki_y != 4'h0))
        n_pp_bitwise++;
    end
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #600000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, e;
    rst = 1'b1;
    start = 1'b0;
    stop = 1'b0;
    for (int w = 0; w < W; w++) begin
      logic c, x, y, z;
      v_and6[w] = 4'($urandom);
      for (int k = 0; k < 6; k++) r_and6[w][k] = v_and6[w][HI[k]] & v_and6[w][LO[k]];
      v_mfs[w] = 4'($urandom);
      {z, y, x, c} = v_mfs[w];
      r_mfs[w] = {c | (x & y) | (x & z) | (y & z), x ^ y ^ z};
      v_pp[w] = 8'($urandom);
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) r_pp[w][4*i+j] = v_pp[w][j] & v_pp[w][4+i];
    end
    // The worked examples first: X(0) late in the six-AND stage, C = DATA1
    // with X = Y = Z = DATA0 in the last multiplier stage.
    v_and6[0] = 4'b0011;
    r_and6[0] = 6'b000001;
    v_mfs[0] = 4'b0001;
    r_mfs[0] = 2'b10;
    #1;
    env_and6.vals = v_and6;
    env_and6.lockstep = 1'b1;
    env_and6.dmax_data[0] = 20;
    env_mfs.vals = v_mfs;
    env_mfs.dmax_null = '{0, 0, 40, 40};
    env_pp.vals = v_pp;
    #1 rst = 1'b0;
    #1 start = 1'b1;
    t = 0;
    while (!(done_and6 && done_mfs && done_pp) && t < 300000) begin
      #10;
      t += 10;
    end
    #10;
    stop = 1'b1;
    #2;
    check(done_and6, "six-AND stage did not deliver every wavefront");
    check(done_mfs, "multiplier last stage did not deliver every wavefront");
    check(done_pp, "partial-product stage did not deliver every wavefront");
    e = env_and6.check(r_and6);
    check(e == 0, $sformatf("six-AND stage: %0d wrong bits", e));
    e = env_mfs.check(r_mfs);
    check(e == 0, $sformatf("multiplier last stage: %0d wrong bits", e));
    e = env_pp.check(r_pp);
    check(e == 0, $sformatf("partial-product stage: %0d wrong bits", e));
    $display("wavefronts: and6=%0d mfs=%0d pp=%0d (in %0d time units)",
             env_and6.ndone[0], env_mfs.ndone[0], env_pp.ndone[0], t);
    $display("early AND outputs=%0d  TH44 holds=%0d  early GEN_S7=%0d  C held=%0d  pp bit-wise=%0d",
             n_early_and, n_th44_hold, n_gen_early, n_c_held, n_pp_bitwise);
    check(n_early_and > 0, "no early incomplete-AND output");
    check(n_th44_hold > 0, "widened completion set never held an input");
    check(n_gen_early > 0, "GEN_S7 never answered early");
    check(n_c_held > 0, "shared completion set never held register C");
    check(n_pp_bitwise > 0, "no bit-wise release in the partial-product stage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
