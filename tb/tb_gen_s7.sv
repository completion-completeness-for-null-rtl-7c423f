// tb_gen_s7: self-checking test of the three GEN_S7 versions side by side.
//
// Each of the 16 input combinations is applied repeatedly with C, X, Y, Z
// arriving and leaving in random order. Expected S = C OR maj(X, Y, Z). For
// each version the testbench knows which inputs the output must wait for:
// the original waits only for C, the X version also for X when C is DATA1,
// and the XY version for C, X and Y. It checks that the output stays NULL
// until those inputs are DATA, that any DATA output is the right value, that
// the output is DATA once all inputs are, that it stays DATA while any of
// those inputs is still DATA, and that it ends NULL. It also checks that the
// original answers C = DATA1 alone with DATA1 (the early output that breaks
// completion-completeness), and that the revised versions do not.
module tb_gen_s7;
  import ncl_pkg::*;

  dr_t in [4];   // 0: C, 1: X, 2: Y, 3: Z
  dr_t s [3];
  int checks = 0, failures = 0, early_c1 = 0;

  gen_s7 #(.VARIANT(GEN_S7_ORIG)) u_orig (.c(in[0]), .x(in[1]), .y(in[2]), .z(in[3]), .s(s[0]));
  gen_s7 #(.VARIANT(GEN_S7_X))    u_x    (.c(in[0]), .x(in[1]), .y(in[2]), .z(in[3]), .s(s[1]));
  gen_s7 #(.VARIANT(GEN_S7_XY))   u_xy   (.c(in[0]), .x(in[1]), .y(in[2]), .z(in[3]), .s(s[2]));

  task automatic check(input logic ok, input string what, input int ver);
    checks++;
    if (!ok) begin
      failures++;
      $display("%s (version %0d): C=%b X=%b Y=%b Z=%b S=%b", what, ver,
               in[0], in[1], in[2], in[3], s[ver]);
    end
  endtask

  // Inputs (bit mask over C, X, Y, Z) the version must wait for.
  function automatic logic [3:0] needed(input int ver, input logic cval);
    case (ver)
      0: return 4'b0001;
      1: return cval ? 4'b0011 : 4'b0001;
      default: return 4'b0111;
    endcase
  endfunction

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (in[i]) in[i] = DR_NULL;
    #1;
    for (int rep = 0; rep < 30; rep++) begin
      for (int v = 0; v < 16; v++) begin
        int order[4];
        logic [3:0] present;
        logic f;
        f = v[0] | ((v[1] & v[2]) | (v[1] & v[3]) | (v[2] & v[3]));
        order = '{0, 1, 2, 3};
        order.shuffle();
        present = '0;
        for (int k = 0; k < 4; k++) begin
          in[order[k]] = dr_data(v[order[k]]);
          present[order[k]] = 1'b1;
          #1;
          for (int ver = 0; ver < 3; ver++) begin
            logic [3:0] need;
            need = needed(ver, v[0]);
            if ((present & need) != need) check(s[ver] == DR_NULL, "output before required inputs", ver);
            check(s[ver] == DR_NULL || s[ver] == dr_data(f), "output value", ver);
          end
          if (present == 4'b0001 && v[0]) begin
            check(s[0] == dr_data(1'b1), "original answers C=DATA1 alone", 0);
            check(s[1] == DR_NULL && s[2] == DR_NULL, "revised versions wait", 1);
            if (s[0] == dr_data(1'b1)) early_c1++;
          end
        end
        for (int ver = 0; ver < 3; ver++) check(s[ver] == dr_data(f), "all DATA", ver);
        order.shuffle();
        for (int k = 0; k < 4; k++) begin
          in[order[k]] = DR_NULL;
          present[order[k]] = 1'b0;
          #1;
          for (int ver = 0; ver < 3; ver++)
            if ((present & needed(ver, v[0])) != 0)
              check(s[ver] == dr_data(f), "held while a required input is DATA", ver);
        end
        for (int ver = 0; ver < 3; ver++) check(s[ver] == DR_NULL, "all NULL", ver);
      end
    end
    checks++;
    if (early_c1 == 0) begin failures++; $display("early C=DATA1 answer never seen"); end
    $display("early C=DATA1 answers: %0d", early_c1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
