// tb_ncl_reg: self-checking test of the one-bit dual-rail NCL register.
//
// Checks reset to NULL (Ko = rfd), then a full four-phase cycle: DATA passes
// only while Ki is rfd, is held after the input returns to NULL until Ki
// becomes rfn, NULL passes only while Ki is rfn, and Ko is always the NOR of
// the two output rails. A random four-phase exchange follows, compared with a
// per-rail C-element model kept in the testbench.
module tb_ncl_reg;
  import ncl_pkg::*;

  logic rst, ki, ko;
  dr_t  d, q, m;
  int checks = 0, failures = 0;

  ncl_reg dut (.rst(rst), .d(d), .ki(ki), .q(q), .ko(ko));

  task automatic expect_q(input dr_t exp, input string what);
    #1;
    checks++;
    if (q !== exp || ko !== ~(exp.r1 | exp.r0)) begin
      failures++;
      $display("%s: q=%b ko=%b expected q=%b", what, q, ko, exp);
    end
  endtask

  task automatic apply(input dr_t dv, input logic kv);
    d = dv;
    ki = kv;
    // C-element per rail: both inputs 1 -> 1, both 0 -> 0, else hold.
    if (dv.r1 && kv) m.r1 = 1'b1; else if (!dv.r1 && !kv) m.r1 = 1'b0;
    if (dv.r0 && kv) m.r0 = 1'b1; else if (!dv.r0 && !kv) m.r0 = 1'b0;
    expect_q(m, "random walk");
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    d = DR_NULL;
    ki = RFD;
    expect_q(DR_NULL, "reset");
    rst = 1'b0;
    for (int v = 0; v < 2; v++) begin
      d = dr_data(v[0]);      expect_q(dr_data(v[0]), "DATA passes on rfd");
      d = DR_NULL;            expect_q(dr_data(v[0]), "DATA held until rfn");
      ki = RFN;               expect_q(DR_NULL, "NULL passes on rfn");
      d = dr_data(~v[0]);     expect_q(DR_NULL, "DATA blocked on rfn");
      d = DR_NULL;            expect_q(DR_NULL, "still NULL");
      ki = RFD;               expect_q(DR_NULL, "rfd with NULL input");
    end
    m = DR_NULL;
    repeat (1000) begin
      dr_t dv;
      logic kv;
      // Sender and receiver follow the four-phase protocol but act at random:
      // new DATA only after Ko = rfd, NULL only after Ko = rfn; Ki = rfn
      // only while q is DATA, Ki = rfd only while q is NULL.
      dv = d;
      kv = ki;
      if ($urandom_range(0, 1) == 1) begin
        if (ko == RFD && dr_is_null(d)) dv = dr_data(1'($urandom));
        else if (ko == RFN && dr_is_data(d)) dv = DR_NULL;
      end
      if ($urandom_range(0, 1) == 1) begin
        if (dr_is_data(q)) kv = RFN;
        else kv = RFD;
      end
      apply(dv, kv);
    end
    // Reset in the middle of a DATA phase.
    d = DR_NULL;
    ki = RFN;
    expect_q(DR_NULL, "back to NULL");
    d = dr_data(1'b1);
    ki = RFD;
    #1;
    rst = 1'b1;
    expect_q(DR_NULL, "reset while DATA");
    rst = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
