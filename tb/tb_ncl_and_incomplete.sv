// tb_ncl_and_incomplete: self-checking test of the input-incomplete dual-rail
// AND. For every operand pair, in both arrival orders, it checks that DATA0
// appears as soon as a single operand is DATA0 (and that a lone DATA1 leaves
// the output NULL), that the output equals X AND Y once both are DATA, that
// DATA1 holds while one operand is DATA but DATA0 holds only while a DATA0
// operand remains, and that it is NULL after both
// operands are NULL. It also counts the early DATA0 outputs.
module tb_ncl_and_incomplete;
  import ncl_pkg::*;

  dr_t x, y, z;
  int checks = 0, failures = 0, early = 0;

  ncl_and_incomplete dut (.x(x), .y(y), .z(z));

  task automatic expect_eq(input dr_t exp, input string what);
    #1;
    checks++;
    if (z !== exp) begin
      failures++;
      $display("%s: z=%b expected %b (x=%b y=%b)", what, z, exp, x, y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = DR_NULL;
    y = DR_NULL;
    expect_eq(DR_NULL, "initial");
    for (int rep = 0; rep < 50; rep++) begin
      for (int v = 0; v < 4; v++) begin
        logic xv, yv, xfirst, xnull_first, first;
        xv = v[0];
        yv = v[1];
        xfirst = 1'($urandom);
        xnull_first = 1'($urandom);
        first = xfirst ? xv : yv;
        if (xfirst) x = dr_data(xv); else y = dr_data(yv);
        expect_eq(first ? DR_NULL : dr_data(1'b0), "one operand DATA");
        if (!first && z == dr_data(1'b0)) early++;
        if (xfirst) y = dr_data(yv); else x = dr_data(xv);
        expect_eq(dr_data(xv & yv), "both DATA");
        // DATA1 is held by the TH22 while either DATA1 rail is high; DATA0
        // is held by the TH12 only while the remaining operand is DATA0.
        if (xnull_first) x = DR_NULL; else y = DR_NULL;
        expect_eq((xv & yv) ? dr_data(1'b1)
                  : ((xnull_first ? yv : xv) ? DR_NULL : dr_data(1'b0)), "one operand NULL");
        x = DR_NULL;
        y = DR_NULL;
        expect_eq(DR_NULL, "both NULL");
      end
    end
    checks++;
    if (early == 0) begin failures++; $display("no early DATA0 output seen"); end
    $display("early DATA0 outputs: %0d", early);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
