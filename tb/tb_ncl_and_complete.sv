// tb_ncl_and_complete: self-checking test of the input-complete dual-rail AND.
//
// For every operand pair, in both arrival orders, the testbench checks that
// the output stays NULL while only one operand is DATA, equals X AND Y once
// both are DATA, stays DATA while one operand is still DATA, and returns to
// NULL only after both operands are NULL.
module tb_ncl_and_complete;
  import ncl_pkg::*;

  dr_t x, y, z;
  int checks = 0, failures = 0;

  ncl_and_complete dut (.x(x), .y(y), .z(z));

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
        logic xv, yv, xfirst, xnull_first;
        xv = v[0];
        yv = v[1];
        xfirst = 1'($urandom);
        xnull_first = 1'($urandom);
        if (xfirst) x = dr_data(xv); else y = dr_data(yv);
        expect_eq(DR_NULL, "one operand DATA");
        if (xfirst) y = dr_data(yv); else x = dr_data(xv);
        expect_eq(dr_data(xv & yv), "both DATA");
        if (xnull_first) x = DR_NULL; else y = DR_NULL;
        expect_eq(dr_data(xv & yv), "one operand NULL");
        x = DR_NULL;
        y = DR_NULL;
        expect_eq(DR_NULL, "both NULL");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
