// tb_ncl_full_adder: self-checking test of the dual-rail NCL full adder.
//
// All eight operand combinations are applied many times with the three inputs
// arriving, and later leaving, in random order. Checks: the sum stays NULL
// until all three inputs are DATA (input-completeness), the carry is never a
// wrong DATA value, both equal X + Y + Z once all inputs are DATA, the sum
// stays DATA until the last input is NULL, and both outputs end NULL.
module tb_ncl_full_adder;
  import ncl_pkg::*;

  dr_t x, y, z, s, co;
  int checks = 0, failures = 0;

  ncl_full_adder dut (.x(x), .y(y), .z(z), .s(s), .co(co));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%s: x=%b y=%b z=%b s=%b co=%b", what, x, y, z, s, co);
    end
  endtask

  task automatic set_in(input int k, input dr_t v);
    case (k)
      0: x = v;
      1: y = v;
      default: z = v;
    endcase
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = DR_NULL; y = DR_NULL; z = DR_NULL;
    #1;
    check(s == DR_NULL && co == DR_NULL, "initial NULL");
    for (int rep = 0; rep < 40; rep++) begin
      for (int v = 0; v < 8; v++) begin
        int order[3];
        logic [1:0] sum;
        order = '{0, 1, 2};
        order.shuffle();
        sum = 2'(v[0]) + 2'(v[1]) + 2'(v[2]);
        for (int k = 0; k < 3; k++) begin
          set_in(order[k], dr_data(v[order[k]]));
          #1;
          if (k < 2) check(s == DR_NULL, "sum before all inputs DATA");
          check(co == DR_NULL || co == dr_data(sum[1]), "carry value");
        end
        check(s == dr_data(sum[0]), "sum value");
        check(co == dr_data(sum[1]), "carry value, all DATA");
        order.shuffle();
        for (int k = 0; k < 3; k++) begin
          set_in(order[k], DR_NULL);
          #1;
          if (k < 2) check(s == dr_data(sum[0]), "sum held until all NULL");
        end
        check(s == DR_NULL && co == DR_NULL, "all NULL");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
