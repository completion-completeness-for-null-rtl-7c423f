// tb_ncl_th24comp: self-checking test of the TH24comp gate (set (A + B)(C + D),
// clear when all inputs are 0, hold otherwise) against a model kept in the
// testbench, over directed and random input sequences.
module tb_ncl_th24comp;

  logic [3:0] a;
  logic       z, m;
  int checks = 0, failures = 0;

  ncl_th24comp dut (.a(a), .z(z));

  task automatic step(input logic [3:0] v);
    logic A, B, C, D, s;
    {D, C, B, A} = v;
    a = v;
    s = (A | B) & (C | D);
    m = s ? 1'b1 : ((v == 0) ? 1'b0 : m);
    #1;
    checks++;
    if (z !== m) begin failures++; $display("mismatch a=%b z=%b model=%b", v, z, m); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = 1'b0;
    step(4'b0000);
    step(4'b0101);  // AC sets
    step(4'b0010);  // hold
    step(4'b0000);  // clear
    step(4'b0011);  // AB alone does not set
    step(4'b0000);
    step(4'b1010);  // BD sets
    step(4'b0000);
    repeat (1000) step(4'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
