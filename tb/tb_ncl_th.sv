// tb_ncl_th: self-checking test of the NCL threshold gate with hysteresis.
//
// Seven gate configurations (TH12, TH22 with reset, TH23, TH33w2, TH34w2,
// TH34w32, TH44w2) share one 4-bit random stimulus. For each, the testbench
// keeps its own model of the gate, written from the sum-of-products form of
// the gate's set function: set -> 1, all inputs 0 -> 0, otherwise hold. It
// checks every output after every input change and that reset clears TH22.
module tb_ncl_th;

  logic [3:0] a;
  logic       rst;
  logic [6:0] z, m;
  int checks = 0, failures = 0;

  ncl_th #(.N(2), .M(1))                 u_th12   (.rst(1'b0), .a(a[1:0]), .z(z[0]));
  ncl_th #(.N(2), .M(2))                 u_th22   (.rst(rst),  .a(a[1:0]), .z(z[1]));
  ncl_th #(.N(3), .M(2))                 u_th23   (.rst(1'b0), .a(a[2:0]), .z(z[2]));
  ncl_th #(.N(3), .M(3), .W0(2))         u_th33w2 (.rst(1'b0), .a(a[2:0]), .z(z[3]));
  ncl_th #(.N(4), .M(3), .W0(2))         u_th34w2 (.rst(1'b0), .a(a),      .z(z[4]));
  ncl_th #(.N(4), .M(3), .W0(3), .W1(2)) u_th34w32(.rst(1'b0), .a(a),      .z(z[5]));
  ncl_th #(.N(4), .M(4), .W0(2))         u_th44w2 (.rst(1'b0), .a(a),      .z(z[6]));

  function automatic logic [6:0] set_fn(input logic [3:0] v);
    logic A, B, C, D;
    {D, C, B, A} = v;
    set_fn[0] = A | B;
    set_fn[1] = A & B;
    set_fn[2] = (A & B) | (A & C) | (B & C);
    set_fn[3] = (A & B) | (A & C);
    set_fn[4] = (A & B) | (A & C) | (A & D) | (B & C & D);
    set_fn[5] = A | (B & C) | (B & D);
    set_fn[6] = (A & B & C) | (A & B & D) | (A & C & D);
  endfunction

  function automatic logic [6:0] clr_fn(input logic [3:0] v);
    clr_fn[0] = (v[1:0] == 0);
    clr_fn[1] = (v[1:0] == 0);
    clr_fn[2] = (v[2:0] == 0);
    clr_fn[3] = (v[2:0] == 0);
    clr_fn[4] = (v == 0);
    clr_fn[5] = (v == 0);
    clr_fn[6] = (v == 0);
  endfunction

  task automatic step(input logic [3:0] v);
    logic [6:0] s, c;
    a = v;
    s = set_fn(v);
    c = clr_fn(v);
    for (int g = 0; g < 7; g++) m[g] = s[g] ? 1'b1 : (c[g] ? 1'b0 : m[g]);
    #1;
    checks++;
    if (z !== m) begin
      failures++;
      $display("mismatch a=%b z=%b model=%b", v, z, m);
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
    rst = 1'b0;
    m = '0;
    step(4'b0000);
    // Hold: each gate keeps 1 after set until all inputs return to 0.
    step(4'b1111);
    step(4'b0100);
    step(4'b0010);
    step(4'b0000);
    repeat (2000) step(4'($urandom));
    // Reset clears the TH22 even with both inputs high.
    step(4'b0011);
    rst = 1'b1;
    m[1] = 1'b0;
    #1;
    checks++;
    if (z[1] !== 1'b0) begin failures++; $display("reset did not clear TH22"); end
    rst = 1'b0;
    step(4'b0001);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
