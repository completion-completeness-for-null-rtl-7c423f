// tb_ncl_completion: self-checking test of the completion component for set
// sizes 1, 2, 3, 4, 6, 7, 11 and 16 (single gate, one- and two-level trees).
// Each instance is driven from rfn to all-rfd and back, flipping its inputs
// one at a time in random order; the output must hold its old value until
// the last input has flipped and then follow (C-element behaviour). Random
// partial flips that are undone again must never change the output.
module tb_ncl_completion;

  localparam int NS [8] = '{1, 2, 3, 4, 6, 7, 11, 16};

  logic [15:0] kin [8];
  logic [7:0]  kout;
  int checks = 0, failures = 0;

  for (genvar g = 0; g < 8; g++) begin : g_dut
    ncl_completion #(.N(NS[g])) dut (.ko_in(kin[g][NS[g]-1:0]), .ko_out(kout[g]));
  end

  task automatic check(input int g, input logic exp, input string what);
    checks++;
    if (kout[g] !== exp) begin
      failures++;
      $display("N=%0d %s: out=%b expected %b in=%b", NS[g], what, kout[g], exp, kin[g]);
    end
  endtask

  function automatic logic [15:0] mask(input int n);
    return 16'((32'd1 << n) - 1);
  endfunction

  // Move instance g to all-'target', one input at a time.
  task automatic sweep(input int g, input logic target);
    int order[16];
    int n;
    n = NS[g];
    for (int i = 0; i < 16; i++) order[i] = i;
    order.shuffle();
    for (int k = 0, cnt = 0; k < 16; k++) begin
      if (order[k] < n && kin[g][order[k]] != target) begin
        kin[g][order[k]] = target;
        cnt++;
        #1;
        if ((kin[g] & mask(n)) == (target ? mask(n) : 16'd0)) check(g, target, "all flipped");
        else check(g, ~target, "held until last flip");
      end
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
    foreach (kin[g]) kin[g] = '0;
    #1;
    for (int g = 0; g < 8; g++) check(g, 1'b0, "start at rfn");
    repeat (40) begin
      for (int g = 0; g < 8; g++) begin
        logic cur;
        sweep(g, 1'b1);
        // Partial excursion toward rfn that is undone: no output change.
        cur = kout[g];
        if (NS[g] > 1) begin
          int b;
          b = $urandom_range(0, NS[g] - 1);
          kin[g][b] = 1'b0;
          #1 check(g, cur, "partial change");
          kin[g][b] = 1'b1;
          #1 check(g, cur, "partial change undone");
        end
        sweep(g, 1'b0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
