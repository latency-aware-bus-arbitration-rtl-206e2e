// tb_fp_arbiter: test of the fixed-priority arbiter.
//
// Directed cases with the document's two orders (F-P1: M1 > M2 > M3 > M4,
// F-P2: M1 > M3 > M2 > M4) and random request vectors with random
// permutations as priority order; the expected winner is the requester of
// lowest rank.
module tb_fp_arbiter;
  localparam int N = 4;
  logic [N-1:0] req;
  logic [1:0]   prio_order [N];
  logic         valid;
  logic [1:0]   pick;
  int checks = 0, failures = 0;

  fp_arbiter #(.N(N)) dut (.req, .prio_order, .valid, .pick);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int e;
    // F-P1
    prio_order = '{0, 1, 2, 3};
    req = 4'b0110; #1 check(valid && pick == 1, "F-P1 M2 over M3");
    req = 4'b1111; #1 check(pick == 0, "F-P1 M1 first");
    req = 4'b1000; #1 check(pick == 3, "F-P1 M4 alone");
    req = 4'b0000; #1 check(!valid, "no request");
    // F-P2
    prio_order = '{0, 2, 1, 3};
    req = 4'b0110; #1 check(valid && pick == 2, "F-P2 M3 over M2");
    req = 4'b1010; #1 check(pick == 1, "F-P2 M2 over M4");
    for (int n = 0; n < 20000; n++) begin
      // random permutation
      for (int i = 0; i < N; i++) prio_order[i] = 2'(i);
      for (int i = N - 1; i > 0; i--) begin
        int j; logic [1:0] t;
        j = $urandom_range(0, i);
        t = prio_order[i]; prio_order[i] = prio_order[j]; prio_order[j] = t;
      end
      req = N'($urandom);
      #1;
      e = -1;
      for (int r = 0; r < N; r++) if (e < 0 && req[prio_order[r]]) e = int'(prio_order[r]);
      check(valid == (e >= 0) && (e < 0 || int'(pick) == e), "random priority");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
