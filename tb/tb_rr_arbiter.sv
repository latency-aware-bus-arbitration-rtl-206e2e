// tb_rr_arbiter: random test of the round-robin arbiter.
//
// Random request vectors; in some cycles a grant is issued, sometimes to the
// arbiter's own pick and sometimes (as when the scheduler preempts) to another
// requester. The reference keeps its own "last granted" index and expects the
// first requester above it, cyclically. A fairness check follows: with all
// masters requesting and every pick granted, each master gets exactly one
// grant in every N consecutive grants.
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0] req;
  logic         fire, valid;
  logic [2:0]   gnt_id, pick;
  int           last, exp_id;
  int           count [N];

  rr_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .fire, .gnt_id, .valid, .pick);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin
    req = '0; fire = 0; gnt_id = '0; last = N - 1;
    #12 rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      req = N'($urandom);
      #1;
      exp_id = -1;
      for (int k = 1; k <= N; k++)
        if (exp_id < 0 && req[(last + k) % N]) exp_id = (last + k) % N;
      check(valid == (exp_id >= 0), "valid");
      if (exp_id >= 0) check(int'(pick) == exp_id, $sformatf("pick %0d exp %0d", pick, exp_id));
      fire = (req != 0) && ($urandom_range(0, 2) != 0);
      if (fire) begin
        if ($urandom_range(0, 3) == 0) begin
          int g;
          do g = $urandom_range(0, N-1); while (!req[g]);
          gnt_id = 3'(g);
        end else gnt_id = pick;
        last = int'(gnt_id);
      end
    end
    // fairness with everybody requesting
    @(negedge clk);
    req = '1; fire = 1;
    for (int i = 0; i < N; i++) count[i] = 0;
    for (int n = 0; n < 10 * N; n++) begin
      #1 gnt_id = pick;
      count[pick]++;
      @(negedge clk);
    end
    for (int i = 0; i < N; i++) check(count[i] == 10, "equal share");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
