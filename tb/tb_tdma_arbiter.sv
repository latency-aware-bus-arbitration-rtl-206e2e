// tb_tdma_arbiter: test of the TDMA arbiter with best-effort fill.
//
// With the default 10-slot table (shares 4:4:1:1) and all masters always
// requesting, every 10 grants must split exactly 4:4:1:1. Then random
// requests and random grant overrides are checked against a reference that
// keeps its own slot pointer and best-effort rotation, and the number of
// filled (best-effort) slots is counted.
module tb_tdma_arbiter;
  localparam int N = 4;
  localparam int NSLOT = 10;
  localparam int OWN [NSLOT] = '{0, 1, 0, 1, 2, 0, 1, 0, 1, 3};
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0] req;
  logic         fire, valid, slot_hit;
  logic [1:0]   gnt_id, pick;
  int slot, be_last, exp_id, fills;
  int count [N];

  tdma_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .fire, .gnt_id, .valid, .pick, .slot_hit);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin
    req = '0; fire = 0; gnt_id = '0; slot = 0; be_last = N - 1; fills = 0;
    #12 rst_n = 1;
    // bandwidth split with everybody requesting
    @(negedge clk);
    req = '1; fire = 1;
    for (int i = 0; i < N; i++) count[i] = 0;
    for (int n = 0; n < 50; n++) begin
      #1 gnt_id = pick;
      check(slot_hit, "owner always wins when requesting");
      count[pick]++;
      @(negedge clk);
    end
    check(count[0] == 20 && count[1] == 20 && count[2] == 5 && count[3] == 5, "4:4:1:1 split");
    slot = 0;   // 50 grants = 5 full rounds
    for (int n = 0; n < 20000; n++) begin
      req = N'($urandom);
      #1;
      exp_id = -1;
      if (req[OWN[slot]]) exp_id = OWN[slot];
      else for (int k = 1; k <= N; k++)
        if (exp_id < 0 && req[(be_last + k) % N]) exp_id = (be_last + k) % N;
      check(valid == (exp_id >= 0), "valid");
      if (exp_id >= 0) begin
        check(int'(pick) == exp_id, $sformatf("pick %0d exp %0d slot %0d", pick, exp_id, slot));
        check(slot_hit == (exp_id == OWN[slot]), "slot_hit");
      end
      fire = (req != 0) && ($urandom_range(0, 1) != 0);
      if (fire) begin
        if ($urandom_range(0, 4) == 0) begin
          int g;
          do g = $urandom_range(0, N-1); while (!req[g]);
          gnt_id = 2'(g);
        end else gnt_id = pick;
        if (int'(gnt_id) != OWN[slot]) begin be_last = int'(gnt_id); fills++; end
        slot = (slot + 1) % NSLOT;
      end
      @(negedge clk);
    end
    check(fills > 100, "best-effort fill happened");
    $display("best-effort grants %0d", fills);
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
