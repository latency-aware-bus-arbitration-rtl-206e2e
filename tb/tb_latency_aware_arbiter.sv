// tb_latency_aware_arbiter: end-to-end test of the latency-aware arbiter at
// its default parameters (four masters, one slave, threshold 26, slave
// latency 8, 4:4:1:1 TDMA table).
//
// The testbench plays the masters, the bus and the slave. Every request is an
// 8-beat read; the slave answers 8 cycles after the grant and then streams the
// 8 beats, the last one flagged with xfer_done, so an uncontested request is
// served in 17 cycles (grant, 8 cycles slave latency, 8 beats). Masters M1..M4
// have latency constraints 26, 60, 26, 60 cycles and ask for 60 %, 60 %, 15 %
// and 15 % of the bus (150 % in total, shares 4:4:1:1); each keeps one request
// outstanding and draws the gap between its requests uniformly around the
// mean that gives its share.
//
// Every cycle a reference model, written independently of the RTL, predicts
// the next grant: it keeps each waiting request's start cycle and the
// constraint in force then, computes slack = L - 8 - 8 - waited, lets the
// request with the smallest slack at or below the threshold win, and otherwise
// applies its own round-robin, fixed-priority or TDMA model. The prediction,
// the preempted and tdma_fill flags and the bus ownership are compared with
// the design.
//
// The run goes through the first-level schemes with the scheduler (R-S,
// FP1-S, FP2-S, TDMA-S) and, for comparison, the same schemes with the
// scheduler switched off by a threshold of -1024, draining the bus between
// phases. It prints, per scheme and master, the average latency, the share of
// requests over the constraint and the longest overrun, and checks that the
// scheduler shortens the longest overrun of the starved master M4 under
// fixed priority. Mechanisms counted (each must occur): scheduler preemption,
// first-level decision, several urgent requests at once, an urgent request
// waiting for a transfer in progress, negative slack, TDMA best-effort fill,
// base-mode switch, priority-order switch, latency-register and threshold
// reprogramming.
module tb_latency_aware_arbiter;
  import la_pkg::*;

  localparam int N = 4;
  localparam int BURST = 8;
  localparam int SLV = 8;
  localparam int XFER = 1 + SLV + BURST;            // 17 cycles uncontested
  localparam int PHASE_CYCLES = 60000;
  localparam int OWN [10] = '{0, 1, 0, 1, 2, 0, 1, 0, 1, 3};
  localparam int LAT [N] = '{26, 60, 26, 60};
  localparam int SHARE [N] = '{60, 60, 15, 15};     // percent of bus capacity

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // DUT signals
  base_mode_e   base_mode;
  logic [1:0]   prio_order [N];
  logic [N-1:0] lat_we;
  lat_t         lat_wdata [N];
  logic         thr_we;
  slack_t       thr_wdata;
  logic         slv_we;
  logic [0:0]   slv_idx;
  slv_lat_t     slv_wdata;
  logic [N-1:0] req;
  burst_t       burst_len [N];
  logic [0:0]   req_slave [N];
  logic [N-1:0] gnt, hgrant;
  logic [1:0]   hmaster;
  logic         xfer_done, bus_busy, preempted, tdma_fill;
  slack_t       threshold;
  lat_t         lat_limit [N];
  logic [N-1:0] pending, urgent;
  slack_t       slack [N];

  latency_aware_arbiter dut (
    .clk, .rst_n, .base_mode, .prio_order, .lat_we, .lat_wdata, .thr_we,
    .thr_wdata, .slv_we, .slv_idx, .slv_wdata, .req, .burst_len, .req_slave,
    .gnt, .hgrant, .hmaster, .xfer_done, .bus_busy, .preempted, .tdma_fill,
    .threshold, .lat_limit, .pending, .urgent, .slack);

  // ---------------- reference state ----------------
  int cyc;
  int r_lat [N];         // latency registers
  int r_thr;
  int r_start [N];       // start cycle of the waiting request, -1 if none
  int r_rlat [N];        // constraint in force at the request's start
  int r_issued [N];      // start of the request being transferred
  int r_next [N];        // cycle at which the master wants its next request
  int r_rr_last, r_slot, r_be_last;
  int r_prio [N];
  base_mode_e r_mode;
  int owner, done_cycle; // -1 when the bus is free
  bit busy;
  bit exp_fire, exp_pre, exp_fill;
  int exp_id;
  bit gen;               // masters generate new requests

  // mechanism counters
  int n_pre, n_base, n_multi, n_wait_busy, n_neg, n_fill, n_mode, n_prio, n_lat, n_thr;

  // per-phase statistics
  int st_n [N], st_viol [N], st_max [N];
  longint st_sum [N];
  int max_m4_fp1, max_m4_fp1s;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  function automatic int gap(int m);
    int mean;
    mean = XFER * 100 / SHARE[m];
    return $urandom_range(1, 2 * mean - 1);
  endfunction

  // reference decision for the current cycle (active = waiting, not in grant)
  task automatic predict();
    int best, nurg, s, bp;
    bit bv;
    exp_fire = 0; exp_pre = 0; exp_fill = 0; exp_id = -1;
    nurg = 0; best = 0;
    for (int i = 0; i < N; i++) begin
      if (r_start[i] >= 0 && !gnt[i]) begin
        s = r_rlat[i] - BURST - SLV - (cyc - r_start[i]);
        if (s < -1024) s = -1024;
        if (s < 0) n_neg++;
        if (s <= r_thr) begin
          nurg++;
          if (busy) n_wait_busy++;
          if (exp_id < 0 || s < best) begin exp_id = i; best = s; end
        end
      end
    end
    // first-level pick
    bv = 0; bp = -1;
    case (r_mode)
      BASE_FP:
        for (int r = 0; r < N; r++)
          if (!bv && r_start[r_prio[r]] >= 0 && !gnt[r_prio[r]]) begin bv = 1; bp = r_prio[r]; end
      BASE_TDMA: begin
        if (r_start[OWN[r_slot]] >= 0 && !gnt[OWN[r_slot]]) begin bv = 1; bp = OWN[r_slot]; end
        else for (int k = 1; k <= N; k++) begin
          int i; i = (r_be_last + k) % N;
          if (!bv && r_start[i] >= 0 && !gnt[i]) begin bv = 1; bp = i; end
        end
      end
      default:
        for (int k = 1; k <= N; k++) begin
          int i; i = (r_rr_last + k) % N;
          if (!bv && r_start[i] >= 0 && !gnt[i]) begin bv = 1; bp = i; end
        end
    endcase
    if (busy) begin
      exp_id = -1;
      return;
    end
    if (nurg > 0) begin
      exp_fire = 1;
      exp_pre  = (bp != exp_id);
      if (nurg > 1) n_multi++;
    end else if (bv) begin
      exp_fire = 1;
      exp_id   = bp;
    end
    if (exp_fire) begin
      exp_fill = (r_mode == BASE_TDMA) && (nurg == 0) && (exp_id != OWN[r_slot]);
      // all first-level models follow the grant actually issued
      r_rr_last = exp_id;
      if (exp_id != OWN[r_slot]) r_be_last = exp_id;
      r_slot = (r_slot + 1) % 10;
    end
  endtask

  // one cycle of masters, slave and checking, entered at a negative edge
  task automatic step();
    int gi;
    // grant observed this cycle?
    gi = -1;
    for (int i = 0; i < N; i++) if (gnt[i]) gi = i;
    if (exp_fire) begin
      check(gi == exp_id, $sformatf("grant to M%0d, expected M%0d", gi + 1, exp_id + 1));
      check(preempted == exp_pre, "preempted flag");
      check(tdma_fill == exp_fill, "tdma_fill flag");
      if (exp_pre) n_pre++; else n_base++;
      if (exp_fill) n_fill++;
    end else begin
      check(gi < 0, "unexpected grant");
    end
    if (gi >= 0 && gi == exp_id) begin
      busy = 1; owner = gi; done_cycle = cyc + SLV + BURST - 1;
      r_issued[gi] = r_start[gi];
      r_start[gi] = -1;
      req[gi] = 0;
    end
    // ownership outputs
    check(bus_busy == busy, "bus_busy");
    if (busy) check(hgrant == N'(1 << owner) && int'(hmaster) == owner, "hgrant/hmaster");
    else      check(hgrant == '0, "hgrant idle");
    // slave: last beat
    xfer_done = busy && cyc == done_cycle;
    if (xfer_done) begin
      int l;
      l = cyc - r_issued[owner] + 1;
      st_n[owner]++;
      st_sum[owner] += l;
      if (l > LAT[owner]) begin
        st_viol[owner]++;
        if (l - LAT[owner] > st_max[owner]) st_max[owner] = l - LAT[owner];
      end
    end
    // masters: one request outstanding each
    for (int i = 0; i < N; i++)
      if (gen && r_start[i] < 0 && !(busy && owner == i) && cyc >= r_next[i]) begin
        req[i] = 1;
        burst_len[i] = burst_t'(BURST);
        r_start[i] = cyc;
        r_rlat[i] = r_lat[i];
        r_next[i] = cyc + gap(i);
      end
    #1;
    predict();
    @(negedge clk);
    if (xfer_done) busy = 0;
    cyc++;
  endtask

  task automatic drain();
    gen = 0;
    while (busy || req != 0) step();
    xfer_done = 0;
  endtask

  task automatic clear_stats();
    for (int i = 0; i < N; i++) begin st_n[i] = 0; st_viol[i] = 0; st_max[i] = 0; st_sum[i] = 0; end
  endtask

  task automatic report(string name);
    int tot;
    tot = 0;
    for (int i = 0; i < N; i++) tot += st_n[i];
    $display("%-7s  avg latency / violations %% / longest overrun / share of transfers %%", name);
    for (int i = 0; i < N; i++)
      $display("    M%0d  %6.1f  %5.1f  %4d  %5.1f  (%0d requests)", i + 1,
               st_n[i] ? real'(st_sum[i]) / st_n[i] : 0.0,
               st_n[i] ? 100.0 * st_viol[i] / st_n[i] : 0.0, st_max[i],
               tot ? 100.0 * st_n[i] / tot : 0.0, st_n[i]);
    for (int i = 0; i < N; i++) check(st_n[i] > 0, {name, ": every master served"});
  endtask

  task automatic set_thr(int v);
    thr_we = 1; thr_wdata = slack_t'(v);
    @(negedge clk); cyc++;
    thr_we = 0; r_thr = v; n_thr++;
  endtask

  task automatic set_mode(base_mode_e m, int p0, int p1, int p2, int p3);
    if (m != r_mode) n_mode++;
    if (m == BASE_FP && (r_prio[1] != p1)) n_prio++;
    base_mode = m; r_mode = m;
    prio_order = '{2'(p0), 2'(p1), 2'(p2), 2'(p3)};
    r_prio = '{p0, p1, p2, p3};
  endtask

  task automatic run_phase(string name, base_mode_e m, int p1, int p2, bit sched);
    set_mode(m, 0, p1, p2, 3);
    set_thr(sched ? 26 : -1024);
    clear_stats();
    for (int i = 0; i < N; i++) r_next[i] = cyc + gap(i);
    gen = 1;
    repeat (PHASE_CYCLES) step();
    drain();
    report(name);
    if (name == "F-P1")  max_m4_fp1  = st_max[3];
    if (name == "FP1-S") max_m4_fp1s = st_max[3];
  endtask

  initial begin
    base_mode = BASE_RR; lat_we = '0; thr_we = 0; thr_wdata = '0; slv_we = 0;
    slv_idx = '0; slv_wdata = '0; req = '0; xfer_done = 0;
    prio_order = '{2'd0, 2'd1, 2'd2, 2'd3};
    for (int i = 0; i < N; i++) begin
      lat_wdata[i] = '0; burst_len[i] = '0; req_slave[i] = '0;
      r_start[i] = -1; r_issued[i] = 0; r_lat[i] = 1023; r_prio[i] = i;
    end
    r_thr = 26; r_mode = BASE_RR; r_rr_last = N - 1; r_slot = 0; r_be_last = N - 1;
    busy = 0; owner = 0; done_cycle = 0; exp_fire = 0; gen = 0; cyc = 0;
    n_pre = 0; n_base = 0; n_multi = 0; n_wait_busy = 0; n_neg = 0; n_fill = 0;
    n_mode = 0; n_prio = 0; n_lat = 0; n_thr = 0;
    #12 rst_n = 1;
    @(negedge clk);
    check(threshold == slack_t'(26), "threshold after reset");
    // masters program their latency constraints
    for (int i = 0; i < N; i++) begin lat_we[i] = 1; lat_wdata[i] = lat_t'(LAT[i]); end
    @(negedge clk);
    lat_we = '0;
    for (int i = 0; i < N; i++) begin r_lat[i] = LAT[i]; n_lat++; end

    // a single request on an idle bus: granted in the next cycle, served in 17
    req[0] = 1; burst_len[0] = burst_t'(BURST); r_start[0] = cyc; r_rlat[0] = r_lat[0];
    #1 check(urgent[0] && slack[0] == slack_t'(26 - 16), "M1 urgent at once with slack 10");
    predict();
    @(negedge clk); cyc++;
    clear_stats();
    drain();
    check(st_n[0] == 1 && st_sum[0] == XFER, $sformatf("uncontested service time %0d", st_sum[0]));

    run_phase("R-S",    BASE_RR,   1, 2, 1);
    run_phase("R-R",    BASE_RR,   1, 2, 0);
    run_phase("FP1-S",  BASE_FP,   1, 2, 1);
    run_phase("F-P1",   BASE_FP,   1, 2, 0);
    run_phase("FP2-S",  BASE_FP,   2, 1, 1);
    run_phase("F-P2",   BASE_FP,   2, 1, 0);
    run_phase("TDMA-S", BASE_TDMA, 1, 2, 1);
    run_phase("TDMA",   BASE_TDMA, 1, 2, 0);

    // M2 switches to a tighter constraint while traffic runs
    lat_we[1] = 1; lat_wdata[1] = lat_t'(40);
    @(negedge clk); cyc++;
    lat_we = '0; r_lat[1] = 40; n_lat++;
    check(lat_limit[1] == lat_t'(40), "latency register rewritten");
    run_phase("R-S/40", BASE_RR, 1, 2, 1);

    check(max_m4_fp1s < max_m4_fp1,
          $sformatf("scheduler bounds M4 overrun under F-P1 (%0d vs %0d)", max_m4_fp1s, max_m4_fp1));
    $display("mechanisms: preempt %0d, first-level %0d, multi-urgent %0d, urgent-while-busy %0d,",
             n_pre, n_base, n_multi, n_wait_busy);
    $display("            negative slack %0d, tdma fill %0d, mode switch %0d, order switch %0d,",
             n_neg, n_fill, n_mode, n_prio);
    $display("            latency writes %0d, threshold writes %0d", n_lat, n_thr);
    check(n_pre > 0, "scheduler preemption happened");
    check(n_base > 0, "first-level decision happened");
    check(n_multi > 0, "several urgent requests at once");
    check(n_wait_busy > 0, "urgent request waited for a transfer");
    check(n_neg > 0, "negative slack");
    check(n_fill > 0, "TDMA best-effort fill");
    check(n_mode > 0, "base-mode switch");
    check(n_prio > 0, "priority-order switch");
    check(n_lat > N, "latency register reprogrammed");
    check(n_thr > 1, "threshold reprogrammed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
