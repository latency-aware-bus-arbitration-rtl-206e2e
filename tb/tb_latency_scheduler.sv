// tb_latency_scheduler: self-checking test of the second-level scheduler.
//
// Four masters, of which master 2 is configured as not latency-critical, and
// two slaves with different worst-case latencies. Masters raise requests at
// random with random burst lengths and target slaves; a random requester is
// "granted" now and then. A reference model keeps, per master, the start
// cycle of its request and computes slack = L - B - S(slave) - waited, the
// urgent set (slack <= threshold) and the expected enable/next_id (smallest
// slack, lowest index on ties). The latency registers, the threshold and a
// slave latency are reprogrammed during the run.
module tb_latency_scheduler;
  import la_pkg::*;

  localparam int N = 4;
  localparam int NSLV = 2;
  localparam logic [N-1:0] CRIT = 4'b1011;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0] lat_we;
  lat_t         lat_wdata [N];
  logic         thr_we;
  slack_t       thr_wdata;
  logic         slv_we;
  logic [0:0]   slv_idx;
  slv_lat_t     slv_wdata;
  logic [N-1:0] req, served;
  burst_t       burst_len [N];
  logic [0:0]   req_slave [N];
  logic         enable;
  logic [1:0]   next_id;
  slack_t       threshold;
  logic [N-1:0] pending, urgent;
  slack_t       slack [N];
  lat_t         lat_limit [N];

  latency_scheduler #(.N(N), .NSLV(NSLV), .CRIT(CRIT)) dut (
    .clk, .rst_n, .lat_we, .lat_wdata, .thr_we, .thr_wdata, .slv_we, .slv_idx,
    .slv_wdata, .req, .burst_len, .req_slave, .served, .enable, .next_id,
    .threshold, .pending, .urgent, .slack, .lat_limit);

  // reference state
  int m_lat [N];
  int m_slv [NSLV];
  int m_thr;
  int m_start [N];
  int m_rlat [N];     // constraint in force when the request started    // cycle when the current request started, -1 if none
  int cyc;
  int n_pre, n_tie;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  initial begin
    int e_slack [N];
    bit e_urg [N];
    int best, bid, nurg;
    lat_we = '0; thr_we = 0; slv_we = 0; slv_idx = '0; slv_wdata = '0;
    thr_wdata = '0; req = '0; served = '0;
    for (int i = 0; i < N; i++) begin
      lat_wdata[i] = '0; burst_len[i] = '0; req_slave[i] = '0; m_start[i] = -1;
    end
    n_pre = 0; n_tie = 0;
    #12 rst_n = 1;
    @(negedge clk);
    check(threshold == slack_t'(26), "threshold reset value 26");
    // configure: constraints of the document's workload, slave 1 slower
    for (int i = 0; i < N; i++) begin
      lat_we[i] = 1; lat_wdata[i] = lat_t'((i % 2 == 0) ? 26 : 60); m_lat[i] = (i % 2 == 0) ? 26 : 60;
    end
    slv_we = 1; slv_idx = 1; slv_wdata = 20;
    m_slv[0] = 8; m_slv[1] = 20; m_thr = 26;
    @(negedge clk);
    lat_we = '0; slv_we = 0;
    for (cyc = 0; cyc < 30000; cyc++) begin
      // reprogramming at a few points
      if (cyc == 10000) begin thr_we = 1; thr_wdata = 5; m_thr = 5; end
      else if (cyc == 20000) begin
        thr_we = 1; thr_wdata = -20; m_thr = -20;
        lat_we[1] = 1; lat_wdata[1] = 200;   // takes effect next request
      end else begin thr_we = 0; lat_we = '0; end
      // drive requests (new ones only when idle) and a random grant
      served = '0;
      for (int i = 0; i < N; i++) begin
        if (m_start[i] < 0 && $urandom_range(0, 9) == 0) begin
          req[i] = 1; burst_len[i] = burst_t'($urandom_range(1, 16));
          req_slave[i] = 1'($urandom_range(0, 1));
          m_start[i] = cyc;
          m_rlat[i] = m_lat[i];
        end
      end
      if (req != 0 && $urandom_range(0, 19) == 0) begin
        int g;
        do g = $urandom_range(0, N-1); while (!req[g]);
        served[g] = 1;
      end
      #1;
      // reference
      bid = -1; best = 0; nurg = 0;
      for (int i = 0; i < N; i++) begin
        e_slack[i] = m_rlat[i] - int'(burst_len[i]) - m_slv[req_slave[i]] - (cyc - m_start[i]);
        e_urg[i] = CRIT[i] && req[i] && !served[i] && e_slack[i] <= m_thr;
        if (e_urg[i]) begin
          nurg++;
          if (bid < 0 || e_slack[i] < best) begin bid = i; best = e_slack[i]; end
        end
        if (CRIT[i] && req[i])
          check(slack[i] == slack_t'(e_slack[i]),
                $sformatf("slack m%0d got %0d exp %0d", i, slack[i], e_slack[i]));
        check(urgent[i] == e_urg[i], $sformatf("urgent m%0d", i));
      end
      check(enable == (bid >= 0), "enable");
      if (bid >= 0) begin
        check(int'(next_id) == bid, $sformatf("next_id got %0d exp %0d", next_id, bid));
        n_pre++;
        if (nurg > 1) n_tie++;
      end
      @(negedge clk);
      if (cyc == 20000) m_lat[1] = 200;
      for (int i = 0; i < N; i++)
        if (served[i]) begin req[i] = 0; m_start[i] = -1; end
    end
    check(lat_limit[1] == lat_t'(200), "latency register rewritten");
    check(n_pre > 100, "scheduler enabled often");
    check(n_tie > 10, "several urgent requests at once");
    $display("enable cycles %0d, multi-urgent cycles %0d", n_pre, n_tie);
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
