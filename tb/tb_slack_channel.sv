// tb_slack_channel: self-checking test of one scheduler channel.
//
// Two channels run side by side, one with one cycle per beat and one with
// three. Each scenario writes a random latency constraint, raises a request
// with a random burst length and slave latency, lets it wait a random number
// of cycles and then serves it. Every cycle the slack must equal
// L - B*T - S - (cycles waited), saturated to the signed 11-bit range, and
// `urgent` must equal (slack <= threshold); after the grant the channel must be
// idle. A directed case uses the document's numbers (L = 26, B = 8, T = 1,
// S = 8 gives slack 10, urgent at threshold 26 from the first cycle).
module tb_slack_channel;
  import la_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic     lat_we;
  lat_t     lat_wdata;
  logic     req, served;
  burst_t   burst_len;
  slv_lat_t slave_lat;
  slack_t   threshold;
  lat_t     lat1, lat3;
  logic     pend1, pend3, urg1, urg3;
  slack_t   slk1, slk3;

  slack_channel #(.TBEAT(1)) dut1 (
    .clk, .rst_n, .lat_we, .lat_wdata, .req, .burst_len, .slave_lat, .served,
    .threshold, .lat_limit(lat1), .pending(pend1), .slack(slk1), .urgent(urg1));
  slack_channel #(.TBEAT(3)) dut3 (
    .clk, .rst_n, .lat_we, .lat_wdata, .req, .burst_len, .slave_lat, .served,
    .threshold, .lat_limit(lat3), .pending(pend3), .slack(slk3), .urgent(urg3));

  function automatic int sat(int v);
    if (v > 1023)  return 1023;
    if (v < -1024) return -1024;
    return v;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // one request: L, B, S, wait cycles before being served
  task automatic scenario(int l, int b, int s, int thr, int waitc);
    int e1, e3;
    @(negedge clk);
    lat_we = 1; lat_wdata = lat_t'(l); threshold = slack_t'(thr);
    @(negedge clk);
    lat_we = 0;
    check(lat1 == lat_t'(l), "latency register write");
    req = 1; burst_len = burst_t'(b); slave_lat = slv_lat_t'(s);
    for (int k = 0; k <= waitc; k++) begin
      #1;
      e1 = sat(l - b - s - k);
      e3 = sat(sat(l - 3*b - s) - k);
      check(slk1 == slack_t'(e1), $sformatf("slack T=1 k=%0d got %0d exp %0d", k, slk1, e1));
      check(slk3 == slack_t'(e3), $sformatf("slack T=3 k=%0d got %0d exp %0d", k, slk3, e3));
      check(urg1 == (e1 <= thr), "urgent T=1");
      check(urg3 == (e3 <= thr), "urgent T=3");
      check(pend1 == (k > 0), "pending flag");
      @(negedge clk);
    end
    // grant pulse: the request ends
    served = 1;
    #1 check(!urg1 && !urg3, "not urgent while served");
    @(negedge clk);
    served = 0; req = 0;
    #1 check(!pend1 && !pend3, "idle after grant");
    @(negedge clk);
  endtask

  initial begin
    lat_we = 0; lat_wdata = '0; req = 0; served = 0; burst_len = '0;
    slave_lat = '0; threshold = '0;
    #12 rst_n = 1;
    check(lat1 == '1, "latency register reset value");
    // the document's setting
    scenario(26, 8, 8, 26, 12);
    scenario(60, 8, 8, 26, 25);
    // a request that waits far beyond its constraint
    scenario(5, 31, 255, -100, 900);
    // random
    for (int n = 0; n < 200; n++)
      scenario($urandom_range(0, 1023), $urandom_range(1, 31), $urandom_range(0, 255),
               int'($urandom_range(0, 600)) - 300, $urandom_range(0, 60));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
