// latency_scheduler: the second level of the latency-aware arbiter.
//
// The scheduler does not arbitrate on its own. It times every request of a
// latency-critical master against that master's latency constraint (one
// slack_channel each) and, when the slack of some request is at or below the
// global threshold, raises `enable` and names the request with the smallest
// slack on `next_id`; the first-level arbiter must then grant that master. When
// every pending slack is above the threshold, `enable` stays low and the
// first-level arbiter decides alone. This follows the document.
//
// Besides the channels it holds the global threshold register and one
// worst-case latency register per slave (the document uses the worst-case
// slave latency S_j in the slack equation). Which masters are latency-critical is the
// CRIT parameter; a master without a channel is never urgent. The register
// write ports, the reset values (threshold 26 and slave latency 8, the values
// of the document's experiment) and the per-request target-slave index are this
// design's choices.
//
// Timing: enable/next_id are combinational from the requests and the register
// state; registers update on the rising clock edge; asynchronous active-low
// reset.
module latency_scheduler
  import la_pkg::*;
#(
  parameter int unsigned  N         = 4,
  parameter int unsigned  NSLV      = 1,
  parameter logic [N-1:0] CRIT      = '1,
  parameter int unsigned  TBEAT     = 1,
  parameter slack_t       THR_RESET = slack_t'(26),
  parameter slv_lat_t     SLV_RESET = slv_lat_t'(8),
  localparam int unsigned IDW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned SW  = (NSLV > 1) ? $clog2(NSLV) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // configuration
  input  logic [N-1:0]   lat_we,
  input  lat_t           lat_wdata [N],
  input  logic           thr_we,
  input  slack_t         thr_wdata,
  input  logic           slv_we,
  input  logic [SW-1:0]  slv_idx,
  input  slv_lat_t       slv_wdata,
  // requests
  input  logic [N-1:0]   req,
  input  burst_t         burst_len [N],
  input  logic [SW-1:0]  req_slave [N],
  input  logic [N-1:0]   served,
  // to the first-level arbiter
  output logic           enable,
  output logic [IDW-1:0] next_id,
  // observation
  output slack_t         threshold,
  output logic [N-1:0]   pending,
  output logic [N-1:0]   urgent,
  output slack_t         slack [N],
  output lat_t           lat_limit [N]
);

  slack_t   thr_q;
  slv_lat_t slv_q [NSLV];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      thr_q <= THR_RESET;
      for (int j = 0; j < NSLV; j++) slv_q[j] <= SLV_RESET;
    end else begin
      if (thr_we) thr_q <= thr_wdata;
      if (slv_we && int'(slv_idx) < NSLV) slv_q[slv_idx] <= slv_wdata;
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_ch
    if (CRIT[i]) begin : g_crit
      slv_lat_t s_lat;
      assign s_lat = (int'(req_slave[i]) < NSLV) ? slv_q[req_slave[i]] : SLV_RESET;
      slack_channel #(.TBEAT(TBEAT)) u_ch (
        .clk       (clk),
        .rst_n     (rst_n),
        .lat_we    (lat_we[i]),
        .lat_wdata (lat_wdata[i]),
        .req       (req[i]),
        .burst_len (burst_len[i]),
        .slave_lat (s_lat),
        .served    (served[i]),
        .threshold (thr_q),
        .lat_limit (lat_limit[i]),
        .pending   (pending[i]),
        .slack     (slack[i]),
        .urgent    (urgent[i])
      );
    end else begin : g_none
      assign pending[i] = 1'b0;
      assign slack[i]   = SLACK_MAX;
      assign urgent[i]  = 1'b0;
      assign lat_limit[i] = '0;
    end
  end

  min_slack_select #(.N(N)) u_sel (
    .urgent  (urgent),
    .slack   (slack),
    .enable  (enable),
    .next_id (next_id)
  );

  assign threshold = thr_q;

endmodule
