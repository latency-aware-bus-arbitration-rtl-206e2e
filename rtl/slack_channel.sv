// slack_channel: the per-master part of the latency-aware scheduler.
//
// One channel is allocated to each latency-critical master. It holds:
//   * the latency register L (written by the master whenever its operation,
//     and so its constraint, changes),
//   * two subtractors forming the slack equation, Slack = L - B*T - S, where B is the
//     burst length of the request, T the transfer time per beat (a parameter;
//     with the usual T = 1 no multiplier is built) and S the worst-case latency
//     of the target slave,
//   * the slack counter, loaded with that value when a new request appears and
//     decremented every clock cycle while that request waits,
//   * the comparator that flags the request as urgent when its slack is less
//     than or equal to the global threshold.
// All of this follows the document. This design's own choices: the counter
// saturates at the most negative value; the slack and urgent outputs already
// reflect a request in its very first cycle (the freshly computed slack
// value is used before it is in the counter) so the scheduler can act on it at
// once; a write to L affects the next request, not the one waiting.
//
// Request protocol: req is a level held until the grant. The cycle in which
// `served` is high (the registered grant pulse) ends the request; req high in
// any later cycle is a new request.
//
// Timing: slack/urgent are combinational from req, the counter and the
// threshold; all state changes on the rising clock edge; rst_n is an
// asynchronous active-low reset.
module slack_channel
  import la_pkg::*;
#(
  parameter int unsigned TBEAT     = 1,    // transfer time per beat, cycles
  parameter lat_t        LAT_RESET = '1    // latency register after reset
) (
  input  logic     clk,
  input  logic     rst_n,
  // latency register write port (from the master)
  input  logic     lat_we,
  input  lat_t     lat_wdata,
  // request from the master
  input  logic     req,
  input  burst_t   burst_len,
  input  slv_lat_t slave_lat,   // worst-case latency of the target slave
  input  logic     served,      // grant pulse for this master
  input  slack_t   threshold,
  output lat_t     lat_limit,   // current latency register
  output logic     pending,     // a request is being timed
  output slack_t   slack,       // slack of the waiting request
  output logic     urgent       // slack <= threshold
);

  lat_t   lat_q;
  slack_t cnt_q;
  logic   pend_q;

  // Subtractor 1: L - B*T. Subtractor 2: minus S. Both done at full width,
  // then saturated into the slack range.
  localparam int unsigned DW = SLACK_W + 12;
  logic signed [DW-1:0] sub1, sub2;
  slack_t               fresh;

  always_comb begin
    sub1 = $signed({{(DW-LAT_W){1'b0}}, lat_q})
         - $signed(DW'(burst_len) * DW'(TBEAT));
    sub2 = sub1 - $signed({{(DW-SLV_W){1'b0}}, slave_lat});
    if (sub2 > $signed(DW'(SLACK_MAX)))
      fresh = SLACK_MAX;
    else if (sub2 < -$signed(DW'(2**(SLACK_W-1))))
      fresh = SLACK_MIN;
    else
      fresh = slack_t'(sub2);
  end

  logic new_req;
  assign new_req = req && !pend_q && !served;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lat_q  <= LAT_RESET;
      cnt_q  <= SLACK_MAX;
      pend_q <= 1'b0;
    end else begin
      if (lat_we) lat_q <= lat_wdata;
      if (served) begin
        pend_q <= 1'b0;
      end else if (new_req) begin
        pend_q <= 1'b1;
        cnt_q  <= (fresh == SLACK_MIN) ? SLACK_MIN : fresh - slack_t'(1);
      end else if (pend_q && cnt_q != SLACK_MIN) begin
        cnt_q  <= cnt_q - slack_t'(1);
      end
    end
  end

  assign lat_limit = lat_q;
  assign pending   = pend_q;
  assign slack     = pend_q ? cnt_q : fresh;
  assign urgent    = req && !served && (slack <= threshold);

endmodule
