// la_pkg: types and constants shared by the latency-aware arbiter.
//
// The scheduler keeps, per latency-critical master, a latency register and a
// signed slack counter. The latency constraints of interest are at most a few
// hundred cycles, so a 10-bit unsigned latency register is enough; the slack is
// one bit wider and signed because it keeps counting down past zero while a
// request waits beyond its constraint. Burst length is carried as a beat count
// (AHB INCR16 is the longest fixed burst, so 5 bits), and the worst-case slave
// latency as an 8-bit cycle count. These widths are this design's choice.
package la_pkg;

  localparam int unsigned LAT_W   = 10;  // latency register width
  localparam int unsigned SLACK_W = 11;  // signed slack width
  localparam int unsigned BURST_W = 5;   // burst length in beats (1..31)
  localparam int unsigned SLV_W   = 8;   // worst-case slave latency in cycles

  typedef logic        [LAT_W-1:0]   lat_t;
  typedef logic signed [SLACK_W-1:0] slack_t;
  typedef logic        [BURST_W-1:0] burst_t;
  typedef logic        [SLV_W-1:0]   slv_lat_t;

  localparam slack_t SLACK_MAX = slack_t'({1'b0, {(SLACK_W-1){1'b1}}});
  localparam slack_t SLACK_MIN = slack_t'({1'b1, {(SLACK_W-1){1'b0}}});

  // Which bandwidth-conscious arbiter runs at the first level.
  typedef enum logic [1:0] {
    BASE_RR   = 2'd0,  // round robin
    BASE_FP   = 2'd1,  // fixed priority, order programmable
    BASE_TDMA = 2'd2   // TDMA slot table with best-effort fill
  } base_mode_e;

endpackage
