// min_slack_select: picks, among the urgent requests, the one with the
// smallest slack.
//
// When several requests have reached the threshold, not all of them can meet
// their constraints; the scheduler then forwards the one with the least slack
// to the arbiter. This is the document's rule. Ties go to the lowest master
// index, which is this design's choice. The selection is a linear
// compare-and-keep chain over the N inputs (N-1 signed comparators).
//
// Interface: urgent[i] and slack[i] per master in; enable (any urgent request)
// and next_id (index of the selected master, 0 when enable is low) out.
// Purely combinational.
module min_slack_select
  import la_pkg::*;
#(
  parameter int unsigned N   = 4,
  localparam int unsigned IDW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]   urgent,
  input  slack_t         slack [N],
  output logic           enable,
  output logic [IDW-1:0] next_id
);

  always_comb begin
    slack_t best;
    enable  = 1'b0;
    next_id = '0;
    best    = SLACK_MAX;
    for (int i = 0; i < N; i++) begin
      if (urgent[i] && (!enable || slack[i] < best)) begin
        enable  = 1'b1;
        next_id = IDW'(i);
        best    = slack[i];
      end
    end
  end

endmodule
