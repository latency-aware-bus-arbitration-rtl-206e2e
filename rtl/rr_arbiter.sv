// rr_arbiter: round-robin first-level (bandwidth-conscious) arbiter.
//
// The classical round-robin scheme: the requester found first when searching
// upward from the master after the last one granted wins. The search order
// is updated from the master that actually received the bus (`gnt_id`), which
// may differ from this arbiter's own pick when the latency scheduler preempts
// it; the preempting master thus goes to the back of the rotation. The
// document only names the scheme; the pointer update rule is this design's
// choice.
//
// Interface: req[N] in, valid/pick (combinational) out; `fire` with `gnt_id`
// tells the arbiter that a grant was issued this cycle. State changes on the
// rising clock edge; asynchronous active-low reset (master 0 searched first).
module rr_arbiter #(
  parameter int unsigned  N   = 4,
  localparam int unsigned IDW = (N > 1) ? $clog2(N) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N-1:0]   req,
  input  logic           fire,
  input  logic [IDW-1:0] gnt_id,
  output logic           valid,
  output logic [IDW-1:0] pick
);

  logic [IDW-1:0] last_q;

  always_comb begin
    logic [IDW-1:0] idx;
    idx   = '0;
    valid = 1'b0;
    pick  = '0;
    for (int unsigned k = 1; k <= N; k++) begin
      idx = IDW'((int'(last_q) + k) % N);
      if (!valid && req[idx]) begin
        valid = 1'b1;
        pick  = idx;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    last_q <= IDW'(N - 1);
    else if (fire) last_q <= gnt_id;
  end

endmodule
