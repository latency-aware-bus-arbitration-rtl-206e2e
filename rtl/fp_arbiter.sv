// fp_arbiter: fixed-priority first-level arbiter with a programmable order.
//
// prio_order[r] is the index of the master at rank r, rank 0 being the
// highest. The requesting master of best rank wins. The document's two
// configurations are M1 > M2 > M3 > M4 (F-P1) and M1 > M3 > M2 > M4 (F-P2),
// that is prio_order = {0,1,2,3} and {0,2,1,3}. A rank entry that names no
// master is skipped. Making the order an input rather than a constant is this
// design's choice, so both configurations run on the same hardware.
//
// Purely combinational: req and prio_order in, valid and pick out.
module fp_arbiter #(
  parameter int unsigned  N   = 4,
  localparam int unsigned IDW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]   req,
  input  logic [IDW-1:0] prio_order [N],
  output logic           valid,
  output logic [IDW-1:0] pick
);

  always_comb begin
    valid = 1'b0;
    pick  = '0;
    for (int r = 0; r < N; r++) begin
      if (!valid && int'(prio_order[r]) < N && req[prio_order[r]]) begin
        valid = 1'b1;
        pick  = prio_order[r];
      end
    end
  end

endmodule
