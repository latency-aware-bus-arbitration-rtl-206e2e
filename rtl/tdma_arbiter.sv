// tdma_arbiter: TDMA first-level arbiter with best-effort slot filling.
//
// A cyclic slot table gives each master a share of the bus: the owner of the
// current slot wins if it requests. A slot whose owner is idle is not wasted
// but given to the other requesters in round-robin order (best-effort
// traffic), as the document describes for TDMA. One slot is one bus transfer:
// the slot pointer advances whenever a grant is issued (`fire`), whoever gets
// it, so the scheduler can reorder requests without changing the table. The
// default table gives masters 0..3 the shares 4:4:1:1, the ratio of the
// document's TDMA experiment; the slot order within the table, the slot length
// and the best-effort rotation are this design's choices.
//
// Interface: req[N] in, valid/pick (combinational) out; fire/gnt_id report the
// grant actually issued. Rising-edge state, asynchronous active-low reset.
module tdma_arbiter #(
  parameter int unsigned  N     = 4,
  parameter int unsigned  NSLOT = 10,
  parameter int unsigned  SLOT_OWNER [NSLOT] = '{0, 1, 0, 1, 2, 0, 1, 0, 1, 3},
  localparam int unsigned IDW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned PW  = (NSLOT > 1) ? $clog2(NSLOT) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N-1:0]   req,
  input  logic           fire,
  input  logic [IDW-1:0] gnt_id,
  output logic           valid,
  output logic [IDW-1:0] pick,
  output logic           slot_hit   // the slot owner won (not best effort)
);

  logic [PW-1:0]  slot_q;
  logic [IDW-1:0] be_last_q;   // last best-effort grant
  int unsigned    owner;

  always_comb begin
    logic [IDW-1:0] idx;
    idx      = '0;
    owner    = 0;
    for (int unsigned sl = 0; sl < NSLOT; sl++)
      if (int'(slot_q) == sl) owner = SLOT_OWNER[sl];
    valid    = 1'b0;
    pick     = '0;
    slot_hit = 1'b0;
    if (owner < N && req[owner]) begin
      valid    = 1'b1;
      pick     = IDW'(owner);
      slot_hit = 1'b1;
    end else begin
      for (int unsigned k = 1; k <= N; k++) begin
        idx = IDW'((int'(be_last_q) + k) % N);
        if (!valid && req[idx]) begin
          valid = 1'b1;
          pick  = idx;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_q    <= '0;
      be_last_q <= IDW'(N - 1);
    end else if (fire) begin
      slot_q <= (int'(slot_q) == NSLOT - 1) ? '0 : slot_q + PW'(1);
      if (int'(gnt_id) != owner) be_last_q <= gnt_id;
    end
  end

endmodule
