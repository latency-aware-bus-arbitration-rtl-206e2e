// latency_aware_arbiter: two-level latency-aware bus arbiter (top level).
//
// A conventional bandwidth-conscious arbiter (first level) shares the bus
// among the masters; a latency scheduler (second level) watches the slack of
// every waiting request of a latency-critical master, i.e. how many cycles it
// can still wait for the bus and finish within its latency constraint. When
// some slack falls to or below a programmed global threshold the scheduler
// preempts the first level and the master with the smallest slack gets the
// bus next; otherwise the first level decides alone. A transfer in progress is
// never interrupted: arbitration only happens while the bus is free. This
// two-level structure follows the document.
//
// The first level here holds three arbiters (round robin, fixed priority with a
// programmable order, TDMA with best-effort fill) and `base_mode` selects which
// one is used, so every combination the document evaluates (R-S, FP1-S, FP2-S,
// TDMA-S) runs on one instance; all three see the same grants, so switching
// modes is safe at any time. Setting the threshold to its most negative value
// leaves the first level alone in practice. The bus-ownership tracking and the
// signal-level protocol below are this design's choices.
//
// Protocol (all signals synchronous to clk, asynchronous active-low rst_n):
//   * req[i] is held high until the master sees gnt[i]; it must be low in the
//     cycle after gnt[i] unless the master issues a new request. burst_len[i]
//     (beats) and req_slave[i] (target slave) are valid while req[i] is high.
//   * While the bus is free and some request is active, the arbiter decides in
//     that cycle and gnt[i] pulses for one cycle in the next one; from then on
//     hgrant[i] and hmaster name the owner and bus_busy is high until the
//     cycle after xfer_done (the last beat of the owner's transfer).
//   * Configuration: lat_we[i]/lat_wdata[i] set master i's latency constraint
//     in cycles, thr_we/thr_wdata the global threshold (signed), slv_we/
//     slv_idx/slv_wdata the worst-case latency of a slave.
//   * preempted pulses with gnt when the scheduler, not the first level, chose
//     the master; tdma_fill pulses with gnt when, in TDMA mode, the slot owner
//     was not requesting and the first level gave the slot to best-effort
//     traffic (a grant forced by the scheduler does not count). The other
//     observation outputs show the scheduler's registers and slack counters.
module latency_aware_arbiter
  import la_pkg::*;
#(
  parameter int unsigned  N         = 4,
  parameter int unsigned  NSLV      = 1,
  parameter logic [N-1:0] CRIT      = '1,
  parameter int unsigned  TBEAT     = 1,
  parameter slack_t       THR_RESET = slack_t'(26),
  parameter slv_lat_t     SLV_RESET = slv_lat_t'(8),
  parameter int unsigned  NSLOT     = 10,
  parameter int unsigned  SLOT_OWNER [NSLOT] = '{0, 1, 0, 1, 2, 0, 1, 0, 1, 3},
  localparam int unsigned IDW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned SW  = (NSLV > 1) ? $clog2(NSLV) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // configuration
  input  base_mode_e     base_mode,
  input  logic [IDW-1:0] prio_order [N],
  input  logic [N-1:0]   lat_we,
  input  lat_t           lat_wdata [N],
  input  logic           thr_we,
  input  slack_t         thr_wdata,
  input  logic           slv_we,
  input  logic [SW-1:0]  slv_idx,
  input  slv_lat_t       slv_wdata,
  // masters
  input  logic [N-1:0]   req,
  input  burst_t         burst_len [N],
  input  logic [SW-1:0]  req_slave [N],
  output logic [N-1:0]   gnt,
  output logic [N-1:0]   hgrant,
  output logic [IDW-1:0] hmaster,
  // bus
  input  logic           xfer_done,
  output logic           bus_busy,
  // observation
  output logic           preempted,
  output logic           tdma_fill,   // TDMA slot given to best-effort traffic
  output slack_t         threshold,
  output lat_t           lat_limit [N],
  output logic [N-1:0]   pending,
  output logic [N-1:0]   urgent,
  output slack_t         slack [N]
);

  logic [N-1:0]   gnt_q;
  logic           busy_q;
  logic [IDW-1:0] owner_q;
  logic           pre_q;
  logic           fill_q;

  logic [N-1:0]   active;
  logic           fire;
  logic [IDW-1:0] sel;
  logic           sel_valid;
  logic           sched_en;
  logic [IDW-1:0] sched_id;

  // A request is active from its first cycle until its grant pulse.
  assign active = req & ~gnt_q;

  // ---------------- second level: scheduler ----------------
  latency_scheduler #(
    .N(N), .NSLV(NSLV), .CRIT(CRIT), .TBEAT(TBEAT),
    .THR_RESET(THR_RESET), .SLV_RESET(SLV_RESET)
  ) u_sched (
    .clk       (clk),
    .rst_n     (rst_n),
    .lat_we    (lat_we),
    .lat_wdata (lat_wdata),
    .thr_we    (thr_we),
    .thr_wdata (thr_wdata),
    .slv_we    (slv_we),
    .slv_idx   (slv_idx),
    .slv_wdata (slv_wdata),
    .req       (req),
    .burst_len (burst_len),
    .req_slave (req_slave),
    .served    (gnt_q),
    .enable    (sched_en),
    .next_id   (sched_id),
    .threshold (threshold),
    .pending   (pending),
    .urgent    (urgent),
    .slack     (slack),
    .lat_limit (lat_limit)
  );

  // ---------------- first level: bandwidth-conscious arbiters ----------------
  logic           rr_v, fp_v, td_v, td_hit;
  logic [IDW-1:0] rr_p, fp_p, td_p;

  rr_arbiter #(.N(N)) u_rr (
    .clk(clk), .rst_n(rst_n), .req(active), .fire(fire), .gnt_id(sel),
    .valid(rr_v), .pick(rr_p)
  );

  fp_arbiter #(.N(N)) u_fp (
    .req(active), .prio_order(prio_order), .valid(fp_v), .pick(fp_p)
  );

  tdma_arbiter #(.N(N), .NSLOT(NSLOT), .SLOT_OWNER(SLOT_OWNER)) u_tdma (
    .clk(clk), .rst_n(rst_n), .req(active), .fire(fire), .gnt_id(sel),
    .valid(td_v), .pick(td_p), .slot_hit(td_hit)
  );

  // ---------------- decision ----------------
  always_comb begin
    unique case (base_mode)
      BASE_FP:   begin sel_valid = fp_v; sel = fp_p; end
      BASE_TDMA: begin sel_valid = td_v; sel = td_p; end
      default:   begin sel_valid = rr_v; sel = rr_p; end
    endcase
    // The scheduler preempts the first level's choice.
    if (sched_en) begin
      sel_valid = 1'b1;
      sel       = sched_id;
    end
  end

  assign fire = !busy_q && sel_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gnt_q   <= '0;
      busy_q  <= 1'b0;
      owner_q <= '0;
      pre_q   <= 1'b0;
      fill_q  <= 1'b0;
    end else begin
      gnt_q  <= '0;
      pre_q  <= 1'b0;
      fill_q <= 1'b0;
      if (fire) begin
        gnt_q[sel] <= 1'b1;
        busy_q     <= 1'b1;
        owner_q    <= sel;
        pre_q      <= sched_en && (base_mode == BASE_FP   ? (!fp_v || fp_p != sched_id) :
                                   base_mode == BASE_TDMA ? (!td_v || td_p != sched_id) :
                                                            (!rr_v || rr_p != sched_id));
        fill_q     <= (base_mode == BASE_TDMA) && !sched_en && !td_hit;
      end else if (busy_q && xfer_done) begin
        busy_q <= 1'b0;
      end
    end
  end

  assign gnt       = gnt_q;
  assign hgrant    = busy_q ? (N'(1) << owner_q) : '0;
  assign hmaster   = owner_q;
  assign bus_busy  = busy_q;
  assign preempted = pre_q;
  assign tdma_fill = fill_q;

  // ---------------- protocol checks ----------------
  a_grant_to_requester: assert property (@(posedge clk) disable iff (!rst_n)
    fire |-> active[sel]);
  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(gnt_q));
  a_done_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    xfer_done |-> busy_q);

endmodule
