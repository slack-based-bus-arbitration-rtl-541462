// Bus ownership control of the latency-aware arbiter.
//
// Combines the base arbiter's choice with the scheduler's advice (Next grant,
// State) to select the bus winner and keeps track of the current owner:
//  * State safe:      the base arbiter's choice gets the bus whenever it is
//                     free (no owner, or the owner's transfer completes).
//  * State warning:   the scheduler's master gets the bus as soon as the
//                     current service completes; the current transfer is not
//                     disturbed.
//  * State emergency: if the current transfer is not locked it is stopped at
//                     once: the owner receives a one-cycle `retry` pulse and
//                     must resend its whole burst later, and the bus goes to
//                     the scheduler's master. A transfer granted in the
//                     emergency state is locked and cannot itself be
//                     preempted.
// A preempted request stays pending and competes like any other request.
//
// Timing: decisions are taken combinationally in cycle t and the new grant is
// visible (registered) in cycle t+1, so a transfer that completes in cycle t
// (`xfer_done`) is followed by the next owner without a gap. `retry` rises in
// the same cycle as the new owner's grant. `done` is `xfer_done` steered to
// the owner, for the scheduler's slack counters. `ev_*` are one-cycle event
// strobes for observation.
//
// Warning, emergency, preemption, retry and locking follow the published
// scheme; the single-cycle handover, locking only transfers granted through
// the emergency state, and the round-robin pointer following every grant are
// this design's choices.
module latency_aware_arbiter
  import slack_arb_pkg::*;
#(
  parameter int unsigned N_MASTERS = 4,
  parameter policy_e     POLICY    = POLICY_ROUND_ROBIN,
  localparam int unsigned ID_W = (N_MASTERS > 1) ? $clog2(N_MASTERS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_MASTERS-1:0] req,
  input  logic                 xfer_done,    // owner's last beat completes
  // from the scheduler
  input  logic [ID_W-1:0]      next_grant,
  input  urgency_e             state,
  // bus side
  output logic [N_MASTERS-1:0] grant,
  output logic                 owner_valid,
  output logic [ID_W-1:0]      owner,
  output logic                 locked,
  output logic [N_MASTERS-1:0] retry,
  output logic [N_MASTERS-1:0] done,
  // events
  output logic                 ev_warn_grant,
  output logic                 ev_emerg_grant,
  output logic                 ev_preempt,
  output logic                 ev_lock_hold
);

  logic                 own_v_q, lock_q;
  logic [ID_W-1:0]      own_q;
  logic [N_MASTERS-1:0] own_oh, retry_q;

  logic                 base_any;
  logic [ID_W-1:0]      base_choice;
  logic                 free;

  logic                 nxt_v, nxt_lock, take;
  logic [ID_W-1:0]      nxt_id;
  logic                 preempt, w_grant, e_grant, l_hold;

  assign own_oh = own_v_q ? (N_MASTERS'(1) << own_q) : '0;
  assign free   = !own_v_q || xfer_done;

  base_arbiter #(
    .N_MASTERS(N_MASTERS),
    .POLICY   (POLICY)
  ) u_base (
    .clk       (clk),
    .rst_n     (rst_n),
    .req       (req & ~own_oh),
    .any       (base_any),
    .choice    (base_choice),
    .update    (take),
    .granted_id(nxt_id)
  );

  // bus-winner selection
  always_comb begin
    nxt_v    = own_v_q;
    nxt_id   = own_q;
    nxt_lock = lock_q;
    take     = 1'b0;
    preempt  = 1'b0;
    w_grant  = 1'b0;
    e_grant  = 1'b0;
    l_hold   = 1'b0;
    if (free) begin
      if (state != URG_SAFE) begin
        take     = 1'b1;
        nxt_v    = 1'b1;
        nxt_id   = next_grant;
        nxt_lock = (state == URG_EMERGENCY);
        w_grant  = (state == URG_WARNING);
        e_grant  = (state == URG_EMERGENCY);
      end else if (base_any) begin
        take     = 1'b1;
        nxt_v    = 1'b1;
        nxt_id   = base_choice;
        nxt_lock = 1'b0;
      end else begin
        nxt_v    = 1'b0;
        nxt_lock = 1'b0;
      end
    end else if (state == URG_EMERGENCY) begin
      if (!lock_q) begin
        take     = 1'b1;
        preempt  = 1'b1;
        e_grant  = 1'b1;
        nxt_v    = 1'b1;
        nxt_id   = next_grant;
        nxt_lock = 1'b1;
      end else begin
        l_hold   = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      own_v_q <= 1'b0;
      own_q   <= '0;
      lock_q  <= 1'b0;
      retry_q <= '0;
    end else begin
      own_v_q <= nxt_v;
      own_q   <= nxt_id;
      lock_q  <= nxt_lock;
      retry_q <= preempt ? own_oh : '0;
    end
  end

  assign grant          = own_oh;
  assign owner_valid    = own_v_q;
  assign owner          = own_q;
  assign locked         = lock_q;
  assign retry          = retry_q;
  assign done           = xfer_done ? own_oh : '0;
  assign ev_warn_grant  = w_grant;
  assign ev_emerg_grant = e_grant;
  assign ev_preempt     = preempt;
  assign ev_lock_hold   = l_hold;

  // at most one master owns the bus
  a_grant_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  // a completion can only be reported for a transfer in progress
  a_done_owner:   assert property (@(posedge clk) disable iff (!rst_n) xfer_done |-> own_v_q);
  // a locked transfer is never preempted
  a_lock_keep:    assert property (@(posedge clk) disable iff (!rst_n) (own_v_q && lock_q) |-> !preempt);

endmodule
