// Latency-aware bus arbitration unit (top level).
//
// A conventional bandwidth-conscious arbiter (round robin by default) is
// augmented by a slack-based scheduler. For each master the scheduler tracks
// the slack of its pending request, i.e. how many more cycles the request may
// wait and still finish within the master's latency constraint. When the
// smallest slack falls to the warning threshold, that master is granted as
// soon as the current transfer ends; at the emergency threshold the current
// (unlocked) transfer is aborted with a retry and the bus is handed over
// immediately. Latency constraints, thresholds and the mode are programmed
// through a small AHB-lite style slave port.
//
// Bus interface (one clock):
//   req[i]        level, raised when master i issues a burst and held until
//                 the burst has completed (cycle after xfer_done). A request
//                 still high after that counts as a new request.
//   burst_len[i]  beats of the pending burst, valid while req[i] is high.
//   grant[i]      master i owns the bus (registered, one-hot).
//   xfer_done     the owner's last data beat completes in this cycle.
//   retry[i]      one-cycle pulse: master i's transfer was aborted; it keeps
//                 its request and must resend the whole burst.
// Observation: next_grant/state (scheduler advice), slack values and event
// strobes (warning grant, emergency grant, preemption, lock hold).
//
// Defaults are those of the evaluated configuration: four masters, slave
// latency 8, constraints 30/72/30/72 cycles for masters 0..3, one cycle per
// beat. COUNT_BURST = 0 makes the slack count to the first data beat only.
// The threshold reset values (T(W)=21, T(E)=1) are this design's choice.
module slack_arb_top
  import slack_arb_pkg::*;
#(
  parameter int unsigned N_MASTERS   = 4,
  parameter int unsigned LAT_WIDTH   = LAT_W,
  parameter int unsigned SLACK_WIDTH = SLACK_W,
  parameter int unsigned BURST_WIDTH = BURST_W,
  parameter int unsigned SLAVE_LAT   = 8,
  parameter int unsigned BEAT_CYCLES = 1,
  parameter bit          COUNT_BURST = 1'b1,
  parameter policy_e     POLICY      = POLICY_ROUND_ROBIN,
  parameter logic [N_MASTERS-1:0][LAT_WIDTH-1:0] LAT_INIT = {9'd72, 9'd30, 9'd72, 9'd30},
  parameter logic signed [SLACK_WIDTH-1:0] TW_INIT = 21,
  parameter logic signed [SLACK_WIDTH-1:0] TE_INIT = 1,
  parameter logic [1:0]  MODE_INIT   = 2'b11,
  localparam int unsigned ID_W = (N_MASTERS > 1) ? $clog2(N_MASTERS) : 1
) (
  input  logic                                         clk,
  input  logic                                         rst_n,
  // masters
  input  logic [N_MASTERS-1:0]                         req,
  input  logic [N_MASTERS-1:0][BURST_WIDTH-1:0]        burst_len,
  output logic [N_MASTERS-1:0]                         grant,
  output logic [N_MASTERS-1:0]                         retry,
  input  logic                                         xfer_done,
  output logic                                         owner_valid,
  output logic [ID_W-1:0]                              owner,
  output logic                                         locked,
  // configuration slave
  input  logic                                         hsel,
  input  logic [7:0]                                   haddr,
  input  logic [1:0]                                   htrans,
  input  logic                                         hwrite,
  input  logic [31:0]                                  hwdata,
  input  logic                                         hready,
  output logic [31:0]                                  hrdata,
  output logic                                         hreadyout,
  output logic                                         hresp,
  // observation
  output logic [ID_W-1:0]                              next_grant,
  output urgency_e                                     state,
  output logic [N_MASTERS-1:0]                         slack_valid,
  output logic signed [N_MASTERS-1:0][SLACK_WIDTH-1:0] slack,
  output logic                                         ev_warn_grant,
  output logic                                         ev_emerg_grant,
  output logic                                         ev_preempt,
  output logic                                         ev_lock_hold
);

  logic [N_MASTERS-1:0]                 lc_we, done;
  logic                                 tw_we, te_we, sched_en, emerg_en;
  logic [31:0]                          wdata;
  logic [N_MASTERS-1:0][LAT_WIDTH-1:0]  lc_q;
  logic signed [SLACK_WIDTH-1:0]        tw_q, te_q;

  sched_cfg_slave #(
    .N_MASTERS  (N_MASTERS),
    .LAT_WIDTH  (LAT_WIDTH),
    .SLACK_WIDTH(SLACK_WIDTH),
    .MODE_INIT  (MODE_INIT)
  ) u_cfg (
    .hclk     (clk),
    .hresetn  (rst_n),
    .hsel     (hsel),
    .haddr    (haddr),
    .htrans   (htrans),
    .hwrite   (hwrite),
    .hwdata   (hwdata),
    .hready   (hready),
    .hrdata   (hrdata),
    .hreadyout(hreadyout),
    .hresp    (hresp),
    .lc_we    (lc_we),
    .tw_we    (tw_we),
    .te_we    (te_we),
    .wdata    (wdata),
    .lc_q     (lc_q),
    .tw_q     (tw_q),
    .te_q     (te_q),
    .sched_en (sched_en),
    .emerg_en (emerg_en)
  );

  slack_scheduler #(
    .N_MASTERS  (N_MASTERS),
    .LAT_WIDTH  (LAT_WIDTH),
    .SLACK_WIDTH(SLACK_WIDTH),
    .BURST_WIDTH(BURST_WIDTH),
    .SLAVE_LAT  (SLAVE_LAT),
    .BEAT_CYCLES(BEAT_CYCLES),
    .COUNT_BURST(COUNT_BURST),
    .LAT_INIT   (LAT_INIT),
    .TW_INIT    (TW_INIT),
    .TE_INIT    (TE_INIT)
  ) u_sched (
    .clk        (clk),
    .rst_n      (rst_n),
    .req        (req),
    .burst_len  (burst_len),
    .done       (done),
    .in_service (grant),
    .sched_en   (sched_en),
    .emerg_en   (emerg_en),
    .lc_we      (lc_we),
    .tw_we      (tw_we),
    .te_we      (te_we),
    .wdata      (wdata),
    .lc_q       (lc_q),
    .tw_q       (tw_q),
    .te_q       (te_q),
    .next_grant (next_grant),
    .state      (state),
    .slack_valid(slack_valid),
    .slack      (slack)
  );

  latency_aware_arbiter #(
    .N_MASTERS(N_MASTERS),
    .POLICY   (POLICY)
  ) u_arb (
    .clk           (clk),
    .rst_n         (rst_n),
    .req           (req),
    .xfer_done     (xfer_done),
    .next_grant    (next_grant),
    .state         (state),
    .grant         (grant),
    .owner_valid   (owner_valid),
    .owner         (owner),
    .locked        (locked),
    .retry         (retry),
    .done          (done),
    .ev_warn_grant (ev_warn_grant),
    .ev_emerg_grant(ev_emerg_grant),
    .ev_preempt    (ev_preempt),
    .ev_lock_hold  (ev_lock_hold)
  );

endmodule
