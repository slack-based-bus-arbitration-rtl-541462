// Slack-based scheduler.
//
// One slack counter per latency-sensitive master, a minimum-slack selector and
// an urgency comparator. Every cycle it names the waiting request with the
// smallest slack ("Next grant") and how urgent that request is ("State":
// 00 safe, 01 warning, 10 emergency). The arbiter uses both to override its
// own choice. The scheduler is only advisory: it never drives a grant itself.
//
// Interface: per-master request level, burst length and completion pulse;
// `in_service` is the one-hot owner of the bus, whose request is excluded
// from the selection. Constraint and threshold registers have write strobes
// driven by the configuration slave. `sched_en` = 0 forces State to safe
// (plain base arbitration); `emerg_en` = 0 reports emergencies as warnings
// (the warning-only variant). Next grant and State are combinational from
// registers, so they are valid in the same cycle as the slacks they reflect.
//
// The composition (N slack counters, min comparator, threshold comparator)
// follows the published scheduler; the mode inputs and the owner exclusion
// are this design's choices.
module slack_scheduler
  import slack_arb_pkg::*;
#(
  parameter int unsigned N_MASTERS   = 4,
  parameter int unsigned LAT_WIDTH   = LAT_W,
  parameter int unsigned SLACK_WIDTH = SLACK_W,
  parameter int unsigned BURST_WIDTH = BURST_W,
  parameter int unsigned SLAVE_LAT   = 8,
  parameter int unsigned BEAT_CYCLES = 1,
  parameter bit          COUNT_BURST = 1'b1,
  // constraints after reset, master 0 in the low bits (M1..M4 of the workload)
  parameter logic [N_MASTERS-1:0][LAT_WIDTH-1:0] LAT_INIT = {9'd72, 9'd30, 9'd72, 9'd30},
  parameter logic signed [SLACK_WIDTH-1:0] TW_INIT = 21,
  parameter logic signed [SLACK_WIDTH-1:0] TE_INIT = 1,
  localparam int unsigned ID_W = (N_MASTERS > 1) ? $clog2(N_MASTERS) : 1
) (
  input  logic                                     clk,
  input  logic                                     rst_n,
  input  logic [N_MASTERS-1:0]                     req,
  input  logic [N_MASTERS-1:0][BURST_WIDTH-1:0]    burst_len,
  input  logic [N_MASTERS-1:0]                     done,
  input  logic [N_MASTERS-1:0]                     in_service,
  input  logic                                     sched_en,
  input  logic                                     emerg_en,
  // register write port
  input  logic [N_MASTERS-1:0]                     lc_we,
  input  logic                                     tw_we,
  input  logic                                     te_we,
  input  logic [31:0]                              wdata,
  output logic [N_MASTERS-1:0][LAT_WIDTH-1:0]      lc_q,
  output logic signed [SLACK_WIDTH-1:0]            tw_q,
  output logic signed [SLACK_WIDTH-1:0]            te_q,
  // to the arbiter
  output logic [ID_W-1:0]                          next_grant,
  output urgency_e                                 state,
  // observation
  output logic [N_MASTERS-1:0]                     slack_valid,
  output logic signed [N_MASTERS-1:0][SLACK_WIDTH-1:0] slack
);

  logic                          any;
  logic signed [SLACK_WIDTH-1:0] min_slack;
  urgency_e                      raw_state;

  for (genvar i = 0; i < N_MASTERS; i++) begin : g_cnt
    slack_counter #(
      .LAT_WIDTH  (LAT_WIDTH),
      .SLACK_WIDTH(SLACK_WIDTH),
      .BURST_WIDTH(BURST_WIDTH),
      .SLAVE_LAT  (SLAVE_LAT),
    .BEAT_CYCLES(BEAT_CYCLES),
    .COUNT_BURST(COUNT_BURST),
      .LAT_INIT   (LAT_INIT[i])
    ) u_cnt (
      .clk      (clk),
      .rst_n    (rst_n),
      .lc_we    (lc_we[i]),
      .lc_wdata (wdata[LAT_WIDTH-1:0]),
      .lc_q     (lc_q[i]),
      .req      (req[i]),
      .burst_len(burst_len[i]),
      .done     (done[i]),
      .valid    (slack_valid[i]),
      .slack    (slack[i])
    );
  end

  slack_min_select #(
    .N_MASTERS  (N_MASTERS),
    .SLACK_WIDTH(SLACK_WIDTH)
  ) u_min (
    .cand     (slack_valid & ~in_service),
    .slack    (slack),
    .any      (any),
    .min_id   (next_grant),
    .min_slack(min_slack)
  );

  urgency_comparator #(
    .SLACK_WIDTH(SLACK_WIDTH),
    .TW_INIT    (TW_INIT),
    .TE_INIT    (TE_INIT)
  ) u_urg (
    .clk      (clk),
    .rst_n    (rst_n),
    .tw_we    (tw_we),
    .te_we    (te_we),
    .wdata    (wdata[SLACK_WIDTH-1:0]),
    .tw_q     (tw_q),
    .te_q     (te_q),
    .any      (any),
    .min_slack(min_slack),
    .state    (raw_state)
  );

  always_comb begin
    if (!sched_en)                                   state = URG_SAFE;
    else if (!emerg_en && raw_state == URG_EMERGENCY) state = URG_WARNING;
    else                                             state = raw_state;
  end

endmodule
