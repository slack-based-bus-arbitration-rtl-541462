// Urgency comparator of the scheduler.
//
// Holds the global threshold pair T(W) (warning) and T(E) (emergency), both
// programmable, and classifies the smallest pending slack:
//   slack <= T(E)          -> emergency (State 10)
//   slack <= T(W)          -> warning   (State 01)
//   otherwise, or nothing pending -> safe (State 00)
// The classification is combinational; the thresholds are registers written
// through a write port. Comparison against the thresholds and the encoding
// follow the published scheme. The reset values (T(W) = 21, the average
// service time of the evaluated workload, and T(E) = 1, the slack at which a
// request misses unless granted in this very cycle) are this design's choice.
module urgency_comparator
  import slack_arb_pkg::*;
#(
  parameter int unsigned SLACK_WIDTH = SLACK_W,
  parameter logic signed [SLACK_WIDTH-1:0] TW_INIT = 21,
  parameter logic signed [SLACK_WIDTH-1:0] TE_INIT = 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          tw_we,
  input  logic                          te_we,
  input  logic signed [SLACK_WIDTH-1:0] wdata,
  output logic signed [SLACK_WIDTH-1:0] tw_q,
  output logic signed [SLACK_WIDTH-1:0] te_q,
  input  logic                          any,       // a pending request exists
  input  logic signed [SLACK_WIDTH-1:0] min_slack,
  output urgency_e                      state
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tw_q <= TW_INIT;
      te_q <= TE_INIT;
    end else begin
      if (tw_we) tw_q <= wdata;
      if (te_we) te_q <= wdata;
    end
  end

  always_comb begin
    if (!any)                  state = URG_SAFE;
    else if (min_slack <= te_q) state = URG_EMERGENCY;
    else if (min_slack <= tw_q) state = URG_WARNING;
    else                       state = URG_SAFE;
  end

endmodule
