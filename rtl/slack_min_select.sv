// Minimum-slack selector ("comparator: min()" of the scheduler).
//
// Compares the slacks of all candidate masters (valid slack counter and not
// the master that currently owns the bus) and returns the index and slack of
// the smallest one. Purely combinational. Ties go to the lower index, which is
// this design's choice; excluding the bus owner is also this design's choice,
// so that the scheduler always names a waiting request.
module slack_min_select #(
  parameter int unsigned N_MASTERS   = 4,
  parameter int unsigned SLACK_WIDTH = 10,
  localparam int unsigned ID_W = (N_MASTERS > 1) ? $clog2(N_MASTERS) : 1
) (
  input  logic [N_MASTERS-1:0]                       cand,
  input  logic signed [N_MASTERS-1:0][SLACK_WIDTH-1:0] slack,
  output logic                                       any,
  output logic [ID_W-1:0]                            min_id,
  output logic signed [SLACK_WIDTH-1:0]              min_slack
);

  always_comb begin
    any       = 1'b0;
    min_id    = '0;
    min_slack = '0;
    for (int i = 0; i < N_MASTERS; i++) begin
      if (cand[i] && (!any || $signed(slack[i]) < min_slack)) begin
        any       = 1'b1;
        min_id    = ID_W'(i);
        min_slack = slack[i];
      end
    end
  end

endmodule
