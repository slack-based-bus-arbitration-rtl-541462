// Conventional bandwidth-conscious arbiter.
//
// Chooses one of the requesting masters ("arbiter-chosen master"). With
// POLICY = round robin the search starts just after the master that was last
// granted; with POLICY = fixed priority the lowest index wins. The choice is
// combinational; `update` with `granted_id` moves the round-robin pointer
// (register) to the master that actually received the bus, whether the base
// arbiter or the scheduler chose it.
//
// The published scheme works with any such arbiter and was evaluated with
// round robin and fixed priority; how they are built is this design's choice.
module base_arbiter
  import slack_arb_pkg::*;
#(
  parameter int unsigned N_MASTERS = 4,
  parameter policy_e     POLICY    = POLICY_ROUND_ROBIN,
  localparam int unsigned ID_W = (N_MASTERS > 1) ? $clog2(N_MASTERS) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N_MASTERS-1:0]  req,
  output logic                  any,
  output logic [ID_W-1:0]       choice,
  input  logic                  update,
  input  logic [ID_W-1:0]       granted_id
);

  logic [ID_W-1:0] last_q;

  always_comb begin
    int unsigned idx;
    any    = 1'b0;
    choice = '0;
    for (int unsigned k = 0; k < N_MASTERS; k++) begin
      if (POLICY == POLICY_ROUND_ROBIN)
        idx = (int'(last_q) + 1 + k) % N_MASTERS;
      else
        idx = k;
      if (!any && req[idx]) begin
        any    = 1'b1;
        choice = ID_W'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      last_q <= ID_W'(N_MASTERS - 1);
    else if (update) last_q <= granted_id;
  end

endmodule
