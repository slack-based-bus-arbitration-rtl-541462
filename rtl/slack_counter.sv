// Slack counter of one latency-sensitive master.
//
// Holds the master's latency constraint L (programmable through a write port)
// and a slack register whose most significant bit is a valid bit. When the
// master raises a new request (req high while no slack is being tracked), the
// counter loads
//     slack = L - B * T - S
// where B is the burst length of the request, T the cycles per beat
// (BEAT_CYCLES, 1 by default so that no multiplier is built) and S the
// worst-case latency of the slave. With COUNT_BURST = 0 the burst term is
// left out, for masters that care only about the latency to the first beat. From then on the slack is decremented once
// per clock cycle; it saturates at the most negative value. The valid bit is
// cleared in the cycle after `done` reports that the request has been
// completely serviced. A request that is preempted stays valid and keeps
// counting down.
//
// Timing: a request first seen high at cycle t shows its loaded slack at t+1.
// If the bus is granted to it at cycle g, its total latency (g - t + S + B)
// meets L exactly when its slack at cycle g is at least 1.
//
// The structure (constraint register, a pair of input multiplexers choosing
// between (L, B) on a new request and (slack, 1) otherwise, one subtractor,
// slack register with a valid MSB) and the slack equation follow the
// published slack counter. Folding the constant S (and T) into the
// subtrahend, the saturation and the new-request rule are this design's
// choices.
module slack_counter
  import slack_arb_pkg::*;
#(
  parameter int unsigned LAT_WIDTH   = LAT_W,
  parameter int unsigned SLACK_WIDTH = SLACK_W,
  parameter int unsigned BURST_WIDTH = BURST_W,
  parameter int unsigned SLAVE_LAT   = 8,     // worst-case slave latency S
  parameter int unsigned BEAT_CYCLES = 1,     // transfer time per beat T
  parameter bit          COUNT_BURST = 1'b1,  // include the B * T term
  parameter logic [LAT_WIDTH-1:0] LAT_INIT = 30 // constraint after reset
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // constraint register write port
  input  logic                          lc_we,
  input  logic [LAT_WIDTH-1:0]          lc_wdata,
  output logic [LAT_WIDTH-1:0]          lc_q,
  // request side
  input  logic                          req,        // bus request of the master
  input  logic [BURST_WIDTH-1:0]        burst_len,  // beats of the request
  input  logic                          done,       // request fully serviced
  // status
  output logic                          valid,
  output logic signed [SLACK_WIDTH-1:0] slack
);

  localparam logic signed [SLACK_WIDTH-1:0] SLACK_MIN = {1'b1, {(SLACK_WIDTH-1){1'b0}}};

  // {valid, slack} register
  logic [SLACK_WIDTH:0]                slack_q;
  logic [LAT_WIDTH-1:0]                lat_q;
  logic                                load;
  logic signed [SLACK_WIDTH+1:0]       op_a, op_b, diff;

  assign load = req && !slack_q[SLACK_WIDTH];

  // operand multiplexers feeding the single subtractor
  always_comb begin
    if (load) begin
      op_a = (SLACK_WIDTH+2)'(lat_q);
      op_b = (COUNT_BURST ? (SLACK_WIDTH+2)'(burst_len) * (SLACK_WIDTH+2)'(BEAT_CYCLES)
                          : '0) + (SLACK_WIDTH+2)'(SLAVE_LAT);
    end else begin
      op_a = (SLACK_WIDTH+2)'(signed'(slack_q[SLACK_WIDTH-1:0]));
      op_b = (SLACK_WIDTH+2)'(1);
    end
    diff = op_a - op_b;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lat_q   <= LAT_INIT;
      slack_q <= '0;
    end else begin
      if (lc_we) lat_q <= lc_wdata;
      if (slack_q[SLACK_WIDTH] && done) begin
        slack_q <= '0;
      end else if (load || slack_q[SLACK_WIDTH]) begin
        slack_q[SLACK_WIDTH] <= 1'b1;
        if (diff < (SLACK_WIDTH+2)'(SLACK_MIN))
          slack_q[SLACK_WIDTH-1:0] <= SLACK_MIN;
        else
          slack_q[SLACK_WIDTH-1:0] <= diff[SLACK_WIDTH-1:0];
      end
    end
  end

  assign valid = slack_q[SLACK_WIDTH];
  assign slack = slack_q[SLACK_WIDTH-1:0];
  assign lc_q  = lat_q;

endmodule
