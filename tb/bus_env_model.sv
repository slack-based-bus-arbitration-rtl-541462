// Behavioural model of the bus around the arbitration unit, for testbenches.
//
// Masters: each master i alternates between computing and transferring. After
// a computation of random length (uniform in 0..2*think[i], mean think[i]
// cycles) it raises req with a burst of burst[i] beats and holds it until the
// last beat; then it computes again (req low for at least one cycle). A retry
// makes the master resend the same burst. With think = burst/share - burst -
// SLAVE_LAT - 1 an unhindered master uses `share` of the data cycles.
// Slave: a single slave with a fixed latency of SLAVE_LAT cycles; once a
// master is granted it returns one beat per cycle from the SLAVE_LAT-th
// cycle of the grant on, and reports xfer_done with the last beat.
// Latency of a burst = cycles from the rise of req to its last beat,
// inclusive. Per-master statistics are kept against lat_limit[i].
// `errors` counts protocol violations seen by the model.
module bus_env_model #(
  parameter int N         = 4,
  parameter int SLAVE_LAT = 8,
  parameter int BURST_W   = 5
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic                      clr,       // clear the statistics
  input  int                        think     [N],
  input  int                        burst     [N],
  input  int                        lat_limit [N],
  output logic [N-1:0]              req,
  output logic [N-1:0][BURST_W-1:0] burst_len,
  input  logic [N-1:0]              grant,
  input  logic [N-1:0]              retry,
  output logic                      xfer_done,
  output int                        n_done    [N],
  output int                        n_viol    [N],
  output int                        max_viol  [N],
  output longint                    sum_lat   [N],
  output longint                    sum_viol  [N],
  output int                        n_retry   [N],
  output int                        max_wait,
  output longint                    beats,
  output longint                    cycles,
  output int                        errors
);

  int     wait_c    [N];   // remaining computation cycles
  bit     active    [N];
  longint rise      [N];
  int     cur_len   [N];
  logic [N-1:0] grant_q, req_q;
  int     cnt;
  longint now;     // free-running time base, never cleared

  // slave beat counter: restarts whenever the owner changes
  wire new_xfer = (grant != 0) && (grant != grant_q);
  int  cnt_eff;
  int  own;
  always_comb begin
    own = 0;
    for (int i = 0; i < N; i++) if (grant[i]) own = i;
    cnt_eff   = new_xfer ? 0 : cnt;
    xfer_done = (grant != 0) && (cnt_eff == SLAVE_LAT + cur_len[own] - 1);
  end

  always_comb
    for (int i = 0; i < N; i++) begin
      req[i]       = active[i];
      burst_len[i] = BURST_W'(cur_len[i]);
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      grant_q <= '0;
      req_q   <= '0;
      cnt     <= 0;
      cycles  <= 0;
      now     <= 0;
      beats   <= 0;
      errors  <= 0;
      max_wait <= 0;
      for (int i = 0; i < N; i++) begin
        wait_c[i] <= 0; active[i] <= 0; rise[i] <= 0; cur_len[i] <= burst[i];
        n_done[i] <= 0; n_viol[i] <= 0; max_viol[i] <= 0; sum_lat[i] <= 0; sum_viol[i] <= 0;
        n_retry[i] <= 0;
      end
    end else begin
      cycles  <= cycles + 1;
      now     <= now + 1;
      grant_q <= grant;
      req_q   <= req;
      cnt     <= cnt_eff + 1;
      if (clr) begin
        beats <= 0; cycles <= 0; max_wait <= 0;
      end else if (grant != 0 && cnt_eff >= SLAVE_LAT) beats <= beats + 1;
      if ($countones(grant) > 1) errors <= errors + 1;
      for (int i = 0; i < N; i++) begin
        if (!active[i]) begin
          if (wait_c[i] > 0) wait_c[i] <= wait_c[i] - 1;
          else if (en) active[i] <= 1'b1;
        end
        if (req[i] && !req_q[i]) rise[i] <= now;
        if (grant[i] && !req[i]) errors <= errors + 1;
        if (retry[i] && !clr) n_retry[i] <= n_retry[i] + 1;
        if (req[i] && int'(now - rise[i]) > max_wait && !grant[i])
          max_wait <= int'(now - rise[i]);
        if (clr) begin
          n_done[i] <= 0; n_viol[i] <= 0; max_viol[i] <= 0; sum_lat[i] <= 0; sum_viol[i] <= 0;
          n_retry[i] <= 0;
        end else if (xfer_done && grant[i]) begin
          int lat;
          lat = int'(now - rise[i]) + 1;
          n_done[i]  <= n_done[i] + 1;
          sum_lat[i] <= sum_lat[i] + longint'(lat);
          if (lat > lat_limit[i]) begin
            n_viol[i]   <= n_viol[i] + 1;
            sum_viol[i] <= sum_viol[i] + longint'(lat - lat_limit[i]);
            if (lat - lat_limit[i] > max_viol[i]) max_viol[i] <= lat - lat_limit[i];
          end
        end
        if (xfer_done && grant[i]) begin
          active[i]  <= 1'b0;
          wait_c[i]  <= int'($urandom % (2 * think[i] + 1));
          cur_len[i] <= burst[i];
        end
      end
    end
  end

endmodule
