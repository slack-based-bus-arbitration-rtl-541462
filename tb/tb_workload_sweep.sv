// Workload testbench: the evaluated four-master workload swept over the total
// bandwidth requirement, for round robin and fixed priority as base arbiters,
// each in three modes (scheduler off, warning only, warning + emergency).
//
// Every master asks for the same share of the data cycles (10 % .. 35 %, i.e.
// 40 % .. 140 % of the ideal bus bandwidth in total); bursts are 8/8/16/16
// beats and constraints 30/72/30/72 cycles; the slave latency is 8. A last
// run repeats the 35 % point in warning + emergency mode with master 3
// raised to 50 % (the traffic-variation experiment). For every run the
// longest violation, the mean latency of the 30-cycle masters, the bus
// utilisation and the retry ratio are printed; at 140 % also every master's
// mean latency and mean violation (violated cycles averaged over all bursts).
// Checks: no protocol errors; with round robin the warning-only scheduler
// gives the 30-cycle masters a mean latency no higher than the scheduler-off
// run plus one cycle at every load, and so does the warning + emergency
// scheduler from 100 % total load on; preemption costs at most 5 points of
// utilisation; fewer than a quarter of the bursts are retried.
module tb_workload_sweep;
  import slack_arb_pkg::*;
  localparam int N = 4, S = 8, RUN = 8000;

  logic clk = 0, rst_n = 0;
  logic hsel, hwrite, hready;
  logic [7:0] haddr;
  logic [1:0] htrans;
  logic [31:0] hwdata;
  logic en = 0, clr = 0;
  int think[N], burst[N], lat_limit[N];
  always #5 clk = ~clk;

  // per base policy: 0 = round robin, 1 = fixed priority
  logic [N-1:0]      req      [2];
  logic [N-1:0][4:0] burst_len[2];
  logic [N-1:0]      grant    [2];
  logic [N-1:0]      retry    [2];
  logic              xfer_done[2];
  int n_done[2][N], n_viol[2][N], max_viol[2][N], n_retry[2][N], max_wait[2], errors[2];
  longint sum_lat[2][N], sum_viol[2][N], beats[2], cycles[2];

  for (genvar p = 0; p < 2; p++) begin : g_sys
    slack_arb_top #(.POLICY(p == 0 ? POLICY_ROUND_ROBIN : POLICY_FIXED_PRIORITY)) dut (
      .clk, .rst_n, .req(req[p]), .burst_len(burst_len[p]), .grant(grant[p]), .retry(retry[p]),
      .xfer_done(xfer_done[p]), .owner_valid(), .owner(), .locked(),
      .hsel, .haddr, .htrans, .hwrite, .hwdata, .hready, .hrdata(), .hreadyout(), .hresp(),
      .next_grant(), .state(), .slack_valid(), .slack(),
      .ev_warn_grant(), .ev_emerg_grant(), .ev_preempt(), .ev_lock_hold());
    bus_env_model #(.N(N), .SLAVE_LAT(S)) env (
      .clk, .rst_n, .en, .clr, .think, .burst, .lat_limit, .req(req[p]),
      .burst_len(burst_len[p]), .grant(grant[p]), .retry(retry[p]), .xfer_done(xfer_done[p]),
      .n_done(n_done[p]), .n_viol(n_viol[p]), .max_viol(max_viol[p]), .sum_lat(sum_lat[p]),
      .sum_viol(sum_viol[p]), .n_retry(n_retry[p]), .max_wait(max_wait[p]), .beats(beats[p]),
      .cycles(cycles[p]), .errors(errors[p]));
  end

  int checks = 0, failures = 0;

  task automatic ahb_write(logic [7:0] a, logic [31:0] d);
    @(negedge clk); hsel = 1; haddr = a; htrans = 2'b10; hwrite = 1;
    @(negedge clk); hsel = 0; htrans = 2'b00; hwrite = 0; hwdata = d;
    @(negedge clk);
  endtask

  function automatic int think_for(int b, int pct);
    int t;
    t = (b * 100) / pct - b - S - 1;
    return (t < 0) ? 0 : t;
  endfunction

  real    mlat[2][3];
  int     worst[2][3];
  real    util[2][3];
  real    rratio[2][3];
  string  mname[3] = '{"off ", "W   ", "W+E "};
  string  pname[2] = '{"RR", "FP"};

  task automatic run(int mode_reg, int m, bit per_master = 0);
    ahb_write(8'h28, 32'(mode_reg));
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0;
    repeat (RUN) @(posedge clk);
    if (per_master)
      for (int p = 0; p < 2; p++)
        for (int i = 0; i < N; i++)
          $display("  %s mode %s M%0d: mean latency %0.1f  mean violation %0.1f (limit %0d)",
                   pname[p], mname[m], i + 1,
                   real'(sum_lat[p][i]) / real'((n_done[p][i] > 0) ? n_done[p][i] : 1),
                   real'(sum_viol[p][i]) / real'((n_done[p][i] > 0) ? n_done[p][i] : 1),
                   lat_limit[i]);
    for (int p = 0; p < 2; p++) begin
      int w, tot, rt;
      w = 0; tot = 0; rt = 0;
      for (int i = 0; i < N; i++) begin
        if (max_viol[p][i] > w) w = max_viol[p][i];
        tot += n_done[p][i]; rt += n_retry[p][i];
      end
      worst[p][m]  = w;
      mlat[p][m]   = real'(sum_lat[p][0] + sum_lat[p][2]) / real'(n_done[p][0] + n_done[p][2]);
      util[p][m]   = 100.0 * real'(beats[p]) / real'(cycles[p]);
      rratio[p][m] = (tot > 0) ? 100.0 * real'(rt) / real'(tot) : 0.0;
    end
  endtask

  initial begin
    hsel = 0; hwrite = 0; hready = 1; haddr = 0; htrans = 0; hwdata = 0;
    burst = '{8, 8, 16, 16};
    lat_limit = '{30, 72, 30, 72};
    think = '{0, 0, 0, 0};
    repeat (3) @(posedge clk); #1 rst_n = 1;
    en = 1;
    for (int pct = 10; pct <= 35; pct += 5) begin
      for (int i = 0; i < N; i++) think[i] = think_for(burst[i], pct);
      run(0, 0, pct == 35);
      run(1, 1, pct == 35);
      run(3, 2, pct == 35);
      for (int p = 0; p < 2; p++) begin
        for (int m = 0; m < 3; m++)
          $display("%s total %0d%% mode %s: longest violation %0d  mean latency M1/M3 %0.1f  util %0.1f%%  retries %0.2f%%",
                   pname[p], 4 * pct, mname[m], worst[p][m], mlat[p][m], util[p][m], rratio[p][m]);
        for (int m = 1; m < 3; m++) begin
          // round robin only; the emergency variant only from 100 % on
          if (p != 0 || (m == 2 && pct < 25)) continue;
          checks++;
          if (mlat[p][m] > mlat[p][0] + 1.0) begin
            failures++;
            $display("FAIL %s %0d%%: scheduler mode %0d mean latency %0.1f above %0.1f", pname[p],
                     4 * pct, m, mlat[p][m], mlat[p][0]);
          end
        end
        checks += 2;
        if (util[p][2] < util[p][0] - 5.0) begin
          failures++; $display("FAIL %s %0d%%: utilisation drop", pname[p], 4 * pct);
        end
        if (rratio[p][2] > 25.0) begin
          failures++; $display("FAIL %s %0d%%: retry ratio %0.2f", pname[p], 4 * pct, rratio[p][2]);
        end
      end
    end
    // traffic variation: master 3 raised to 50 %
    think[2] = think_for(16, 50);
    run(3, 2);
    for (int p = 0; p < 2; p++)
      $display("%s M3 at 50%%, mode W+E: longest violation %0d  mean latency M1/M3 %0.1f  util %0.1f%%",
               pname[p], worst[p][2], mlat[p][2], util[p][2]);
    for (int p = 0; p < 2; p++) begin
      checks++;
      if (errors[p] != 0) begin failures++; $display("FAIL %s protocol errors", pname[p]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (25 * RUN) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
