// End-to-end testbench of slack_arb_top at its default parameters.
//
// Four masters with the evaluated workload (bursts of 8/8/16/16 beats,
// constraints 30/72/30/72 cycles, 35 % of the bus bandwidth each) share one
// slave of latency 8 through the arbitration unit. The run has four phases,
// selected by writing the mode register over the configuration port:
//   1. scheduler with warning and emergency states (RR-E)
//   2. plain round robin (scheduler disabled)
//   3. scheduler with the warning state only (RR-W)
//   4. RR-E after reprogramming the constraints of masters 1 and 2 to 51.
// Checks, all against values the testbench derives itself:
//  * every cycle, each tracked slack equals L - B - 8 - (cycles since the
//    request rose - 1), saturated at -512, with L taken from the testbench's
//    own decoding of configuration writes;
//  * every burst that was not preempted finishes with latency exactly
//    L - slack_at_grant + 1, so it meets its constraint iff the slack was
//    at least 1 when it was granted;
//  * configuration read-back, at most one grant, no protocol errors,
//    no request starved;
//  * with the scheduler (either variant) the 30-cycle masters see a lower
//    mean latency than with plain round robin;
//  * each mechanism (warning grant, emergency grant, preemption with retry,
//    emergency held off by a lock, constraint change, mode switch) happens.
module tb_slack_arb_top;
  import slack_arb_pkg::*;
  localparam int N = 4, S = 8, PHASE = 20000;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, grant, retry, slack_valid;
  logic [N-1:0][4:0] burst_len;
  logic xfer_done, owner_valid, locked;
  logic [1:0] owner, next_grant;
  logic hsel, hwrite, hready, hreadyout, hresp;
  logic [7:0] haddr;
  logic [1:0] htrans;
  logic [31:0] hwdata, hrdata;
  urgency_e state;
  logic signed [N-1:0][9:0] slack;
  logic ev_warn_grant, ev_emerg_grant, ev_preempt, ev_lock_hold;

  slack_arb_top dut (.*);
  always #5 clk = ~clk;

  // environment
  logic en = 0, clr = 0;
  int think[N], burst[N], lat_limit[N];
  int n_done[N], n_viol[N], max_viol[N], n_retry[N], max_wait, errors;
  longint sum_lat[N], sum_viol[N], beats, cycles;

  bus_env_model #(.N(N), .SLAVE_LAT(S)) env (
    .clk, .rst_n, .en, .clr, .think, .burst, .lat_limit, .req, .burst_len, .grant, .retry,
    .xfer_done, .n_done, .n_viol, .max_viol, .sum_lat, .sum_viol, .n_retry, .max_wait, .beats,
    .cycles, .errors);

  int checks = 0, failures = 0;
  int n_warn = 0, n_emerg = 0, n_preempt = 0, n_hold = 0, n_cfg = 0, n_mode = 0, n_resent = 0;
  int n_exact = 0;

  // ---- independent model of the configuration registers -------------------
  int  m_lat[N];
  bit  dp_v, dp_w;
  logic [7:0] dp_a;
  always @(posedge clk) begin
    if (dp_v && dp_w && dp_a < 8'(4 * N)) begin
      m_lat[dp_a >> 2] <= int'(hwdata[8:0]);
      n_cfg++;
    end
    if (dp_v && dp_w && dp_a == 8'h28) n_mode++;
    if (hready) begin dp_v <= hsel && htrans[1]; dp_w <= hwrite; dp_a <= haddr; end
  end

  // ---- per-request scoreboard ---------------------------------------------
  longint now = 0;
  longint t_rise[N];
  int     l_rise[N], b_rise[N], g_slack[N];
  bit     req_q[N], granted[N], was_retried[N];
  always @(posedge clk) if (rst_n) begin
    now <= now + 1;
    if (ev_warn_grant)  n_warn++;
    if (ev_emerg_grant) n_emerg++;
    if (ev_preempt)     n_preempt++;
    if (ev_lock_hold)   n_hold++;
    for (int i = 0; i < N; i++) begin
      req_q[i] <= req[i];
      if (req[i] && !req_q[i]) begin
        t_rise[i] <= now; l_rise[i] <= m_lat[i]; b_rise[i] <= int'(burst_len[i]);
        granted[i] <= 0; was_retried[i] <= 0;
      end
      // slack check
      if (req_q[i] && req[i] && now > t_rise[i]) begin
        int e;
        e = l_rise[i] - b_rise[i] - S - int'(now - t_rise[i] - 1);
        if (e < -512) e = -512;
        checks++;
        if (!slack_valid[i] || int'($signed(slack[i])) != e) begin
          failures++;
          $display("FAIL t=%0d slack[%0d]=%0d exp %0d", now, i, $signed(slack[i]), e);
        end
      end
      if (grant[i] && !granted[i] && req_q[i]) begin
        granted[i] <= 1;
        g_slack[i] <= int'($signed(slack[i]));
      end
      if (retry[i]) begin was_retried[i] <= 1; granted[i] <= 0; end
      if (xfer_done && grant[i] && granted[i]) begin
        int lat;
        lat = int'(now - t_rise[i]) + 1;
        if (was_retried[i]) n_resent++;
        else begin
          checks++;
          n_exact++;
          if (lat != l_rise[i] - g_slack[i] + 1) begin
            failures++;
            $display("FAIL t=%0d master %0d latency %0d, slack at grant %0d, L %0d", now, i, lat,
                     g_slack[i], l_rise[i]);
          end
        end
      end
    end
  end

  // ---- configuration port tasks --------------------------------------------
  task automatic ahb_write(logic [7:0] a, logic [31:0] d);
    @(negedge clk); hsel = 1; haddr = a; htrans = 2'b10; hwrite = 1;
    @(negedge clk); hsel = 0; htrans = 2'b00; hwrite = 0; hwdata = d;
    @(negedge clk);
  endtask

  task automatic ahb_read_check(logic [7:0] a, logic [31:0] exp);
    @(negedge clk); hsel = 1; haddr = a; htrans = 2'b10; hwrite = 0;
    @(negedge clk); hsel = 0; htrans = 2'b00;
    #1 checks++;
    if (hrdata != exp) begin failures++; $display("FAIL read %h = %h exp %h", a, hrdata, exp); end
  endtask

  int worst_rr, worst_rre, worst_rrw;
  real avg_rr, avg_rre, avg_rrw;

  function automatic int worst_critical();
    return (max_viol[0] > max_viol[2]) ? max_viol[0] : max_viol[2];
  endfunction

  task automatic run_phase(string name, output int worst);
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0;
    repeat (PHASE) @(posedge clk);
    worst = worst_critical();
    $display("%s: util %0d%%  retries %0d", name, int'(100 * beats / cycles),
             n_retry[0] + n_retry[1] + n_retry[2] + n_retry[3]);
    for (int i = 0; i < N; i++)
      $display("  M%0d done %0d avg lat %0d viol %0d max viol %0d", i + 1, n_done[i],
               (n_done[i] != 0) ? int'(sum_lat[i] / longint'(n_done[i])) : 0, n_viol[i], max_viol[i]);
  endtask

  initial begin
    hsel = 0; hwrite = 0; hready = 1; haddr = 0; htrans = 0; hwdata = 0;
    m_lat = '{30, 72, 30, 72};
    lat_limit = '{30, 72, 30, 72};
    burst = '{8, 8, 16, 16};
    // 35 % of the data cycles each: think = B / 0.35 - B - 8 - 1
    think = '{6, 6, 21, 21};
    dp_v = 0; dp_w = 0; dp_a = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    // reset values
    ahb_read_check(8'h00, 32'd30);
    ahb_read_check(8'h04, 32'd72);
    ahb_read_check(8'h08, 32'd30);
    ahb_read_check(8'h0C, 32'd72);
    ahb_read_check(8'h20, 32'd21);
    ahb_read_check(8'h24, 32'd1);
    ahb_read_check(8'h28, 32'd3);
    en = 1;
    run_phase("RR-E", worst_rre);
    avg_rre = real'(sum_lat[0] + sum_lat[2]) / real'(n_done[0] + n_done[2]);
    ahb_write(8'h28, 32'd0);
    ahb_read_check(8'h28, 32'd0);
    run_phase("RR", worst_rr);
    avg_rr = real'(sum_lat[0] + sum_lat[2]) / real'(n_done[0] + n_done[2]);
    ahb_write(8'h28, 32'd1);
    run_phase("RR-W", worst_rrw);
    avg_rrw = real'(sum_lat[0] + sum_lat[2]) / real'(n_done[0] + n_done[2]);
    // constraint change: M2 72 -> 51, M3 30 -> 51
    ahb_write(8'h28, 32'd3);
    ahb_write(8'h04, 32'd51);
    ahb_write(8'h08, 32'd51);
    ahb_read_check(8'h04, 32'd51);
    ahb_read_check(8'h08, 32'd51);
    lat_limit = '{30, 51, 51, 72};
    begin
      int w;
      run_phase("RR-E, constraints changed", w);
    end
    en = 0;
    repeat (3000) @(posedge clk);
    // end-of-run checks
    checks++;
    if (errors != 0) begin failures++; $display("FAIL %0d protocol errors", errors); end
    checks++;
    if (req != 0) begin failures++; $display("FAIL requests left after drain: %b", req); end
    checks += 2;
    if (avg_rre >= avg_rr) begin
      failures++; $display("FAIL RR-E latency of critical masters not below RR");
    end
    if (avg_rrw >= avg_rr) begin
      failures++; $display("FAIL RR-W latency of critical masters not below RR");
    end
    $display("mean latency of 30-cycle masters: RR %0.1f  RR-W %0.1f  RR-E %0.1f", avg_rr, avg_rrw,
             avg_rre);
    $display("worst violation of 30-cycle masters: RR %0d  RR-W %0d  RR-E %0d", worst_rr,
             worst_rrw, worst_rre);
    $display("events: warning %0d emergency %0d preempt %0d lock-hold %0d resent %0d cfg %0d mode %0d exact %0d",
             n_warn, n_emerg, n_preempt, n_hold, n_resent, n_cfg, n_mode, n_exact);
    checks += 7;
    if (n_warn == 0)    begin failures++; $display("FAIL no warning grant"); end
    if (n_emerg == 0)   begin failures++; $display("FAIL no emergency grant"); end
    if (n_preempt == 0) begin failures++; $display("FAIL no preemption"); end
    if (n_hold == 0)    begin failures++; $display("FAIL no lock hold"); end
    if (n_resent == 0)  begin failures++; $display("FAIL no resent burst"); end
    if (n_cfg < 2)      begin failures++; $display("FAIL no constraint change"); end
    if (n_mode < 3)     begin failures++; $display("FAIL no mode switch"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5 * PHASE) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
