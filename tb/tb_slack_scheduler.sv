// Self-checking testbench of slack_scheduler.
// Four masters issue random requests, complete them at random and are put on
// the bus (in_service) at random; constraints, thresholds and the mode bits
// are changed now and then. An integer model keeps each master's slack and
// derives the expected Next grant (smallest slack among waiting masters,
// lowest index on ties) and State, which are compared every cycle. Counts
// how often each State value was seen and fails if one never occurred.
module tb_slack_scheduler;
  import slack_arb_pkg::*;
  localparam int N = 4, S = 8;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, done, in_service, lc_we, slack_valid;
  logic [N-1:0][4:0] burst_len;
  logic sched_en, emerg_en, tw_we, te_we;
  logic [31:0] wdata;
  logic [N-1:0][8:0] lc_q;
  logic signed [9:0] tw_q, te_q;
  logic [1:0] next_grant;
  urgency_e state;
  logic signed [N-1:0][9:0] slack;

  int checks = 0, failures = 0;
  int seen[3];

  slack_scheduler #(.N_MASTERS(N), .SLAVE_LAT(S)) dut (.*);
  always #5 clk = ~clk;

  int m_lat[N], m_slack[N], m_tw, m_te;
  bit m_valid[N];

  task automatic model_edge();
    for (int i = 0; i < N; i++) begin
      int nl = lc_we[i] ? int'(wdata[8:0]) : m_lat[i];
      if (m_valid[i] && done[i]) m_valid[i] = 0;
      else if (req[i] && !m_valid[i]) begin
        m_valid[i] = 1; m_slack[i] = m_lat[i] - burst_len[i] - S;
      end else if (m_valid[i]) m_slack[i] = (m_slack[i] > -512) ? m_slack[i] - 1 : -512;
      m_lat[i] = nl;
    end
    if (tw_we) m_tw = int'($signed(wdata[9:0]));
    if (te_we) m_te = int'($signed(wdata[9:0]));
  endtask

  task automatic compare();
    int best = -1, bs = 0;
    urgency_e exp_s;
    for (int i = 0; i < N; i++)
      if (m_valid[i] && !in_service[i] && (best < 0 || m_slack[i] < bs)) begin
        best = i; bs = m_slack[i];
      end
    if (best < 0 || !sched_en)  exp_s = URG_SAFE;
    else if (bs <= m_te)        exp_s = emerg_en ? URG_EMERGENCY : URG_WARNING;
    else if (bs <= m_tw)        exp_s = URG_WARNING;
    else                        exp_s = URG_SAFE;
    checks++;
    if (state != exp_s || (exp_s != URG_SAFE && int'(next_grant) != best)) begin
      failures++;
      $display("FAIL t=%0t state=%0d/%0d next=%0d/%0d", $time, state, exp_s, next_grant, best);
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (slack_valid[i] != m_valid[i] || (m_valid[i] && int'($signed(slack[i])) != m_slack[i])) begin
        failures++;
        $display("FAIL t=%0t slack[%0d]=%0d/%0d", $time, i, slack[i], m_slack[i]);
      end
    end
    if (sched_en) seen[int'(state)]++;
  endtask

  initial begin
    req = 0; done = 0; in_service = 0; lc_we = 0; burst_len = 0;
    sched_en = 1; emerg_en = 1; tw_we = 0; te_we = 0; wdata = 0;
    m_lat = '{30, 72, 30, 72}; m_tw = 21; m_te = 1;
    for (int i = 0; i < N; i++) begin m_valid[i] = 0; m_slack[i] = 0; end
    repeat (2) @(posedge clk); #1 rst_n = 1; #1;
    compare();
    for (int cyc = 0; cyc < 20000; cyc++) begin
      // drive inputs for this cycle
      for (int i = 0; i < N; i++) begin
        if (m_valid[i]) req[i] = 1;
        else req[i] = ($urandom % 6 == 0);
        burst_len[i] = (i % 2) ? 5'd16 : 5'd8;
        if ($urandom % 8 == 0) burst_len[i] = 5'($urandom);
      end
      done = 0;
      for (int i = 0; i < N; i++) if (m_valid[i] && $urandom % 40 == 0) done[i] = 1;
      if ($urandom % 10 == 0) in_service = N'(1) << ($urandom % N);
      else if ($urandom % 10 == 0) in_service = 0;
      lc_we = 0; tw_we = 0; te_we = 0;
      if ($urandom % 300 == 0) begin lc_we[$urandom % N] = 1; wdata = 32'(20 + $urandom % 100); end
      else if ($urandom % 500 == 0) begin tw_we = 1; wdata = 32'(10 + $urandom % 30); end
      else if ($urandom % 500 == 0) begin te_we = 1; wdata = 32'($signed(-5 + int'($urandom % 10))); end
      if ($urandom % 1000 == 0) sched_en = ~sched_en;
      if ($urandom % 700 == 0) emerg_en = ~emerg_en;
      #1; compare();
      model_edge();
      @(posedge clk); #1;
      // a finished request is dropped for one cycle
      for (int i = 0; i < N; i++) if (done[i]) req[i] = 0;
    end
    for (int s = 0; s < 3; s++) begin
      checks++;
      if (seen[s] == 0) begin failures++; $display("FAIL state %0d never seen", s); end
    end
    $display("states seen: safe=%0d warning=%0d emergency=%0d", seen[0], seen[1], seen[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
