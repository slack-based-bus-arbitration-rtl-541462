// Self-checking testbench of latency_aware_arbiter.
// The scheduler's advice (State, Next grant) and the transfer completions are
// driven at random; Next grant always names a waiting master. A reference
// model written from the rules (safe: round robin when the bus is free;
// warning: scheduler's master when the bus is free; emergency: preempt an
// unlocked owner at once, lock the new transfer) predicts owner, grant,
// lock and retry, which are compared every cycle. Each mechanism (round-robin
// grant, warning grant, emergency grant on a free bus, preemption with retry,
// emergency held off by a lock) must occur at least once.
module tb_latency_aware_arbiter;
  import slack_arb_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, grant, retry, done;
  logic xfer_done, owner_valid, locked;
  logic [1:0] next_grant, owner;
  urgency_e state;
  logic ev_warn_grant, ev_emerg_grant, ev_preempt, ev_lock_hold;
  int checks = 0, failures = 0;
  int n_rr = 0, n_warn = 0, n_emerg_free = 0, n_preempt = 0, n_hold = 0;

  latency_aware_arbiter #(.N_MASTERS(N)) dut (.*);
  always #5 clk = ~clk;

  // model state
  bit m_ov, m_lock;
  int m_own, m_last;
  bit [N-1:0] m_retry;

  task automatic model_edge();
    bit free;
    free = !m_ov || xfer_done;
    m_retry = 0;
    if (free) begin
      if (state != URG_SAFE) begin
        m_ov = 1; m_own = next_grant; m_lock = (state == URG_EMERGENCY); m_last = m_own;
        if (state == URG_WARNING) n_warn++; else n_emerg_free++;
      end else begin
        int c;
        c = -1;
        for (int k = 1; k <= N; k++) begin
          int j;
          j = (m_last + k) % N;
          if (c < 0 && req[j] && !(m_ov && j == m_own)) c = j;
        end
        if (c >= 0) begin m_ov = 1; m_own = c; m_lock = 0; m_last = c; n_rr++; end
        else begin m_ov = 0; m_lock = 0; end
      end
    end else if (state == URG_EMERGENCY) begin
      if (!m_lock) begin
        m_retry[m_own] = 1; m_own = next_grant; m_lock = 1; m_last = m_own; n_preempt++;
      end else n_hold++;
    end
  endtask

  task automatic compare();
    logic [N-1:0] eg;
    eg = m_ov ? (N'(1) << m_own) : '0;
    checks++;
    if (grant != eg || owner_valid != m_ov || (m_ov && (int'(owner) != m_own || locked != m_lock)) ||
        retry != m_retry) begin
      failures++;
      $display("FAIL t=%0t grant=%b/%b lock=%0b/%0b retry=%b/%b", $time, grant, eg, locked, m_lock,
               retry, m_retry);
    end
  endtask

  initial begin
    req = 0; xfer_done = 0; next_grant = 0; state = URG_SAFE;
    m_ov = 0; m_lock = 0; m_own = 0; m_last = N - 1; m_retry = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      int w[$];
      int r;
      for (int i = 0; i < N; i++) if (!req[i] && $urandom % 5 == 0) req[i] = 1;
      xfer_done = owner_valid && ($urandom % 6 == 0);
      w.delete();
      for (int i = 0; i < N; i++) if (req[i] && !(m_ov && i == m_own)) w.push_back(i);
      r = $urandom % 10;
      if (w.size() == 0 || r < 5) state = URG_SAFE;
      else if (r < 8) state = URG_WARNING;
      else state = URG_EMERGENCY;
      next_grant = (w.size() > 0) ? 2'(w[$urandom % w.size()]) : 2'($urandom);
      #1;
      if ((ev_preempt != (state == URG_EMERGENCY && m_ov && !xfer_done && !m_lock))) begin
        failures++; $display("FAIL preempt strobe t=%0t", $time);
      end
      checks++;
      model_edge();
      @(posedge clk); #1;
      compare();
      // the finished master drops its request
      if (xfer_done) req[owner_q_prev()] = 0;
      xfer_done = 0;
    end
    checks += 5;
    if (n_rr == 0)        begin failures++; $display("FAIL no round-robin grant"); end
    if (n_warn == 0)      begin failures++; $display("FAIL no warning grant"); end
    if (n_emerg_free == 0) begin failures++; $display("FAIL no emergency grant"); end
    if (n_preempt == 0)   begin failures++; $display("FAIL no preemption"); end
    if (n_hold == 0)      begin failures++; $display("FAIL no lock hold"); end
    $display("rr=%0d warn=%0d emerg=%0d preempt=%0d hold=%0d", n_rr, n_warn, n_emerg_free,
             n_preempt, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // owner before the last edge, for dropping the completed request
  int prev_own;
  always @(posedge clk) prev_own <= int'(owner);
  function automatic int owner_q_prev();
    return prev_own;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
