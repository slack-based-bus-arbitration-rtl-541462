// Self-checking testbench of slack_counter.
// Random requests, completions and constraint writes are applied; an integer
// model computes the expected valid bit and slack (L - B - S on a new request,
// minus one per cycle, saturating at -512, cleared after completion) and the
// outputs are compared every cycle. A directed part checks the exact load
// value and the countdown for the 30-cycle / 16-beat case, and the load value
// of two variants: two cycles per beat, and the burst term left out.
module tb_slack_counter;
  import slack_arb_pkg::*;

  localparam int S = 8;

  logic clk = 0, rst_n = 0;
  logic lc_we, req, done, valid;
  logic [8:0] lc_wdata, lc_q;
  logic [4:0] burst_len;
  logic signed [9:0] slack;

  int checks = 0, failures = 0;

  slack_counter #(.SLAVE_LAT(S), .LAT_INIT(9'd30)) dut (.*);

  // variants of the slack equation: two cycles per beat, and no burst term
  logic v2_valid, v0_valid;
  logic signed [9:0] v2_slack, v0_slack;
  logic [8:0] v2_lc, v0_lc;
  slack_counter #(.SLAVE_LAT(S), .LAT_INIT(9'd100), .BEAT_CYCLES(2)) dut_t2 (
    .clk, .rst_n, .lc_we(1'b0), .lc_wdata(9'd0), .lc_q(v2_lc), .req, .burst_len, .done,
    .valid(v2_valid), .slack(v2_slack));
  slack_counter #(.SLAVE_LAT(S), .LAT_INIT(9'd30), .COUNT_BURST(1'b0)) dut_nb (
    .clk, .rst_n, .lc_we(1'b0), .lc_wdata(9'd0), .lc_q(v0_lc), .req, .burst_len, .done,
    .valid(v0_valid), .slack(v0_slack));

  always #5 clk = ~clk;

  // reference model
  int m_lat, m_slack;
  bit m_valid;

  task automatic check(string what);
    checks++;
    if (valid !== m_valid || (m_valid && slack != m_slack) || lc_q != m_lat) begin
      failures++;
      $display("FAIL %s t=%0t valid=%0b/%0b slack=%0d/%0d lat=%0d/%0d", what, $time,
               valid, m_valid, slack, m_slack, lc_q, m_lat);
    end
  endtask

  task automatic step();
    // model update for this edge
    int nl = m_lat;
    if (lc_we) nl = lc_wdata;
    if (m_valid && done) begin
      m_valid = 0; m_slack = 0;
    end else if (req && !m_valid) begin
      m_valid = 1; m_slack = m_lat - burst_len - S;
      if (m_slack < -512) m_slack = -512;
    end else if (m_valid) begin
      m_slack = m_slack - 1;
      if (m_slack < -512) m_slack = -512;
    end
    m_lat = nl;
    @(posedge clk); #1;
  endtask

  initial begin
    lc_we = 0; req = 0; done = 0; lc_wdata = 0; burst_len = 0;
    m_lat = 30; m_slack = 0; m_valid = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check("reset");
    // directed: 16-beat request against 30 cycles -> slack 6
    req = 1; burst_len = 16;
    step(); check("load");
    if (slack != 6) begin failures++; $display("FAIL load value %0d", slack); end
    checks++;
    // 100 - 16*2 - 8 = 60 and 30 - 8 = 22
    if (!v2_valid || v2_slack != 60) begin failures++; $display("FAIL T=2 load %0d", v2_slack); end
    checks++;
    if (!v0_valid || v0_slack != 22) begin failures++; $display("FAIL no-burst load %0d", v0_slack); end
    checks++;
    repeat (10) begin step(); check("count"); end
    if (slack != -4) begin failures++; $display("FAIL countdown %0d", slack); end
    checks++;
    done = 1; step(); check("done"); done = 0; req = 0;
    step(); check("idle");
    // change constraint to 51 and load an 8-beat request -> 35
    lc_we = 1; lc_wdata = 51; step(); lc_we = 0; check("write");
    req = 1; burst_len = 8; step(); check("load51");
    if (slack != 35) begin failures++; $display("FAIL load51 %0d", slack); end
    checks++;
    done = 1; step(); done = 0; req = 0; check("done2");
    // saturation: constraint 0, long wait
    lc_we = 1; lc_wdata = 0; step(); lc_we = 0;
    req = 1; burst_len = 31;
    repeat (600) begin step(); check("sat"); end
    if (slack != -512) begin failures++; $display("FAIL saturation %0d", slack); end
    checks++;
    done = 1; step(); done = 0; req = 0; check("done3");
    // random
    repeat (3000) begin
      req       = ($urandom % 4) != 0 ? (m_valid ? 1'b1 : ($urandom % 3 == 0)) : 1'b0;
      if (m_valid) req = 1;
      done      = m_valid && ($urandom % 20 == 0);
      burst_len = 5'($urandom);
      lc_we     = ($urandom % 50 == 0);
      lc_wdata  = 9'($urandom % 300);
      step(); check("rand");
      if (done) begin done = 0; req = 0; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
