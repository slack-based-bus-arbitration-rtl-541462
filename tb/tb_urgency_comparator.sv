// Self-checking testbench of urgency_comparator.
// Checks the reset thresholds, the three-level classification around both
// thresholds (slack <= T(E) emergency, <= T(W) warning, else safe), the
// "nothing pending" case and reprogramming of both thresholds.
module tb_urgency_comparator;
  import slack_arb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic tw_we, te_we, any;
  logic signed [9:0] wdata, tw_q, te_q, min_slack;
  urgency_e state;
  int checks = 0, failures = 0;

  urgency_comparator dut (.*);
  always #5 clk = ~clk;

  function automatic urgency_e expect_state(int s, int tw, int te, bit a);
    if (!a) return URG_SAFE;
    if (s <= te) return URG_EMERGENCY;
    if (s <= tw) return URG_WARNING;
    return URG_SAFE;
  endfunction

  task automatic sweep(int tw, int te);
    for (int s = -40; s <= 60; s++) begin
      for (int a = 0; a < 2; a++) begin
        any = a[0]; min_slack = 10'(s); #1;
        checks++;
        if (state != expect_state(s, tw, te, a[0])) begin
          failures++;
          $display("FAIL tw=%0d te=%0d slack=%0d any=%0d state=%0d", tw, te, s, a, state);
        end
      end
    end
  endtask

  initial begin
    tw_we = 0; te_we = 0; wdata = 0; any = 0; min_slack = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    checks++;
    if (tw_q != 21 || te_q != 1) begin failures++; $display("FAIL reset thresholds"); end
    sweep(21, 1);
    @(negedge clk) begin tw_we = 1; wdata = 35; end
    @(negedge clk) begin tw_we = 0; te_we = 1; wdata = -5; end
    @(negedge clk) te_we = 0;
    checks++;
    if (tw_q != 35 || te_q != -5) begin failures++; $display("FAIL write thresholds"); end
    sweep(35, -5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
