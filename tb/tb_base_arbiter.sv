// Self-checking testbench of base_arbiter.
// Round robin: random request vectors; the expected choice is the first
// requester after the last granted master, found by an independent search,
// and the pointer is moved with every grant. A second instance checks the
// fixed-priority policy (lowest index wins). A fairness check confirms that
// with all masters requesting each one is chosen equally often.
module tb_base_arbiter;
  import slack_arb_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req;
  logic any, any_fp, update;
  logic [1:0] choice, choice_fp, granted_id;
  int checks = 0, failures = 0;
  int last = N - 1;
  int wins[N];

  base_arbiter #(.N_MASTERS(N)) dut (.clk, .rst_n, .req, .any, .choice, .update, .granted_id);
  base_arbiter #(.N_MASTERS(N), .POLICY(POLICY_FIXED_PRIORITY)) dut_fp (
    .clk, .rst_n, .req, .any(any_fp), .choice(choice_fp), .update, .granted_id);
  always #5 clk = ~clk;

  initial begin
    req = 0; update = 0; granted_id = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int exp_c, exp_fp;
      exp_c = -1; exp_fp = -1;
      req = (t < 400) ? 4'hF : 4'($urandom);
      #1;
      for (int k = 1; k <= N; k++) if (exp_c < 0 && req[(last + k) % N]) exp_c = (last + k) % N;
      for (int k = 0; k < N; k++) if (exp_fp < 0 && req[k]) exp_fp = k;
      checks++;
      if (any != (exp_c >= 0) || (exp_c >= 0 && int'(choice) != exp_c)) begin
        failures++; $display("FAIL rr req=%b last=%0d choice=%0d exp=%0d", req, last, choice, exp_c);
      end
      checks++;
      if (any_fp != (exp_fp >= 0) || (exp_fp >= 0 && int'(choice_fp) != exp_fp)) begin
        failures++; $display("FAIL fp req=%b choice=%0d exp=%0d", req, choice_fp, exp_fp);
      end
      // grant either the choice or, sometimes, another master (scheduler override)
      update = any && ($urandom % 4 != 0);
      granted_id = ($urandom % 5 == 0) ? 2'($urandom) : choice;
      if (t < 400) granted_id = choice;
      @(posedge clk); #1;
      if (update) begin
        last = granted_id;
        if (t < 400) wins[granted_id]++;
      end
      update = 0;
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (wins[i] < 70 || wins[i] > 80) begin failures++; $display("FAIL fairness %0d: %0d", i, wins[i]); end
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
