// Self-checking testbench of slack_min_select.
// Random candidate masks and signed slacks; the expected index (smallest
// slack, lowest index on ties) is found by a separate search and compared.
module tb_slack_min_select;
  localparam int N = 4;
  logic [N-1:0] cand;
  logic signed [N-1:0][9:0] slack;
  logic any;
  logic [1:0] min_id;
  logic signed [9:0] min_slack;
  int checks = 0, failures = 0;

  slack_min_select #(.N_MASTERS(N), .SLACK_WIDTH(10)) dut (.*);

  initial begin
    for (int t = 0; t < 5000; t++) begin
      int best_i, best_s;
      cand = 4'($urandom);
      for (int i = 0; i < N; i++)
        slack[i] = (t % 3 == 0) ? 10'($signed($urandom % 7) - 3) : 10'($urandom);
      #1;
      best_i = -1; best_s = 0;
      for (int i = N - 1; i >= 0; i--)
        if (cand[i] && (best_i < 0 || int'($signed(slack[i])) <= best_s)) begin
          best_i = i; best_s = int'($signed(slack[i]));
        end
      checks++;
      if (any != (best_i >= 0) ||
          (best_i >= 0 && (int'(min_id) != best_i || int'(min_slack) != best_s))) begin
        failures++;
        $display("FAIL cand=%b any=%0b id=%0d/%0d slack=%0d/%0d", cand, any, min_id, best_i,
                 min_slack, best_s);
      end
    end
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
