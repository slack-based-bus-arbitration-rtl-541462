// Self-checking testbench of sched_cfg_slave.
// AHB-lite style write and read transfers (address phase, then data phase)
// are issued, back to back and with idle cycles. Writes must raise exactly
// the addressed strobe in the data phase with HWDATA; reads must return the
// registers fed back on the *_q inputs; the mode register must reset to 11
// and follow writes. Idle transfers and unselected accesses must do nothing.
module tb_sched_cfg_slave;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic hsel, hwrite, hready, hreadyout, hresp, tw_we, te_we, sched_en, emerg_en;
  logic [7:0] haddr;
  logic [1:0] htrans;
  logic [31:0] hwdata, hrdata, wdata;
  logic [N-1:0] lc_we;
  logic [N-1:0][8:0] lc_q;
  logic signed [9:0] tw_q, te_q;
  int checks = 0, failures = 0;

  sched_cfg_slave #(.N_MASTERS(N)) dut (.hclk(clk), .hresetn(rst_n), .*);
  always #5 clk = ~clk;

  function automatic logic [N+1:0] expect_strobe(logic [7:0] a);
    if (a == 8'h20) return (N+2)'(1) << N;
    if (a == 8'h24) return (N+2)'(1) << (N + 1);
    if (a < 8'(4 * N) && a[1:0] == 0) return (N+2)'(1) << (a >> 2);
    return '0;
  endfunction

  // one write: address phase then data phase, optional idle afterwards
  task automatic ahb_write(logic [7:0] a, logic [31:0] d, bit sel = 1);
    @(negedge clk); hsel = sel; haddr = a; htrans = 2'b10; hwrite = 1;
    @(negedge clk); hsel = 0; htrans = 2'b00; hwdata = d; hwrite = 0;
    #1;
    checks++;
    if ({te_we, tw_we, lc_we} != (sel ? expect_strobe(a) : '0) || (sel && wdata != d)) begin
      failures++; $display("FAIL write %h strobes=%b", a, {te_we, tw_we, lc_we});
    end
  endtask

  task automatic ahb_read(logic [7:0] a, logic [31:0] exp);
    @(negedge clk); hsel = 1; haddr = a; htrans = 2'b10; hwrite = 0;
    @(negedge clk); hsel = 0; htrans = 2'b00;
    #1;
    checks++;
    if (hrdata != exp || {te_we, tw_we, lc_we} != '0) begin
      failures++; $display("FAIL read %h got %h exp %h", a, hrdata, exp);
    end
  endtask

  initial begin
    hsel = 0; hwrite = 0; hready = 1; haddr = 0; htrans = 0; hwdata = 0;
    lc_q = {9'd72, 9'd30, 9'd72, 9'd30}; tw_q = 21; te_q = 1;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    checks++;
    if (!sched_en || !emerg_en || !hreadyout || hresp) begin failures++; $display("FAIL reset mode"); end
    for (int i = 0; i < N; i++) ahb_write(8'(4 * i), 32'(40 + i));
    ahb_write(8'h20, 32'd33);
    ahb_write(8'h24, 32'hFFFF_FFFE);
    ahb_write(8'h04, 32'd99, 0);   // not selected
    for (int i = 0; i < N; i++) ahb_read(8'(4 * i), 32'(lc_q[i]));
    ahb_read(8'h20, 32'd21);
    tw_q = -3; ahb_read(8'h20, 32'hFFFF_FFFD);
    ahb_read(8'h24, 32'd1);
    ahb_read(8'h28, 32'd3);
    ahb_write(8'h28, 32'd1);
    checks++;
    @(negedge clk);
    if (!sched_en || emerg_en) begin failures++; $display("FAIL mode write"); end
    ahb_read(8'h28, 32'd1);
    ahb_write(8'h28, 32'd0);
    @(negedge clk);
    checks++;
    if (sched_en || emerg_en) begin failures++; $display("FAIL mode write 0"); end
    // back-to-back writes: second address phase overlaps first data phase
    @(negedge clk); hsel = 1; haddr = 8'h00; htrans = 2'b10; hwrite = 1;
    @(negedge clk); haddr = 8'h0C; hwdata = 32'd55;
    #1 checks++;
    if (lc_we != 4'b0001 || wdata != 55) begin failures++; $display("FAIL b2b first"); end
    @(negedge clk); hsel = 0; htrans = 0; hwdata = 32'd66;
    #1 checks++;
    if (lc_we != 4'b1000 || wdata != 66) begin failures++; $display("FAIL b2b second"); end
    // wait state from another slave: address phase held off while hready low
    @(negedge clk); hready = 0; hsel = 1; haddr = 8'h20; htrans = 2'b10; hwrite = 1;
    @(negedge clk); hsel = 0; htrans = 0; hready = 1;
    #1 checks++;
    if (tw_we) begin failures++; $display("FAIL write accepted while hready low"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
