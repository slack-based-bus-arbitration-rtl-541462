// Configuration slave of the scheduler.
//
// The scheduler is programmed like any other bus slave: a single write
// transfer changes a master's latency constraint, a threshold or the mode.
// This is an AHB-lite style slave: the address phase (HSEL, HTRANS non-idle,
// HREADY) is captured and the write strobe for the addressed register is
// issued in the following data phase together with HWDATA. Reads return the
// register selected in the address phase during the data phase. The slave
// never inserts wait states and always answers OKAY.
//
// Register map (byte address):
//   0x00 + 4*i : latency constraint of master i
//   0x20       : warning threshold T(W), signed
//   0x24       : emergency threshold T(E), signed
//   0x28       : mode, bit0 scheduler enable, bit1 emergency enable
// The mode register lives here; the constraint and threshold registers live
// in the slack counters and the urgency comparator and are read back through
// the *_q inputs. Programming through a normal write follows the published
// scheme; the protocol subset and the register map are this design's choice.
module sched_cfg_slave
  import slack_arb_pkg::*;
#(
  parameter int unsigned N_MASTERS   = 4,
  parameter int unsigned LAT_WIDTH   = LAT_W,
  parameter int unsigned SLACK_WIDTH = SLACK_W,
  parameter logic [1:0]  MODE_INIT   = 2'b11
) (
  input  logic                                 hclk,
  input  logic                                 hresetn,
  input  logic                                 hsel,
  input  logic [7:0]                           haddr,
  input  logic [1:0]                           htrans,
  input  logic                                 hwrite,
  input  logic [31:0]                          hwdata,
  input  logic                                 hready,
  output logic [31:0]                          hrdata,
  output logic                                 hreadyout,
  output logic                                 hresp,
  // register strobes
  output logic [N_MASTERS-1:0]                 lc_we,
  output logic                                 tw_we,
  output logic                                 te_we,
  output logic [31:0]                          wdata,
  // read back
  input  logic [N_MASTERS-1:0][LAT_WIDTH-1:0]  lc_q,
  input  logic signed [SLACK_WIDTH-1:0]        tw_q,
  input  logic signed [SLACK_WIDTH-1:0]        te_q,
  // mode
  output logic                                 sched_en,
  output logic                                 emerg_en
);

  logic       dp_v, dp_wr;
  logic [7:0] dp_addr;
  logic [1:0] mode_q;
  logic       mode_we;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      dp_v    <= 1'b0;
      dp_wr   <= 1'b0;
      dp_addr <= '0;
    end else if (hready) begin
      dp_v    <= hsel && htrans[1];
      dp_wr   <= hwrite;
      dp_addr <= haddr;
    end
  end

  always_comb begin
    lc_we   = '0;
    tw_we   = 1'b0;
    te_we   = 1'b0;
    mode_we = 1'b0;
    if (dp_v && dp_wr) begin
      for (int i = 0; i < N_MASTERS; i++)
        if (dp_addr == 8'(4 * i)) lc_we[i] = 1'b1;
      if (dp_addr == ADDR_TW)   tw_we   = 1'b1;
      if (dp_addr == ADDR_TE)   te_we   = 1'b1;
      if (dp_addr == ADDR_MODE) mode_we = 1'b1;
    end
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn)     mode_q <= MODE_INIT;
    else if (mode_we) mode_q <= hwdata[1:0];
  end

  always_comb begin
    hrdata = '0;
    if (dp_v && !dp_wr) begin
      for (int i = 0; i < N_MASTERS; i++)
        if (dp_addr == 8'(4 * i)) hrdata = 32'(lc_q[i]);
      if (dp_addr == ADDR_TW)   hrdata = 32'(tw_q);
      if (dp_addr == ADDR_TE)   hrdata = 32'(te_q);
      if (dp_addr == ADDR_MODE) hrdata = {30'd0, mode_q};
    end
  end

  assign wdata     = hwdata;
  assign hreadyout = 1'b1;
  assign hresp     = 1'b0;
  assign sched_en  = mode_q[0];
  assign emerg_en  = mode_q[1];

  if (N_MASTERS > 8) begin : g_bad_n
    $error("register map holds at most 8 latency constraints");
  end

endmodule
