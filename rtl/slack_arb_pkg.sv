// Shared types and constants of the slack-based latency-aware bus arbiter.
//
// The scheduler reports the urgency of its most critical pending request as a
// two-bit "State": 00 safe, 01 warning, 10 emergency. That encoding follows the
// published scheme; 11 is left free, as suggested there, for a further level.
// Widths: latency constraints are a few hundred cycles at most, so a 9-bit
// constraint register is enough; the slack is a signed 10-bit value so that a
// request that has already overrun its constraint keeps a meaningful
// (negative) slack. These widths are this design's choice.
package slack_arb_pkg;

  typedef enum logic [1:0] {
    URG_SAFE      = 2'b00,
    URG_WARNING   = 2'b01,
    URG_EMERGENCY = 2'b10
  } urgency_e;

  // Base (bandwidth-conscious) arbitration policies
  typedef enum logic {
    POLICY_ROUND_ROBIN    = 1'b0,
    POLICY_FIXED_PRIORITY = 1'b1
  } policy_e;

  // Default widths
  localparam int unsigned LAT_W   = 9;   // latency constraint register width
  localparam int unsigned SLACK_W = 10;  // signed slack width (valid bit comes on top)
  localparam int unsigned BURST_W = 5;   // burst length in beats, 1..31

  // Register map of the configuration slave (byte addresses, 32-bit words)
  //   0x00 + 4*i : latency constraint of master i (i < 8)
  //   0x20       : warning threshold T(W)  (signed)
  //   0x24       : emergency threshold T(E) (signed)
  //   0x28       : mode: bit0 scheduler enable, bit1 emergency (preemption) enable
  localparam logic [7:0] ADDR_TW   = 8'h20;
  localparam logic [7:0] ADDR_TE   = 8'h24;
  localparam logic [7:0] ADDR_MODE = 8'h28;

endpackage
