// rl_vsp_bistable: high-trip bistable with a rate-limited variable setpoint
// (the kind of logic used for a variable overpower trip).
//
// The setpoint tracks the process variable at a fixed trip margin above it.
// On every setpoint-update strobe (pv_tick_i) it moves toward PV + MARGIN:
// upward by at most RATE per strobe, downward at once. A process variable that
// rises faster than RATE per strobe therefore closes on the setpoint and
// trips the bistable (PV >= SP). That tracking behaviour is the source's; the
// one-sided rate limit, the saturation at the word range and the reset value
// of the setpoint (full scale, so no trip before the first strobe) are this
// design's choices.
// In the first cycle after reset, before a process-variable sample has
// been registered, update strobes are ignored and the trip output stays
// clear (also this design's choice).
//
// Built-in test: one comparator serves both paths. In a cycle where a tagged
// stimulus addressed to TEST_ID arrives (test_in_i.valid), the comparator
// evaluates X_test against the current setpoint instead of the process
// variable; its decision goes only to test_out_o, tagged with the stimulus
// identifier, and the protection trip output trip_o keeps its previous value
// for that one cycle. A stimulus never moves the setpoint. This keeps a test
// trip off the path to coincidence logic.
//
// Timing: pv_i is registered (pv_o); trip_o and test_out_o are registered,
// so a stimulus presented in cycle n gives test_out_o.valid in cycle n+1.
// sp_o and pv_o are read back by the test logic.
module rl_vsp_bistable
  import pst_pkg::*;
#(
  parameter pv_t      MARGIN  = pv_t'(1000),  // trip margin above the process variable
  parameter pv_t      RATE    = pv_t'(10),    // largest setpoint rise per update strobe
  parameter test_id_t TEST_ID = '0            // identifier this bistable answers to
) (
  input  logic      clk,
  input  logic      rst_n,
  input  pv_t       pv_i,        // process variable
  input  logic      pv_tick_i,   // setpoint update strobe
  input  test_in_t  test_in_i,   // tagged stimulus from the test logic
  output logic      trip_o,      // channel trip, to coincidence logic
  output pv_t       sp_o,        // current variable setpoint
  output pv_t       pv_o,        // registered process variable
  output test_out_t test_out_o   // tagged output, to the test logic only
);

  pv_t  pv_q, sp_q;
  logic pv_ok;   // pv_q holds a sample (clear in the first cycle after reset)
  logic test_sel;
  pv_t  cmp_x;
  logic cmp_trip;

  // Setpoint target PV + MARGIN and rate-limited rise, both saturating
  logic [PV_W:0] target_w, rise_w;
  pv_t           target, rise;

  always_comb begin
    target_w = {1'b0, pv_q} + {1'b0, MARGIN};
    target   = target_w[PV_W] ? {PV_W{1'b1}} : target_w[PV_W-1:0];
    rise_w   = {1'b0, sp_q} + {1'b0, RATE};
    rise     = rise_w[PV_W] ? {PV_W{1'b1}} : rise_w[PV_W-1:0];
  end

  // Shared comparator: the test stimulus takes the cycle it arrives in
  always_comb begin
    test_sel = test_in_i.valid && (test_in_i.id == TEST_ID);
    cmp_x    = test_sel ? test_in_i.value : pv_q;
    cmp_trip = (cmp_x >= sp_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pv_q       <= '0;
      pv_ok      <= 1'b0;
      sp_q       <= '1;
      trip_o     <= 1'b0;
      test_out_o <= '{valid: 1'b0, id: '1, trip: 1'b0};
    end else begin
      pv_q  <= pv_i;
      pv_ok <= 1'b1;
      if (pv_tick_i && pv_ok)
        sp_q <= (target > sp_q) ? ((target < rise) ? target : rise) : target;
      if (!test_sel && pv_ok)
        trip_o <= cmp_trip;
      test_out_o.valid <= test_sel;
      if (test_sel) begin
        test_out_o.id   <= test_in_i.id;
        test_out_o.trip <= cmp_trip;
      end
    end
  end

  assign sp_o = sp_q;
  assign pv_o = pv_q;

endmodule
