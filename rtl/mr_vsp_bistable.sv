// mr_vsp_bistable: low-trip bistable with a manual-reset variable setpoint
// (the kind of logic used for low pressurizer pressure and low steam
// generator pressure trips).
//
// Each operator reset (a one-cycle pulse on reset_pb_i) lowers the setpoint
// by STEP, so that the plant can be cooled down without a trip. When the
// process variable rises, the setpoint follows it up to keep MARGIN below it:
// on each update strobe (pv_tick_i) SP becomes max(SP, PV - MARGIN). It never
// follows a falling process variable. The bistable trips when PV <= SP. The
// reset step and the rising tracking are the source's; tracking by
// max(SP, PV - MARGIN), the saturation at zero, the reset value 0 of the
// setpoint and the priority of a reset pulse over a tracking strobe in the
// same cycle are this design's choices.
// In the first cycle after reset, before a process-variable sample has
// been registered, update strobes are ignored and the trip output stays
// clear (also this design's choice).
//
// Built-in test: as in rl_vsp_bistable, a tagged stimulus addressed to
// TEST_ID takes the single comparator for one cycle; its decision goes only
// to test_out_o with the stimulus identifier, trip_o holds its value, and the
// setpoint is not touched.
//
// Timing: pv_i registered (pv_o); trip_o and test_out_o one cycle after their
// inputs.
module mr_vsp_bistable
  import pst_pkg::*;
#(
  parameter pv_t      MARGIN  = pv_t'(2000),  // margin of the setpoint below a rising PV
  parameter pv_t      STEP    = pv_t'(1000),  // setpoint decrease per manual reset
  parameter test_id_t TEST_ID = '0            // identifier this bistable answers to
) (
  input  logic      clk,
  input  logic      rst_n,
  input  pv_t       pv_i,         // process variable
  input  logic      pv_tick_i,    // setpoint update strobe
  input  logic      reset_pb_i,   // manual setpoint reset, one-cycle pulse
  input  test_in_t  test_in_i,    // tagged stimulus from the test logic
  output logic      trip_o,       // channel trip, to coincidence logic
  output pv_t       sp_o,         // current variable setpoint
  output pv_t       pv_o,         // registered process variable
  output test_out_t test_out_o    // tagged output, to the test logic only
);

  pv_t  pv_q, sp_q;
  logic pv_ok;   // pv_q holds a sample (clear in the first cycle after reset)
  pv_t  follow, stepped;
  logic test_sel;
  pv_t  cmp_x;
  logic cmp_trip;

  always_comb begin
    follow   = (pv_q > MARGIN) ? pv_q - MARGIN : '0;
    stepped  = (sp_q > STEP) ? sp_q - STEP : '0;
    test_sel = test_in_i.valid && (test_in_i.id == TEST_ID);
    cmp_x    = test_sel ? test_in_i.value : pv_q;
    cmp_trip = (cmp_x <= sp_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pv_q       <= '0;
      pv_ok      <= 1'b0;
      sp_q       <= '0;
      trip_o     <= 1'b0;
      test_out_o <= '{valid: 1'b0, id: '1, trip: 1'b0};
    end else begin
      pv_q  <= pv_i;
      pv_ok <= 1'b1;
      if (reset_pb_i)
        sp_q <= stepped;
      else if (pv_tick_i && pv_ok && (follow > sp_q))
        sp_q <= follow;
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
