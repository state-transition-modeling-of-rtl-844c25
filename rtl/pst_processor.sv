// pst_processor: the logic processor of one protection channel with built-in
// automatic periodic surveillance testing of its variable-setpoint bistables.
//
// Two protection functions sit side by side, each with its own test logic:
//   - a rate-limited variable-setpoint high-trip bistable (rl_vsp_bistable,
//     e.g. variable overpower) tested by rl_pst_logic;
//   - N_PV manual-reset variable-setpoint low-trip bistables
//     (mr_protection_logic, e.g. low pressurizer pressure and low steam
//     generator pressure) tested one after the other by mr_pst_logic.
// Each test logic periodically reads back setpoint and process variable,
// injects a tagged stimulus that should trip the bistable, captures the
// tagged output, decides PASS or FAIL and reports it to the Maintenance and
// Test Panel. Tagged outputs never reach the trip outputs, which go to the
// coincidence logic of a downstream processor; that processor and the panel
// are outside this design, so their signals are ports here. The partition
// (protection logic, test logic, panel, coincidence logic) follows the
// source's concept; the port list, widths and defaults are this design's.
//
// Timing: trip outputs are registered, one cycle after the process variable
// register; during the one cycle a bistable evaluates a stimulus, its trip
// output holds its previous value.
module pst_processor
  import pst_pkg::*;
#(
  parameter int unsigned N_PV          = 3,             // manual-reset process variables
  parameter int unsigned TEST_PERIOD   = 10_000_000,    // cycles between test starts
  parameter int unsigned REQUIRED_HOLD = 1000,          // result hold before sending
  parameter int unsigned RESP_CAPTURE_CYCLES = 8,       // rate-limited test response wait
  parameter int unsigned RESP_TIMEOUT  = 1024,          // manual-reset test response time-out
  parameter kexc_t       KEXC          = kexc_t'(384),  // exceedance factor 1.5
  parameter pv_t         RL_MARGIN     = pv_t'(1000),   // rate-limited trip margin
  parameter pv_t         RL_RATE       = pv_t'(10),     // setpoint rise per update strobe
  parameter pv_t         MR_MARGIN     = pv_t'(2000),   // manual-reset margin
  parameter pv_t         MR_STEP       = pv_t'(1000)    // setpoint step per manual reset
) (
  input  logic        clk,
  input  logic        rst_n,
  // rate-limited variable setpoint function
  input  pv_t         rl_pv_i,
  input  logic        rl_tick_i,
  output logic        rl_trip_o,          // to coincidence logic
  output pv_t         rl_sp_o,
  // manual-reset variable setpoint functions
  input  pv_t         mr_pv_i       [N_PV],
  input  logic        mr_tick_i,
  input  logic        mr_reset_pb_i [N_PV],
  output logic        mr_trip_o     [N_PV],  // to coincidence logic
  output pv_t         mr_sp_o       [N_PV],
  // test results to the Maintenance and Test Panel
  output mtp_report_t rl_report_o,
  output mtp_report_t mr_report_o,
  output logic        rl_result_o,        // held result, 1 = PASS
  output logic        rl_result_hold_o,   // rate-limited test result being held
  output logic        mr_result_o,
  output logic        mr_result_hold_o,
  output test_id_t    mr_cur_idx_o,       // PV under test
  output rl_state_t   rl_state_o,
  output mr_state_t   mr_state_o
);

  // ---------------- rate-limited setpoint function and its test -----------
  pv_t       rl_pv_rb;
  test_in_t  rl_test_in;
  test_out_t rl_test_out;

  rl_vsp_bistable #(
    .MARGIN (RL_MARGIN),
    .RATE   (RL_RATE),
    .TEST_ID('0)
  ) u_rl_bs (
    .clk       (clk),
    .rst_n     (rst_n),
    .pv_i      (rl_pv_i),
    .pv_tick_i (rl_tick_i),
    .test_in_i (rl_test_in),
    .trip_o    (rl_trip_o),
    .sp_o      (rl_sp_o),
    .pv_o      (rl_pv_rb),
    .test_out_o(rl_test_out)
  );

  rl_pst_logic #(
    .TEST_PERIOD        (TEST_PERIOD),
    .RESP_CAPTURE_CYCLES(RESP_CAPTURE_CYCLES),
    .REQUIRED_HOLD      (REQUIRED_HOLD),
    .KEXC               (KEXC),
    .TEST_ID            ('0)
  ) u_rl_test (
    .clk          (clk),
    .rst_n        (rst_n),
    .sp_i         (rl_sp_o),
    .pv_i         (rl_pv_rb),
    .test_in_o    (rl_test_in),
    .test_out_i   (rl_test_out),
    .report_o     (rl_report_o),
    .result_o     (rl_result_o),
    .result_hold_o(rl_result_hold_o),
    .state_o      (rl_state_o)
  );

  // ---------------- manual-reset setpoint functions and their test --------
  pv_t       mr_pv_rb [N_PV];
  test_in_t  mr_test_in;
  test_out_t mr_test_out;

  mr_protection_logic #(
    .N_PV  (N_PV),
    .MARGIN(MR_MARGIN),
    .STEP  (MR_STEP)
  ) u_mr_bs (
    .clk       (clk),
    .rst_n     (rst_n),
    .pv_i      (mr_pv_i),
    .pv_tick_i (mr_tick_i),
    .reset_pb_i(mr_reset_pb_i),
    .test_in_i (mr_test_in),
    .trip_o    (mr_trip_o),
    .sp_o      (mr_sp_o),
    .pv_o      (mr_pv_rb),
    .test_out_o(mr_test_out)
  );

  mr_pst_logic #(
    .N_PV         (N_PV),
    .TEST_PERIOD  (TEST_PERIOD),
    .REQUIRED_HOLD(REQUIRED_HOLD),
    .RESP_TIMEOUT (RESP_TIMEOUT),
    .KEXC         (KEXC)
  ) u_mr_test (
    .clk          (clk),
    .rst_n        (rst_n),
    .sp_i         (mr_sp_o),
    .pv_i         (mr_pv_rb),
    .test_in_o    (mr_test_in),
    .test_out_i   (mr_test_out),
    .report_o     (mr_report_o),
    .result_o     (mr_result_o),
    .result_hold_o(mr_result_hold_o),
    .cur_idx_o    (mr_cur_idx_o),
    .state_o      (mr_state_o)
  );

endmodule
