// rl_pst_logic: built-in automatic periodic surveillance test logic for the
// rate-limited variable-setpoint (high-trip) bistable.
//
// A seven-state machine (WAIT, LATCH_DATA, APPLY_TEST, CAPTURE_OUT, PASS,
// FAIL, SEND) runs one test each test period:
//   WAIT        idle until the cycle counter reaches TEST_PERIOD (the counter
//               restarts when a test starts, so tests start TEST_PERIOD
//               cycles apart). After a stimulus has been applied the machine
//               comes back here and waits RESP_CAPTURE_CYCLES cycles for the
//               response.
//   LATCH_DATA  latch the bistable's current setpoint and process variable.
//   APPLY_TEST  form X_test = X_PV + M_trip * K_exc with M_trip = SP - X_PV
//               (Eq. 1 of the method, an abnormal trip condition) and send it
//               as a tagged stimulus, "test input valid = 1", for one cycle.
//   CAPTURE_OUT compare the captured tagged output with the expected decision
//               (trip) and go to PASS or FAIL.
//   PASS / FAIL set the result.
//   SEND        hold the result for REQUIRED_HOLD cycles, then transmit it to
//               the Maintenance and Test Panel (report_o.valid for one
//               cycle) and return to WAIT.
// The states, the order of transitions, the stimulus formula, the response
// wait count and the hold rule are the source's. This design's own choices:
// a tagged output is captured only if it carries TEST_ID and arrives after
// the stimulus of the current test (a stale or missing response therefore
// fails the test), a negative trip margin is taken as zero, X_test saturates
// at full scale, the counter widths, and all default values.
//
// Interface: sp_i/pv_i are read back from the bistable; test_in_o goes to
// the bistable, test_out_i comes from it. report_o carries the result;
// result_o/result_hold_o show the result while it is held in SEND. The
// identifier fields of test_in_o and report_o are the constant TEST_ID,
// since this logic tests a single function.
module rl_pst_logic
  import pst_pkg::*;
#(
  parameter int unsigned TEST_PERIOD         = 10_000_000,  // cycles between test starts
  parameter int unsigned RESP_CAPTURE_CYCLES = 8,           // wait for the response
  parameter int unsigned REQUIRED_HOLD       = 1000,        // result hold before sending
  parameter kexc_t       KEXC                = kexc_t'(384),// K_exc = 1.5 (8 fraction bits)
  parameter test_id_t    TEST_ID             = '0           // identifier of the tested PV
) (
  input  logic        clk,
  input  logic        rst_n,
  input  pv_t         sp_i,          // current setpoint of the bistable
  input  pv_t         pv_i,          // current process variable of the bistable
  output test_in_t    test_in_o,     // tagged stimulus
  input  test_out_t   test_out_i,    // tagged output of the bistable
  output mtp_report_t report_o,      // result transmitted to the MTP
  output logic        result_o,      // 1 = PASS while held
  output logic        result_hold_o, // result being held (SEND)
  output rl_state_t   state_o
);

  localparam logic EXPECTED_OUTPUT = 1'b1;  // an abnormal condition must trip

  rl_state_t   state;
  logic [31:0] timer;     // cycles since the last test start
  logic [31:0] wait_cnt;  // cycles spent waiting for the response
  logic [31:0] hold_cnt;  // cycles the result has been held
  logic        pending;   // stimulus applied, response not yet captured
  pv_t         sp_l, pv_l;
  logic        resp_valid, resp_trip;
  logic        result;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= RL_WAIT;
      timer      <= '0;
      wait_cnt   <= '0;
      hold_cnt   <= '0;
      pending    <= 1'b0;
      sp_l       <= '0;
      pv_l       <= '0;
      resp_valid <= 1'b0;
      resp_trip  <= 1'b0;
      result     <= 1'b0;
      test_in_o  <= '{valid: 1'b0, id: TEST_ID, value: '0};
      report_o   <= '{valid: 1'b0, id: TEST_ID, pass: 1'b0};
    end else begin
      test_in_o.valid <= 1'b0;
      report_o.valid  <= 1'b0;
      if (timer != '1) timer <= timer + 1'b1;

      // Response monitor: the tagged output of this test, first one only
      if (pending && !resp_valid && test_out_i.valid && (test_out_i.id == TEST_ID)) begin
        resp_valid <= 1'b1;
        resp_trip  <= test_out_i.trip;
      end

      unique case (state)
        RL_WAIT: begin
          if (!pending) begin
            if (timer >= TEST_PERIOD) begin
              timer <= 32'd1;  // the start cycle is the first of the next period
              state <= RL_LATCH_DATA;
            end
          end else if (wait_cnt >= RESP_CAPTURE_CYCLES) begin
            state <= RL_CAPTURE_OUT;
          end else begin
            wait_cnt <= wait_cnt + 1'b1;
          end
        end
        RL_LATCH_DATA: begin
          sp_l  <= sp_i;
          pv_l  <= pv_i;
          state <= RL_APPLY_TEST;
        end
        RL_APPLY_TEST: begin
          test_in_o  <= '{valid: 1'b1, id: TEST_ID, value: stim_high(pv_l, sp_l, KEXC)};
          pending    <= 1'b1;
          resp_valid <= 1'b0;
          wait_cnt   <= '0;
          state      <= RL_WAIT;
        end
        RL_CAPTURE_OUT: begin
          pending <= 1'b0;
          state   <= (resp_valid && (resp_trip == EXPECTED_OUTPUT)) ? RL_PASS : RL_FAIL;
        end
        RL_PASS: begin
          result   <= 1'b1;
          hold_cnt <= '0;
          state    <= RL_SEND;
        end
        RL_FAIL: begin
          result   <= 1'b0;
          hold_cnt <= '0;
          state    <= RL_SEND;
        end
        RL_SEND: begin
          if (hold_cnt >= REQUIRED_HOLD) begin
            report_o <= '{valid: 1'b1, id: TEST_ID, pass: result};
            state    <= RL_WAIT;
          end else begin
            hold_cnt <= hold_cnt + 1'b1;
          end
        end
        default: state <= RL_WAIT;
      endcase
    end
  end

  assign result_o      = result;
  assign result_hold_o = (state == RL_SEND);
  assign state_o       = state;

endmodule
