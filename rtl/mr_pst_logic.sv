// mr_pst_logic: built-in automatic periodic surveillance test logic for the
// manual-reset variable-setpoint (low-trip) bistables of one channel.
//
// An eight-state machine (WAIT, LATCH_DATA, SELECT_PV, APPLY_TEST,
// CAPTURE_OUT, PASS, FAIL, SEND) tests every process variable 0..N_PV-1 in
// turn once per test period:
//   WAIT        idle until the cycle counter reaches TEST_PERIOD (restarted at
//               each test start). After a stimulus it waits here until the
//               latest tagged output carries the selected PV's identifier and
//               differs from the previously captured identifier.
//   LATCH_DATA  latch the setpoints and process variables of all bistables in
//               one cycle ("all setpoints loaded") and select PV 0.
//   SELECT_PV   latch the setpoint SP_0 and value X_PV of the selected PV.
//   APPLY_TEST  form X_test = X_PV - (X_PV - SP_0) * K_exc (Eq. 2 of the
//               method) and send it, tagged with the PV index, for one cycle.
//   CAPTURE_OUT compare the captured output with the expected decision (trip).
//   PASS / FAIL set the result.
//   SEND        hold the result REQUIRED_HOLD cycles, transmit it with its PV
//               index (report_o.valid for one cycle), then go to SELECT_PV
//               with the next index while Current_PV_Index < Last_PV_Index,
//               or to WAIT when the last PV has been tested.
// These states, transitions and formulas are the source's. This design's own
// choices: the one-cycle parallel data latch, the saturation of X_test at
// zero and of a negative margin at zero, the counter widths, all default
// values, and RESP_TIMEOUT: if no matching output arrives within RESP_TIMEOUT
// cycles the machine goes on to CAPTURE_OUT and fails the test instead of
// waiting for ever. Because the freshness rule compares identifiers, it needs
// N_PV >= 2; with a single PV every test would end in the time-out.
//
// Interface: sp_i/pv_i read back from the bistables; test_in_o to them;
// test_out_i is the held tagged-output register of mr_protection_logic;
// only its identifier and decision are used, its valid strobe is not, since
// the capture rule compares identifiers.
module mr_pst_logic
  import pst_pkg::*;
#(
  parameter int unsigned N_PV          = 3,            // process variables tested
  parameter int unsigned TEST_PERIOD   = 10_000_000,   // cycles between test starts
  parameter int unsigned REQUIRED_HOLD = 1000,         // result hold before sending
  parameter int unsigned RESP_TIMEOUT  = 1024,         // response time-out (cycles)
  parameter kexc_t       KEXC          = kexc_t'(384)  // K_exc = 1.5 (8 fraction bits)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  pv_t         sp_i [N_PV],    // current setpoints
  input  pv_t         pv_i [N_PV],    // current process variables
  output test_in_t    test_in_o,      // tagged stimulus
  input  test_out_t   test_out_i,     // latest tagged output (held)
  output mtp_report_t report_o,       // result transmitted to the MTP
  output logic        result_o,       // 1 = PASS while held
  output logic        result_hold_o,  // result being held (SEND)
  output test_id_t    cur_idx_o,      // Current_PV_Index
  output mr_state_t   state_o
);

  localparam logic     EXPECTED_OUTPUT = 1'b1;  // an abnormal condition must trip
  localparam test_id_t LAST_PV_INDEX   = test_id_t'(N_PV - 1);
  localparam int unsigned IDX_W = (N_PV > 1) ? $clog2(N_PV) : 1;

  mr_state_t   state;
  logic [31:0] timer, wait_cnt, hold_cnt;
  logic        pending;
  pv_t         sp_all [N_PV];
  pv_t         pv_all [N_PV];
  pv_t         sel_sp, sel_pv;
  test_id_t    cur_idx, prev_id;
  logic        cap_ok, cap_trip;
  logic        result;
  logic        id_match;

  assign id_match = (test_out_i.id == cur_idx) && (test_out_i.id != prev_id);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= MR_WAIT;
      timer     <= '0;
      wait_cnt  <= '0;
      hold_cnt  <= '0;
      pending   <= 1'b0;
      for (int i = 0; i < N_PV; i++) begin
        sp_all[i] <= '0;
        pv_all[i] <= '0;
      end
      sel_sp    <= '0;
      sel_pv    <= '0;
      cur_idx   <= '0;
      prev_id   <= '1;
      cap_ok    <= 1'b0;
      cap_trip  <= 1'b0;
      result    <= 1'b0;
      test_in_o <= '{valid: 1'b0, id: '0, value: '0};
      report_o  <= '{valid: 1'b0, id: '0, pass: 1'b0};
    end else begin
      test_in_o.valid <= 1'b0;
      report_o.valid  <= 1'b0;
      if (timer != '1) timer <= timer + 1'b1;

      unique case (state)
        MR_WAIT: begin
          if (!pending) begin
            if (timer >= TEST_PERIOD) begin
              timer <= 32'd1;  // the start cycle is the first of the next period
              state <= MR_LATCH_DATA;
            end
          end else if (id_match) begin
            cap_ok   <= 1'b1;
            cap_trip <= test_out_i.trip;
            prev_id  <= test_out_i.id;
            state    <= MR_CAPTURE_OUT;
          end else if (wait_cnt >= RESP_TIMEOUT) begin
            cap_ok <= 1'b0;
            state  <= MR_CAPTURE_OUT;
          end else begin
            wait_cnt <= wait_cnt + 1'b1;
          end
        end
        MR_LATCH_DATA: begin
          sp_all  <= sp_i;
          pv_all  <= pv_i;
          cur_idx <= '0;
          state   <= MR_SELECT_PV;
        end
        MR_SELECT_PV: begin
          sel_sp <= sp_all[cur_idx[IDX_W-1:0]];
          sel_pv <= pv_all[cur_idx[IDX_W-1:0]];
          state  <= MR_APPLY_TEST;
        end
        MR_APPLY_TEST: begin
          test_in_o <= '{valid: 1'b1, id: cur_idx, value: stim_low(sel_pv, sel_sp, KEXC)};
          pending   <= 1'b1;
          wait_cnt  <= '0;
          state     <= MR_WAIT;
        end
        MR_CAPTURE_OUT: begin
          pending <= 1'b0;
          state   <= (cap_ok && (cap_trip == EXPECTED_OUTPUT)) ? MR_PASS : MR_FAIL;
        end
        MR_PASS: begin
          result   <= 1'b1;
          hold_cnt <= '0;
          state    <= MR_SEND;
        end
        MR_FAIL: begin
          result   <= 1'b0;
          hold_cnt <= '0;
          state    <= MR_SEND;
        end
        MR_SEND: begin
          if (hold_cnt >= REQUIRED_HOLD) begin
            report_o <= '{valid: 1'b1, id: cur_idx, pass: result};
            if (cur_idx < LAST_PV_INDEX) begin
              cur_idx <= cur_idx + 1'b1;
              state   <= MR_SELECT_PV;
            end else begin
              state   <= MR_WAIT;
            end
          end else begin
            hold_cnt <= hold_cnt + 1'b1;
          end
        end
        default: state <= MR_WAIT;
      endcase
    end
  end

  assign result_o      = result;
  assign result_hold_o = (state == MR_SEND);
  assign cur_idx_o     = cur_idx;
  assign state_o       = state;

endmodule
