// tb_pst_coverage: state and transition coverage of both test sequencers,
// run inside the complete channel processor.
//
// Every transition of the two state diagrams is listed here as a legal
// (from, to) pair. The testbench records each state change of both machines,
// counts a failure for any change not in the list, and at the end requires
// every state and every listed transition to have been taken at least once.
// To reach the FAIL branches and the time-out of the manual-reset test, the
// second test period forces the tagged output of the rate-limited bistable
// and of manual-reset bistable 1 to "no trip" and silences manual-reset
// bistable 2. Reports are checked against these faults.
module tb_pst_coverage;
  import pst_pkg::*;

  localparam int N      = 3;
  localparam int PERIOD = 400;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  pv_t         rl_pv = pv_t'(20000);
  logic        rl_trip;
  pv_t         rl_sp;
  pv_t         mr_pv  [N];
  logic        mr_rpb [N];
  logic        mr_trip [N];
  pv_t         mr_sp  [N];
  mtp_report_t rl_rep, mr_rep;
  logic        rl_res, rl_hold, mr_res, mr_hold;
  test_id_t    mr_idx;
  rl_state_t   rl_state;
  mr_state_t   mr_state;
  logic        tick;

  int checks = 0, failures = 0;

  pst_processor #(
    .N_PV(N), .TEST_PERIOD(PERIOD), .REQUIRED_HOLD(6), .RESP_CAPTURE_CYCLES(3), .RESP_TIMEOUT(20)
  ) dut (
    .clk(clk), .rst_n(rst_n),
    .rl_pv_i(rl_pv), .rl_tick_i(tick), .rl_trip_o(rl_trip), .rl_sp_o(rl_sp),
    .mr_pv_i(mr_pv), .mr_tick_i(tick), .mr_reset_pb_i(mr_rpb), .mr_trip_o(mr_trip),
    .mr_sp_o(mr_sp),
    .rl_report_o(rl_rep), .mr_report_o(mr_rep),
    .rl_result_o(rl_res), .rl_result_hold_o(rl_hold),
    .mr_result_o(mr_res), .mr_result_hold_o(mr_hold), .mr_cur_idx_o(mr_idx),
    .rl_state_o(rl_state), .mr_state_o(mr_state)
  );

  always #5 clk = ~clk;
  assign tick = 1'b1;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // Transition tables from the two state diagrams (self-loops included)
  int rl_hits [7][7];
  int mr_hits [8][8];
  bit rl_legal [7][7];
  bit mr_legal [8][8];
  int mr_timeouts = 0;
  bit faulty = 0;
  rl_state_t rl_prev = RL_WAIT;
  mr_state_t mr_prev = MR_WAIT;

  initial begin
    for (int a = 0; a < 8; a++) for (int b = 0; b < 8; b++) begin
      mr_hits[a][b] = 0; mr_legal[a][b] = 0;
      if (a < 7 && b < 7) begin rl_hits[a][b] = 0; rl_legal[a][b] = 0; end
    end
    rl_legal[RL_WAIT][RL_WAIT]             = 1;
    rl_legal[RL_WAIT][RL_LATCH_DATA]       = 1;
    rl_legal[RL_LATCH_DATA][RL_APPLY_TEST] = 1;
    rl_legal[RL_APPLY_TEST][RL_WAIT]       = 1;
    rl_legal[RL_WAIT][RL_CAPTURE_OUT]      = 1;
    rl_legal[RL_CAPTURE_OUT][RL_PASS]      = 1;
    rl_legal[RL_CAPTURE_OUT][RL_FAIL]      = 1;
    rl_legal[RL_PASS][RL_SEND]             = 1;
    rl_legal[RL_FAIL][RL_SEND]             = 1;
    rl_legal[RL_SEND][RL_SEND]             = 1;
    rl_legal[RL_SEND][RL_WAIT]             = 1;
    mr_legal[MR_WAIT][MR_WAIT]             = 1;
    mr_legal[MR_WAIT][MR_LATCH_DATA]       = 1;
    mr_legal[MR_LATCH_DATA][MR_SELECT_PV]  = 1;
    mr_legal[MR_SELECT_PV][MR_APPLY_TEST]  = 1;
    mr_legal[MR_APPLY_TEST][MR_WAIT]       = 1;
    mr_legal[MR_WAIT][MR_CAPTURE_OUT]      = 1;
    mr_legal[MR_CAPTURE_OUT][MR_PASS]      = 1;
    mr_legal[MR_CAPTURE_OUT][MR_FAIL]      = 1;
    mr_legal[MR_PASS][MR_SEND]             = 1;
    mr_legal[MR_FAIL][MR_SEND]             = 1;
    mr_legal[MR_SEND][MR_SEND]             = 1;
    mr_legal[MR_SEND][MR_SELECT_PV]        = 1;
    mr_legal[MR_SEND][MR_WAIT]             = 1;
  end

  int mr_wait_len = 0;
  always @(negedge clk) if (rst_n) begin
    rl_hits[rl_prev][rl_state]++;
    mr_hits[mr_prev][mr_state]++;
    if (!rl_legal[rl_prev][rl_state]) check("legal rate-limited transition", 0, 1);
    if (!mr_legal[mr_prev][mr_state]) check("legal manual-reset transition", 0, 1);
    if (mr_prev == MR_APPLY_TEST) mr_wait_len = 0;
    else if (mr_state == MR_WAIT) mr_wait_len++;
    if (mr_prev == MR_WAIT && mr_state == MR_CAPTURE_OUT && mr_wait_len >= 20) mr_timeouts++;
    rl_prev = rl_state;
    mr_prev = mr_state;
    if (rl_rep.valid) check("rate-limited result", rl_rep.pass, !faulty);
    if (mr_rep.valid) check("manual-reset result", mr_rep.pass, !(faulty && mr_rep.id != 0));
  end

  initial begin
    repeat (PERIOD * 10) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_idle();
    wait (rl_state == RL_WAIT && mr_state == MR_WAIT && !dut.u_rl_test.pending
          && !dut.u_mr_test.pending && rl_hits[RL_SEND][RL_WAIT] > 0);
    @(negedge clk);
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin mr_pv[i] = pv_t'(30000 + 2000 * i); mr_rpb[i] = 1'b0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // period 1: healthy
    wait (mr_hits[MR_SEND][MR_WAIT] == 1);
    wait_idle();
    // period 2: faults
    faulty = 1;
    force dut.u_rl_bs.test_out_o.trip = 1'b0;
    force dut.u_mr_bs.g_bs[1].u_bs.test_out_o.trip = 1'b0;
    force dut.u_mr_bs.g_bs[2].u_bs.test_out_o.valid = 1'b0;
    wait (mr_hits[MR_SEND][MR_WAIT] == 2);
    wait_idle();
    release dut.u_rl_bs.test_out_o.trip;
    release dut.u_mr_bs.g_bs[1].u_bs.test_out_o.trip;
    release dut.u_mr_bs.g_bs[2].u_bs.test_out_o.valid;
    faulty = 0;
    // period 3: healthy again
    wait (mr_hits[MR_SEND][MR_WAIT] == 3);
    wait_idle();

    for (int s = 0; s < 7; s++) begin
      int seen = 0;
      for (int t = 0; t < 7; t++) seen += rl_hits[t][s];
      check("rate-limited state executed", (seen > 0), 1);
    end
    for (int s = 0; s < 8; s++) begin
      int seen = 0;
      for (int t = 0; t < 8; t++) seen += mr_hits[t][s];
      check("manual-reset state executed", (seen > 0), 1);
    end
    for (int a = 0; a < 7; a++) for (int b = 0; b < 7; b++)
      if (rl_legal[a][b]) check("rate-limited transition taken", (rl_hits[a][b] > 0), 1);
    for (int a = 0; a < 8; a++) for (int b = 0; b < 8; b++)
      if (mr_legal[a][b]) check("manual-reset transition taken", (mr_hits[a][b] > 0), 1);
    check("response time-out taken", (mr_timeouts > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
