// tb_pst_processor_full: one complete automatic test period of the channel
// processor at its default parameters (test period 10,000,000 cycles, result
// hold 1000 cycles, three manual-reset process variables).
//
// The plant is held steady. The testbench checks that neither test logic
// starts before the test period has elapsed, that the rate-limited test
// starts exactly TEST_PERIOD cycles after reset and reports PASS after the
// fixed sequence length (LATCH_DATA 1, APPLY_TEST 1, WAIT 9, CAPTURE_OUT 1,
// PASS 1, SEND 1001 cycles), that the manual-reset test reports PASS for
// process variables 0, 1 and 2 in that order, and that no trip output rises
// while the tripping stimuli are applied.
module tb_pst_processor_full;
  import pst_pkg::*;

  localparam int N           = 3;
  localparam int PERIOD      = 10_000_000;
  localparam int RL_SEQUENCE = 1 + 1 + 9 + 1 + 1 + 1001;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  pv_t         rl_pv = pv_t'(50000);
  logic        rl_tick;
  logic        rl_trip;
  pv_t         rl_sp;
  pv_t         mr_pv  [N];
  logic        mr_tick;
  logic        mr_rpb [N];
  logic        mr_trip [N];
  pv_t         mr_sp  [N];
  mtp_report_t rl_rep, mr_rep;
  logic        rl_res, rl_hold, mr_res, mr_hold;
  test_id_t    mr_idx;
  rl_state_t   rl_state;
  mr_state_t   mr_state;

  int checks = 0, failures = 0;

  pst_processor dut (
    .clk(clk), .rst_n(rst_n),
    .rl_pv_i(rl_pv), .rl_tick_i(rl_tick), .rl_trip_o(rl_trip), .rl_sp_o(rl_sp),
    .mr_pv_i(mr_pv), .mr_tick_i(mr_tick), .mr_reset_pb_i(mr_rpb), .mr_trip_o(mr_trip),
    .mr_sp_o(mr_sp),
    .rl_report_o(rl_rep), .mr_report_o(mr_rep),
    .rl_result_o(rl_res), .rl_result_hold_o(rl_hold),
    .mr_result_o(mr_res), .mr_result_hold_o(mr_hold), .mr_cur_idx_o(mr_idx),
    .rl_state_o(rl_state), .mr_state_o(mr_state)
  );

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  longint cyc = 0, rl_start = -1;
  int     rl_reports = 0, mr_reports = 0, trip_cycles = 0;
  bit     watch_trips = 0;

  assign rl_tick = cyc[3:0] == 4'd0;
  assign mr_tick = cyc[3:0] == 4'd8;

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n) begin
    if (watch_trips) begin
      if (rl_trip) trip_cycles++;
      for (int i = 0; i < N; i++) if (mr_trip[i]) trip_cycles++;
    end
    if (rl_state == RL_LATCH_DATA && rl_start < 0) begin
      rl_start = cyc;
      // the start is taken at the clock edge after the one where the
      // counter reaches the period, i.e. after PERIOD full waiting cycles
      check("rate-limited test starts after one period", cyc, PERIOD + 1);
    end
    if (rl_rep.valid) begin
      rl_reports++;
      check("rate-limited result PASS", rl_rep.pass, 1);
      check("rate-limited sequence length", cyc - rl_start, RL_SEQUENCE);
    end
    if (mr_rep.valid) begin
      check("manual-reset report order", mr_rep.id, mr_reports);
      check("manual-reset result PASS", mr_rep.pass, 1);
      mr_reports++;
    end
  end

  initial begin
    repeat (PERIOD + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin mr_pv[i] = pv_t'(40000 - 4000 * i); mr_rpb[i] = 1'b0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2000) @(negedge clk);
    check("rl setpoint settled", rl_sp, 51000);
    for (int i = 0; i < N; i++) check("mr setpoint settled", mr_sp[i], 38000 - 4000 * i);
    watch_trips = 1;
    repeat (PERIOD - 2100) @(negedge clk);
    check("no test before the period", rl_reports + mr_reports, 0);
    check("idle", (rl_state == RL_WAIT) && (mr_state == MR_WAIT), 1);
    wait (rl_reports == 1 && mr_reports == N);
    repeat (10) @(negedge clk);
    check("trip outputs stayed clear", trip_cycles, 0);
    check("both test logics idle again", (rl_state == RL_WAIT) && (mr_state == MR_WAIT), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
