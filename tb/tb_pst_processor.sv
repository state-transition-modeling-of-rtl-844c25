// tb_pst_processor: end-to-end testbench of the channel processor with both
// built-in test logics, at a short test period.
//
// Phases:
//   A  steady plant: every rate-limited and manual-reset test must report
//      PASS, and no trip output may rise although each test drives a
//      tripping stimulus through the bistables (functional isolation).
//   B  a stuck-at-no-trip fault is forced onto the tagged output of the
//      rate-limited bistable and of manual-reset bistable 1: the next tests
//      must report FAIL for exactly those, PASS for the others.
//   C  plant transients: a fast power ramp trips the rate-limited bistable
//      through its rate limit; operator resets step the manual-reset
//      setpoints down; a pressure drop trips a manual-reset bistable; a rise
//      pulls its setpoint up again.
//   D  faults released and plant steady again: tests pass again.
// Every mechanism is counted and a mechanism that never happened is a
// failure. Each report is checked against the result expected from the
// faults forced at that time, and its process-variable index against the
// test order.
module tb_pst_processor;
  import pst_pkg::*;

  localparam int  N      = 3;
  localparam int  PERIOD = 300;
  localparam int  HOLD   = 10;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  pv_t         rl_pv;
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

  pst_processor #(
    .N_PV(N), .TEST_PERIOD(PERIOD), .REQUIRED_HOLD(HOLD), .RESP_CAPTURE_CYCLES(4),
    .RESP_TIMEOUT(16)
  ) dut (
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

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // Mechanism counters
  int rl_pass = 0, rl_fail = 0, mr_pass = 0, mr_fail = 0;
  int next_pv = 0, back_to_wait = 0, tagged_trips = 0, isolated = 0;
  int rate_trips = 0, mr_steps = 0, mr_low_trips = 0, mr_rises = 0;
  int mr_expect_idx = 0;
  bit fault_rl = 0, fault_mr1 = 0, plant_steady = 0;
  mr_state_t mr_prev = MR_WAIT;
  logic      rl_trip_prev = 0;
  pv_t       mr_sp_prev [N];

  // strobe ticks
  int tick_div = 0;
  always @(posedge clk) begin
    tick_div <= (tick_div + 1) % 4;
  end
  assign rl_tick = (tick_div == 0);
  assign mr_tick = (tick_div == 2);

  always @(negedge clk) if (rst_n) begin
    // tagged outputs inside the bistables, observed for the isolation count
    if (dut.rl_test_out.valid && dut.rl_test_out.trip) begin
      tagged_trips++;
      if (!rl_trip) isolated++;
    end
    if (plant_steady) begin
      check("rl trip stays clear on steady plant", rl_trip, 0);
      for (int i = 0; i < N; i++) check("mr trip stays clear on steady plant", mr_trip[i], 0);
    end
    if (rl_trip && !rl_trip_prev) rate_trips++;
    rl_trip_prev = rl_trip;
    for (int i = 0; i < N; i++) begin
      if (mr_trip[i] && !plant_steady) mr_low_trips++;
      if (mr_sp[i] > mr_sp_prev[i] && mr_sp_prev[i] != 0) mr_rises++;
      mr_sp_prev[i] = mr_sp[i];
    end
    if (mr_prev == MR_SEND && mr_state == MR_SELECT_PV) next_pv++;
    if (mr_prev == MR_SEND && mr_state == MR_WAIT) back_to_wait++;
    mr_prev = mr_state;
    if (rl_rep.valid) begin
      check("rl result", rl_rep.pass, !fault_rl);
      if (rl_rep.pass) rl_pass++; else rl_fail++;
    end
    if (mr_rep.valid) begin
      check("mr report index", mr_rep.id, mr_expect_idx);
      check("mr result", mr_rep.pass, !(fault_mr1 && mr_expect_idx == 1));
      if (mr_rep.pass) mr_pass++; else mr_fail++;
      mr_expect_idx = (mr_expect_idx + 1) % N;
    end
  end

  task automatic wait_reports(input int rl_n, input int mr_n);
    int r0, m0;
    r0 = rl_pass + rl_fail; m0 = mr_pass + mr_fail;
    while ((rl_pass + rl_fail) < r0 + rl_n || (mr_pass + mr_fail) < m0 + mr_n) @(negedge clk);
  endtask

  initial begin
    repeat (PERIOD * 40) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rl_pv = pv_t'(30000);
    for (int i = 0; i < N; i++) begin
      mr_pv[i] = pv_t'(40000 - 5000 * i); mr_rpb[i] = 1'b0; mr_sp_prev[i] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (20) @(negedge clk);
    check("rl setpoint settles at PV + margin", rl_sp, 31000);
    for (int i = 0; i < N; i++) check("mr setpoint at PV - margin", mr_sp[i], 38000 - 5000 * i);
    plant_steady = 1;  // trips are checked from here on

    // A: steady plant, two test periods
    wait_reports(2, 2 * N);

    // B: stuck tagged outputs
    @(negedge clk);
    wait (rl_state == RL_WAIT && mr_state == MR_WAIT && !dut.u_mr_test.pending
          && !dut.u_rl_test.pending);
    fault_rl = 1; fault_mr1 = 1;
    force dut.u_rl_bs.test_out_o.trip = 1'b0;
    force dut.u_mr_bs.g_bs[1].u_bs.test_out_o.trip = 1'b0;
    wait_reports(1, N);
    wait (rl_state == RL_WAIT && mr_state == MR_WAIT && !dut.u_mr_test.pending
          && !dut.u_rl_test.pending);
    @(negedge clk);
    release dut.u_rl_bs.test_out_o.trip;
    release dut.u_mr_bs.g_bs[1].u_bs.test_out_o.trip;
    fault_rl = 0; fault_mr1 = 0;

    // C: plant transients
    plant_steady = 0;
    for (int n = 0; n < 200 && !rl_trip; n++) begin rl_pv = rl_pv + pv_t'(30); @(negedge clk); end
    check("fast ramp trips through the rate limit", rl_trip, 1);
    rl_pv = pv_t'(30000);
    // manual resets on every manual-reset bistable
    for (int i = 0; i < N; i++) begin
      pv_t sp_before;
      sp_before = mr_sp[i];
      mr_pv[i] = mr_pv[i] - pv_t'(1800);
      repeat (8) @(negedge clk);
      mr_rpb[i] = 1'b1; @(negedge clk); mr_rpb[i] = 1'b0; @(negedge clk);
      check("manual reset steps setpoint down", mr_sp[i], int'(sp_before) - 1000);
      if (mr_sp[i] == sp_before - pv_t'(1000)) mr_steps++;
    end
    // pressure drop below the setpoint trips channel 2
    mr_pv[2] = mr_sp[2] - pv_t'(10);
    repeat (4) @(negedge clk);
    check("low pressure trip", mr_trip[2], 1);
    // pressure recovers: setpoints rise with it
    for (int i = 0; i < N; i++) mr_pv[i] = pv_t'(42000 - 5000 * i);
    repeat (20) @(negedge clk);
    for (int i = 0; i < N; i++) check("setpoint follows rise", mr_sp[i], 40000 - 5000 * i);
    repeat (400) @(negedge clk);  // rl setpoint settles again
    plant_steady = 1;

    // D: healthy again
    wait_reports(2, 2 * N);

    // Every mechanism must have happened
    check("rl PASS reported", (rl_pass > 0), 1);
    check("rl FAIL reported", (rl_fail > 0), 1);
    check("mr PASS reported", (mr_pass > 0), 1);
    check("mr FAIL reported", (mr_fail > 0), 1);
    check("SEND -> SELECT_PV", (next_pv > 0), 1);
    check("SEND -> WAIT", (back_to_wait > 0), 1);
    check("tagged trips kept off trip output", (isolated > 0 && isolated == tagged_trips), 1);
    check("rate-limit trip", (rate_trips > 0), 1);
    check("manual reset steps", mr_steps, N);
    check("low trip", (mr_low_trips > 0), 1);
    check("setpoint rises", (mr_rises > 0), 1);
    $display("mechanisms: rl_pass=%0d rl_fail=%0d mr_pass=%0d mr_fail=%0d next_pv=%0d to_wait=%0d",
             rl_pass, rl_fail, mr_pass, mr_fail, next_pv, back_to_wait);
    $display("            isolated=%0d/%0d rate_trips=%0d steps=%0d low_trips=%0d rises=%0d",
             isolated, tagged_trips, rate_trips, mr_steps, mr_low_trips, mr_rises);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
