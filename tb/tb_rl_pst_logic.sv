// tb_rl_pst_logic: self-checking testbench of the rate-limited setpoint test
// logic.
//
// The bistable is replaced by a responder in the testbench that answers each
// tagged stimulus after one cycle. Per test it behaves in one of five ways:
// correct (trips when X_test >= SP), output stuck at no-trip, no answer,
// answer with a wrong identifier, answer too late. Each test uses random
// setpoint/process-variable data. The testbench checks the stimulus value
// against Eq. (1) worked out here, that the stimulus strobe lasts one cycle,
// that tests start TEST_PERIOD cycles apart, that the report arrives a fixed
// number of cycles after the start (LATCH_DATA 1, APPLY_TEST 1, WAIT
// RESP_CAPTURE_CYCLES + 1, CAPTURE_OUT 1, PASS/FAIL 1, SEND REQUIRED_HOLD + 1),
// that the result is PASS only for the correct responder, and that every
// state is visited.
module tb_rl_pst_logic;
  import pst_pkg::*;

  localparam int unsigned PERIOD = 200;
  localparam int unsigned RESP   = 4;
  localparam int unsigned HOLD   = 20;
  localparam kexc_t       K      = kexc_t'(384);
  localparam test_id_t    ID     = test_id_t'(0);
  localparam int unsigned START_TO_REPORT = 1 + 1 + (RESP + 1) + 1 + 1 + (HOLD + 1);

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  pv_t         sp, pv;
  test_in_t    tin;
  test_out_t   tout;
  mtp_report_t rep;
  logic        result, hold;
  rl_state_t   state;

  int checks = 0, failures = 0;

  rl_pst_logic #(
    .TEST_PERIOD(PERIOD), .RESP_CAPTURE_CYCLES(RESP), .REQUIRED_HOLD(HOLD), .KEXC(K), .TEST_ID(ID)
  ) dut (
    .clk(clk), .rst_n(rst_n), .sp_i(sp), .pv_i(pv), .test_in_o(tin), .test_out_i(tout),
    .report_o(rep), .result_o(result), .result_hold_o(hold), .state_o(state)
  );

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  longint cyc = 0;
  int     mode;            // responder behaviour of the current test
  longint last_start = -1, start_cyc = 0;
  int     starts = 0, reports = 0, passes = 0, fails = 0;
  int     visited [7];
  longint sp_at_start, pv_at_start;
  int     late_cnt = -1;
  logic   prev_tin_valid = 1'b0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) visited[int'(state)]++;
  end

  // Responder and monitors, sampled on the falling edge
  always @(negedge clk) if (rst_n) begin
    tout.valid <= 1'b0;
    if (state == RL_LATCH_DATA) begin
      if (last_start >= 0) check("test period", cyc - last_start, PERIOD);
      last_start  = cyc;
      start_cyc   = cyc;
      starts++;
      sp_at_start = sp;
      pv_at_start = pv;
    end
    if (tin.valid && prev_tin_valid) check("stimulus strobe one cycle", 0, 1);
    prev_tin_valid = tin.valid;
    if (tin.valid) begin
      longint margin, expx;
      margin = (sp_at_start > pv_at_start) ? sp_at_start - pv_at_start : 0;
      expx   = pv_at_start + (margin * 384) / 256;
      if (expx > 65535) expx = 65535;
      check("stimulus value Eq.(1)", tin.value, expx);
      check("stimulus id", tin.id, ID);
      case (mode)
        0: begin tout.valid <= 1'b1; tout.id <= tin.id; tout.trip <= (tin.value >= sp); end
        1: begin tout.valid <= 1'b1; tout.id <= tin.id; tout.trip <= 1'b0; end
        2: ;
        3: begin tout.valid <= 1'b1; tout.id <= tin.id + 1'b1; tout.trip <= 1'b1; end
        default: late_cnt = RESP + 4;
      endcase
    end
    if (late_cnt == 0) begin tout.valid <= 1'b1; tout.id <= ID; tout.trip <= 1'b1; end
    if (late_cnt >= 0) late_cnt--;
    if (rep.valid) begin
      reports++;
      check("report latency", cyc - start_cyc, START_TO_REPORT);
      check("report id", rep.id, ID);
      check("result PASS only for a correct bistable", rep.pass, (mode == 0));
      if (rep.pass) passes++; else fails++;
      // next test: new data and a new responder behaviour
      mode = (reports < 5) ? reports : int'($urandom_range(0, 4));
      pv   = pv_t'($urandom_range(0, 60000));
      sp   = pv + pv_t'($urandom_range(0, 5000));
    end
  end

  initial begin
    repeat (PERIOD * 40) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 7; i++) visited[i] = 0;
    tout = '{valid: 1'b0, id: '1, trip: 1'b0};
    mode = 0;
    pv = pv_t'(30000); sp = pv_t'(31000);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check("idle after reset", state, RL_WAIT);
    // first start TEST_PERIOD cycles after reset
    repeat (PERIOD - 2) @(negedge clk);
    check("no test before the period", starts, 0);
    wait (reports == 30);
    @(negedge clk);
    check("passes", (passes > 3), 1);
    check("fails", (fails > 10), 1);
    for (int i = 0; i < 7; i++) check("state visited", (visited[i] > 0), 1);
    // Only the result of the SEND state is held
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
