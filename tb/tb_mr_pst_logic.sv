// tb_mr_pst_logic: self-checking testbench of the manual-reset setpoint test
// logic.
//
// The bank of bistables is replaced by a responder in the testbench that
// behaves like the held tagged-output register of the bank: a stimulus in
// cycle n is answered in cycle n+2, and the identifier and decision stay
// until the next answer. For each process-variable test it behaves in one of
// four ways: correct (trips when X_test <= SP), stuck at no-trip, silent
// (time-out), or answering with an identifier of no process variable
// (time-out). An answer is captured only if its identifier differs from the
// last captured one; the testbench tracks that identifier itself. The testbench
// checks the stimulus value against Eq. (2) worked out here for every
// process variable, that the PVs are tested in order 0..N_PV-1 once per test
// period, the cycle count from APPLY_TEST to the report for both the answered
// and the timed-out case, the PASS/FAIL verdict, and that every state and
// both SEND exits (next PV, back to WAIT) are taken.
module tb_mr_pst_logic;
  import pst_pkg::*;

  localparam int unsigned N       = 3;
  localparam int unsigned PERIOD  = 400;
  localparam int unsigned HOLD    = 10;
  localparam int unsigned TIMEOUT = 12;
  localparam kexc_t       K       = kexc_t'(320);   // 1.25

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  pv_t         sp [N];
  pv_t         pv [N];
  test_in_t    tin;
  test_out_t   tout;
  mtp_report_t rep;
  logic        result, hold;
  test_id_t    idx;
  mr_state_t   state;

  int checks = 0, failures = 0;

  mr_pst_logic #(
    .N_PV(N), .TEST_PERIOD(PERIOD), .REQUIRED_HOLD(HOLD), .RESP_TIMEOUT(TIMEOUT), .KEXC(K)
  ) dut (
    .clk(clk), .rst_n(rst_n), .sp_i(sp), .pv_i(pv), .test_in_o(tin), .test_out_i(tout),
    .report_o(rep), .result_o(result), .result_hold_o(hold), .cur_idx_o(idx), .state_o(state)
  );

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  longint cyc = 0, apply_cyc = 0, last_start = -1;
  int     mode [N];
  int     starts = 0, reports = 0, passes = 0, fails = 0, timeouts = 0;
  int     next_pv_exits = 0, wait_exits = 0;
  int     expect_idx = 0;
  int     tb_prev_id = 15;
  bit     answered;
  int     visited [8];
  longint sp_l [N], pv_l [N];
  mr_state_t prev_state = MR_WAIT;

  // Responder: stage s1 then held register
  logic     s1_v, s1_trip;
  test_id_t s1_id;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s1_id <= '0; s1_trip <= 1'b0;
      tout <= '{valid: 1'b0, id: '1, trip: 1'b0};
    end else begin
      s1_v <= 1'b0;
      if (tin.valid && int'(tin.id) < N) begin
        case (mode[tin.id])
          0: begin s1_v <= 1'b1; s1_id <= tin.id; s1_trip <= (tin.value <= sp[tin.id]); end
          1: begin s1_v <= 1'b1; s1_id <= tin.id; s1_trip <= 1'b0; end
          2: ;
          default: begin s1_v <= 1'b1; s1_id <= test_id_t'(N); s1_trip <= 1'b1; end
        endcase
      end
      tout.valid <= s1_v;
      if (s1_v) begin tout.id <= s1_id; tout.trip <= s1_trip; end
    end
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) visited[int'(state)]++;
  end

  always @(negedge clk) if (rst_n) begin
    if (prev_state == MR_SEND && state == MR_SELECT_PV) next_pv_exits++;
    if (prev_state == MR_SEND && state == MR_WAIT) wait_exits++;
    prev_state = state;
    if (state == MR_LATCH_DATA) begin
      if (last_start >= 0) check("test period", cyc - last_start, PERIOD);
      last_start = cyc;
      starts++;
      expect_idx = 0;
      for (int i = 0; i < N; i++) begin sp_l[i] = sp[i]; pv_l[i] = pv[i]; end
    end
    if (state == MR_APPLY_TEST) apply_cyc = cyc;
    if (tin.valid) begin
      longint margin, dec, expx;
      check("stimulus id in order", tin.id, expect_idx);
      margin = (pv_l[tin.id] > sp_l[tin.id]) ? pv_l[tin.id] - sp_l[tin.id] : 0;
      dec    = (margin * 320) / 256;
      expx   = (dec > pv_l[tin.id]) ? 0 : pv_l[tin.id] - dec;
      check("stimulus value Eq.(2)", tin.value, expx);
    end
    if (rep.valid) begin
      reports++;
      check("report id", rep.id, expect_idx);
      // The capture rule needs the identifier of the answer to differ from
      // the last captured one; otherwise the test times out.
      answered = (mode[expect_idx] <= 1) && (expect_idx != tb_prev_id);
      if (answered) tb_prev_id = expect_idx;
      check("result", rep.pass, answered && (mode[expect_idx] == 0));
      if (!answered) begin
        timeouts++;
        check("time-out latency", cyc - apply_cyc, 1 + (TIMEOUT + 1) + 1 + 1 + (HOLD + 1));
      end else begin
        check("answer latency", cyc - apply_cyc, 1 + 3 + 1 + 1 + (HOLD + 1));
      end
      if (rep.pass) passes++; else fails++;
      mode[expect_idx] = (reports < 4) ? 0 : int'($urandom_range(0, 3));
      expect_idx = (expect_idx + 1) % N;
      if (expect_idx == 0)
        for (int i = 0; i < N; i++) begin
          pv[i] = pv_t'($urandom_range(1000, 65535));
          sp[i] = pv[i] - pv_t'($urandom_range(0, 1000));
        end
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
    for (int i = 0; i < 8; i++) visited[i] = 0;
    for (int i = 0; i < N; i++) begin
      mode[i] = 0; pv[i] = pv_t'(20000 + 1000 * i); sp[i] = pv[i] - pv_t'(500);
    end
    mode[1] = 1;   // first period: a stuck output on PV 1
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (reports == N * 20);
    @(negedge clk);
    check("test periods", starts, 20);
    check("passes", (passes > 5), 1);
    check("fails", (fails > 5), 1);
    check("time-outs", (timeouts > 3), 1);
    check("SEND -> SELECT_PV", next_pv_exits, (N - 1) * 20);
    check("SEND -> WAIT", wait_exits, 20);
    for (int i = 0; i < 8; i++) check("state visited", (visited[i] > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
