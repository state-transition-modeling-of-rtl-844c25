// tb_rl_vsp_bistable: self-checking testbench of the rate-limited
// variable-setpoint bistable.
//
// A cycle-accurate reference model kept in the testbench (setpoint tracking
// PV + MARGIN, rising by at most RATE per strobe, falling at once; trip when
// PV >= SP; trip held while a stimulus is evaluated) is compared with the
// block every cycle over a random process-variable walk, random strobes and
// random tagged stimuli, some addressed to another identifier; the first
// cycle after reset, before a sample is registered, changes nothing. Directed
// phases then check that a slow ramp does not trip, that a fast ramp trips
// through the rate limit, and that a test stimulus gives a tagged trip
// without touching the protection trip output.
module tb_rl_vsp_bistable;
  import pst_pkg::*;

  localparam pv_t      MARGIN  = pv_t'(1000);
  localparam pv_t      RATE    = pv_t'(10);
  localparam test_id_t TEST_ID = test_id_t'(2);

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  pv_t       pv;
  logic      tick;
  test_in_t  tin;
  logic      trip;
  pv_t       sp, pv_rb;
  test_out_t tout;

  int checks = 0, failures = 0;

  rl_vsp_bistable #(.MARGIN(MARGIN), .RATE(RATE), .TEST_ID(TEST_ID)) dut (
    .clk(clk), .rst_n(rst_n), .pv_i(pv), .pv_tick_i(tick), .test_in_i(tin),
    .trip_o(trip), .sp_o(sp), .pv_o(pv_rb), .test_out_o(tout)
  );

  always #5 clk = ~clk;

  // Reference model state
  int unsigned m_pv, m_sp, m_trip, m_tv, m_tid, m_ttrip;
  bit          m_ok = 0;
  int unsigned trips_seen = 0, tests_seen = 0, held_cycles = 0;

  task automatic check(input string what, input int unsigned got, input int unsigned exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // Model update at a clock edge from the inputs seen before it
  task automatic model_step();
    int unsigned target, x;
    bit sel;
    sel    = tin.valid && (tin.id == TEST_ID);
    x      = sel ? tin.value : m_pv;
    if (!sel && m_ok) m_trip = (m_pv >= m_sp);
    else if (m_trip != 0) held_cycles++;
    m_tv = sel;
    if (sel) begin m_tid = tin.id; m_ttrip = (x >= m_sp); end
    if (tick && m_ok) begin
      target = m_pv + MARGIN; if (target > 65535) target = 65535;
      if (target > m_sp) m_sp = (target < m_sp + RATE) ? target : ((m_sp + RATE > 65535) ? 65535 : m_sp + RATE);
      else m_sp = target;
    end
    m_pv = pv;
    m_ok = 1;
  endtask

  task automatic compare_all();
    check("sp", sp, m_sp);
    check("pv readback", pv_rb, m_pv);
    check("trip", trip, m_trip);
    check("test valid", tout.valid, m_tv);
    if (m_tv) begin
      check("test id", tout.id, m_tid);
      check("test trip", tout.trip, m_ttrip);
      tests_seen++;
    end
    if (m_trip) trips_seen++;
  endtask

  task automatic cycle();
    @(posedge clk);
    model_step();
    #1 compare_all();
    @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned p;
    bit trip_during_test_seen;
    pv = '0; tick = 0; tin = '0;
    m_pv = 0; m_sp = 65535; m_trip = 0; m_tv = 0; m_tid = 15; m_ttrip = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check("reset sp", sp, 65535);
    check("reset trip", trip, 0);

    // Random walk with random strobes and stimuli
    p = 20000;
    for (int n = 0; n < 3000; n++) begin
      int d;
      d = int'($urandom_range(0, 60)) - 30;
      if (int'(p) + d > 0 && int'(p) + d < 60000) p = p + d;
      if ($urandom_range(0, 50) == 0) p = $urandom_range(1000, 60000); // step change
      pv   = pv_t'(p);
      tick = ($urandom_range(0, 3) == 0);
      tin.valid = ($urandom_range(0, 7) == 0);
      tin.id    = ($urandom_range(0, 3) == 0) ? test_id_t'(1) : TEST_ID;
      tin.value = pv_t'($urandom_range(0, 65535));
      cycle();
    end
    tin = '0;

    // Slow ramp within the rate: no trip once tracking has settled
    tick = 1; pv = pv_t'(10000);
    repeat (8000) begin cycle(); if (sp == pv_t'(11000)) break; end
    check("settled before ramp", sp, 11000);
    for (int n = 0; n < 200; n++) begin pv = pv + pv_t'(5); cycle(); check("slow ramp no trip", trip, 0); end

    // Fast ramp beyond the rate: setpoint cannot follow, bistable trips
    begin
      bit tripped = 0;
      for (int n = 0; n < 300; n++) begin pv = pv + pv_t'(40); cycle(); if (trip) tripped = 1; end
      check("fast ramp trips", tripped, 1);
      check("sp below pv+margin", (int'(sp) < int'(pv) + int'(MARGIN)), 1);
    end

    // Back to steady state, then a tagged stimulus above the setpoint
    pv = pv_t'(30000); repeat (10) cycle();
    repeat (3000) begin cycle(); if (sp == pv_t'(31000)) break; end
    check("settled sp", sp, 31000);
    tin = '{valid: 1'b1, id: TEST_ID, value: pv_t'(31500)};
    cycle();
    tin = '0;
    check("stimulus trips tagged output", tout.trip, 1);
    check("tagged id", tout.id, TEST_ID);
    check("protection trip untouched", trip, 0);
    cycle();
    check("protection trip still clear", trip, 0);
    check("test strobe one cycle", tout.valid, 0);
    check("setpoint not moved by stimulus", sp, 31000);

    check("some real trips happened", (trips_seen > 0), 1);
    check("some tagged tests happened", (tests_seen > 20), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
