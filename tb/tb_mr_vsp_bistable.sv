// tb_mr_vsp_bistable: self-checking testbench of the manual-reset
// variable-setpoint bistable.
//
// A reference model in the testbench (reset pulse lowers SP by STEP,
// saturating at zero; otherwise on a strobe SP = max(SP, PV - MARGIN); trip
// when PV <= SP; trip held while a stimulus is evaluated) is compared with the
// block every cycle under random inputs. Directed phases then run a cooldown:
// the process variable falls towards the setpoint, the operator resets the
// setpoint down before it trips, a rising process variable pulls the
// setpoint up again, and a tagged stimulus below the setpoint gives a tagged
// trip while the protection output stays clear.
module tb_mr_vsp_bistable;
  import pst_pkg::*;

  localparam pv_t      MARGIN  = pv_t'(2000);
  localparam pv_t      STEP    = pv_t'(1000);
  localparam test_id_t TEST_ID = test_id_t'(1);

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  pv_t       pv;
  logic      tick, rpb;
  test_in_t  tin;
  logic      trip;
  pv_t       sp, pv_rb;
  test_out_t tout;

  int checks = 0, failures = 0;

  mr_vsp_bistable #(.MARGIN(MARGIN), .STEP(STEP), .TEST_ID(TEST_ID)) dut (
    .clk(clk), .rst_n(rst_n), .pv_i(pv), .pv_tick_i(tick), .reset_pb_i(rpb),
    .test_in_i(tin), .trip_o(trip), .sp_o(sp), .pv_o(pv_rb), .test_out_o(tout)
  );

  always #5 clk = ~clk;

  int m_pv, m_sp, m_trip, m_tv, m_tid, m_ttrip;
  bit m_ok = 0;
  int resets = 0, tests = 0, trips = 0;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  task automatic model_step();
    bit sel;
    int x;
    sel = tin.valid && (tin.id == TEST_ID);
    x   = sel ? int'(tin.value) : m_pv;
    if (!sel && m_ok) m_trip = (m_pv <= m_sp);
    m_tv = sel;
    if (sel) begin m_tid = tin.id; m_ttrip = (x <= m_sp); end
    if (rpb) begin m_sp = m_sp - int'(STEP); if (m_sp < 0) m_sp = 0; resets++; end
    else if (tick && m_ok && (m_pv - int'(MARGIN) > m_sp)) m_sp = m_pv - int'(MARGIN);
    m_pv = pv;
    m_ok = 1;
  endtask

  task automatic cycle();
    @(posedge clk);
    model_step();
    #1;
    check("sp", sp, m_sp);
    check("pv readback", pv_rb, m_pv);
    check("trip", trip, m_trip);
    check("test valid", tout.valid, m_tv);
    if (m_tv) begin
      check("test id", tout.id, m_tid);
      check("test trip", tout.trip, m_ttrip);
      tests++;
    end
    if (m_trip != 0) trips++;
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
    int p;
    pv = '0; tick = 0; rpb = 0; tin = '0;
    m_pv = 0; m_sp = 0; m_trip = 0; m_tv = 0; m_tid = 15; m_ttrip = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check("reset sp", sp, 0);

    p = 30000;
    for (int n = 0; n < 3000; n++) begin
      p = p + int'($urandom_range(0, 80)) - 40;
      if (p < 0) p = 0;
      if (p > 65535) p = 65535;
      pv   = pv_t'(p);
      tick = ($urandom_range(0, 3) == 0);
      rpb  = ($urandom_range(0, 40) == 0);
      tin.valid = ($urandom_range(0, 7) == 0);
      tin.id    = ($urandom_range(0, 3) == 0) ? test_id_t'(0) : TEST_ID;
      tin.value = pv_t'($urandom_range(0, 65535));
      cycle();
    end
    tin = '0; rpb = 0;

    // Cooldown: setpoint follows the PV up to 40000 - MARGIN = 38000
    tick = 1; pv = pv_t'(40000);
    repeat (5) cycle();
    check("setpoint follows rising PV", sp, 38000);
    // PV falls: setpoint stays, pretrip approached
    for (int n = 0; n < 18; n++) begin pv = pv - pv_t'(100); cycle(); end
    check("setpoint does not follow falling PV", sp, 38000);
    check("no trip above setpoint", trip, 0);
    // Operator reset lowers the setpoint by STEP
    rpb = 1; cycle(); rpb = 0;
    check("manual reset lowers setpoint", sp, 37000);
    for (int n = 0; n < 10; n++) begin pv = pv - pv_t'(100); cycle(); end
    check("cooldown continues without trip", trip, 0);
    // Without a further reset the PV reaches the setpoint and trips
    for (int n = 0; n < 10; n++) begin pv = pv - pv_t'(100); cycle(); end
    cycle();
    check("trip at setpoint", trip, 1);
    // PV rises again: setpoint rises to keep the margin
    pv = pv_t'(45000); repeat (3) cycle();
    check("setpoint tracks rise after reset", sp, 43000);
    check("trip clears", trip, 0);
    // Tagged stimulus below the setpoint
    tin = '{valid: 1'b1, id: TEST_ID, value: pv_t'(42000)};
    cycle(); tin = '0;
    check("tagged output trips", tout.trip, 1);
    check("protection trip untouched", trip, 0);
    check("setpoint untouched by stimulus", sp, 43000);

    check("resets exercised", (resets > 10), 1);
    check("tests exercised", (tests > 20), 1);
    check("trips exercised", (trips > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
