// tb_mr_protection_logic: self-checking testbench of the bank of
// manual-reset variable-setpoint bistables.
//
// Three channels get independent random process variables, strobes and reset
// pulses; a per-channel reference model checks every setpoint and trip output
// each cycle. Tagged stimuli are addressed to random channels (and to an
// identifier no channel has); the held tagged-output register must show the
// addressed channel's identifier and decision two cycles after the stimulus,
// keep them afterwards, and ignore the unaddressed identifier.
module tb_mr_protection_logic;
  import pst_pkg::*;

  localparam int  N      = 3;
  localparam pv_t MARGIN = pv_t'(2000);
  localparam pv_t STEP   = pv_t'(1000);

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  pv_t       pv   [N];
  logic      tick;
  logic      rpb  [N];
  test_in_t  tin;
  logic      trip [N];
  pv_t       sp   [N];
  pv_t       pvrb [N];
  test_out_t tout;

  int checks = 0, failures = 0;

  mr_protection_logic #(.N_PV(N), .MARGIN(MARGIN), .STEP(STEP)) dut (
    .clk(clk), .rst_n(rst_n), .pv_i(pv), .pv_tick_i(tick), .reset_pb_i(rpb),
    .test_in_i(tin), .trip_o(trip), .sp_o(sp), .pv_o(pvrb), .test_out_o(tout)
  );

  always #5 clk = ~clk;

  int m_pv [N], m_sp [N], m_trip [N];
  // stage 1: bistable output; stage 2: gathered register
  int s1_v, s1_id, s1_trip;
  int m_v, m_id, m_trip_t;
  int per_ch [N];
  bit m_ok = 0;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  task automatic model_step();
    bit sel;
    // gathered register takes stage 1
    m_v = s1_v;
    if (s1_v != 0) begin m_id = s1_id; m_trip_t = s1_trip; end
    s1_v = 0;
    for (int i = 0; i < N; i++) begin
      sel = tin.valid && (int'(tin.id) == i);
      if (!sel && m_ok) m_trip[i] = (m_pv[i] <= m_sp[i]);
      if (sel) begin s1_v = 1; s1_id = i; s1_trip = (int'(tin.value) <= m_sp[i]); end
      if (rpb[i]) begin m_sp[i] = m_sp[i] - int'(STEP); if (m_sp[i] < 0) m_sp[i] = 0; end
      else if (tick && m_ok && (m_pv[i] - int'(MARGIN) > m_sp[i])) m_sp[i] = m_pv[i] - int'(MARGIN);
      m_pv[i] = pv[i];
    end
    m_ok = 1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p [N];
    tick = 0; tin = '0;
    for (int i = 0; i < N; i++) begin
      pv[i] = '0; rpb[i] = 0; m_pv[i] = 0; m_sp[i] = 0; m_trip[i] = 0; p[i] = 20000 + 5000 * i;
      per_ch[i] = 0;
    end
    s1_v = 0; m_v = 0; m_id = 15; m_trip_t = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check("reset id names no PV", tout.id, 15);

    for (int n = 0; n < 4000; n++) begin
      for (int i = 0; i < N; i++) begin
        p[i] = p[i] + int'($urandom_range(0, 100)) - 50;
        if (p[i] < 0) p[i] = 0;
        if (p[i] > 65535) p[i] = 65535;
        pv[i]  = pv_t'(p[i]);
        rpb[i] = ($urandom_range(0, 60) == 0);
      end
      tick = ($urandom_range(0, 2) == 0);
      tin.valid = ($urandom_range(0, 5) == 0);
      tin.id    = test_id_t'($urandom_range(0, N)); // N addresses no channel
      tin.value = pv_t'($urandom_range(0, 65535));
      if (tin.valid && int'(tin.id) < N) per_ch[tin.id]++;
      @(posedge clk);
      model_step();
      #1;
      for (int i = 0; i < N; i++) begin
        check("sp", sp[i], m_sp[i]);
        check("trip", trip[i], m_trip[i]);
        check("pv readback", pvrb[i], m_pv[i]);
      end
      check("tagged valid", tout.valid, m_v);
      check("tagged id", tout.id, m_id);
      check("tagged trip", tout.trip, m_trip_t);
      @(negedge clk);
    end
    for (int i = 0; i < N; i++) check("every channel tested", (per_ch[i] > 50), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
