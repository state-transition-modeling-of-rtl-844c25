// pst_pkg: types and constants shared by the variable-setpoint bistable
// logics and their built-in periodic surveillance test (PST) logics.
//
// A test stimulus travels from a test logic to a bistable as a tagged
// sample (test_in_t): a valid strobe, a test identifier (the index of the
// process variable under test) and the stimulus value. The bistable answers
// with a tagged output (test_out_t) that only the test logic reads; the tag
// is what keeps a test trip off the protection path to coincidence logic.
// Process values are unsigned fixed-point words of PV_W bits; the exceedance
// factor K_exc is unsigned with KEXC_FRAC fraction bits. The widths are this
// design's own choice: the source gives no number formats.
package pst_pkg;

  localparam int unsigned PV_W      = 16;  // process variable / setpoint width
  localparam int unsigned ID_W      = 4;   // test identifier width
  localparam int unsigned KEXC_W    = 12;  // exceedance factor width
  localparam int unsigned KEXC_FRAC = 8;   // fraction bits of the exceedance factor

  typedef logic [PV_W-1:0]   pv_t;
  typedef logic [ID_W-1:0]   test_id_t;
  typedef logic [KEXC_W-1:0] kexc_t;

  // Tagged test stimulus, test logic -> bistable
  typedef struct packed {
    logic     valid;  // one-cycle strobe: "test input valid = 1"
    test_id_t id;     // identifier of the process variable under test
    pv_t      value;  // X_test
  } test_in_t;

  // Tagged test output, bistable -> test logic only
  typedef struct packed {
    logic     valid;  // one-cycle strobe: a tagged result was produced
    test_id_t id;     // identifier copied from the stimulus
    logic     trip;   // bistable decision for X_test
  } test_out_t;

  // States of the rate-limited setpoint test logic (Table 1, Fig. 2)
  typedef enum logic [2:0] {
    RL_WAIT, RL_LATCH_DATA, RL_APPLY_TEST, RL_CAPTURE_OUT, RL_PASS, RL_FAIL, RL_SEND
  } rl_state_t;

  // States of the manual-reset setpoint test logic (Table 2, Fig. 3)
  typedef enum logic [2:0] {
    MR_WAIT, MR_LATCH_DATA, MR_SELECT_PV, MR_APPLY_TEST, MR_CAPTURE_OUT, MR_PASS, MR_FAIL,
    MR_SEND
  } mr_state_t;

  // Result reported to the Maintenance and Test Panel
  typedef struct packed {
    logic     valid;  // one-cycle strobe: result transmitted
    test_id_t id;     // process variable the result belongs to
    logic     pass;   // 1 = PASS, 0 = FAIL
  } mtp_report_t;

  // Eq. (1), high trip: X_test = X_PV + M_trip * K_exc, M_trip = SP - X_PV
  // (a negative margin is taken as zero), saturated to the word range.
  function automatic pv_t stim_high(pv_t pv, pv_t sp, kexc_t kexc);
    logic [PV_W-1:0]          margin;
    logic [PV_W+KEXC_W-1:0]   prod;
    logic [PV_W+KEXC_W:0]     sum;
    margin = (sp > pv) ? sp - pv : '0;
    prod   = margin * kexc;
    sum    = {1'b0, prod >> KEXC_FRAC} + (PV_W+KEXC_W+1)'(pv);
    return (sum > (PV_W+KEXC_W+1)'({PV_W{1'b1}})) ? {PV_W{1'b1}} : sum[PV_W-1:0];
  endfunction

  // Eq. (2), low trip: X_test = X_PV - (X_PV - SP_0) * K_exc
  // (a negative margin is taken as zero), saturated at zero.
  function automatic pv_t stim_low(pv_t pv, pv_t sp, kexc_t kexc);
    logic [PV_W-1:0]          margin;
    logic [PV_W+KEXC_W-1:0]   prod;
    logic [PV_W+KEXC_W-1:0]   dec;
    margin = (pv > sp) ? pv - sp : '0;
    prod   = margin * kexc;
    dec    = prod >> KEXC_FRAC;
    return (dec > (PV_W+KEXC_W)'(pv)) ? '0 : pv - dec[PV_W-1:0];
  endfunction

endpackage
