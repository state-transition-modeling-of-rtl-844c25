// mr_protection_logic: the manual-reset variable-setpoint protection logic of
// one channel, one mr_vsp_bistable per process variable (by default three:
// low pressurizer pressure and low steam generator pressure for two steam
// generators; the count is this design's choice).
//
// Bistable i answers to test identifier i. All bistables share one tagged
// stimulus bus from the test logic; only the addressed one evaluates it. Their
// tagged outputs are gathered into one held register, test_out_o: valid is a
// one-cycle strobe, while id and trip keep the last tagged result until the
// next one, so that the test logic can compare the identifier of the latest
// output with the one it expects. After reset id reads all ones, which names
// no process variable.
//
// Timing: a stimulus in cycle n is evaluated by the bistable in n+1 and shows
// in test_out_o in n+2.
module mr_protection_logic
  import pst_pkg::*;
#(
  parameter int unsigned N_PV   = 3,             // process variables (bistables)
  parameter pv_t         MARGIN = pv_t'(2000),   // margin below a rising PV
  parameter pv_t         STEP   = pv_t'(1000)    // setpoint decrease per manual reset
) (
  input  logic      clk,
  input  logic      rst_n,
  input  pv_t       pv_i       [N_PV],  // process variables
  input  logic      pv_tick_i,          // setpoint update strobe
  input  logic      reset_pb_i [N_PV],  // manual setpoint reset pulses
  input  test_in_t  test_in_i,          // tagged stimulus from the test logic
  output logic      trip_o     [N_PV],  // channel trips, to coincidence logic
  output pv_t       sp_o       [N_PV],  // current setpoints
  output pv_t       pv_o       [N_PV],  // registered process variables
  output test_out_t test_out_o          // last tagged output, to the test logic only
);

  test_out_t bs_out [N_PV];

  for (genvar i = 0; i < N_PV; i++) begin : g_bs
    mr_vsp_bistable #(
      .MARGIN (MARGIN),
      .STEP   (STEP),
      .TEST_ID(test_id_t'(i))
    ) u_bs (
      .clk       (clk),
      .rst_n     (rst_n),
      .pv_i      (pv_i[i]),
      .pv_tick_i (pv_tick_i),
      .reset_pb_i(reset_pb_i[i]),
      .test_in_i (test_in_i),
      .trip_o    (trip_o[i]),
      .sp_o      (sp_o[i]),
      .pv_o      (pv_o[i]),
      .test_out_o(bs_out[i])
    );
  end

  // Gather: only the addressed bistable produces a tagged output in a cycle
  test_out_t gathered;
  always_comb begin
    gathered = '{valid: 1'b0, id: '0, trip: 1'b0};
    for (int i = N_PV - 1; i >= 0; i--)
      if (bs_out[i].valid) gathered = bs_out[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      test_out_o <= '{valid: 1'b0, id: '1, trip: 1'b0};
    end else begin
      test_out_o.valid <= gathered.valid;
      if (gathered.valid) begin
        test_out_o.id   <= gathered.id;
        test_out_o.trip <= gathered.trip;
      end
    end
  end

endmodule
