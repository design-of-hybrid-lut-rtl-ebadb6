// Fracturable hybrid logic cluster (configurable logic block).
//
// Ten 8-input, 2-output BLEs, N_MUX4 of them dual MUX4 elements and the rest
// fracturable LUT6s (main mix 1:9), are fed by a 50% depopulated crossbar.
// The crossbar sources are the 80 cluster inputs and the 20 BLE outputs
// (feedback); its 80 output pins are the BLE inputs, pin 8*b + j being input
// j of BLE b. Cluster output 2*b + o is output o of BLE b. Counts, the
// element mix and the depopulation follow the architecture; the registers,
// the cell layout and the run input are this design's choices.
// Configuration layout, from bit 0: BLE 0 .. N-1 cells packed back to back
// (dual MUX4 BLEs first, 10 cells each; fracturable LUT6 BLEs 67 cells
// each), then one 6-bit crossbar select code per pin. CFG_W = 1093 at the
// defaults.
// Timing: as clb_nf; a configuration must not close a loop through
// unregistered BLE outputs only.
// The feedback from BLE outputs back into the crossbar is part of the
// architecture, so lint tools report a combinational loop through the
// crossbar and the BLEs; it is only a real loop if the configuration closes
// one, which a valid configuration never does.
module clb_frac
  import hlm_pkg::*;
#(
  parameter int unsigned I      = FR_I,
  parameter int unsigned N      = FR_N,
  parameter int unsigned N_MUX4 = N_MUX4_MAIN,
  parameter int unsigned SEL_W  = xbar_sel_w(I + N * FR_O),
  parameter int unsigned CFG_W  = N_MUX4 * BLE_FR_MUX_CFG + (N - N_MUX4) * BLE_FR_LUT_CFG
                                  + N * FR_K * SEL_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               run,
  input  logic [I-1:0]       in,
  input  logic [CFG_W-1:0]   cfg,
  output logic [N*FR_O-1:0]  out
);

  localparam int unsigned BLE_CFG_TOTAL = N_MUX4 * BLE_FR_MUX_CFG + (N - N_MUX4) * BLE_FR_LUT_CFG;

  function automatic int unsigned ble_off(input int unsigned b);
    return (b < N_MUX4) ? b * BLE_FR_MUX_CFG
                        : N_MUX4 * BLE_FR_MUX_CFG + (b - N_MUX4) * BLE_FR_LUT_CFG;
  endfunction

  logic [N*FR_K-1:0] pins;
  logic [N*FR_O-1:0] ble_out;

  depop_xbar #(.N_SRC(I + N * FR_O), .N_PIN(N * FR_K), .SEL_W(SEL_W)) u_xbar (
    .src ({ble_out, in}),
    .cfg (cfg[CFG_W-1:BLE_CFG_TOTAL]),
    .pin (pins)
  );

  for (genvar b = 0; b < N; b++) begin : g_ble
    localparam bit          IS_M = (b < N_MUX4);
    localparam int unsigned W    = IS_M ? BLE_FR_MUX_CFG : BLE_FR_LUT_CFG;
    ble_frac #(.IS_MUX4(IS_M)) u_ble (
      .clk  (clk),
      .rst_n(rst_n),
      .run  (run),
      .in   (pins[b*FR_K +: FR_K]),
      .cfg  (cfg[ble_off(b) +: W]),
      .out  (ble_out[b*FR_O +: FR_O])
    );
  end

  assign out = ble_out;

  initial begin
    assert (N_MUX4 <= N) else $error("clb_frac: N_MUX4 exceeds N");
  end

endmodule
