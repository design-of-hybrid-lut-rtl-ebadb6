// Non-fracturable hybrid logic cluster (configurable logic block).
//
// Ten 6-input, 1-output BLEs, N_MUX4 of them MUX4 elements and the rest
// LUT6s (main mix 1:9), are fed by a 50% depopulated crossbar. The crossbar
// sources are the 40 cluster inputs and the 10 BLE outputs (feedback); its
// 60 output pins are the BLE inputs, pin 6*b + j being input j of BLE b.
// The cluster outputs are the BLE outputs. Counts, the element mix and the
// depopulation follow the architecture; the register in each BLE, the cell
// layout and the run input are this design's choices.
// Configuration layout, from bit 0: BLE 0 .. N-1 cells packed back to back
// (MUX4 BLEs first, 5 cells each; LUT6 BLEs 65 cells each), then one 5-bit
// crossbar select code per pin. CFG_W = 890 at the defaults.
// Timing: combinational from in to out through at most the chain of
// unregistered BLEs the configuration forms; registered BLEs update on the
// rising clk edge. A configuration must not close a loop through
// unregistered BLEs only.
// The feedback from BLE outputs back into the crossbar is part of the
// architecture, so lint tools report a combinational loop through the
// crossbar and the BLEs; it is only a real loop if the configuration closes
// one, which a valid configuration never does.
module clb_nf
  import hlm_pkg::*;
#(
  parameter int unsigned I      = NF_I,
  parameter int unsigned N      = NF_N,
  parameter int unsigned N_MUX4 = N_MUX4_MAIN,
  parameter int unsigned SEL_W  = xbar_sel_w(I + N),
  parameter int unsigned CFG_W  = N_MUX4 * BLE_NF_MUX_CFG + (N - N_MUX4) * BLE_NF_LUT_CFG
                                  + N * NF_K * SEL_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  input  logic [I-1:0]     in,
  input  logic [CFG_W-1:0] cfg,
  output logic [N-1:0]     out
);

  localparam int unsigned BLE_CFG_TOTAL = N_MUX4 * BLE_NF_MUX_CFG + (N - N_MUX4) * BLE_NF_LUT_CFG;

  function automatic int unsigned ble_off(input int unsigned b);
    return (b < N_MUX4) ? b * BLE_NF_MUX_CFG
                        : N_MUX4 * BLE_NF_MUX_CFG + (b - N_MUX4) * BLE_NF_LUT_CFG;
  endfunction

  logic [N*NF_K-1:0] pins;
  logic [N-1:0]      ble_out;

  depop_xbar #(.N_SRC(I + N), .N_PIN(N * NF_K), .SEL_W(SEL_W)) u_xbar (
    .src ({ble_out, in}),
    .cfg (cfg[CFG_W-1:BLE_CFG_TOTAL]),
    .pin (pins)
  );

  for (genvar b = 0; b < N; b++) begin : g_ble
    localparam bit          IS_M = (b < N_MUX4);
    localparam int unsigned W    = IS_M ? BLE_NF_MUX_CFG : BLE_NF_LUT_CFG;
    ble_nf #(.IS_MUX4(IS_M)) u_ble (
      .clk  (clk),
      .rst_n(rst_n),
      .run  (run),
      .in   (pins[b*NF_K +: NF_K]),
      .cfg  (cfg[ble_off(b) +: W]),
      .out  (ble_out[b])
    );
  end

  assign out = ble_out;

  initial begin
    assert (N_MUX4 <= N) else $error("clb_nf: N_MUX4 exceeds N");
  end

endmodule
