// Fracturable basic logic element (BLE): 8 inputs, 2 outputs.
//
// The logic element is a fracturable LUT6 (IS_MUX4 = 0) or a dual MUX4
// element (IS_MUX4 = 1), fixed when the cluster is built. Each of the two
// outputs has its own flip-flop and registered/combinational select; the
// registers and the run input are this design's choices.
// Configuration cells:
//   fracturable LUT6: cfg[63:0] tables, cfg[64] LUT6 mode, cfg[66:65] register selects, CFG_W = 67
//   dual MUX4:        cfg[7:0] inversion cells, cfg[9:8] register selects, CFG_W = 10
// Timing as in ble_nf: combinational in -> out, registers load on the rising
// clk edge, run = 0 holds the outputs at 0 and clears the registers, rst_n
// clears them asynchronously.
// Inside a cluster, lint tools report the combinational loop formed by the
// BLE feedback through the crossbar on this module's ports; it belongs to
// the cluster architecture (see clb_frac), not to the BLE.
module ble_frac
  import hlm_pkg::*;
#(
  parameter bit          IS_MUX4 = 1'b0,
  parameter int unsigned CFG_W   = IS_MUX4 ? BLE_FR_MUX_CFG : BLE_FR_LUT_CFG
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  input  logic [FR_K-1:0]   in,
  input  logic [CFG_W-1:0]  cfg,
  output logic [FR_O-1:0]   out
);

  logic [FR_O-1:0] comb_out;
  logic [FR_O-1:0] q;
  logic [FR_O-1:0] reg_sel;

  assign reg_sel = cfg[CFG_W-1 -: FR_O];

  if (IS_MUX4) begin : g_mux4
    dual_mux4 u_le (.in(in), .cfg_inv(cfg[2*MUX4_CELLS-1:0]), .out(comb_out));
  end else begin : g_lut6
    frac_lut6 u_le (.in(in), .cfg_lut(cfg[LUT6_CELLS-1:0]), .cfg_mode(cfg[LUT6_CELLS]), .out(comb_out));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (!run) q <= '0;
    else           q <= comb_out;
  end

  always_comb begin
    for (int o = 0; o < FR_O; o++) out[o] = run & (reg_sel[o] ? q[o] : comb_out[o]);
  end

endmodule
