// Non-fracturable basic logic element (BLE): 6 inputs, 1 output.
//
// The logic element is a LUT6 (IS_MUX4 = 0) or a MUX4 element (IS_MUX4 = 1),
// fixed when the cluster is built; a cluster mixes both kinds. Its output goes
// to a flip-flop and a 2:1 mux picks the registered or the combinational
// value, as in the usual BLE. The register and the run input are this
// design's choices.
// Configuration cells, cfg[CFG_W-1] = register select (1 = registered):
//   LUT6: cfg[63:0] truth table, CFG_W = 65
//   MUX4: cfg[3:0] inversion cells, in[3:0] are data and in[5:4] select, CFG_W = 5
// Timing: the combinational path is in -> out with no clock; the register
// loads on the rising clk edge. While run is 0 the output is held at 0 and
// the register is cleared, so a partly shifted configuration cannot
// oscillate through the cluster feedback. rst_n clears the register
// asynchronously.
// Inside a cluster, lint tools report the combinational loop formed by the
// BLE feedback through the crossbar on this module's ports; it belongs to
// the cluster architecture (see clb_nf), not to the BLE.
module ble_nf
  import hlm_pkg::*;
#(
  parameter bit          IS_MUX4 = 1'b0,
  parameter int unsigned CFG_W   = IS_MUX4 ? BLE_NF_MUX_CFG : BLE_NF_LUT_CFG
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  input  logic [NF_K-1:0]   in,
  input  logic [CFG_W-1:0]  cfg,
  output logic              out
);

  logic comb_out;
  logic q;

  if (IS_MUX4) begin : g_mux4
    mux4_le u_le (.d(in[3:0]), .s(in[5:4]), .cfg_inv(cfg[MUX4_CELLS-1:0]), .out(comb_out));
  end else begin : g_lut6
    lut_k #(.K(LUT6_K)) u_le (.in(in), .cfg(cfg[LUT6_CELLS-1:0]), .out(comb_out));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= 1'b0;
    else if (!run) q <= 1'b0;
    else           q <= comb_out;
  end

  assign out = run & (cfg[CFG_W-1] ? q : comb_out);

endmodule
