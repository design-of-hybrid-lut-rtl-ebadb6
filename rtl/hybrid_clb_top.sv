// Hybrid LUT/MUX logic blocks: the non-fracturable and the fracturable
// cluster side by side, each with its own serial configuration chain.
//
// Each block is configured by shifting its configuration word in LSB first
// (cfg_shift = 1 for CFG_W rising clk edges, run = 0 meanwhile), then
// operated with run = 1; assertions flag a shift while run is 1. The
// configuration words are laid out as described
// in clb_nf and clb_frac. The two blocks share only clk and rst_n.
// Timing: one clk per configuration bit; afterwards the blocks behave as
// configured (combinational paths, or one register stage per registered
// BLE output). Both blocks, their sizes and their 1:9 element mix follow
// the architecture; the serial loading and run are this design's choices.
// The combinational loop that lint tools report through each
// block's crossbar is the architectural BLE feedback; see clb_nf.
module hybrid_clb_top
  import hlm_pkg::*;
#(
  parameter int unsigned NF_MUX4 = N_MUX4_MAIN,
  parameter int unsigned FR_MUX4 = N_MUX4_MAIN,
  parameter int unsigned NF_CFG_W = NF_MUX4 * BLE_NF_MUX_CFG + (NF_N - NF_MUX4) * BLE_NF_LUT_CFG
                                    + NF_N * NF_K * xbar_sel_w(NF_I + NF_N * NF_O),
  parameter int unsigned FR_CFG_W = FR_MUX4 * BLE_FR_MUX_CFG + (FR_N - FR_MUX4) * BLE_FR_LUT_CFG
                                    + FR_N * FR_K * xbar_sel_w(FR_I + FR_N * FR_O)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // non-fracturable block
  input  logic                  nf_cfg_shift,
  input  logic                  nf_cfg_din,
  output logic                  nf_cfg_dout,
  input  logic                  nf_run,
  input  logic [NF_I-1:0]       nf_in,
  output logic [NF_N*NF_O-1:0]  nf_out,
  // fracturable block
  input  logic                  fr_cfg_shift,
  input  logic                  fr_cfg_din,
  output logic                  fr_cfg_dout,
  input  logic                  fr_run,
  input  logic [FR_I-1:0]       fr_in,
  output logic [FR_N*FR_O-1:0]  fr_out
);

  logic [NF_CFG_W-1:0] nf_cfg;
  logic [FR_CFG_W-1:0] fr_cfg;

  cfg_chain #(.N(NF_CFG_W)) u_nf_chain (
    .clk, .rst_n, .shift(nf_cfg_shift), .din(nf_cfg_din), .dout(nf_cfg_dout), .q(nf_cfg)
  );

  clb_nf #(.N_MUX4(NF_MUX4), .CFG_W(NF_CFG_W)) u_nf (
    .clk, .rst_n, .run(nf_run), .in(nf_in), .cfg(nf_cfg), .out(nf_out)
  );

  cfg_chain #(.N(FR_CFG_W)) u_fr_chain (
    .clk, .rst_n, .shift(fr_cfg_shift), .din(fr_cfg_din), .dout(fr_cfg_dout), .q(fr_cfg)
  );

  clb_frac #(.N_MUX4(FR_MUX4), .CFG_W(FR_CFG_W)) u_fr (
    .clk, .rst_n, .run(fr_run), .in(fr_in), .cfg(fr_cfg), .out(fr_out)
  );

  // Configuration is shifted only while the block's logic is held (run = 0)
  a_nf_shift_held: assert property (@(posedge clk) disable iff (!rst_n) nf_cfg_shift |-> !nf_run)
    else $error("hybrid_clb_top: non-fracturable configuration shifted while running");
  a_fr_shift_held: assert property (@(posedge clk) disable iff (!rst_n) fr_cfg_shift |-> !fr_run)
    else $error("hybrid_clb_top: fracturable configuration shifted while running");

endmodule
