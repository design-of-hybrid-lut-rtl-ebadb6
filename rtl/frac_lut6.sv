// Fracturable LUT6: an 8-input, 2-output logic element.
//
// The 64 truth-table cells are split into two LUT5 halves that share two
// inputs. Pins: in[1:0] shared, in[4:2] private to half A, in[7:5] private to
// half B. cfg_lut[31:0] is the table of half A, cfg_lut[63:32] of half B,
// each indexed by {private[2:0], shared[1:0]}.
//   cfg_mode = 0 (dual LUT5): out[0] = A(in[4:0]), out[1] = B(in[7:5], in[1:0]).
//     Two 5-input functions sharing two inputs, or two independent 4-input
//     functions when each half ignores a different shared input.
//   cfg_mode = 1 (LUT6): half B reads half A's private pins, and in[5]
//     chooses between the halves, so out[0] is one 6-input function of
//     in[5:0] with table cfg_lut[63:0]. out[1] then carries half B's value.
// The split into two LUT5s with two shared inputs follows the architecture;
// the pin order and the way the LUT6 mode is formed are this design's
// choices. Combinational.
// Inside a cluster, lint tools report the combinational loop formed by the
// BLE feedback through the crossbar on this module's ports; it belongs to
// the cluster architecture (see clb_frac), not to the element.
module frac_lut6
  import hlm_pkg::*;
(
  input  logic [FRAC_IN-1:0]    in,
  input  logic [LUT6_CELLS-1:0] cfg_lut,
  input  logic                  cfg_mode,
  output logic [1:0]            out
);

  logic [FRAC_SHARED-1:0] shared;
  logic [2:0]             priv_a, priv_b, priv_b_eff;
  logic                   o5a, o5b;

  assign shared     = in[1:0];
  assign priv_a     = in[4:2];
  assign priv_b     = in[7:5];
  assign priv_b_eff = cfg_mode ? priv_a : priv_b;

  lut_k #(.K(5)) u_half_a (.in({priv_a, shared}),     .cfg(cfg_lut[31:0]),  .out(o5a));
  lut_k #(.K(5)) u_half_b (.in({priv_b_eff, shared}), .cfg(cfg_lut[63:32]), .out(o5b));

  assign out[0] = (cfg_mode && in[5]) ? o5b : o5a;
  assign out[1] = o5b;

endmodule
