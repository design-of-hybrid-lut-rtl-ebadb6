// K-input lookup table (LUT6 by default).
//
// The truth table sits in 2^K configuration cells; cfg[i] is the output when
// the inputs, read as a binary number, equal i. The output is picked by a tree
// of 2:1 multiplexers, K levels deep with 2^K-1 muxes in all: in[0] steers
// the first level (next to the cells) and in[K-1] the last. This is the
// classic structure of a LUT; the bit order of the truth table is this
// design's choice. Purely combinational. The fracturable LUT6 uses two
// instances with K=5.
// Inside a cluster, lint tools report the combinational loop formed by the
// BLE feedback through the crossbar on this module's ports; it belongs to
// the cluster architecture (see clb_nf) and is not a loop inside the LUT.
module lut_k #(
  parameter int unsigned K = 6
) (
  input  logic [K-1:0]      in,
  input  logic [2**K-1:0]   cfg,
  output logic              out
);

  // level[l] holds the 2^(K-l) values that remain after l mux levels
  logic [2**K-1:0] level [K+1];

  always_comb begin
    for (int l = 0; l <= K; l++) level[l] = '0;
    level[0] = cfg;
    for (int l = 0; l < K; l++) begin
      for (int m = 0; m < 2**(K-l-1); m++) begin
        level[l+1][m] = in[l] ? level[l][2*m+1] : level[l][2*m];
      end
    end
  end

  assign out = level[K][0];

endmodule
