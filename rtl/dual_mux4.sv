// Dual MUX4 logic element: two MUX4 elements in the pin budget of a
// fracturable LUT6 (8 inputs, 2 outputs).
//
// The two MUX4s share their four data inputs in[3:0] and each has its own
// two select inputs: in[5:4] for MUX4 A (out[0]) and in[7:6] for MUX4 B
// (out[1]). Each MUX4 keeps its own four inversion cells, cfg_inv[3:0] for A
// and cfg_inv[7:4] for B. The sharing follows the architecture; pin order
// and separate inversion cells are this design's choices. Combinational.
module dual_mux4 (
  input  logic [7:0] in,
  input  logic [7:0] cfg_inv,
  output logic [1:0] out
);

  mux4_le u_mux_a (.d(in[3:0]), .s(in[5:4]), .cfg_inv(cfg_inv[3:0]), .out(out[0]));
  mux4_le u_mux_b (.d(in[3:0]), .s(in[7:6]), .cfg_inv(cfg_inv[7:4]), .out(out[1]));

endmodule
