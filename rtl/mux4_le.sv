// MUX4 logic element.
//
// A six-input element with the pin count of a LUT6 but about a tenth of its
// area: four data inputs, each passed through a 2:1 mux that chooses the
// input or its inverse under one configuration cell, and a 4:1 mux (three
// 2:1 muxes) steered by the two select inputs. That is four cells, four
// inverters and seven 2:1 muxes, as the architecture specifies.
//   out = d[s] XOR cfg_inv[s]
// With constant data inputs it realises any 2-input function of s; with a
// variable and its cofactors it realises any 3-input function, some 4- and
// 5-input functions, and the 6-input 4:1 multiplexer itself. Combinational.
// Inside a cluster, lint tools report the combinational loop formed by the
// BLE feedback through the crossbar on this module's ports; it belongs to
// the cluster architecture (see clb_nf), not to the element.
module mux4_le (
  input  logic [3:0] d,        // data inputs
  input  logic [1:0] s,        // select inputs
  input  logic [3:0] cfg_inv,  // inversion cells
  output logic       out
);

  logic [3:0] dv;     // data after optional inversion
  logic [1:0] lvl1;   // first mux level, steered by s[0]

  always_comb begin
    for (int i = 0; i < 4; i++) dv[i] = cfg_inv[i] ? ~d[i] : d[i];
    lvl1[0] = s[0] ? dv[1] : dv[0];
    lvl1[1] = s[0] ? dv[3] : dv[2];
    out     = s[1] ? lvl1[1] : lvl1[0];
  end

endmodule
