// Shared constants of the hybrid LUT/MUX logic blocks.
//
// Two logic-block (cluster) flavours share these numbers. The non-fracturable
// block has 40 inputs, 10 outputs and ten 6-input, 1-output basic logic
// elements (BLEs); the fracturable block has 80 inputs, 20 outputs and ten
// 8-input, 2-output BLEs. In both, MUX4-type and LUT6-type BLEs are mixed,
// the main mix being 1 MUX4 BLE to 9 LUT6 BLEs, and a 50% depopulated
// crossbar feeds the BLE inputs. The configuration widths below follow from
// this design's own cell layout (see the BLE and crossbar modules): each
// element's logic cells, one register-select cell per BLE output, and one
// select code per crossbar pin.
package hlm_pkg;

  // Logic elements
  localparam int unsigned LUT6_K        = 6;
  localparam int unsigned LUT6_CELLS    = 64;        // 2^6 truth-table cells
  localparam int unsigned MUX4_CELLS    = 4;         // one inversion cell per data input
  localparam int unsigned FRAC_IN       = 8;         // fracturable element pin count
  localparam int unsigned FRAC_SHARED   = 2;         // inputs shared by the two LUT5 halves

  // Non-fracturable cluster
  localparam int unsigned NF_I          = 40;
  localparam int unsigned NF_N          = 10;
  localparam int unsigned NF_K          = 6;
  localparam int unsigned NF_O          = 1;

  // Fracturable cluster
  localparam int unsigned FR_I          = 80;
  localparam int unsigned FR_N          = 10;
  localparam int unsigned FR_K          = 8;
  localparam int unsigned FR_O          = 2;

  // MUX4 BLEs per cluster in the main configuration (1:9 of 10)
  localparam int unsigned N_MUX4_MAIN   = 1;

  // Configuration cells per BLE: element cells plus one register select per output
  localparam int unsigned BLE_NF_LUT_CFG  = LUT6_CELLS + NF_O;          // 65
  localparam int unsigned BLE_NF_MUX_CFG  = MUX4_CELLS + NF_O;          // 5
  localparam int unsigned BLE_FR_LUT_CFG  = LUT6_CELLS + 1 + FR_O;      // 67 (mode cell)
  localparam int unsigned BLE_FR_MUX_CFG  = 2 * MUX4_CELLS + FR_O;      // 10

  // Width of a depopulated-crossbar select code: half the sources plus the
  // constant-0 code must be encodable.
  function automatic int unsigned xbar_sel_w(input int unsigned n_src);
    return $clog2(n_src / 2 + 1);
  endfunction

endpackage
