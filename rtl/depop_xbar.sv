// 50% depopulated local crossbar of a logic cluster.
//
// Sources are the cluster inputs followed by the BLE outputs (feedback).
// A full crossbar would give every BLE input pin a mux over all N_SRC
// sources; here each pin's mux reaches only half of them, which is where
// the cluster's interconnect area saving comes from. Pin p reaches the
// sources 2c + (p mod 2), c = 0 .. N_SRC/2-1: even pins see the even
// sources, odd pins the odd ones, so every source reaches every BLE through
// half of its pins. Select code c picks source 2c + (p mod 2); a code of
// N_SRC/2 or more gives constant 0 (used, with a MUX4 inversion cell, for
// truth-table constants). The depopulation ratio follows the architecture;
// the connection pattern and the constant code are this design's choices.
// cfg holds one SEL_W-bit code per pin, pin 0 in the low bits.
// Combinational.
// Inside a cluster, lint tools report the combinational loop that runs from
// the BLE outputs back through this crossbar; it is the architecture's
// feedback path (see clb_nf).
module depop_xbar
  import hlm_pkg::*;
#(
  parameter int unsigned N_SRC = NF_I + NF_N * NF_O,   // 50
  parameter int unsigned N_PIN = NF_N * NF_K,          // 60
  parameter int unsigned SEL_W = xbar_sel_w(N_SRC)
) (
  input  logic [N_SRC-1:0]       src,
  input  logic [N_PIN*SEL_W-1:0] cfg,
  output logic [N_PIN-1:0]       pin
);

  localparam int unsigned N_REACH = N_SRC / 2;

  for (genvar p = 0; p < N_PIN; p++) begin : g_pin
    // The N_REACH sources this pin can reach, then the constant-0 entries
    logic [2**SEL_W-1:0] reach;
    for (genvar c = 0; c < 2**SEL_W; c++) begin : g_reach
      if (c < N_REACH) begin : g_src
        assign reach[c] = src[2*c + (p % 2)];
      end else begin : g_zero
        assign reach[c] = 1'b0;
      end
    end
    assign pin[p] = reach[cfg[p*SEL_W +: SEL_W]];
  end

  initial begin
    assert (N_SRC % 2 == 0) else $error("depop_xbar: N_SRC must be even");
  end

endmodule
