// Configuration memory of a logic cluster, written serially.
//
// The cluster's configuration (SRAM) cells are held in N flip-flops that
// form a shift chain. While shift is 1, each rising clk edge moves every
// cell down by one and din enters cell N-1, so after N shifts the first bit
// sent sits in cell 0: send the configuration word LSB first. dout is cell 0,
// for daisy-chaining. rst_n clears all cells asynchronously. The serial
// loading scheme is this design's choice; the architecture only specifies
// the cells themselves.
module cfg_chain #(
  parameter int unsigned N = 890
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic         din,
  output logic         dout,
  output logic [N-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (shift) q <= {din, q[N-1:1]};
  end

  assign dout = q[0];

endmodule
