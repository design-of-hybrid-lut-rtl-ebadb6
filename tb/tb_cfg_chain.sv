// Testbench of cfg_chain at its default length: shift two random words in
// LSB first, check every cell and the serial output (the previous word
// comes out LSB first while the next one goes in), and that cells hold
// while shift is 0.
module tb_cfg_chain;
  int checks = 0, failures = 0;
  localparam int N = 890;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, shift = 0, din = 0, dout;
  logic [N-1:0] q;
  bit   [N-1:0] w0, w1;

  cfg_chain dut (.clk, .rst_n, .shift, .din, .dout, .q);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin w0[i] = 1'($urandom); w1[i] = 1'($urandom); end
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++; if (q !== '0) failures++;
    for (int i = 0; i < N; i++) begin
      @(negedge clk); shift = 1; din = w0[i];
    end
    @(negedge clk); shift = 0;
    checks++; if (q !== w0) begin failures++; $display("word 0 not loaded"); end
    repeat (5) @(negedge clk);
    checks++; if (q !== w0) failures++;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      checks++; if (dout !== w0[i]) failures++;
      shift = 1; din = w1[i];
    end
    @(negedge clk); shift = 0;
    checks++; if (q !== w1) begin failures++; $display("word 1 not loaded"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
