// Testbench of clb_frac at its defaults (80 inputs, 10 BLEs, 1 dual MUX4 : 9 fracturable
// LUT6): random loop-free configurations and random inputs, all 20
// outputs checked every cycle against the reference cluster model.
module tb_clb_frac;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, run = 0;
  logic [FR_I-1:0] in;
  logic [FR_CFG-1:0] cfg;
  logic [2*FR_N-1:0] out;
  bit   [2*FR_N-1:0] q, nq, exp_out;

  clb_frac dut (.clk, .rst_n, .run, .in, .cfg, .out);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in = '0; cfg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 60; r++) begin
      @(negedge clk);
      run = 0; cfg = FR_CFG'(fr_gen());
      @(negedge clk);
      run = 1; q = '0;
      for (int c = 0; c < 40; c++) begin
        in = {16'($urandom), $urandom, $urandom};
        #1;
        fr_eval(cfg, in, q, exp_out, nq);
        checks++;
        if (out !== exp_out) begin
          failures++;
          if (failures < 10) $display("cfg %0d cycle %0d: got %b exp %b", r, c, out, exp_out);
        end
        @(negedge clk);
        q = nq;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
