// Testbench of dual_mux4: all 256 input values for random inversion cells,
// against the reference model.
module tb_dual_mux4;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [7:0] in, inv; logic [1:0] out;

  dual_mux4 dut (.in(in), .cfg_inv(inv), .out(out));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 32; r++) begin
      inv = (r < 16) ? 8'(r * 17) : 8'($urandom);
      for (int i = 0; i < 256; i++) begin
        in = 8'(i); #1;
        checks++;
        if (out !== ref_dual(in, inv)) begin
          failures++;
          if (failures < 10) $display("inv=%h in=%h got %b", inv, in, out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
