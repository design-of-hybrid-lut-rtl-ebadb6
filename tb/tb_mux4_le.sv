// Testbench of mux4_le: all 4096 combinations of data, select and
// inversion cells against out = d[s] xor inv[s]; also builds two 2-input
// functions (XOR, AND) from constant data as the element is meant to.
module tb_mux4_le;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [3:0] d, inv; logic [1:0] s; logic out;

  mux4_le dut (.d(d), .s(s), .cfg_inv(inv), .out(out));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4096; i++) begin
      {inv, s, d} = 10'(i);
      #1;
      checks++;
      if (out !== ref_mux4(d, s, inv)) begin
        failures++;
        if (failures < 10) $display("d=%b s=%b inv=%b got %b", d, s, inv, out);
      end
    end
    // 2-input functions: data inputs all 0, truth table in the inversion cells
    d = 4'b0000;
    for (int f = 0; f < 2; f++) begin
      inv = (f == 0) ? 4'b0110 : 4'b1000;   // XOR, AND of s[1], s[0]
      for (int v = 0; v < 4; v++) begin
        s = 2'(v); #1;
        checks++;
        if (out !== ((f == 0) ? (s[0] ^ s[1]) : (s[0] & s[1]))) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
