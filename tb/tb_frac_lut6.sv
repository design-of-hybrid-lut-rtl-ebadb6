// Testbench of frac_lut6: random tables, both modes, all 256 input values,
// against the reference model; plus two independent 4-input functions
// (AND4 on half A ignoring in[1], XOR4 on half B ignoring in[0]).
module tb_frac_lut6;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [7:0] in; logic [63:0] t; logic mode; logic [1:0] out;

  frac_lut6 dut (.in(in), .cfg_lut(t), .cfg_mode(mode), .out(out));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 40; r++) begin
      t = {$urandom, $urandom};
      mode = 1'(r % 2);
      for (int i = 0; i < 256; i++) begin
        in = 8'(i); #1;
        checks++;
        if (out !== ref_frac(in, t, mode)) begin
          failures++;
          if (failures < 10) $display("mode=%b in=%h got %b exp %b", mode, in, out, ref_frac(in, t, mode));
        end
      end
    end
    // Two independent 4-input functions
    mode = 0;
    for (int i = 0; i < 32; i++) begin
      t[i]      = (i[0] && i[2] && i[3] && i[4]);            // A: in0,in2,in3,in4
      t[32 + i] = i[1] ^ i[2] ^ i[3] ^ i[4];                  // B: in1,in5,in6,in7
    end
    for (int i = 0; i < 256; i++) begin
      in = 8'(i); #1;
      checks++;
      if (out[0] !== (in[0] & in[2] & in[3] & in[4]) || out[1] !== (in[1] ^ in[5] ^ in[6] ^ in[7])) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
