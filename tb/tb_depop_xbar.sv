// Testbench of depop_xbar at the non-fracturable size (50 sources, 60
// pins): every select code of every pin, including the constant-0 codes,
// checked against source 2c + (pin mod 2), with random source values.
module tb_depop_xbar;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [49:0] src; logic [299:0] cfg; logic [59:0] pin;

  depop_xbar dut (.src(src), .cfg(cfg), .pin(pin));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 64; r++) begin
      src = {18'($urandom), $urandom};
      for (int p = 0; p < 60; p++) cfg[p*5 +: 5] = 5'((p + r) % 32);
      #1;
      for (int p = 0; p < 60; p++) begin
        checks++;
        if (pin[p] !== ref_xbar(128'(src), 25, p, (p + r) % 32)) begin
          failures++;
          if (failures < 10) $display("pin %0d code %0d got %b", p, (p + r) % 32, pin[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
