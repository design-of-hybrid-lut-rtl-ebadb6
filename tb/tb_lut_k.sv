// Testbench of lut_k at K = 6: for random truth tables, every input value
// must return the addressed truth-table cell; also a K = 5 instance.
module tb_lut_k;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [5:0]  in6;  logic [63:0] t6;  logic o6;
  logic [4:0]  in5;  logic [31:0] t5;  logic o5;

  lut_k            dut6 (.in(in6), .cfg(t6), .out(o6));
  lut_k #(.K(5))   dut5 (.in(in5), .cfg(t5), .out(o5));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 40; r++) begin
      t6 = {$urandom, $urandom};
      t5 = $urandom;
      if (r == 0) t6 = 64'h1;            // single minterm
      for (int i = 0; i < 64; i++) begin
        in6 = 6'(i); in5 = 5'(i);
        @(posedge clk);
        checks++;
        if (o6 !== t6[i]) begin failures++; if (failures < 10) $display("LUT6 t=%h in=%0d got %b", t6, i, o6); end
        checks++;
        if (o5 !== t5[i % 32]) begin failures++; if (failures < 10) $display("LUT5 in=%0d got %b", i % 32, o5); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
