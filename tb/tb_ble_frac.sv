// Testbench of ble_frac, fracturable-LUT6 and dual-MUX4 variants: random
// configurations (both LUT modes, all register selects) and inputs,
// outputs checked cycle by cycle against the reference model.
module tb_ble_frac;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, run = 0;
  logic [7:0] in;
  logic [66:0] cfg_l; logic [9:0] cfg_m;
  logic [1:0] out_l, out_m;
  bit [1:0] q_l, q_m, c_l, c_m, e_l, e_m;

  ble_frac #(.IS_MUX4(0)) dut_l (.clk, .rst_n, .run, .in, .cfg(cfg_l), .out(out_l));
  ble_frac #(.IS_MUX4(1)) dut_m (.clk, .rst_n, .run, .in, .cfg(cfg_m), .out(out_m));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_l = '0; cfg_m = '0; in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    q_l = 0; q_m = 0;
    for (int r = 0; r < 40; r++) begin
      @(negedge clk);
      cfg_l = {3'(r % 8), $urandom, $urandom};   // register selects and mode walk all 8 values
      cfg_m = {2'(r % 4), 8'($urandom)};
      run = 1;
      for (int c = 0; c < 50; c++) begin
        if (c > 0) @(negedge clk);
        in = 8'($urandom);
        #1;
        c_l = ref_frac(in, cfg_l[63:0], cfg_l[64]);
        c_m = ref_dual(in, cfg_m[7:0]);
        for (int o = 0; o < 2; o++) begin
          e_l[o] = cfg_l[65 + o] ? q_l[o] : c_l[o];
          e_m[o] = cfg_m[8 + o]  ? q_m[o] : c_m[o];
        end
        checks += 2;
        if (out_l !== e_l) begin failures++; if (failures < 10) $display("frac LUT6 BLE got %b exp %b", out_l, e_l); end
        if (out_m !== e_m) begin failures++; if (failures < 10) $display("dual MUX4 BLE got %b exp %b", out_m, e_m); end
        @(posedge clk);
        q_l = c_l; q_m = c_m;
      end
      @(negedge clk);
      run = 0;
      #1;
      checks++;
      if (out_l !== 2'b00 || out_m !== 2'b00) failures++;
      @(posedge clk);
      q_l = 0; q_m = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
