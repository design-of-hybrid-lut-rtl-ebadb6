// Testbench of ble_nf, LUT6 and MUX4 variants: random configurations and
// inputs, combinational and registered outputs checked cycle by cycle
// (a registered output shows last cycle's function value), and the run
// input holding the output at 0 and clearing the register.
module tb_ble_nf;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, run = 0;
  logic [5:0] in;
  logic [64:0] cfg_l; logic [4:0] cfg_m;
  logic out_l, out_m;
  bit   q_l, q_m, c_l, c_m;
  int   n_reg = 0, n_comb = 0;

  ble_nf #(.IS_MUX4(0)) dut_l (.clk, .rst_n, .run, .in, .cfg(cfg_l), .out(out_l));
  ble_nf #(.IS_MUX4(1)) dut_m (.clk, .rst_n, .run, .in, .cfg(cfg_m), .out(out_m));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit exp_l, bit exp_m);
    checks += 2;
    if (out_l !== exp_l) begin failures++; if (failures < 10) $display("LUT6 BLE got %b exp %b", out_l, exp_l); end
    if (out_m !== exp_m) begin failures++; if (failures < 10) $display("MUX4 BLE got %b exp %b", out_m, exp_m); end
  endtask

  initial begin
    cfg_l = '0; cfg_m = '0; in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    q_l = 0; q_m = 0;
    for (int r = 0; r < 40; r++) begin
      @(negedge clk);
      cfg_l = {1'($urandom), $urandom, $urandom};
      cfg_m = 5'($urandom);
      run = 1;
      if (cfg_l[64]) n_reg++; else n_comb++;
      for (int c = 0; c < 50; c++) begin
        if (c > 0) @(negedge clk);
        in = 6'($urandom);
        #1;
        c_l = cfg_l[in];
        c_m = ref_mux4(in[3:0], in[5:4], cfg_m[3:0]);
        check(cfg_l[64] ? q_l : c_l, cfg_m[4] ? q_m : c_m);
        @(posedge clk);
        q_l = c_l; q_m = c_m;
      end
      // run low: outputs 0, registers cleared
      @(negedge clk);
      run = 0;
      #1 check(0, 0);
      @(posedge clk);
      q_l = 0; q_m = 0;
    end
    if (n_reg == 0 || n_comb == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
