// End-to-end testbench of hybrid_clb_top at its default parameters.
//
// For several random loop-free configurations of each block: shift the
// configuration word in through the serial chain with run = 0 (checking
// that the outputs stay 0 and that the previous word comes out of the
// chain), then run random inputs and check all 10 + 20 outputs every cycle
// against the reference models. It counts how often each mechanism of the
// design was exercised (MUX4 / dual MUX4 element, LUT6 mode and dual LUT5
// mode of the fracturable LUT6, registered and combinational BLE outputs,
// feedback through the crossbar, constant crossbar codes, configuration
// read-back) and counts a failure for any that never occurred.
// Loading one block takes one clk per configuration bit (890 and 1093).
module tb_hybrid_clb_top;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0;
  logic nf_cfg_shift = 0, nf_cfg_din = 0, nf_cfg_dout, nf_run = 0;
  logic fr_cfg_shift = 0, fr_cfg_din = 0, fr_cfg_dout, fr_run = 0;
  logic [NF_I-1:0] nf_in = '0;
  logic [FR_I-1:0] fr_in = '0;
  logic [NF_N-1:0]   nf_out;
  logic [2*FR_N-1:0] fr_out;

  bit [NF_CFG-1:0] nf_cfg, nf_prev;
  bit [FR_CFG-1:0] fr_cfg, fr_prev;
  bit [NF_N-1:0]   nf_q, nf_nq, nf_exp;
  bit [2*FR_N-1:0] fr_q, fr_nq, fr_exp;

  // mechanism counters
  int n_mux4_used = 0, n_lut6_mode = 0, n_lut5_mode = 0, n_reg = 0, n_comb = 0;
  int n_fb_comb = 0, n_fb_reg = 0, n_const = 0, n_readback = 0, n_hold = 0;
  int n_active_nf = 0, n_active_fr = 0;

  hybrid_clb_top dut (
    .clk, .rst_n,
    .nf_cfg_shift, .nf_cfg_din, .nf_cfg_dout, .nf_run, .nf_in, .nf_out,
    .fr_cfg_shift, .fr_cfg_din, .fr_cfg_dout, .fr_run, .fr_in, .fr_out
  );

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count what a configuration exercises
  task automatic tally();
    for (int b = 0; b < NF_N; b++) begin
      if (nf_reg(nf_cfg, b)) n_reg++; else n_comb++;
    end
    for (int b = 1; b < FR_N; b++) begin
      if (fr_mode(fr_cfg, b)) n_lut6_mode++; else n_lut5_mode++;
    end
    for (int p = 0; p < 60; p++) begin
      int c = nf_code(nf_cfg, p);
      if (c >= NF_REACH) n_const++;
      else if (2 * c + p % 2 >= NF_I) begin
        if (nf_reg(nf_cfg, 2 * c + p % 2 - NF_I)) n_fb_reg++; else n_fb_comb++;
      end
      if (p < 6 && c < NF_REACH) n_mux4_used++;
    end
    for (int p = 0; p < 80; p++) begin
      int c = fr_code(fr_cfg, p);
      if (c >= FR_REACH) n_const++;
      else if (2 * c + p % 2 >= FR_I) begin
        int k = 2 * c + p % 2 - FR_I;
        if (fr_reg(fr_cfg, k / 2, k % 2)) n_fb_reg++; else n_fb_comb++;
      end
    end
  endtask

  initial begin
    nf_prev = '0; fr_prev = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 6; r++) begin
      nf_cfg = NF_CFG'(nf_gen());
      fr_cfg = FR_CFG'(fr_gen());
      tally();
      // configuration phase: both chains shift together, run = 0
      @(negedge clk);
      nf_run = 0; fr_run = 0;
      for (int i = 0; i < FR_CFG; i++) begin
        @(negedge clk);
        if (i < NF_CFG) begin
          checks++;
          if (nf_cfg_dout !== nf_prev[i]) failures++; else n_readback++;
        end
        checks++;
        if (fr_cfg_dout !== fr_prev[i]) failures++; else n_readback++;
        nf_cfg_shift = (i < NF_CFG);
        nf_cfg_din   = (i < NF_CFG) ? nf_cfg[i] : 1'b0;
        fr_cfg_shift = 1;
        fr_cfg_din   = fr_cfg[i];
        nf_in = {8'($urandom), $urandom};
        fr_in = {16'($urandom), $urandom, $urandom};
        #1;
        checks++;
        if (nf_out !== '0 || fr_out !== '0) failures++; else n_hold++;
      end
      @(negedge clk);
      nf_cfg_shift = 0; fr_cfg_shift = 0;
      nf_prev = nf_cfg; fr_prev = fr_cfg;
      // run phase
      @(negedge clk);
      nf_run = 1; fr_run = 1;
      nf_q = '0; fr_q = '0;
      for (int c = 0; c < 300; c++) begin
        nf_in = {8'($urandom), $urandom};
        fr_in = {16'($urandom), $urandom, $urandom};
        #1;
        nf_eval(nf_cfg, nf_in, nf_q, nf_exp, nf_nq);
        fr_eval(fr_cfg, fr_in, fr_q, fr_exp, fr_nq);
        checks += 2;
        if (nf_out !== nf_exp) begin
          failures++;
          if (failures < 10) $display("cfg %0d cycle %0d nf: got %b exp %b", r, c, nf_out, nf_exp);
        end
        if (fr_out !== fr_exp) begin
          failures++;
          if (failures < 10) $display("cfg %0d cycle %0d fr: got %b exp %b", r, c, fr_out, fr_exp);
        end
        if (nf_exp != '0) n_active_nf++;
        if (fr_exp != '0) n_active_fr++;
        @(negedge clk);
        nf_q = nf_nq; fr_q = fr_nq;
      end
    end
    $display("mechanisms: mux4_pins=%0d lut6_mode=%0d dual_lut5_mode=%0d registered=%0d combinational=%0d",
             n_mux4_used, n_lut6_mode, n_lut5_mode, n_reg, n_comb);
    $display("            feedback_comb=%0d feedback_reg=%0d const_code=%0d readback=%0d hold=%0d active=%0d/%0d",
             n_fb_comb, n_fb_reg, n_const, n_readback, n_hold, n_active_nf, n_active_fr);
    if (n_mux4_used == 0 || n_lut6_mode == 0 || n_lut5_mode == 0 || n_reg == 0 || n_comb == 0 ||
        n_fb_comb == 0 || n_fb_reg == 0 || n_const == 0 || n_readback == 0 || n_hold == 0 ||
        n_active_nf == 0 || n_active_fr == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
