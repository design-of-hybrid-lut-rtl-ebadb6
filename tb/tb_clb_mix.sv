// Testbench of the other element mixes: clb_nf and clb_frac built with
// 2, 3, 4 and 5 MUX4-type BLEs of 10 (mixes 2:8 to 5:5, the main design
// being 1:9). Each of the eight clusters gets 20 random loop-free
// configurations of 30 cycles each, all outputs checked against the
// reference models with the same number of MUX4-type BLEs.
module tb_clb_mix;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0, done = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar k = 2; k <= 5; k++) begin : g_mix
    localparam int NFW = k * 5 + (NF_N - k) * 65 + 60 * NF_SEL;
    localparam int FRW = k * 10 + (FR_N - k) * 67 + 80 * FR_SEL;
    logic run = 0;
    logic [NF_I-1:0] nf_in = '0;
    logic [FR_I-1:0] fr_in = '0;
    logic [NFW-1:0] nf_cfg = '0;
    logic [FRW-1:0] fr_cfg = '0;
    logic [NF_N-1:0]   nf_out;
    logic [2*FR_N-1:0] fr_out;
    bit [NF_N-1:0]   nf_q, nf_nq, nf_exp;
    bit [2*FR_N-1:0] fr_q, fr_nq, fr_exp;

    clb_nf   #(.N_MUX4(k)) u_nf (.clk, .rst_n, .run, .in(nf_in), .cfg(nf_cfg), .out(nf_out));
    clb_frac #(.N_MUX4(k)) u_fr (.clk, .rst_n, .run, .in(fr_in), .cfg(fr_cfg), .out(fr_out));

    initial begin
      repeat (2) @(negedge clk);
      for (int r = 0; r < 20; r++) begin
        @(negedge clk);
        run = 0;
        nf_cfg = NFW'(nf_gen(k));
        fr_cfg = FRW'(fr_gen(k));
        @(negedge clk);
        run = 1; nf_q = '0; fr_q = '0;
        for (int c = 0; c < 30; c++) begin
          nf_in = {8'($urandom), $urandom};
          fr_in = {16'($urandom), $urandom, $urandom};
          #1;
          nf_eval(nf_cfg, nf_in, nf_q, nf_exp, nf_nq, k);
          fr_eval(fr_cfg, fr_in, fr_q, fr_exp, fr_nq, k);
          checks += 2;
          if (nf_out !== nf_exp) begin
            failures++;
            if (failures < 10) $display("mix %0d:%0d nf: got %b exp %b", k, 10 - k, nf_out, nf_exp);
          end
          if (fr_out !== fr_exp) begin
            failures++;
            if (failures < 10) $display("mix %0d:%0d fr: got %b exp %b", k, 10 - k, fr_out, fr_exp);
          end
          @(negedge clk);
          nf_q = nf_nq; fr_q = fr_nq;
        end
      end
      done++;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (done == 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
