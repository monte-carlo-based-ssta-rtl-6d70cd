// tb_ndrng: checks the central-limit normal generator.
//  * Exact: a separate LFSR RNG with the same seed supplies the uniform bits; the
//    sample one clock later must equal 2*sum(u_i) - 12*255 (in 1/512 units).
//  * Statistics over 20000 samples: mean within 0.03, variance within 5 % of 1,
//    and no sample beyond 6 sigma.
//  * en low must hold the output.
module tb_ndrng;
  import mcssta_pkg::*;
  localparam logic [63:0] SEED = 64'h5555_0000_AAAA_1234;
  localparam int unsigned NS   = 20000;

  logic clk = 0, rst_n = 0, en = 0;
  z_t z;
  logic [N_UNIF*U_W-1:0] rnd;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ndrng #(.SEED(SEED)) dut (.clk(clk), .rst_n(rst_n), .en(en), .z_o(z));
  lfsr_rng #(.OUT_W(N_UNIF*U_W), .SEED(SEED)) ref_rng (.clk(clk), .rst_n(rst_n), .en(en), .rnd_o(rnd));

  initial begin : watchdog
    repeat (NS + 5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_z, prev_exp, held;
    real zr, s1 = 0.0, s2 = 0.0, mean, var_z, zmax = 0.0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    en <= 1'b1;
    @(posedge clk);            // first RNG word
    #1;
    prev_exp = 0;
    for (int i = 0; i < N_UNIF; i++) prev_exp += 2 * int'(rnd[i*U_W +: U_W]);
    prev_exp -= N_UNIF * 255;
    for (int n = 0; n < NS; n++) begin
      @(posedge clk);
      #1;
      checks++;
      if (int'(z) != prev_exp) begin
        failures++;
        if (failures < 5) $display("sample %0d: got %0d exp %0d", n, z, prev_exp);
      end
      zr = real'(int'(z)) / 512.0;
      s1 += zr;
      s2 += zr * zr;
      if (zr > zmax) zmax = zr;
      if (-zr > zmax) zmax = -zr;
      exp_z = 0;
      for (int i = 0; i < N_UNIF; i++) exp_z += 2 * int'(rnd[i*U_W +: U_W]);
      prev_exp = exp_z - N_UNIF * 255;
      if (n == 100) begin
        en <= 1'b0;
        held = int'(z);
        repeat (3) @(posedge clk);
        #1;
        checks++;
        if (int'(z) != held) begin failures++; $display("stall did not hold"); end
        en <= 1'b1;
      end
    end
    mean  = s1 / NS;
    var_z = s2 / NS - mean * mean;
    $display("ndrng: mean %f variance %f max|z| %f", mean, var_z, zmax);
    checks++; if (mean > 0.03 || mean < -0.03) begin failures++; $display("mean off"); end
    checks++; if (var_z < 0.95 || var_z > 1.05) begin failures++; $display("variance off"); end
    checks++; if (zmax > 6.0) begin failures++; $display("range off"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
