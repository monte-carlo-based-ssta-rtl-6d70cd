// tb_arc_delay_gen: checks the per-arc delay-sample generator.
//  * Exact: a reference NDRNG with the same seed gives z; one clock later the
//    delay must be MEAN + floor(SIGMA*z/512 + 0.5), clamped to [0, 65535].
//  * Statistics of the main instance (mean 250, sigma 25 units): sample mean
//    within 1 unit of 250 and sample sigma within 5 % of 25.
//  * Two extra instances are set up so that the low clamp (mean 10, sigma 100)
//    and the high clamp (mean 65500, sigma 100) must both act.
module tb_arc_delay_gen;
  import mcssta_pkg::*;
  localparam logic [63:0] SEED = 64'h0F0F_1234_5678_9ABC;
  localparam int unsigned NS   = 10000;

  logic clk = 0, rst_n = 0, en = 0;
  delay_t d_main, d_lo, d_hi;
  z_t z;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  arc_delay_gen #(.MEAN(16'd250),   .SIGMA(16'd25),  .SEED(SEED)) dut   (.clk, .rst_n, .en, .delay_o(d_main));
  arc_delay_gen #(.MEAN(16'd10),    .SIGMA(16'd100), .SEED(SEED)) dut_lo(.clk, .rst_n, .en, .delay_o(d_lo));
  arc_delay_gen #(.MEAN(16'd65500), .SIGMA(16'd100), .SEED(SEED)) dut_hi(.clk, .rst_n, .en, .delay_o(d_hi));
  ndrng #(.SEED(SEED)) ref_n (.clk, .rst_n, .en, .z_o(z));

  function automatic int expect_delay(int mean, int sigma, int zz);
    int v;
    v = mean + $floor(real'(sigma) * real'(zz) / 512.0 + 0.5);
    if (v < 0) v = 0;
    if (v > 65535) v = 65535;
    return v;
  endfunction

  initial begin : watchdog
    repeat (NS + 5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int zp, n_lo = 0, n_hi = 0;
    real s1 = 0.0, s2 = 0.0, m, sd;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    en <= 1'b1;
    repeat (2) @(posedge clk);   // RNG word, first z
    #1;
    zp = int'(z);
    for (int n = 0; n < NS; n++) begin
      @(posedge clk);
      #1;
      checks += 3;
      if (int'(d_main) != expect_delay(250, 25, zp)) begin
        failures++;
        if (failures < 5) $display("main %0d: got %0d exp %0d", n, d_main, expect_delay(250, 25, zp));
      end
      if (int'(d_lo) != expect_delay(10, 100, zp)) failures++;
      if (int'(d_hi) != expect_delay(65500, 100, zp)) failures++;
      if (d_lo == 0) n_lo++;
      if (d_hi == 16'hFFFF) n_hi++;
      s1 += real'(d_main);
      s2 += real'(d_main) * real'(d_main);
      zp = int'(z);
    end
    m  = s1 / NS;
    sd = $sqrt(s2 / NS - m * m);
    $display("arc_delay_gen: mean %f sigma %f, low clamps %0d, high clamps %0d", m, sd, n_lo, n_hi);
    checks++; if (m < 249.0 || m > 251.0) begin failures++; $display("mean off"); end
    checks++; if (sd < 23.75 || sd > 26.25) begin failures++; $display("sigma off"); end
    checks++; if (n_lo == 0) begin failures++; $display("low clamp never acted"); end
    checks++; if (n_hi == 0) begin failures++; $display("high clamp never acted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
