// tb_mcssta_top: end-to-end test of the MC-SSTA engine on the ISCAS-85 c17
// netlist (depth 3), small enough to run long sequences quickly.
//  * Every reported circuit-delay sample is recomputed exactly from the delay
//    samples the DGLCs applied (mcssta_run_checker); this also proves that the
//    link registers keep reconvergent paths in the same run.
//  * Latency: first sample D+1 = 4 enabled clocks after the start and after each
//    mode switch (the switch flushes the runs in flight).
//  * Sample count: one sample per enabled clock once the pipeline is full.
//  * Statistics: mean and sigma of the max and min circuit delay against a
//    software Monte Carlo with Box-Muller normals (20000 runs).
//  * Histogram: every bin against the testbench's own binning, including samples
//    below the base (bin 0) and beyond the last bin (tail bin), then clear.
// Mechanisms counted (each must occur): stall, max->min switch, min->max switch,
// histogram underflow, histogram tail clamp.
module tb_mcssta_top;
  import mcssta_pkg::*;
  import mcssta_ref_pkg::*;

  localparam int unsigned NB = 64, HBASE = 700, HSHIFT = 2;
  localparam int          NPH [3] = '{4000, 4000, 1000};

  logic clk = 0, rst_n = 0, en = 0, mode_min = 0, hclr = 0;
  delay_t dly;
  logic   dvalid;
  logic [5:0]  haddr = '0;
  logic [31:0] hdata, hcount;
  delay_t probe [C17_N_GATES][MAX_FANIN];
  int c_checks, c_failures, depth;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mcssta_top #(
    .N_PI(C17_N_PI), .N_GATES(C17_N_GATES), .N_PO(C17_N_PO), .GATES(C17_GATES), .PO(C17_PO),
    .HIST_BINS(NB), .HIST_BASE(delay_t'(HBASE)), .HIST_SHIFT(HSHIFT)
  ) dut (
    .clk, .rst_n, .en, .mode_min, .delay_o(dly), .delay_valid_o(dvalid),
    .hist_clear_i(hclr), .hist_rd_addr_i(haddr), .hist_rd_data_o(hdata), .hist_n_samples_o(hcount));

  for (genvar g = 0; g < int'(C17_N_GATES); g++) begin : g_probe
    for (genvar k = 0; k < int'(MAX_FANIN); k++) begin : g_k
      assign probe[g][k] = dut.g_gate[g].u_dglc.dly[k];
    end
  end

  mcssta_run_checker #(
    .N_PI(C17_N_PI), .N_GATES(C17_N_GATES), .N_PO(C17_N_PO), .GATES(C17_GATES), .PO(C17_PO)
  ) u_chk (
    .clk, .rst_n, .en, .mode_min, .probe, .valid(dvalid), .delay(dly),
    .checks(c_checks), .failures(c_failures), .depth(depth));

  // sample collection
  int   phase = 0;
  real  s1 [3] = '{0.0, 0.0, 0.0}, s2 [3] = '{0.0, 0.0, 0.0};
  int   ns [3] = '{0, 0, 0};
  int   nvalid [3] = '{0, 0, 0};
  int   en_edges [3] = '{0, 0, 0};
  int   refbin [NB];
  int   n_under = 0, n_tail = 0, n_stall = 0, n_total = 0;

  always @(posedge clk) if (rst_n) begin
    if (en) en_edges[phase]++;
    else n_stall++;
  end

  always @(negedge clk) begin
    int b;
    if (rst_n && dvalid) begin
      nvalid[phase]++;
      n_total++;
      if (!(phase == 0 && nvalid[0] <= 10)) begin
        s1[phase] += real'(dly);
        s2[phase] += real'(dly) * real'(dly);
        ns[phase]++;
      end
      if (int'(dly) < HBASE) begin b = 0; n_under++; end
      else begin
        b = (int'(dly) - HBASE) >> HSHIFT;
        if (b > NB - 1) begin b = NB - 1; n_tail++; end
      end
      refbin[b]++;
    end
  end

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic measure_latency(string what);
    int lat;
    en = 1'b1;
    lat = 0;
    do begin @(posedge clk); lat++; @(negedge clk); end while (!dvalid && lat < 100);
    check(lat == depth + 1, $sformatf("%s latency %0d, expected %0d", what, lat, depth + 1));
  endtask

  initial begin
    real m, sd, rm, rsd, se;
    int n_switch_up = 0, n_switch_down = 0;
    for (int i = 0; i < NB; i++) refbin[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 3; p++) begin
      #1;   // after the falling-edge sampler, before the next rising edge
      if (p > 0) begin
        mode_min = (p == 1);
        if (p == 1) n_switch_down++; else n_switch_up++;
      end
      phase = p;
      measure_latency($sformatf("phase %0d", p));
      for (int n = 0; n < NPH[p]; n++) begin
        en = ($urandom_range(0, 7) != 0);
        @(negedge clk);
      end
      en = 1'b1;
      repeat (depth + 1) @(negedge clk);   // drain before the next switch
    end
    en = 1'b0;
    repeat (3) @(negedge clk);
    // sample counts: one per enabled edge after the first D of each phase
    for (int p = 0; p < 3; p++)
      check(nvalid[p] == en_edges[p] - depth,
            $sformatf("phase %0d: %0d samples for %0d enabled clocks", p, nvalid[p], en_edges[p]));
    // statistics against software Monte Carlo
    for (int p = 0; p < 2; p++) begin
      m  = s1[p] / ns[p];
      sd = $sqrt(s2[p] / ns[p] - m * m);
      mc_stats(C17_GATES, C17_PO, C17_N_PI, p == 1, 20000, rm, rsd);
      se = rsd * $sqrt(1.0 / ns[p] + 1.0 / 20000.0);
      $display("%s: engine mean %0.2f sd %0.2f | reference mean %0.2f sd %0.2f (%0d samples)",
               p ? "min" : "max", m, sd, rm, rsd, ns[p]);
      check(m > rm - 4.0 * se - 1.0 && m < rm + 4.0 * se + 1.0, "mean vs reference");
      check(sd > 0.9 * rsd && sd < 1.1 * rsd, "sigma vs reference");
    end
    // histogram
    for (int i = 0; i < NB; i++) begin
      haddr = 6'(i);
      #1;
      check(int'(hdata) == refbin[i], $sformatf("bin %0d: %0d vs %0d", i, hdata, refbin[i]));
    end
    check(int'(hcount) == n_total, "histogram sample count");
    hclr = 1'b1;
    @(negedge clk);
    hclr = 1'b0;
    #1;
    check(hcount == 0, "histogram clear");
    // mechanisms
    $display("mechanisms: stalls %0d, max->min %0d, min->max %0d, hist underflow %0d, hist tail %0d",
             n_stall, n_switch_down, n_switch_up, n_under, n_tail);
    check(n_stall > 0 && n_switch_down > 0 && n_switch_up > 0 && n_under > 0 && n_tail > 0,
          "every mechanism exercised");
    check(c_checks == n_total, "exact checker saw all samples");
    checks += c_checks;
    failures += c_failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
