// tb_mcssta_full: the MC-SSTA engine at its default parameters (the 6x6-bit array
// multiplier netlist, 318 gates, 594 delay arcs, depth 48), one complete analysis
// in each mode. The max-mode analysis is 17000 runs, the run count of a
// simple Monte Carlo analysis (about 25 % error at the 99.9 % yield point).
//  * Every reported sample is recomputed exactly from the applied delay samples
//    (mcssta_run_checker).
//  * Latency D+1 = 49 enabled clocks at the start and after the mode switch.
//  * One sample per enabled clock once the pipeline is full, with random stalls.
//  * Mean and sigma of the max and min circuit delay against a software Monte
//    Carlo with Box-Muller normals.
//  * Histogram: all bins against the testbench's own binning of the samples.
//  * The 99.9 % point of the max delay read from the engine's histogram against
//    the same point of 17000 software runs, within 3 bins (9.6 ps).
module tb_mcssta_full;
  import mcssta_pkg::*;
  import mcssta_ref_pkg::*;
  localparam int unsigned NG = mult6_netlist_pkg::N_GATES;
  localparam int unsigned NP = mult6_netlist_pkg::N_PO;
  localparam int unsigned NI = mult6_netlist_pkg::N_PI;
  localparam gate_t       G [NG] = mult6_netlist_pkg::GATES;
  localparam int unsigned P [NP] = mult6_netlist_pkg::PO;
  localparam int unsigned NB = 64, HBASE = 12500, HSHIFT = 5;
  localparam int          NPH [2] = '{17000, 2000};   // samples per mode
  localparam int          NREF = 17000;

  logic clk = 0, rst_n = 0, en = 0, mode_min = 0, hclr = 0;
  delay_t dly;
  logic   dvalid;
  logic [5:0]  haddr = '0;
  logic [31:0] hdata, hcount;
  delay_t probe [NG][MAX_FANIN];
  int c_checks, c_failures, depth;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mcssta_top dut (
    .clk, .rst_n, .en, .mode_min, .delay_o(dly), .delay_valid_o(dvalid),
    .hist_clear_i(hclr), .hist_rd_addr_i(haddr), .hist_rd_data_o(hdata), .hist_n_samples_o(hcount));

  for (genvar g = 0; g < int'(NG); g++) begin : g_probe
    localparam gate_t GG = G[g];
    assign probe[g][0] = dut.g_gate[g].u_dglc.dly[0];
    if (GG.n_in > 1) begin : g_two
      assign probe[g][1] = dut.g_gate[g].u_dglc.dly[1];
    end else begin : g_one
      assign probe[g][1] = '0;
    end
  end

  mcssta_run_checker #(.N_PI(NI), .N_GATES(NG), .N_PO(NP), .GATES(G), .PO(P)) u_chk (
    .clk, .rst_n, .en, .mode_min, .probe, .valid(dvalid), .delay(dly),
    .checks(c_checks), .failures(c_failures), .depth(depth));

  int  phase = 0;
  real s1 [2] = '{0.0, 0.0}, s2 [2] = '{0.0, 0.0};
  int  ns [2] = '{0, 0}, nvalid [2] = '{0, 0}, en_edges [2] = '{0, 0};
  int  refbin [NB];
  int  n_stall = 0, n_total = 0;

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
      if (int'(dly) < HBASE) b = 0;
      else begin
        b = (int'(dly) - HBASE) >> HSHIFT;
        if (b > NB - 1) b = NB - 1;
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

  initial begin
    real m, sd, rm, rsd, se;
    int lat;
    for (int i = 0; i < NB; i++) refbin[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 2; p++) begin
      #1;   // after the falling-edge sampler, before the next rising edge
      mode_min = (p == 1);
      phase = p;
      en = 1'b1;
      lat = 0;
      do begin @(posedge clk); lat++; @(negedge clk); end while (!dvalid && lat < 200);
      check(lat == depth + 1, $sformatf("phase %0d latency %0d, expected %0d", p, lat, depth + 1));
      while (nvalid[p] < NPH[p]) begin
        en = ($urandom_range(0, 7) != 0);
        @(negedge clk);
      end
      en = 1'b1;
      repeat (depth + 1) @(negedge clk);
    end
    en = 1'b0;
    repeat (3) @(negedge clk);
    for (int p = 0; p < 2; p++)
      check(nvalid[p] == en_edges[p] - depth,
            $sformatf("phase %0d: %0d samples for %0d enabled clocks", p, nvalid[p], en_edges[p]));
    for (int p = 0; p < 2; p++) begin
      m  = s1[p] / ns[p];
      sd = $sqrt(s2[p] / ns[p] - m * m);
      mc_stats(G, P, NI, p == 1, NREF, rm, rsd);
      se = rsd * $sqrt(1.0 / ns[p] + 1.0 / NREF);
      $display("%s: engine mean %0.2f sd %0.2f | reference mean %0.2f sd %0.2f (%0d samples)",
               p ? "min" : "max", m, sd, rm, rsd, ns[p]);
      check(m > rm - 4.0 * se - 1.0 && m < rm + 4.0 * se + 1.0, "mean vs reference");
      check(sd > 0.88 * rsd && sd < 1.12 * rsd, "sigma vs reference");
    end
    for (int i = 0; i < NB; i++) begin
      haddr = 6'(i);
      #1;
      check(int'(hdata) == refbin[i], $sformatf("bin %0d: %0d vs %0d", i, hdata, refbin[i]));
    end
    check(int'(hcount) == n_total, "histogram sample count");
    // 99.9 % point of the max delay: upper edge of the bin where the cumulative
    // count of max-mode samples reaches 99.9 % (the min-mode samples all sit in
    // bin 0 and are left out), against the same quantile of software runs.
    begin
      real refs [$];
      int cum, lim, qbin, nmax;
      real q_eng, q_ref;
      nmax = nvalid[0];
      cum = -nvalid[1];
      lim = (nmax * 999 + 999) / 1000;
      qbin = NB - 1;
      for (int i = 0; i < NB; i++) begin
        haddr = 6'(i);
        #1;
        cum += int'(hdata);
        if (cum >= lim) begin qbin = i; break; end
      end
      q_eng = real'(HBASE + (qbin + 1) * (1 << HSHIFT));
      for (int i = 0; i < NREF; i++) refs.push_back(sta_sample(G, P, NI, 1'b0, 1'b1));
      refs.sort();
      q_ref = refs[(NREF * 999) / 1000];
      $display("99.9 %% point of the max delay: engine bin edge %0.1f, reference %0.1f (units of 0.1 ps)",
               q_eng, q_ref);
      check(q_eng > q_ref - 3.0 * (1 << HSHIFT) && q_eng < q_ref + 4.0 * (1 << HSHIFT),
            "99.9 % point vs reference");
    end
    check(n_stall > 0, "stalls exercised");
    check(c_checks == n_total, "exact checker saw all samples");
    checks += c_checks;
    failures += c_failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
