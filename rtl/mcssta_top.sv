// mcssta_top: fully pipelined Monte Carlo statistical static timing analysis
// (MC-SSTA) engine dedicated to one target netlist.
//
// Every gate of the netlist GATES becomes a DGLC (delay-sample generator and LAT
// calculator) and every netlist wire a link, so the engine's structure is the
// netlist's own. Each clock with en high, a new Monte Carlo run (one virtual die)
// enters at the primary inputs, whose arrival time is 0; a gate at level L holds
// that run's arrival time L clocks later. Links into a gate are padded with
// registers so that all its inputs belong to the same run, and the primary outputs
// are padded to the netlist depth D. The sink comparator takes the max (or min) of
// the primary-output arrival times, giving one sample of the circuit delay per
// clock, D+1 enabled clocks after the run entered. The samples also feed a delay
// histogram that can be read out at the end of an analysis.
//
// GATES must be in topological order (a gate's inputs are primary inputs or
// earlier gates); node n < N_PI is a primary input, node N_PI+g the output of gate
// g. PO lists the nodes of the primary outputs. The source describes a program that
// writes one such engine per netlist; here the same structure is built at
// elaboration from the netlist parameters. The default netlist is a 6x6-bit
// array multiplier (mult6_netlist_pkg).
//
// Interface and timing:
//   en            advance the whole pipeline by one run (low = stall, all state holds)
//   mode_min      0: latest arrival / longest path (max), 1: earliest / shortest (min).
//                 A change flushes the runs in flight (they are not reported).
//   delay_o       circuit delay sample, valid in the clock delay_valid_o is high;
//                 delay_valid_o pulses once per sample.
//   hist_*        histogram clear and read port, hist_n_samples_o samples counted.
module mcssta_top
  import mcssta_pkg::*;
#(
  parameter int unsigned N_PI        = mult6_netlist_pkg::N_PI,
  parameter int unsigned N_GATES     = mult6_netlist_pkg::N_GATES,
  parameter int unsigned N_PO        = mult6_netlist_pkg::N_PO,
  parameter gate_t       GATES [N_GATES] = mult6_netlist_pkg::GATES,
  parameter int unsigned PO    [N_PO]    = mult6_netlist_pkg::PO,
  parameter int unsigned HIST_BINS   = 64,
  parameter delay_t      HIST_BASE   = delay_t'(12500),
  parameter int unsigned HIST_SHIFT  = 5
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         en,
  input  logic                         mode_min,
  output delay_t                       delay_o,
  output logic                         delay_valid_o,
  input  logic                         hist_clear_i,
  input  logic [$clog2(HIST_BINS)-1:0] hist_rd_addr_i,
  output logic [31:0]                  hist_rd_data_o,
  output logic [31:0]                  hist_n_samples_o
);

  // Level of every gate: 1 + the largest level among its inputs, primary inputs
  // being level 0. One pass suffices because GATES is in topological order.
  typedef int unsigned level_t [N_GATES];

  function automatic level_t calc_levels();
    level_t      lv;
    int unsigned l, s;
    for (int unsigned g = 0; g < N_GATES; g++) begin
      l = 0;
      for (int unsigned k = 0; k < MAX_FANIN; k++) begin
        s = int'(GATES[g].src[k]);
        if (k < int'(GATES[g].n_in) && s >= N_PI && lv[s-N_PI] > l) l = lv[s-N_PI];
      end
      lv[g] = l + 1;
    end
    return lv;
  endfunction

  localparam level_t LEVEL = calc_levels();

  function automatic int unsigned node_level(int unsigned n);
    return (n < N_PI) ? 0 : LEVEL[n-N_PI];
  endfunction

  function automatic int unsigned netlist_depth();
    int unsigned d;
    d = 0;
    for (int unsigned p = 0; p < N_PO; p++)
      if (node_level(PO[p]) > d) d = node_level(PO[p]);
    return d;
  endfunction

  // Distinct, well-mixed LFSR seed for arc k of gate g (splitmix64 finaliser).
  function automatic logic [63:0] arc_seed(int unsigned g, int unsigned k);
    logic [63:0] z;
    z = 64'h9E37_79B9_7F4A_7C15 * (64'(2 * g) + 64'(k) + 64'd1);
    z = (z ^ (z >> 30)) * 64'hBF58_476D_1CE4_E5B9;
    z = (z ^ (z >> 27)) * 64'h94D0_49BB_1331_11EB;
    return z ^ (z >> 31);
  endfunction

  localparam int unsigned DEPTH = netlist_depth();

  delay_t at_gate [N_GATES];
  delay_t at_po   [N_PO];
  delay_t sink_at;

  // ---------------------------------------------------------------- DGLC array
  for (genvar g = 0; g < int'(N_GATES); g++) begin : g_gate
    localparam int unsigned LV = node_level(N_PI + g);
    delay_t at_in [MAX_FANIN];

    for (genvar k = 0; k < int'(MAX_FANIN); k++) begin : g_in
      localparam int unsigned SRC = int'(GATES[g].src[k]);
      if (k >= int'(GATES[g].n_in) || SRC < N_PI) begin : g_pi
        assign at_in[k] = '0;   // primary input (arrival 0) or unused input
      end else begin : g_link
        link #(.LAT(LV - 1 - node_level(SRC))) u_link (
          .clk  (clk),
          .rst_n(rst_n),
          .en   (en),
          .at_i (at_gate[SRC-N_PI]),
          .at_o (at_in[k])
        );
      end
    end

    dglc #(
      .N_IN (int'(GATES[g].n_in)),
      .MEAN (GATES[g].mean),
      .SIGMA(GATES[g].sigma),
      .SEED ({arc_seed(g, 1), arc_seed(g, 0)})
    ) u_dglc (
      .clk     (clk),
      .rst_n   (rst_n),
      .en      (en),
      .mode_min(mode_min),
      .at_i    (at_in),
      .at_o    (at_gate[g])
    );
  end

  // ------------------------------------------------- primary outputs and sink
  for (genvar p = 0; p < int'(N_PO); p++) begin : g_po
    if (PO[p] < N_PI) begin : g_pi
      assign at_po[p] = '0;
    end else begin : g_link
      link #(.LAT(DEPTH - node_level(PO[p]))) u_link (
        .clk  (clk),
        .rst_n(rst_n),
        .en   (en),
        .at_i (at_gate[PO[p]-N_PI]),
        .at_o (at_po[p])
      );
    end
  end

  at_comparator #(.N(N_PO)) u_sink (
    .mode_min(mode_min),
    .at_i    (at_po),
    .at_o    (sink_at)
  );

  // ----------------------------------------- run tracking (valid per level)
  logic [DEPTH:1] vld_q;
  logic           mode_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vld_q  <= '0;
      mode_q <= 1'b0;
    end else if (mode_min != mode_q) begin
      mode_q <= mode_min;
      vld_q  <= '0;
      if (en) vld_q[1] <= 1'b1;
    end else if (en) begin
      vld_q <= {vld_q[DEPTH-1:1], 1'b1};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      delay_o       <= '0;
      delay_valid_o <= 1'b0;
    end else begin
      delay_valid_o <= en && vld_q[DEPTH] && (mode_min == mode_q);
      if (en) delay_o <= sink_at;
    end
  end

  // ---------------------------------------------------------------- histogram
  delay_histogram #(
    .N_BINS(HIST_BINS),
    .CNT_W (32),
    .BASE  (HIST_BASE),
    .SHIFT (HIST_SHIFT)
  ) u_hist (
    .clk           (clk),
    .rst_n         (rst_n),
    .clear_i       (hist_clear_i),
    .sample_valid_i(delay_valid_o),
    .sample_i      (delay_o),
    .rd_addr_i     (hist_rd_addr_i),
    .rd_data_o     (hist_rd_data_o),
    .n_samples_o   (hist_n_samples_o)
  );

endmodule
