// dglc: delay-sample generator and LAT calculator, the per-gate unit of the
// pipelined Monte Carlo SSTA engine. Every gate of the target netlist becomes one
// DGLC.
//
// For each of its N_IN input arcs the DGLC holds an arc_delay_gen (an NDRNG fed by
// an LFSR RNG, scaled to the arc's mean and standard deviation). In one clock it
// adds each arc's delay sample to the arrival time on that input and takes the
// maximum (latest arrival, longest-path analysis) or minimum (earliest arrival,
// shortest-path analysis) of the sums with the comparator:
//     at_o <= max/min_k ( at_i[k] + delay_k )
// The adders saturate at the top of the delay range instead of wrapping.
//
// Interface: at_i[k] for k >= N_IN are ignored. at_o is registered: one gate level
// per clock, so a new Monte Carlo run can enter every clock. Everything holds while
// en is low. MEAN/SIGMA/SEED carry one value per arc; the arc seeds must differ
// between all arcs of the engine. The structure (NDRNGs, adders, comparator, one
// gate per clock) follows the source; saturation and the per-arc seeds' form are
// this design's choices.
module dglc
  import mcssta_pkg::*;
#(
  parameter int unsigned                     N_IN  = 2,
  parameter logic [MAX_FANIN-1:0][DELAY_W-1:0] MEAN  = {DELAY_W'(280), DELAY_W'(250)},
  parameter logic [MAX_FANIN-1:0][DELAY_W-1:0] SIGMA = {DELAY_W'(28), DELAY_W'(25)},
  parameter logic [MAX_FANIN-1:0][LFSR_W-1:0]  SEED  = {64'hC2B2_AE3D_27D4_EB4F,
                                                        64'h9E37_79B9_7F4A_7C15}
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   mode_min,
  input  delay_t at_i [MAX_FANIN],
  output delay_t at_o
);

  delay_t dly [N_IN];
  delay_t sum [N_IN];
  delay_t best;

  for (genvar k = 0; k < int'(N_IN); k++) begin : g_arc
    arc_delay_gen #(
      .MEAN (MEAN[k]),
      .SIGMA(SIGMA[k]),
      .SEED (SEED[k])
    ) u_gen (
      .clk    (clk),
      .rst_n  (rst_n),
      .en     (en),
      .delay_o(dly[k])
    );

    // Saturating adder: arrival time plus arc delay.
    always_comb begin
      logic [DELAY_W:0] s;
      s      = {1'b0, at_i[k]} + {1'b0, dly[k]};
      sum[k] = s[DELAY_W] ? DELAY_MAX : s[DELAY_W-1:0];
    end
  end

  at_comparator #(.N(N_IN)) u_cmp (
    .mode_min(mode_min),
    .at_i    (sum),
    .at_o    (best)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)  at_o <= '0;
    else if (en) at_o <= best;
  end

endmodule
