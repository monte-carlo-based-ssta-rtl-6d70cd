// arc_delay_gen: delay-sample generator of one delay arc of a gate.
//
// Each enabled clock it produces a fresh sample of the arc delay, which the
// source models as normal with a given mean and standard deviation:
//     delay = MEAN + round(SIGMA * z),  z ~ N(0,1) from an NDRNG.
// z has Z_FRAC fraction bits; the product SIGMA*z is a multiplication by a
// constant, rounded half-up to the delay unit. A negative result is clamped to
// 0 and a result above the delay range to its maximum (a physical delay cannot be
// negative; at the reference settings the clamps are 10 sigma away and never act).
//
// Interface: delay_o is registered and changes on clocks with en high; it holds
// the sample that the owning DGLC adds in that clock. Latency from reset release
// to the first random sample is three enabled clocks (RNG word, z, delay).
// Constant-coefficient scaling, rounding and clamping are this design's choices.
module arc_delay_gen
  import mcssta_pkg::*;
#(
  parameter delay_t            MEAN  = delay_t'(250),
  parameter delay_t            SIGMA = delay_t'(25),
  parameter logic [LFSR_W-1:0] SEED  = 64'h9E37_79B9_7F4A_7C15
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  output delay_t delay_o
);

  localparam int unsigned P_W = DELAY_W + Z_W + 2;

  z_t z;

  ndrng #(.SEED(SEED)) u_ndrng (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .z_o  (z)
  );

  delay_t delay_d;

  always_comb begin
    logic signed [P_W-1:0] prod, dev, total;
    prod    = P_W'(signed'({1'b0, SIGMA})) * P_W'(z);
    dev     = (prod + P_W'(2 ** (Z_FRAC - 1))) >>> Z_FRAC;
    total   = P_W'(signed'({1'b0, MEAN})) + dev;
    if (total < 0)
      delay_d = '0;
    else if (total > P_W'(signed'({1'b0, DELAY_MAX})))
      delay_d = DELAY_MAX;
    else
      delay_d = total[DELAY_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  delay_o <= MEAN;
    else if (en) delay_o <= delay_d;
  end

endmodule
