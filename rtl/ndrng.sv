// ndrng: normal distribution random number generator (NDRNG).
//
// Turns uniform random bits into approximately N(0,1) samples by the central
// limit theorem: the OUT_W-bit word of an LFSR RNG is cut into N_UNIF uniform
// integers u_i of U_W bits, and
//     z = 2*sum(u_i) - N_UNIF*(2^U_W - 1)
// is a zero-mean sample in units of 2^-(U_W+1). With N_UNIF = 12 its variance is
// 12 * 4 * (2^(2*U_W) - 1) / 12, i.e. 1.0 in those units to within 2^-(2*U_W),
// so z needs no scaling. |z| <= N_UNIF * (2^U_W - 1) LSB (6 sigma at the defaults).
//
// Interface: en advances the generator; z_o is registered and changes one clock
// after the RNG word it is made from, on clocks with en high. The source states
// only that the NDRNG makes normal numbers from LFSR uniform numbers; the
// central-limit construction is this design's choice.
module ndrng
  import mcssta_pkg::*;
#(
  parameter logic [LFSR_W-1:0] SEED = 64'h9E37_79B9_7F4A_7C15
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output z_t   z_o
);

  localparam int unsigned OUT_W = N_UNIF * U_W;
  localparam int signed   Z_OFS = int'(N_UNIF * (2 ** U_W - 1));

  logic [OUT_W-1:0] rnd;

  lfsr_rng #(
    .W    (LFSR_W),
    .TAPS (LFSR_TAPS),
    .OUT_W(OUT_W),
    .SEED (SEED)
  ) u_rng (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .rnd_o(rnd)
  );

  z_t z_d;

  always_comb begin
    logic [Z_W-1:0] sum;
    sum = '0;
    for (int unsigned i = 0; i < N_UNIF; i++) begin
      sum = sum + Z_W'(rnd[i*U_W +: U_W]);
    end
    z_d = z_t'(sum << 1) - z_t'(Z_OFS);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  z_o <= '0;
    else if (en) z_o <= z_d;
  end

endmodule
