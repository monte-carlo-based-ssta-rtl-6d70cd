// lfsr_rng: uniform random number generator (RNG) built from a linear feedback
// shift register, as the source design uses for the uniform numbers that feed its
// normal generators.
//
// Fibonacci LFSR of W bits: each step shifts the state left by one and inserts
// feedback = XOR of the state bits selected by TAPS into bit 0. To give a whole
// word of fresh bits per clock, the register is advanced OUT_W steps in one clock
// (leap-forward; the unrolled loop is an XOR network). The OUT_W new bits are
// registered on rnd_o, the first bit produced in rnd_o[0].
//
// Interface: en advances the generator by one word; rnd_o is valid one clock after
// reset is released and changes only on clocks with en high. SEED is loaded by the
// active-low synchronous reset rst_n (a zero seed, the LFSR's lock-up state, is
// replaced by 1). Polynomial, leap-forward and seeding are this design's choices;
// the source only says that an LFSR is used.
module lfsr_rng #(
  parameter int unsigned     W     = mcssta_pkg::LFSR_W,
  parameter logic [W-1:0]    TAPS  = mcssta_pkg::LFSR_TAPS,
  parameter int unsigned     OUT_W = mcssta_pkg::N_UNIF * mcssta_pkg::U_W,
  parameter logic [W-1:0]    SEED  = W'(64'h9E37_79B9_7F4A_7C15)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [OUT_W-1:0] rnd_o
);

  localparam logic [W-1:0] SEED_NZ = (SEED == '0) ? W'(1) : SEED;

  logic [W-1:0]     state_q, state_d;
  logic [OUT_W-1:0] bits_d;

  always_comb begin
    logic [W-1:0] s;
    logic         fb;
    s = state_q;
    for (int unsigned i = 0; i < OUT_W; i++) begin
      fb        = ^(s & TAPS);
      bits_d[i] = fb;
      s         = {s[W-2:0], fb};
    end
    state_d = s;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= SEED_NZ;
      rnd_o   <= '0;
    end else if (en) begin
      state_q <= state_d;
      rnd_o   <= bits_d;
    end
  end

endmodule
