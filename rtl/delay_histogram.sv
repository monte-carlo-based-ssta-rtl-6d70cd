// delay_histogram: collects the circuit-delay samples that leave the engine into
// a distribution, so that the engine can run stand-alone and be read out at the
// end of an analysis.
//
// Bin b counts samples with BASE + b*2^SHIFT <= delay < BASE + (b+1)*2^SHIFT.
// Samples below BASE fall into bin 0 and samples beyond the last bin into bin
// N_BINS-1 (the right-hand tail, the part of interest in timing yield, stays
// counted). Counters saturate at their maximum. n_samples_o counts all samples.
// The bins are a register array updated one sample per clock (read-modify-write of
// one bin per clock, no stall needed).
//
// Interface: sample_valid_i/sample_i one sample per clock; clear_i (synchronous)
// zeroes all counters and has priority; rd_addr_i/rd_data_o is an asynchronous
// read port. The source only asks for the delay distribution; binning, widths and
// the read port are this design's choices.
module delay_histogram
  import mcssta_pkg::*;
#(
  parameter int unsigned N_BINS = 64,
  parameter int unsigned CNT_W  = 32,
  parameter delay_t      BASE   = delay_t'(0),
  parameter int unsigned SHIFT  = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear_i,
  input  logic                      sample_valid_i,
  input  delay_t                    sample_i,
  input  logic [$clog2(N_BINS)-1:0] rd_addr_i,
  output logic [CNT_W-1:0]          rd_data_o,
  output logic [CNT_W-1:0]          n_samples_o
);

  localparam int unsigned A_W = $clog2(N_BINS);

  logic [CNT_W-1:0] bins_q [N_BINS];
  logic [A_W-1:0]   bin;

  always_comb begin
    logic [DELAY_W:0] off;   // sample - BASE with a borrow bit
    off = {1'b0, sample_i} - {1'b0, BASE};
    if (off[DELAY_W])
      bin = '0;
    else if ((off[DELAY_W-1:0] >> SHIFT) >= delay_t'(N_BINS))
      bin = A_W'(N_BINS - 1);
    else
      bin = A_W'(off[DELAY_W-1:0] >> SHIFT);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear_i) begin
      for (int unsigned i = 0; i < N_BINS; i++) bins_q[i] <= '0;
      n_samples_o <= '0;
    end else if (sample_valid_i) begin
      if (bins_q[bin] != '1) bins_q[bin] <= bins_q[bin] + 1'b1;
      if (n_samples_o != '1) n_samples_o <= n_samples_o + 1'b1;
    end
  end

  assign rd_data_o = bins_q[rd_addr_i];

endmodule
