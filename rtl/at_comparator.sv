// at_comparator: the comparator of a DGLC, reducing N arrival times to their
// maximum (longest-path, latest arrival) or minimum (shortest-path, earliest
// arrival) as selected by mode_min.
//
// Purely combinational: a linear chain of two-input compare-select stages (N is
// 2 or 1 in a gate, up to the number of primary outputs at the engine's sink).
// The source names the comparator and its max/min function; the run-time mode
// input is this design's way of offering both analyses in one build.
module at_comparator
  import mcssta_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  logic   mode_min,
  input  delay_t at_i [N],
  output delay_t at_o
);

  always_comb begin
    delay_t best;
    best = at_i[0];
    for (int unsigned i = 1; i < N; i++) begin
      if (mode_min ? (at_i[i] < best) : (at_i[i] > best)) best = at_i[i];
    end
    at_o = best;
  end

endmodule
