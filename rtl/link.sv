// link: connection from the output of one DGLC to an input of another, following
// one wire of the target netlist.
//
// Because every DGLC computes one gate level per clock and a new Monte Carlo run
// enters every clock, an arrival time must meet the other inputs of its sink gate
// belonging to the same run. A link from a driver at level Ls into a gate at level
// Ld therefore carries LAT = Ld - 1 - Ls pipeline registers (LAT = 0 is a plain
// wire). The registers hold when en is low, like the rest of the pipeline.
// The source names links; the balancing registers are this design's choice, made
// so that reconvergent paths see the delay samples of one and the same run.
module link
  import mcssta_pkg::*;
#(
  parameter int unsigned LAT = 1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  delay_t at_i,
  output delay_t at_o
);

  if (LAT == 0) begin : g_wire
    assign at_o = at_i;
  end else begin : g_regs
    delay_t stage_q [LAT];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int unsigned i = 0; i < LAT; i++) stage_q[i] <= '0;
      end else if (en) begin
        stage_q[0] <= at_i;
        for (int unsigned i = 1; i < LAT; i++) stage_q[i] <= stage_q[i-1];
      end
    end
    assign at_o = stage_q[LAT-1];
  end

endmodule
