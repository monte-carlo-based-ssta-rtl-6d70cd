// mcssta_run_checker: exact per-run checker for the MC-SSTA engine.
//
// At every enabled clock edge it records the delay sample that each arc of each
// DGLC applies at that edge (probe, taken from the engine by the testbench) and
// the analysis mode. A run launched at enabled edge r reaches a gate of level L at
// edge r+L-1, so its exact circuit delay can be recomputed from the recorded
// samples: at(gate) = max/min_k sat(at(src_k) + sample_k), then max/min over the
// primary outputs. Levels are computed here from the netlist record. Every
// reported sample (valid high, seen at the falling edge) after E enabled edges
// belongs to the run launched at edge E-1-D, D being the netlist depth.
module mcssta_run_checker
  import mcssta_pkg::*;
#(
  parameter int unsigned N_PI    = 5,
  parameter int unsigned N_GATES = 6,
  parameter int unsigned N_PO    = 2,
  parameter gate_t       GATES [N_GATES] = C17_GATES,
  parameter int unsigned PO    [N_PO]    = C17_PO
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   mode_min,
  input  delay_t probe [N_GATES][MAX_FANIN],
  input  logic   valid,
  input  delay_t delay,
  output int     checks,
  output int     failures,
  output int     depth
);

  int unsigned lvl [N_PI + N_GATES];
  int          snap [$];
  bit          mode_hist [$];
  int          n_edges = 0;

  initial begin
    gate_t g;
    int unsigned m;
    checks   = 0;
    failures = 0;
    depth    = 0;
    for (int i = 0; i < N_PI; i++) lvl[i] = 0;
    for (int i = 0; i < N_GATES; i++) begin
      g = GATES[i];
      m = lvl[int'(g.src[0])];
      if (g.n_in > 1 && lvl[int'(g.src[1])] > m) m = lvl[int'(g.src[1])];
      lvl[N_PI + i] = m + 1;
    end
    for (int p = 0; p < N_PO; p++) if (lvl[PO[p]] > depth) depth = lvl[PO[p]];
  end

  always @(posedge clk) begin
    if (rst_n && en) begin
      for (int i = 0; i < N_GATES; i++)
        for (int k = 0; k < MAX_FANIN; k++) snap.push_back(int'(probe[i][k]));
      mode_hist.push_back(mode_min);
      n_edges++;
    end
  end

  function automatic int expected(int r);
    int at [N_PI + N_GATES];
    int v, best, e;
    bit mn;
    gate_t g;
    mn = mode_hist[r];
    for (int i = 0; i < N_PI; i++) at[i] = 0;
    for (int i = 0; i < N_GATES; i++) begin
      g = GATES[i];
      e = r + int'(lvl[N_PI + i]) - 1;
      for (int k = 0; k < int'(g.n_in); k++) begin
        v = at[int'(g.src[k])] + snap[(e * N_GATES + i) * MAX_FANIN + k];
        if (v > 65535) v = 65535;
        if (k == 0 || (mn ? (v < best) : (v > best))) best = v;
      end
      at[N_PI + i] = best;
    end
    best = at[PO[0]];
    for (int p = 1; p < N_PO; p++) if (mn ? (at[PO[p]] < best) : (at[PO[p]] > best)) best = at[PO[p]];
    return best;
  endfunction

  always @(negedge clk) begin
    int r, e;
    if (rst_n && valid) begin
      r = n_edges - 1 - depth;
      checks++;
      if (r < 0) begin
        failures++;
        $display("checker: sample before the pipeline could be full");
      end else begin
        e = expected(r);
        if (int'(delay) != e) begin
          failures++;
          if (failures < 6) $display("checker: run %0d got %0d expected %0d", r, delay, e);
        end
      end
    end
  end

endmodule
