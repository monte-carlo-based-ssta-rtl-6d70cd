// mult6_netlist_pkg: gate-level netlist of a 6x6-bit unsigned array multiplier,
// built from NAND2 and INV cells, as a netlist record for the MC-SSTA engine.
//
// Primary inputs: a[0..5] are nodes 0..5, b[0..5] nodes 6..11. Gates, in
// topological order:
//   gates 0..71    partial products pp(i,j) = a[j] & b[i] as NAND2 + INV; the
//                  NAND2 of pp(i,j) is gate 2*(6i+j), its INV gate 2*(6i+j)+1.
//   gates 72..317  a ripple-carry adder row per b bit i = 1..5, adding pp(i,*)
//                  into the running sum. Adder (i,j) handles column i+j.
//                  Half adder (5 gates): t=NAND(x,y), u=NAND(x,t), v=NAND(y,t),
//                  sum=NAND(u,v), carry=INV(t).
//                  Full adder (9 gates): the half-adder XOR of x,y, then
//                  w=NAND(xor,c), sum=NAND(NAND(xor,w),NAND(c,w)), carry=NAND(t,w).
//                  Adder (i,0) and adder (1,5) are half adders, all others full.
// Primary outputs p[0..11]: p0 = pp(0,0); p[i] = sum of adder (i,0) for i = 1..5;
// p[6..10] = sums of adders (5,1..5); p11 = carry of adder (5,5).
// The source evaluates its engine on a 6-bit multiplier without giving its
// netlist; this structure and the cell delays of mcssta_pkg are this design's.
package mult6_netlist_pkg;
  import mcssta_pkg::*;

  localparam int unsigned N_PI    = 12;
  localparam int unsigned N_GATES = 318;
  localparam int unsigned N_PO    = 12;

  typedef gate_bits_t gates_t [N_GATES];
  typedef int unsigned po_t [N_PO];

  // Node driven by the AND of partial product (i,j).
  function automatic int unsigned pp_node(int unsigned i, int unsigned j);
    return N_PI + 2 * (6 * i + j) + 1;
  endfunction

  function automatic bit is_half(int unsigned i, int unsigned j);
    return (j == 0) || (i == 1 && j == 5);
  endfunction

  // Index of the first gate of adder (i,j).
  function automatic int unsigned adder_base(int unsigned i, int unsigned j);
    int unsigned b;
    b = 72 + ((i == 1) ? 0 : 46 + (i - 2) * 50);
    if (j == 0) return b;
    if (i == 1 && j == 5) return b + 41;
    return b + 5 + (j - 1) * 9;
  endfunction

  function automatic int unsigned sum_node(int unsigned i, int unsigned j);
    return N_PI + adder_base(i, j) + (is_half(i, j) ? 3 : 7);
  endfunction

  function automatic int unsigned carry_node(int unsigned i, int unsigned j);
    return N_PI + adder_base(i, j) + (is_half(i, j) ? 4 : 8);
  endfunction

  // Node holding bit p of the running sum after adder rows 1..i (i = 0: row pp(0,*)).
  function automatic int unsigned acc_node(int unsigned i, int unsigned p);
    if (p == 0)     return pp_node(0, 0);
    if (p < i)      return sum_node(p, 0);
    if (i == 0)     return pp_node(0, p);
    if (p <= i + 5) return sum_node(i, p - i);
    return carry_node(i, 5);
  endfunction

  function automatic gates_t build_gates();
    gates_t      g;
    int unsigned b, x, y, c;
    // partial products
    for (int unsigned i = 0; i < 6; i++)
      for (int unsigned j = 0; j < 6; j++) begin
        g[2*(6*i+j)]   = mk_gate(GT_NAND2, j, 6 + i);
        g[2*(6*i+j)+1] = mk_gate(GT_INV, N_PI + 2*(6*i+j), 0);
      end
    // adder rows
    for (int unsigned i = 1; i < 6; i++)
      for (int unsigned j = 0; j < 6; j++) begin
        b = adder_base(i, j);
        y = pp_node(i, j);
        c = (j == 0) ? 0 : carry_node(i, j - 1);
        // x: running-sum bit of column i+j, or the carry when that bit does not exist
        x = (i == 1 && j == 5) ? c : acc_node(i - 1, i + j);
        g[b]   = mk_gate(GT_NAND2, x, y);
        g[b+1] = mk_gate(GT_NAND2, x, N_PI + b);
        g[b+2] = mk_gate(GT_NAND2, y, N_PI + b);
        g[b+3] = mk_gate(GT_NAND2, N_PI + b + 1, N_PI + b + 2);
        if (is_half(i, j)) begin
          g[b+4] = mk_gate(GT_INV, N_PI + b, 0);
        end else begin
          g[b+4] = mk_gate(GT_NAND2, N_PI + b + 3, c);
          g[b+5] = mk_gate(GT_NAND2, N_PI + b + 3, N_PI + b + 4);
          g[b+6] = mk_gate(GT_NAND2, c, N_PI + b + 4);
          g[b+7] = mk_gate(GT_NAND2, N_PI + b + 5, N_PI + b + 6);
          g[b+8] = mk_gate(GT_NAND2, N_PI + b, N_PI + b + 4);
        end
      end
    return g;
  endfunction

  function automatic po_t build_po();
    po_t p;
    p[0] = pp_node(0, 0);
    for (int unsigned i = 1; i < 6; i++) p[i] = sum_node(i, 0);
    for (int unsigned j = 1; j < 6; j++) p[5 + j] = sum_node(5, j);
    p[11] = carry_node(5, 5);
    return p;
  endfunction

  localparam gates_t GATES = build_gates();
  localparam po_t    PO    = build_po();

endpackage
