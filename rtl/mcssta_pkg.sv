// mcssta_pkg: types and constants shared by the pipelined Monte Carlo SSTA engine.
//
// The engine replaces every gate of a target netlist by a delay-sample generator
// and latest-arrival-time calculator (DGLC). A netlist is given to the engine as an
// array of gate_t records in topological order. Node numbering: nodes
// 0..N_PI-1 are primary inputs, node N_PI+g is the output of gate g.
//
// Delays are unsigned fixed-point integers of DELAY_W bits in a time unit chosen by
// whoever writes the netlist record (the netlists in this project use 0.1 ps).
// Gate delays are normal, given per delay arc as a mean and a standard deviation
// (this follows the source description); the fixed-point format, the fan-in limit
// of two (NAND2, NOR2, INV) and the reference netlist below are this design's own.
package mcssta_pkg;

  // Arrival-time / delay word width and largest representable value.
  localparam int unsigned DELAY_W   = 16;
  localparam logic [DELAY_W-1:0] DELAY_MAX = '1;

  // Node index width (enough for netlists of several hundred thousand gates).
  localparam int unsigned NODE_W    = 20;

  // Largest gate fan-in: the netlists use NAND2, NOR2 and INV only.
  localparam int unsigned MAX_FANIN = 2;

  // Central-limit normal generator: sum of N_UNIF uniforms of U_W bits each.
  localparam int unsigned N_UNIF    = 12;
  localparam int unsigned U_W       = 8;
  // Fraction bits of the N(0,1) sample: z = (2*sum - N_UNIF*(2^U_W-1)) / 2^Z_FRAC.
  localparam int unsigned Z_FRAC    = U_W + 1;
  // Signed width of the N(0,1) sample (|z| <= N_UNIF*(2^U_W-1)).
  localparam int unsigned Z_W       = $clog2(N_UNIF * (2 ** U_W)) + 2;

  // LFSR used for the uniform numbers: x^64 + x^63 + x^61 + x^60 + 1 (Fibonacci form,
  // feedback taken from state bits 63, 62, 60, 59).
  localparam int unsigned LFSR_W    = 64;
  localparam logic [LFSR_W-1:0] LFSR_TAPS = 64'hD800_0000_0000_0000;

  typedef logic [DELAY_W-1:0] delay_t;
  typedef logic signed [Z_W-1:0] z_t;

  typedef enum logic [1:0] {GT_INV = 2'd0, GT_NAND2 = 2'd1, GT_NOR2 = 2'd2} gate_type_e;

  // One gate of the target netlist with the delay distribution of each input arc.
  typedef struct packed {
    gate_type_e                              kind;
    logic [1:0]                              n_in;   // number of used inputs (1..2)
    logic [MAX_FANIN-1:0][NODE_W-1:0]        src;    // driving node of each input
    logic [MAX_FANIN-1:0][DELAY_W-1:0]       mean;   // arc delay mean
    logic [MAX_FANIN-1:0][DELAY_W-1:0]       sigma;  // arc delay standard deviation
  } gate_t;

  // Same record as a plain vector: netlists computed by constant functions are
  // built as arrays of this type, which is equivalent to gate_t.
  typedef logic [$bits(gate_t)-1:0] gate_bits_t;

  // Arc delays of the cell library used by the reference netlists (unit 0.1 ps).
  // Input 0 / input 1 of each cell.
  localparam int unsigned NAND2_MEAN0 = 250, NAND2_MEAN1 = 280;
  localparam int unsigned NOR2_MEAN0  = 320, NOR2_MEAN1  = 350;
  localparam int unsigned INV_MEAN0   = 180;
  // Standard deviation is 10 % of the mean.
  localparam int unsigned SIGMA_PCT   = 10;

  function automatic gate_t mk_gate(gate_type_e kind, int unsigned a, int unsigned b);
    gate_t g;
    int unsigned m0, m1;
    g = '0;
    g.kind = kind;
    unique case (kind)
      GT_NAND2: begin m0 = NAND2_MEAN0; m1 = NAND2_MEAN1; end
      GT_NOR2:  begin m0 = NOR2_MEAN0;  m1 = NOR2_MEAN1;  end
      default:  begin m0 = INV_MEAN0;   m1 = 0;           end
    endcase
    g.n_in     = (kind == GT_INV) ? 2'd1 : 2'd2;
    g.src[0]   = NODE_W'(a);
    g.src[1]   = (kind == GT_INV) ? '0 : NODE_W'(b);
    g.mean[0]  = DELAY_W'(m0);
    g.mean[1]  = DELAY_W'(m1);
    g.sigma[0] = DELAY_W'((m0 * SIGMA_PCT + 50) / 100);
    g.sigma[1] = DELAY_W'((m1 * SIGMA_PCT + 50) / 100);
    return g;
  endfunction

  // Small reference netlist: ISCAS-85 c17 (5 inputs, 6 NAND2, 2 outputs, depth 3).
  // PIs N1,N2,N3,N6,N7 are nodes 0..4; gates G10,G11,G16,G19,G22,G23 are nodes 5..10.
  localparam int unsigned C17_N_PI    = 5;
  localparam int unsigned C17_N_GATES = 6;
  localparam int unsigned C17_N_PO    = 2;
  localparam gate_t C17_GATES [C17_N_GATES] = '{
    mk_gate(GT_NAND2, 0, 2),   // G10 = NAND(N1, N3)
    mk_gate(GT_NAND2, 2, 3),   // G11 = NAND(N3, N6)
    mk_gate(GT_NAND2, 1, 6),   // G16 = NAND(N2, G11)
    mk_gate(GT_NAND2, 6, 4),   // G19 = NAND(G11, N7)
    mk_gate(GT_NAND2, 5, 7),   // G22 = NAND(G10, G16)
    mk_gate(GT_NAND2, 7, 8)    // G23 = NAND(G16, G19)
  };
  localparam int unsigned C17_PO [C17_N_PO] = '{9, 10};

endpackage
