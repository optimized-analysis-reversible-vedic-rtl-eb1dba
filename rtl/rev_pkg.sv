// rev_pkg: shared types and the cost model of the reversible Urdhva
// Tiryakbhayam (vertical-and-crosswise) multiplier.
//
// ut2_design_e selects which of the two 2x2 multiplier cores a 4x4 multiplier
// is built from.
//
// A reversible circuit is judged by four counts: gates (NG), constant inputs
// (CI), garbage outputs (GO) and quantum cost (QC). Their sum is the total
// reversible logic implementation cost, TRLIC = NG + CI + GO + QC. The
// functions below give these counts for each circuit of the design, built up
// from the gates it instantiates (quantum costs: Feynman 1, Peres 4, NFT 5,
// HNG 6, BVPPG 10; each gate with a tied input adds one constant). They model
// the published cost analysis and describe no hardware; the test benches use
// them to tie the structure to the published totals.
package rev_pkg;

  // Which of the two proposed 2x2 multiplier cores a 4x4 multiplier uses.
  typedef enum logic [1:0] {
    UT2_DESIGN1 = 2'd1,  // BVPPG + three Peres + Feynman
    UT2_DESIGN2 = 2'd2   // BVPPG + two Peres + NFT + Feynman
  } ut2_design_e;

  // Cost figures of one reversible circuit.
  typedef struct packed {
    logic [15:0] ng;  // number of reversible gates
    logic [15:0] ci;  // constant inputs
    logic [15:0] go;  // garbage outputs
    logic [15:0] qc;  // quantum cost
  } rev_cost_t;

  // Quantum cost of each primitive gate.
  localparam int unsigned QC_FG    = 1;
  localparam int unsigned QC_PG    = 4;
  localparam int unsigned QC_NFT   = 5;
  localparam int unsigned QC_HNG   = 6;
  localparam int unsigned QC_BVPPG = 10;

  function automatic rev_cost_t cost(input int unsigned ng, input int unsigned ci,
                                     input int unsigned go, input int unsigned qc);
    rev_cost_t c;
    c.ng = ng[15:0];
    c.ci = ci[15:0];
    c.go = go[15:0];
    c.qc = qc[15:0];
    return c;
  endfunction

  function automatic rev_cost_t cost_add(input rev_cost_t x, input rev_cost_t y);
    return cost(int'(x.ng) + int'(y.ng), int'(x.ci) + int'(y.ci),
                int'(x.go) + int'(y.go), int'(x.qc) + int'(y.qc));
  endfunction

  function automatic rev_cost_t cost_scale(input rev_cost_t x, input int unsigned n);
    return cost(int'(x.ng) * n, int'(x.ci) * n, int'(x.go) * n, int'(x.qc) * n);
  endfunction

  // 2x2 core. Design 1: BVPPG (2 constants, 1 garbage), Peres a1*b0 (1, 1),
  // Peres middle (1, 1), Peres a1*b1 (1, 2), Feynman (0, 0).
  // Design 2: BVPPG (2, 0), Peres a1*b0 (1, 1), Peres a1*b1 (1, 2), NFT (1, 0),
  // Feynman (0, 1).
  function automatic rev_cost_t ut2_cost(input ut2_design_e d);
    if (d == UT2_DESIGN1) return cost(5, 5, 5, QC_BVPPG + 3 * QC_PG + QC_FG);
    else                  return cost(5, 5, 4, QC_BVPPG + 2 * QC_PG + QC_NFT + QC_FG);
  endfunction

  // Ripple carry adder of `width` bits: one Peres half adder (1 constant,
  // 1 garbage) and width-1 HNG full adders (1 constant, 2 garbage each).
  function automatic rev_cost_t rca_cost(input int unsigned width);
    return cost(width, width, 2 * width - 1, QC_PG + QC_HNG * (width - 1));
  endfunction

  // 4x4 multiplier: four 2x2 cores, two 4-bit and one 5-bit adder.
  function automatic rev_cost_t ut4_cost(input ut2_design_e d);
    return cost_add(cost_add(cost_scale(ut2_cost(d), 4), cost_scale(rca_cost(4), 2)),
                    rca_cost(5));
  endfunction

  function automatic int unsigned trlic(input rev_cost_t x);
    return int'(x.ng) + int'(x.ci) + int'(x.go) + int'(x.qc);
  endfunction

endpackage
