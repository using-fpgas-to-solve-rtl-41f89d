// hc_pkg - types, constants and graph functions shared by the Hamiltonian
// Cycle solver.
//
// The solver is instance specific: the graph is not data loaded at run time
// but a parameter (ADJ) that is folded into the circuit when it is
// elaborated, so each graph gives its own circuit. This package holds the
// adjacency-matrix type used for that parameter and two constant functions
// that build one:
//   complete_graph(n)          every pair of distinct vertices adjacent
//                              (the "edge probability 1" graphs).
//   random_graph(n, p, seed)   a random graph with edge probability p/1000,
//                              drawn with the drand48 recurrence
//                              X' = (0x5DEECE66D * X + 0xB) mod 2^48,
//                              seeded as srand48 does (X = seed<<16 | 0x330E).
//                              Graphs that are trivially non-Hamiltonian
//                              (a vertex of degree < 2, or disconnected) are
//                              discarded and the next seed is tried, as the
//                              generator behind the evaluated graphs does.
// Rows and columns at or above n are zero. Only the low n x n corner of an
// adj_t is used by the solver. MAX_N bounds the graph size of one circuit and
// is a choice of this design.
package hc_pkg;

  localparam int MAX_N = 64;

  // adj_t[i][j] = 1 when vertex i is adjacent to vertex j.
  typedef logic [MAX_N-1:0][MAX_N-1:0] adj_t;

  // States of the start/termination controller.
  typedef enum logic [1:0] {
    CTL_IDLE   = 2'd0,  // waiting for start, no answer held
    CTL_LAUNCH = 2'd1,  // network cleared; control goes to the initial FSM
    CTL_RUN    = 2'd2,  // search running
    CTL_DONE   = 2'd3   // answer held until the next start
  } ctl_state_e;

  // Modes of one vertex FSM. The NB states NB_1..NB_d share the mode
  // VX_NB; which neighbour holds control is kept one-hot beside it.
  typedef enum logic [1:0] {
    VX_IDLE  = 2'd0,
    VX_NB    = 2'd1,
    VX_STUCK = 2'd2
  } vx_mode_e;

  localparam longint unsigned DRAND48_A = 64'h5_DEEC_E66D;
  localparam longint unsigned DRAND48_C = 64'hB;
  localparam longint unsigned MASK48    = 64'hFFFF_FFFF_FFFF;

  function automatic adj_t complete_graph(int n);
    adj_t g = '0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++)
        if (i != j) g[i][j] = 1'b1;
    return g;
  endfunction

  // 1 when every vertex below n has degree >= 2 and the graph is connected.
  function automatic bit graph_ok(adj_t g, int n);
    logic [MAX_N-1:0] seen, grown;
    int deg;
    for (int i = 0; i < n; i++) begin
      deg = 0;
      for (int j = 0; j < n; j++) deg += int'(g[i][j]);
      if (deg < 2) return 1'b0;
    end
    seen    = '0;
    seen[0] = 1'b1;
    for (int step = 0; step < n; step++) begin
      grown = seen;
      for (int i = 0; i < n; i++)
        if (seen[i]) grown = grown | g[i];
      seen = grown;
    end
    for (int i = 0; i < n; i++)
      if (!seen[i]) return 1'b0;
    return 1'b1;
  endfunction

  // One random graph for one srand48 seed, edge when drand48() < p/1000.
  function automatic adj_t random_graph_once(int n, int p_permille, int seed);
    adj_t g = '0;
    longint unsigned x;
    x = ((longint'(seed) << 16) | 64'h330E) & MASK48;
    for (int i = 0; i < n; i++)
      for (int j = i + 1; j < n; j++) begin
        x = (DRAND48_A * x + DRAND48_C) & MASK48;
        // x / 2^48 < p / 1000  <=>  x * 1000 < p * 2^48
        if (x * 1000 < (longint'(p_permille) << 48)) begin
          g[i][j] = 1'b1;
          g[j][i] = 1'b1;
        end
      end
    return g;
  endfunction

  localparam int GEN_TRIES = 400;

  // First acceptable graph from seeds seed, seed+1, ...; the last one tried
  // if none of GEN_TRIES is acceptable.
  function automatic adj_t random_graph(int n, int p_permille, int seed);
    adj_t g = '0;
    for (int t = 0; t < GEN_TRIES; t++) begin
      g = random_graph_once(n, p_permille, seed + t);
      if (graph_ok(g, n)) return g;
    end
    return g;
  endfunction

endpackage
