// hc_solver - instance-specific Hamiltonian Cycle solver (top level).
//
// The circuit decides whether the graph ADJ has a cycle through every vertex
// exactly once. It runs the plain backtracking search as a network of small
// state machines, one per vertex (hc_vertex_fsm), wired to each other only
// along the edges of the graph: a vertex's machine sees the idle flags of its
// neighbours and can call any of them. Control walks forward along a path by
// calls and back by backtracks; the path held in the machines' states is the
// search stack. hc_control starts the search at vertex START and detects the
// end.
//
// The graph is a parameter, not data: each graph instance is its own
// circuit, and the adjacency constants reduce every machine to the logic of
// its real neighbours. ADJ[i][j] = 1 when i and j are adjacent; only the low
// N x N corner is used and the matrix is expected to be symmetric. The
// default graph is the complete graph on N = 35 vertices.
//
// Interface and timing. Pulse start_i (ignored while busy_o). busy_o is high
// from the edge after start_i until the edge at which done_o rises; then
// exactly one of is_hamiltonian_o / no_hamiltonian_o is high and all hold
// until the next start. vertex_active_o / vertex_stuck_o show every
// machine's state (non-idle / Stuck); after isHamiltonian they hold the
// path that closes the cycle. The start edge clears the network; counted
// after it, the run takes 1 (launch) + one cycle per forward step + two per
// backtrack + 1 (answer register) cycles until done_o.
module hc_solver
  import hc_pkg::*;
#(
  parameter int unsigned N     = 35,
  parameter int unsigned START = 0,
  parameter adj_t        ADJ   = complete_graph(N)
) (
  input  logic         clk,
  input  logic         rst_ni,
  input  logic         start_i,
  output logic         busy_o,
  output logic         done_o,
  output logic         is_hamiltonian_o,
  output logic         no_hamiltonian_o,
  output logic [N-1:0] vertex_active_o,
  output logic [N-1:0] vertex_stuck_o
);

  // vertices adjacent to the initial one (column START of ADJ)
  function automatic logic [N-1:0] start_column(adj_t g);
    logic [N-1:0] c;
    for (int v = 0; v < N; v++) c[v] = g[v][START];
    return c;
  endfunction
  localparam logic [N-1:0] TO_START = start_column(ADJ);

  logic [N-1:0] idle, stuck, activate;
  logic [N-1:0] call [N];   // call[u][v]: machine u calls machine v
  logic         clear, en, launch;

  for (genvar v = 0; v < N; v++) begin : g_vertex
    hc_vertex_fsm #(
      .N      (N),
      .VERTEX (v),
      .NBRS   (ADJ[v][N-1:0])
    ) u_fsm (
      .clk        (clk),
      .rst_ni     (rst_ni),
      .clear_i    (clear),
      .en_i       (en),
      .activate_i (activate[v]),
      .nbr_idle_i (idle),
      .call_o     (call[v]),
      .idle_o     (idle[v]),
      .stuck_o    (stuck[v])
    );

    // a vertex is activated by a call from any neighbour, the initial
    // vertex also by the controller
    always_comb begin
      activate[v] = (launch && v == START);
      for (int u = 0; u < N; u++)
        activate[v] = activate[v] | call[u][v];
    end
  end

  hc_control #(
    .N        (N),
    .START    (START),
    .TO_START (TO_START)
  ) u_ctl (
    .clk      (clk),
    .rst_ni   (rst_ni),
    .start_i  (start_i),
    .idle_i   (idle),
    .stuck_i  (stuck),
    .clear_o  (clear),
    .en_o     (en),
    .launch_o (launch),
    .busy_o   (busy_o),
    .done_o   (done_o),
    .is_ham_o (is_hamiltonian_o),
    .no_ham_o (no_hamiltonian_o)
  );

  assign vertex_active_o = ~idle;
  assign vertex_stuck_o  = stuck;

  // exactly one machine is in control: at most one is Stuck
  a_single_stuck : assert property (
    @(posedge clk) disable iff (!rst_ni) $onehot0(stuck));

endmodule
