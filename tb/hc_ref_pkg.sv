// hc_ref_pkg - reference model of the Hamiltonian Cycle search, for the
// testbenches.
//
// ref_search() runs the same depth-first backtracking search in software,
// with an explicit stack, and predicts what the solver circuit must report:
// the answer, the clock edge at which done_o rises, and how many times a
// vertex machine is activated, enters Stuck, or enters Stuck straight from
// Idle. Timing rule it encodes (counting the edges after the one that samples
// start_i and clears the network): one edge launches the initial vertex,
// every call takes one edge, every backtrack two (Stuck, then the caller
// decides), and the answer register takes one more. The search gives up after
// `budget` edges and reports aborted.
package hc_ref_pkg;
  import hc_pkg::*;

  typedef struct packed {
    bit      aborted;
    bit      is_ham;
    longint  latency;        // edges from the start edge to done_o high
    longint  activations;
    longint  stucks;
    longint  direct_stucks;  // Idle -> Stuck without calling anyone
  } ref_result_t;

  function automatic ref_result_t ref_search(adj_t g, int n, int s,
                                             longint budget);
    ref_result_t r;
    int     stack [MAX_N];
    int     next_try [MAX_N];
    bit     on_path [MAX_N];
    int     depth, v, c;
    longint t;
    bit     finished;
    r = '0;
    for (int i = 0; i < MAX_N; i++) begin
      on_path[i]  = 1'b0;
      next_try[i] = 0;
      stack[i]    = 0;
    end
    depth       = 1;
    stack[0]    = s;
    on_path[s]  = 1'b1;
    r.activations = 1;
    t           = 0;     // decision edge of the vertex on top of the stack
    finished    = 1'b0;
    while (!finished) begin
      if (t > budget) begin
        r.aborted = 1'b1;
        return r;
      end
      v = stack[depth-1];
      c = -1;
      for (int k = next_try[v]; k < n; k++)
        if (c < 0 && k != v && g[v][k] && !on_path[k]) c = k;
      if (c >= 0) begin
        next_try[v]    = c + 1;
        stack[depth]   = c;
        depth++;
        on_path[c]     = 1'b1;
        next_try[c]    = 0;
        r.activations++;
        t = t + 1;
      end else begin
        r.stucks++;
        if (next_try[v] == 0) r.direct_stucks++;
        if (depth == n && g[v][s]) begin
          r.is_ham  = 1'b1;
          finished  = 1'b1;
        end else if (v == s) begin
          finished  = 1'b1;
        end else begin
          on_path[v] = 1'b0;
          depth--;
          t = t + 2;
        end
      end
    end
    // t is the edge v entered Stuck, counted from the launch edge (= start
    // edge + 1); the answer register sets one edge after that.
    r.latency = t + 2;
    return r;
  endfunction

endpackage
