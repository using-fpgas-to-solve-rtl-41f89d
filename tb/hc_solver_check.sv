// hc_solver_check - testbench helper: one solver circuit for one graph, with
// its reference prediction and checks.
//
// At time 0 the reference search (hc_ref_pkg) predicts the answer, the
// latency in cycles and how often machines are activated and get Stuck. If
// the prediction exceeds BUDGET cycles the graph is skipped (skipped = 1).
// Otherwise, after go_i, the solver is started RUNS times; each run is
// checked for the answer, the exact latency, the activation / Stuck /
// direct-Stuck counts seen on the vertex outputs, a full path on
// isHamiltonian, a start pulse ignored while busy, and the frozen state after
// done. Counts of each mechanism are brought out for the enclosing testbench.
module hc_solver_check
  import hc_pkg::*;
  import hc_ref_pkg::*;
#(
  parameter int unsigned N      = 6,
  parameter int unsigned START  = 0,
  parameter adj_t        ADJ    = complete_graph(6),
  parameter longint      BUDGET = 100000,
  parameter int          RUNS   = 2
) (
  input  logic clk,
  input  logic rst_ni,
  input  logic go_i,
  output logic finished,
  output logic skipped,
  output int   checks,
  output int   failures,
  output int   n_ham,
  output int   n_noham,
  output int   n_calls,
  output int   n_backtracks,
  output int   n_direct_stuck,
  output int   n_ignored_start,
  output int   n_restart,
  output longint cycles
);

  logic         start;
  logic         busy, done, is_ham, no_ham;
  logic [N-1:0] act, stk, act_q, stk_q;

  hc_solver #(.N(N), .START(START), .ADJ(ADJ)) dut (
    .clk, .rst_ni, .start_i(start), .busy_o(busy), .done_o(done),
    .is_hamiltonian_o(is_ham), .no_hamiltonian_o(no_ham),
    .vertex_active_o(act), .vertex_stuck_o(stk));

  ref_result_t exp_r;
  longint acts, stucks, directs;

  // count machine events on the outputs
  always_ff @(posedge clk) begin
    act_q <= act;
    stk_q <= stk;
  end
  always @(posedge clk) begin
    #1;
    for (int v = 0; v < int'(N); v++) begin
      if (act[v] && !act_q[v]) acts++;
      if (stk[v] && !stk_q[v]) begin
        stucks++;
        if (!act_q[v]) directs++;
      end
    end
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL N=%0d %s", N, what);
    end
  endtask

  initial begin
    longint lat;
    logic [N-1:0] hold_act;
    start = 0; finished = 0; skipped = 0; checks = 0; failures = 0;
    n_ham = 0; n_noham = 0; n_calls = 0; n_backtracks = 0; n_direct_stuck = 0;
    n_ignored_start = 0; n_restart = 0; cycles = 0;
    acts = 0; stucks = 0; directs = 0;
    exp_r = ref_search(ADJ, int'(N), int'(START), BUDGET);
    if (exp_r.aborted) begin
      skipped  = 1;
      finished = 1;
    end else begin
      wait (go_i);
      for (int run = 0; run < RUNS; run++) begin
        @(negedge clk);
        start = 1;
        @(posedge clk);           // start edge
        #1 start = 0;
        acts = 0; stucks = 0; directs = 0;
        if (run > 0) n_restart++;
        lat = 0;
        while (!done && lat <= exp_r.latency + 5) begin
          // pulse start once while busy: it must be ignored
          if (lat == 3 && busy) begin
            @(negedge clk) start = 1;
            n_ignored_start++;
          end
          @(posedge clk);
          #1 start = 0;
          lat++;
        end
        cycles += lat;
        chk(done, "done never rose");
        chk(lat == exp_r.latency, $sformatf("latency %0d expected %0d", lat, exp_r.latency));
        chk(is_ham == exp_r.is_ham && no_ham == !exp_r.is_ham,
            $sformatf("answer is=%b no=%b expected is=%b", is_ham, no_ham, exp_r.is_ham));
        chk(!busy, "busy with done");
        #2;
        chk(acts == exp_r.activations, $sformatf("activations %0d expected %0d", acts, exp_r.activations));
        chk(stucks == exp_r.stucks, $sformatf("stucks %0d expected %0d", stucks, exp_r.stucks));
        chk(directs == exp_r.direct_stucks, $sformatf("direct stucks %0d expected %0d", directs, exp_r.direct_stucks));
        if (is_ham) begin
          n_ham++;
          chk(act == '1, "isHamiltonian without a full path");
        end
        if (no_ham) n_noham++;
        n_calls        += int'(exp_r.activations - 1);
        n_backtracks   += int'(exp_r.stucks - exp_r.direct_stucks);
        n_direct_stuck += int'(exp_r.direct_stucks);
        hold_act = act;
        repeat (3) @(posedge clk);
        #1 chk(done && act == hold_act && (is_ham == exp_r.is_ham), "state not frozen after done");
      end
      finished = 1;
    end
  end

endmodule
