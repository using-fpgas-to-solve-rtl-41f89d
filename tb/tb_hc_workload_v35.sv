// tb_hc_workload_v35 - the evaluated workload: random graphs with 35
// vertices and edge probability 0.12, 0.13, 0.14 and 0.15, five graphs each
// (20 circuits, one per graph, at the solver's default size N = 35).
//
// The graphs are drawn with the drand48-based generator in hc_pkg (srand48
// seeds 1..5 per probability, trivially non-Hamiltonian graphs discarded),
// so they are graphs of the same family as the evaluated ones, not the same
// graphs. Searches of these graphs can take billions of cycles; every graph
// whose reference search ends within BUDGET cycles is run and checked
// (answer, exact cycle count, event counts), the others are reported as
// skipped. At least one graph must run.
module tb_hc_workload_v35;
  import hc_pkg::*;

  localparam int     G      = 20;
  localparam longint BUDGET = 3000000;

  logic clk = 1'b0;
  logic rst_ni = 1'b0;
  logic go = 1'b0;
  always #5 clk = ~clk;

  logic   fin [G], skp [G];
  int     ck [G], fl [G], nh [G], nn [G], nc [G], nb [G], nd [G], ni [G], nr [G];
  longint cy [G];

  for (genvar g = 0; g < G; g++) begin : g_graph
    localparam int P    = 120 + 10 * (g / 5);
    localparam int SEED = 1 + (g % 5);
    hc_solver_check #(
      .N(35), .START(0), .ADJ(random_graph(35, P, 1000 * SEED)),
      .BUDGET(BUDGET), .RUNS(1)
    ) u_chk (
      .clk, .rst_ni, .go_i(go), .finished(fin[g]), .skipped(skp[g]),
      .checks(ck[g]), .failures(fl[g]), .n_ham(nh[g]), .n_noham(nn[g]),
      .n_calls(nc[g]), .n_backtracks(nb[g]), .n_direct_stuck(nd[g]),
      .n_ignored_start(ni[g]), .n_restart(nr[g]), .cycles(cy[g]));
  end

  int checks = 0, failures = 0;

  initial begin
    int ran = 0;
    repeat (3) @(posedge clk);
    rst_ni = 1'b1;
    @(posedge clk);
    go = 1'b1;
    for (int g = 0; g < G; g++) wait (fin[g]);
    for (int g = 0; g < G; g++) begin
      $display("v35p0%0d.%0d: %s answer=%s cycles=%0d checks=%0d failures=%0d",
               12 + g / 5, 1 + g % 5, skp[g] ? "skipped (search too long)" : "ran",
               skp[g] ? "-" : (nh[g] > 0 ? "Hamiltonian" : "none"), cy[g], ck[g], fl[g]);
      checks += ck[g];
      failures += fl[g];
      if (!skp[g]) ran++;
    end
    checks++;
    if (ran == 0) begin
      failures++;
      $display("FAIL no graph of the workload could be run");
    end
    $display("%0d of %0d graphs run", ran, G);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
