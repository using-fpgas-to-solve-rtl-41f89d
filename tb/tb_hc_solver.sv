// tb_hc_solver - end-to-end testbench of the solver at small sizes.
//
// Twelve solver circuits, each built for its own graph, run side by side:
// hand-made graphs with a known answer (a 4-cycle, K_{2,3}, two triangles
// joined by one edge, K5, a 6-vertex prism) and random graphs of 10 to 20
// vertices drawn with the same generator as the evaluated graphs. Each is
// checked against the reference search (answer, exact cycle count, number of
// calls, backtracks and direct Idle->Stuck moves), started twice (restart
// after an answer) and poked with a start pulse while busy. The test fails if
// any mechanism (call, backtrack, direct Stuck, isHamiltonian, noHamiltonian,
// ignored start, restart) never happened, or if a graph had to be skipped.
module tb_hc_solver;
  import hc_pkg::*;

  localparam int G = 12;

  // up to 12 edges, each {a, b} as two bytes; 16'hFFFF ends the list
  typedef logic [0:11][15:0] edge_list_t;

  function automatic adj_t edges(edge_list_t e);
    adj_t g = '0;
    for (int i = 0; i < 12; i++)
      if (e[i] != 16'hFFFF) begin
        g[e[i][15:8]][e[i][7:0]] = 1'b1;
        g[e[i][7:0]][e[i][15:8]] = 1'b1;
      end
    return g;
  endfunction

  localparam adj_t C4    = edges({16'h0001, 16'h0102, 16'h0203, 16'h0300,
                                  {8{16'hFFFF}}});
  localparam adj_t K23   = edges({16'h0002, 16'h0003, 16'h0004, 16'h0102,
                                  16'h0103, 16'h0104, {6{16'hFFFF}}});
  localparam adj_t TWO_T = edges({16'h0001, 16'h0102, 16'h0200, 16'h0304,
                                  16'h0405, 16'h0503, 16'h0203, {5{16'hFFFF}}});
  localparam adj_t PRISM = edges({16'h0001, 16'h0102, 16'h0200, 16'h0304,
                                  16'h0405, 16'h0503, 16'h0003, 16'h0104,
                                  16'h0205, {3{16'hFFFF}}});

  logic clk = 1'b0;
  logic rst_ni = 1'b0;
  logic go = 1'b0;
  always #5 clk = ~clk;

  logic   fin [G], skp [G];
  int     ck [G], fl [G], nh [G], nn [G], nc [G], nb [G], nd [G], ni [G], nr [G];
  longint cy [G];

`define HC_CHECK(IDX, NV, ST, GRAPH) \
  hc_solver_check #(.N(NV), .START(ST), .ADJ(GRAPH), .BUDGET(200000), .RUNS(2)) u_g``IDX ( \
    .clk, .rst_ni, .go_i(go), .finished(fin[IDX]), .skipped(skp[IDX]), \
    .checks(ck[IDX]), .failures(fl[IDX]), .n_ham(nh[IDX]), .n_noham(nn[IDX]), \
    .n_calls(nc[IDX]), .n_backtracks(nb[IDX]), .n_direct_stuck(nd[IDX]), \
    .n_ignored_start(ni[IDX]), .n_restart(nr[IDX]), .cycles(cy[IDX]));

  `HC_CHECK(0, 4, 0, C4)
  `HC_CHECK(1, 5, 0, K23)
  `HC_CHECK(2, 6, 1, TWO_T)
  `HC_CHECK(3, 5, 2, complete_graph(5))
  `HC_CHECK(4, 6, 0, PRISM)
  `HC_CHECK(5, 10, 0, random_graph(10, 300, 1))
  `HC_CHECK(6, 12, 0, random_graph(12, 250, 7))
  `HC_CHECK(7, 14, 0, random_graph(14, 200, 11))
  `HC_CHECK(8, 16, 3, random_graph(16, 180, 21))
  `HC_CHECK(9, 18, 0, random_graph(18, 150, 5))
  `HC_CHECK(10, 20, 0, random_graph(20, 150, 9))
  `HC_CHECK(11, 20, 5, random_graph(20, 200, 33))

  int checks = 0, failures = 0;

  task automatic need(int count, string what);
    checks++;
    $display("mechanism %-28s happened %0d times", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    int sh = 0, sn = 0, sc = 0, sb = 0, sd = 0, si = 0, sr = 0;
    repeat (3) @(posedge clk);
    rst_ni = 1'b1;
    @(posedge clk);
    go = 1'b1;
    for (int g = 0; g < G; g++) wait (fin[g]);
    for (int g = 0; g < G; g++) begin
      $display("graph %0d: %s checks=%0d failures=%0d ham=%0d noham=%0d cycles=%0d",
               g, skp[g] ? "SKIPPED" : "ran", ck[g], fl[g], nh[g], nn[g], cy[g]);
      checks += ck[g];
      failures += fl[g];
      checks++;
      if (skp[g]) failures++;
      sh += nh[g]; sn += nn[g]; sc += nc[g]; sb += nb[g]; sd += nd[g];
      si += ni[g]; sr += nr[g];
    end
    need(sc, "call (control passed)");
    need(sb, "backtrack after calls");
    need(sd, "Idle->Stuck directly");
    need(sh, "isHamiltonian");
    need(sn, "noHamiltonian");
    need(si, "start ignored while busy");
    need(sr, "restart after answer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
