// tb_hc_solver_full - the solver at its default size: the complete graph on
// 35 vertices, no parameter overridden.
//
// One complete search: the answer must be isHamiltonian, every machine must
// be on the path, and the cycle count must match the reference search
// (34 calls, no backtrack: 36 cycles from the start edge to done). A
// second start checks the restart.
module tb_hc_solver_full;
  import hc_pkg::*;
  import hc_ref_pkg::*;

  localparam int NV = 35;

  logic          clk = 1'b0;
  logic          rst_ni = 1'b0;
  logic          start = 1'b0;
  logic          busy, done, is_ham, no_ham;
  logic [NV-1:0] act, stk;
  int            checks = 0, failures = 0;

  hc_solver dut (
    .clk, .rst_ni, .start_i(start), .busy_o(busy), .done_o(done),
    .is_hamiltonian_o(is_ham), .no_hamiltonian_o(no_ham),
    .vertex_active_o(act), .vertex_stuck_o(stk));

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    ref_result_t r;
    int lat;
    r = ref_search(complete_graph(NV), NV, 0, 1000);
    chk(!r.aborted && r.is_ham, "reference: K35 must be Hamiltonian");
    repeat (3) @(posedge clk);
    rst_ni = 1'b1;
    for (int run = 0; run < 2; run++) begin
      @(negedge clk) start = 1'b1;
      @(posedge clk);
      #1 start = 1'b0;
      lat = 0;
      while (!done && lat < 1000) begin
        @(posedge clk);
        #1 lat++;
      end
      $display("run %0d: done after %0d cycles, isHamiltonian=%b", run, lat, is_ham);
      chk(done, "done never rose");
      chk(lat == int'(r.latency), $sformatf("latency %0d expected %0d", lat, r.latency));
      chk(is_ham && !no_ham, "answer must be isHamiltonian");
      chk(act == '1, "all 35 machines must be on the path");
      chk($countones(stk) == 1, "exactly one machine in Stuck at the end");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
