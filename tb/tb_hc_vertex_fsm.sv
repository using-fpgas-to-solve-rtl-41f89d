// tb_hc_vertex_fsm - self-checking testbench of one vertex machine.
//
// A machine of vertex 3 in an 8-vertex graph with neighbours {0, 2, 5, 7}
// (and a self loop in NBRS, which must be ignored) is driven with random
// neighbour idle flags, activations (only while it is idle, as in the real
// network), enable and clear. An independent model written with a neighbour
// index instead of a one-hot vector predicts call_o, idle_o and stuck_o every
// cycle. A directed sequence first walks the whole state cycle
// Idle -> NB_0 -> NB_5 -> NB_7 -> Stuck -> Idle (neighbour 2 busy, so
// skipped), then Idle -> Stuck with every neighbour busy, and checks the
// one-cycle call pulse and the two-cycle backtrack.
module tb_hc_vertex_fsm;
  localparam int unsigned N = 8;
  localparam int unsigned V = 3;
  localparam logic [N-1:0] NBRS = 8'b1010_1101;   // 0, 2, 3 (self), 5, 7

  logic         clk = 1'b0;
  logic         rst_ni = 1'b0;
  logic         clear, en, activate;
  logic [N-1:0] nbr_idle;
  logic [N-1:0] call;
  logic         idle, stuck;
  int           checks = 0, failures = 0;

  hc_vertex_fsm #(.N(N), .VERTEX(V), .NBRS(NBRS)) dut (
    .clk, .rst_ni, .clear_i(clear), .en_i(en), .activate_i(activate),
    .nbr_idle_i(nbr_idle), .call_o(call), .idle_o(idle), .stuck_o(stuck));

  always #5 clk = ~clk;

  // ---- independent model: mode 0 idle, 1 calling neighbour cur, 2 stuck
  int m_mode = 0, m_cur = 0;
  bit m_fresh = 0;

  function automatic int next_nbr(int after, logic [N-1:0] idl);
    for (int k = after + 1; k < int'(N); k++)
      if (k != int'(V) && NBRS[k] && idl[k]) return k;
    return -1;
  endfunction

  task automatic model_step();
    int nx;
    bit fr;
    fr = 1'b0;
    if (clear) begin
      m_mode = 0;
    end else if (!en) begin
      fr = m_fresh;
    end else if (m_mode == 0) begin
      if (activate) begin
        nx = next_nbr(-1, nbr_idle);
        if (nx >= 0) begin m_mode = 1; m_cur = nx; fr = 1'b1; end
        else m_mode = 2;
      end
    end else if (m_mode == 1) begin
      if (!m_fresh && nbr_idle[m_cur]) begin
        nx = next_nbr(m_cur, nbr_idle);
        if (nx >= 0) begin m_cur = nx; fr = 1'b1; end
        else m_mode = 2;
      end
    end else begin
      m_mode = 0;
    end
    m_fresh = fr;
  endtask

  task automatic compare(string what);
    logic [N-1:0] exp_call;
    exp_call = (m_mode == 1 && m_fresh) ? (N'(1) << m_cur) : '0;
    checks++;
    if (call !== exp_call || idle !== (m_mode == 0) || stuck !== (m_mode == 2)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s t=%0t call=%b exp=%b idle=%b stuck=%b model mode=%0d",
                 what, $time, call, exp_call, idle, stuck, m_mode);
    end
  endtask

  // one clock: apply inputs, advance model, compare after the edge
  task automatic cycle(string what);
    @(posedge clk);
    model_step();
    #1 compare(what);
  endtask

  // ---- directed walk through the whole state cycle
  task automatic directed();
    clear = 0; en = 1; nbr_idle = '1; activate = 1;
    cycle("activate");                    // Idle -> NB_0, call 0
    activate = 0;
    if (call != 8'b0000_0001) begin failures++; $display("FAIL first call %b", call); end
    checks++;
    nbr_idle[0] = 1'b0;                   // neighbour 0 takes control
    cycle("call pulse ends");
    checks++;
    if (call != '0) begin failures++; $display("FAIL call not one cycle"); end
    repeat (3) cycle("wait child");       // child busy: stay in NB_0
    nbr_idle[0] = 1'b1;                   // child backtracks
    nbr_idle[2] = 1'b0;                   // 2 busy elsewhere: skip it
    cycle("to NB_5");
    checks++;
    if (call != 8'b0010_0000) begin failures++; $display("FAIL skip busy neighbour %b", call); end
    nbr_idle[5] = 1'b0;
    cycle("child 5 runs");
    nbr_idle[5] = 1'b1;
    cycle("to NB_7");
    nbr_idle[7] = 1'b0;
    cycle("child 7 runs");
    nbr_idle[7] = 1'b1;
    cycle("stuck");
    checks++;
    if (!stuck) begin failures++; $display("FAIL no Stuck after last neighbour"); end
    cycle("back to idle");
    checks++;
    if (!idle) begin failures++; $display("FAIL Stuck did not return to Idle"); end
    // all neighbours busy: Idle -> Stuck directly
    nbr_idle = 8'b0000_1000;
    activate = idle;                      // only an idle machine is called
    cycle("direct stuck");
    activate = 0;
    checks++;
    if (!stuck) begin failures++; $display("FAIL no direct Stuck"); end
    cycle("idle again");
  endtask

  initial begin
    clear = 0; en = 0; activate = 0; nbr_idle = '1;
    repeat (2) @(posedge clk);
    rst_ni = 1'b1;
    #1 compare("reset");
    directed();
    // ---- random phase
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      nbr_idle = N'($urandom());
      en       = ($urandom_range(0, 9) != 0);
      clear    = ($urandom_range(0, 199) == 0);
      activate = (m_mode == 0) && idle && ($urandom_range(0, 3) == 0);
      // a called child stays busy during the call pulse, as in the network
      if (m_mode == 1 && m_fresh) nbr_idle[m_cur] = 1'b1;
      cycle("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
