// tb_hc_control - self-checking testbench of the start/termination
// controller.
//
// Five vertices, initial vertex 1, vertices 0, 2 and 4 adjacent to it.
// Directed cases: the isHamiltonian condition (no machine idle, the Stuck
// machine adjacent to the initial vertex), a full path whose end is not
// adjacent (no answer), the initial machine in Stuck (noHamiltonian), a start
// ignored while busy, and a restart after an answer. Then random idle/stuck
// patterns and starts, checked every cycle against an independent model.
module tb_hc_control;
  import hc_pkg::*;
  localparam int unsigned N = 5;
  localparam int unsigned S = 1;
  localparam logic [N-1:0] TO_S = 5'b10101;

  logic         clk = 1'b0;
  logic         rst_ni = 1'b0;
  logic         start;
  logic [N-1:0] idle_v, stuck_v;
  logic         clear, en, launch, busy, done, is_ham, no_ham;
  int           checks = 0, failures = 0;

  hc_control #(.N(N), .START(S), .TO_START(TO_S)) dut (
    .clk, .rst_ni, .start_i(start), .idle_i(idle_v), .stuck_i(stuck_v),
    .clear_o(clear), .en_o(en), .launch_o(launch), .busy_o(busy),
    .done_o(done), .is_ham_o(is_ham), .no_ham_o(no_ham));

  always #5 clk = ~clk;

  // model: 0 idle, 1 launch, 2 run, 3 done
  int m_st = 0;
  bit m_is = 0, m_no = 0;

  function automatic bit m_found();
    return m_st == 2 && idle_v == '0 && (stuck_v & TO_S) != '0;
  endfunction
  function automatic bit m_failed();
    return m_st == 2 && stuck_v[S];
  endfunction

  task automatic check_comb(string what);
    bit e_clear, e_en;
    e_clear = start && (m_st == 0 || m_st == 3);
    e_en    = (m_st == 1) || (m_st == 2 && !m_found() && !m_failed());
    checks++;
    if (clear !== e_clear || en !== e_en || launch !== (m_st == 1) ||
        busy !== (m_st == 1 || m_st == 2) || done !== (m_st == 3) ||
        is_ham !== m_is || no_ham !== m_no) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s t=%0t clr=%b en=%b la=%b busy=%b done=%b is=%b no=%b model st=%0d",
                 what, $time, clear, en, launch, busy, done, is_ham, no_ham, m_st);
    end
  endtask

  task automatic model_step();
    case (m_st)
      0, 3: if (start) begin m_st = 1; m_is = 0; m_no = 0; end
      1: m_st = 2;
      2: if (m_found()) begin m_st = 3; m_is = 1; end
         else if (m_failed()) begin m_st = 3; m_no = 1; end
      default: ;
    endcase
  endtask

  // drive inputs at the negedge, check combinational outputs, clock
  task automatic step(logic st, logic [N-1:0] idl, logic [N-1:0] stk,
                      string what);
    @(negedge clk);
    start = st; idle_v = idl; stuck_v = stk;
    #1 check_comb(what);
    @(posedge clk);
    model_step();
    #1 check_comb({what, " after edge"});
  endtask

  task automatic expect_flags(bit d, bit i, bit n, string what);
    checks++;
    if (done !== d || is_ham !== i || no_ham !== n) begin
      failures++;
      $display("FAIL %s: done=%b is=%b no=%b", what, done, is_ham, no_ham);
    end
  endtask

  initial begin
    start = 0; idle_v = '1; stuck_v = '0;
    repeat (2) @(posedge clk);
    rst_ni = 1'b1;
    // isHamiltonian: all busy, vertex 4 (adjacent to 1) stuck
    step(1, '1, '0, "start");
    step(0, 5'b11101, '0, "launch");
    step(1, 5'b11001, '0, "start while busy");
    step(0, 5'b00000, 5'b10000, "found");
    expect_flags(1, 1, 0, "isHamiltonian");
    step(0, 5'b00000, 5'b10000, "hold");
    expect_flags(1, 1, 0, "isHamiltonian held");
    // restart; full path ending at 3 (not adjacent): keep running
    step(1, '0, '0, "restart");
    expect_flags(0, 0, 0, "restart clears answer");
    step(0, 5'b11101, '0, "launch 2");
    step(0, 5'b00000, 5'b01000, "path not closing");
    expect_flags(0, 0, 0, "no answer for open path");
    // initial vertex stuck: noHamiltonian
    step(0, 5'b11101, 5'b00010, "initial backtracks");
    expect_flags(1, 0, 1, "noHamiltonian");
    // random phase
    for (int i = 0; i < 5000; i++)
      step(($urandom_range(0, 7) == 0), N'($urandom()),
           ($urandom_range(0, 3) == 0) ? (N'(1) << $urandom_range(0, N-1)) : '0,
           "random");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
