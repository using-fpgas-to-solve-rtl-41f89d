// hc_control - start and termination controller of the solver network.
//
// A start request clears every vertex machine and then hands control to the
// initial machine (vertex START, chosen arbitrarily). The search then runs on
// its own inside the network until one of the two end conditions holds:
//   noHamiltonian  the initial machine backtracks: it is in Stuck, having
//                  tried all of its neighbours.
//   isHamiltonian  no machine is idle, so the chain of calls is a path
//                  through all N vertices, and the machine in control (the
//                  last vertex of the path, which is in Stuck because all of
//                  its neighbours are busy) is adjacent to the initial vertex.
// The answer is latched and the network frozen (en_o low), so the path that
// closed the cycle stays visible in the machines' states.
//
// Interface and timing. start_i is taken in CTL_IDLE or CTL_DONE; the same
// edge clears the network (clear_o is combinational from start_i). The next
// cycle (CTL_LAUNCH) drives launch_o to activate the initial machine. The end
// condition is evaluated on the machines' registered states each cycle in
// CTL_RUN; en_o drops in that same cycle, and done_o, is_ham_o / no_ham_o
// rise at the following edge and hold until the next start. The end
// conditions are the solver's; the states, the clear cycle and the freeze
// are this design's choices.
module hc_control
  import hc_pkg::*;
#(
  parameter int unsigned N       = 35,
  parameter int unsigned START   = 0,
  // bit v set: vertex v is adjacent to the initial vertex
  parameter logic [N-1:0] TO_START = ~(N'(1) << START)
) (
  input  logic         clk,
  input  logic         rst_ni,
  input  logic         start_i,
  input  logic [N-1:0] idle_i,    // per vertex machine: in Idle
  input  logic [N-1:0] stuck_i,   // per vertex machine: in Stuck
  output logic         clear_o,   // return all machines to Idle
  output logic         en_o,      // machines may change state
  output logic         launch_o,  // activate the initial machine
  output logic         busy_o,
  output logic         done_o,
  output logic         is_ham_o,
  output logic         no_ham_o
);

  ctl_state_e state_q, state_d;
  logic       is_ham_q, is_ham_d;
  logic       no_ham_q, no_ham_d;
  logic       found, failed, accept;

  assign accept = start_i && (state_q == CTL_IDLE || state_q == CTL_DONE);
  assign found  = (state_q == CTL_RUN) && (idle_i == '0) &&
                  ((stuck_i & TO_START) != '0);
  assign failed = (state_q == CTL_RUN) && stuck_i[START];

  always_comb begin
    state_d  = state_q;
    is_ham_d = is_ham_q;
    no_ham_d = no_ham_q;
    unique case (state_q)
      CTL_IDLE, CTL_DONE: begin
        if (accept) begin
          state_d  = CTL_LAUNCH;
          is_ham_d = 1'b0;
          no_ham_d = 1'b0;
        end
      end
      CTL_LAUNCH: state_d = CTL_RUN;
      CTL_RUN: begin
        if (found) begin
          state_d  = CTL_DONE;
          is_ham_d = 1'b1;
        end else if (failed) begin
          state_d  = CTL_DONE;
          no_ham_d = 1'b1;
        end
      end
      default: state_d = CTL_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q  <= CTL_IDLE;
      is_ham_q <= 1'b0;
      no_ham_q <= 1'b0;
    end else begin
      state_q  <= state_d;
      is_ham_q <= is_ham_d;
      no_ham_q <= no_ham_d;
    end
  end

  assign clear_o  = accept;
  assign launch_o = (state_q == CTL_LAUNCH);
  assign en_o     = (state_q == CTL_LAUNCH) ||
                    (state_q == CTL_RUN && !found && !failed);
  assign busy_o   = (state_q == CTL_LAUNCH) || (state_q == CTL_RUN);
  assign done_o   = (state_q == CTL_DONE);
  assign is_ham_o = is_ham_q;
  assign no_ham_o = no_ham_q;

  a_one_answer : assert property (
    @(posedge clk) disable iff (!rst_ni) !(is_ham_q && no_ham_q));

endmodule
