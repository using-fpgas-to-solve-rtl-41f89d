// hc_vertex_fsm - the backtracking state machine of one graph vertex.
//
// Each vertex of the graph gets one of these. Its states are Idle, one state
// NB_k per neighbour k, and Stuck: d+2 states for a vertex of degree d. A
// machine in state NB_k has handed control to neighbour k and waits for it
// to come back. Exactly one machine of the network is in control at a time.
//
//  Idle  -- activate_i --> NB of the first neighbour (in vertex order) whose
//                          machine is idle, or Stuck if there is none.
//  NB_k  -- neighbour k idle again (it has backtracked) --> NB of the next
//                          idle neighbour after k, or Stuck if none is left.
//  Stuck -- next cycle --> Idle. Going back to Idle is the backtrack: the
//                          machine that called this one sees it idle.
//
// Interface and timing. All inputs are sampled at the clock edge; nothing
// passes combinationally from input to output. On entering NB_k the machine
// raises call_o[k] for exactly one cycle (fresh_q); the neighbour's
// activate_i is the OR of the call_o bits aimed at it, so the child leaves
// Idle one edge after the parent entered NB_k. While the call is fresh the
// parent ignores the child's idle flag, which is how it tells "not yet
// started" from "already backtracked". A forward step therefore costs one
// cycle per vertex; a backtrack costs two (Stuck, then the parent decides in
// the cycle the child is Idle). clear_i returns the machine to Idle and wins
// over everything; en_i = 0 freezes it.
//
// Neighbour order, the one-hot encoding of the NB states, the call/fresh
// handshake and the clear/enable inputs are this design's choices; the state
// set, the "next idle neighbour" rule and the Stuck -> Idle backtrack are
// the solver's algorithm. NBRS is the vertex's row of the adjacency matrix,
// a constant, so synthesis keeps only the flip-flops and logic of real
// neighbours.
module hc_vertex_fsm
  import hc_pkg::*;
#(
  parameter int unsigned N      = 35,
  parameter int unsigned VERTEX = 0,
  // bit k set: vertex k is a neighbour (default: every other vertex)
  parameter logic [N-1:0] NBRS  = ~(N'(1) << VERTEX)
) (
  input  logic         clk,
  input  logic         rst_ni,      // asynchronous, active low
  input  logic         clear_i,     // synchronous return to Idle
  input  logic         en_i,        // 0 freezes the machine
  input  logic         activate_i,  // control handed to this vertex
  input  logic [N-1:0] nbr_idle_i,  // idle flags of all vertices
  output logic [N-1:0] call_o,      // one-cycle, one-hot call of a neighbour
  output logic         idle_o,
  output logic         stuck_o
);

  // Self loops are never followed.
  localparam logic [N-1:0] NB_MASK = NBRS & ~(N'(1) << VERTEX);

  vx_mode_e     mode_q, mode_d;
  logic [N-1:0] sel_q, sel_d;      // one-hot neighbour of the NB state
  logic         fresh_q, fresh_d;  // first cycle of an NB state

  logic [N-1:0] later;   // neighbours after the current one in the cycle
  logic [N-1:0] cand;    // idle neighbours that may take control next
  logic [N-1:0] pick;    // lowest of them, one-hot

  always_comb begin
    if (mode_q == VX_IDLE) later = '1;
    else                   later = ~(sel_q | (sel_q - N'(1)));
    cand = NB_MASK & nbr_idle_i & later;
    pick = cand & (~cand + N'(1));
  end

  always_comb begin
    mode_d  = mode_q;
    sel_d   = sel_q;
    fresh_d = 1'b0;
    if (clear_i) begin
      mode_d = VX_IDLE;
      sel_d  = '0;
    end else if (!en_i) begin
      fresh_d = fresh_q;
    end else begin
      unique case (mode_q)
        VX_IDLE: begin
          if (activate_i) begin
            if (cand != '0) begin
              mode_d  = VX_NB;
              sel_d   = pick;
              fresh_d = 1'b1;
            end else begin
              mode_d = VX_STUCK;
            end
          end
        end
        VX_NB: begin
          // control is back when the called neighbour is idle again
          if (!fresh_q && (sel_q & nbr_idle_i) != '0) begin
            if (cand != '0) begin
              sel_d   = pick;
              fresh_d = 1'b1;
            end else begin
              mode_d = VX_STUCK;
              sel_d  = '0;
            end
          end
        end
        VX_STUCK: mode_d = VX_IDLE;
        default: begin
          mode_d = VX_IDLE;
          sel_d  = '0;
        end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_ni) begin
    if (!rst_ni) begin
      mode_q  <= VX_IDLE;
      sel_q   <= '0;
      fresh_q <= 1'b0;
    end else begin
      mode_q  <= mode_d;
      sel_q   <= sel_d;
      fresh_q <= fresh_d;
    end
  end

  assign call_o  = fresh_q ? sel_q : '0;
  assign idle_o  = (mode_q == VX_IDLE);
  assign stuck_o = (mode_q == VX_STUCK);

  // Only one machine is in control, and it only calls idle machines.
  a_activate_when_idle : assert property (
    @(posedge clk) disable iff (!rst_ni)
    (en_i && !clear_i && activate_i) |-> (mode_q == VX_IDLE));
  a_call_onehot : assert property (
    @(posedge clk) disable iff (!rst_ni) $onehot0(call_o));
  a_nb_state_valid : assert property (
    @(posedge clk) disable iff (!rst_ni)
    (mode_q == VX_NB) |-> ($onehot(sel_q) && (sel_q & ~NB_MASK) == '0));

endmodule
