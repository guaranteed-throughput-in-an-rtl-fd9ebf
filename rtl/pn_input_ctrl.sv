// Input controller (IC) of one switch port.
//
// A finite-state machine that runs the three phases of pipelined circuit
// switching on one input link: setup, transfer and release.
//
//   IDLE  Req has been low. When Req rises, the destination address is
//         taken from the low data bits (the probe); the IC keeps
//         the ROUTE_W bits at ROUTE_LSB that its stage routes on.
//   REQ   Ask the arbiter for an output link chosen by the stage's probe
//         routing algorithm (below). A link that is not granted is
//         blocked.
//   WAIT  The probe (Req and address) is forwarded on the granted link
//         and the controller waits for the downstream answer. Ack or nAck
//         means the path is set up: go to XFER. Back means the path is
//         blocked further on: release the link (Req low) and backtrack.
//   XFER  Req, valid and data pass straight through; the downstream
//         answer (Ack / nAck, end-to-end flow control) is passed back.
//   BACK  Answer Back upstream until the upstream releases (Req low).
//
// Whenever Req falls the held link is released and the FSM returns to
// IDLE, which is the release phase. The answer upstream is registered, so
// every switch adds one cycle in each direction.
//
// Probe routing, by STAGE (exhaustive profitable backtracking):
//   first stage   tries the middle-stage outputs in the order 0,1,2,...,
//                 each at most once; a busy link is skipped, and a Back
//                 from downstream makes it try the next one. Only when all
//                 have failed is Back returned to the source.
//   middle stage  the only profitable output is the last-stage switch that
//                 holds the destination, addr[ROUTE_LSB +: ROUTE_W].
//   last stage    the output port addr[ROUTE_LSB +: ROUTE_W].
// Middle and last stages answer Back when their one output is blocked.
// The network fixes the phases, the answer codes and the first-stage
// search order; the state encoding and the timing are this design's.
module pn_input_ctrl
  import pn_pkg::*;
#(
  parameter stage_t      STAGE     = STAGE_FIRST,
  parameter int unsigned N_OUT     = 4,
  parameter int unsigned ROUTE_LSB = 0,
  parameter int unsigned ROUTE_W   = 2,
  localparam int unsigned OW       = (N_OUT > 1) ? $clog2(N_OUT) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // upstream link
  input  fwd_t          in_fwd,
  output ans_t          in_ans,
  // to the arbiter
  output logic          rq_valid,
  output logic [OW-1:0] rq_port,
  output logic          rel,
  input  logic          grant,
  input  ans_t          out_ans,   // answer of the owned output (grant bus)
  // to the crossbar
  output fwd_t          out_fwd
);

  typedef enum logic [2:0] {S_IDLE, S_REQ, S_WAIT, S_XFER, S_BACK} state_t;

  state_t              state_q;
  logic [ROUTE_W-1:0]  addr_q;     // address bits this stage routes on
  logic [OW-1:0]       try_q;      // first stage: middle switch being tried
  ans_t                ans_q;

  logic [OW-1:0] route;
  logic          last_try;
  logic          holding;          // owns an output this cycle

  assign route    = (STAGE == STAGE_FIRST) ? try_q : OW'(addr_q);
  assign last_try = (STAGE != STAGE_FIRST) || (int'(try_q) == N_OUT - 1);
  assign holding  = (state_q == S_WAIT) || (state_q == S_XFER);

  assign rq_valid = (state_q == S_REQ) && in_fwd.req;
  assign rq_port  = route;
  assign rel      = holding && (!in_fwd.req || (state_q == S_WAIT && out_ans == ANS_BACK));
  assign out_fwd  = (holding && !rel) ? in_fwd : '0;
  assign in_ans   = ans_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      addr_q  <= '0;
      try_q   <= '0;
      ans_q   <= ANS_NONE;
    end else if (!in_fwd.req) begin
      // release phase (or an aborted setup)
      state_q <= S_IDLE;
      ans_q   <= ANS_NONE;
    end else begin
      unique case (state_q)
        S_IDLE: begin
          addr_q  <= in_fwd.data[ROUTE_LSB +: ROUTE_W];
          try_q   <= '0;
          ans_q   <= ANS_NONE;
          state_q <= S_REQ;
        end
        S_REQ: begin
          if (grant) begin
            state_q <= S_WAIT;
          end else if (last_try) begin
            state_q <= S_BACK;
            ans_q   <= ANS_BACK;
          end else begin
            try_q   <= try_q + 1'b1;
          end
        end
        S_WAIT: begin
          unique case (out_ans)
            ANS_ACK, ANS_NACK: begin
              state_q <= S_XFER;
              ans_q   <= out_ans;
            end
            ANS_BACK: begin
              if (last_try) begin
                state_q <= S_BACK;
                ans_q   <= ANS_BACK;
              end else begin
                try_q   <= try_q + 1'b1;
                state_q <= S_REQ;
              end
            end
            default: ;
          endcase
        end
        S_XFER: begin
          if (out_ans == ANS_ACK || out_ans == ANS_NACK) ans_q <= out_ans;
        end
        S_BACK: ans_q <= ANS_BACK;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Handshake rules seen from the upstream link.
  a_ack_only_when_set_up: assert property (@(posedge clk) disable iff (!rst_n)
    (in_ans == ANS_ACK || in_ans == ANS_NACK) |-> (state_q == S_XFER));
  a_back_only_when_blocked: assert property (@(posedge clk) disable iff (!rst_n)
    (in_ans == ANS_BACK) |-> (state_q == S_BACK));
  a_release_on_req_low: assert property (@(posedge clk) disable iff (!rst_n)
    !in_fwd.req |=> (state_q == S_IDLE && in_ans == ANS_NONE));

endmodule
