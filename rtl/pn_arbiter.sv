// Arbiter of one switch.
//
// Acts as referee between the input controllers (ICs) that ask for an
// output link, and keeps the ownership table that the crossbar and the
// answer path use. Each IC may present one request per cycle (rq_valid,
// rq_port). An output is granted only when nobody owns it and its output
// controller reports the link idle (Req low and the downstream answer back
// to "no answer"); among several ICs asking for the same free output in
// the same cycle, a round-robin pointer per output picks one. The grant is
// combinational, so an IC learns in the cycle of its request whether it
// got the link; ownership is registered and takes effect in the next
// cycle. An owner gives the output back with a one-cycle rel pulse.
//
// The answer returned by the downstream switch on each output is steered
// back to the IC that owns it (the "grant bus"); an IC that owns no output
// sees ANS_NONE. Round-robin priority is a choice of this design; the
// network only asks the arbiter to referee.
module pn_arbiter
  import pn_pkg::*;
#(
  parameter int unsigned N_IN  = 4,
  parameter int unsigned N_OUT = 4,
  localparam int unsigned IW   = (N_IN  > 1) ? $clog2(N_IN)  : 1,
  localparam int unsigned OW   = (N_OUT > 1) ? $clog2(N_OUT) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // requests from the ICs
  input  logic [N_IN-1:0]           rq_valid,
  input  logic [N_IN-1:0][OW-1:0]   rq_port,
  input  logic [N_IN-1:0]           rel,
  output logic [N_IN-1:0]           grant,
  // link state from the output controllers
  input  logic [N_OUT-1:0]          out_idle,
  input  ans_t [N_OUT-1:0]          out_ans,
  // ownership table (to the crossbar) and answer per IC (grant bus)
  output logic [N_OUT-1:0]          own_valid,
  output logic [N_OUT-1:0][IW-1:0]  own_ic,
  output ans_t [N_IN-1:0]           ic_ans
);

  logic [N_OUT-1:0][IW-1:0] rr_q;
  logic [N_OUT-1:0]         win_valid;
  logic [N_OUT-1:0][IW-1:0] win_ic;

  // Pick, for every free and idle output, the first requester at or after
  // the round-robin pointer.
  always_comb begin
    win_valid = '0;
    win_ic    = '0;
    grant     = '0;
    for (int unsigned o = 0; o < N_OUT; o++) begin
      if (!own_valid[o] && out_idle[o]) begin
        for (int unsigned k = 0; k < N_IN; k++) begin
          if (!win_valid[o] && rq_valid[(int'(rr_q[o]) + k) % N_IN]
              && (int'(rq_port[(int'(rr_q[o]) + k) % N_IN]) == o)) begin
            win_valid[o] = 1'b1;
            win_ic[o]    = IW'((int'(rr_q[o]) + k) % N_IN);
          end
        end
      end
      if (win_valid[o]) grant[win_ic[o]] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      own_valid <= '0;
      own_ic    <= '0;
      rr_q      <= '0;
    end else begin
      for (int unsigned o = 0; o < N_OUT; o++) begin
        if (own_valid[o] && rel[own_ic[o]]) begin
          own_valid[o] <= 1'b0;
        end else if (win_valid[o]) begin
          own_valid[o] <= 1'b1;
          own_ic[o]    <= win_ic[o];
          rr_q[o]      <= IW'((int'(win_ic[o]) + 1) % N_IN);
        end
      end
    end
  end

  // Grant bus: route each output's answer to its owner.
  always_comb begin
    for (int unsigned i = 0; i < N_IN; i++) ic_ans[i] = ANS_NONE;
    for (int unsigned o = 0; o < N_OUT; o++)
      if (own_valid[o]) ic_ans[own_ic[o]] = out_ans[o];
  end

  // An output is never granted while it is owned or its link is busy.
  for (genvar o = 0; o < N_OUT; o++) begin : g_chk
    a_grant_free: assert property (@(posedge clk) disable iff (!rst_n)
      win_valid[o] |-> (!own_valid[o] && out_idle[o]));
  end

endmodule
