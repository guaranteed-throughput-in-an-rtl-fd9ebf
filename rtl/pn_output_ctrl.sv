// Output controller (OC) of one switch port.
//
// Holds the pipeline register of an outgoing link: the Req bit and the
// data word chosen by the crossbar leave the switch one clock after they
// enter it, which is what makes the circuit-switched path a pipeline with
// one stage per switch. It also tells the arbiter when the link may be
// handed to a new owner: only when the registered Req is low and the
// downstream switch has returned its answer to "no answer", so that an
// answer belonging to a released path can never reach the next owner.
// The idle rule is a choice of this design.
module pn_output_ctrl
  import pn_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  fwd_t xbar_fwd,   // from the crossbar
  output fwd_t link_fwd,   // to the downstream switch
  input  ans_t link_ans,   // from the downstream switch
  output logic link_idle   // to the arbiter
);

  always_ff @(posedge clk) begin
    if (!rst_n) link_fwd <= '0;
    else        link_fwd <= xbar_fwd;
  end

  assign link_idle = !link_fwd.req && (link_ans == ANS_NONE);

endmodule
