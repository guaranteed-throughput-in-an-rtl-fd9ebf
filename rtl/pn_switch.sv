// Circuit switch of the permutation network (common switch architecture).
//
// One input controller (IC) per input port, one output controller (OC)
// per output port, an arbiter and a crossbar. The ICs run the path setup,
// transfer and release phases and ask the arbiter for output links; the
// arbiter grants free links, records which IC owns which output, and
// sends each output's answer back to its owner; the crossbar carries the
// owners' Req and data to the OCs, whose registers drive the outgoing
// links. The three kinds of switch in the network share this structure
// and differ only in the probe routing of their ICs, chosen by STAGE
// (see pn_input_ctrl). ROUTE_LSB and ROUTE_W say which address bits the
// middle and last stages route on.
//
// Timing: Req and data leave one clock after they arrive; answers go back
// upstream one clock after they arrive from downstream.
module pn_switch
  import pn_pkg::*;
#(
  parameter stage_t      STAGE     = STAGE_FIRST,
  parameter int unsigned N_IN      = 4,
  parameter int unsigned N_OUT     = 4,
  parameter int unsigned ROUTE_LSB = 0,
  parameter int unsigned ROUTE_W   = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  fwd_t [N_IN-1:0]   in_fwd,
  output ans_t [N_IN-1:0]   in_ans,
  output fwd_t [N_OUT-1:0]  out_fwd,
  input  ans_t [N_OUT-1:0]  out_ans
);

  localparam int unsigned IW = (N_IN  > 1) ? $clog2(N_IN)  : 1;
  localparam int unsigned OW = (N_OUT > 1) ? $clog2(N_OUT) : 1;

  logic [N_IN-1:0]          rq_valid, rel, grant;
  logic [N_IN-1:0][OW-1:0]  rq_port;
  ans_t [N_IN-1:0]          ic_ans;
  fwd_t [N_IN-1:0]          ic_fwd;
  logic [N_OUT-1:0]         own_valid, out_idle;
  logic [N_OUT-1:0][IW-1:0] own_ic;
  fwd_t [N_OUT-1:0]         xbar_fwd;

  for (genvar i = 0; i < N_IN; i++) begin : g_ic
    pn_input_ctrl #(
      .STAGE(STAGE), .N_OUT(N_OUT),
      .ROUTE_LSB(ROUTE_LSB), .ROUTE_W(ROUTE_W)
    ) u_ic (
      .clk, .rst_n,
      .in_fwd  (in_fwd[i]),
      .in_ans  (in_ans[i]),
      .rq_valid(rq_valid[i]),
      .rq_port (rq_port[i]),
      .rel     (rel[i]),
      .grant   (grant[i]),
      .out_ans (ic_ans[i]),
      .out_fwd (ic_fwd[i])
    );
  end

  pn_arbiter #(.N_IN(N_IN), .N_OUT(N_OUT)) u_arb (
    .clk, .rst_n,
    .rq_valid, .rq_port, .rel, .grant,
    .out_idle, .out_ans,
    .own_valid, .own_ic, .ic_ans
  );

  pn_crossbar #(.N_IN(N_IN), .N_OUT(N_OUT)) u_xbar (
    .in_fwd(ic_fwd), .own_valid, .own_ic, .out_fwd(xbar_fwd)
  );

  for (genvar o = 0; o < N_OUT; o++) begin : g_oc
    pn_output_ctrl u_oc (
      .clk, .rst_n,
      .xbar_fwd (xbar_fwd[o]),
      .link_fwd (out_fwd[o]),
      .link_ans (out_ans[o]),
      .link_idle(out_idle[o])
    );
  end

endmodule
