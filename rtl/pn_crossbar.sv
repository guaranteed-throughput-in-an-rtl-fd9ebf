// Crossbar of one switch.
//
// Forward datapath from the input controllers to the output controllers:
// each output carries the forward signals (Req, valid, data) of the IC
// that the arbiter's ownership table names for it, and all zeros (Req
// low, i.e. released) when nobody owns it. Purely combinational; the
// output controller behind it holds the pipeline register.
module pn_crossbar
  import pn_pkg::*;
#(
  parameter int unsigned N_IN  = 4,
  parameter int unsigned N_OUT = 4,
  localparam int unsigned IW   = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  fwd_t [N_IN-1:0]          in_fwd,
  input  logic [N_OUT-1:0]         own_valid,
  input  logic [N_OUT-1:0][IW-1:0] own_ic,
  output fwd_t [N_OUT-1:0]         out_fwd
);

  always_comb begin
    for (int unsigned o = 0; o < N_OUT; o++)
      out_fwd[o] = own_valid[o] ? in_fwd[own_ic[o]] : '0;
  end

endmodule
