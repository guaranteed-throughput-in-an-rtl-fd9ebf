// Shared types and constants of the permutation network.
//
// A link between two switches (or between a processing element and the
// network) carries, downstream, one request bit (Req) together with a
// data word, and upstream a two-bit answer (Ans). Req=1 asks for and then
// holds the link; Req=0 releases it. The answers are Ack (01: path set up,
// receiver ready), Back (10: link blocked, backtrack) and nAck (11: path
// set up but the receiver is not ready). The code 00 means "no answer" and
// is what an idle or still-searching switch returns.
//
// During path setup the low bits of the data word carry the
// destination output address (the probe). During transfer a valid bit
// marks the cycles that carry a data word, so a source may pause when it
// sees nAck. The valid bit and the 32-bit data width are choices of this
// design; the request and answer codes follow the network's handshake.
package pn_pkg;

  localparam int unsigned DATA_W = 32;

  typedef enum logic [1:0] {
    ANS_NONE = 2'b00,
    ANS_ACK  = 2'b01,
    ANS_BACK = 2'b10,
    ANS_NACK = 2'b11
  } ans_t;

  // Downstream half of a link.
  typedef struct packed {
    logic              req;
    logic              vld;
    logic [DATA_W-1:0] data;
  } fwd_t;

  // Position of a switch in the three-stage network; selects the probe
  // routing algorithm of its input controllers.
  typedef enum logic [1:0] {
    STAGE_FIRST  = 2'd0,
    STAGE_MIDDLE = 2'd1,
    STAGE_LAST   = 2'd2
  } stage_t;

endpackage
