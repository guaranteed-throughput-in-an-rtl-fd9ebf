// Permutation network: three-stage Clos network C(n,m,p) of circuit
// switches, by default C(4,4,4) with 16 inputs and 16 outputs.
//
// p first-stage switches of n x m, m middle-stage switches of p x p and
// p last-stage switches of m x n. First-stage switch i, output k feeds
// middle switch k, input i; middle switch k, output l feeds last-stage
// switch l, input k. Network input s is port s mod n of first-stage switch
// s / n, and output d is port d mod n of last-stage switch d / n. A
// destination address therefore splits into {last-stage switch, port}:
// the middle stage routes on the upper bits, the last stage on the lower
// ones, and the first stage searches the m middle switches in turn.
// With m = n the network is rearrangeable, and the backtracking search of
// the first stage finds a free middle switch whenever one exists.
//
// Each source holds Req high with the destination address in the low
// PW + SW_W data bits (4 bits for C(4,4,4)) until it is answered: Ack or nAck means the path is set
// up (three switches, three clock cycles of latency per direction), Back
// that no path was free, after which the source drops Req and may retry.
// Data then flows one word per clock for as long as Req stays high; the
// receiver throttles with nAck. Dropping Req releases the whole path.
// n, m and p must be powers of two.
module pn_clos_network
  import pn_pkg::*;
#(
  parameter int unsigned N_PER_SW = 4,   // n: ports per first/last-stage switch
  parameter int unsigned N_MID    = 4,   // m: middle-stage switches
  parameter int unsigned N_SW     = 4,   // p: first- and last-stage switches
  localparam int unsigned N_PORTS = N_PER_SW * N_SW,
  localparam int unsigned PW      = (N_PER_SW > 1) ? $clog2(N_PER_SW) : 1,
  localparam int unsigned SW_W    = (N_SW > 1) ? $clog2(N_SW) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  fwd_t [N_PORTS-1:0]  in_fwd,    // from the sources
  output ans_t [N_PORTS-1:0]  in_ans,
  output fwd_t [N_PORTS-1:0]  out_fwd,   // to the receivers
  input  ans_t [N_PORTS-1:0]  out_ans
);

  // s1_m_*[i][k]: first-stage switch i <-> middle switch k
  // m_s3_*[k][l]: middle switch k <-> last-stage switch l
  fwd_t [N_SW-1:0][N_MID-1:0] s1_m_fwd;
  ans_t [N_SW-1:0][N_MID-1:0] s1_m_ans;
  fwd_t [N_MID-1:0][N_SW-1:0] m_s3_fwd;
  ans_t [N_MID-1:0][N_SW-1:0] m_s3_ans;

  // links regrouped by their receiving switch
  fwd_t [N_MID-1:0][N_SW-1:0] mid_in_fwd;
  ans_t [N_SW-1:0][N_MID-1:0] mid_in_ans_t;
  ans_t [N_MID-1:0][N_SW-1:0] mid_in_ans;
  fwd_t [N_SW-1:0][N_MID-1:0] s3_in_fwd;
  ans_t [N_SW-1:0][N_MID-1:0] s3_in_ans;

  always_comb begin
    for (int unsigned i = 0; i < N_SW; i++)
      for (int unsigned k = 0; k < N_MID; k++) begin
        mid_in_fwd[k][i]   = s1_m_fwd[i][k];
        mid_in_ans_t[i][k] = mid_in_ans[k][i];
        s3_in_fwd[i][k]    = m_s3_fwd[k][i];
        m_s3_ans[k][i]     = s3_in_ans[i][k];
      end
  end
  assign s1_m_ans = mid_in_ans_t;

  for (genvar i = 0; i < N_SW; i++) begin : g_first
    pn_switch #(
      .STAGE(STAGE_FIRST), .N_IN(N_PER_SW), .N_OUT(N_MID),
      .ROUTE_LSB(0), .ROUTE_W(PW)
    ) u_sw (
      .clk, .rst_n,
      .in_fwd (in_fwd[i*N_PER_SW +: N_PER_SW]),
      .in_ans (in_ans[i*N_PER_SW +: N_PER_SW]),
      .out_fwd(s1_m_fwd[i]),
      .out_ans(s1_m_ans[i])
    );
  end

  for (genvar k = 0; k < N_MID; k++) begin : g_mid
    pn_switch #(
      .STAGE(STAGE_MIDDLE), .N_IN(N_SW), .N_OUT(N_SW),
      .ROUTE_LSB(PW), .ROUTE_W(SW_W)
    ) u_sw (
      .clk, .rst_n,
      .in_fwd (mid_in_fwd[k]),
      .in_ans (mid_in_ans[k]),
      .out_fwd(m_s3_fwd[k]),
      .out_ans(m_s3_ans[k])
    );
  end

  for (genvar l = 0; l < N_SW; l++) begin : g_last
    pn_switch #(
      .STAGE(STAGE_LAST), .N_IN(N_MID), .N_OUT(N_PER_SW),
      .ROUTE_LSB(0), .ROUTE_W(PW)
    ) u_sw (
      .clk, .rst_n,
      .in_fwd (s3_in_fwd[l]),
      .in_ans (s3_in_ans[l]),
      .out_fwd(out_fwd[l*N_PER_SW +: N_PER_SW]),
      .out_ans(out_ans[l*N_PER_SW +: N_PER_SW])
    );
  end

endmodule
