// Testbench of the input controller, one instance per switch stage.
//
// The arbiter is played by the testbench (grant) and so is the downstream
// switch (out_ans). Directed sequences check, for the first stage, the
// search order 0,1,2,3 of middle switches, skipping a refused link,
// backtracking on Back, returning Back only after all four failed, the
// pass-through of data and of Ack/nAck, and the release when Req falls;
// for the middle and last stages, routing on the upper and lower address
// bits and the immediate Back when their single profitable link is
// blocked. Every answer appears one clock after its cause.
module tb_pn_input_ctrl;
  import pn_pkg::*;

  localparam int NU = 3;   // 0 first, 1 middle, 2 last
  logic clk = 1'b0, rst_n;
  fwd_t in_fwd   [NU];
  ans_t in_ans   [NU];
  logic rq_valid [NU];
  logic [1:0] rq_port [NU];
  logic rel      [NU];
  logic grant    [NU];
  ans_t out_ans  [NU];
  fwd_t out_fwd  [NU];
  int checks = 0, failures = 0;

  pn_input_ctrl #(.STAGE(STAGE_FIRST), .N_OUT(4), .ROUTE_LSB(0), .ROUTE_W(2)) u_first (
    .clk, .rst_n, .in_fwd(in_fwd[0]), .in_ans(in_ans[0]), .rq_valid(rq_valid[0]),
    .rq_port(rq_port[0]), .rel(rel[0]), .grant(grant[0]), .out_ans(out_ans[0]), .out_fwd(out_fwd[0]));
  pn_input_ctrl #(.STAGE(STAGE_MIDDLE), .N_OUT(4), .ROUTE_LSB(2), .ROUTE_W(2)) u_mid (
    .clk, .rst_n, .in_fwd(in_fwd[1]), .in_ans(in_ans[1]), .rq_valid(rq_valid[1]),
    .rq_port(rq_port[1]), .rel(rel[1]), .grant(grant[1]), .out_ans(out_ans[1]), .out_fwd(out_fwd[1]));
  pn_input_ctrl #(.STAGE(STAGE_LAST), .N_OUT(4), .ROUTE_LSB(0), .ROUTE_W(2)) u_last (
    .clk, .rst_n, .in_fwd(in_fwd[2]), .in_ans(in_ans[2]), .rq_valid(rq_valid[2]),
    .rq_port(rq_port[2]), .rel(rel[2]), .grant(grant[2]), .out_ans(out_ans[2]), .out_fwd(out_fwd[2]));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic step();
    @(posedge clk); #1;
  endtask

  task automatic probe(input int u, input logic [3:0] addr);
    in_fwd[u] = '0;
    in_fwd[u].req = 1'b1;
    in_fwd[u].data = DATA_W'(addr);
    step();
  endtask

  task automatic drop(input int u);
    in_fwd[u] = '0;
    #1 check(out_fwd[u].req == 1'b0, "Req low is not forwarded");
    step();
    check(in_ans[u] == ANS_NONE, "answer cleared after release");
    grant[u] = 1'b0; out_ans[u] = ANS_NONE;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    for (int u = 0; u < NU; u++) begin
      in_fwd[u] = '0; grant[u] = 1'b0; out_ans[u] = ANS_NONE;
    end
    step(); step();
    rst_n = 1'b1;
    for (int u = 0; u < NU; u++) check(in_ans[u] == ANS_NONE && !rq_valid[u], "idle after reset");

    // ---- first stage: refused link, backtrack, set up, transfer, release ----
    probe(0, 4'hB);
    check(rq_valid[0] && rq_port[0] == 2'd0, "first try: middle switch 0");
    step();                                           // link 0 refused
    check(rq_valid[0] && rq_port[0] == 2'd1, "then middle switch 1");
    grant[0] = 1'b1; step(); grant[0] = 1'b0;
    #1 check(!rq_valid[0] && out_fwd[0] == in_fwd[0] && !rel[0], "probe forwarded on middle 1");
    check(in_ans[0] == ANS_NONE, "no answer while waiting");
    step(); step();
    out_ans[0] = ANS_BACK;
    #1 check(rel[0] && out_fwd[0].req == 1'b0, "Back releases link 1 at once");
    step();
    out_ans[0] = ANS_NONE;
    check(in_ans[0] == ANS_NONE, "Back is not passed up while untried links remain");
    #1 check(rq_valid[0] && rq_port[0] == 2'd2, "backtrack then tries middle switch 2");
    grant[0] = 1'b1; step(); grant[0] = 1'b0;
    out_ans[0] = ANS_NACK; step();
    check(in_ans[0] == ANS_NACK, "nAck passed up one cycle later");
    in_fwd[0].vld = 1'b1; in_fwd[0].data = 32'hCAFE_0001;
    #1 check(out_fwd[0] == in_fwd[0], "data passes through");
    out_ans[0] = ANS_ACK; step();
    check(in_ans[0] == ANS_ACK, "Ack passed up one cycle later");
    for (int w = 0; w < 8; w++) begin
      in_fwd[0].data = $urandom;
      #1 check(out_fwd[0] == in_fwd[0], "data passes through every cycle");
      step();
    end
    in_fwd[0] = '0;
    #1 check(rel[0], "Req low releases the link");
    drop(0);

    // ---- first stage: all four links fail -> Back to the source ----
    probe(0, 4'h3);
    for (int k = 0; k < 4; k++) begin
      check(rq_valid[0] && rq_port[0] == 2'(k), $sformatf("exhaustive search tries middle %0d", k));
      if (k == 1 || k == 3) begin
        grant[0] = 1'b1; step(); grant[0] = 1'b0;
        out_ans[0] = ANS_BACK; step(); out_ans[0] = ANS_NONE;
      end else begin
        step();
      end
    end
    check(in_ans[0] == ANS_BACK, "Back returned after the last middle switch");
    step(); step();
    check(in_ans[0] == ANS_BACK && !rq_valid[0], "Back held until the source releases");
    drop(0);

    // ---- middle stage: route on address bits [3:2] ----
    probe(1, 4'hB);
    check(rq_valid[1] && rq_port[1] == 2'd2, "middle stage asks for last-stage switch 2");
    step();
    check(in_ans[1] == ANS_BACK, "middle stage: blocked link gives Back");
    drop(1);
    probe(1, 4'h7);
    check(rq_valid[1] && rq_port[1] == 2'd1, "middle stage asks for last-stage switch 1");
    grant[1] = 1'b1; step(); grant[1] = 1'b0;
    out_ans[1] = ANS_BACK;
    #1 check(rel[1], "middle stage releases on Back");
    step(); out_ans[1] = ANS_NONE;
    check(in_ans[1] == ANS_BACK, "middle stage passes Back up");
    step();
    check(!rq_valid[1], "middle stage does not retry");
    drop(1);

    // ---- last stage: route on address bits [1:0] ----
    probe(2, 4'hB);
    check(rq_valid[2] && rq_port[2] == 2'd3, "last stage asks for output port 3");
    grant[2] = 1'b1; step(); grant[2] = 1'b0;
    out_ans[2] = ANS_ACK; step();
    check(in_ans[2] == ANS_ACK, "last stage passes Ack up");
    drop(2);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
