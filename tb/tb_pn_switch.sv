// Testbench of the circuit switch: a first-stage and a last-stage switch
// side by side, with the testbench playing the sources and the downstream
// switches. A downstream model answers Ack one clock after it sees Req,
// or Back when it is marked blocked, and returns "no answer" one clock
// after Req falls.
//
// First stage: a probe skips a middle link that answers Back and one that
// is owned by another input; two probes started together compete for the
// same links and exactly one of them finds the last free link, the other
// gets Back after its exhaustive search; after a release the loser gets
// the freed link. Data must reach the chosen output exactly one clock
// after it enters. Last stage: two probes for the same output port, one
// Ack and one Back; a probe for another port gets its own link.
module tb_pn_switch;
  import pn_pkg::*;

  logic clk = 1'b0, rst_n;
  fwd_t [3:0] s1_in, s1_out, s3_in, s3_out;
  ans_t [3:0] s1_in_ans, s1_out_ans, s3_in_ans, s3_out_ans;
  logic [3:0] s1_blocked, s3_blocked;
  int checks = 0, failures = 0;

  pn_switch #(.STAGE(STAGE_FIRST), .N_IN(4), .N_OUT(4), .ROUTE_LSB(0), .ROUTE_W(2)) u_s1 (
    .clk, .rst_n, .in_fwd(s1_in), .in_ans(s1_in_ans), .out_fwd(s1_out), .out_ans(s1_out_ans));
  pn_switch #(.STAGE(STAGE_LAST), .N_IN(4), .N_OUT(4), .ROUTE_LSB(0), .ROUTE_W(2)) u_s3 (
    .clk, .rst_n, .in_fwd(s3_in), .in_ans(s3_in_ans), .out_fwd(s3_out), .out_ans(s3_out_ans));

  always #5 clk = ~clk;

  // downstream models
  always @(posedge clk) begin
    for (int o = 0; o < 4; o++) begin
      s1_out_ans[o] <= !rst_n || !s1_out[o].req ? ANS_NONE : (s1_blocked[o] ? ANS_BACK : ANS_ACK);
      s3_out_ans[o] <= !rst_n || !s3_out[o].req ? ANS_NONE : (s3_blocked[o] ? ANS_BACK : ANS_ACK);
    end
  end

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

  // wait until input i of the chosen switch gets an answer
  task automatic wait_ans(input bit last, input int i, output ans_t a);
    int n;
    n = 0;
    do begin
      step();
      n++;
      a = last ? s3_in_ans[i] : s1_in_ans[i];
    end while (a == ANS_NONE && n < 100);
  endtask

  // which output carries input i's probe (-1 if none)
  function automatic int path_of(input bit last, input logic [31:0] tag);
    for (int o = 0; o < 4; o++) begin
      if (!last && s1_out[o].req && s1_out[o].data == tag) return o;
      if (last && s3_out[o].req && s3_out[o].data == tag) return o;
    end
    return -1;
  endfunction

  task automatic send_probe(input bit last, input int i, input logic [31:0] tag);
    if (last) begin s3_in[i] = '0; s3_in[i].req = 1'b1; s3_in[i].data = tag; end
    else      begin s1_in[i] = '0; s1_in[i].req = 1'b1; s1_in[i].data = tag; end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ans_t a, b;
    int p;
    rst_n = 1'b0;
    s1_in = '0; s3_in = '0; s1_blocked = '0; s3_blocked = '0;
    step(); step();
    rst_n = 1'b1;
    step();

    // ---- first stage ----
    s1_blocked = 4'b0001;                 // middle switch 0 answers Back
    send_probe(0, 0, 32'h0000_0010);
    wait_ans(0, 0, a);
    check(a == ANS_ACK, "input 0 set up");
    p = path_of(0, 32'h0000_0010);
    check(p == 1, $sformatf("input 0 backtracked from middle 0 to middle 1 (got %0d)", p));
    s1_in[0].vld = 1'b1; s1_in[0].data = 32'h1234_5678;
    step();
    check(s1_out[1].vld && s1_out[1].data == 32'h1234_5678, "data one clock later on middle link 1");

    send_probe(0, 1, 32'h0000_0021);
    wait_ans(0, 1, a);
    check(a == ANS_ACK && path_of(0, 32'h0000_0021) == 2, "input 1 skips blocked 0 and owned 1, takes 2");

    // inputs 2 and 3 together: only link 3 is left
    send_probe(0, 2, 32'h0000_0032);
    send_probe(0, 3, 32'h0000_0043);
    begin
      int n;
      n = 0;
      do begin step(); n++; end
      while ((s1_in_ans[2] == ANS_NONE || s1_in_ans[3] == ANS_NONE) && n < 100);
    end
    a = s1_in_ans[2]; b = s1_in_ans[3];
    check((a == ANS_ACK && b == ANS_BACK) || (a == ANS_BACK && b == ANS_ACK),
          $sformatf("contention for the last free link: one Ack, one Back (%s %s)", a.name(), b.name()));
    check(s1_out[3].req, "link 3 in use");
    // the loser releases; input 0 releases link 1; the loser retries
    if (a == ANS_BACK) s1_in[2] = '0; else s1_in[3] = '0;
    s1_in[0] = '0;
    step();
    check(!s1_out[1].req, "release reaches link 1 one clock later");
    step(); step();
    if (a == ANS_BACK) begin
      send_probe(0, 2, 32'h0000_0052); wait_ans(0, 2, a);
      check(a == ANS_ACK && path_of(0, 32'h0000_0052) == 1, "retry takes the released link 1");
    end else begin
      send_probe(0, 3, 32'h0000_0053); wait_ans(0, 3, a);
      check(a == ANS_ACK && path_of(0, 32'h0000_0053) == 1, "retry takes the released link 1");
    end
    s1_in = '0;
    step(); step(); step();
    check(s1_out == '0 && s1_in_ans == '0, "everything released");

    // ---- last stage ----
    send_probe(1, 0, 32'h0000_0006);      // both for port 2
    send_probe(1, 1, 32'h0000_0016);
    send_probe(1, 2, 32'h0000_0000);      // port 0
    begin
      int n;
      n = 0;
      do begin step(); n++; end
      while ((s3_in_ans[0] == ANS_NONE || s3_in_ans[1] == ANS_NONE || s3_in_ans[2] == ANS_NONE) && n < 100);
    end
    a = s3_in_ans[0]; b = s3_in_ans[1];
    check((a == ANS_ACK) != (b == ANS_ACK) && (a == ANS_BACK || b == ANS_BACK),
          "two probes for one output: one Ack, one Back");
    check(s3_in_ans[2] == ANS_ACK && path_of(1, 32'h0000_0000) == 0, "probe for port 0 gets port 0");
    p = path_of(1, a == ANS_ACK ? 32'h0000_0006 : 32'h0000_0016);
    check(p == 2, "winner holds port 2");
    s3_blocked = 4'b1000;
    send_probe(1, 3, 32'h0000_0003);
    wait_ans(1, 3, a);
    check(a == ANS_BACK, "receiver Back on port 3 is passed up");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
