// Testbench of the output controller: the link must repeat the crossbar
// word one clock later, and the link is idle only while the registered Req
// is low and the downstream answer is "no answer".
module tb_pn_output_ctrl;
  import pn_pkg::*;

  logic clk = 1'b0, rst_n;
  fwd_t xbar_fwd, link_fwd;
  ans_t link_ans;
  logic link_idle;
  int checks = 0, failures = 0;

  pn_output_ctrl dut (.clk, .rst_n, .xbar_fwd, .link_fwd, .link_ans, .link_idle);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; xbar_fwd = '1; link_ans = ANS_NONE;
    @(posedge clk); #1;
    check(link_fwd == '0 && link_idle, "reset clears the link");
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      xbar_fwd.req  = 1'($urandom);
      xbar_fwd.vld  = 1'($urandom);
      xbar_fwd.data = $urandom;
      link_ans      = ans_t'($urandom_range(0, 3));
      @(posedge clk); #1;
      check(link_fwd == xbar_fwd, "one-cycle link register");
      check(link_idle == (!xbar_fwd.req && link_ans == ANS_NONE), "idle flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
