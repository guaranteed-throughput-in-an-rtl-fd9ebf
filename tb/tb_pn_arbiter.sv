// Testbench of the switch arbiter.
//
// A reference model keeps its own ownership table and round-robin
// pointers. Random requests, releases, idle flags and answers are applied
// each cycle; the combinational grants and the answers steered to the ICs
// are compared before the clock edge, the ownership table after it. A
// directed part first checks that four ICs asking for the same output are
// served in turn, and that a busy or non-idle output is never granted.
module tb_pn_arbiter;
  import pn_pkg::*;

  localparam int N = 4;
  logic clk = 1'b0, rst_n;
  logic [N-1:0]        rq_valid, rel, grant, out_idle, own_valid;
  logic [N-1:0][1:0]   rq_port, own_ic;
  ans_t [N-1:0]        out_ans, ic_ans;
  int checks = 0, failures = 0;

  pn_arbiter #(.N_IN(N), .N_OUT(N)) dut (
    .clk, .rst_n, .rq_valid, .rq_port, .rel, .grant,
    .out_idle, .out_ans, .own_valid, .own_ic, .ic_ans);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // reference model
  int m_own[N];   // owner IC or -1
  int m_rr[N];
  int m_win[N];   // winner this cycle or -1

  function automatic void model_comb();
    for (int o = 0; o < N; o++) begin
      m_win[o] = -1;
      if (m_own[o] < 0 && out_idle[o])
        for (int k = 0; k < N; k++) begin
          int i;
          i = (m_rr[o] + k) % N;
          if (m_win[o] < 0 && rq_valid[i] && rq_port[i] == 2'(o)) m_win[o] = i;
        end
    end
  endfunction

  task automatic compare_comb();
    logic [N-1:0] g;
    ans_t a [N];
    model_comb();
    g = '0;
    for (int i = 0; i < N; i++) a[i] = ANS_NONE;
    for (int o = 0; o < N; o++) begin
      if (m_win[o] >= 0) g[m_win[o]] = 1'b1;
      if (m_own[o] >= 0) a[m_own[o]] = out_ans[o];
    end
    check(grant == g, $sformatf("grant %b want %b", grant, g));
    for (int i = 0; i < N; i++) check(ic_ans[i] == a[i], $sformatf("answer to IC %0d", i));
  endtask

  task automatic clock_model();
    for (int o = 0; o < N; o++) begin
      if (m_own[o] >= 0 && rel[m_own[o]]) m_own[o] = -1;
      else if (m_win[o] >= 0) begin
        m_own[o] = m_win[o];
        m_rr[o]  = (m_win[o] + 1) % N;
      end
    end
    @(posedge clk); #1;
    for (int o = 0; o < N; o++) begin
      check(own_valid[o] == (m_own[o] >= 0), $sformatf("own_valid[%0d]", o));
      if (m_own[o] >= 0) check(own_ic[o] == 2'(m_own[o]), $sformatf("own_ic[%0d]", o));
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int served[N];
    rst_n = 1'b0; rq_valid = '0; rel = '0; out_idle = '1; rq_port = '0;
    for (int o = 0; o < N; o++) begin out_ans[o] = ANS_NONE; m_own[o] = -1; m_rr[o] = 0; end
    @(posedge clk); #1;
    rst_n = 1'b1;

    // directed: all four ICs want output 2; each is served once in four rounds
    for (int i = 0; i < N; i++) served[i] = 0;
    for (int r = 0; r < N; r++) begin
      rq_valid = '1; rq_port = {N{2'd2}}; rel = '0;
      #1 compare_comb();
      for (int i = 0; i < N; i++) if (grant[i]) served[i]++;
      clock_model();
      rq_valid = '0;
      rel = '0; rel[own_ic[2]] = 1'b1;      // owner gives it back
      #1 compare_comb();
      clock_model();
      rel = '0;
    end
    for (int i = 0; i < N; i++) check(served[i] == 1, $sformatf("round robin served IC %0d once", i));

    // directed: an output whose link is not idle is not granted
    out_idle = 4'b1011; rq_valid = 4'b0001; rq_port[0] = 2'd2;
    #1 check(grant == '0, "non-idle output refused");
    compare_comb();
    clock_model();
    out_idle = '1; rq_valid = '0;

    // random
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < N; i++) begin
        rq_valid[i] = ($urandom_range(0, 2) == 0);
        rq_port[i]  = 2'($urandom);
        rel[i]      = ($urandom_range(0, 5) == 0);
        out_idle[i] = ($urandom_range(0, 3) != 0);
        out_ans[i]  = ans_t'($urandom_range(0, 3));
      end
      #1 compare_comb();
      clock_model();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
