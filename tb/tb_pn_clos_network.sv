// End-to-end testbench of the 16x16 permutation network at its default
// size, C(4,4,4).
//
// Sixteen source models and sixteen receiver models surround the network.
// A source raises Req with the destination address as data, waits for an
// answer, drops Req and retries after a random pause on Back, and once it
// gets Ack or nAck sends its words (one per cycle in which it sees Ack),
// then drops Req to release the path. A word carries {source, message,
// sequence number}. A receiver answers Ack while its buffer has room and
// nAck when the buffer is within SLACK words of full; in "busy" scenarios
// it drains its buffer only on some cycles, which forces nAck.
//
// Scenarios, run one after the other:
//   1  one path through an empty network: checks setup latency (14
//      cycles from Req to Ack at the source: 4 per switch and 2 at the
//      ends), data latency (4 cycles: three switch registers and the
//      receiver's sampling edge) and one word per cycle.
//   2  the backtracking example: a path 4->8 occupies middle switch 0's
//      link to last-stage switch 2; then 1->9 is probed through middle 0,
//      is answered Back and must succeed through middle 1; then 2->8 (busy
//      destination) must exhaust all four middle switches and get Back.
//   3  full permutations (perfect shuffle, matrix transpose, then
//      random ones), all sixteen sources at once, receivers always ready:
//      every word must arrive, in order, one per cycle.
//   5  (run before 4) a permutation arranged path by path: sources start
//      40 cycles apart and hold their paths for 1200 words, so each probe
//      meets the paths set up before it; reports how many paths were held
//      at once and how many probes were answered Back.
//   4  a sequence of random permutations per source with busy receivers:
//      the permutation changes at run time and nAck throttles the sources.
// Each receiver checks that probes reach the addressed output and that
// words arrive in order from one source per connection; at the end the
// words received per (source, destination) pair are compared with those
// scheduled. Counts of setups, first-stage backtracks, Backs returned to
// sources, last-stage blocks, nAcks and releases must all be nonzero.
module tb_pn_clos_network;
  import pn_pkg::*;

  localparam int NP      = 16;
  localparam int MAXM    = 16;
  localparam int DEPTH   = 32;
  localparam int SLACK   = 12;
  localparam int SETUP_LAT = 14;
  localparam int DATA_LAT  = 4;

  logic clk = 1'b0;
  logic rst_n;
  fwd_t [NP-1:0] in_fwd;
  ans_t [NP-1:0] in_ans;
  fwd_t [NP-1:0] out_fwd;
  ans_t [NP-1:0] out_ans;

  pn_clos_network dut (.clk, .rst_n, .in_fwd, .in_ans, .out_fwd, .out_ans);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ---------------- source models ----------------
  typedef enum logic [2:0] {SRC_IDLE, SRC_SETUP, SRC_XFER, SRC_PAUSE, SRC_DONE} src_st_t;
  src_st_t     src_st   [NP];
  int          n_msgs   [NP];
  int          msg_idx  [NP];
  int          msg_dest [NP][MAXM];
  int          msg_len  [NP][MAXM];
  int          msg_gap  [NP][MAXM];
  int          sent     [NP];
  int          pause    [NP];
  int unsigned req_cyc  [NP];
  int unsigned last_setup_lat [NP];
  int unsigned first_word_cyc [NP];

  // ---------------- receiver models ----------------
  bit          busy_mode;
  int          occ      [NP];
  bit          conn     [NP];
  int          conn_src [NP];
  int          conn_seq [NP];
  int unsigned rx_first_cyc [NP];
  int unsigned rx_prev_cyc  [NP];
  int          rx_gaps  [NP];
  int          exp_words [NP][NP];
  int          rcv_words [NP][NP];

  // mechanism counters
  int n_setup = 0, n_backtrack = 0, n_src_back = 0, n_last_block = 0;
  int n_nack = 0, n_release = 0;
  int peak_paths = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst_n) begin
      for (int s = 0; s < NP; s++) begin
        in_fwd[s]  <= '0;
        src_st[s]  <= SRC_DONE;
        out_ans[s] <= ANS_NONE;
        occ[s]     <= 0;
        conn[s]    <= 1'b0;
      end
    end else begin
      // sources
      for (int s = 0; s < NP; s++) begin
        unique case (src_st[s])
          SRC_IDLE: begin
            if (msg_idx[s] >= n_msgs[s]) src_st[s] <= SRC_DONE;
            else if (pause[s] > 0) pause[s] <= pause[s] - 1;
            else begin
              in_fwd[s].req  <= 1'b1;
              in_fwd[s].vld  <= 1'b0;
              in_fwd[s].data <= DATA_W'(msg_dest[s][msg_idx[s]]);
              req_cyc[s]     <= cyc;
              sent[s]        <= 0;
              src_st[s]      <= SRC_SETUP;
            end
          end
          SRC_SETUP: begin
            if (in_ans[s] == ANS_BACK) begin
              n_src_back++;
              in_fwd[s] <= '0;
              pause[s]  <= 1 + int'($urandom_range(0, 7));
              src_st[s] <= SRC_PAUSE;
            end else if (in_ans[s] == ANS_ACK || in_ans[s] == ANS_NACK) begin
              n_setup++;
              last_setup_lat[s] <= cyc - req_cyc[s];
              src_st[s] <= SRC_XFER;
              if (in_ans[s] == ANS_ACK) begin
                in_fwd[s].vld  <= 1'b1;
                in_fwd[s].data <= {8'(s), 8'(msg_idx[s]), 16'd0};
                first_word_cyc[s] <= cyc;
                sent[s] <= 1;
              end
            end
          end
          SRC_XFER: begin
            check(in_ans[s] == ANS_ACK || in_ans[s] == ANS_NACK, "answer stays Ack/nAck on a set-up path");
            if (in_ans[s] == ANS_NACK) n_nack++;
            if (sent[s] == msg_len[s][msg_idx[s]]) begin
              in_fwd[s] <= '0;
              n_release++;
              pause[s]  <= msg_gap[s][msg_idx[s]];
              msg_idx[s] <= msg_idx[s] + 1;
              src_st[s] <= SRC_IDLE;
            end else if (in_ans[s] == ANS_ACK) begin
              in_fwd[s].vld  <= 1'b1;
              in_fwd[s].data <= {8'(s), 8'(msg_idx[s]), 16'(sent[s])};
              if (sent[s] == 0) first_word_cyc[s] <= cyc;
              sent[s] <= sent[s] + 1;
            end else begin
              in_fwd[s].vld <= 1'b0;
            end
          end
          SRC_PAUSE: begin
            if (pause[s] > 0) pause[s] <= pause[s] - 1;
            else src_st[s] <= SRC_IDLE;
          end
          default: ;
        endcase
      end

      // receivers
      for (int d = 0; d < NP; d++) begin
        automatic int occ_n = occ[d];
        if (out_fwd[d].req) begin
          if (!conn[d]) begin
            check(out_fwd[d].data[3:0] == 4'(d), $sformatf("probe for %0d reaches output %0d", out_fwd[d].data[3:0], d));
            conn[d]     <= 1'b1;
            conn_src[d] <= -1;
            conn_seq[d] <= 0;
            rx_gaps[d]  <= 0;
          end else if (out_fwd[d].vld) begin
            automatic int src = int'(out_fwd[d].data[31:24]);
            automatic int seq = int'(out_fwd[d].data[15:0]);
            check(seq == conn_seq[d], $sformatf("output %0d word in order (got %0d want %0d)", d, seq, conn_seq[d]));
            if (conn_seq[d] == 0) rx_first_cyc[d] <= cyc;
            else if (cyc != rx_prev_cyc[d] + 1) rx_gaps[d] <= rx_gaps[d] + 1;
            rx_prev_cyc[d] <= cyc;
            if (conn_src[d] >= 0)
              check(src == conn_src[d], "one source per connection");
            if (src < NP) rcv_words[src][d]++;
            conn_src[d] <= src;
            conn_seq[d] <= seq + 1;
            occ_n++;
          end
        end else begin
          conn[d] <= 1'b0;
        end
        if (occ_n > 0 && (!busy_mode || $urandom_range(0, 3) == 0)) occ_n--;
        if (occ_n > DEPTH) begin
          check(1'b0, "receiver buffer overflow");
          occ_n = DEPTH;
        end
        occ[d] <= occ_n;
        out_ans[d] <= !out_fwd[d].req ? ANS_NONE :
                      (occ_n >= DEPTH - SLACK) ? ANS_NACK : ANS_ACK;
      end

      if ($countones(out_fwd_req()) > peak_paths) peak_paths = $countones(out_fwd_req());

      // internal links: Back on a first->middle link is a first-stage
      // backtrack, Back on a middle->last link a blocked last-stage output
      for (int i = 0; i < 4; i++)
        for (int k = 0; k < 4; k++) begin
          if (dut.s1_m_ans[i][k] == ANS_BACK && dut.s1_m_fwd[i][k].req) n_backtrack++;
          if (dut.m_s3_ans[k][i] == ANS_BACK && dut.m_s3_fwd[k][i].req) n_last_block++;
        end
    end
  end

  function automatic logic [NP-1:0] out_fwd_req();
    for (int d = 0; d < NP; d++) out_fwd_req[d] = out_fwd[d].req;
  endfunction

  // ---------------- scenario helpers ----------------
  function automatic void clear_msgs();
    for (int s = 0; s < NP; s++) begin
      n_msgs[s]  = 0;
      msg_idx[s] = 0;
      pause[s]   = 0;
    end
  endfunction

  function automatic void add_msg(int s, int d, int len, int gap);
    msg_dest[s][n_msgs[s]] = d;
    msg_len[s][n_msgs[s]]  = len;
    msg_gap[s][n_msgs[s]]  = gap;
    n_msgs[s]++;
    exp_words[s][d] += len;
  endfunction

  task automatic start_sources();
    @(negedge clk);
    for (int s = 0; s < NP; s++)
      if (n_msgs[s] > 0) src_st[s] = SRC_IDLE;
  endtask

  task automatic wait_done(input int max_cycles, input string what);
    int n;
    bit all;
    n = 0;
    do begin
      @(posedge clk);
      n++;
      all = 1'b1;
      for (int s = 0; s < NP; s++) if (src_st[s] != SRC_DONE) all = 1'b0;
    end while (!all && n < max_cycles);
    check(all, {what, " completes"});
    repeat (20) @(posedge clk);   // drain the pipeline and the releases
  endtask

  function automatic void shuffle(ref int p[NP]);
    for (int i = 0; i < NP; i++) p[i] = i;
    for (int i = NP - 1; i > 0; i--) begin
      int j, t;
      j = int'($urandom_range(0, i));
      t = p[i]; p[i] = p[j]; p[j] = t;
    end
  endfunction

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int perm[NP];
    int bt0, sb0, lb0;
    for (int s = 0; s < NP; s++) begin
      n_msgs[s] = 0; msg_idx[s] = 0; pause[s] = 0;
      for (int d = 0; d < NP; d++) begin exp_words[s][d] = 0; rcv_words[s][d] = 0; end
    end
    busy_mode = 1'b0;
    rst_n = 1'b0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);

    // ---- 1: one uncontended path ----
    @(negedge clk);
    clear_msgs();
    add_msg(0, 5, 20, 0);
    start_sources();
    wait_done(500, "single path");
    check(last_setup_lat[0] == SETUP_LAT, $sformatf("setup latency %0d == %0d", last_setup_lat[0], SETUP_LAT));
    check(rx_first_cyc[5] - first_word_cyc[0] == DATA_LAT,
          $sformatf("data latency %0d == %0d", rx_first_cyc[5] - first_word_cyc[0], DATA_LAT));
    check(rx_prev_cyc[5] - rx_first_cyc[5] == 19 && rx_gaps[5] == 0, "20 words in 20 consecutive cycles");

    // ---- 2: backtracking example ----
    bt0 = n_backtrack; sb0 = n_src_back; lb0 = n_last_block;
    @(negedge clk);
    clear_msgs();
    add_msg(4, 8, 400, 0);                 // holds middle 0 -> last 2
    start_sources();
    repeat (40) @(posedge clk);
    @(negedge clk);
    check(dut.m_s3_fwd[0][2].req, "4->8 runs through middle switch 0");
    add_msg(1, 9, 10, 0);
    src_st[1] = SRC_IDLE;
    repeat (80) @(posedge clk);
    @(negedge clk);
    check(n_backtrack > bt0, "1->9 backtracks from middle switch 0");
    check(last_setup_lat[1] > SETUP_LAT, "backtracked setup takes longer");
    check(rcv_words[1][9] == 10 && rx_gaps[9] == 0, "1->9 delivered through middle switch 1");
    $display("setup with one backtrack: %0d cycles", last_setup_lat[1]);
    // now 2->8: output 8 is busy, every middle switch must be tried
    add_msg(2, 8, 5, 0);
    src_st[2] = SRC_IDLE;
    begin
      int w;
      w = 0;
      while (n_src_back == sb0 && w < 200) begin @(posedge clk); w++; end
      check(n_src_back > sb0, "2->8 gets Back at the source while 8 is busy");
      check(n_last_block > lb0, "last stage reports output 8 blocked");
    end
    wait_done(3000, "backtracking example");

    // ---- 3: full permutations, receivers always ready ----
    for (int r = 0; r < 4; r++) begin
      @(negedge clk);
      clear_msgs();
      shuffle(perm);
      // round 0: perfect shuffle (rotate the 4-bit index left), round 1:
      // transpose of a 4x4 matrix (swap the index halves), then random
      if (r == 0) for (int s = 0; s < NP; s++) perm[s] = ((s << 1) | (s >> 3)) & 15;
      if (r == 1) for (int s = 0; s < NP; s++) perm[s] = ((s & 3) << 2) | (s >> 2);
      for (int s = 0; s < NP; s++) add_msg(s, perm[s], 32, 0);
      start_sources();
      wait_done(5000, $sformatf("full permutation %0d", r));
      for (int d = 0; d < NP; d++)
        check(rx_gaps[d] == 0, $sformatf("output %0d received its words back to back", d));
    end

    // ---- 5: one permutation set up path by path while earlier paths
    //      are held (no releases during the arrangement) ----
    for (int r = 0; r < 3; r++) begin
      int sb;
      @(negedge clk);
      clear_msgs();
      shuffle(perm);
      sb = n_src_back;
      peak_paths = 0;
      for (int s = 0; s < NP; s++) add_msg(s, perm[s], 1200, 0);
      for (int s = 0; s < NP; s++) pause[s] = 40 * s;
      start_sources();
      wait_done(20000, $sformatf("path-by-path arrangement %0d", r));
      $display("path-by-path arrangement %0d: %0d of %0d paths held at once, %0d Backs to sources",
               r, peak_paths, NP, n_src_back - sb);
    end

    // ---- 4: run-time permutation changes, busy receivers ----
    @(negedge clk);
    busy_mode = 1'b1;
    clear_msgs();
    for (int r = 0; r < 6; r++) begin
      shuffle(perm);
      for (int s = 0; s < NP; s++) add_msg(s, perm[s], 24 + int'($urandom_range(0, 40)), int'($urandom_range(0, 5)));
    end
    start_sources();
    wait_done(60000, "changing permutations with busy receivers");
    busy_mode = 1'b0;
    repeat (200) @(posedge clk);

    // ---- totals and mechanisms ----
    for (int s = 0; s < NP; s++)
      for (int d = 0; d < NP; d++)
        check(rcv_words[s][d] == exp_words[s][d],
              $sformatf("words %0d->%0d: got %0d want %0d", s, d, rcv_words[s][d], exp_words[s][d]));
    $display("mechanisms: setups=%0d first-stage backtracks=%0d backs-to-source=%0d last-stage blocks=%0d nAck-cycles=%0d releases=%0d",
             n_setup, n_backtrack, n_src_back, n_last_block, n_nack, n_release);
    $display("most paths held at once in scenario 4: %0d of %0d", peak_paths, NP);
    check(n_setup > 0, "path setup happened");
    check(n_backtrack > 0, "first-stage backtracking happened");
    check(n_src_back > 0, "Back reached a source");
    check(n_last_block > 0, "last-stage output blocked");
    check(n_nack > 0, "nAck flow control happened");
    check(n_release > 0, "path release happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
