// Testbench of the switch crossbar: random ownership tables and input
// words; each output must carry its owner's Req/valid/data, and all zeros
// (a released link) when it has no owner.
module tb_pn_crossbar;
  import pn_pkg::*;

  fwd_t [3:0]       in_fwd;
  logic [3:0]       own_valid;
  logic [3:0][1:0]  own_ic;
  fwd_t [3:0]       out_fwd;
  int checks = 0, failures = 0;

  pn_crossbar #(.N_IN(4), .N_OUT(4)) dut (.in_fwd, .own_valid, .own_ic, .out_fwd);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < 4; i++) begin
        in_fwd[i].req  = 1'($urandom);
        in_fwd[i].vld  = 1'($urandom);
        in_fwd[i].data = $urandom;
        own_valid[i]   = 1'($urandom);
        own_ic[i]      = 2'($urandom);
      end
      #1;
      for (int o = 0; o < 4; o++) begin
        fwd_t want;
        want = own_valid[o] ? in_fwd[own_ic[o]] : '0;
        checks++;
        if (out_fwd[o] !== want) begin
          failures++;
          $display("FAIL: output %0d got %h want %h", o, out_fwd[o], want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
