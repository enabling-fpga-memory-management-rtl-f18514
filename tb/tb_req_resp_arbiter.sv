// tb_req_resp_arbiter: self-checking test of the request/response arbiter.
//
// Three clients send tagged requests at random times to one server model that
// answers in order after random delays with a known function of the request.
// Each client must get exactly the answers to its own requests, in its own
// order. It also checks round-robin fairness (with every client requesting,
// each gets one grant in any three consecutive grants) and that a request is
// forwarded in the cycle it is granted, so one request per cycle passes.
`timescale 1ns/1ps
module tb_req_resp_arbiter;
  localparam int N = 3;
  typedef logic [15:0] word_t;
  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin #2ms; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  logic [N-1:0] c_req_valid = 0, c_req_ready, c_resp_valid, c_resp_ready = 0;
  word_t c_req [N]; word_t c_resp;
  logic s_req_valid, s_req_ready = 0, s_resp_valid = 0, s_resp_ready;
  word_t s_req, s_resp = 0;
  req_resp_arbiter #(.REQ_T(word_t), .RESP_T(word_t), .N(N), .OUTSTANDING(8)) dut (.*);

  word_t srv_q[$];
  word_t exp_q [N][$];
  int seq [N];
  int sent = 0, got = 0, grants[$];
  bit all_busy = 0;

  function automatic word_t f(word_t r); return r ^ 16'hA5A5; endfunction

  initial begin
    foreach (c_req[i]) begin c_req[i] = 0; seq[i] = 0; end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      all_busy = (cyc >= 3000 && cyc < 3200);
      for (int i = 0; i < N; i++) begin
        if (!c_req_valid[i] || c_req_ready[i]) ;   // handled at posedge
        c_resp_ready[i] = all_busy ? 1'b1 : 1'($urandom_range(0, 3) != 0);
      end
      s_req_ready  = all_busy ? 1'b1 : 1'($urandom_range(0, 3) != 0);
      s_resp_valid = srv_q.size() != 0 && (all_busy || $urandom_range(0, 2) == 0);
      s_resp       = srv_q.size() != 0 ? f(srv_q[0]) : '0;
      #1;
      if (s_req_valid) check(c_req_valid[s_req[15:14]] && c_req[s_req[15:14]] == s_req, "forwarded request is a valid client's");
      for (int i = 0; i < N; i++) if (c_resp_valid[i]) check(exp_q[i].size() != 0 && c_resp == exp_q[i][0],
                                        $sformatf("client %0d response %h", i, c_resp));
      check($countones(c_resp_valid) <= 1, "one client at a time gets a response");
      @(posedge clk);
      for (int i = 0; i < N; i++) begin
        if (c_req_valid[i] && c_req_ready[i]) begin
          exp_q[i].push_back(f(c_req[i])); sent++;
          if (all_busy) grants.push_back(i);
        end
        if (c_resp_valid[i] && c_resp_ready[i]) begin void'(exp_q[i].pop_front()); got++; end
      end
      if (s_req_valid && s_req_ready) srv_q.push_back(s_req);
      if (s_resp_valid && s_resp_ready) void'(srv_q.pop_front());
      #0.5;
      for (int i = 0; i < N; i++) if (!c_req_valid[i] || c_req_ready[i]) begin
        // keep offering while all are busy; otherwise random
        c_req_valid[i] = (all_busy && cyc < 3150) || (!all_busy && cyc < 3800 && $urandom_range(0, 2) == 0);
        if (c_req_ready[i] || c_req[i] == 0) begin c_req[i] = {2'(i), 14'(seq[i] + 1)}; seq[i]++; end
      end
    end
    repeat (50) begin @(negedge clk); c_resp_ready = '1; s_resp_valid = srv_q.size() != 0; s_resp = srv_q.size() != 0 ? f(srv_q[0]) : '0;
      @(posedge clk); for (int i = 0; i < N; i++) if (c_resp_valid[i]) begin void'(exp_q[i].pop_front()); got++; end
      if (s_resp_valid && s_resp_ready) void'(srv_q.pop_front()); end
    check(sent > 500 && got == sent, $sformatf("sent %0d answered %0d", sent, got));
    for (int g = 0; g + 2 < grants.size() && g < 120; g++)
      check(grants[g] != grants[g + 1] && grants[g] != grants[g + 2] && grants[g + 1] != grants[g + 2],
            $sformatf("round robin at grant %0d", g));
    check(grants.size() >= 100, $sformatf("%0d grants in 150 busy cycles", grants.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
