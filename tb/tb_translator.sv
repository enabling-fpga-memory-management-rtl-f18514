// tb_translator: self-checking test of the address translator.
//
// A translator with two cache entries and four outstanding lookups is fed
// random read requests: addresses outside the virtual window (must pass
// unchanged), and virtual addresses spread over five pages, one of which the
// walker model reports as a fault (passed on untranslated, never cached).
// The walker model answers in order after random delays with a known frame
// per page. Every output request is compared, in order, with the expected
// translation, under random output back-pressure. Directed phases check the
// timing: a hit or bypass leaves three cycles after it is accepted, one request per
// cycle for back-to-back hits, and that flush empties the cache.
`timescale 1ns/1ps
module tb_translator;
  import vm_pkg::*;
  localparam int PB = 26;
  localparam logic [63:0] PMASK = ~((64'd1 << PB) - 1);
  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin #2ms; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  logic flush = 0, in_valid = 0, in_ready, out_valid, out_ready = 1;
  bus_req_t in_req = '0, out_req;
  logic lk_req_valid, lk_req_ready, lk_resp_valid, lk_resp_ready;
  lookup_req_t lk_req; lookup_resp_t lk_resp;
  logic [31:0] cnt_hit, cnt_miss, cnt_bypass;
  translator #(.CACHE_ENTRIES(2), .MAX_OUTSTANDING(4), .VM_BITS(43)) dut (.*);

  int cyc = 0;
  always @(posedge clk) cyc++;

  function automatic bit is_fault(logic [63:0] v); return ((v >> PB) & 7) == 4; endfunction
  function automatic logic [63:0] frame_of(logic [63:0] v);
    return 64'h4_0000_0000 + (((v >> PB) & 7) * 64'h1_0400_0000);
  endfunction
  function automatic logic [63:0] expect_addr(logic [63:0] v);
    if (!in_vm(v, 43) || is_fault(v)) return v;
    return frame_of(v) | (v & ~PMASK);
  endfunction

  // walker model
  logic [63:0] wq[$];
  int wdelay = 0;
  assign lk_req_ready  = wq.size() < 8;
  assign lk_resp_valid = wq.size() != 0 && wdelay == 0;
  always_comb begin
    lk_resp = '0;
    if (wq.size() != 0) begin
      if (is_fault(wq[0])) lk_resp = '{vaddr: wq[0], paddr: '0, mask: '0, fault: 1'b1};
      else lk_resp = '{vaddr: wq[0], paddr: frame_of(wq[0]), mask: PMASK, fault: 1'b0};
    end
  end
  always @(posedge clk) if (rst_n) begin
    if (lk_req_valid && lk_req_ready) wq.push_back(lk_req.vaddr);
    if (lk_resp_valid && lk_resp_ready) begin void'(wq.pop_front()); wdelay <= $urandom_range(0, 20); end
    else if (wdelay != 0) wdelay <= wdelay - 1;
  end

  // output checker
  bus_req_t exp_q[$];
  int n_out = 0;
  logic [63:0] last_out_cyc = 0;
  always @(negedge clk) if (rst_n) begin
    #1.5;
    if (out_valid && out_ready) begin
      check(exp_q.size() != 0, "unexpected output");
      if (exp_q.size() != 0) begin
        check(out_req.addr == expect_addr(exp_q[0].addr) && out_req.len == exp_q[0].len,
              $sformatf("translation of %h: %h expected %h", exp_q[0].addr, out_req.addr, expect_addr(exp_q[0].addr)));
        void'(exp_q.pop_front());
      end
      n_out++;
      last_out_cyc = cyc;
    end
  end

  task automatic send(input logic [63:0] a, input bit random_ready);
    @(negedge clk);
    in_valid = 1; in_req = '{addr: a, len: 8'($urandom)};
    out_ready = random_ready ? 1'($urandom_range(0, 3) != 0) : 1'b1;
    #1; while (!in_ready) begin @(negedge clk); out_ready = random_ready ? 1'($urandom_range(0, 3) != 0) : 1'b1; #1; end
    exp_q.push_back(in_req);
  endtask
  task automatic idle_until_empty();
    @(negedge clk); in_valid = 0; out_ready = 1;
    while (exp_q.size() != 0) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  initial begin
    int t0, h0, m0, b0, nvm, nbyp;
    repeat (3) @(negedge clk); rst_n = 1;
    // bypass latency: 2 cycles
    t0 = cyc;
    send(64'h1234_5640, 0); @(negedge clk); in_valid = 0;
    while (exp_q.size() != 0) @(negedge clk);
    check(last_out_cyc - t0 == 3, $sformatf("bypass latency %0d", last_out_cyc - t0));
    // a miss, then 32 back-to-back hits on the same page
    send(VM_BASE | 64'h0400_0040, 0); idle_until_empty();
    h0 = cnt_hit; m0 = cnt_miss;
    t0 = cyc;
    for (int i = 0; i < 32; i++) send(VM_BASE | 64'h0400_0000 | 64'(i * 64), 0);
    idle_until_empty();
    check(cnt_hit - h0 == 32 && cnt_miss == m0, $sformatf("hits %0d misses %0d", cnt_hit - h0, cnt_miss - m0));
    check(last_out_cyc - t0 == 32 + 2, $sformatf("32 hits delivered by cycle %0d", last_out_cyc - t0));
    // flush: the next access misses
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    m0 = cnt_miss;
    send(VM_BASE | 64'h0400_0080, 0); idle_until_empty();
    check(cnt_miss == m0 + 1, "miss after flush");
    // random traffic
    h0 = cnt_hit; m0 = cnt_miss; b0 = cnt_bypass; nvm = 0; nbyp = 0;
    repeat (1500) begin
      logic [63:0] a;
      if ($urandom_range(0, 4) == 0) begin a = 64'({$urandom} << 6); nbyp++; end
      else begin a = VM_BASE | (64'($urandom_range(0, 4)) << PB) | 64'($urandom & 32'h3FFFFC0); nvm++; end
      send(a, 1);
    end
    idle_until_empty();
    check(cnt_bypass - b0 == nbyp, "bypass count");
    check((cnt_hit - h0) + (cnt_miss - m0) == nvm, "hit + miss count");
    check(cnt_hit - h0 > 100 && cnt_miss - m0 > 100, "both hits and misses in random traffic");
    check(n_out == 1 + 1 + 32 + 1 + 1500, $sformatf("%0d outputs", n_out));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
