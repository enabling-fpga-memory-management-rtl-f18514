// tb_pt_walker: self-checking test of the page table walker.
//
// Page tables are written directly into the behavioural memory: two L2 tables
// (L1 entries 0 and 1) with frames for some pages, one page reserved without
// a frame, and L1 entry 2 empty. A model of the allocator's authoritative
// lookup answers deferred requests after a random delay with a known frame.
// Random lookups are compared with translations computed from the tables (or
// the allocator model for pages without a frame) and must come back in
// request order. Two walkers are tested: the non-pipelined one (1 slot),
// whose latency must be two memory round trips plus a few cycles, and a
// 4-slot one, which must finish 8 back-to-back walks in well under 8 times
// the single-walk latency. The 4-slot walker also has mask widening on: pages
// 8..15 of the first table have contiguous, aligned frames and must be
// answered with a mask three bits wider; the other walker must never widen.
`timescale 1ns/1ps
module tb_pt_walker;
  import vm_pkg::*;
  localparam int PAGE_BITS = 26, L2_BITS = 13, VM_BITS = 43, RD_LAT = 40;
  localparam logic [63:0] PMASK = ~((64'd1 << PAGE_BITS) - 1);
  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin #4ms; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  int cyc = 0;
  always @(posedge clk) cyc++;

  function automatic logic [63:0] va(int l1, int page, int off);
    return VM_BASE | (64'(l1) << (PAGE_BITS + L2_BITS)) | (64'(page) << PAGE_BITS) | 64'(off);
  endfunction
  function automatic logic [63:0] alloc_frame(logic [63:0] v);
    return 64'h9_0000_0000 + ((v >> PAGE_BITS) & 64'hFF) * (64'd1 << PAGE_BITS);
  endfunction

  // reference: expected physical page of a virtual address
  function automatic logic [63:0] expect_pa(logic [63:0] v);
    int l1 = int'((v >> (PAGE_BITS + L2_BITS)) & 15), p = int'((v >> PAGE_BITS) & 8191);
    if (l1 == 0 && p < 20 && p != 7) return 64'h1_0000_0000 + 64'(p) * (64'd1 << PAGE_BITS);
    if (l1 == 1 && p < 5) return 64'h3_0000_0000 + 64'(p) * (64'd1 << PAGE_BITS);
    return alloc_frame(v);
  endfunction

  for (genvar g = 0; g < 2; g++) begin : g_w
    localparam int SLOTS = g == 0 ? 1 : 4;
    localparam bit WIDE  = g == 1;
    logic lk_req_valid = 0, lk_req_ready, lk_resp_valid, lk_resp_ready = 1;
    lookup_req_t lk_req = '0; lookup_resp_t lk_resp;
    logic al_req_valid, al_req_ready, al_resp_valid, al_resp_ready;
    lookup_req_t al_req; lookup_resp_t al_resp;
    logic rd_req_valid, rd_req_ready, rd_dat_valid, rd_dat_ready; bus_req_t rd_req; bus_rdat_t rd_dat;
    logic [31:0] cnt_walks, cnt_deferred;
    pt_walker #(.SLOTS(SLOTS), .WIDE_MASK(WIDE), .VM_BITS(VM_BITS), .PAGE_BITS(PAGE_BITS), .L2_BITS(L2_BITS)) dut (.*);
    logic wr_req_ready, wr_dat_ready, wr_rsp_valid;
    mem_model #(.RD_LAT(RD_LAT)) mem (.clk, .rst_n, .rd_req_valid, .rd_req_ready, .rd_req, .rd_dat_valid, .rd_dat_ready, .rd_dat,
      .wr_req_valid(1'b0), .wr_req_ready, .wr_req('0), .wr_dat_valid(1'b0), .wr_dat_ready, .wr_dat('0),
      .wr_rsp_valid, .wr_rsp_ready(1'b1));

    // allocator model: one request at a time, random delay
    logic [63:0] al_q[$];
    int al_wait = 0;
    assign al_req_ready = al_q.size() < 4;
    assign al_resp_valid = al_q.size() != 0 && al_wait == 0;
    always_comb begin
      al_resp = '0;
      if (al_q.size() != 0) al_resp = '{vaddr: al_q[0], paddr: alloc_frame(al_q[0]), mask: PMASK, fault: 1'b0};
    end
    always @(posedge clk) if (rst_n) begin
      if (al_req_valid && al_req_ready) al_q.push_back(al_req.vaddr);
      if (al_resp_valid && al_resp_ready) begin void'(al_q.pop_front()); al_wait <= $urandom_range(0, 30); end
      else if (al_wait != 0) al_wait <= al_wait - 1;
    end

    initial begin
      // tables start cleared, as the allocator leaves them
      for (int i = 0; i < 64; i++) begin
        mem.poke64(L1_TABLE_ADDR + 64'(i) * 8, '0); mem.poke64(64'h20000 + 64'(i) * 8, '0); mem.poke64(64'h30000 + 64'(i) * 8, '0);
      end
      mem.poke64(L1_TABLE_ADDR + 0, l1_pte(64'h20000));
      mem.poke64(L1_TABLE_ADDR + 8, l1_pte(64'h30000));
      for (int p = 0; p < 20; p++)
        mem.poke64(64'h20000 + 64'(p) * 8, leaf_pte(p != 7, p == 19, 2'd0, 64'h1_0000_0000 + 64'(p) * (64'd1 << PAGE_BITS)));
      for (int p = 0; p < 5; p++)
        mem.poke64(64'h30000 + 64'(p) * 8, leaf_pte(1'b1, p == 4, 2'd1, 64'h3_0000_0000 + 64'(p) * (64'd1 << PAGE_BITS)));
    end
  end

  // Pages 8..15 of the first table have contiguous frames aligned to eight
  // pages: the walker with WIDE_MASK answers them with a mask 3 bits wider.
  function automatic bit wide_group(input logic [63:0] v);
    return ((v >> (PAGE_BITS + L2_BITS)) & 64'hF) == 0 && ((v >> PAGE_BITS) & 64'h1FF8) == 8;
  endfunction
  int n_wide [2] = '{0, 0};

  // request driver and response checker for walker g
  logic [63:0] exp_q [2][$];
  task automatic lookups(input int g, input logic [63:0] vs[$], output int cycles);
    int t0, got;
    t0 = cyc; got = 0;
    fork
      begin
        foreach (vs[i]) begin
          @(negedge clk);
          if (g == 0) begin g_w[0].lk_req_valid = 1; g_w[0].lk_req.vaddr = vs[i]; end
          else        begin g_w[1].lk_req_valid = 1; g_w[1].lk_req.vaddr = vs[i]; end
          #1;
          while (!(g == 0 ? g_w[0].lk_req_ready : g_w[1].lk_req_ready)) begin @(negedge clk); #1; end
          exp_q[g].push_back(vs[i]);   // taken at the coming rising edge
        end
        @(negedge clk);
        if (g == 0) g_w[0].lk_req_valid = 0; else g_w[1].lk_req_valid = 0;
      end
      while (got < vs.size()) begin
        @(negedge clk);
        #1.5;   // lk_resp_ready is always high: a valid response is taken at the next edge
        if (g == 0 ? g_w[0].lk_resp_valid : g_w[1].lk_resp_valid) begin
          lookup_resp_t r;
          logic [63:0] mexp;
          r = g == 0 ? g_w[0].lk_resp : g_w[1].lk_resp;
          check(exp_q[g].size() != 0 && r.vaddr == exp_q[g][0], $sformatf("walker %0d response order: %h expected %h", g, r.vaddr, exp_q[g][0]));
          mexp = (g == 1 && wide_group(r.vaddr)) ? (PMASK << 3) : PMASK;
          if (r.mask != PMASK) n_wide[g]++;
          check(!r.fault && r.mask == mexp && (r.paddr & mexp) == (expect_pa(r.vaddr) & mexp),
                $sformatf("walker %0d translation of %h: %h expected %h", g, r.vaddr, r.paddr, expect_pa(r.vaddr)));
          void'(exp_q[g].pop_front());
          got++;
        end
      end
    join
    cycles = cyc - t0;
  endtask

  initial begin
    logic [63:0] vs[$];
    int c1, c4, c8;
    repeat (3) @(negedge clk); rst_n = 1;
    // single walk latency, page with a frame
    vs = '{va(0, 3, 'h123)};
    lookups(0, vs, c1);
    $display("single walk: %0d cycles", c1);
    check(c1 >= 2 * RD_LAT && c1 <= 2 * RD_LAT + 14, $sformatf("walk latency %0d", c1));
    // deferred: reserved page without frame, missing L2 table
    vs = '{va(0, 7, 0), va(2, 0, 64), va(1, 2, 8), va(0, 19, 0)};
    lookups(0, vs, c1);
    check(g_w[0].cnt_deferred == 2, $sformatf("deferred %0d", g_w[0].cnt_deferred));
    // random mix on both walkers
    for (int g = 0; g < 2; g++) begin
      vs.delete();
      repeat (60) begin
        int l1, p;
        l1 = $urandom_range(0, 2); p = $urandom_range(0, 24);
        vs.push_back(va(l1, p, $urandom & 32'h3FFFFFF));
      end
      lookups(g, vs, c1);
    end
    check(g_w[0].cnt_walks == 65 && g_w[1].cnt_walks == 60, "walk counters");
    $display("widened answers: walker 0 %0d, walker 1 %0d", n_wide[0], n_wide[1]);
    check(n_wide[0] == 0 && n_wide[1] > 0, "mask widening only with WIDE_MASK");
    // pipelining
    vs.delete();
    for (int i = 0; i < 8; i++) vs.push_back(va(0, i == 7 ? 8 : i, 0));
    lookups(0, vs, c8);
    lookups(1, vs, c4);
    $display("8 walks: 1 slot %0d cycles, 4 slots %0d cycles", c8, c4);
    check(c8 >= 8 * 2 * RD_LAT, "non-pipelined walker serialises walks");
    check(c4 * 3 <= c8, "4-slot walker overlaps walks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
