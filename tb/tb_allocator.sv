// tb_allocator: self-checking test of the complete allocator (virtual
// allocator, gap finders, page table frame list, frame store, page table
// reader, authoritative lookup, write barriers and bus arbiters).
//
// It runs with 256 KiB pages and 64 MiB of memory (256 frames in four
// regions), so that page table frames fill up quickly: a 256 KiB frame holds
// the slot-usage bitmap and three 64 KiB page tables. The allocator is
// connected to the behavioural memory; after every command the page tables in
// memory are checked against a reference: each page of a live allocation has
// a reserved leaf in its region, the last page is marked, pages of freed
// allocations are unmapped. Lookups through the walker port must allocate a
// frame on first touch, write it back, and give faults outside allocations.
// Realloc must keep the frames of the pages it keeps. Freeing everything must
// delete every page table and the extra page table frames and release every
// frame that was touched. Mechanisms counted: new page table frame, page
// table frame freed, multi-table allocation, allocation failure.
`timescale 1ns/1ps
module tb_allocator;
  import vm_pkg::*;
  localparam int PB = 18, L2B = 13, VMB = 43, PHYS = 26;
  localparam logic [63:0] PMASK = ~((64'd1 << PB) - 1);
  localparam logic [63:0] KiB = 1024, MiB = 1024 * 1024, GiB = 1024 * MiB;
  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin #10ms; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  logic ready, cmd_valid = 0, cmd_ready, resp_valid, resp_ready = 1;
  alloc_cmd_t cmd = '0; alloc_resp_t resp;
  logic lk_req_valid = 0, lk_req_ready, lk_resp_valid, lk_resp_ready = 1;
  lookup_req_t lk_req = '0; lookup_resp_t lk_resp;
  logic rd_req_valid, rd_req_ready, rd_dat_valid, rd_dat_ready; bus_req_t rd_req; bus_rdat_t rd_dat;
  logic wr_req_valid, wr_req_ready, wr_dat_valid, wr_dat_ready, wr_rsp_valid, wr_rsp_ready;
  bus_req_t wr_req; bus_wdat_t wr_dat;
  logic [31:0] cnt_pt_new, cnt_pt_del, cnt_ptf_new, cnt_ptf_del, cnt_frames_alloc, cnt_frames_freed;
  allocator #(.VM_BITS(VMB), .PAGE_BITS(PB), .L2_BITS(L2B), .PHYS_BITS(PHYS), .NUM_REGIONS(4), .PT_FRAMES(16)) dut (.*);
  mem_model #(.RD_LAT(30)) mem (.*);

  int cyc = 0;
  always @(posedge clk) cyc++;

  function automatic logic [63:0] l2e(input logic [63:0] v);
    logic [63:0] l1;
    l1 = mem.peek64(L1_TABLE_ADDR + (((v >> (PB + L2B)) & 64'hFFF) << 3));
    if (!l1[PTE_PRESENT]) return 0;
    return mem.peek64(pte_addr(l1) + (((v >> PB) & 64'h1FFF) << 3));
  endfunction

  task automatic command(input alloc_op_e op, input logic [1:0] region, input logic [63:0] ptr,
                         input logic [63:0] size, output bit ok, output logic [63:0] rp, output int lat);
    int t0;
    @(negedge clk); cmd_valid = 1; cmd = '{op: op, region: region, ptr: ptr, size: size};
    t0 = cyc;
    #1; while (!cmd_ready) begin @(negedge clk); #1; end
    @(negedge clk); cmd_valid = 0;
    while (!resp_valid) @(negedge clk);
    ok = resp.ok; rp = resp.ptr; lat = cyc - t0;
    @(negedge clk);
  endtask

  task automatic lookup(input logic [63:0] v, output lookup_resp_t r);
    @(negedge clk); lk_req_valid = 1; lk_req.vaddr = v;
    #1; while (!lk_req_ready) begin @(negedge clk); #1; end
    @(negedge clk); lk_req_valid = 0;
    while (!lk_resp_valid) @(negedge clk);
    r = lk_resp;
    @(negedge clk);
  endtask

  // check that an allocation of 'pages' pages at p is mapped in 'region'
  task automatic check_mapped(input logic [63:0] p, input longint pages, input int region, input string name);
    int bad;
    bad = 0;
    for (longint i = 0; i < pages; i++) begin
      logic [63:0] e;
      if (pages > 64 && i > 16 && i < pages - 16 && i % 97 != 0) continue;   // sample large ones
      e = l2e(p + 64'(i) * (64'd1 << PB));
      if (!e[PTE_RESERVED] || pte_region(e) != 2'(region) || e[PTE_LAST] != (i == pages - 1)) bad++;
    end
    check(bad == 0, $sformatf("%s: %0d pages mapped wrongly", name, bad));
  endtask
  task automatic check_unmapped(input logic [63:0] p, input longint pages, input string name);
    int bad;
    bad = 0;
    for (longint i = 0; i < pages && i < 64; i++) if (l2e(p + 64'(i) * (64'd1 << PB))[PTE_RESERVED]) bad++;
    check(bad == 0, $sformatf("%s: %0d pages still mapped", name, bad));
  endtask

  initial begin
    bit ok; int lat, t0;
    logic [63:0] a, b, c, d, a2, p, f0, f1;
    lookup_resp_t r;
    repeat (3) @(negedge clk); rst_n = 1;
    t0 = cyc;
    while (!ready) @(negedge clk);
    $display("initialisation %0d cycles", cyc - t0);
    $display("after init: tables %0d, table frames %0d", cnt_pt_new, cnt_ptf_new);
    check(cnt_pt_new == 1 && cnt_ptf_new == 1, "frame 0 and the L1 table set up at start");

    command(AC_MALLOC, 2'd0, 0, 1 * MiB, ok, a, lat);
    $display("malloc 1 MiB: %h in %0d cycles", a, lat);
    check(ok && in_vm(a, VMB) && (a & ((64'd1 << (PB + L2B)) - 1)) == 0, "malloc a");
    check(lat >= 1024, "a new page table is cleared (1024 beats)");
    check_mapped(a, 4, 0, "a");
    command(AC_MALLOC, 2'd1, 0, 300 * KiB, ok, b, lat);
    check(ok && b != a, "malloc b");
    check_mapped(b, 2, 1, "b");
    check(cnt_ptf_new == 1, "frame 0 holds the first tables");
    command(AC_MALLOC, 2'd2, 0, 2 * MiB, ok, c, lat);
    check(ok, "malloc c");
    check_mapped(c, 8, 2, "c");
    check(cnt_ptf_new == 2, $sformatf("frame 0 full: new page table frame (%0d)", cnt_ptf_new));
    // an allocation spanning two L1 entries (two page tables)
    command(AC_MALLOC, 2'd3, 0, 3 * GiB, ok, d, lat);
    $display("malloc 3 GiB: %h in %0d cycles", d, lat);
    check(ok, "malloc d");
    check_mapped(d, 3 * GiB / (256 * KiB), 3, "d");
    check(cnt_pt_new == 6, $sformatf("page tables created: %0d", cnt_pt_new));
    // too large for the virtual space
    command(AC_MALLOC, 2'd0, 0, 64'd1 << VMB, ok, p, lat);
    check(!ok, "oversized malloc fails");

    // lookups: first touch allocates a frame
    lookup(a + 5, r);
    check(!r.fault && r.mask == PMASK, "lookup a page 0");
    f0 = r.paddr;
    check((f0 >> PB) < 64, $sformatf("frame %0d in region 0", f0 >> PB));
    repeat (50) @(negedge clk);
    check(l2e(a)[PTE_PRESENT] && pte_addr(l2e(a)) == f0, "frame written into the leaf");
    lookup(a + 3 * (64'd1 << PB), r);
    f1 = r.paddr;
    check(!r.fault && f1 != f0, "lookup a page 3");
    lookup(a, r);
    check(r.paddr == f0 && cnt_frames_alloc == 2, "second lookup reuses the frame");
    lookup(b + (64'd1 << PB), r);
    check(!r.fault && (r.paddr >> PB) >= 64 && (r.paddr >> PB) < 128, "frame of b in region 1");
    lookup(d + 2 * GiB + 64, r);
    check(!r.fault && (r.paddr >> PB) >= 192, "frame of d (second table) in region 3");
    lookup(a + 4 * (64'd1 << PB), r);
    check(r.fault, "page past the end of a faults");

    // realloc a: 1 MiB -> 1.5 MiB, frames kept
    command(AC_REALLOC, 2'd0, a, 1536 * KiB, ok, a2, lat);
    $display("realloc: %h in %0d cycles", a2, lat);
    check(ok && a2 != a, "realloc a");
    check_mapped(a2, 6, 0, "a after realloc");
    check(pte_addr(l2e(a2)) == f0 && pte_addr(l2e(a2 + 3 * (64'd1 << PB))) == f1, "realloc keeps frames");
    check_unmapped(a, 4, "old a");
    // realloc smaller: 1.5 MiB -> 256 KiB, page 3's frame released
    t0 = cnt_frames_freed;
    command(AC_REALLOC, 2'd0, a2, 256 * KiB, ok, a, lat);
    check(ok && pte_addr(l2e(a)) == f0 && l2e(a)[PTE_LAST], "shrinking realloc keeps page 0");
    check(cnt_frames_freed == t0 + 1, "shrinking realloc frees the dropped page's frame");

    // free everything
    command(AC_FREE, 2'd0, a, 0, ok, p, lat);  check(ok, "free a");
    command(AC_FREE, 2'd0, b, 0, ok, p, lat);  check(ok, "free b");
    command(AC_FREE, 2'd0, c, 0, ok, p, lat);  check(ok, "free c");
    command(AC_FREE, 2'd0, d, 0, ok, p, lat);  check(ok, "free d");
    check_unmapped(a, 1, "a"); check_unmapped(b, 2, "b"); check_unmapped(c, 8, "c"); check_unmapped(d, 64, "d");
    check(cnt_frames_freed == cnt_frames_alloc, $sformatf("frames freed %0d of %0d", cnt_frames_freed, cnt_frames_alloc));
    check(cnt_pt_del == cnt_pt_new - 1, $sformatf("page tables deleted %0d of %0d", cnt_pt_del, cnt_pt_new - 1));
    check(cnt_ptf_del == cnt_ptf_new - 1 && cnt_ptf_new >= 2, $sformatf("page table frames freed %0d of %0d", cnt_ptf_del, cnt_ptf_new));
    // free of an address that is not allocated
    command(AC_FREE, 2'd0, a, 0, ok, p, lat);  check(!ok, "double free fails");
    // space is reusable
    command(AC_MALLOC, 2'd1, 0, 1 * MiB, ok, p, lat);
    check(ok, "malloc after freeing everything");
    check_mapped(p, 4, 1, "reused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
