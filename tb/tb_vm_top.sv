// tb_vm_top: end-to-end test of the virtual memory system at its default
// (full-size) parameters: 64 MiB pages, 8 TiB of virtual memory, 64 GiB of
// memory in four regions, one translator cache entry, non-pipelined walker.
//
// A behavioural memory (mem_model) serves the read and write buses. The test
// drives allocation commands through both command ports (host MMIO registers
// and the FPGA-side command port) and reads buffers with the two benchmark
// readers. It checks the results independently of the design: translations
// are recomputed by walking the page tables found in the model's memory, and
// read checksums are recomputed from the model's address-derived contents
// (mirroring the readers' address generator for random reads).
// Sequence: wait for initialisation; malloc A (256 MiB, host) and B (100 MiB,
// FPGA port, region 1); linear read of A twice (first-touch allocation, then
// a throughput check: at least 0.9 beats per cycle, the full bus rate); a
// bypass read (latency), a translated read after a flush (miss latency: about
// two extra memory round trips for the two page table levels); random reads
// of B; realloc A to 512 MiB and check its frames were kept and the data
// reads back the same; read the old location (fault); free B (frames and
// page table released). Each mechanism is counted and must occur at least
// once: cache hit, miss, bypass, walker deferral, on-demand frame allocation,
// page table creation and deletion, page table entry copy on realloc, frame
// release, fault response, barrier wait, both command ports.
// Page table frames beyond frame 0 cannot be needed at this size (16 L1
// entries allow at most 17 tables); tb_allocator covers them.
`timescale 1ns/1ps
module tb_vm_top;
  import vm_pkg::*;

  localparam int unsigned PAGE_BITS = 26;
  localparam int unsigned L2_BITS   = 13;
  localparam int unsigned VM_BITS   = 43;
  localparam int unsigned RD_LAT    = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  always #2 clk = ~clk;   // 250 MHz

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic alloc_ready;
  logic mmio_wr_valid = 0, mmio_rd_valid = 0;
  logic [3:0] mmio_wr_addr = 0, mmio_rd_addr = 0;
  logic [31:0] mmio_wr_data = 0, mmio_rd_data;
  logic ucmd_valid = 0, ucmd_ready, uresp_valid, uresp_ready = 1;
  alloc_cmd_t ucmd = '0;
  alloc_resp_t uresp;
  logic [1:0] bm_start = 0, bm_random = 0, bm_done;
  logic [ADDR_W-1:0] bm_base [2];
  logic [5:0]  bm_window [2];
  logic [8:0]  bm_burst_len [2];
  logic [31:0] bm_bursts [2], bm_beats [2], bm_cycles [2];
  logic [63:0] bm_checksum [2];
  logic tlb_flush = 0;
  logic rd_req_valid, rd_req_ready, rd_dat_valid, rd_dat_ready;
  bus_req_t rd_req; bus_rdat_t rd_dat;
  logic wr_req_valid, wr_req_ready, wr_dat_valid, wr_dat_ready, wr_rsp_valid, wr_rsp_ready;
  bus_req_t wr_req; bus_wdat_t wr_dat;
  logic [31:0] cnt_tlb_hit [2], cnt_tlb_miss [2], cnt_tlb_bypass [2];
  logic [31:0] cnt_walks, cnt_deferred, cnt_pt_new, cnt_pt_del, cnt_ptf_new, cnt_ptf_del;
  logic [31:0] cnt_frames_alloc, cnt_frames_freed;

  vm_top dut (.*);

  mem_model #(.RD_LAT(RD_LAT)) mem (
    .clk, .rst_n, .rd_req_valid, .rd_req_ready, .rd_req, .rd_dat_valid, .rd_dat_ready, .rd_dat,
    .wr_req_valid, .wr_req_ready, .wr_req, .wr_dat_valid, .wr_dat_ready, .wr_dat, .wr_rsp_valid, .wr_rsp_ready
  );

  // watchdog
  initial begin
    #20ms;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // ------------------------------------------------- mechanism counters
  int n_realloc_copy = 0, n_fault = 0, n_barrier_wait = 0, n_host_cmd = 0, n_user_cmd = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_allocator.u_valloc.s_fill_go && dut.u_allocator.u_valloc.s_from_src) n_realloc_copy++;
    if (dut.w_resp_valid && dut.w_resp_ready && dut.w_resp.fault) n_fault++;
    if (!dut.u_allocator.main_idle && dut.u_allocator.u_valloc.state.name() == "S_FINISH") n_barrier_wait++;
    if (dut.cm_req_valid[0] && dut.cm_req_ready[0]) n_host_cmd++;
    if (dut.cm_req_valid[1] && dut.cm_req_ready[1]) n_user_cmd++;
  end

  // ------------------------------------------------- reference model
  function automatic logic [63:0] l2_entry(input logic [63:0] va);
    logic [63:0] l1e;
    l1e = mem.peek64(L1_TABLE_ADDR + (((va >> (PAGE_BITS + L2_BITS)) & 64'hF) << 3));
    if (!l1e[PTE_PRESENT]) return '0;
    return mem.peek64(pte_addr(l1e) + (((va >> PAGE_BITS) & 64'h1FFF) << 3));
  endfunction

  function automatic logic [63:0] translate(input logic [63:0] va);
    logic [63:0] e;
    if (!in_vm(va, VM_BITS)) return va;
    e = l2_entry(va);
    if (!e[PTE_PRESENT]) return va;   // fault: passed on untranslated
    return (pte_addr(e) & ~((64'd1 << PAGE_BITS) - 1)) | (va & ((64'd1 << PAGE_BITS) - 1));
  endfunction

  function automatic logic [63:0] word0(input logic [63:0] pa);
    logic [DATA_W-1:0] d;
    d = mem.beat(pa >> 6);
    return d[63:0];
  endfunction

  logic [31:0] lfsr_m [2];
  function automatic logic [31:0] lfsr_next(input logic [31:0] l);
    return {1'b0, l[31:1]} ^ (l[0] ? 32'h8020_0003 : 32'h0);
  endfunction

  // expected checksum of a reader run, from the reader's start state
  function automatic logic [63:0] expect_sum(input int i, input bit rnd, input logic [63:0] base,
                                             input int win, input int blen, input int nb);
    logic [63:0] s, a;
    logic [31:0] l;
    s = 0;
    l = lfsr_m[i];
    for (int b = 0; b < nb; b++) begin
      a = rnd ? base + (((64'(l) << 6)) & ((64'd1 << win) - 1)) : base + 64'(b) * 64'(blen) * 64;
      for (int k = 0; k < blen; k++) s ^= word0(translate(a + 64'(k) * 64));
      l = lfsr_next(l);
    end
    return s;
  endfunction

  // ------------------------------------------------- drivers
  task automatic mmio_write(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk);
    mmio_wr_valid = 1; mmio_wr_addr = a; mmio_wr_data = d;
    @(negedge clk);
    mmio_wr_valid = 0;
  endtask

  task automatic mmio_read(input logic [3:0] a, output logic [31:0] d);
    @(negedge clk);
    mmio_rd_valid = 1; mmio_rd_addr = a;
    @(negedge clk);
    mmio_rd_valid = 0;
    d = mmio_rd_data;
  endtask

  task automatic host_cmd(input alloc_op_e op, input logic [1:0] region, input logic [63:0] ptr,
                          input logic [63:0] size, output bit ok, output logic [63:0] rptr,
                          output int lat);
    logic [31:0] st, lo, hi;
    int t0;
    mmio_write(0, size[31:0]); mmio_write(1, size[63:32]);
    mmio_write(2, ptr[31:0]);  mmio_write(3, ptr[63:32]);
    t0 = cyc;
    mmio_write(4, {26'd0, region, 2'd0, 2'(op)});
    do mmio_read(5, st); while (!st[1]);
    lat = cyc - t0;
    mmio_read(6, lo); mmio_read(7, hi);
    ok = st[2]; rptr = {hi, lo};
    mmio_write(8, 0);
  endtask

  task automatic user_cmd(input alloc_op_e op, input logic [1:0] region, input logic [63:0] ptr,
                          input logic [63:0] size, output bit ok, output logic [63:0] rptr);
    @(negedge clk);
    ucmd_valid = 1; ucmd = '{op: op, region: region, ptr: ptr, size: size};
    do @(posedge clk); while (!ucmd_ready);
    @(negedge clk);
    ucmd_valid = 0;
    while (!uresp_valid) @(negedge clk);
    ok = uresp.ok; rptr = uresp.ptr;
    @(negedge clk);
  endtask

  task automatic bench(input int i, input bit rnd, input logic [63:0] base, input int win,
                       input int blen, input int nb, output int cycles);
    logic [63:0] exp_sum;
    @(negedge clk);
    bm_random[i] = rnd; bm_base[i] = base; bm_window[i] = 6'(win);
    bm_burst_len[i] = 9'(blen); bm_bursts[i] = nb;
    bm_start[i] = 1;
    @(negedge clk);
    bm_start[i] = 0;
    while (!bm_done[i]) @(negedge clk);
    cycles = bm_cycles[i];
    exp_sum = expect_sum(i, rnd, base, win, blen, nb);
    for (int b = 0; b < nb; b++) lfsr_m[i] = lfsr_next(lfsr_m[i]);
    check(bm_beats[i] == 32'(blen * nb), $sformatf("reader %0d beats %0d", i, bm_beats[i]));
    check(bm_checksum[i] == exp_sum, $sformatf("reader %0d checksum %h expected %h", i, bm_checksum[i], exp_sum));
  endtask

  task automatic flush();
    @(negedge clk); tlb_flush = 1; @(negedge clk); tlb_flush = 0;
  endtask

  int cyc = 0;
  always @(posedge clk) cyc++;

  // ------------------------------------------------- test sequence
  localparam logic [63:0] MiB = 64'd1 << 20;
  initial begin
    bit ok;
    logic [63:0] a, b, a2, p, frame_a0, e;
    logic [31:0] st;
    int lat, t, c_first, c_lin, c_byp, c_miss, init_cyc;

    for (int i = 0; i < 2; i++) begin
      bm_base[i] = 0; bm_window[i] = 0; bm_burst_len[i] = 1; bm_bursts[i] = 0; lfsr_m[i] = 32'h1;
    end
    repeat (5) @(negedge clk);
    rst_n = 1;
    t = cyc;
    while (!alloc_ready) @(negedge clk);
    init_cyc = cyc - t;
    $display("initialisation: %0d cycles", init_cyc);
    // two 64 KiB tables (frame 0 bitmap and the L1 table) are cleared
    check(init_cyc >= 1024, "initialisation clears the first-level table");
    mmio_read(5, st);
    check(st[3], "STATUS shows allocator ready");

    // malloc A through the host registers
    host_cmd(AC_MALLOC, 2'd0, 0, 256 * MiB, ok, a, lat);
    $display("malloc 256 MiB: ptr %h, %0d cycles", a, lat);
    check(ok && in_vm(a, VM_BITS), "malloc A gives a virtual address");
    check(a[38:0] == 0, "allocation starts at an L1 entry boundary");
    // a new 64 KiB page table is cleared: 1024 beats
    check(lat >= 1024 && lat < 20000, $sformatf("malloc latency %0d", lat));
    check(l2_entry(a)[PTE_RESERVED] && !l2_entry(a)[PTE_PRESENT], "pages reserved, frames not yet assigned");
    check(l2_entry(a + 192 * MiB)[PTE_LAST], "last page marked");

    // malloc B through the FPGA command port, region 1
    user_cmd(AC_MALLOC, 2'd1, 0, 100 * MiB, ok, b);
    $display("malloc 100 MiB: ptr %h", b);
    check(ok && in_vm(b, VM_BITS) && b != a, "malloc B gives a second virtual address");

    // linear read of A: first touch allocates a frame
    bench(0, 0, a, 0, 64, 64, c_first);
    check(l2_entry(a)[PTE_PRESENT], "frame assigned on first access");
    check(pte_region(l2_entry(a)) == 0, "frame of A from region 0");
    frame_a0 = translate(a);
    bench(0, 0, a, 0, 64, 64, c_lin);
    $display("linear read 4096 beats: first %0d cycles, again %0d cycles", c_first, c_lin);
    check(c_lin <= 4096 + RD_LAT + 40, $sformatf("linear throughput: %0d cycles", c_lin));
    check(4096 * 10 >= 9 * c_lin, "at least 0.9 beat per cycle");

    // bypass latency (physical address outside the virtual window)
    bench(1, 0, 64'h0000_0008_0000_0000, 0, 1, 1, c_byp);
    // translated latency after a flush: one miss and a two-level walk
    flush();
    bench(0, 0, a + 64'h1000, 0, 1, 1, c_miss);
    $display("latency: bypass %0d cycles, translated miss %0d cycles", c_byp, c_miss);
    check(c_byp >= RD_LAT && c_byp <= RD_LAT + 20, $sformatf("bypass latency %0d", c_byp));
    check(c_miss >= c_byp + 2 * RD_LAT && c_miss <= c_byp + 2 * RD_LAT + 80, $sformatf("miss latency %0d", c_miss));

    // random single-beat reads over B's two pages
    bench(1, 1, b, 27, 1, 64, t);
    check(pte_region(l2_entry(b)) == 1 && pte_region(l2_entry(b + 64 * MiB)) == 1, "frames of B from region 1");
    p = translate(b) >> PAGE_BITS;
    check(p >= 256 && p < 512, $sformatf("B frame %0d lies in region 1", p));

    // realloc A to 512 MiB: page table entries move, frames are kept
    host_cmd(AC_REALLOC, 2'd0, a, 512 * MiB, ok, a2, lat);
    $display("realloc to 512 MiB: ptr %h, %0d cycles", a2, lat);
    check(ok && in_vm(a2, VM_BITS) && a2 != a, "realloc gives a new address");
    check(translate(a2) == frame_a0, "realloc keeps the frame of page 0");
    check(l2_entry(a2 + 448 * MiB)[PTE_LAST] && !l2_entry(a2 + 192 * MiB)[PTE_LAST], "last-page mark moved");
    check(!l2_entry(a)[PTE_RESERVED], "old location unmapped");
    flush();
    bench(0, 0, a2, 0, 64, 64, t);
    bench(0, 0, a2 + 300 * MiB, 0, 16, 4, t);   // a page added by realloc

    // reading the old location gives a fault response from the allocator
    flush();
    t = n_fault;
    bench(0, 0, a + 64'h40, 0, 1, 1, c_first);
    check(n_fault > t, "read of a freed address answered with a fault");

    // free B: frames and its page table are released
    t = cnt_frames_freed;
    user_cmd(AC_FREE, 2'd1, b, 0, ok, p);
    check(ok, "free B");
    check(cnt_frames_freed == t + 2, $sformatf("free released %0d frames", cnt_frames_freed - t));
    check(!l2_entry(b)[PTE_RESERVED], "B unmapped");
    // its frames are free again: a new allocation in region 1 gets the same frames back eventually
    user_cmd(AC_MALLOC, 2'd1, 0, 64 * MiB, ok, p);
    check(ok, "malloc after free");

    // every mechanism must have happened
    $display("hits %0d/%0d misses %0d/%0d bypass %0d/%0d walks %0d deferred %0d",
             cnt_tlb_hit[0], cnt_tlb_hit[1], cnt_tlb_miss[0], cnt_tlb_miss[1],
             cnt_tlb_bypass[0], cnt_tlb_bypass[1], cnt_walks, cnt_deferred);
    $display("frames alloc %0d freed %0d, tables new %0d del %0d, copy %0d, faults %0d, barrier waits %0d",
             cnt_frames_alloc, cnt_frames_freed, cnt_pt_new, cnt_pt_del, n_realloc_copy, n_fault, n_barrier_wait);
    check(cnt_tlb_hit[0] > 0, "mechanism: translation cache hit");
    check(cnt_tlb_miss[0] > 0 && cnt_tlb_miss[1] > 0, "mechanism: translation cache miss");
    check(cnt_tlb_bypass[1] > 0, "mechanism: bypass");
    check(cnt_walks > 0, "mechanism: page table walk");
    check(cnt_deferred > 0, "mechanism: walk deferred to the allocator");
    check(cnt_frames_alloc >= 4, "mechanism: on-demand frame allocation");
    check(cnt_pt_new >= 4, "mechanism: page table creation");
    check(cnt_pt_del >= 2, "mechanism: page table deletion");
    check(n_realloc_copy > 0, "mechanism: page table entry copy on realloc");
    check(cnt_frames_freed > 0, "mechanism: frame release");
    check(n_fault > 0, "mechanism: fault response");
    check(n_barrier_wait > 0, "mechanism: write barrier wait");
    check(n_host_cmd > 0 && n_user_cmd > 0, "mechanism: both command ports");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
