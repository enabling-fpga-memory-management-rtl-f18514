// tb_auth_lookup: self-checking test of the authoritative lookup unit.
//
// Page tables in the behavioural memory hold: pages with frames, pages
// reserved by an allocation without a frame (in regions 1 and 2), a page not
// part of any allocation, and an empty L1 entry. A frame store model hands out
// frame numbers in sequence and records the region asked for. The test checks
// that a page with a frame is answered from the table; that a reserved page
// gets a new frame from the right region, is answered with it and is then
// written back to memory as present with that frame (and answered from the
// table the next time, without a new frame); that the others get fault
// responses; and that no lookup is accepted while the write barrier is busy.
`timescale 1ns/1ps
module tb_auth_lookup;
  import vm_pkg::*;
  localparam int PB = 26, L2B = 13;
  localparam logic [63:0] PMASK = ~((64'd1 << PB) - 1);
  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin #2ms; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  logic lk_req_valid = 0, lk_req_ready, lk_resp_valid, lk_resp_ready = 1;
  lookup_req_t lk_req = '0; lookup_resp_t lk_resp;
  logic fs_req_valid, fs_req_ready, fs_resp_valid = 0, fs_resp_ready; fs_req_t fs_req; fs_resp_t fs_resp = '0;
  logic rd_req_valid, rd_req_ready, rd_dat_valid, rd_dat_ready; bus_req_t rd_req; bus_rdat_t rd_dat;
  logic wr_req_valid, wr_req_ready, wr_dat_valid, wr_dat_ready, wr_rsp_valid, wr_rsp_ready;
  bus_req_t wr_req; bus_wdat_t wr_dat;
  logic barrier_idle = 1; logic [31:0] cnt_frames;
  auth_lookup #(.VM_BITS(43), .PAGE_BITS(PB), .L2_BITS(L2B)) dut (.*);
  mem_model #(.RD_LAT(20)) mem (.*);

  // frame store model
  int next_frame = 300, fs_regions[$];
  assign fs_req_ready = !fs_resp_valid;
  always @(posedge clk) if (rst_n) begin
    if (fs_req_valid && fs_req_ready) begin
      check(fs_req.op == FS_ALLOC, "frame store request is an allocation");
      fs_regions.push_back(fs_req.region);
      fs_resp_valid <= 1; fs_resp <= '{ok: 1'b1, frame: 32'(next_frame)};
      next_frame++;
    end else if (fs_resp_valid && fs_resp_ready) fs_resp_valid <= 0;
  end

  function automatic logic [63:0] va(int l1, int p);
    return VM_BASE | (64'(l1) << (PB + L2B)) | (64'(p) << PB) | 64'h1230;
  endfunction
  function automatic logic [63:0] leaf_at(logic [63:0] table_addr, int p);
    return mem.peek64(table_addr + 64'(p) * 8);
  endfunction

  task automatic lookup(input logic [63:0] v, output lookup_resp_t r);
    @(negedge clk); lk_req_valid = 1; lk_req.vaddr = v;
    #1; while (!lk_req_ready) begin @(negedge clk); #1; end
    @(negedge clk); lk_req_valid = 0;
    #1; while (!lk_resp_valid) begin @(negedge clk); #1; end
    r = lk_resp;
    @(negedge clk);
  endtask

  initial begin
    lookup_resp_t r; int n;
    for (int i = 0; i < 16; i++) begin
      mem.poke64(L1_TABLE_ADDR + 64'(i) * 8, '0); mem.poke64(64'h20000 + 64'(i) * 8, '0);
    end
    mem.poke64(L1_TABLE_ADDR, l1_pte(64'h20000));
    mem.poke64(64'h20000 + 0, leaf_pte(1, 0, 2'd0, 64'h5_0000_0000));   // page 0: frame
    mem.poke64(64'h20000 + 8, leaf_pte(0, 0, 2'd1, '0));                // page 1: reserved, region 1
    mem.poke64(64'h20000 + 16, leaf_pte(0, 1, 2'd2, '0));               // page 2: reserved, region 2, last
    repeat (3) @(negedge clk); rst_n = 1;

    lookup(va(0, 0), r);
    check(!r.fault && r.paddr == 64'h5_0000_0000 && r.mask == PMASK && r.vaddr == va(0, 0), "page with frame");
    check(cnt_frames == 0, "no frame taken for a mapped page");

    lookup(va(0, 1), r);
    check(!r.fault && r.paddr == 64'(300) << PB && r.mask == PMASK, $sformatf("reserved page gets frame 300: %h", r.paddr));
    check(fs_regions.size() == 1 && fs_regions[0] == 1, "frame from region 1");
    repeat (60) @(negedge clk);
    check(leaf_at(64'h20000, 1) == leaf_pte(1, 0, 2'd1, 64'(300) << PB), $sformatf("leaf written back: %h", leaf_at(64'h20000, 1)));
    check(leaf_at(64'h20000, 0) == leaf_pte(1, 0, 2'd0, 64'h5_0000_0000), "neighbouring entry untouched");
    lookup(va(0, 1), r);
    check(!r.fault && r.paddr == 64'(300) << PB && cnt_frames == 1, "second lookup answered from the table");

    lookup(va(0, 2), r);
    check(!r.fault && r.paddr == 64'(301) << PB && fs_regions[1] == 2, "region 2 frame");
    repeat (60) @(negedge clk);
    check(leaf_at(64'h20000, 2) == leaf_pte(1, 1, 2'd2, 64'(301) << PB), "last flag kept on write back");

    lookup(va(0, 3), r);
    check(r.fault && r.mask == 0, "unreserved page faults");
    lookup(va(5, 0), r);
    check(r.fault, "missing table faults");

    // barrier busy: request must wait
    @(negedge clk); barrier_idle = 0; lk_req_valid = 1; lk_req.vaddr = va(0, 0);
    n = 0;
    repeat (20) begin #1; if (lk_req_ready) n++; @(negedge clk); end
    check(n == 0, "no lookup accepted while writes are outstanding");
    barrier_idle = 1;
    #1; while (!lk_req_ready) begin @(negedge clk); #1; end
    @(negedge clk); lk_req_valid = 0;
    while (!lk_resp_valid) @(negedge clk);
    check(!lk_resp.fault && lk_resp.paddr == 64'h5_0000_0000, "lookup after the barrier clears");
    check(cnt_frames == 2, "frame counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
