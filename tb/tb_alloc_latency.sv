// tb_alloc_latency: latency of malloc, realloc and free over a range of
// allocation sizes, with 256 KiB and with 1 MiB pages.
//
// Two complete allocators (allocator) run side by side, each on its own
// behavioural memory (64-cycle reads), with 64 GiB of physical memory, an
// 8 TiB virtual space and 64 KiB page tables; only the page size differs. For
// each size, as in the evaluation of the design: malloc from an empty virtual
// space and free it again; then malloc a buffer one eighth smaller and realloc
// it to the size, then free it. The cycles from command to response are
// printed for every operation. Sizes: 128 MiB, 512 MiB, 1 GiB, 4 GiB and
// 8 GiB for both, and 256 GiB with 1 MiB pages (32 page tables).
// Checks, from the structure rather than the design: every command succeeds;
// a malloc costs at least one cleared page table (1024 beat writes) per L2
// table it needs; a free costs at least one streamed table (8192 entries) per
// table; realloc costs more than a malloc of the same size; with 256 KiB pages
// an 8 GiB allocation (4 tables) costs more than a 1 GiB one (1 table); and at
// 8 GiB the 1 MiB page size (one table) is cheaper than 256 KiB pages. After
// all frees, every page table except the L1 table is deleted. The sizes follow
// the evaluation; the thresholds are this testbench's own.
`timescale 1ns/1ps
module tb_alloc_latency;
  import vm_pkg::*;

  localparam int NP = 2;
  localparam int PB_CFG [NP] = '{18, 20};
  localparam int NS = 6;
  localparam logic [63:0] MiB = 64'd1 << 20, GiB = 64'd1 << 30;
  localparam logic [63:0] SIZES [NS] = '{128 * MiB, 512 * MiB, GiB, 4 * GiB, 8 * GiB, 256 * GiB};

  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s", s);
    end
  endtask

  initial begin
    #40ms;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  int  lat_m [NP][NS], lat_r [NP][NS], lat_f [NP][NS];
  bit  ok_all [NP];
  int  tables_left [NP];
  bit  done [NP] = '{default: 1'b0};

  for (genvar g = 0; g < NP; g++) begin : g_pb
    localparam int PB = PB_CFG[g];
    logic ready, cmd_valid = 0, cmd_ready, resp_valid, resp_ready = 1;
    alloc_cmd_t cmd = '0;
    alloc_resp_t resp;
    logic lk_req_valid = 0, lk_req_ready, lk_resp_valid, lk_resp_ready = 1;
    lookup_req_t lk_req = '0;
    lookup_resp_t lk_resp;
    logic rd_req_valid, rd_req_ready, rd_dat_valid, rd_dat_ready;
    bus_req_t rd_req; bus_rdat_t rd_dat;
    logic wr_req_valid, wr_req_ready, wr_dat_valid, wr_dat_ready, wr_rsp_valid, wr_rsp_ready;
    bus_req_t wr_req; bus_wdat_t wr_dat;
    logic [31:0] cnt_pt_new, cnt_pt_del, cnt_ptf_new, cnt_ptf_del, cnt_frames_alloc, cnt_frames_freed;

    allocator #(.PAGE_BITS(PB)) dut (.*);
    mem_model #(.RD_LAT(64)) mem (.*);

    task automatic command(input alloc_op_e op, input logic [63:0] ptr, input logic [63:0] size,
                           output bit ok, output logic [63:0] rp, output int lat);
      int t0;
      @(negedge clk);
      cmd_valid = 1; cmd = '{op: op, region: 2'd0, ptr: ptr, size: size};
      t0 = cyc;
      #1;
      while (!cmd_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      cmd_valid = 0;
      while (!resp_valid) @(negedge clk);
      ok = resp.ok; rp = resp.ptr; lat = cyc - t0;
      @(negedge clk);
    endtask

    initial begin
      bit ok, allok;
      logic [63:0] p, q;
      int lat;
      allok = 1'b1;
      @(posedge rst_n);
      while (!ready) @(negedge clk);
      for (int s = 0; s < NS; s++) begin
        lat_m[g][s] = 0; lat_r[g][s] = 0; lat_f[g][s] = 0;
        if (PB == 18 && s == NS - 1) continue;   // 256 GiB only with 1 MiB pages
        command(AC_MALLOC, 0, SIZES[s], ok, p, lat_m[g][s]);
        allok &= ok;
        command(AC_FREE, p, 0, ok, q, lat_f[g][s]);
        allok &= ok;
        command(AC_MALLOC, 0, SIZES[s] - SIZES[s] / 8, ok, p, lat);
        allok &= ok;
        command(AC_REALLOC, p, SIZES[s], ok, q, lat_r[g][s]);
        allok &= ok;
        command(AC_FREE, q, 0, ok, p, lat);
        allok &= ok;
      end
      ok_all[g]      = allok;
      tables_left[g] = int'(cnt_pt_new) - int'(cnt_pt_del);
      done[g]        = 1'b1;
    end
  end

  // L2 tables needed for a size with page bits pb (13 index bits per table)
  function automatic int tables(input logic [63:0] size, input int pb);
    logic [63:0] span;
    span = 64'd1 << (pb + 13);
    return int'((size + span - 1) / span);
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done[0] && done[1]);
    for (int g = 0; g < NP; g++) begin
      check(ok_all[g], $sformatf("page bits %0d: every command succeeds", PB_CFG[g]));
      check(tables_left[g] == 1, $sformatf("page bits %0d: %0d tables left after all frees", PB_CFG[g], tables_left[g]));
      for (int s = 0; s < NS; s++) begin
        int t;
        if (PB_CFG[g] == 18 && s == NS - 1) continue;
        t = tables(SIZES[s], PB_CFG[g]);
        $display("pages %0d KiB, size %0d MiB (%0d tables): malloc %0d, realloc %0d, free %0d cycles",
                 1 << (PB_CFG[g] - 10), SIZES[s] >> 20, t, lat_m[g][s], lat_r[g][s], lat_f[g][s]);
        check(lat_m[g][s] >= 1024 * t, $sformatf("malloc %0d MiB: %0d cycles, below %0d table clears", SIZES[s] >> 20, lat_m[g][s], t));
        check(lat_f[g][s] >= 8192 * t, $sformatf("free %0d MiB: %0d cycles, below %0d table scans", SIZES[s] >> 20, lat_f[g][s], t));
        check(lat_r[g][s] > lat_m[g][s], $sformatf("realloc %0d MiB not dearer than malloc", SIZES[s] >> 20));
      end
    end
    check(lat_m[0][4] > lat_m[0][2], "256 KiB pages: 8 GiB malloc dearer than 1 GiB");
    check(lat_f[0][4] > lat_f[0][2], "256 KiB pages: 8 GiB free dearer than 1 GiB");
    check(lat_m[1][4] < lat_m[0][4], "8 GiB: 1 MiB pages cheaper than 256 KiB pages");
    check(lat_r[1][4] < lat_r[0][4], "8 GiB realloc: 1 MiB pages cheaper than 256 KiB pages");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
