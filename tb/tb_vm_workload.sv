// tb_vm_workload: the random-read workload used to judge the translator cache
// and the walker pipeline, run on three configurations of the whole system.
//
// Workload: a 2 GiB buffer is allocated through the FPGA-side command port and
// one benchmark reader then issues random bursts of BLEN beats anywhere in it
// (window 2^31 bytes). At 64 MiB pages the buffer has 32 pages, so with one
// cache entry almost every burst misses (about 31 in 32). The full workload
// reads 0.5 GiB; this testbench reads NB bursts of it, enough to reach a
// steady state. Each configuration makes two passes; the second is checked.
// Configurations, side by side, each with its own memory model:
//   0: CACHE_ENTRIES=1,  PTW_SLOTS=1   (the main configuration)
//   1: CACHE_ENTRIES=1,  PTW_SLOTS=8   (pipelined walker)
//   2: CACHE_ENTRIES=32, PTW_SLOTS=1   (cache covering the whole buffer)
// Checks, with expectations worked out from the structure rather than taken
// from the design: every reader delivers NB*BLEN beats; configuration 0 misses
// on at least 90% of its bursts; the pipelined walker finishes in well under
// the time of the non-pipelined one (overlapping walks); with 32 entries a
// second pass over the buffer (caches warm) has no misses, runs at the full
// bus rate of one beat per cycle and is several times faster than with one
// entry; the first pass also misses on requests that arrive while the walk
// for their page is still in flight. First-touch frame allocation
// happens in all three (deferred walks). The measured cycles and throughput
// of each configuration are printed. The memory model's read latency is 64
// cycles. The configurations and the buffer size follow the evaluation of the
// design; burst count, burst length and the thresholds are this testbench's
// own choices.
`timescale 1ns/1ps
module tb_vm_workload;
  import vm_pkg::*;

  localparam int NCFG = 3;
  localparam int NB   = 400;   // bursts per run
  localparam int BLEN = 4;     // beats per burst
  localparam int unsigned CACHE_CFG [NCFG] = '{1, 1, 32};
  localparam int unsigned SLOTS_CFG [NCFG] = '{1, 8, 1};

  logic clk = 1'b0, rst_n = 1'b0;
  always #2 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int  res_cycles [NCFG], res_beats [NCFG], res_hit [NCFG], res_miss [NCFG], res_def [NCFG];
  int  warm_miss [NCFG], warm_cyc [NCFG];
  bit  res_ok [NCFG];
  bit  res_done [NCFG] = '{default: 1'b0};

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    logic alloc_ready;
    logic mmio_wr_valid = 0, mmio_rd_valid = 0;
    logic [3:0] mmio_wr_addr = 0, mmio_rd_addr = 0;
    logic [31:0] mmio_wr_data = 0, mmio_rd_data;
    logic ucmd_valid = 0, ucmd_ready, uresp_valid, uresp_ready = 1;
    alloc_cmd_t ucmd = '0;
    alloc_resp_t uresp;
    logic [1:0] bm_start = 0, bm_random = 0, bm_done;
    logic [ADDR_W-1:0] bm_base [2] = '{default: '0};
    logic [5:0]  bm_window [2] = '{default: '0};
    logic [8:0]  bm_burst_len [2] = '{default: '0};
    logic [31:0] bm_bursts [2] = '{default: '0};
    logic [31:0] bm_beats [2], bm_cycles [2];
    logic [63:0] bm_checksum [2];
    logic tlb_flush = 0;
    logic rd_req_valid, rd_req_ready, rd_dat_valid, rd_dat_ready;
    bus_req_t rd_req; bus_rdat_t rd_dat;
    logic wr_req_valid, wr_req_ready, wr_dat_valid, wr_dat_ready, wr_rsp_valid, wr_rsp_ready;
    bus_req_t wr_req; bus_wdat_t wr_dat;
    logic [31:0] cnt_tlb_hit [2], cnt_tlb_miss [2], cnt_tlb_bypass [2];
    logic [31:0] cnt_walks, cnt_deferred, cnt_pt_new, cnt_pt_del, cnt_ptf_new, cnt_ptf_del;
    logic [31:0] cnt_frames_alloc, cnt_frames_freed;

    vm_top #(.CACHE_ENTRIES(CACHE_CFG[g]), .PTW_SLOTS(SLOTS_CFG[g])) dut (.*);

    mem_model #(.RD_LAT(64)) mem (
      .clk, .rst_n, .rd_req_valid, .rd_req_ready, .rd_req, .rd_dat_valid, .rd_dat_ready, .rd_dat,
      .wr_req_valid, .wr_req_ready, .wr_req, .wr_dat_valid, .wr_dat_ready, .wr_dat, .wr_rsp_valid, .wr_rsp_ready
    );

    initial begin
      logic [63:0] ptr;
      bit ok;
      @(posedge rst_n);
      while (!alloc_ready) @(negedge clk);
      // malloc 2 GiB in region 0 through the FPGA-side port
      @(negedge clk);
      ucmd_valid = 1;
      ucmd = '{op: AC_MALLOC, region: 2'd0, ptr: 64'd0, size: 64'h8000_0000};
      do @(posedge clk); while (!ucmd_ready);
      @(negedge clk);
      ucmd_valid = 0;
      while (!uresp_valid) @(negedge clk);
      ok = uresp.ok; ptr = uresp.ptr;
      @(negedge clk);
      // random reads over the whole buffer
      bm_random[0] = 1; bm_base[0] = ptr; bm_window[0] = 6'd31;
      bm_burst_len[0] = 9'(BLEN); bm_bursts[0] = NB;
      bm_start[0] = 1;
      @(negedge clk);
      bm_start[0] = 0;
      while (!bm_done[0]) @(negedge clk);
      warm_miss[g] = int'(cnt_tlb_miss[0]);
      warm_cyc[g]  = int'(bm_cycles[0]);
      // second pass over the same buffer: the caches are now warm
      @(negedge clk);
      bm_start[0] = 1;
      @(negedge clk);
      bm_start[0] = 0;
      while (!bm_done[0]) @(negedge clk);
      res_ok[g]     = ok && in_vm(ptr, 43);
      res_cycles[g] = int'(bm_cycles[0]);
      res_beats[g]  = int'(bm_beats[0]);
      res_hit[g]    = int'(cnt_tlb_hit[0]);
      res_miss[g]   = int'(cnt_tlb_miss[0]) - warm_miss[g];
      res_def[g]    = int'(cnt_deferred);
      res_done[g]   = 1'b1;
    end
  end

  initial begin
    #10ms;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (res_done[0] && res_done[1] && res_done[2]);
    for (int g = 0; g < NCFG; g++) begin
      $display("config %0d (cache %0d, walker slots %0d): first pass %0d cycles, %0d misses; second pass %0d beats in %0d cycles (%0d beats/kcycle), %0d misses; deferred %0d",
               g, CACHE_CFG[g], SLOTS_CFG[g], warm_cyc[g], warm_miss[g], res_beats[g], res_cycles[g],
               res_beats[g] * 1000 / res_cycles[g], res_miss[g], res_def[g]);
      check(res_ok[g], $sformatf("config %0d: malloc of 2 GiB", g));
      check(res_beats[g] == NB * BLEN, $sformatf("config %0d: beats %0d", g, res_beats[g]));
      check(res_def[g] > 0, $sformatf("config %0d: first-touch frame allocation", g));
    end
    check(res_miss[0] * 10 >= NB * 9, $sformatf("one entry: miss rate %0d/%0d below 90%%", res_miss[0], NB));
    check(res_cycles[1] * 10 < res_cycles[0] * 6,
          $sformatf("pipelined walker %0d cycles vs %0d non-pipelined", res_cycles[1], res_cycles[0]));
    check(res_miss[2] == 0, $sformatf("32 entries, warm: %0d misses", res_miss[2]));
    check(res_cycles[2] <= NB * BLEN + 64 + 40, $sformatf("32 entries, warm: %0d cycles, not the full bus rate", res_cycles[2]));
    check(res_cycles[2] * 3 < res_cycles[0],
          $sformatf("32 entries %0d cycles vs %0d with one entry", res_cycles[2], res_cycles[0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
