// vm_top: paged virtual memory for FPGA-local memory, with two benchmark
// readers, as one example top level.
//
// Structure:
//   read_benchmarker[i] -> translator[i] -> bus read arbiter -> read bus
//   translator[0..1] lookups -> translation arbiter -> pt_walker
//   pt_walker misses -> allocator (authoritative lookup)
//   pt_walker, allocator reads -> bus read arbiter ; allocator writes -> write bus
//   host MMIO -> mmio_alloc -\
//                              command multiplexer -> allocator
//   FPGA user commands -----/
// Each reader has its own translator, since a buffer read linearly needs a
// single cache entry; the walker is shared. The read and write buses and the
// host's MMIO registers are top-level ports: memory, its controller and the
// interconnect are outside this design. Benchmark controls and results are
// ports too, so the whole system can be driven by a testbench. Parameter
// defaults follow the main configuration evaluated for the design: 64 MiB
// pages, an 8 TiB virtual space, 64 KiB page tables, 64 GiB of board memory in
// four regions (memory channels), one translator cache entry and a
// non-pipelined walker (PTW_SLOTS=1). Mask widening in the walker
// (PTW_WIDE_MASK) is off by default.
module vm_top
  import vm_pkg::*;
#(
  parameter int unsigned VM_BITS         = 43,
  parameter int unsigned PAGE_BITS       = 26,
  parameter int unsigned L2_BITS         = 13,
  parameter int unsigned PHYS_BITS       = 36,
  parameter int unsigned NUM_REGIONS     = 4,
  parameter int unsigned CACHE_ENTRIES   = 1,
  parameter int unsigned MAX_OUTSTANDING = 8,
  parameter int unsigned PTW_SLOTS       = 1,
  parameter bit          PTW_WIDE_MASK   = 1'b0,
  parameter int unsigned PT_FRAMES       = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              alloc_ready,
  // host MMIO
  input  logic              mmio_wr_valid,
  input  logic [3:0]        mmio_wr_addr,
  input  logic [31:0]       mmio_wr_data,
  input  logic              mmio_rd_valid,
  input  logic [3:0]        mmio_rd_addr,
  output logic [31:0]       mmio_rd_data,
  // allocation commands from FPGA logic
  input  logic              ucmd_valid,
  output logic              ucmd_ready,
  input  alloc_cmd_t        ucmd,
  output logic              uresp_valid,
  input  logic              uresp_ready,
  output alloc_resp_t       uresp,
  // benchmark readers
  input  logic [1:0]        bm_start,
  input  logic [1:0]        bm_random,
  input  logic [ADDR_W-1:0] bm_base      [2],
  input  logic [5:0]        bm_window    [2],
  input  logic [8:0]        bm_burst_len [2],
  input  logic [31:0]       bm_bursts    [2],
  output logic [1:0]        bm_done,
  output logic [31:0]       bm_beats     [2],
  output logic [31:0]       bm_cycles    [2],
  output logic [63:0]       bm_checksum  [2],
  input  logic              tlb_flush,
  // memory read bus
  output logic              rd_req_valid,
  input  logic              rd_req_ready,
  output bus_req_t          rd_req,
  input  logic              rd_dat_valid,
  output logic              rd_dat_ready,
  input  bus_rdat_t         rd_dat,
  // memory write bus
  output logic              wr_req_valid,
  input  logic              wr_req_ready,
  output bus_req_t          wr_req,
  output logic              wr_dat_valid,
  input  logic              wr_dat_ready,
  output bus_wdat_t         wr_dat,
  input  logic              wr_rsp_valid,
  output logic              wr_rsp_ready,
  // event counters
  output logic [31:0]       cnt_tlb_hit    [2],
  output logic [31:0]       cnt_tlb_miss   [2],
  output logic [31:0]       cnt_tlb_bypass [2],
  output logic [31:0]       cnt_walks,
  output logic [31:0]       cnt_deferred,
  output logic [31:0]       cnt_pt_new,
  output logic [31:0]       cnt_pt_del,
  output logic [31:0]       cnt_ptf_new,
  output logic [31:0]       cnt_ptf_del,
  output logic [31:0]       cnt_frames_alloc,
  output logic [31:0]       cnt_frames_freed
);
  // top read arbiter ports: 0,1 readers, 2 walker, 3 allocator
  logic [3:0] ra_req_valid, ra_req_ready, ra_dat_valid, ra_dat_ready;
  bus_req_t   ra_req [4];
  bus_rdat_t  ra_dat;

  // translator lookups
  logic [1:0]   tl_req_valid, tl_req_ready, tl_resp_valid, tl_resp_ready;
  lookup_req_t  tl_req [2];
  lookup_resp_t tl_resp;

  for (genvar i = 0; i < 2; i++) begin : g_reader
    logic     bq_valid, bq_ready;
    bus_req_t bq;

    read_benchmarker u_bench (
      .clk, .rst_n,
      .start(bm_start[i]), .random_mode(bm_random[i]), .base(bm_base[i]), .window_log2(bm_window[i]),
      .burst_len(bm_burst_len[i]), .num_bursts(bm_bursts[i]),
      .busy(), .done(bm_done[i]), .beats(bm_beats[i]), .cycles(bm_cycles[i]), .checksum(bm_checksum[i]),
      .req_valid(bq_valid), .req_ready(bq_ready), .req(bq),
      .dat_valid(ra_dat_valid[i]), .dat_ready(ra_dat_ready[i]), .dat(ra_dat)
    );

    translator #(.CACHE_ENTRIES(CACHE_ENTRIES), .MAX_OUTSTANDING(MAX_OUTSTANDING), .VM_BITS(VM_BITS)) u_translator (
      .clk, .rst_n, .flush(tlb_flush),
      .in_valid(bq_valid), .in_ready(bq_ready), .in_req(bq),
      .out_valid(ra_req_valid[i]), .out_ready(ra_req_ready[i]), .out_req(ra_req[i]),
      .lk_req_valid(tl_req_valid[i]), .lk_req_ready(tl_req_ready[i]), .lk_req(tl_req[i]),
      .lk_resp_valid(tl_resp_valid[i]), .lk_resp_ready(tl_resp_ready[i]), .lk_resp(tl_resp),
      .cnt_hit(cnt_tlb_hit[i]), .cnt_miss(cnt_tlb_miss[i]), .cnt_bypass(cnt_tlb_bypass[i])
    );
  end

  // translation arbiter
  logic         w_req_valid, w_req_ready, w_resp_valid, w_resp_ready;
  lookup_req_t  w_req;
  lookup_resp_t w_resp;

  req_resp_arbiter #(.REQ_T(lookup_req_t), .RESP_T(lookup_resp_t), .N(2),
                     .OUTSTANDING(2 * MAX_OUTSTANDING)) u_translation_arb (
    .clk, .rst_n,
    .c_req_valid(tl_req_valid), .c_req_ready(tl_req_ready), .c_req(tl_req),
    .c_resp_valid(tl_resp_valid), .c_resp_ready(tl_resp_ready), .c_resp(tl_resp),
    .s_req_valid(w_req_valid), .s_req_ready(w_req_ready), .s_req(w_req),
    .s_resp_valid(w_resp_valid), .s_resp_ready(w_resp_ready), .s_resp(w_resp)
  );

  // page table walker
  logic         al_req_valid, al_req_ready, al_resp_valid, al_resp_ready;
  lookup_req_t  al_req;
  lookup_resp_t al_resp;

  pt_walker #(.SLOTS(PTW_SLOTS), .WIDE_MASK(PTW_WIDE_MASK), .VM_BITS(VM_BITS), .PAGE_BITS(PAGE_BITS), .L2_BITS(L2_BITS)) u_walker (
    .clk, .rst_n,
    .lk_req_valid(w_req_valid), .lk_req_ready(w_req_ready), .lk_req(w_req),
    .lk_resp_valid(w_resp_valid), .lk_resp_ready(w_resp_ready), .lk_resp(w_resp),
    .al_req_valid, .al_req_ready, .al_req, .al_resp_valid, .al_resp_ready, .al_resp,
    .rd_req_valid(ra_req_valid[2]), .rd_req_ready(ra_req_ready[2]), .rd_req(ra_req[2]),
    .rd_dat_valid(ra_dat_valid[2]), .rd_dat_ready(ra_dat_ready[2]), .rd_dat(ra_dat),
    .cnt_walks, .cnt_deferred
  );

  // command multiplexer: 0 host, 1 FPGA logic
  logic [1:0]  cm_req_valid, cm_req_ready, cm_resp_valid, cm_resp_ready;
  alloc_cmd_t  cm_req [2];
  alloc_resp_t cm_resp;
  logic        a_cmd_valid, a_cmd_ready, a_resp_valid, a_resp_ready;
  alloc_cmd_t  a_cmd;
  alloc_resp_t a_resp;

  mmio_alloc u_mmio (
    .clk, .rst_n, .alloc_ready,
    .wr_valid(mmio_wr_valid), .wr_addr(mmio_wr_addr), .wr_data(mmio_wr_data),
    .rd_valid(mmio_rd_valid), .rd_addr(mmio_rd_addr), .rd_data(mmio_rd_data),
    .cmd_valid(cm_req_valid[0]), .cmd_ready(cm_req_ready[0]), .cmd(cm_req[0]),
    .resp_valid(cm_resp_valid[0]), .resp_ready(cm_resp_ready[0]), .resp(cm_resp)
  );

  assign cm_req_valid[1] = ucmd_valid;
  assign ucmd_ready      = cm_req_ready[1];
  assign cm_req[1]       = ucmd;
  assign uresp_valid     = cm_resp_valid[1];
  assign cm_resp_ready[1] = uresp_ready;
  assign uresp           = cm_resp;

  req_resp_arbiter #(.REQ_T(alloc_cmd_t), .RESP_T(alloc_resp_t), .N(2), .OUTSTANDING(2)) u_cmd_mux (
    .clk, .rst_n,
    .c_req_valid(cm_req_valid), .c_req_ready(cm_req_ready), .c_req(cm_req),
    .c_resp_valid(cm_resp_valid), .c_resp_ready(cm_resp_ready), .c_resp(cm_resp),
    .s_req_valid(a_cmd_valid), .s_req_ready(a_cmd_ready), .s_req(a_cmd),
    .s_resp_valid(a_resp_valid), .s_resp_ready(a_resp_ready), .s_resp(a_resp)
  );

  allocator #(.VM_BITS(VM_BITS), .PAGE_BITS(PAGE_BITS), .L2_BITS(L2_BITS), .PHYS_BITS(PHYS_BITS),
              .NUM_REGIONS(NUM_REGIONS), .PT_FRAMES(PT_FRAMES)) u_allocator (
    .clk, .rst_n, .ready(alloc_ready),
    .cmd_valid(a_cmd_valid), .cmd_ready(a_cmd_ready), .cmd(a_cmd),
    .resp_valid(a_resp_valid), .resp_ready(a_resp_ready), .resp(a_resp),
    .lk_req_valid(al_req_valid), .lk_req_ready(al_req_ready), .lk_req(al_req),
    .lk_resp_valid(al_resp_valid), .lk_resp_ready(al_resp_ready), .lk_resp(al_resp),
    .rd_req_valid(ra_req_valid[3]), .rd_req_ready(ra_req_ready[3]), .rd_req(ra_req[3]),
    .rd_dat_valid(ra_dat_valid[3]), .rd_dat_ready(ra_dat_ready[3]), .rd_dat(ra_dat),
    .wr_req_valid, .wr_req_ready, .wr_req, .wr_dat_valid, .wr_dat_ready, .wr_dat,
    .wr_rsp_valid, .wr_rsp_ready,
    .cnt_pt_new, .cnt_pt_del, .cnt_ptf_new, .cnt_ptf_del, .cnt_frames_alloc, .cnt_frames_freed
  );

  bus_read_arbiter #(.N(4), .OUTSTANDING(32)) u_read_arb (
    .clk, .rst_n,
    .m_req_valid(ra_req_valid), .m_req_ready(ra_req_ready), .m_req(ra_req),
    .m_dat_valid(ra_dat_valid), .m_dat_ready(ra_dat_ready), .m_dat(ra_dat),
    .b_req_valid(rd_req_valid), .b_req_ready(rd_req_ready), .b_req(rd_req),
    .b_dat_valid(rd_dat_valid), .b_dat_ready(rd_dat_ready), .b_dat(rd_dat)
  );
endmodule
