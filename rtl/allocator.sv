// allocator: the complete memory allocator.
//
// It wires together the units that manage virtual and physical memory:
//   virtual_allocator  command state machine (malloc, realloc, free, init)
//   gap_finder (2x)    free L1 entries (W=1), free page table slots (W=64)
//   pt_rolodex         frames that hold page tables
//   frame_store        one bit per physical frame, per-region roving pointer
//   frame arbiter      req_resp_arbiter sharing the frame store between the
//                      virtual allocator and the authoritative lookup unit
//   pt_reader          page table buffer reader of the virtual allocator
//   auth_lookup        resolves page table walker misses, allocates frames on
//                      first access
//   write_barrier (2)  one behind each writer, tracking unacknowledged writes
//   bus_read_arbiter   page table reader and lookup unit onto one read port
//   bus_write_arbiter  both barriers onto one write port, with the write
//                      response channel
// Commands come in on cmd/resp; deferred translations from the page table
// walkers on lk_req/lk_resp. 'ready' rises when initialisation is complete;
// commands are only accepted after that. The split into units follows the
// allocator the design is built from; routing all of the virtual allocator's
// reads through its page table reader is this design's choice.
module allocator
  import vm_pkg::*;
#(
  parameter int unsigned VM_BITS     = 43,
  parameter int unsigned PAGE_BITS   = 26,
  parameter int unsigned L2_BITS     = 13,
  parameter int unsigned PHYS_BITS   = 36,
  parameter int unsigned NUM_REGIONS = 4,
  parameter int unsigned PT_FRAMES   = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic         ready,
  // commands
  input  logic         cmd_valid,
  output logic         cmd_ready,
  input  alloc_cmd_t   cmd,
  output logic         resp_valid,
  input  logic         resp_ready,
  output alloc_resp_t  resp,
  // deferred lookups from page table walkers
  input  logic         lk_req_valid,
  output logic         lk_req_ready,
  input  lookup_req_t  lk_req,
  output logic         lk_resp_valid,
  input  logic         lk_resp_ready,
  output lookup_resp_t lk_resp,
  // read bus
  output logic         rd_req_valid,
  input  logic         rd_req_ready,
  output bus_req_t     rd_req,
  input  logic         rd_dat_valid,
  output logic         rd_dat_ready,
  input  bus_rdat_t    rd_dat,
  // write bus
  output logic         wr_req_valid,
  input  logic         wr_req_ready,
  output bus_req_t     wr_req,
  output logic         wr_dat_valid,
  input  logic         wr_dat_ready,
  output bus_wdat_t    wr_dat,
  input  logic         wr_rsp_valid,
  output logic         wr_rsp_ready,
  // event counters
  output logic [31:0]  cnt_pt_new,
  output logic [31:0]  cnt_pt_del,
  output logic [31:0]  cnt_ptf_new,
  output logic [31:0]  cnt_ptf_del,
  output logic [31:0]  cnt_frames_alloc,
  output logic [31:0]  cnt_frames_freed
);
  localparam int unsigned NUM_FRAMES = 1 << (PHYS_BITS - PAGE_BITS);

  // ---------------------------------------------------------- frame store
  logic [1:0] fa_req_valid, fa_req_ready, fa_resp_valid, fa_resp_ready;
  fs_req_t    fa_req [2];
  fs_resp_t   fa_resp;
  logic       fs_req_valid, fs_req_ready, fs_resp_valid, fs_resp_ready;
  fs_req_t    fs_req;
  fs_resp_t   fs_resp;

  req_resp_arbiter #(.REQ_T(fs_req_t), .RESP_T(fs_resp_t), .N(2), .OUTSTANDING(2)) u_frame_arb (
    .clk, .rst_n,
    .c_req_valid(fa_req_valid), .c_req_ready(fa_req_ready), .c_req(fa_req),
    .c_resp_valid(fa_resp_valid), .c_resp_ready(fa_resp_ready), .c_resp(fa_resp),
    .s_req_valid(fs_req_valid), .s_req_ready(fs_req_ready), .s_req(fs_req),
    .s_resp_valid(fs_resp_valid), .s_resp_ready(fs_resp_ready), .s_resp(fs_resp)
  );

  frame_store #(.NUM_FRAMES(NUM_FRAMES), .NUM_REGIONS(NUM_REGIONS)) u_frames (
    .clk, .rst_n,
    .req_valid(fs_req_valid), .req_ready(fs_req_ready), .req(fs_req),
    .resp_valid(fs_resp_valid), .resp_ready(fs_resp_ready), .resp(fs_resp)
  );

  // -------------------------------------------------------------- rolodex
  logic        rx_cmd_valid, rx_cmd_ready, rx_resp_valid, rx_resp_ready, rx_resp_exhausted, rx_resp_ok;
  logic [1:0]  rx_cmd_op;
  logic [31:0] rx_cmd_frame, rx_resp_frame;

  pt_rolodex #(.MAX_FRAMES(PT_FRAMES)) u_rolodex (
    .clk, .rst_n,
    .cmd_valid(rx_cmd_valid), .cmd_ready(rx_cmd_ready), .cmd_op(rx_cmd_op), .cmd_frame(rx_cmd_frame),
    .resp_valid(rx_resp_valid), .resp_ready(rx_resp_ready), .resp_frame(rx_resp_frame),
    .resp_exhausted(rx_resp_exhausted), .resp_ok(rx_resp_ok), .size()
  );

  // ----------------------------------------------------------- gap finders
  logic        gv_start, gv_valid, gv_last, gv_done, gv_found, gv_in_ready;
  logic [0:0]  gv_free;
  logic [31:0] gv_need, gv_index;
  logic        gp_start, gp_valid, gp_last, gp_done, gp_found, gp_in_ready;
  logic [63:0] gp_free;
  logic [31:0] gp_index;

  gap_finder #(.W(1)) u_gap_vm (
    .clk, .rst_n, .start(gv_start), .need(gv_need),
    .in_valid(gv_valid), .in_ready(gv_in_ready), .in_free(gv_free), .in_last(gv_last),
    .done(gv_done), .found(gv_found), .index(gv_index)
  );

  gap_finder #(.W(64)) u_gap_pt (
    .clk, .rst_n, .start(gp_start), .need(32'd1),
    .in_valid(gp_valid), .in_ready(gp_in_ready), .in_free(gp_free), .in_last(gp_last),
    .done(gp_done), .found(gp_found), .index(gp_index)
  );

  // ------------------------------------------------------ page table reader
  logic              pr_cmd_valid, pr_cmd_ready, pr_ent_valid, pr_ent_ready, pr_ent_last;
  logic [ADDR_W-1:0] pr_cmd_addr;
  logic [31:0]       pr_cmd_count;
  logic [PTE_W-1:0]  pr_ent_data;
  logic [1:0]        ra_req_valid, ra_req_ready, ra_dat_valid, ra_dat_ready;
  bus_req_t          ra_req [2];
  bus_rdat_t         ra_dat;

  pt_reader u_reader (
    .clk, .rst_n,
    .cmd_valid(pr_cmd_valid), .cmd_ready(pr_cmd_ready), .cmd_addr(pr_cmd_addr), .cmd_count(pr_cmd_count),
    .ent_valid(pr_ent_valid), .ent_ready(pr_ent_ready), .ent_data(pr_ent_data), .ent_last(pr_ent_last),
    .rd_req_valid(ra_req_valid[0]), .rd_req_ready(ra_req_ready[0]), .rd_req(ra_req[0]),
    .rd_dat_valid(ra_dat_valid[0]), .rd_dat_ready(ra_dat_ready[0]), .rd_dat(ra_dat)
  );

  // --------------------------------------------------------------- barriers
  logic      mw_req_valid, mw_req_ready, mw_dat_valid, mw_dat_ready, mw_rsp_valid, mw_rsp_ready;
  bus_req_t  mw_req;
  bus_wdat_t mw_dat;
  logic      lw_req_valid, lw_req_ready, lw_dat_valid, lw_dat_ready, lw_rsp_valid, lw_rsp_ready;
  bus_req_t  lw_req;
  bus_wdat_t lw_dat;
  logic      main_idle, lk_idle;

  logic [1:0] wa_req_valid, wa_req_ready, wa_dat_valid, wa_dat_ready, wa_rsp_valid, wa_rsp_ready;
  bus_req_t   wa_req [2];
  bus_wdat_t  wa_dat [2];

  write_barrier u_main_barrier (
    .clk, .rst_n,
    .s_req_valid(mw_req_valid), .s_req_ready(mw_req_ready), .s_req(mw_req),
    .s_dat_valid(mw_dat_valid), .s_dat_ready(mw_dat_ready), .s_dat(mw_dat),
    .s_rsp_valid(mw_rsp_valid), .s_rsp_ready(mw_rsp_ready),
    .m_req_valid(wa_req_valid[0]), .m_req_ready(wa_req_ready[0]), .m_req(wa_req[0]),
    .m_dat_valid(wa_dat_valid[0]), .m_dat_ready(wa_dat_ready[0]), .m_dat(wa_dat[0]),
    .m_rsp_valid(wa_rsp_valid[0]), .m_rsp_ready(wa_rsp_ready[0]),
    .idle(main_idle), .outstanding()
  );

  write_barrier u_lookup_barrier (
    .clk, .rst_n,
    .s_req_valid(lw_req_valid), .s_req_ready(lw_req_ready), .s_req(lw_req),
    .s_dat_valid(lw_dat_valid), .s_dat_ready(lw_dat_ready), .s_dat(lw_dat),
    .s_rsp_valid(lw_rsp_valid), .s_rsp_ready(lw_rsp_ready),
    .m_req_valid(wa_req_valid[1]), .m_req_ready(wa_req_ready[1]), .m_req(wa_req[1]),
    .m_dat_valid(wa_dat_valid[1]), .m_dat_ready(wa_dat_ready[1]), .m_dat(wa_dat[1]),
    .m_rsp_valid(wa_rsp_valid[1]), .m_rsp_ready(wa_rsp_ready[1]),
    .idle(lk_idle), .outstanding()
  );

  // ------------------------------------------------------ virtual allocator
  virtual_allocator #(.VM_BITS(VM_BITS), .PAGE_BITS(PAGE_BITS), .L2_BITS(L2_BITS)) u_valloc (
    .clk, .rst_n, .ready,
    .cmd_valid, .cmd_ready, .cmd, .resp_valid, .resp_ready, .resp,
    .fs_req_valid(fa_req_valid[0]), .fs_req_ready(fa_req_ready[0]), .fs_req(fa_req[0]),
    .fs_resp_valid(fa_resp_valid[0]), .fs_resp_ready(fa_resp_ready[0]), .fs_resp(fa_resp),
    .rx_cmd_valid, .rx_cmd_ready, .rx_cmd_op, .rx_cmd_frame,
    .rx_resp_valid, .rx_resp_ready, .rx_resp_frame, .rx_resp_exhausted,
    .gv_start, .gv_need, .gv_valid, .gv_free, .gv_last, .gv_done, .gv_found, .gv_index,
    .gp_start, .gp_valid, .gp_free, .gp_last, .gp_done, .gp_found, .gp_index,
    .pr_cmd_valid, .pr_cmd_ready, .pr_cmd_addr, .pr_cmd_count,
    .pr_ent_valid, .pr_ent_ready, .pr_ent_data, .pr_ent_last,
    .wr_req_valid(mw_req_valid), .wr_req_ready(mw_req_ready), .wr_req(mw_req),
    .wr_dat_valid(mw_dat_valid), .wr_dat_ready(mw_dat_ready), .wr_dat(mw_dat),
    .wr_rsp_valid(mw_rsp_valid), .wr_rsp_ready(mw_rsp_ready),
    .barrier_idle(main_idle), .lk_barrier_idle(lk_idle),
    .cnt_pt_new, .cnt_pt_del, .cnt_ptf_new, .cnt_ptf_del, .cnt_frames_freed
  );

  // -------------------------------------------------- authoritative lookup
  auth_lookup #(.VM_BITS(VM_BITS), .PAGE_BITS(PAGE_BITS), .L2_BITS(L2_BITS)) u_lookup (
    .clk, .rst_n,
    .lk_req_valid, .lk_req_ready, .lk_req, .lk_resp_valid, .lk_resp_ready, .lk_resp,
    .fs_req_valid(fa_req_valid[1]), .fs_req_ready(fa_req_ready[1]), .fs_req(fa_req[1]),
    .fs_resp_valid(fa_resp_valid[1]), .fs_resp_ready(fa_resp_ready[1]), .fs_resp(fa_resp),
    .rd_req_valid(ra_req_valid[1]), .rd_req_ready(ra_req_ready[1]), .rd_req(ra_req[1]),
    .rd_dat_valid(ra_dat_valid[1]), .rd_dat_ready(ra_dat_ready[1]), .rd_dat(ra_dat),
    .wr_req_valid(lw_req_valid), .wr_req_ready(lw_req_ready), .wr_req(lw_req),
    .wr_dat_valid(lw_dat_valid), .wr_dat_ready(lw_dat_ready), .wr_dat(lw_dat),
    .wr_rsp_valid(lw_rsp_valid), .wr_rsp_ready(lw_rsp_ready),
    .barrier_idle(lk_idle), .cnt_frames(cnt_frames_alloc)
  );

  // ------------------------------------------------------------ bus arbiters
  bus_read_arbiter #(.N(2), .OUTSTANDING(16)) u_rd_arb (
    .clk, .rst_n,
    .m_req_valid(ra_req_valid), .m_req_ready(ra_req_ready), .m_req(ra_req),
    .m_dat_valid(ra_dat_valid), .m_dat_ready(ra_dat_ready), .m_dat(ra_dat),
    .b_req_valid(rd_req_valid), .b_req_ready(rd_req_ready), .b_req(rd_req),
    .b_dat_valid(rd_dat_valid), .b_dat_ready(rd_dat_ready), .b_dat(rd_dat)
  );

  bus_write_arbiter #(.N(2), .OUTSTANDING(16)) u_wr_arb (
    .clk, .rst_n,
    .m_req_valid(wa_req_valid), .m_req_ready(wa_req_ready), .m_req(wa_req),
    .m_dat_valid(wa_dat_valid), .m_dat_ready(wa_dat_ready), .m_dat(wa_dat),
    .m_rsp_valid(wa_rsp_valid), .m_rsp_ready(wa_rsp_ready),
    .b_req_valid(wr_req_valid), .b_req_ready(wr_req_ready), .b_req(wr_req),
    .b_dat_valid(wr_dat_valid), .b_dat_ready(wr_dat_ready), .b_dat(wr_dat),
    .b_rsp_valid(wr_rsp_valid), .b_rsp_ready(wr_rsp_ready)
  );
endmodule
