// pt_walker: pipelined two-level page table walker.
//
// A lookup request carries a virtual address. The walker reads the
// first-level entry from the table at L1_TABLE_ADDR, then the second-level
// (leaf) entry from the table the first names, using its own read bus master.
// If the leaf holds a frame, it answers with the virtual address, the frame's
// physical address and a mask covering the page number bits. Otherwise (no
// frame assigned yet, or no page table at all) the lookup is deferred to the
// allocator's authoritative lookup unit, whose answer is passed on.
// Structure, after the walker the design is built from:
//   sync -> L1 queue ; L1 bus response -> L1-resp queue
//   sync (L1 entry) -> L2 bus request and L2 queue ; L2 bus response -> L2-resp queue
//   sync (leaf)     -> allocator queue, and an allocator lookup request if unresolved
//   sync            -> merges allocator responses, answers in request order
// L1 and L2 requests share one read port through an internal arbiter. A token
// count limits the walks between the first sync and the leaf sync to SLOTS,
// so every response queue can always absorb all outstanding bus reads and the
// bus can never be blocked by this unit. SLOTS=1 gives the non-pipelined
// walker; larger values let several walks overlap.
// With WIDE_MASK set, a walk whose leaf beat shows eight neighbouring pages
// mapped to eight contiguous, aligned frames answers with a mask three bits
// wider, so one translator entry covers all eight pages. This follows the
// option of looking up adjacent pages to widen the mask; limiting it to the
// eight leaves that arrive in one beat (no extra reads) and leaving it off by
// default are this design's own choices.
// Latency: two dependent memory reads plus about six cycles.
// The layout of page table entries is described in vm_pkg.
module pt_walker
  import vm_pkg::*;
#(
  parameter int unsigned SLOTS     = 1,
  parameter bit          WIDE_MASK = 1'b0,
  parameter int unsigned VM_BITS   = 43,
  parameter int unsigned PAGE_BITS = 26,
  parameter int unsigned L2_BITS   = 13
) (
  input  logic         clk,
  input  logic         rst_n,
  // lookups from translators
  input  logic         lk_req_valid,
  output logic         lk_req_ready,
  input  lookup_req_t  lk_req,
  output logic         lk_resp_valid,
  input  logic         lk_resp_ready,
  output lookup_resp_t lk_resp,
  // deferral to the allocator
  output logic         al_req_valid,
  input  logic         al_req_ready,
  output lookup_req_t  al_req,
  input  logic         al_resp_valid,
  output logic         al_resp_ready,
  input  lookup_resp_t al_resp,
  // read bus
  output logic         rd_req_valid,
  input  logic         rd_req_ready,
  output bus_req_t     rd_req,
  input  logic         rd_dat_valid,
  output logic         rd_dat_ready,
  input  bus_rdat_t    rd_dat,
  // event counters
  output logic [31:0]  cnt_walks,
  output logic [31:0]  cnt_deferred
);
  localparam int unsigned L1_BITS = VM_BITS - PAGE_BITS - L2_BITS;
  localparam int unsigned TW      = $clog2(SLOTS + 1);
  localparam logic [ADDR_W-1:0] PAGE_MASK = ~((64'd1 << PAGE_BITS) - 64'd1);

  typedef struct packed {
    logic [ADDR_W-1:0] vaddr;
    logic              skip;      // no L2 table: no L2 read was made
  } l2_slot_t;

  typedef struct packed {
    logic [ADDR_W-1:0] vaddr;
    logic              resolved;
    logic [ADDR_W-1:0] paddr;
    logic              wide;     // answer covers the aligned group of 8 pages
  } al_slot_t;

  function automatic logic [ADDR_W-1:0] l1_entry_addr(input logic [ADDR_W-1:0] va);
    return L1_TABLE_ADDR + (ADDR_W'(va[PAGE_BITS+L2_BITS +: L1_BITS]) << 3);
  endfunction

  function automatic logic [ADDR_W-1:0] l2_entry_addr(input logic [PTE_W-1:0] l1e, input logic [ADDR_W-1:0] va);
    return pte_addr(l1e) + (ADDR_W'(va[PAGE_BITS +: L2_BITS]) << 3);
  endfunction

  // ------------------------------------------------------- internal arbiter
  logic [1:0] a_req_valid, a_req_ready, a_dat_valid, a_dat_ready;
  bus_req_t   a_req [2];
  bus_rdat_t  a_dat;

  bus_read_arbiter #(.N(2), .OUTSTANDING(2 * SLOTS)) u_arb (
    .clk, .rst_n,
    .m_req_valid(a_req_valid), .m_req_ready(a_req_ready), .m_req(a_req),
    .m_dat_valid(a_dat_valid), .m_dat_ready(a_dat_ready), .m_dat(a_dat),
    .b_req_valid(rd_req_valid), .b_req_ready(rd_req_ready), .b_req(rd_req),
    .b_dat_valid(rd_dat_valid), .b_dat_ready(rd_dat_ready), .b_dat(rd_dat)
  );

  // ------------------------------------------------------------ tokens
  logic [TW-1:0] tokens;
  wire token_free = (tokens != TW'(SLOTS));

  // ------------------------------------------------------- stage 1: L1 read
  logic l1q_in_ready, l1q_valid, l1q_pop;
  logic [ADDR_W-1:0] l1q_head;

  assign a_req_valid[0] = lk_req_valid && token_free && l1q_in_ready;
  assign a_req[0]       = '{addr: l1_entry_addr(lk_req.vaddr), len: '0};
  assign lk_req_ready   = token_free && l1q_in_ready && a_req_ready[0];
  wire   accept         = lk_req_valid && lk_req_ready;

  stream_fifo #(.T(logic [ADDR_W-1:0]), .DEPTH(SLOTS)) u_l1q (
    .clk, .rst_n, .in_valid(accept), .in_ready(l1q_in_ready), .in_data(lk_req.vaddr),
    .out_valid(l1q_valid), .out_ready(l1q_pop), .out_data(l1q_head), .count()
  );

  logic      l1r_valid;
  bus_rdat_t l1r_head;
  stream_fifo #(.T(bus_rdat_t), .DEPTH(SLOTS)) u_l1r (
    .clk, .rst_n, .in_valid(a_dat_valid[0]), .in_ready(a_dat_ready[0]), .in_data(a_dat),
    .out_valid(l1r_valid), .out_ready(l1q_pop), .out_data(l1r_head), .count()
  );

  // ------------------------------------------------------- stage 2: L2 read
  wire [PTE_W-1:0] l1e     = beat_word(l1r_head.data, l1_entry_addr(l1q_head));
  wire             l1_ok   = l1e[PTE_PRESENT];
  logic l2q_in_ready, l2q_valid, l2q_pop;
  l2_slot_t l2q_head;

  wire st2_ready = l1q_valid && l1r_valid && l2q_in_ready;
  assign a_req_valid[1] = st2_ready && l1_ok;
  assign a_req[1]       = '{addr: l2_entry_addr(l1e, l1q_head), len: '0};
  assign l1q_pop        = st2_ready && (!l1_ok || a_req_ready[1]);

  stream_fifo #(.T(l2_slot_t), .DEPTH(SLOTS)) u_l2q (
    .clk, .rst_n, .in_valid(l1q_pop), .in_ready(l2q_in_ready),
    .in_data('{vaddr: l1q_head, skip: !l1_ok}),
    .out_valid(l2q_valid), .out_ready(l2q_pop), .out_data(l2q_head), .count()
  );

  logic      l2r_valid, l2r_pop;
  bus_rdat_t l2r_head;
  stream_fifo #(.T(bus_rdat_t), .DEPTH(SLOTS)) u_l2r (
    .clk, .rst_n, .in_valid(a_dat_valid[1]), .in_ready(a_dat_ready[1]), .in_data(a_dat),
    .out_valid(l2r_valid), .out_ready(l2r_pop), .out_data(l2r_head), .count()
  );

  // ----------------------------------------------------- stage 3: leaf entry
  // tables are 64 KiB aligned, so the low L2 index bits select the word
  wire [PTE_W-1:0] leaf = l2r_head.data[l2q_head.vaddr[PAGE_BITS +: 3]*PTE_W +: PTE_W];
  wire leaf_ok = !l2q_head.skip && leaf[PTE_PRESENT];

  // The returned beat holds the leaves of eight neighbouring pages. When all
  // eight have frames that are contiguous and aligned to eight frames, one
  // answer with a mask three bits wider covers the whole group.
  localparam logic [ADDR_W-1:0] WIDE_PAGE_MASK = PAGE_MASK << 3;
  logic [ADDR_W-1:0] grp_base;
  logic              grp_ok;
  always_comb begin
    grp_base = pte_addr(l2r_head.data[PTE_W-1:0]) & PAGE_MASK;
    grp_ok   = WIDE_MASK && (grp_base[PAGE_BITS +: 3] == 3'd0);
    for (int k = 0; k < PTES_PER_BEAT; k++) begin
      if (!l2r_head.data[k*PTE_W + PTE_PRESENT] ||
          (pte_addr(l2r_head.data[k*PTE_W +: PTE_W]) & PAGE_MASK) != grp_base + (ADDR_W'(k) << PAGE_BITS))
        grp_ok = 1'b0;
    end
  end

  logic aq_in_ready, aq_valid, aq_pop;
  al_slot_t aq_head;

  wire st3_data = l2q_valid && (l2q_head.skip || l2r_valid);
  wire st3_fire = st3_data && aq_in_ready && (leaf_ok || al_req_ready);
  assign l2q_pop      = st3_fire;
  assign l2r_pop      = st3_fire && !l2q_head.skip;
  assign al_req_valid = st3_data && aq_in_ready && !leaf_ok;
  assign al_req.vaddr = l2q_head.vaddr;

  stream_fifo #(.T(al_slot_t), .DEPTH(SLOTS)) u_aq (
    .clk, .rst_n, .in_valid(st3_fire), .in_ready(aq_in_ready),
    .in_data('{vaddr: l2q_head.vaddr, resolved: leaf_ok, paddr: pte_addr(leaf) & PAGE_MASK,
                wide: leaf_ok && grp_ok}),
    .out_valid(aq_valid), .out_ready(aq_pop), .out_data(aq_head), .count()
  );

  // ------------------------------------------------------ stage 4: response
  assign lk_resp_valid = aq_valid && (aq_head.resolved || al_resp_valid);
  assign al_resp_ready = aq_valid && !aq_head.resolved && lk_resp_ready;
  assign aq_pop        = lk_resp_valid && lk_resp_ready;
  always_comb begin
    if (aq_head.resolved) lk_resp = '{vaddr: aq_head.vaddr, paddr: aq_head.paddr, mask: aq_head.wide ? WIDE_PAGE_MASK : PAGE_MASK, fault: 1'b0};
    else                  lk_resp = al_resp;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tokens       <= '0;
      cnt_walks    <= '0;
      cnt_deferred <= '0;
    end else begin
      tokens <= tokens + (accept ? 1'b1 : 1'b0) - (st3_fire ? 1'b1 : 1'b0);
      if (accept) cnt_walks <= cnt_walks + 1;
      if (st3_fire && !leaf_ok) cnt_deferred <= cnt_deferred + 1;
    end
  end

  a_tokens: assert property (@(posedge clk) disable iff (!rst_n) tokens <= TW'(SLOTS));
endmodule
