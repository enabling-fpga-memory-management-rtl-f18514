// translator: virtual-to-physical address translator for one buffer reader or
// writer.
//
// It is inserted on the request (address) channel of a reader or writer; the
// data channel bypasses it. Requests whose address lies outside the FPGA
// virtual memory window pass unchanged and never cause a lookup. For the
// others:
//   1. cache lookup: a fully associative cache of CACHE_ENTRIES registers is
//      searched. An entry holds a virtual address, a physical address and a
//      validity mask; it hits when the address agrees with the entry on every
//      mask bit, and the translation takes the mask bits from the physical
//      address and the rest from the request.
//   2. slice: the lookup result is registered, so the cache may be updated in
//      the same cycle as a lookup.
//   3. sync: a request that missed sends a lookup request (its virtual
//      address) to a page table walker; every request then enters the request
//      queue (MAX_OUTSTANDING-1 entries), so several lookups may be in flight
//      and a pipelined walker can be used.
//   4. sync: at the queue output a request that missed waits for its lookup
//      response (responses come back in request order), is translated with
//      it, and the response is written into the cache, replacing entries in
//      first-in first-out order, unless an entry already covers it (several
//      requests to a page can miss while its walk is in flight; each gets its
//      own lookup). Responses flagged 'fault' are passed on but not cached.
// A request is translated by its start address only, so bursts must not
// cross a page boundary.
// 'flush' invalidates the whole cache; it must be used when a buffer is freed
// or reallocated, since stale entries would otherwise stay usable.
// Latency: a hit or a bypass leaves three cycles after it was accepted (input
// slice, request queue, output); a miss adds
// the walker's lookup time. Throughput: one request per cycle.
// The structure follows the translator the design is built from; the queue
// depth default, the suppression of duplicate cache entries and the handling
// of fault responses are this design's own choices. The cache size is limited to 32 entries for timing in the original.
module translator
  import vm_pkg::*;
#(
  parameter int unsigned CACHE_ENTRIES   = 1,
  parameter int unsigned MAX_OUTSTANDING = 8,
  parameter int unsigned VM_BITS         = 43
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         flush,
  // virtual requests from a reader or writer
  input  logic         in_valid,
  output logic         in_ready,
  input  bus_req_t     in_req,
  // translated requests towards the bus
  output logic         out_valid,
  input  logic         out_ready,
  output bus_req_t     out_req,
  // page table walker
  output logic         lk_req_valid,
  input  logic         lk_req_ready,
  output lookup_req_t  lk_req,
  input  logic         lk_resp_valid,
  output logic         lk_resp_ready,
  input  lookup_resp_t lk_resp,
  // event counters
  output logic [31:0]  cnt_hit,
  output logic [31:0]  cnt_miss,
  output logic [31:0]  cnt_bypass
);
  localparam int unsigned EW = (CACHE_ENTRIES > 1) ? $clog2(CACHE_ENTRIES) : 1;

  typedef enum logic [1:0] {K_HIT, K_MISS, K_BYPASS} kind_e;

  typedef struct packed {
    bus_req_t          req;     // original request
    kind_e             kind;
    logic [ADDR_W-1:0] paddr;   // translated address for hits and bypasses
  } slot_t;

  // ------------------------------------------------------------------ cache
  logic              c_valid [CACHE_ENTRIES];
  logic [ADDR_W-1:0] c_vaddr [CACHE_ENTRIES];
  logic [ADDR_W-1:0] c_paddr [CACHE_ENTRIES];
  logic [ADDR_W-1:0] c_mask  [CACHE_ENTRIES];
  logic [EW-1:0]     c_repl;

  logic              hit;
  logic [ADDR_W-1:0] hit_addr;
  always_comb begin
    hit      = 1'b0;
    hit_addr = in_req.addr;
    for (int i = 0; i < CACHE_ENTRIES; i++) begin
      if (!hit && c_valid[i] && ((in_req.addr & c_mask[i]) == (c_vaddr[i] & c_mask[i]))) begin
        hit      = 1'b1;
        hit_addr = (c_paddr[i] & c_mask[i]) | (in_req.addr & ~c_mask[i]);
      end
    end
  end

  // ------------------------------------------------------------------ slice
  logic  s_valid;
  slot_t s_slot;
  logic  q_in_ready, q_valid, q_pop;
  slot_t q_head;

  wire s_needs_lookup = (s_slot.kind == K_MISS);
  wire s_fire = s_valid && q_in_ready && (!s_needs_lookup || lk_req_ready);
  assign in_ready = !s_valid || s_fire;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_valid <= 1'b0;
      s_slot  <= '0;
    end else if (in_ready) begin
      s_valid <= in_valid;
      if (in_valid) begin
        s_slot.req <= in_req;
        if (!in_vm(in_req.addr, VM_BITS)) begin
          s_slot.kind  <= K_BYPASS;
          s_slot.paddr <= in_req.addr;
        end else if (hit) begin
          s_slot.kind  <= K_HIT;
          s_slot.paddr <= hit_addr;
        end else begin
          s_slot.kind  <= K_MISS;
          s_slot.paddr <= in_req.addr;
        end
      end
    end
  end

  // ------------------------------------------------------ sync + lookup request
  assign lk_req_valid = s_valid && s_needs_lookup && q_in_ready;
  assign lk_req.vaddr = s_slot.req.addr;

  stream_fifo #(.T(slot_t), .DEPTH(MAX_OUTSTANDING - 1)) u_req_queue (
    .clk, .rst_n,
    .in_valid(s_fire), .in_ready(q_in_ready), .in_data(s_slot),
    .out_valid(q_valid), .out_ready(q_pop), .out_data(q_head), .count()
  );

  // ---------------------------------------------------- sync + lookup response
  wire  head_miss = (q_head.kind == K_MISS);
  assign out_valid     = q_valid && (!head_miss || lk_resp_valid);
  assign lk_resp_ready = q_valid && head_miss && out_ready;
  assign q_pop         = out_valid && out_ready;

  always_comb begin
    out_req = q_head.req;
    if (head_miss) out_req.addr = (lk_resp.paddr & lk_resp.mask) | (q_head.req.addr & ~lk_resp.mask);
    else           out_req.addr = q_head.paddr;
  end

  wire update = lk_resp_valid && lk_resp_ready && !lk_resp.fault;

  // Several requests to one page can miss while its walk is in flight; only
  // the first response is cached, so duplicates do not evict other pages.
  logic resp_cached;
  always_comb begin
    resp_cached = 1'b0;
    for (int i = 0; i < CACHE_ENTRIES; i++)
      if (c_valid[i] && ((lk_resp.vaddr & c_mask[i]) == (c_vaddr[i] & c_mask[i]))) resp_cached = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_repl <= '0;
      for (int i = 0; i < CACHE_ENTRIES; i++) begin
        c_valid[i] <= 1'b0;
        c_vaddr[i] <= '0;
        c_paddr[i] <= '0;
        c_mask[i]  <= '0;
      end
    end else if (flush) begin
      c_repl <= '0;
      for (int i = 0; i < CACHE_ENTRIES; i++) c_valid[i] <= 1'b0;
    end else if (update && !resp_cached) begin
      c_valid[c_repl] <= 1'b1;
      c_vaddr[c_repl] <= lk_resp.vaddr;
      c_paddr[c_repl] <= lk_resp.paddr;
      c_mask[c_repl]  <= lk_resp.mask;
      c_repl <= (c_repl == EW'(CACHE_ENTRIES - 1)) ? '0 : c_repl + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_hit    <= '0;
      cnt_miss   <= '0;
      cnt_bypass <= '0;
    end else if (s_fire) begin
      case (s_slot.kind)
        K_HIT:   cnt_hit    <= cnt_hit + 1;
        K_MISS:  cnt_miss   <= cnt_miss + 1;
        default: cnt_bypass <= cnt_bypass + 1;
      endcase
    end
  end

  a_resp_matches: assert property (@(posedge clk) disable iff (!rst_n)
    (lk_resp_valid && lk_resp_ready) |-> ((lk_resp.vaddr & lk_resp.mask) == (q_head.req.addr & lk_resp.mask)));
endmodule
