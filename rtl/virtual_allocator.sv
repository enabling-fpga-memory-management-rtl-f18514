// virtual_allocator: the command state machine of the allocator.
//
// It accepts malloc, realloc and free commands (alloc_cmd_t) and keeps the
// page tables in memory up to date.
//
// Virtual memory. Each allocation takes whole first-level (L1) entries: one
// L1 entry, with the second-level (L2) table it points to, covers
// 2**L2_BITS pages. malloc looks for a run of free L1 entries (FIND_GAP, a
// first-fit scan of the L1 table through the page table reader and the
// virtual-memory gap finder), creates an L2 table for each, and marks every
// page of the allocation 'reserved', with its memory region, the final page
// also 'last' (the size is not given again on free). No physical memory is
// assigned here: the authoritative lookup unit gives a page a frame on its
// first access. realloc finds a new gap, copies the old leaf entries (frames
// included) to it, appends reserved entries or drops surplus pages, then
// unmaps the old allocation, freeing the frames of dropped pages only. free
// unmaps and frees every frame of the allocation.
//
// Page tables are 64 KiB and many are packed into one frame. Slot 0 of such a
// frame holds a bitmap of the slots in use. The page table rolodex lists the
// frames that hold page tables. NEW_PT flips through them, reading each
// bitmap through the page-table gap finder; when all are full it takes a new
// frame from the frame store, writes its bitmap and inserts it. The found slot
// is marked in the bitmap and the table cleared. DEL_PT clears the slot's
// bitmap bit and, when no other slot is in use, deletes the frame from the
// rolodex and frees it.
//
// Routines. FIND_GAP, SET_PTES (write the leaves of a new or copied
// allocation), UNMAP, NEW_PT, DEL_PT, WRITE and READ1 are shared between
// operations; a small return-state stack lets one state 'call' a routine and
// resume when it returns.
//
// Initialisation after reset: clear the frame store, reserve frame 0 for page
// tables, write its bitmap, insert it into the rolodex and create the first
// page table, which lands in slot 1 at L1_TABLE_ADDR: the L1 table.
//
// Ordering: page table reads are only started when every earlier write of
// this unit has been acknowledged (barrier_idle), and a command's response is
// given only once all its writes are acknowledged, so walkers never see the
// previous mapping. free and realloc first wait until the authoritative
// lookup unit has no write outstanding (lk_barrier_idle).
//
// The command set, the packing of page tables, the rolodex, the stack of
// routines and the initialisation order follow the allocator the design is
// built from. The entry layout, the exact state sequence and the policy of
// always using region 0 for page table frames are this design's own choices.
module virtual_allocator
  import vm_pkg::*;
#(
  parameter int unsigned VM_BITS   = 43,
  parameter int unsigned PAGE_BITS = 26,
  parameter int unsigned L2_BITS   = 13
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              ready,          // initialisation done
  // commands
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  alloc_cmd_t        cmd,
  output logic              resp_valid,
  input  logic              resp_ready,
  output alloc_resp_t       resp,
  // frame store client
  output logic              fs_req_valid,
  input  logic              fs_req_ready,
  output fs_req_t           fs_req,
  input  logic              fs_resp_valid,
  output logic              fs_resp_ready,
  input  fs_resp_t          fs_resp,
  // page table rolodex
  output logic              rx_cmd_valid,
  input  logic              rx_cmd_ready,
  output logic [1:0]        rx_cmd_op,
  output logic [31:0]       rx_cmd_frame,
  input  logic              rx_resp_valid,
  output logic              rx_resp_ready,
  input  logic [31:0]       rx_resp_frame,
  input  logic              rx_resp_exhausted,
  // gap finder on the L1 table (one flag per entry)
  output logic              gv_start,
  output logic [31:0]       gv_need,
  output logic              gv_valid,
  output logic [0:0]        gv_free,
  output logic              gv_last,
  input  logic              gv_done,
  input  logic              gv_found,
  input  logic [31:0]       gv_index,
  // gap finder on page table bitmaps (64 flags per word)
  output logic              gp_start,
  output logic              gp_valid,
  output logic [63:0]       gp_free,
  output logic              gp_last,
  input  logic              gp_done,
  input  logic              gp_found,
  input  logic [31:0]       gp_index,
  // page table reader
  output logic              pr_cmd_valid,
  input  logic              pr_cmd_ready,
  output logic [ADDR_W-1:0] pr_cmd_addr,
  output logic [31:0]       pr_cmd_count,
  input  logic              pr_ent_valid,
  output logic              pr_ent_ready,
  input  logic [PTE_W-1:0]  pr_ent_data,
  input  logic              pr_ent_last,
  // write bus (through a write barrier)
  output logic              wr_req_valid,
  input  logic              wr_req_ready,
  output bus_req_t          wr_req,
  output logic              wr_dat_valid,
  input  logic              wr_dat_ready,
  output bus_wdat_t         wr_dat,
  input  logic              wr_rsp_valid,
  output logic              wr_rsp_ready,
  input  logic              barrier_idle,
  input  logic              lk_barrier_idle,
  // event counters
  output logic [31:0]       cnt_pt_new,       // page tables created
  output logic [31:0]       cnt_pt_del,       // page tables deleted
  output logic [31:0]       cnt_ptf_new,      // frames taken for page tables
  output logic [31:0]       cnt_ptf_del,      // page table frames released
  output logic [31:0]       cnt_frames_freed  // data frames released
);
  localparam int unsigned L1_BITS     = VM_BITS - PAGE_BITS - L2_BITS;
  localparam int unsigned L1_ENTRIES  = 1 << L1_BITS;
  localparam int unsigned L2_ENTRIES  = 1 << L2_BITS;
  localparam int unsigned PT_SLOTS    = 1 << (PAGE_BITS - PT_BYTES_LOG2);
  localparam int unsigned BM_WORDS    = (PT_SLOTS + 63) / 64;
  localparam int unsigned BM_BEATS    = (BM_WORDS + 7) / 8;
  localparam int unsigned PT_BEATS    = (1 << PT_BYTES_LOG2) / 64;
  localparam int unsigned MAX_BURST   = 16;
  localparam int unsigned STACK_DEPTH = 4;

  localparam logic [1:0] RX_INSERT = 2'd0, RX_DELETE = 2'd1, RX_RESTART = 2'd2, RX_NEXT = 2'd3;

  typedef enum logic [6:0] {
    // initialisation
    S_RESET, S_CLRF, S_CLRF_W, S_RSVF, S_RSVF_W, S_PT0_BM, S_PT0_INS, S_PT0_INS_W, S_PT0_PT,
    S_INIT_DONE,
    // commands
    S_IDLE, S_MALLOC, S_MALLOC_GAP, S_MALLOC_SET,
    S_FREE, S_FREE_UM,
    S_REALLOC, S_REALLOC_GAP, S_REALLOC_COPY, S_REALLOC_UM,
    S_FINISH, S_RESP,
    // routine WRITE
    R_WR,
    // routine READ1
    R_RD1, R_RD1_W,
    // routine FIND_GAP
    R_GAP, R_GAP_SCAN,
    // routine NEW_PT
    R_NP, R_NP_RST_W, R_NP_GET, R_NP_GET_W, R_NP_SEARCH, R_NP_SCAN, R_NP_UPD, R_NP_CLEAR,
    R_NP_REQF, R_NP_REQF_W, R_NP_CLRBM, R_NP_INS, R_NP_INS_W, R_NP_DONE,
    // routine DEL_PT
    R_DP, R_DP_SCAN, R_DP_UPD, R_DP_CHK, R_DP_DELF, R_DP_DELF_W, R_DP_FREEF, R_DP_FREEF_W,
    // routine SET_PTES
    R_SET, R_SET_L1W, R_SET_SRC, R_SET_STREAM, R_SET_FILL, R_SET_WBEAT, R_SET_DRAIN, R_SET_NEXT,
    // routine UNMAP
    R_UM, R_UM_L1, R_UM_CMD, R_UM_STREAM, R_UM_FREQ, R_UM_FREQ_W, R_UM_DELPT, R_UM_L1CLR, R_UM_NEXT
  } state_e;

  typedef enum logic [1:0] {W_ZERO, W_BITMAP, W_SINGLE} wmode_e;

  state_e state;
  state_e stack [STACK_DEPTH];
  logic [$clog2(STACK_DEPTH+1)-1:0] sp;

  // command registers
  alloc_cmd_t  c;
  alloc_resp_t r;
  logic [63:0] new_pages, n_l1;
  logic        fail;

  // routine arguments and results
  logic [ADDR_W-1:0] w_addr;
  logic [31:0]       w_beats, w_sent, w_burst_left;
  logic              w_req_done;
  wmode_e            w_mode;
  logic [DATA_W-1:0] w_data;
  logic [STRB_W-1:0] w_strb;

  logic [ADDR_W-1:0] rd_addr;
  logic [PTE_W-1:0]  rd_word;

  logic [31:0]       gap_need, gap_index;
  logic              gap_found;

  logic [31:0]       cur_frame;
  logic [ADDR_W-1:0] pt_addr;
  logic [31:0]       word_idx;
  logic [63:0]       cap_word, others;
  logic [31:0]       cap_idx;
  logic              cap_valid;

  logic [31:0]       s_dst, s_src;       // L1 indices of destination / source
  logic              s_have_src, s_src_ended, s_streaming;
  logic [31:0]       s_t, s_e;
  logic [63:0]       s_m, keep_below;
  logic [DATA_W-1:0] wbuf;
  logic [STRB_W-1:0] wstrb;
  logic              um_ended;

  // ------------------------------------------------------------- helpers
  function automatic logic [63:0] init_bm_word(input logic [31:0] w);
    logic [63:0] v;
    for (int b = 0; b < 64; b++) begin
      int unsigned slot;
      slot = int'(w) * 64 + b;
      v[b] = (slot == 0) || (slot >= PT_SLOTS);
    end
    return v;
  endfunction

  function automatic logic [ADDR_W-1:0] frame_base(input logic [31:0] f);
    return ADDR_W'(f) << PAGE_BITS;
  endfunction

  function automatic logic [ADDR_W-1:0] l1_addr(input logic [31:0] idx);
    return L1_TABLE_ADDR + (ADDR_W'(idx) << 3);
  endfunction

  // bitmap beat k for a fresh page table frame
  function automatic logic [DATA_W-1:0] bm_beat(input logic [31:0] k);
    logic [DATA_W-1:0] d;
    for (int i = 0; i < 8; i++) d[i*64 +: 64] = init_bm_word(k * 8 + 32'(i));
    return d;
  endfunction

  // a single 64-bit word write: beat address, data and strobes
  function automatic logic [ADDR_W-1:0] word_beat(input logic [ADDR_W-1:0] a);
    return {a[ADDR_W-1:6], 6'd0};
  endfunction
  function automatic logic [DATA_W-1:0] word_data(input logic [ADDR_W-1:0] a, input logic [63:0] v);
    return DATA_W'(v) << (a[5:3] * 64);
  endfunction
  function automatic logic [STRB_W-1:0] word_strb(input logic [ADDR_W-1:0] a);
    return STRB_W'(8'hFF) << (a[5:3] * 8);
  endfunction

  // ---------------------------------------------------------- outputs
  assign cmd_ready     = (state == S_IDLE);
  assign resp_valid    = (state == S_RESP);
  assign resp          = r;
  assign wr_rsp_ready  = 1'b1;

  // write channel
  logic [31:0] w_this_burst;
  always_comb begin
    w_this_burst = (w_beats - w_sent > 32'(MAX_BURST)) ? 32'(MAX_BURST) : (w_beats - w_sent);
  end
  assign wr_req_valid = (state == R_WR) && !w_req_done;
  assign wr_req       = '{addr: w_addr + (ADDR_W'(w_sent) << 6), len: LEN_W'(w_this_burst - 1)};
  assign wr_dat_valid = (state == R_WR) && w_req_done;
  always_comb begin
    wr_dat.last = (w_burst_left == 1);
    case (w_mode)
      W_ZERO:   begin wr_dat.data = '0;                              wr_dat.strb = '1;     end
      W_BITMAP: begin wr_dat.data = bm_beat(w_sent + (w_this_burst - w_burst_left)); wr_dat.strb = '1; end
      default:  begin wr_dat.data = w_data;                          wr_dat.strb = w_strb; end
    endcase
  end

  // frame store
  always_comb begin
    fs_req_valid = 1'b0;
    fs_req       = '{op: FS_ALLOC, region: '0, frame: '0};
    case (state)
      S_CLRF:     begin fs_req_valid = 1'b1; fs_req.op = FS_CLEAR; end
      S_RSVF:     begin fs_req_valid = 1'b1; fs_req.op = FS_RESERVE; fs_req.frame = '0; end
      R_NP_REQF:  begin fs_req_valid = 1'b1; fs_req.op = FS_ALLOC; end
      R_DP_FREEF: begin fs_req_valid = 1'b1; fs_req.op = FS_FREE; fs_req.frame = cur_frame; end
      R_UM_FREQ:  begin fs_req_valid = 1'b1; fs_req.op = FS_FREE; fs_req.frame = 32'(pte_addr(rd_word) >> PAGE_BITS); end
      default: ;
    endcase
  end
  assign fs_resp_ready = (state == S_CLRF_W) || (state == S_RSVF_W) || (state == R_NP_REQF_W) ||
                         (state == R_DP_FREEF_W) || (state == R_UM_FREQ_W);

  // rolodex
  always_comb begin
    rx_cmd_valid = 1'b0;
    rx_cmd_op    = RX_NEXT;
    rx_cmd_frame = cur_frame;
    case (state)
      S_PT0_INS: begin rx_cmd_valid = 1'b1; rx_cmd_op = RX_INSERT; rx_cmd_frame = '0; end
      R_NP:      begin rx_cmd_valid = 1'b1; rx_cmd_op = RX_RESTART; end
      R_NP_GET:  begin rx_cmd_valid = 1'b1; rx_cmd_op = RX_NEXT; end
      R_NP_INS:  begin rx_cmd_valid = 1'b1; rx_cmd_op = RX_INSERT; end
      R_DP_DELF: begin rx_cmd_valid = 1'b1; rx_cmd_op = RX_DELETE; end
      default: ;
    endcase
  end
  assign rx_resp_ready = (state == S_PT0_INS_W) || (state == R_NP_RST_W) || (state == R_NP_GET_W) ||
                         (state == R_NP_INS_W) || (state == R_DP_DELF_W);

  // page table reader commands, only once earlier writes are visible
  always_comb begin
    pr_cmd_valid = 1'b0;
    pr_cmd_addr  = rd_addr;
    pr_cmd_count = 32'd1;
    case (state)
      R_RD1:       begin pr_cmd_valid = barrier_idle; end
      R_GAP:       begin pr_cmd_valid = barrier_idle; pr_cmd_addr = L1_TABLE_ADDR; pr_cmd_count = 32'(L1_ENTRIES); end
      R_NP_SEARCH,
      R_DP:        begin pr_cmd_valid = barrier_idle; pr_cmd_addr = frame_base(cur_frame); pr_cmd_count = 32'(BM_WORDS); end
      R_SET_STREAM: begin
        pr_cmd_valid = barrier_idle && rd_word[PTE_PRESENT];
        pr_cmd_addr  = pte_addr(rd_word);
        pr_cmd_count = 32'(L2_ENTRIES);
      end
      R_UM_CMD:    begin pr_cmd_valid = barrier_idle; pr_cmd_addr = pt_addr; pr_cmd_count = 32'(L2_ENTRIES); end
      default: ;
    endcase
  end

  // entry stream consumers
  wire set_take = (state == R_SET_FILL) && s_streaming && pr_ent_valid;
  always_comb begin
    pr_ent_ready = 1'b0;
    case (state)
      R_RD1_W, R_GAP_SCAN, R_NP_SCAN, R_DP_SCAN, R_SET_DRAIN, R_UM_STREAM: pr_ent_ready = 1'b1;
      R_SET_FILL:  pr_ent_ready = s_streaming;
      default: ;
    endcase
  end

  assign gv_start = (state == R_GAP) && pr_cmd_ready && barrier_idle;
  assign gv_need  = gap_need;
  assign gv_valid = (state == R_GAP_SCAN) && pr_ent_valid;
  assign gv_free  = !pr_ent_data[PTE_PRESENT];
  assign gv_last  = pr_ent_last;
  assign gp_start = (state == R_NP_SEARCH) && pr_cmd_ready && barrier_idle;
  assign gp_valid = (state == R_NP_SCAN) && pr_ent_valid;
  assign gp_free  = ~pr_ent_data;
  assign gp_last  = pr_ent_last;

  // leaf entry produced by SET_PTES for page s_t*L2_ENTRIES + s_e
  logic [63:0]      s_page;
  logic [PTE_W-1:0] s_leaf;
  logic             s_from_src;
  always_comb begin
    s_page     = 64'(s_t) * 64'(L2_ENTRIES) + 64'(s_e);
    s_from_src = s_streaming && !s_src_ended;
    if (s_from_src) begin
      s_leaf = pr_ent_data;
      s_leaf[PTE_RESERVED] = 1'b1;
    end else begin
      s_leaf = leaf_pte(1'b0, 1'b0, c.region, '0);
    end
    s_leaf[PTE_LAST] = (s_page == new_pages - 1);
  end
  // beat buffer with the current leaf merged in
  logic [DATA_W-1:0] nb;
  logic [STRB_W-1:0] ns;
  always_comb begin
    nb = wbuf;
    ns = wstrb;
    nb[s_e[2:0]*64 +: 64] = s_leaf;
    ns[s_e[2:0]*8 +: 8]   = 8'hFF;
  end
  wire s_fill_go  = (state == R_SET_FILL) && (!s_streaming || pr_ent_valid);
  wire s_beat_end = (s_e[2:0] == 3'd7) || (64'(s_e) == s_m - 1);

  // slot of pt_addr within its frame, and that slot's word and bit in the bitmap
  wire [31:0] pt_slot     = 32'((pt_addr & ((64'd1 << PAGE_BITS) - 1)) >> PT_BYTES_LOG2);
  wire [31:0] pt_slot_wd  = pt_slot >> 6;
  wire [5:0]  pt_slot_bit = pt_slot[5:0];

  // DEL_PT: slot bits in use by other tables, from the bitmap word streamed in
  logic [63:0] dp_used;
  always_comb begin
    dp_used = pr_ent_data & ~init_bm_word(word_idx);
    if (word_idx == pt_slot_wd) dp_used[pt_slot_bit] = 1'b0;
  end

  // UNMAP: page index of the streamed entry
  wire [63:0] um_page = 64'(s_t) * 64'(L2_ENTRIES) + 64'(s_e);

  // -------------------------------------------------------------- control
  // Routine call and return: push the state to resume at, jump to the routine.
`define VA_CALL(TARGET, RET) begin stack[sp] <= RET; sp <= sp + 1'b1; state <= TARGET; end
`define VA_RETURN begin state <= stack[sp - 1'b1]; sp <= sp - 1'b1; end
  // Start the WRITE routine: BEATS beats from address A in mode M.
`define VA_WRITE(A, BEATS, M, D, S, RET) begin \
    w_addr <= A; w_beats <= BEATS; w_sent <= '0; \
    w_burst_left <= ((BEATS) > 32'(MAX_BURST)) ? 32'(MAX_BURST) : (BEATS); \
    w_req_done <= 1'b0; w_mode <= M; w_data <= D; w_strb <= S; \
    `VA_CALL(R_WR, RET) end
  // Write one 64-bit word at byte address A (single beat, byte strobes).
`define VA_WRITE_WORD(A, V, RET) \
    `VA_WRITE(word_beat(A), 32'd1, W_SINGLE, word_data(A, V), word_strb(A), RET)

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_RESET;
      sp    <= '0;
      for (int i = 0; i < STACK_DEPTH; i++) stack[i] <= S_IDLE;
      ready <= 1'b0;
      c <= '0; r <= '0; new_pages <= '0; n_l1 <= '0; fail <= 1'b0;
      w_addr <= '0; w_beats <= '0; w_sent <= '0; w_burst_left <= '0; w_req_done <= 1'b0;
      w_mode <= W_ZERO; w_data <= '0; w_strb <= '0;
      rd_addr <= '0; rd_word <= '0;
      gap_need <= '0; gap_index <= '0; gap_found <= 1'b0;
      cur_frame <= '0; pt_addr <= '0; word_idx <= '0; cap_word <= '0; others <= '0;
      cap_idx <= '0; cap_valid <= 1'b0;
      s_dst <= '0; s_src <= '0; s_have_src <= 1'b0; s_src_ended <= 1'b0; s_streaming <= 1'b0;
      s_t <= '0; s_e <= '0; s_m <= '0; keep_below <= '0; wbuf <= '0; wstrb <= '0; um_ended <= 1'b0;
      cnt_pt_new <= '0; cnt_pt_del <= '0; cnt_ptf_new <= '0; cnt_ptf_del <= '0; cnt_frames_freed <= '0;
    end else begin
      case (state)
        // ====================================================== initialisation
        S_RESET:   state <= S_CLRF;
        S_CLRF:    if (fs_req_ready) state <= S_CLRF_W;
        S_CLRF_W:  if (fs_resp_valid) state <= S_RSVF;
        S_RSVF:    if (fs_req_ready) state <= S_RSVF_W;
        S_RSVF_W:  if (fs_resp_valid) state <= S_PT0_BM;
        S_PT0_BM:  `VA_WRITE('0, 32'(BM_BEATS), W_BITMAP, '0, '0, S_PT0_INS)
        S_PT0_INS: if (rx_cmd_ready) state <= S_PT0_INS_W;
        S_PT0_INS_W: if (rx_resp_valid) begin
          cnt_ptf_new <= cnt_ptf_new + 1;
          `VA_CALL(R_NP, S_PT0_PT)
        end
        S_PT0_PT:  if (barrier_idle) state <= S_INIT_DONE;
        S_INIT_DONE: begin
          ready <= 1'b1;
          state <= S_IDLE;
        end

        // ============================================================ commands
        S_IDLE: if (cmd_valid) begin
          c    <= cmd;
          fail <= 1'b0;
          new_pages <= (cmd.size == 0) ? 64'd1 : ((cmd.size + ((64'd1 << PAGE_BITS) - 1)) >> PAGE_BITS);
          case (cmd.op)
            AC_MALLOC:  state <= S_MALLOC;
            AC_REALLOC: state <= S_REALLOC;
            default:    state <= S_FREE;
          endcase
        end

        S_MALLOC: begin
          n_l1     <= (new_pages + 64'(L2_ENTRIES) - 1) >> L2_BITS;
          gap_need <= 32'((new_pages + 64'(L2_ENTRIES) - 1) >> L2_BITS);
          `VA_CALL(R_GAP, S_MALLOC_GAP)
        end
        S_MALLOC_GAP: begin
          if (!gap_found) begin
            r     <= '{ok: 1'b0, ptr: '0};
            state <= S_FINISH;
          end else begin
            s_dst <= gap_index; s_have_src <= 1'b0;
            `VA_CALL(R_SET, S_MALLOC_SET)
          end
        end
        S_MALLOC_SET: begin
          r     <= '{ok: !fail, ptr: VM_BASE | (ADDR_W'(s_dst) << (PAGE_BITS + L2_BITS))};
          state <= S_FINISH;
        end

        S_FREE: if (lk_barrier_idle) begin
          s_src      <= 32'(c.ptr[PAGE_BITS+L2_BITS +: L1_BITS]);
          keep_below <= '0;
          `VA_CALL(R_UM, S_FREE_UM)
        end
        S_FREE_UM: begin
          r     <= '{ok: !fail, ptr: '0};
          state <= S_FINISH;
        end

        S_REALLOC: if (lk_barrier_idle) begin
          n_l1     <= (new_pages + 64'(L2_ENTRIES) - 1) >> L2_BITS;
          gap_need <= 32'((new_pages + 64'(L2_ENTRIES) - 1) >> L2_BITS);
          `VA_CALL(R_GAP, S_REALLOC_GAP)
        end
        S_REALLOC_GAP: begin
          if (!gap_found) begin
            r     <= '{ok: 1'b0, ptr: c.ptr};
            state <= S_FINISH;
          end else begin
            s_dst <= gap_index; s_have_src <= 1'b1;
            s_src <= 32'(c.ptr[PAGE_BITS+L2_BITS +: L1_BITS]);
            `VA_CALL(R_SET, S_REALLOC_COPY)
          end
        end
        S_REALLOC_COPY: begin
          s_src      <= 32'(c.ptr[PAGE_BITS+L2_BITS +: L1_BITS]);
          keep_below <= new_pages;
          `VA_CALL(R_UM, S_REALLOC_UM)
        end
        S_REALLOC_UM: begin
          r     <= '{ok: !fail, ptr: VM_BASE | (ADDR_W'(s_dst) << (PAGE_BITS + L2_BITS))};
          state <= S_FINISH;
        end

        S_FINISH: if (barrier_idle) state <= S_RESP;
        S_RESP:   if (resp_ready) state <= S_IDLE;

        // ============================================================ WRITE
        R_WR: begin
          if (!w_req_done) begin
            if (wr_req_ready) w_req_done <= 1'b1;
          end else if (wr_dat_ready) begin
            if (w_burst_left == 1) begin
              w_sent <= w_sent + w_this_burst;
              if (w_sent + w_this_burst == w_beats) begin
                `VA_RETURN
              end else begin
                w_req_done   <= 1'b0;
                w_burst_left <= (w_beats - w_sent - w_this_burst > 32'(MAX_BURST)) ? 32'(MAX_BURST)
                                : (w_beats - w_sent - w_this_burst);
              end
            end else begin
              w_burst_left <= w_burst_left - 1;
            end
          end
        end

        // ============================================================ READ1
        R_RD1:   if (pr_cmd_valid && pr_cmd_ready) state <= R_RD1_W;
        R_RD1_W: if (pr_ent_valid) begin
          rd_word <= pr_ent_data;
          `VA_RETURN
        end

        // ========================================================= FIND_GAP
        R_GAP:      if (pr_cmd_valid && pr_cmd_ready) state <= R_GAP_SCAN;
        R_GAP_SCAN: if (gv_done) begin
          gap_found <= gv_found && (gv_index + gap_need <= 32'(L1_ENTRIES));
          gap_index <= gv_index;
          `VA_RETURN
        end

        // =========================================================== NEW_PT
        R_NP:       if (rx_cmd_ready) state <= R_NP_RST_W;
        R_NP_RST_W: if (rx_resp_valid) state <= R_NP_GET;
        R_NP_GET:   if (rx_cmd_ready) state <= R_NP_GET_W;
        R_NP_GET_W: if (rx_resp_valid) begin
          if (rx_resp_exhausted) state <= R_NP_REQF;
          else begin
            cur_frame <= rx_resp_frame;
            state     <= R_NP_SEARCH;
          end
        end
        R_NP_SEARCH: if (pr_cmd_valid && pr_cmd_ready) begin
          word_idx  <= '0;
          cap_valid <= 1'b0;
          state     <= R_NP_SCAN;
        end
        R_NP_SCAN: begin
          if (pr_ent_valid) begin
            word_idx <= word_idx + 1;
            if (!cap_valid && (|(~pr_ent_data))) begin
              cap_valid <= 1'b1;
              cap_word  <= pr_ent_data;
              cap_idx   <= word_idx;
            end
          end
          if (gp_done) begin
            if (gp_found) begin
              pt_addr <= frame_base(cur_frame) + (ADDR_W'(gp_index) << PT_BYTES_LOG2);
              state   <= R_NP_UPD;
            end else begin
              state <= R_NP_GET;
            end
          end
        end
        R_NP_UPD: `VA_WRITE_WORD(frame_base(cur_frame) + (ADDR_W'(cap_idx) << 3),
                             cap_word | (64'd1 << pt_slot_bit), R_NP_CLEAR)
        R_NP_CLEAR: begin
          cnt_pt_new <= cnt_pt_new + 1;
          `VA_WRITE(pt_addr, 32'(PT_BEATS), W_ZERO, '0, '0, R_NP_DONE)
        end
        R_NP_DONE: `VA_RETURN
        R_NP_REQF:   if (fs_req_ready) state <= R_NP_REQF_W;
        R_NP_REQF_W: if (fs_resp_valid) begin
          if (!fs_resp.ok) begin
            fail <= 1'b1;
            `VA_RETURN
          end else begin
            cur_frame   <= fs_resp.frame;
            cnt_ptf_new <= cnt_ptf_new + 1;
            state       <= R_NP_CLRBM;
          end
        end
        R_NP_CLRBM: `VA_WRITE(frame_base(cur_frame), 32'(BM_BEATS), W_BITMAP, '0, '0, R_NP_INS)
        R_NP_INS:   if (rx_cmd_ready) state <= R_NP_INS_W;
        R_NP_INS_W: if (rx_resp_valid) state <= R_NP_GET;

        // =========================================================== DEL_PT
        // argument: pt_addr; cur_frame is set from it on entry
        R_DP: if (pr_cmd_valid && pr_cmd_ready) begin
          word_idx <= '0;
          others   <= '0;
          state    <= R_DP_SCAN;
        end
        R_DP_SCAN: if (pr_ent_valid) begin
          if (word_idx == pt_slot_wd) begin
            cap_word <= pr_ent_data;
            cap_idx  <= word_idx;
          end
          others   <= others | dp_used;
          word_idx <= word_idx + 1;
          if (pr_ent_last) state <= R_DP_UPD;
        end
        R_DP_UPD: begin
          cnt_pt_del <= cnt_pt_del + 1;
          `VA_WRITE_WORD(frame_base(cur_frame) + (ADDR_W'(cap_idx) << 3),
                     cap_word & ~(64'd1 << pt_slot_bit), R_DP_CHK)
        end
        R_DP_CHK:     if (others == 0 && cur_frame != 0) state <= R_DP_DELF;
                      else `VA_RETURN
        R_DP_DELF:    if (rx_cmd_ready) state <= R_DP_DELF_W;
        R_DP_DELF_W:  if (rx_resp_valid) state <= R_DP_FREEF;
        R_DP_FREEF:   if (fs_req_ready) state <= R_DP_FREEF_W;
        R_DP_FREEF_W: if (fs_resp_valid) begin
          cnt_ptf_del <= cnt_ptf_del + 1;
          `VA_RETURN
        end

        // ========================================================= SET_PTES
        // arguments: s_dst, s_have_src, s_src, new_pages, n_l1, c.region
        R_SET: begin
          s_t         <= '0;
          s_src_ended <= !s_have_src;
          `VA_CALL(R_NP, R_SET_L1W)
        end
        R_SET_L1W: begin
          if (fail) `VA_RETURN
          else `VA_WRITE_WORD(l1_addr(s_dst + s_t), l1_pte(pt_addr), R_SET_SRC)
        end
        R_SET_SRC: begin
          s_e         <= '0;
          s_m         <= (new_pages - 64'(s_t) * 64'(L2_ENTRIES) > 64'(L2_ENTRIES)) ? 64'(L2_ENTRIES)
                         : (new_pages - 64'(s_t) * 64'(L2_ENTRIES));
          wbuf        <= '0;
          wstrb       <= '0;
          s_streaming <= 1'b0;
          if (s_src_ended) state <= R_SET_FILL;
          else begin
            rd_addr <= l1_addr(s_src + s_t);
            `VA_CALL(R_RD1, R_SET_STREAM)
          end
        end
        R_SET_STREAM: begin
          if (!rd_word[PTE_PRESENT]) begin
            s_src_ended <= 1'b1;
            state       <= R_SET_FILL;
          end else if (pr_cmd_valid && pr_cmd_ready) begin
            s_streaming <= 1'b1;
            state       <= R_SET_FILL;
          end
        end
        R_SET_FILL: if (s_fill_go) begin
          if (s_from_src && pr_ent_data[PTE_LAST]) s_src_ended <= 1'b1;
          if (s_beat_end) begin
            wbuf  <= '0;
            wstrb <= '0;
            `VA_WRITE(pt_addr + (ADDR_W'(s_e >> 3) << 6), 32'd1, W_SINGLE, nb, ns, R_SET_WBEAT)
          end else begin
            wbuf  <= nb;
            wstrb <= ns;
            s_e   <= s_e + 1;
          end
          if (set_take && pr_ent_last) s_streaming <= 1'b0;
        end
        R_SET_WBEAT: begin
          if (64'(s_e) == s_m - 1) state <= s_streaming ? R_SET_DRAIN : R_SET_NEXT;
          else begin
            s_e   <= s_e + 1;
            state <= R_SET_FILL;
          end
        end
        R_SET_DRAIN: if (pr_ent_valid && pr_ent_last) begin
          s_streaming <= 1'b0;
          state       <= R_SET_NEXT;
        end
        R_SET_NEXT: begin
          if (64'(s_t) + 1 >= n_l1) `VA_RETURN
          else begin
            s_t <= s_t + 1;
            `VA_CALL(R_NP, R_SET_L1W)
          end
        end

        // ============================================================ UNMAP
        // arguments: s_src (L1 index), keep_below (pages whose frames stay)
        R_UM: begin
          s_t      <= '0;
          um_ended <= 1'b0;
          rd_addr  <= l1_addr(s_src);
          `VA_CALL(R_RD1, R_UM_L1)
        end
        R_UM_L1: begin
          if (!rd_word[PTE_PRESENT]) begin
            fail <= 1'b1;
            `VA_RETURN
          end else begin
            pt_addr   <= pte_addr(rd_word);
            cur_frame <= 32'(pte_addr(rd_word) >> PAGE_BITS);
            s_e       <= '0;
            state     <= R_UM_CMD;
          end
        end
        R_UM_CMD: if (pr_cmd_valid && pr_cmd_ready) begin
          s_streaming <= 1'b1;
          state       <= R_UM_STREAM;
        end
        R_UM_STREAM: begin
          if (pr_ent_valid) begin
            s_e <= s_e + 1;
            if (!um_ended && pr_ent_data[PTE_RESERVED]) begin
              if (pr_ent_data[PTE_LAST]) um_ended <= 1'b1;
              if (pr_ent_data[PTE_PRESENT] && um_page >= keep_below) begin
                rd_word <= pr_ent_data;
                state   <= R_UM_FREQ;
              end
            end
            if (pr_ent_last) begin
              s_streaming <= 1'b0;
              if (!(!um_ended && pr_ent_data[PTE_RESERVED] && pr_ent_data[PTE_PRESENT] &&
                    um_page >= keep_below))
                `VA_CALL(R_DP, R_UM_L1CLR)
            end
          end
        end
        R_UM_FREQ:   if (fs_req_ready) state <= R_UM_FREQ_W;
        R_UM_FREQ_W: if (fs_resp_valid) begin
          cnt_frames_freed <= cnt_frames_freed + 1;
          if (s_streaming) state <= R_UM_STREAM;
          else `VA_CALL(R_DP, R_UM_L1CLR)
        end
        R_UM_L1CLR: `VA_WRITE_WORD(l1_addr(s_src + s_t), 64'd0, R_UM_NEXT)
        R_UM_NEXT: begin
          if (um_ended || s_t + 1 >= 32'(L1_ENTRIES)) `VA_RETURN
          else begin
            s_t     <= s_t + 1;
            rd_addr <= l1_addr(s_src + s_t + 1);
            `VA_CALL(R_RD1, R_UM_L1)
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_stack_bounds: assert property (@(posedge clk) disable iff (!rst_n) sp <= STACK_DEPTH);
endmodule

`undef VA_CALL
`undef VA_RETURN
`undef VA_WRITE
`undef VA_WRITE_WORD
