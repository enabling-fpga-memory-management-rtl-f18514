// auth_lookup: authoritative lookup unit of the allocator.
//
// Page table walkers send it the lookups they cannot resolve. Before reading
// the page tables it waits until its own earlier page table writes have been
// acknowledged (barrier_idle, from the write barrier behind it), so it never
// reads a table it has just changed and never gives one page two frames. It
// then reads the first- and second-level entries itself:
//   - leaf has a frame           -> answer with it (the walker read an older
//                                   state of the table);
//   - leaf reserved, no frame    -> ask the frame store for a free frame in the
//                                   leaf's memory region, answer the walker at
//                                   once, then write the updated leaf entry
//                                   (present, frame address) to memory;
//   - no table or leaf not part  -> answer with 'fault' set, paddr 0 and mask 0
//     of an allocation              (an access error; not handled further).
// This implements allocation of physical memory on first access. One lookup is
// handled at a time. Reads and writes are single beats; the write uses byte
// strobes to change only the 8-byte entry. Write responses are taken at once
// (the barrier in front of the write bus counts them). The error answer and
// the single-lookup sequencing are this design's own choices.
module auth_lookup
  import vm_pkg::*;
#(
  parameter int unsigned VM_BITS   = 43,
  parameter int unsigned PAGE_BITS = 26,
  parameter int unsigned L2_BITS   = 13
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         lk_req_valid,
  output logic         lk_req_ready,
  input  lookup_req_t  lk_req,
  output logic         lk_resp_valid,
  input  logic         lk_resp_ready,
  output lookup_resp_t lk_resp,
  // frame store client
  output logic         fs_req_valid,
  input  logic         fs_req_ready,
  output fs_req_t      fs_req,
  input  logic         fs_resp_valid,
  output logic         fs_resp_ready,
  input  fs_resp_t     fs_resp,
  // read bus
  output logic         rd_req_valid,
  input  logic         rd_req_ready,
  output bus_req_t     rd_req,
  input  logic         rd_dat_valid,
  output logic         rd_dat_ready,
  input  bus_rdat_t    rd_dat,
  // write bus (through a write barrier)
  output logic         wr_req_valid,
  input  logic         wr_req_ready,
  output bus_req_t     wr_req,
  output logic         wr_dat_valid,
  input  logic         wr_dat_ready,
  output bus_wdat_t    wr_dat,
  input  logic         wr_rsp_valid,
  output logic         wr_rsp_ready,
  input  logic         barrier_idle,
  output logic [31:0]  cnt_frames
);
  localparam int unsigned L1_BITS = VM_BITS - PAGE_BITS - L2_BITS;
  localparam logic [ADDR_W-1:0] PAGE_MASK = ~((64'd1 << PAGE_BITS) - 64'd1);

  typedef enum logic [3:0] {
    S_IDLE, S_L1_REQ, S_L1_DAT, S_L2_REQ, S_L2_DAT, S_FS_REQ, S_FS_RESP, S_RESP, S_WRITE
  } state_e;
  state_e state;

  logic [ADDR_W-1:0] vaddr, l2_addr;
  logic [PTE_W-1:0]  new_leaf;
  logic [REGION_W-1:0] region;
  logic              need_write, req_done, dat_done;

  wire [ADDR_W-1:0] l1_addr = L1_TABLE_ADDR + (ADDR_W'(vaddr[PAGE_BITS+L2_BITS +: L1_BITS]) << 3);
  wire [PTE_W-1:0]  rword   = beat_word(rd_dat.data, (state == S_L1_DAT) ? l1_addr : l2_addr);

  assign lk_req_ready  = (state == S_IDLE) && barrier_idle;
  assign rd_req_valid  = (state == S_L1_REQ) || (state == S_L2_REQ);
  assign rd_req.addr   = (state == S_L1_REQ) ? {l1_addr[ADDR_W-1:6], 6'd0} : {l2_addr[ADDR_W-1:6], 6'd0};
  assign rd_req.len    = '0;
  assign rd_dat_ready  = (state == S_L1_DAT) || (state == S_L2_DAT);
  assign fs_req_valid  = (state == S_FS_REQ);
  assign fs_req        = '{op: FS_ALLOC, region: region, frame: '0};
  assign fs_resp_ready = (state == S_FS_RESP);
  assign wr_req_valid  = (state == S_WRITE) && !req_done;
  assign wr_req        = '{addr: {l2_addr[ADDR_W-1:6], 6'd0}, len: '0};
  assign wr_dat_valid  = (state == S_WRITE) && !dat_done;
  assign wr_dat.data   = DATA_W'(new_leaf) << (l2_addr[5:3] * PTE_W);
  assign wr_dat.strb   = STRB_W'(8'hFF) << (l2_addr[5:3] * 8);
  assign wr_dat.last   = 1'b1;
  assign wr_rsp_ready  = 1'b1;
  assign lk_resp_valid = (state == S_RESP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      vaddr      <= '0;
      l2_addr    <= '0;
      new_leaf   <= '0;
      region     <= '0;
      need_write <= 1'b0;
      req_done   <= 1'b0;
      dat_done   <= 1'b0;
      lk_resp    <= '0;
      cnt_frames <= '0;
    end else begin
      case (state)
        S_IDLE: if (lk_req_valid && lk_req_ready) begin
          vaddr      <= lk_req.vaddr;
          need_write <= 1'b0;
          state      <= S_L1_REQ;
        end
        S_L1_REQ: if (rd_req_ready) state <= S_L1_DAT;
        S_L1_DAT: if (rd_dat_valid) begin
          if (rword[PTE_PRESENT]) begin
            l2_addr <= pte_addr(rword) + (ADDR_W'(vaddr[PAGE_BITS +: L2_BITS]) << 3);
            state   <= S_L2_REQ;
          end else begin
            lk_resp <= '{vaddr: vaddr, paddr: '0, mask: '0, fault: 1'b1};
            state   <= S_RESP;
          end
        end
        S_L2_REQ: if (rd_req_ready) state <= S_L2_DAT;
        S_L2_DAT: if (rd_dat_valid) begin
          region <= pte_region(rword);
          if (rword[PTE_PRESENT]) begin
            lk_resp <= '{vaddr: vaddr, paddr: pte_addr(rword) & PAGE_MASK, mask: PAGE_MASK, fault: 1'b0};
            state   <= S_RESP;
          end else if (rword[PTE_RESERVED]) begin
            new_leaf <= rword;
            state    <= S_FS_REQ;
          end else begin
            lk_resp <= '{vaddr: vaddr, paddr: '0, mask: '0, fault: 1'b1};
            state   <= S_RESP;
          end
        end
        S_FS_REQ: if (fs_req_ready) state <= S_FS_RESP;
        S_FS_RESP: if (fs_resp_valid) begin
          if (fs_resp.ok) begin
            new_leaf   <= leaf_pte(1'b1, new_leaf[PTE_LAST], region, ADDR_W'(fs_resp.frame) << PAGE_BITS);
            lk_resp    <= '{vaddr: vaddr, paddr: ADDR_W'(fs_resp.frame) << PAGE_BITS, mask: PAGE_MASK, fault: 1'b0};
            need_write <= 1'b1;
            cnt_frames <= cnt_frames + 1;
          end else begin
            lk_resp <= '{vaddr: vaddr, paddr: '0, mask: '0, fault: 1'b1};
          end
          state <= S_RESP;
        end
        S_RESP: if (lk_resp_ready) begin
          req_done <= 1'b0;
          dat_done <= 1'b0;
          state    <= need_write ? S_WRITE : S_IDLE;
        end
        S_WRITE: begin
          if (wr_req_valid && wr_req_ready) req_done <= 1'b1;
          if (wr_dat_valid && wr_dat_ready) dat_done <= 1'b1;
          if ((req_done || (wr_req_valid && wr_req_ready)) &&
              (dat_done || (wr_dat_valid && wr_dat_ready))) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
