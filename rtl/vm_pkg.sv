// vm_pkg: types and helpers shared by the paged virtual memory system.
//
// The memory bus is an AXI-like, ID-less bus: a request channel carrying an
// address and a burst length, a data channel, and (for writes) a write
// response channel. Transactions are identified only by their order. One beat
// is 64 bytes (512 bits), as on the platform the design targets.
//
// Page table entries are 64 bits. The bit layout below is this design's own
// choice; the two-level organisation with 64-bit entries and 64 KiB tables
// follows the architecture it implements.
//   leaf (L2) entry : [0] present (frame assigned), [1] reserved (page belongs
//                     to an allocation), [2] last page of the allocation,
//                     [4:3] memory region, [63:PAGE_BITS] frame address bits.
//   L1 entry        : [0] present (points to an L2 table), [63:16] physical
//                     address of the 64 KiB-aligned L2 table.
// Virtual addresses of the FPGA live in a reserved window of the 64-bit host
// address space: bit 63 set and bits 62:VM_BITS clear.
package vm_pkg;

  localparam int unsigned ADDR_W   = 64;
  localparam int unsigned DATA_W   = 512;             // one beat = 64 B
  localparam int unsigned STRB_W   = DATA_W / 8;
  localparam int unsigned LEN_W    = 8;               // beats - 1
  localparam int unsigned PTE_W    = 64;
  localparam int unsigned PTES_PER_BEAT = DATA_W / PTE_W;
  localparam int unsigned REGION_W = 2;

  // Window of the host address space used for FPGA virtual memory.
  localparam logic [ADDR_W-1:0] VM_BASE = 64'h8000_0000_0000_0000;

  // Physical address of the first-level page table: the first page table slot
  // after the slot-usage bitmap in frame 0 (page tables are 64 KiB).
  localparam int unsigned PT_BYTES_LOG2 = 16;
  localparam logic [ADDR_W-1:0] L1_TABLE_ADDR = 64'h0000_0000_0001_0000;

  // ---------------------------------------------------------------- bus types
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [LEN_W-1:0]  len;      // number of beats minus one
  } bus_req_t;

  typedef struct packed {
    logic [DATA_W-1:0] data;
    logic              last;
  } bus_rdat_t;

  typedef struct packed {
    logic [DATA_W-1:0] data;
    logic [STRB_W-1:0] strb;
    logic              last;
  } bus_wdat_t;

  // ------------------------------------------------- translation lookups
  typedef struct packed {
    logic [ADDR_W-1:0] vaddr;
  } lookup_req_t;

  // A response repeats the virtual address, gives the physical address and a
  // validity mask: bits set in mask come from paddr, bits clear from vaddr.
  typedef struct packed {
    logic [ADDR_W-1:0] vaddr;
    logic [ADDR_W-1:0] paddr;
    logic [ADDR_W-1:0] mask;
    logic              fault;    // address not part of any allocation
  } lookup_resp_t;

  // ------------------------------------------------------------ frame store
  typedef enum logic [1:0] {
    FS_CLEAR   = 2'd0,           // mark every frame unused
    FS_ALLOC   = 2'd1,           // find and take a free frame in a region
    FS_FREE    = 2'd2,           // release one frame
    FS_RESERVE = 2'd3            // take one given frame
  } fs_op_e;

  typedef struct packed {
    fs_op_e            op;
    logic [REGION_W-1:0] region;
    logic [31:0]       frame;
  } fs_req_t;

  typedef struct packed {
    logic        ok;
    logic [31:0] frame;
  } fs_resp_t;

  // ------------------------------------------------------ allocator commands
  typedef enum logic [1:0] {
    AC_MALLOC  = 2'd0,
    AC_REALLOC = 2'd1,
    AC_FREE    = 2'd2
  } alloc_op_e;

  typedef struct packed {
    alloc_op_e           op;
    logic [REGION_W-1:0] region;
    logic [ADDR_W-1:0]   ptr;    // previous pointer (realloc, free)
    logic [ADDR_W-1:0]   size;   // bytes (malloc, realloc)
  } alloc_cmd_t;

  typedef struct packed {
    logic              ok;
    logic [ADDR_W-1:0] ptr;      // new pointer (malloc, realloc)
  } alloc_resp_t;

  // ------------------------------------------------------------ PTE helpers
  localparam int unsigned PTE_PRESENT  = 0;
  localparam int unsigned PTE_RESERVED = 1;
  localparam int unsigned PTE_LAST     = 2;

  function automatic logic in_vm(input logic [ADDR_W-1:0] a, input int unsigned vm_bits);
    logic [ADDR_W-1:0] hi_mask;
    hi_mask = ~((64'd1 << vm_bits) - 64'd1);
    return (a & hi_mask) == VM_BASE;
  endfunction

  function automatic logic [REGION_W-1:0] pte_region(input logic [PTE_W-1:0] e);
    return e[4:3];
  endfunction

  function automatic logic [PTE_W-1:0] leaf_pte(input logic present, input logic last,
                                                input logic [REGION_W-1:0] region,
                                                input logic [ADDR_W-1:0] frame_addr);
    logic [PTE_W-1:0] e;
    e = frame_addr & ~64'hFFFF;
    e[PTE_PRESENT]  = present;
    e[PTE_RESERVED] = 1'b1;
    e[PTE_LAST]     = last;
    e[4:3]          = region;
    return e;
  endfunction

  function automatic logic [PTE_W-1:0] l1_pte(input logic [ADDR_W-1:0] table_addr);
    logic [PTE_W-1:0] e;
    e = table_addr & ~64'hFFFF;
    e[PTE_PRESENT] = 1'b1;
    return e;
  endfunction

  // Address held by an entry, with the flag bits removed.
  function automatic logic [ADDR_W-1:0] pte_addr(input logic [PTE_W-1:0] e);
    return e & ~64'hFFFF;
  endfunction

  // Select the 64-bit word that holds byte address a from a 512-bit beat.
  function automatic logic [PTE_W-1:0] beat_word(input logic [DATA_W-1:0] d, input logic [ADDR_W-1:0] a);
    return d[a[5:3]*PTE_W +: PTE_W];
  endfunction

endpackage
