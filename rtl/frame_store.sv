// frame_store: keeps track of which physical frames are in use.
//
// One bit per frame is stored in a one-bit-wide memory, so exactly one frame is
// examined or changed per clock cycle. The frames are split evenly into
// NUM_REGIONS memory regions (for instance one per memory channel); each region
// has a roving pointer that remembers where the last free frame was found, so
// a search does not rescan the occupied low end of the region every time.
// Commands (fs_req_t) are:
//   FS_CLEAR   mark every frame free and reset the roving pointers
//              (NUM_FRAMES cycles);
//   FS_ALLOC   search the region from its roving pointer, wrapping around, take
//              the first free frame and return its number (ok=0 if the region
//              is full); one frame per cycle after a two-cycle start;
//   FS_FREE    clear the bit of a frame;
//   FS_RESERVE set the bit of a frame.
// A response (fs_resp_t) is returned for every command and held until taken.
// NUM_FRAMES follows from 64 GiB of board memory divided by the page size;
// the memory region split and the exact search pipeline are this design's
// own choices.
module frame_store
  import vm_pkg::*;
#(
  parameter int unsigned NUM_FRAMES  = 1024,
  parameter int unsigned NUM_REGIONS = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req_valid,
  output logic     req_ready,
  input  fs_req_t  req,
  output logic     resp_valid,
  input  logic     resp_ready,
  output fs_resp_t resp
);
  localparam int unsigned FW  = $clog2(NUM_FRAMES);
  localparam int unsigned FPR = NUM_FRAMES / NUM_REGIONS;

  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_SCAN, S_RESP} state_e;
  state_e state;

  logic mem [NUM_FRAMES];
  logic          we, wd, rd_data;
  logic [FW-1:0] waddr, raddr;

  logic [FW-1:0] rover [NUM_REGIONS];
  logic [FW-1:0] scan_addr, rd_addr_q, lo, hi;
  logic [FW:0]   scanned;
  logic          pend;
  logic [REGION_W-1:0] cur_region;

  // one-bit-wide memory with a synchronous read port
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wd;
    rd_data <= mem[raddr];
  end

  assign req_ready = (state == S_IDLE);

  wire [FW-1:0] scan_next = (scan_addr == hi) ? lo : scan_addr + 1'b1;
  wire          found     = (state == S_SCAN) && pend && !rd_data;
  wire          exhausted = (state == S_SCAN) && pend && rd_data && (scanned == (FW+1)'(FPR));

  always_comb begin
    we    = 1'b0;
    wd    = 1'b0;
    waddr = scan_addr;
    raddr = scan_addr;
    if (state == S_IDLE && req_valid) begin
      if (req.op == FS_FREE || req.op == FS_RESERVE) begin
        we    = 1'b1;
        wd    = (req.op == FS_RESERVE);
        waddr = req.frame[FW-1:0];
      end
    end else if (state == S_CLEAR) begin
      we = 1'b1;
    end else if (found) begin
      we    = 1'b1;
      wd    = 1'b1;
      waddr = rd_addr_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      resp_valid <= 1'b0;
      resp       <= '0;
      scan_addr  <= '0;
      rd_addr_q  <= '0;
      scanned    <= '0;
      pend       <= 1'b0;
      lo         <= '0;
      hi         <= '0;
      cur_region <= '0;
      for (int r = 0; r < NUM_REGIONS; r++) rover[r] <= FW'(r * FPR);
    end else begin
      case (state)
        S_IDLE: if (req_valid) begin
          case (req.op)
            FS_CLEAR: begin
              scan_addr <= '0;
              state     <= S_CLEAR;
            end
            FS_ALLOC: begin
              cur_region <= req.region;
              lo         <= FW'(int'(req.region) * FPR);
              hi         <= FW'(int'(req.region) * FPR + FPR - 1);
              scan_addr  <= rover[req.region];
              scanned    <= '0;
              pend       <= 1'b0;
              state      <= S_SCAN;
            end
            default: begin
              resp       <= '{ok: 1'b1, frame: req.frame};
              resp_valid <= 1'b1;
              state      <= S_RESP;
            end
          endcase
        end
        S_CLEAR: begin
          scan_addr <= scan_addr + 1'b1;
          if (scan_addr == FW'(NUM_FRAMES - 1)) begin
            for (int r = 0; r < NUM_REGIONS; r++) rover[r] <= FW'(r * FPR);
            resp       <= '{ok: 1'b1, frame: '0};
            resp_valid <= 1'b1;
            state      <= S_RESP;
          end
        end
        S_SCAN: begin
          rd_addr_q <= scan_addr;
          scan_addr <= scan_next;
          pend      <= 1'b1;
          if (pend) scanned <= scanned + 1'b1;
          if (found) begin
            rover[cur_region] <= rd_addr_q;
            resp       <= '{ok: 1'b1, frame: 32'(rd_addr_q)};
            resp_valid <= 1'b1;
            state      <= S_RESP;
          end else if (exhausted) begin
            resp       <= '{ok: 1'b0, frame: '0};
            resp_valid <= 1'b1;
            state      <= S_RESP;
          end
        end
        S_RESP: if (resp_ready) begin
          resp_valid <= 1'b0;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
