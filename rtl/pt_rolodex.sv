// pt_rolodex: the list of frames that hold page tables.
//
// Several page tables are packed into one frame; when a new page table is
// needed the allocator must know which frames to search for a free slot. The
// rolodex stores those frame numbers and lets the allocator flip through them.
// Commands:
//   RX_INSERT  append a frame (ignored with ok=0 when the list is full);
//   RX_DELETE  remove a frame, found by a linear search of one entry per
//              cycle, the last entry moving into its place;
//   RX_RESTART move the flip cursor to the first frame;
//   RX_NEXT    return the frame under the cursor and advance, or report
//              'exhausted' when every frame has been flipped through.
// Each command returns one response, held until taken. The list length
// MAX_FRAMES is this design's choice.
module pt_rolodex #(
  parameter int unsigned MAX_FRAMES = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  logic [1:0]  cmd_op,
  input  logic [31:0] cmd_frame,
  output logic        resp_valid,
  input  logic        resp_ready,
  output logic [31:0] resp_frame,
  output logic        resp_exhausted,
  output logic        resp_ok,
  output logic [$clog2(MAX_FRAMES+1)-1:0] size
);
  localparam logic [1:0] RX_INSERT = 2'd0, RX_DELETE = 2'd1, RX_RESTART = 2'd2, RX_NEXT = 2'd3;
  localparam int unsigned CW = $clog2(MAX_FRAMES + 1);

  typedef enum logic [1:0] {S_IDLE, S_SEARCH, S_RESP} state_e;
  state_e state;

  logic [31:0]   frames [MAX_FRAMES];
  logic [CW-1:0] n, cursor, idx;
  logic [31:0]   target;

  assign cmd_ready = (state == S_IDLE);
  assign size      = n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      n              <= '0;
      cursor         <= '0;
      idx            <= '0;
      target         <= '0;
      resp_valid     <= 1'b0;
      resp_frame     <= '0;
      resp_exhausted <= 1'b0;
      resp_ok        <= 1'b0;
    end else begin
      case (state)
        S_IDLE: if (cmd_valid) begin
          resp_exhausted <= 1'b0;
          resp_ok        <= 1'b1;
          resp_frame     <= cmd_frame;
          state          <= S_RESP;
          resp_valid     <= 1'b1;
          case (cmd_op)
            RX_INSERT: begin
              if (n != CW'(MAX_FRAMES)) begin
                frames[n] <= cmd_frame;
                n         <= n + 1'b1;
              end else begin
                resp_ok <= 1'b0;
              end
            end
            RX_DELETE: begin
              target     <= cmd_frame;
              idx        <= '0;
              state      <= S_SEARCH;
              resp_valid <= 1'b0;
            end
            RX_RESTART: cursor <= '0;
            default: begin  // RX_NEXT
              if (cursor >= n) begin
                resp_exhausted <= 1'b1;
              end else begin
                resp_frame <= frames[cursor];
                cursor     <= cursor + 1'b1;
              end
            end
          endcase
        end
        S_SEARCH: begin
          if (idx >= n) begin
            resp_ok    <= 1'b0;          // not in the list
            resp_valid <= 1'b1;
            state      <= S_RESP;
          end else if (frames[idx] == target) begin
            frames[idx] <= frames[n - 1'b1];
            n           <= n - 1'b1;
            if (cursor > idx) cursor <= cursor - 1'b1;
            resp_valid  <= 1'b1;
            state       <= S_RESP;
          end else begin
            idx <= idx + 1'b1;
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
