// mmio_alloc: host access to the allocator through memory-mapped registers.
//
// The host writes the size and pointer arguments, then writes the command
// register, which raises a command towards the allocator. The STATUS register
// shows when the command has been accepted and when a response is waiting;
// the response pointer is read from RESP_LO/RESP_HI and must be acknowledged
// by writing RESP_ACK before the next response can be shown. Registers
// (32-bit, selected by a word index):
//   0 SIZE_LO   1 SIZE_HI   2 PTR_LO   3 PTR_HI          (read/write)
//   4 CMD       write: [1:0] operation (0 malloc, 1 realloc, 2 free),
//               [5:4] memory region; issues the command
//   5 STATUS    read: [0] command waiting to be accepted, [1] response
//               waiting, [2] response ok, [3] allocator ready
//   6 RESP_LO   7 RESP_HI                                (read)
//   8 RESP_ACK  write: clears the response
// Reads return data one cycle after rd_valid. The handshake (command accepted,
// separate response register acknowledged by the host) follows the design's
// host interface; the register map is this design's own choice.
module mmio_alloc
  import vm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        alloc_ready,
  // MMIO
  input  logic        wr_valid,
  input  logic [3:0]  wr_addr,
  input  logic [31:0] wr_data,
  input  logic        rd_valid,
  input  logic [3:0]  rd_addr,
  output logic [31:0] rd_data,
  // allocator command port
  output logic        cmd_valid,
  input  logic        cmd_ready,
  output alloc_cmd_t  cmd,
  input  logic        resp_valid,
  output logic        resp_ready,
  input  alloc_resp_t resp
);
  logic [63:0]       size_q, ptr_q;
  logic              have_resp;
  alloc_resp_t       resp_q;

  assign resp_ready = !have_resp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      size_q    <= '0;
      ptr_q     <= '0;
      cmd_valid <= 1'b0;
      cmd       <= '0;
      have_resp <= 1'b0;
      resp_q    <= '0;
      rd_data   <= '0;
    end else begin
      if (cmd_valid && cmd_ready) cmd_valid <= 1'b0;
      if (resp_valid && resp_ready) begin
        have_resp <= 1'b1;
        resp_q    <= resp;
      end
      if (wr_valid) begin
        case (wr_addr)
          4'd0: size_q[31:0]  <= wr_data;
          4'd1: size_q[63:32] <= wr_data;
          4'd2: ptr_q[31:0]   <= wr_data;
          4'd3: ptr_q[63:32]  <= wr_data;
          4'd4: if (!cmd_valid) begin
            cmd_valid  <= 1'b1;
            cmd.op     <= alloc_op_e'(wr_data[1:0]);
            cmd.region <= wr_data[5:4];
            cmd.size   <= size_q;
            cmd.ptr    <= ptr_q;
          end
          4'd8: have_resp <= 1'b0;
          default: ;
        endcase
      end
      if (rd_valid) begin
        case (rd_addr)
          4'd0: rd_data <= size_q[31:0];
          4'd1: rd_data <= size_q[63:32];
          4'd2: rd_data <= ptr_q[31:0];
          4'd3: rd_data <= ptr_q[63:32];
          4'd5: rd_data <= {28'd0, alloc_ready, resp_q.ok, have_resp, cmd_valid};
          4'd6: rd_data <= resp_q.ptr[31:0];
          4'd7: rd_data <= resp_q.ptr[63:32];
          default: rd_data <= '0;
        endcase
      end
    end
  end
endmodule
