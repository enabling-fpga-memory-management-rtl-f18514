// stream_fifo: synchronous first-in first-out queue with valid/ready handshakes
// on both sides. It is the queue used for request queues, bus response queues
// and routing queues throughout the design.
//
// DEPTH entries are held in a register array addressed by read and write
// pointers. in_ready is high while the queue is not full; out_valid is high
// while it is not empty, and out_data shows the oldest entry combinationally.
// An entry written in one cycle can be read in the next. count gives the
// current fill level.
module stream_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T mem [DEPTH];
  logic [PW-1:0] wp, rp;
  logic [$clog2(DEPTH+1)-1:0] n;

  wire push = in_valid && in_ready;
  wire pop  = out_valid && out_ready;

  assign in_ready  = (n != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (n != '0);
  assign out_data  = mem[rp];
  assign count     = n;

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
      n  <= '0;
    end else begin
      if (push) wp <= inc(wp);
      if (pop)  rp <= inc(rp);
      n <= n + (push ? 1'b1 : 1'b0) - (pop ? 1'b1 : 1'b0);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= in_data;
  end

  a_count_in_range: assert property (@(posedge clk) disable iff (!rst_n) n <= DEPTH);
endmodule
