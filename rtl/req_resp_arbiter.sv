// req_resp_arbiter: shares one request/response server among N clients.
//
// Requests are granted round-robin, one per cycle. The index of each granted
// client is pushed into a routing queue, and responses, which the server
// returns in request order, are sent back to the client at the head of that
// queue. The design uses it as the translation arbiter (translators in front
// of a shared page table walker), as the frame arbiter (virtual allocator and
// authoritative lookup sharing the frame store) and as the multiplexer of host
// and FPGA allocation commands. The arbitration policy and the routing queue
// depth OUTSTANDING are this design's own choices; a request is only granted
// while the routing queue has room, so the server never returns a response
// that cannot be routed.
module req_resp_arbiter #(
  parameter type         REQ_T       = logic [7:0],
  parameter type         RESP_T      = logic [7:0],
  parameter int unsigned N           = 2,
  parameter int unsigned OUTSTANDING = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  // clients
  input  logic  [N-1:0]   c_req_valid,
  output logic  [N-1:0]   c_req_ready,
  input  REQ_T            c_req   [N],
  output logic  [N-1:0]   c_resp_valid,
  input  logic  [N-1:0]   c_resp_ready,
  output RESP_T           c_resp,
  // server
  output logic            s_req_valid,
  input  logic            s_req_ready,
  output REQ_T            s_req,
  input  logic            s_resp_valid,
  output logic            s_resp_ready,
  input  RESP_T           s_resp
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last_grant, sel;
  logic          any;
  logic          rq_in_ready, rq_out_valid;
  logic [IW-1:0] rq_out;

  // Round-robin choice starting after the last granted client.
  always_comb begin
    sel = '0;
    any = 1'b0;
    for (int k = 1; k <= N; k++) begin
      int unsigned idx;
      idx = (int'(last_grant) + k) % N;
      if (!any && c_req_valid[idx]) begin
        any = 1'b1;
        sel = IW'(idx);
      end
    end
  end

  assign s_req_valid = any && rq_in_ready;
  assign s_req       = c_req[sel];
  always_comb begin
    c_req_ready = '0;
    c_req_ready[sel] = s_req_ready && rq_in_ready && any;
  end

  wire granted = s_req_valid && s_req_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_grant <= IW'(N - 1);
    else if (granted) last_grant <= sel;
  end

  stream_fifo #(.T(logic [IW-1:0]), .DEPTH(OUTSTANDING)) u_route (
    .clk, .rst_n,
    .in_valid(granted), .in_ready(rq_in_ready), .in_data(sel),
    .out_valid(rq_out_valid), .out_ready(s_resp_valid && c_resp_ready[rq_out]),
    .out_data(rq_out), .count()
  );

  assign c_resp = s_resp;
  always_comb begin
    c_resp_valid = '0;
    c_resp_valid[rq_out] = s_resp_valid && rq_out_valid;
  end
  assign s_resp_ready = rq_out_valid && c_resp_ready[rq_out];

  a_resp_expected: assert property (@(posedge clk) disable iff (!rst_n) s_resp_valid |-> rq_out_valid);
endmodule
