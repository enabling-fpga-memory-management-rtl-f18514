// bus_write_arbiter: lets N write masters share one write bus, including the
// write response channel.
//
// A master is granted round-robin; once its request is accepted the arbiter
// stays locked to that master's write data channel until the beat flagged
// last has passed, so data beats of different bursts never interleave. The
// index of each granted master is also queued, and the bus's write responses,
// one per burst in request order, are routed back through that queue. The
// write response channel is what lets the allocator know when its page table
// updates are visible; a master that does not need responses can tie its
// response ready high. Round-robin order and the queue depth are this
// design's own choices.
module bus_write_arbiter
  import vm_pkg::*;
#(
  parameter int unsigned N           = 2,
  parameter int unsigned OUTSTANDING = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  // masters
  input  logic [N-1:0]  m_req_valid,
  output logic [N-1:0]  m_req_ready,
  input  bus_req_t      m_req [N],
  input  logic [N-1:0]  m_dat_valid,
  output logic [N-1:0]  m_dat_ready,
  input  bus_wdat_t     m_dat [N],
  output logic [N-1:0]  m_rsp_valid,
  input  logic [N-1:0]  m_rsp_ready,
  // bus
  output logic          b_req_valid,
  input  logic          b_req_ready,
  output bus_req_t      b_req,
  output logic          b_dat_valid,
  input  logic          b_dat_ready,
  output bus_wdat_t     b_dat,
  input  logic          b_rsp_valid,
  output logic          b_rsp_ready
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last_grant, sel, dsel, rhead;
  logic          any, rq_in_ready, rq_valid;
  logic          dq_in_ready, dq_valid;

  always_comb begin
    sel = '0;
    any = 1'b0;
    for (int k = 1; k <= N; k++) begin
      int unsigned idx;
      idx = (int'(last_grant) + k) % N;
      if (!any && m_req_valid[idx]) begin
        any = 1'b1;
        sel = IW'(idx);
      end
    end
  end

  wire can_grant = any && rq_in_ready && dq_in_ready;
  assign b_req_valid = can_grant;
  assign b_req       = m_req[sel];
  always_comb begin
    m_req_ready = '0;
    m_req_ready[sel] = can_grant && b_req_ready;
  end
  wire granted = b_req_valid && b_req_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_grant <= IW'(N - 1);
    else if (granted) last_grant <= sel;
  end

  // Data channel order: the bursts whose data is still to be sent.
  wire dbeat = b_dat_valid && b_dat_ready;
  stream_fifo #(.T(logic [IW-1:0]), .DEPTH(OUTSTANDING)) u_data_route (
    .clk, .rst_n,
    .in_valid(granted), .in_ready(dq_in_ready), .in_data(sel),
    .out_valid(dq_valid), .out_ready(dbeat && b_dat.last), .out_data(dsel), .count()
  );
  assign b_dat       = m_dat[dsel];
  assign b_dat_valid = dq_valid && m_dat_valid[dsel];
  always_comb begin
    m_dat_ready = '0;
    m_dat_ready[dsel] = dq_valid && b_dat_ready;
  end

  // Response order: the bursts whose response is still to come.
  wire rsp = b_rsp_valid && b_rsp_ready;
  stream_fifo #(.T(logic [IW-1:0]), .DEPTH(OUTSTANDING)) u_resp_route (
    .clk, .rst_n,
    .in_valid(granted), .in_ready(rq_in_ready), .in_data(sel),
    .out_valid(rq_valid), .out_ready(rsp), .out_data(rhead), .count()
  );
  always_comb begin
    m_rsp_valid = '0;
    m_rsp_valid[rhead] = b_rsp_valid && rq_valid;
  end
  assign b_rsp_ready = rq_valid && m_rsp_ready[rhead];

  a_resp_expected: assert property (@(posedge clk) disable iff (!rst_n) b_rsp_valid |-> rq_valid);
endmodule
