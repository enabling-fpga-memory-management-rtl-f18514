// bus_read_arbiter: lets N read masters share one read bus.
//
// Read requests are granted round-robin, one per cycle, and the index of the
// granted master is queued. Because the bus has no transaction IDs and
// returns bursts in request order, each returned burst is routed to the master
// at the head of that queue until the beat flagged last, after which the entry
// is popped. The data beat itself is wired to every master; only its valid
// is routed, and only the addressed master's ready is used. The number of outstanding bursts is limited to OUTSTANDING, the
// depth of the routing queue. Masters must accept data for the bursts they
// requested; a master that stalls its data channel stalls the bus, which is
// why the units of this design size their response queues to absorb all of
// their outstanding requests. Round-robin order and the queue depth are this
// design's own choices.
module bus_read_arbiter
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
  output logic [N-1:0]  m_dat_valid,
  input  logic [N-1:0]  m_dat_ready,
  output bus_rdat_t     m_dat,
  // bus
  output logic          b_req_valid,
  input  logic          b_req_ready,
  output bus_req_t      b_req,
  input  logic          b_dat_valid,
  output logic          b_dat_ready,
  input  bus_rdat_t     b_dat
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last_grant, sel, head;
  logic          any, rq_in_ready, rq_valid;

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

  assign b_req_valid = any && rq_in_ready;
  assign b_req       = m_req[sel];
  always_comb begin
    m_req_ready = '0;
    m_req_ready[sel] = any && rq_in_ready && b_req_ready;
  end
  wire granted = b_req_valid && b_req_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_grant <= IW'(N - 1);
    else if (granted) last_grant <= sel;
  end

  wire beat = b_dat_valid && b_dat_ready;

  stream_fifo #(.T(logic [IW-1:0]), .DEPTH(OUTSTANDING)) u_route (
    .clk, .rst_n,
    .in_valid(granted), .in_ready(rq_in_ready), .in_data(sel),
    .out_valid(rq_valid), .out_ready(beat && b_dat.last), .out_data(head), .count()
  );

  assign m_dat = b_dat;
  always_comb begin
    m_dat_valid = '0;
    m_dat_valid[head] = b_dat_valid && rq_valid;
  end
  assign b_dat_ready = rq_valid && m_dat_ready[head];

  a_data_expected: assert property (@(posedge clk) disable iff (!rst_n) b_dat_valid |-> rq_valid);
endmodule
