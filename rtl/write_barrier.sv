// write_barrier: tracks page table writes that are not yet visible in memory.
//
// It sits on a master's write path and passes the request, data and response
// channels through unchanged. A counter is incremented for each accepted write
// request and decremented for each write response; idle is high when the
// counter is zero, i.e. when every write issued so far has been acknowledged by
// the memory and is visible to every reader. The allocator and the
// authoritative lookup unit wait on idle before they read page tables that they
// or the other unit may have changed. The counter width is this design's
// choice; the master may have at most 2**CNT_W - 1 writes outstanding.
module write_barrier
  import vm_pkg::*;
#(
  parameter int unsigned CNT_W = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  // from master
  input  logic      s_req_valid,
  output logic      s_req_ready,
  input  bus_req_t  s_req,
  input  logic      s_dat_valid,
  output logic      s_dat_ready,
  input  bus_wdat_t s_dat,
  output logic      s_rsp_valid,
  input  logic      s_rsp_ready,
  // to bus
  output logic      m_req_valid,
  input  logic      m_req_ready,
  output bus_req_t  m_req,
  output logic      m_dat_valid,
  input  logic      m_dat_ready,
  output bus_wdat_t m_dat,
  input  logic      m_rsp_valid,
  output logic      m_rsp_ready,
  // status
  output logic      idle,
  output logic [CNT_W-1:0] outstanding
);
  logic [CNT_W-1:0] cnt;
  wire full = &cnt;

  assign m_req_valid = s_req_valid && !full;
  assign s_req_ready = m_req_ready && !full;
  assign m_req       = s_req;
  assign m_dat_valid = s_dat_valid;
  assign s_dat_ready = m_dat_ready;
  assign m_dat       = s_dat;
  assign s_rsp_valid = m_rsp_valid;
  assign m_rsp_ready = s_rsp_ready;

  wire inc = m_req_valid && m_req_ready;
  wire dec = m_rsp_valid && m_rsp_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else cnt <= cnt + (inc ? 1'b1 : 1'b0) - (dec ? 1'b1 : 1'b0);
  end

  assign idle        = (cnt == '0);
  assign outstanding = cnt;

  a_no_spurious_resp: assert property (@(posedge clk) disable iff (!rst_n) dec |-> (cnt != '0 || inc));
endmodule
