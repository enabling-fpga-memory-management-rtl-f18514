// mem_model: behavioural model of the board memory and its controller, for
// simulation only.
//
// It serves the ID-less read and write buses of the design. Memory is sparse:
// an associative array of 64-byte beats indexed by beat number. A beat that
// was never written reads as fill(beat), a pattern derived from its address,
// so a testbench can tell which physical beat a read returned.
// Reads: requests are accepted while fewer than QDEPTH are waiting; the first
// beat of a request is returned RD_LAT cycles after acceptance (or later if
// the data channel is busy), then one beat per cycle, in request order.
// Writes: requests are queued; data beats are accepted once a request is
// present and merged under their byte strobes; WR_LAT cycles after the last
// beat of a request its write response is given, in order.
// peek64/poke64 let a testbench read and write 64-bit words directly.
// RD_LAT is this model's choice: with it the read latency seen at a reader is
// close to the round trip measured on the platform the design targets.
module mem_model
  import vm_pkg::*;
#(
  parameter int unsigned RD_LAT = 64,
  parameter int unsigned WR_LAT = 16,
  parameter int unsigned QDEPTH = 64
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      rd_req_valid,
  output logic      rd_req_ready,
  input  bus_req_t  rd_req,
  output logic      rd_dat_valid,
  input  logic      rd_dat_ready,
  output bus_rdat_t rd_dat,
  input  logic      wr_req_valid,
  output logic      wr_req_ready,
  input  bus_req_t  wr_req,
  input  logic      wr_dat_valid,
  output logic      wr_dat_ready,
  input  bus_wdat_t wr_dat,
  output logic      wr_rsp_valid,
  input  logic      wr_rsp_ready
);
  logic [DATA_W-1:0] mem [longint unsigned];

  longint unsigned cyc;
  bus_req_t        rq[$];
  longint unsigned rdue[$];
  int unsigned     rbeat;
  bus_req_t        wq[$];
  int unsigned     wbeat;
  longint unsigned wdue[$];
  int unsigned     rq_n, wq_n;
  longint unsigned rd_beats, wr_beats;

  function automatic logic [DATA_W-1:0] fill(longint unsigned b);
    logic [DATA_W-1:0] d;
    for (int k = 0; k < 8; k++) d[k*64 +: 64] = ((64'(b) << 4) | 64'(k)) ^ 64'hC3C3_0000_0000_0000;
    return d;
  endfunction

  function automatic logic [DATA_W-1:0] beat(longint unsigned b);
    if (mem.exists(b)) return mem[b];
    return fill(b);
  endfunction

  function automatic logic [63:0] peek64(longint unsigned a);
    logic [DATA_W-1:0] d;
    d = beat(a >> 6);
    return d[a[5:3]*64 +: 64];
  endfunction

  function automatic void poke64(longint unsigned a, logic [63:0] v);
    logic [DATA_W-1:0] d;
    d = beat(a >> 6);
    d[a[5:3]*64 +: 64] = v;
    mem[a >> 6] = d;
  endfunction

  assign rd_req_ready = rq_n < QDEPTH;
  assign wr_req_ready = wq_n < QDEPTH;
  assign wr_dat_ready = wq_n != 0;

  always @(posedge clk) begin
    if (!rst_n) begin
      cyc <= 0; rq.delete(); rdue.delete(); wq.delete(); wdue.delete();
      rbeat = 0; wbeat = 0; rq_n <= 0; wq_n <= 0;
      rd_dat_valid <= 1'b0; wr_rsp_valid <= 1'b0; rd_beats = 0; wr_beats = 0;
    end else begin
      cyc <= cyc + 1;
      // read data
      if (rd_dat_valid && rd_dat_ready) rd_dat_valid <= 1'b0;
      if (!rd_dat_valid || rd_dat_ready) begin
        if (rq.size() != 0 && rdue[0] <= cyc) begin
          rd_dat_valid <= 1'b1;
          rd_dat.data  <= beat((rq[0].addr >> 6) + rbeat);
          rd_dat.last  <= (rbeat == int'(rq[0].len));
          rd_beats++;
          if (rbeat == int'(rq[0].len)) begin
            void'(rq.pop_front()); void'(rdue.pop_front()); rbeat = 0;
          end else rbeat++;
        end
      end
      if (rd_req_valid && rd_req_ready) begin
        rq.push_back(rd_req);
        rdue.push_back(cyc + RD_LAT - 1);
      end
      // write data
      if (wr_dat_valid && wr_dat_ready) begin
        logic [DATA_W-1:0] d;
        longint unsigned   b;
        b = (wq[0].addr >> 6) + wbeat;
        d = beat(b);
        for (int k = 0; k < STRB_W; k++) if (wr_dat.strb[k]) d[k*8 +: 8] = wr_dat.data[k*8 +: 8];
        mem[b] = d;
        wr_beats++;
        if (wbeat == int'(wq[0].len)) begin
          void'(wq.pop_front()); wbeat = 0;
          wdue.push_back(cyc + WR_LAT);
        end else wbeat++;
      end
      if (wr_req_valid && wr_req_ready) wq.push_back(wr_req);
      // write responses
      if (wr_rsp_valid && wr_rsp_ready) wr_rsp_valid <= 1'b0;
      if ((!wr_rsp_valid || wr_rsp_ready) && wdue.size() != 0 && wdue[0] <= cyc) begin
        wr_rsp_valid <= 1'b1;
        void'(wdue.pop_front());
      end
      rq_n <= rq.size();
      wq_n <= wq.size();
    end
  end
endmodule
