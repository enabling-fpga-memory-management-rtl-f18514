// tb_bus_write_arbiter: self-checking test of the write bus arbiter.
//
// Two masters each issue 40 write bursts (1 to 4 beats, random data and byte
// strobes) to disjoint addresses, with request and data valid toggling at
// random, so data is often offered before its request is granted. Writes go
// to the behavioural memory. At the end every written beat is compared with
// the data the master sent (merged under its strobes), and each master must
// have received exactly one write response per request, never more than it
// had requests accepted.
`timescale 1ns/1ps
module tb_bus_write_arbiter;
  import vm_pkg::*;
  localparam int N = 2, W = 40;
  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin #2ms; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  logic [N-1:0] m_req_valid = 0, m_req_ready, m_dat_valid = 0, m_dat_ready, m_rsp_valid, m_rsp_ready = 0;
  bus_req_t m_req [N]; bus_wdat_t m_dat [N];
  logic b_req_valid, b_req_ready, b_dat_valid, b_dat_ready, b_rsp_valid, b_rsp_ready;
  bus_req_t b_req; bus_wdat_t b_dat;
  bus_write_arbiter #(.N(N), .OUTSTANDING(8)) dut (.*);

  logic rd_req_ready, rd_dat_valid; bus_rdat_t rd_dat;
  mem_model #(.WR_LAT(10)) mem (.clk, .rst_n, .rd_req_valid(1'b0), .rd_req_ready, .rd_req('0),
    .rd_dat_valid, .rd_dat_ready(1'b1), .rd_dat,
    .wr_req_valid(b_req_valid), .wr_req_ready(b_req_ready), .wr_req(b_req), .wr_dat_valid(b_dat_valid),
    .wr_dat_ready(b_dat_ready), .wr_dat(b_dat), .wr_rsp_valid(b_rsp_valid), .wr_rsp_ready(b_rsp_ready));

  bus_req_t  reqs  [N][W];
  bus_wdat_t beats [N][$];
  int ri [N], bi [N], rsp [N];
  logic [N-1:0] req_fire, dat_fire, rsp_fire;

  initial begin
    for (int i = 0; i < N; i++) begin
      ri[i] = 0; bi[i] = 0; rsp[i] = 0;
      for (int j = 0; j < W; j++) begin
        reqs[i][j].addr = 64'h100000 * (i + 1) + 64'h400 * j;
        reqs[i][j].len  = 8'($urandom_range(0, 3));
        for (int k = 0; k <= int'(reqs[i][j].len); k++) begin
          bus_wdat_t d;
          d.data = {16{$urandom}} ^ {$urandom, 480'd0};
          d.strb = $urandom_range(0, 1) ? '1 : {$urandom, $urandom};
          d.last = (k == int'(reqs[i][j].len));
          beats[i].push_back(d);
        end
      end
    end
    repeat (3) @(negedge clk); rst_n = 1;
    req_fire = 0; dat_fire = 0;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        m_req_valid[i] = ri[i] < W && $urandom_range(0, 1);
        m_req[i]       = reqs[i][ri[i] < W ? ri[i] : 0];
        m_dat_valid[i] = bi[i] < beats[i].size() && $urandom_range(0, 1);
        m_dat[i]       = beats[i][bi[i] < beats[i].size() ? bi[i] : 0];
        m_rsp_ready[i] = $urandom_range(0, 2) != 0;
      end
      @(posedge clk);
      req_fire = m_req_valid & m_req_ready;
      dat_fire = m_dat_valid & m_dat_ready;
      rsp_fire = m_rsp_valid & m_rsp_ready;
      for (int i = 0; i < N; i++) begin
        if (req_fire[i]) ri[i]++;
        if (dat_fire[i]) bi[i]++;
        if (rsp_fire[i]) begin
          rsp[i]++;
          check(rsp[i] <= ri[i], $sformatf("master %0d response %0d before its request", i, rsp[i]));
        end
      end
    end
    for (int i = 0; i < N; i++) begin
      int b;
      b = 0;
      check(ri[i] == W && rsp[i] == W, $sformatf("master %0d: %0d requests, %0d responses", i, ri[i], rsp[i]));
      for (int j = 0; j < W; j++)
        for (int k = 0; k <= int'(reqs[i][j].len); k++) begin
          logic [DATA_W-1:0] e;
          longint unsigned bn;
          bn = (reqs[i][j].addr >> 6) + k;
          e = mem.fill(bn);
          for (int s = 0; s < STRB_W; s++) if (beats[i][b].strb[s]) e[s*8 +: 8] = beats[i][b].data[s*8 +: 8];
          check(mem.beat(bn) == e, $sformatf("master %0d write %0d beat %0d in memory", i, j, k));
          b++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
