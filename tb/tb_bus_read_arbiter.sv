// tb_bus_read_arbiter: self-checking test of the read bus arbiter.
//
// Three masters issue random read bursts (1 to 8 beats, random addresses)
// through the arbiter to the behavioural memory, and accept data with random
// back-pressure. Each master checks that it receives exactly the beats of its
// own requests, in order, with the memory's address-derived contents and the
// last flag on the final beat of each burst. A final phase with a single
// master and no back-pressure checks that a long burst streams at one beat
// per cycle.
`timescale 1ns/1ps
module tb_bus_read_arbiter;
  import vm_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin #2ms; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  logic [N-1:0] m_req_valid = 0, m_req_ready, m_dat_valid, m_dat_ready = 0;
  bus_req_t m_req [N]; bus_rdat_t m_dat;
  logic b_req_valid, b_req_ready, b_dat_valid, b_dat_ready;
  bus_req_t b_req; bus_rdat_t b_dat;
  bus_read_arbiter #(.N(N), .OUTSTANDING(8)) dut (.*);

  logic wr_req_ready, wr_dat_ready, wr_rsp_valid;
  mem_model #(.RD_LAT(20)) mem (.clk, .rst_n, .rd_req_valid(b_req_valid), .rd_req_ready(b_req_ready), .rd_req(b_req),
    .rd_dat_valid(b_dat_valid), .rd_dat_ready(b_dat_ready), .rd_dat(b_dat),
    .wr_req_valid(1'b0), .wr_req_ready, .wr_req('0), .wr_dat_valid(1'b0), .wr_dat_ready, .wr_dat('0),
    .wr_rsp_valid, .wr_rsp_ready(1'b1));

  // expected beats per master: beat number and last flag
  longint unsigned exp_b [N][$];
  bit exp_l [N][$];
  int issued [N], beats_got = 0, beats_exp = 0;
  logic [N-1:0] req_fire, dat_fire;
  int long_start = -1, long_end = -1, cyc = 0;
  always @(posedge clk) cyc++;

  task automatic new_req(int i);
    bus_req_t r;
    r.addr = {28'h0, $urandom_range(0, 15), 26'h0} + 64'(($urandom & 32'hFFFF) << 6);
    r.len  = 8'($urandom_range(0, 7));
    m_req[i] = r;
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin issued[i] = 0; new_req(i); end
    repeat (3) @(negedge clk); rst_n = 1;
    req_fire = 0;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        if (req_fire[i]) new_req(i);
        m_req_valid[i] = (c < 2600) && (issued[i] < 150) && $urandom_range(0, 1);
        m_dat_ready[i] = $urandom_range(0, 3) != 0;
      end
      #1;
      for (int i = 0; i < N; i++) if (m_dat_valid[i]) begin
        check(exp_b[i].size() != 0, $sformatf("master %0d unexpected beat", i));
        if (exp_b[i].size() != 0) begin
          check(m_dat.data == mem.fill(exp_b[i][0]), $sformatf("master %0d beat data", i));
          check(m_dat.last == exp_l[i][0], $sformatf("master %0d last flag", i));
        end
      end
      check($countones(m_dat_valid) <= 1, "one master at a time gets data");
      @(posedge clk);
      req_fire = m_req_valid & m_req_ready;
      dat_fire = m_dat_valid & m_dat_ready;
      for (int i = 0; i < N; i++) begin
        if (req_fire[i]) begin
          for (int k = 0; k <= int'(m_req[i].len); k++) begin
            exp_b[i].push_back((m_req[i].addr >> 6) + k); exp_l[i].push_back(k == int'(m_req[i].len)); beats_exp++;
          end
          issued[i]++;
        end
        if (dat_fire[i]) begin void'(exp_b[i].pop_front()); void'(exp_l[i].pop_front()); beats_got++; end
      end
    end
    check(beats_got == beats_exp && beats_exp > 1000, $sformatf("beats %0d of %0d", beats_got, beats_exp));
    // streaming rate: one master, 64-beat burst, no back-pressure
    @(negedge clk);
    m_req[0] = '{addr: 64'h10000, len: 8'd63}; m_req_valid = 3'b001; m_dat_ready = '1;
    @(posedge clk); while (!m_req_ready[0]) @(posedge clk);
    @(negedge clk); m_req_valid = 0;
    for (int k = 0; k < 64; k++) begin
      while (!m_dat_valid[0]) @(negedge clk);
      if (k == 0) long_start = cyc;
      check(m_dat.data == mem.fill(64'h400 + k), "long burst data");
      long_end = cyc;
      @(negedge clk);
    end
    check(long_end - long_start == 63, $sformatf("64 beats in %0d cycles", long_end - long_start + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
