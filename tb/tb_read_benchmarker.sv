// tb_read_benchmarker: self-checking test of the benchmark reader.
//
// The reader is connected straight to the behavioural memory. Linear and
// random runs are made; every request address is compared with the expected
// sequence (consecutive bursts, or LFSR-chosen burst-aligned offsets inside
// the window, mirrored in the testbench), and the beat count and checksum
// with values recomputed from the memory's address-derived contents. A long
// linear run must reach the full bus rate: one 64-byte beat per cycle, less
// only the memory latency.
`timescale 1ns/1ps
module tb_read_benchmarker;
  import vm_pkg::*;
  localparam int RD_LAT = 40;
  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin #2ms; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  logic start = 0, random_mode = 0, busy, done;
  logic [ADDR_W-1:0] base = 0; logic [5:0] window_log2 = 0; logic [8:0] burst_len = 1; logic [31:0] num_bursts = 0;
  logic [31:0] beats, cycles; logic [63:0] checksum;
  logic req_valid, req_ready, dat_valid, dat_ready; bus_req_t req; bus_rdat_t dat;
  read_benchmarker dut (.*);
  logic wr_req_ready, wr_dat_ready, wr_rsp_valid;
  mem_model #(.RD_LAT(RD_LAT)) mem (.clk, .rst_n, .rd_req_valid(req_valid), .rd_req_ready(req_ready), .rd_req(req),
    .rd_dat_valid(dat_valid), .rd_dat_ready(dat_ready), .rd_dat(dat),
    .wr_req_valid(1'b0), .wr_req_ready, .wr_req('0), .wr_dat_valid(1'b0), .wr_dat_ready, .wr_dat('0),
    .wr_rsp_valid, .wr_rsp_ready(1'b1));

  logic [31:0] lfsr = 1;
  logic [63:0] exp_addr[$];
  always @(negedge clk) if (rst_n) begin
    #1.5;
    if (req_valid && req_ready) begin
      check(exp_addr.size() != 0 && req.addr == exp_addr[0] && req.len == 8'(burst_len - 1),
            $sformatf("request address %h", req.addr));
      if (exp_addr.size() != 0) void'(exp_addr.pop_front());
    end
  end

  task automatic run(input bit rnd, input logic [63:0] b, input int win, input int blen, input int nb, output int c);
    logic [63:0] sum, a;
    sum = 0;
    for (int i = 0; i < nb; i++) begin
      a = rnd ? b + ((64'(lfsr) << 6) & ((64'd1 << win) - 1)) : b + 64'(i) * 64'(blen) * 64;
      exp_addr.push_back(a);
      for (int k = 0; k < blen; k++) sum ^= mem.fill((a >> 6) + k)[63:0];
      lfsr = {1'b0, lfsr[31:1]} ^ (lfsr[0] ? 32'h8020_0003 : 32'h0);
    end
    @(negedge clk);
    random_mode = rnd; base = b; window_log2 = 6'(win); burst_len = 9'(blen); num_bursts = nb; start = 1;
    @(negedge clk); start = 0;
    check(busy, "busy after start");
    while (!done) @(negedge clk);
    c = cycles;
    check(beats == 32'(blen * nb), $sformatf("beats %0d", beats));
    check(checksum == sum, $sformatf("checksum %h expected %h", checksum, sum));
    check(exp_addr.size() == 0, "all requests issued");
    check(!busy, "idle when done");
  endtask

  initial begin
    int c;
    repeat (3) @(negedge clk); rst_n = 1;
    run(0, 64'h10_0000, 0, 4, 10, c);
    run(1, 64'h200_0000, 20, 1, 100, c);
    run(1, 64'h0, 16, 8, 50, c);
    run(0, 64'h0, 0, 256, 1, c);
    run(0, 64'h40_0000, 0, 16, 64, c);
    $display("1024 beats in %0d cycles", c);
    check(c <= 1024 + RD_LAT + 4, $sformatf("linear rate: 1024 beats in %0d cycles", c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
