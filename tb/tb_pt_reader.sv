// tb_pt_reader: self-checking test of the page table buffer reader.
//
// The behavioural memory is filled with known 64-bit entries. Random commands
// (8-byte aligned start, 1 to 600 entries) are issued and the streamed
// entries are compared one by one with the memory, with 'last' on the final
// one, while the consumer applies random back-pressure. A 1024-entry scan with
// no back-pressure must deliver close to one entry per cycle (within the
// memory latency plus a few cycles of 1024 cycles).
`timescale 1ns/1ps
module tb_pt_reader;
  import vm_pkg::*;
  localparam int RD_LAT = 30;
  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin #2ms; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  logic cmd_valid = 0, cmd_ready, ent_valid, ent_ready = 0, ent_last;
  logic [ADDR_W-1:0] cmd_addr = 0; logic [31:0] cmd_count = 0; logic [PTE_W-1:0] ent_data;
  logic rd_req_valid, rd_req_ready, rd_dat_valid, rd_dat_ready; bus_req_t rd_req; bus_rdat_t rd_dat;
  pt_reader dut (.*);
  logic wr_req_ready, wr_dat_ready, wr_rsp_valid;
  mem_model #(.RD_LAT(RD_LAT)) mem (.clk, .rst_n, .rd_req_valid, .rd_req_ready, .rd_req, .rd_dat_valid, .rd_dat_ready, .rd_dat,
    .wr_req_valid(1'b0), .wr_req_ready, .wr_req('0), .wr_dat_valid(1'b0), .wr_dat_ready, .wr_dat('0),
    .wr_rsp_valid, .wr_rsp_ready(1'b1));

  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic read(input logic [63:0] a, input int n, input bit stall, output int cycles);
    int t0, k;
    @(negedge clk); cmd_valid = 1; cmd_addr = a; cmd_count = n;
    @(posedge clk); while (!cmd_ready) @(posedge clk);
    t0 = cyc;
    @(negedge clk); cmd_valid = 0;
    k = 0;
    while (k < n) begin
      ent_ready = stall ? 1'($urandom_range(0, 2) != 0) : 1'b1;
      #1;
      if (ent_valid && ent_ready) begin
        check(ent_data == mem.peek64(a + 64'(k) * 8), $sformatf("entry %0d of %0d at %h", k, n, a));
        check(ent_last == (k == n - 1), $sformatf("last flag at entry %0d of %0d", k, n));
        k++;
      end
      @(negedge clk);
    end
    cycles = cyc - t0;
    ent_ready = 0;
    repeat (3) begin #1; check(!ent_valid, "no extra entries"); @(negedge clk); end
  endtask

  initial begin
    int c;
    for (int i = 0; i < 8192; i++) mem.poke64(64'h40000 + 64'(i) * 8, {$urandom, $urandom});
    repeat (3) @(negedge clk); rst_n = 1;
    read(64'h40000, 1, 0, c);
    read(64'h40008, 7, 0, c);
    read(64'h40038, 9, 1, c);
    repeat (40) read(64'h40000 + 64'($urandom_range(0, 6000)) * 8, $urandom_range(1, 600), 1, c);
    read(64'h40000, 1024, 0, c);
    $display("1024 entries in %0d cycles", c);
    check(c <= 1024 + RD_LAT + 12, $sformatf("scan rate: 1024 entries in %0d cycles", c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
