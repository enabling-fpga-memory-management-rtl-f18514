// tb_mmio_alloc: self-checking test of the host register interface.
//
// An allocator model accepts a command after a random delay, answers with a
// pointer computed from the command, and records what it received. The test
// writes the argument registers, issues malloc, realloc and free commands
// through the command register, polls STATUS, reads the response registers
// and acknowledges, and checks: the command fields reaching the allocator,
// the STATUS bits at each step, the response values, read-back of the
// argument registers, and that a second response is held off until the
// first is acknowledged.
`timescale 1ns/1ps
module tb_mmio_alloc;
  import vm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin #1ms; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  logic alloc_ready = 1, wr_valid = 0, rd_valid = 0;
  logic [3:0] wr_addr = 0, rd_addr = 0; logic [31:0] wr_data = 0, rd_data;
  logic cmd_valid, cmd_ready = 0, resp_valid = 0, resp_ready;
  alloc_cmd_t cmd; alloc_resp_t resp = '0;
  mmio_alloc dut (.*);

  alloc_cmd_t got[$];
  function automatic alloc_resp_t answer(alloc_cmd_t c);
    return '{ok: c.op != AC_FREE || c.ptr != 0, ptr: c.size ^ {c.ptr[31:0], 30'd0, 2'(c.op)}};
  endfunction

  task automatic wr(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk); wr_valid = 1; wr_addr = a; wr_data = d; @(negedge clk); wr_valid = 0;
  endtask
  task automatic rd(input logic [3:0] a, output logic [31:0] d);
    @(negedge clk); rd_valid = 1; rd_addr = a; @(negedge clk); rd_valid = 0; d = rd_data;
  endtask

  task automatic serve(input int delay, input bit respond);
    @(negedge clk);
    while (!cmd_valid) @(negedge clk);
    repeat (delay) @(negedge clk);
    cmd_ready = 1; got.push_back(cmd);
    @(negedge clk); cmd_ready = 0;
    if (respond) begin
      repeat (delay) @(negedge clk);
      resp_valid = 1; resp = answer(got[$]);
      #1; while (!resp_ready) begin @(negedge clk); #1; end
      @(negedge clk); resp_valid = 0;
    end
  endtask

  task automatic host(input alloc_op_e op, input logic [1:0] region, input logic [63:0] ptr, input logic [63:0] size);
    logic [31:0] st, lo, hi, d;
    alloc_cmd_t c;
    alloc_resp_t e;
    wr(0, size[31:0]); wr(1, size[63:32]); wr(2, ptr[31:0]); wr(3, ptr[63:32]);
    rd(0, d); check(d == size[31:0], "SIZE_LO read back");
    rd(3, d); check(d == ptr[63:32], "PTR_HI read back");
    fork
      begin
        wr(4, {26'd0, region, 2'd0, 2'(op)});
        rd(5, st); check(st[0] && !st[1], "STATUS: command waiting");
      end
      serve($urandom_range(3, 10), 1);
    join
    do rd(5, st); while (!st[1]);
    check(!st[0] && st[3], "STATUS: accepted, allocator ready");
    rd(6, lo); rd(7, hi);
    c = got[$];
    check(c.op == op && c.region == region && c.ptr == ptr && c.size == size, "command fields");
    e = answer(c);
    check({hi, lo} == e.ptr && st[2] == e.ok, "response registers");
    wr(8, 0);
    rd(5, st); check(!st[1], "STATUS: response acknowledged");
  endtask

  initial begin
    logic [31:0] st;
    repeat (3) @(negedge clk); rst_n = 1;
    host(AC_MALLOC, 2'd0, 64'h0, 64'h1000_0000);
    host(AC_REALLOC, 2'd2, 64'h8000_0080_0000_0000, 64'h4_2000_0000);
    host(AC_FREE, 2'd1, 64'h8000_0100_0000_0000, 0);
    host(AC_FREE, 2'd3, 64'h0, 0);
    // a second response waits until the first is acknowledged
    fork wr(4, 0); serve(2, 1); join
    fork wr(4, 1); serve(2, 0); join
    @(negedge clk); resp_valid = 1; resp = '{ok: 1, ptr: 64'hABCD};
    repeat (5) begin #1; check(!resp_ready, "second response held off"); @(negedge clk); end
    wr(8, 0);
    #1; check(resp_ready, "taken after acknowledge");
    @(negedge clk); resp_valid = 0;
    rd(6, st); check(st == 32'hABCD, "second response shown");
    alloc_ready = 0; rd(5, st); check(!st[3], "STATUS: allocator not ready");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
