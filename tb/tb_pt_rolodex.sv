// tb_pt_rolodex: self-checking test of the page-table frame list.
//
// An 8-entry rolodex is filled, flipped through, partly deleted and refilled,
// and each response is compared with a reference list kept in the testbench
// (deletion moves the last entry into the freed place). It checks that
// flipping returns every frame once and then reports exhaustion, that insert
// fails on a full list and delete on a missing frame, and that a delete
// search takes one cycle per entry examined.
`timescale 1ns/1ps
module tb_pt_rolodex;
  localparam int M = 8;
  localparam logic [1:0] INS = 0, DEL = 1, RST = 2, NXT = 3;
  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin #1ms; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  logic cmd_valid = 0, cmd_ready, resp_valid, resp_ready = 1, resp_exhausted, resp_ok;
  logic [1:0] cmd_op = 0; logic [31:0] cmd_frame = 0, resp_frame;
  logic [$clog2(M+1)-1:0] size;
  pt_rolodex #(.MAX_FRAMES(M)) dut (.*);

  int ref_q[$];

  task automatic cmd(input logic [1:0] op, input int fr, output bit ok, output bit exh, output int rf, output int cyc);
    @(negedge clk); cmd_valid = 1; cmd_op = op; cmd_frame = fr; cyc = 0;
    do begin @(posedge clk); cyc++; end while (!cmd_ready);
    @(negedge clk); cmd_valid = 0;
    while (!resp_valid) begin @(negedge clk); cyc++; end
    ok = resp_ok; exh = resp_exhausted; rf = resp_frame;
    @(negedge clk);
  endtask

  task automatic flip_all();
    bit ok, exh; int rf, cyc;
    cmd(RST, 0, ok, exh, rf, cyc);
    foreach (ref_q[i]) begin
      cmd(NXT, 0, ok, exh, rf, cyc);
      check(!exh && rf == ref_q[i], $sformatf("flip %0d: got %0d expected %0d", i, rf, ref_q[i]));
    end
    cmd(NXT, 0, ok, exh, rf, cyc);
    check(exh, "exhausted after the last frame");
    check(size == ref_q.size(), $sformatf("size %0d", size));
  endtask

  initial begin
    bit ok, exh; int rf, cyc, idx;
    repeat (3) @(negedge clk); rst_n = 1;
    flip_all();
    for (int i = 0; i < M; i++) begin
      cmd(INS, 100 + 7 * i, ok, exh, rf, cyc); ref_q.push_back(100 + 7 * i);
      check(ok, "insert");
    end
    cmd(INS, 999, ok, exh, rf, cyc);
    check(!ok, "insert into a full list fails");
    flip_all();
    // delete the third entry: the last one moves into its place
    cmd(DEL, 114, ok, exh, rf, cyc);
    check(ok, "delete present frame");
    check(cyc >= 3 && cyc <= 3 + 4, $sformatf("delete of entry 2 took %0d cycles", cyc));
    ref_q[2] = ref_q[ref_q.size() - 1]; ref_q.delete(ref_q.size() - 1);
    flip_all();
    cmd(DEL, 555, ok, exh, rf, cyc);
    check(!ok, "delete of a missing frame fails");
    repeat (30) begin
      if (ref_q.size() != 0 && $urandom_range(0, 1)) begin
        idx = $urandom_range(0, ref_q.size() - 1);
        cmd(DEL, ref_q[idx], ok, exh, rf, cyc); check(ok, "random delete");
        ref_q[idx] = ref_q[ref_q.size() - 1]; ref_q.delete(ref_q.size() - 1);
      end else begin
        int fr;
        fr = 1000 + 3 * checks;   // unique frame numbers
        cmd(INS, fr, ok, exh, rf, cyc);
        check(ok == (ref_q.size() < M), "random insert");
        if (ok) ref_q.push_back(fr);
      end
      flip_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
