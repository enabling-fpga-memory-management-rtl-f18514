// tb_frame_store: self-checking test of the physical frame store.
//
// A 64-frame store with four regions of 16 frames is driven through clear,
// allocation, free and reserve commands and compared with a reference bit
// array: every allocated frame must lie in the requested region and have been
// free, and an allocation must fail exactly when its region is full. It also
// checks the roving pointer (consecutive allocations return consecutive
// frames), the clear time (one frame per cycle) and the search time (one
// frame per cycle after a short start). A random phase of 400 commands
// follows.
`timescale 1ns/1ps
module tb_frame_store;
  import vm_pkg::*;
  localparam int N = 64, R = 4, PER = N / R;

  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin #2ms; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  logic req_valid = 0, req_ready, resp_valid, resp_ready = 1;
  fs_req_t req = '0; fs_resp_t resp;
  frame_store #(.NUM_FRAMES(N), .NUM_REGIONS(R)) dut (.*);

  bit used [N];

  task automatic cmd(input fs_op_e op, input int region, input int frame, output fs_resp_t r, output int cyc);
    @(negedge clk);
    req_valid = 1; req = '{op: op, region: 2'(region), frame: 32'(frame)};
    cyc = 0;
    do begin @(posedge clk); cyc++; end while (!req_ready);
    @(negedge clk); req_valid = 0;
    while (!resp_valid) begin @(negedge clk); cyc++; end
    r = resp;
    @(negedge clk);
  endtask

  function automatic bit region_full(int region);
    for (int f = region * PER; f < (region + 1) * PER; f++) if (!used[f]) return 0;
    return 1;
  endfunction

  task automatic alloc(input int region, output bit ok, output int frame, output int cyc);
    fs_resp_t r;
    bit full;
    full = region_full(region);
    cmd(FS_ALLOC, region, 0, r, cyc);
    ok = r.ok; frame = r.frame;
    check(r.ok == !full, $sformatf("alloc region %0d ok=%0d full=%0d", region, r.ok, full));
    if (r.ok) begin
      check(frame >= region * PER && frame < (region + 1) * PER, $sformatf("frame %0d in region %0d", frame, region));
      check(!used[frame], $sformatf("frame %0d was free", frame));
      used[frame] = 1;
    end
  endtask

  initial begin
    fs_resp_t r; bit ok; int f, cyc, prev;
    repeat (3) @(negedge clk); rst_n = 1;
    cmd(FS_CLEAR, 0, 0, r, cyc);
    check(cyc >= N && cyc <= N + 6, $sformatf("clear takes %0d cycles", cyc));
    // consecutive allocations in region 1 return consecutive frames
    prev = -1;
    for (int i = 0; i < PER; i++) begin
      alloc(1, ok, f, cyc);
      if (prev >= 0) check(f == prev + 1, $sformatf("roving pointer: %0d after %0d", f, prev));
      if (i == 0) check(cyc <= 5, $sformatf("allocation of a free frame in %0d cycles", cyc));
      prev = f;
    end
    alloc(1, ok, f, cyc);                 // region full
    check(!ok, "full region reports failure");
    check(cyc >= PER && cyc <= PER + 6, $sformatf("full-region search %0d cycles", cyc));
    // free the first frame of the region: the search wraps around to it
    cmd(FS_FREE, 0, PER, r, cyc); used[PER] = 0;
    alloc(1, ok, f, cyc);
    check(ok && f == PER, $sformatf("freed frame found again (%0d)", f));
    check(cyc <= PER + 6, $sformatf("wrapped search %0d cycles", cyc));
    // reserve a frame, allocation skips it
    cmd(FS_RESERVE, 0, 0, r, cyc); used[0] = 1;
    alloc(0, ok, f, cyc);
    check(ok && f == 1, $sformatf("reserved frame skipped (%0d)", f));
    // random phase
    repeat (400) begin
      int op, fr;
      op = $urandom_range(0, 2);
      if (op == 0) begin
        fr = $urandom_range(0, N - 1);
        cmd(FS_FREE, 0, fr, r, cyc); used[fr] = 0;
      end else alloc($urandom_range(0, R - 1), ok, f, cyc);
    end
    // clear again: everything free
    cmd(FS_CLEAR, 0, 0, r, cyc);
    foreach (used[i]) used[i] = 0;
    for (int i = 0; i < PER; i++) alloc(3, ok, f, cyc);
    alloc(3, ok, f, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
