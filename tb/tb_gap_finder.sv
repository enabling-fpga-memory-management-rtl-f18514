// tb_gap_finder: self-checking test of the free-run finder.
//
// Two instances are tested: W=1 (one flag per word, as used on the first-level
// page table) and W=64 (64 flags per word, as used on a page table slot
// bitmap). Random streams of free/used flags with random run lengths are fed
// in, one word per cycle; 'found' and 'index' are compared with a reference
// search for the first run of 'need' free entries, and 'done' must come exactly
// one cycle after the last word.
`timescale 1ns/1ps
module tb_gap_finder;
  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin #5ms; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  logic        s1_start = 0, s1_valid = 0, s1_ready, s1_last = 0, s1_done, s1_found;
  logic [0:0]  s1_free = 0;
  logic [31:0] s1_need = 1, s1_index;
  logic        s64_start = 0, s64_valid = 0, s64_ready, s64_last = 0, s64_done, s64_found;
  logic [63:0] s64_free = 0;
  logic [31:0] s64_need = 1, s64_index;

  gap_finder #(.W(1)) dut1 (.clk, .rst_n, .start(s1_start), .need(s1_need), .in_valid(s1_valid),
    .in_ready(s1_ready), .in_free(s1_free), .in_last(s1_last), .done(s1_done), .found(s1_found), .index(s1_index));
  gap_finder #(.W(64)) dut64 (.clk, .rst_n, .start(s64_start), .need(s64_need), .in_valid(s64_valid),
    .in_ready(s64_ready), .in_free(s64_free), .in_last(s64_last), .done(s64_done), .found(s64_found), .index(s64_index));

  bit flags [$];

  function automatic void make(int n, int density);
    flags.delete();
    for (int i = 0; i < n; i++) flags.push_back($urandom_range(0, 99) < density);
  endfunction

  function automatic int ref_find(int need);
    int run = 0;
    foreach (flags[i]) begin
      run = flags[i] ? run + 1 : 0;
      if (run == need) return i - need + 1;
    end
    return -1;
  endfunction

  task automatic run1(int need);
    int exp_i = ref_find(need);
    @(negedge clk); s1_start = 1; s1_need = need;
    @(negedge clk); s1_start = 0;
    foreach (flags[i]) begin
      s1_valid = 1; s1_free = flags[i]; s1_last = (i == flags.size() - 1);
      @(posedge clk); check(s1_ready, "W=1 ready while streaming");
      @(negedge clk);
    end
    s1_valid = 0; s1_last = 0;
    check(s1_done, "W=1 done one cycle after the last word");
    while (!s1_done) @(negedge clk);
    check(s1_found == (exp_i >= 0), $sformatf("W=1 need %0d found %0d expected %0d", need, s1_found, exp_i >= 0));
    if (exp_i >= 0) check(s1_index == exp_i, $sformatf("W=1 need %0d index %0d expected %0d", need, s1_index, exp_i));
  endtask

  task automatic run64(int need);
    int exp_i = ref_find(need);
    @(negedge clk); s64_start = 1; s64_need = need;
    @(negedge clk); s64_start = 0;
    for (int w = 0; w < flags.size() / 64; w++) begin
      s64_valid = 1; s64_last = (w == flags.size() / 64 - 1);
      for (int k = 0; k < 64; k++) s64_free[k] = flags[w * 64 + k];
      @(posedge clk); check(s64_ready, "W=64 ready while streaming");
      @(negedge clk);
    end
    s64_valid = 0; s64_last = 0;
    check(s64_done, "W=64 done one cycle after the last word");
    while (!s64_done) @(negedge clk);
    check(s64_found == (exp_i >= 0), $sformatf("W=64 need %0d found %0d expected %0d", need, s64_found, exp_i >= 0));
    if (exp_i >= 0) check(s64_index == exp_i, $sformatf("W=64 need %0d index %0d expected %0d", need, s64_index, exp_i));
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    // fixed cases
    flags = '{0, 1, 1, 0, 1, 1, 1, 0};
    run1(1); run1(2); run1(3); run1(4);
    repeat (60) begin
      make($urandom_range(1, 64), $urandom_range(20, 90));
      run1($urandom_range(1, 6));
    end
    repeat (40) begin
      make(64 * $urandom_range(1, 8), $urandom_range(0, 30));
      run64($urandom_range(1, 3));
    end
    make(128, 0); run64(1);   // nothing free
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
