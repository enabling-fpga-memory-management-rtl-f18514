// gap_finder: finds the first run of NEED consecutive free entries in a stream.
//
// After 'start' (with the run length 'need'), it accepts words of W usage
// flags, flag k of word j describing entry j*W+k, where 1 means free. It keeps
// the length and start of the current run of free entries across words and
// records the first entry index at which a run reaches 'need'. It accepts the
// whole stream up to the word flagged 'last', then raises 'done' for one
// cycle with 'found' and 'index'. The allocator uses one instance with W=1 on
// the first-level page table (free virtual memory) and one with W=64 on the
// bitmap of a page table frame (free page table slots). Only the function is
// given for this block; the run-length scan is this design's choice.
module gap_finder #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [31:0]  need,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_free,
  input  logic         in_last,
  output logic         done,
  output logic         found,
  output logic [31:0]  index
);
  logic        active;
  logic [31:0] base, run, run_start;
  logic [31:0] n_run, n_start, n_index;
  logic        n_found;

  assign in_ready = active;

  always_comb begin
    n_run   = run;
    n_start = run_start;
    n_found = found;
    n_index = index;
    for (int k = 0; k < W; k++) begin
      if (in_free[k]) begin
        if (n_run == 0) n_start = base + 32'(k);
        n_run = n_run + 1;
        if (!n_found && n_run >= need) begin
          n_found = 1'b1;
          n_index = n_start;
        end
      end else begin
        n_run = 0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      base      <= '0;
      run       <= '0;
      run_start <= '0;
      found     <= 1'b0;
      index     <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        active    <= 1'b1;
        base      <= '0;
        run       <= '0;
        run_start <= '0;
        found     <= 1'b0;
        index     <= '0;
      end else if (active && in_valid) begin
        base      <= base + 32'(W);
        run       <= n_run;
        run_start <= n_start;
        found     <= n_found;
        index     <= n_index;
        if (in_last) begin
          active <= 1'b0;
          done   <= 1'b1;
        end
      end
    end
  end
endmodule
