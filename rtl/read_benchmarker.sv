// read_benchmarker: traffic source for measuring read throughput.
//
// After 'start' it issues num_bursts read requests of burst_len beats each,
// either linearly (base, base + burst, base + 2*burst, ...) or at random
// beat-aligned offsets within a window of 2**window_log2 bytes above base,
// taken from a 32-bit linear feedback shift register. A random burst may run
// past the end of a page; since a translator maps a burst by its first
// address, such a burst reads its tail from the wrong frame (rare with large
// pages and short bursts; linear runs with a power-of-two burst size never
// cross). Requests go out on the
// request channel (through an address translator in this design); read data
// comes back on the data channel, which is always accepted. It counts the
// returned beats and the cycles from start until the last beat, and keeps an
// XOR checksum of the low 64 bits of every beat, so a testbench can check what
// was read. done is high from the last beat until the next start. Only the
// role of this unit (a linear and a random reader used to benchmark the
// memory system) is given; everything else here is this design's choice.
module read_benchmarker
  import vm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              random_mode,
  input  logic [ADDR_W-1:0] base,
  input  logic [5:0]        window_log2,
  input  logic [8:0]        burst_len,     // beats per burst, 1..256
  input  logic [31:0]       num_bursts,
  output logic              busy,
  output logic              done,
  output logic [31:0]       beats,
  output logic [31:0]       cycles,
  output logic [63:0]       checksum,
  // read port
  output logic              req_valid,
  input  logic              req_ready,
  output bus_req_t          req,
  input  logic              dat_valid,
  output logic              dat_ready,
  input  bus_rdat_t         dat
);
  logic [31:0] issued, lfsr;
  logic [63:0] expected_beats;

  wire [ADDR_W-1:0] burst_bytes = ADDR_W'(burst_len) << 6;
  wire [ADDR_W-1:0] win_mask    = (ADDR_W'(1) << window_log2) - 1;
  wire [ADDR_W-1:0] rnd_off     = (ADDR_W'(lfsr) << 6) & win_mask;

  assign req_valid = busy && (issued != num_bursts);
  assign req.addr  = random_mode ? base + rnd_off : base + ADDR_W'(issued) * burst_bytes;
  assign req.len   = LEN_W'(burst_len - 1);
  assign dat_ready = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy           <= 1'b0;
      done           <= 1'b0;
      beats          <= '0;
      cycles         <= '0;
      checksum       <= '0;
      issued         <= '0;
      lfsr           <= 32'h1;
      expected_beats <= '0;
    end else if (start) begin
      busy           <= (num_bursts != 0);
      done           <= (num_bursts == 0);
      beats          <= '0;
      cycles         <= '0;
      checksum       <= '0;
      issued         <= '0;
      expected_beats <= 64'(num_bursts) * 64'(burst_len);
    end else if (busy) begin
      cycles <= cycles + 1;
      if (req_valid && req_ready) begin
        issued <= issued + 1;
        // Galois LFSR, taps 32,22,2,1
        lfsr   <= {1'b0, lfsr[31:1]} ^ (lfsr[0] ? 32'h8020_0003 : 32'h0);
      end
      if (dat_valid) begin
        beats    <= beats + 1;
        checksum <= checksum ^ dat.data[63:0];
        if (64'(beats) + 1 == expected_beats) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
