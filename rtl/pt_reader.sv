// pt_reader: page table buffer reader.
//
// Given a byte address (8-byte aligned) and a number of 64-bit entries, it
// reads the covering 64-byte beats from memory with bursts of up to MAX_BURST
// beats and streams the entries out one per cycle, the final one flagged
// 'last'. It reads ahead: bursts are issued as long as the beat buffer
// (BUF_BEATS deep) has room for every beat already requested, so the bus
// never has to wait on this unit and page table scans run close to one entry
// per cycle. One command is handled at a time; cmd_ready is high when the
// previous stream has been fully delivered. Burst size and buffer depth are
// this design's choices.
module pt_reader
  import vm_pkg::*;
#(
  parameter int unsigned MAX_BURST = 16,
  parameter int unsigned BUF_BEATS = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  logic [ADDR_W-1:0] cmd_addr,
  input  logic [31:0]       cmd_count,
  // stream of entries
  output logic              ent_valid,
  input  logic              ent_ready,
  output logic [PTE_W-1:0]  ent_data,
  output logic              ent_last,
  // read bus master
  output logic              rd_req_valid,
  input  logic              rd_req_ready,
  output bus_req_t          rd_req,
  input  logic              rd_dat_valid,
  output logic              rd_dat_ready,
  input  bus_rdat_t         rd_dat
);
  localparam int unsigned CW = $clog2(BUF_BEATS + 1);

  logic              busy;
  logic [ADDR_W-1:0] next_addr;
  logic [31:0]       beats_left;    // beats still to request
  logic [31:0]       ents_left;     // entries still to deliver
  logic [2:0]        word;          // word within the head beat
  logic [CW-1:0]     inflight;      // beats requested, not yet popped
  logic              fq_valid;
  bus_rdat_t         fq_data;
  logic [CW-1:0]     fq_count;

  logic              take, pop_beat, req_fire;

  assign cmd_ready = !busy;

  // burst length for the next request
  logic [31:0] burst;
  always_comb begin
    burst = (beats_left > 32'(MAX_BURST)) ? 32'(MAX_BURST) : beats_left;
  end

  assign rd_req_valid = busy && (beats_left != 0) &&
                        (32'(inflight) + burst <= 32'(BUF_BEATS));
  assign rd_req.addr  = next_addr;
  assign rd_req.len   = LEN_W'(burst - 1);

  stream_fifo #(.T(bus_rdat_t), .DEPTH(BUF_BEATS)) u_buf (
    .clk, .rst_n,
    .in_valid(rd_dat_valid), .in_ready(rd_dat_ready), .in_data(rd_dat),
    .out_valid(fq_valid), .out_ready(pop_beat), .out_data(fq_data), .count(fq_count)
  );

  assign ent_valid = busy && fq_valid && (ents_left != 0);
  assign ent_data  = fq_data.data[word*PTE_W +: PTE_W];
  assign ent_last  = (ents_left == 1);

  assign take     = ent_valid && ent_ready;
  assign pop_beat = take && ((word == 3'd7) || ent_last);
  assign req_fire = rd_req_valid && rd_req_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      next_addr  <= '0;
      beats_left <= '0;
      ents_left  <= '0;
      word       <= '0;
      inflight   <= '0;
    end else begin
      if (!busy && cmd_valid && cmd_count != 0) begin
        busy       <= 1'b1;
        next_addr  <= {cmd_addr[ADDR_W-1:6], 6'd0};
        beats_left <= (32'(cmd_addr[5:3]) + cmd_count + 32'd7) >> 3;
        ents_left  <= cmd_count;
        word       <= cmd_addr[5:3];
      end else begin
        if (req_fire) begin
          next_addr  <= next_addr + (ADDR_W'(burst) << 6);
          beats_left <= beats_left - burst;
        end
        if (take) begin
          ents_left <= ents_left - 1'b1;
          word      <= word + 1'b1;
          if (ent_last) busy <= 1'b0;
        end
      end
      inflight <= inflight + (req_fire ? CW'(burst) : '0) - (pop_beat ? 1'b1 : 1'b0);
    end
  end

  a_buffer_absorbs: assert property (@(posedge clk) disable iff (!rst_n) rd_dat_valid |-> rd_dat_ready);
endmodule
