// burst_writer: write master that stores a contiguous run of memory beats.
//
// start loads a base address and a beat count. The writer cuts the run into
// bursts of at most MAX_BURST beats. For each burst it sends the address and
// length on aw_*, then the burst's data beats on w_* (w_last on the final one),
// then moves on to the next burst without waiting for its write response;
// responses (b_*) are counted and done pulses once every burst is acknowledged.
// Beat n of the run is fetched from the data source through src_beat/src_data
// (combinational read, e.g. result_buffer). Channel rules are AXI-like
// valid/ready with the payload held stable while valid waits. Addresses count
// memory beats; aw_len is the burst length minus one. Bursting the write-back
// follows the design; the channel format is this implementation's choice.
module burst_writer #(
  parameter int unsigned ADDR_W    = 32,
  parameter int unsigned LEN_W     = 8,
  parameter int unsigned CNT_W     = 16,
  parameter int unsigned MEM_W     = 512,
  parameter int unsigned MAX_BURST = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // command
  input  logic              start,
  input  logic [ADDR_W-1:0] base,
  input  logic [CNT_W-1:0]  beats,      // >= 1
  output logic              busy,
  output logic              done,
  // data source
  output logic [CNT_W-1:0]  src_beat,
  input  logic [MEM_W-1:0]  src_data,
  // write address channel
  output logic              aw_valid,
  input  logic              aw_ready,
  output logic [ADDR_W-1:0] aw_addr,
  output logic [LEN_W-1:0]  aw_len,
  // write data channel
  output logic              w_valid,
  input  logic              w_ready,
  output logic [MEM_W-1:0]  w_data,
  output logic              w_last,
  // write response channel
  input  logic              b_valid,
  output logic              b_ready
);

  logic              in_data;     // 0: address phase, 1: data phase of a burst
  logic [CNT_W-1:0]  beats_left;  // beats not yet sent
  logic [CNT_W-1:0]  burst_left;  // beats left in the current burst
  logic [CNT_W-1:0]  resp_left;   // responses still expected
  logic [CNT_W-1:0]  beat_idx;
  logic [ADDR_W-1:0] next_addr;
  logic [CNT_W-1:0]  this_len;

  assign this_len = (beats_left > CNT_W'(MAX_BURST)) ? CNT_W'(MAX_BURST) : beats_left;

  assign aw_valid = busy && !in_data && (beats_left != '0);
  assign aw_addr  = next_addr;
  assign aw_len   = LEN_W'(this_len - 1'b1);
  assign w_valid  = busy && in_data;
  assign w_data   = src_data;
  assign w_last   = (burst_left == CNT_W'(1));
  assign src_beat = beat_idx;
  assign b_ready  = busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      in_data    <= 1'b0;
      beats_left <= '0;
      burst_left <= '0;
      resp_left  <= '0;
      beat_idx   <= '0;
      next_addr  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy       <= 1'b1;
          in_data    <= 1'b0;
          beats_left <= beats;
          resp_left  <= CNT_W'((int'(beats) + MAX_BURST - 1) / MAX_BURST);
          beat_idx   <= '0;
          next_addr  <= base;
        end
      end else begin
        if (aw_valid && aw_ready) begin
          in_data    <= 1'b1;
          burst_left <= this_len;
          next_addr  <= next_addr + ADDR_W'(this_len);
        end
        if (w_valid && w_ready) begin
          beat_idx   <= beat_idx + 1'b1;
          beats_left <= beats_left - 1'b1;
          burst_left <= burst_left - 1'b1;
          if (w_last) in_data <= 1'b0;
        end
        if (b_valid && b_ready) begin
          resp_left <= resp_left - 1'b1;
          if (resp_left == CNT_W'(1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
    aw_valid && !aw_ready |=> aw_valid && $stable(aw_addr) && $stable(aw_len));
  a_w_stable: assert property (@(posedge clk) disable iff (!rst_n)
    w_valid && !w_ready |=> w_valid && $stable(w_data) && $stable(w_last));

endmodule
