// burst_reader: read master that fetches a contiguous run of memory beats.
//
// start loads a base address and a beat count. The reader cuts the run into
// bursts of at most MAX_BURST beats (the last one may be shorter) and issues
// their read requests on the address channel (ar_*), back to back, without
// waiting for data: several bursts may be outstanding. Data returns on the
// r_* channel in request order; each beat is passed on at once as
// out_valid/out_data (the consumer cannot stall, the on-chip buffer always
// accepts a beat). done pulses for one cycle after the last beat.
//
// Channel rules (AXI-like valid/ready): a request is taken in a cycle with
// ar_valid && ar_ready, and ar_addr/ar_len stay stable while ar_valid waits;
// a data beat is taken in a cycle with r_valid && r_ready. Addresses count
// memory beats. ar_len is the burst length minus one. Burst transfers follow
// the design; the channel format and burst length are this implementation's.
module burst_reader #(
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
  // read address channel
  output logic              ar_valid,
  input  logic              ar_ready,
  output logic [ADDR_W-1:0] ar_addr,
  output logic [LEN_W-1:0]  ar_len,
  // read data channel
  input  logic              r_valid,
  output logic              r_ready,
  input  logic [MEM_W-1:0]  r_data,
  input  logic              r_last,
  // beats delivered to the consumer
  output logic              out_valid,
  output logic [MEM_W-1:0]  out_data
);

  logic [CNT_W-1:0]  req_left;   // beats not yet requested
  logic [CNT_W-1:0]  data_left;  // beats not yet received
  logic [ADDR_W-1:0] next_addr;
  logic [CNT_W-1:0]  this_len;

  assign this_len = (req_left > CNT_W'(MAX_BURST)) ? CNT_W'(MAX_BURST) : req_left;

  assign ar_valid  = busy && (req_left != '0);
  assign ar_addr   = next_addr;
  assign ar_len    = LEN_W'(this_len - 1'b1);
  assign r_ready   = busy;
  assign out_valid = r_valid && r_ready;
  assign out_data  = r_data;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      req_left  <= '0;
      data_left <= '0;
      next_addr <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy      <= 1'b1;
          req_left  <= beats;
          data_left <= beats;
          next_addr <= base;
        end
      end else begin
        if (ar_valid && ar_ready) begin
          req_left  <= req_left - this_len;
          next_addr <= next_addr + ADDR_W'(this_len);
        end
        if (out_valid) begin
          data_left <= data_left - 1'b1;
          if (data_left == CNT_W'(1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  // r_last is not needed: beats are counted. It is kept for the channel's sake.
  logic unused_last;
  assign unused_last = r_last;

  // A pending request must not change until it is accepted.
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
    ar_valid && !ar_ready |=> ar_valid && $stable(ar_addr) && $stable(ar_len));
  // No data may arrive that was not requested.
  a_no_spurious_data: assert property (@(posedge clk) disable iff (!rst_n)
    r_valid |-> busy);

endmodule
