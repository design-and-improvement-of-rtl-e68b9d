// ddr_bank_model: behavioural model of one DDR bank behind a burst memory port.
//
// Not synthesizable; used only by testbenches in place of the board's DRAM and
// memory controller. Words are MEM_W-bit beats addressed by beat number. Read
// requests are queued and answered in order, one beat per cycle at most; a
// write burst takes its address, then its data beats, then returns one
// response. With STALL set, every ready/valid the model drives is withheld at
// random (about one cycle in four) to exercise the masters' flow control; the
// stall counters record how often that blocked a transfer.
module ddr_bank_model #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned LEN_W  = 8,
  parameter int unsigned MEM_W  = 512,
  parameter int unsigned WORDS  = 4096,
  parameter bit          STALL  = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ar_valid,
  output logic              ar_ready,
  input  logic [ADDR_W-1:0] ar_addr,
  input  logic [LEN_W-1:0]  ar_len,
  output logic              r_valid,
  input  logic              r_ready,
  output logic [MEM_W-1:0]  r_data,
  output logic              r_last,
  input  logic              aw_valid,
  output logic              aw_ready,
  input  logic [ADDR_W-1:0] aw_addr,
  input  logic [LEN_W-1:0]  aw_len,
  input  logic              w_valid,
  output logic              w_ready,
  input  logic [MEM_W-1:0]  w_data,
  input  logic              w_last,
  output logic              b_valid,
  input  logic              b_ready
);

  logic [MEM_W-1:0] mem [WORDS];

  int unsigned rd_q_addr [$];
  int unsigned rd_q_len  [$];
  int unsigned rd_addr, rd_left;   // current read burst
  bit          wr_active;
  int unsigned wr_addr, wr_left;
  int unsigned b_pending;

  int unsigned ar_bursts, aw_bursts, r_beats, w_beats;
  int unsigned ar_stalls, r_stalls, aw_stalls, w_stalls;
  int unsigned w_last_errors;

  function automatic bit coin();
    return STALL ? (($urandom % 4) != 0) : 1'b1;
  endfunction

  // Read data presented in the current cycle.
  always_comb begin
    r_data = (rd_left != 0 && rd_addr < WORDS) ? mem[rd_addr] : '0;
    r_last = (rd_left == 1);
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      ar_ready  <= 1'b0;
      r_valid   <= 1'b0;
      aw_ready  <= 1'b0;
      w_ready   <= 1'b0;
      b_valid   <= 1'b0;
      rd_q_addr.delete();
      rd_q_len.delete();
      rd_left   <= 0;
      wr_active <= 1'b0;
      wr_left   <= 0;
      b_pending <= 0;
      ar_bursts <= 0; aw_bursts <= 0; r_beats <= 0; w_beats <= 0;
      ar_stalls <= 0; r_stalls <= 0; aw_stalls <= 0; w_stalls <= 0;
      w_last_errors <= 0;
    end else begin
      // --- read address
      if (ar_valid && ar_ready) begin
        rd_q_addr.push_back(ar_addr);
        rd_q_len.push_back(int'(ar_len) + 1);
        ar_bursts <= ar_bursts + 1;
      end else if (ar_valid) begin
        ar_stalls <= ar_stalls + 1;
      end
      ar_ready <= coin();

      // --- read data
      if (r_valid && r_ready) begin
        r_beats <= r_beats + 1;
        if (rd_left == 1 && rd_q_addr.size() != 0) begin
          rd_addr <= rd_q_addr.pop_front();
          rd_left <= rd_q_len.pop_front();
        end else begin
          rd_addr <= rd_addr + 1;
          rd_left <= rd_left - 1;
        end
      end else if (rd_left == 0 && rd_q_addr.size() != 0) begin
        rd_addr <= rd_q_addr.pop_front();
        rd_left <= rd_q_len.pop_front();
      end
      if (rd_left != 0 && !r_valid) r_stalls <= r_stalls + 1;
      r_valid <= 1'b0;
      if (coin()) begin
        // valid next cycle if a beat will be available then
        if (r_valid && r_ready) r_valid <= (rd_left > 1) || (rd_q_addr.size() != 0);
        else                    r_valid <= (rd_left != 0) || (rd_q_addr.size() != 0);
      end

      // --- write address and data
      if (aw_valid && aw_ready) begin
        wr_active <= 1'b1;
        wr_addr   <= aw_addr;
        wr_left   <= int'(aw_len) + 1;
        aw_bursts <= aw_bursts + 1;
      end else if (aw_valid && !wr_active) begin
        aw_stalls <= aw_stalls + 1;
      end
      if (w_valid && w_ready) begin
        if (wr_addr < WORDS) mem[wr_addr] <= w_data;
        wr_addr <= wr_addr + 1;
        wr_left <= wr_left - 1;
        w_beats <= w_beats + 1;
        if (w_last != (wr_left == 1)) w_last_errors <= w_last_errors + 1;
        if (wr_left == 1) begin
          wr_active <= 1'b0;
          b_pending <= b_pending + 1 - ((b_valid && b_ready) ? 1 : 0);
        end else if (b_valid && b_ready) begin
          b_pending <= b_pending - 1;
        end
      end else begin
        if (w_valid && wr_active) w_stalls <= w_stalls + 1;
        if (b_valid && b_ready) b_pending <= b_pending - 1;
      end
      aw_ready <= !wr_active && !(aw_valid && aw_ready) && coin();
      w_ready  <= (wr_active || (aw_valid && aw_ready)) && !(w_valid && w_ready && wr_left == 1) && coin();

      // --- write response
      b_valid <= 1'b0;
      if (coin()) begin
        if (b_valid && b_ready) b_valid <= (b_pending > 1) || (w_valid && w_ready && wr_left == 1);
        else                    b_valid <= (b_pending != 0) || (w_valid && w_ready && wr_left == 1);
      end
    end
  end

endmodule
