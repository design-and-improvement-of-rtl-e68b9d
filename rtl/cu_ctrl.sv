// cu_ctrl: sequencer of one matrix-multiply compute unit.
//
// A job names one A block (N x K, stored row by row), n_tiles B blocks (each
// stored as N rows of K, i.e. transposed) and where the n_tiles N x N results
// go. The sequencer runs the phases one after another, as the design's
// pipelined (not dataflow-overlapped) read, execute and write loops do:
//
//   LOAD_A   burst-read the A block into the A buffer, once per job (A is
//            reused for every column tile)
//   LOAD_B   burst-read the next B block into the B buffer
//   COMPUTE  clear the array, stream k = 0..K-1 out of both buffers into the
//            systolic array, then wait for the array to drain
//   CAPTURE  copy the accumulators into the result buffer
//   WRITE    burst-write the N x N result, then LOAD_B for the next tile or
//            finish
//
// Incoming beats are steered into the buffers with running (bank, word)
// counters: beat n of a block goes to bank n / WPR, word n % WPR, where WPR =
// K / EPB beats make up one row. COMPUTE lasts K + 2N - 1 cycles: one cycle of
// buffer read latency, K slices, and 2N - 2 cycles for the last slice to reach
// the far corner of the array; CAPTURE follows in the next cycle.
// feed_valid/feed_sel are aligned with the buffers' registered read data.
// cmd is accepted (cmd_valid && cmd_ready) only while idle; done pulses for one
// cycle at the end of the job.
module cu_ctrl
  import cnn_accel_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter int unsigned K     = 576,
  parameter int unsigned EPB   = 32,    // operands per memory beat
  parameter int unsigned RPB   = 8,     // results per memory beat
  parameter int unsigned CNT_W = 16,
  localparam int unsigned WPR    = K / EPB,          // beats per row
  localparam int unsigned BLK_BEATS = N * WPR,       // beats per input block
  localparam int unsigned C_BEATS   = (N * N) / RPB  // beats per result block
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // job command
  input  logic                       cmd_valid,
  output logic                       cmd_ready,
  input  job_t                       cmd,
  output logic                       busy,
  output logic                       done,
  output cu_state_e                  state,
  // burst reader
  output logic                       rd_start,
  output logic [ADDR_W-1:0]          rd_base,
  output logic [CNT_W-1:0]           rd_beats,
  input  logic                       rd_beat_valid,
  input  logic                       rd_done,
  // input buffers
  output logic                       we_a,
  output logic                       we_b,
  output logic [$clog2(N)-1:0]       wbank,
  output logic [$clog2(WPR)-1:0]     waddr,
  output logic [$clog2(WPR)-1:0]     raddr,
  output logic                       feed_valid,
  output logic [$clog2(EPB)-1:0]     feed_sel,
  // systolic array and result buffer
  output logic                       arr_clr,
  output logic                       capture,
  // burst writer
  output logic                       wr_start,
  output logic [ADDR_W-1:0]          wr_base,
  output logic [CNT_W-1:0]           wr_beats,
  input  logic                       wr_done
);

  localparam int unsigned COMPUTE_CYCLES = K + 2 * N - 1;
  localparam int unsigned T_W = $clog2(COMPUTE_CYCLES + 1);

  logic [ADDR_W-1:0]  a_base;
  logic [NTILE_W-1:0] tiles_left;
  logic [ADDR_W-1:0]  b_addr, c_addr;
  logic               rd_issued, wr_issued;
  logic [T_W-1:0]     t;          // cycle within COMPUTE
  logic [$clog2(WPR)-1:0] rword;  // read word counter
  logic [$clog2(EPB)-1:0] relem;  // element within the word
  logic               rd_en, rd_en_q;
  logic [$clog2(EPB)-1:0] relem_q;

  assign cmd_ready = (state == S_IDLE);
  assign busy      = (state != S_IDLE);

  // Reader / writer commands: one-cycle start on entering a load or write phase.
  assign rd_start = ((state == S_LOAD_A) || (state == S_LOAD_B)) && !rd_issued;
  assign rd_base  = (state == S_LOAD_A) ? a_base : b_addr;
  assign rd_beats = CNT_W'(BLK_BEATS);
  assign wr_start = (state == S_WRITE) && !wr_issued;
  assign wr_base  = c_addr;
  assign wr_beats = CNT_W'(C_BEATS);

  assign we_a = (state == S_LOAD_A) && rd_beat_valid;
  assign we_b = (state == S_LOAD_B) && rd_beat_valid;

  // Buffer read: slice k is read while t = k, in word k / EPB, element k % EPB.
  assign rd_en      = (state == S_COMPUTE) && (t < T_W'(K));
  assign raddr      = rword;
  assign feed_valid = rd_en_q;
  assign feed_sel   = relem_q;
  assign arr_clr    = (state == S_COMPUTE) && (t == '0);
  assign capture    = (state == S_CAPTURE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      a_base     <= '0;
      tiles_left <= '0;
      b_addr     <= '0;
      c_addr     <= '0;
      rd_issued  <= 1'b0;
      wr_issued  <= 1'b0;
      t          <= '0;
      rword      <= '0;
      relem      <= '0;
      rd_en_q    <= 1'b0;
      relem_q    <= '0;
      wbank      <= '0;
      waddr      <= '0;
      done       <= 1'b0;
    end else begin
      done    <= 1'b0;
      rd_en_q <= rd_en;
      relem_q <= relem;

      // Steer incoming beats: word within row, then next bank.
      if (rd_beat_valid) begin
        if (waddr == ($clog2(WPR))'(WPR - 1)) begin
          waddr <= '0;
          wbank <= wbank + 1'b1;
        end else begin
          waddr <= waddr + 1'b1;
        end
      end

      unique case (state)
        S_IDLE: begin
          if (cmd_valid) begin
            a_base     <= cmd.a_base;
            tiles_left <= cmd.n_tiles;
            b_addr     <= cmd.b_base;
            c_addr     <= cmd.c_base;
            rd_issued  <= 1'b0;
            wbank      <= '0;
            waddr      <= '0;
            state      <= S_LOAD_A;
          end
        end
        S_LOAD_A, S_LOAD_B: begin
          if (rd_start) rd_issued <= 1'b1;
          if (rd_done) begin
            rd_issued <= 1'b0;
            wbank     <= '0;
            waddr     <= '0;
            if (state == S_LOAD_A) begin
              state <= S_LOAD_B;
            end else begin
              state <= S_COMPUTE;
              t     <= '0;
              rword <= '0;
              relem <= '0;
            end
          end
        end
        S_COMPUTE: begin
          t <= t + 1'b1;
          if (rd_en) begin
            if (relem == ($clog2(EPB))'(EPB - 1)) begin
              relem <= '0;
              rword <= rword + 1'b1;
            end else begin
              relem <= relem + 1'b1;
            end
          end
          if (t == T_W'(COMPUTE_CYCLES - 1)) state <= S_CAPTURE;
        end
        S_CAPTURE: begin
          wr_issued <= 1'b0;
          state     <= S_WRITE;
        end
        S_WRITE: begin
          if (wr_start) wr_issued <= 1'b1;
          if (wr_done) begin
            wr_issued <= 1'b0;
            c_addr    <= c_addr + ADDR_W'(C_BEATS);
            b_addr    <= b_addr + ADDR_W'(BLK_BEATS);
            if (tiles_left <= NTILE_W'(1)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              tiles_left <= tiles_left - 1'b1;
              state      <= S_LOAD_B;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A job must cover at least one column tile.
  a_tiles: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid && cmd_ready |-> cmd.n_tiles != '0);

endmodule
