// mmult_cu: one matrix-multiply compute unit of the convolution accelerator.
//
// It computes C = A x B for one N x K block of A (N filters, K = channels *
// kernel height * kernel width values each) and n_tiles K x N blocks of B
// (N image columns each), giving n_tiles N x N result blocks. A stays in its
// buffer for the whole job, so it is read from memory once and reused for
// every column tile.
//
// Parts: burst_reader (memory to the partitioned A/B tile buffers),
// tile_buffer x2 (one bank per row of A / per column of B), systolic_array
// (N x N multiply-accumulate PEs), result_buffer (local copy of the N x N
// result), burst_writer (result back to memory) and cu_ctrl (phase sequencer).
// The operand of slice k for row i is element k % EPB of beat k / EPB of bank
// i. Memory layout, in beats of MEM_W bits: A row i at a_base + i*K/EPB; B
// tile t column j at b_base + (t*N + j)*K/EPB; C tile t at c_base +
// t*N*N/RPB, row-major, RES_SLOT-bit signed slots.
//
// Per column tile: N*K/EPB beats read, K + 2N cycles of computing and
// capture, N*N/RPB beats written, plus memory latency; A costs another
// N*K/EPB beats once per job. The phases do not overlap.
//
// Following the design: the 16 x 576 by 576 x 16 block product, the 16 x 16
// systolic array, partitioned on-chip buffers, burst transfers, transposed B
// and sequential (not overlapped) phases. This implementation's own choices:
// the number format, the 512-bit beat, the burst channels, the job format
// with A reuse across tiles and the memory layout above.
module mmult_cu
  import cnn_accel_pkg::*;
#(
  parameter int unsigned N         = BLOCK,
  parameter int unsigned K         = DEPTH,
  parameter int unsigned D_W       = DATA_W,
  parameter int unsigned A_W       = ACC_W,
  parameter int unsigned SLOT_W    = RES_SLOT,
  parameter int unsigned M_W       = MEM_W,
  parameter int unsigned BURST     = MAX_BURST
) (
  input  logic              clk,
  input  logic              rst_n,
  // job command
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  job_t              cmd,
  output logic              busy,
  output logic              done,
  // memory port: read address / data
  output logic              ar_valid,
  input  logic              ar_ready,
  output logic [ADDR_W-1:0] ar_addr,
  output logic [LEN_W-1:0]  ar_len,
  input  logic              r_valid,
  output logic              r_ready,
  input  logic [M_W-1:0]    r_data,
  input  logic              r_last,
  // memory port: write address / data / response
  output logic              aw_valid,
  input  logic              aw_ready,
  output logic [ADDR_W-1:0] aw_addr,
  output logic [LEN_W-1:0]  aw_len,
  output logic              w_valid,
  input  logic              w_ready,
  output logic [M_W-1:0]    w_data,
  output logic              w_last,
  input  logic              b_valid,
  output logic              b_ready
);

  localparam int unsigned EPB     = M_W / D_W;
  localparam int unsigned RPB     = M_W / SLOT_W;
  localparam int unsigned WPR     = K / EPB;
  localparam int unsigned C_BEATS = (N * N) / RPB;
  localparam int unsigned CNT_W   = 16;

  if (K % EPB != 0 || WPR < 2) begin : g_bad_k
    $error("mmult_cu: K must be a multiple of M_W/D_W, at least two beats");
  end
  if ((N * N) % RPB != 0) begin : g_bad_n
    $error("mmult_cu: N*N must be a multiple of M_W/SLOT_W");
  end

  cu_state_e              state;
  logic                   rd_start, rd_done, rd_busy, beat_valid;
  logic [ADDR_W-1:0]      rd_base;
  logic [CNT_W-1:0]       rd_beats;
  logic [M_W-1:0]         beat_data;
  logic                   we_a, we_b;
  logic [$clog2(N)-1:0]   wbank;
  logic [$clog2(WPR)-1:0] waddr, raddr;
  logic                   feed_valid;
  logic [$clog2(EPB)-1:0] feed_sel;
  logic                   arr_clr, capture;
  logic                   wr_start, wr_done, wr_busy;
  logic [ADDR_W-1:0]      wr_base;
  logic [CNT_W-1:0]       wr_beats, src_beat;
  logic [M_W-1:0]         src_data;

  logic [M_W-1:0]           a_word [N];
  logic [M_W-1:0]           b_word [N];
  logic signed [D_W-1:0]    a_col  [N];
  logic signed [D_W-1:0]    b_row  [N];
  logic signed [A_W-1:0]    acc    [N][N];

  cu_ctrl #(.N(N), .K(K), .EPB(EPB), .RPB(RPB), .CNT_W(CNT_W)) u_ctrl (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd, .busy, .done, .state,
    .rd_start, .rd_base, .rd_beats, .rd_beat_valid(beat_valid), .rd_done,
    .we_a, .we_b, .wbank, .waddr, .raddr, .feed_valid, .feed_sel,
    .arr_clr, .capture,
    .wr_start, .wr_base, .wr_beats, .wr_done
  );

  burst_reader #(.ADDR_W(ADDR_W), .LEN_W(LEN_W), .CNT_W(CNT_W), .MEM_W(M_W),
                 .MAX_BURST(BURST)) u_reader (
    .clk, .rst_n,
    .start(rd_start), .base(rd_base), .beats(rd_beats), .busy(rd_busy), .done(rd_done),
    .ar_valid, .ar_ready, .ar_addr, .ar_len,
    .r_valid, .r_ready, .r_data, .r_last,
    .out_valid(beat_valid), .out_data(beat_data)
  );

  tile_buffer #(.BANKS(N), .WORDS(WPR), .WORD_W(M_W)) u_abuf (
    .clk, .we(we_a), .wbank, .waddr, .wdata(beat_data), .raddr, .rdata(a_word)
  );

  tile_buffer #(.BANKS(N), .WORDS(WPR), .WORD_W(M_W)) u_bbuf (
    .clk, .we(we_b), .wbank, .waddr, .wdata(beat_data), .raddr, .rdata(b_word)
  );

  // Pick operand feed_sel out of each bank's beat; zeros outside the window.
  always_comb begin
    for (int r = 0; r < N; r++) begin
      a_col[r] = feed_valid ? a_word[r][feed_sel*D_W +: D_W] : '0;
      b_row[r] = feed_valid ? b_word[r][feed_sel*D_W +: D_W] : '0;
    end
  end

  systolic_array #(.N(N), .DATA_W(D_W), .ACC_W(A_W)) u_array (
    .clk, .rst_n, .clr(arr_clr), .a_col, .b_row, .acc
  );

  result_buffer #(.N(N), .ACC_W(A_W), .RES_SLOT(SLOT_W), .MEM_W(M_W)) u_rbuf (
    .clk, .capture, .acc_in(acc),
    .rd_beat($clog2(C_BEATS + 1)'(src_beat)), .rd_data(src_data)
  );

  burst_writer #(.ADDR_W(ADDR_W), .LEN_W(LEN_W), .CNT_W(CNT_W), .MEM_W(M_W),
                 .MAX_BURST(BURST)) u_writer (
    .clk, .rst_n,
    .start(wr_start), .base(wr_base), .beats(wr_beats), .busy(wr_busy), .done(wr_done),
    .src_beat, .src_data,
    .aw_valid, .aw_ready, .aw_addr, .aw_len,
    .w_valid, .w_ready, .w_data, .w_last,
    .b_valid, .b_ready
  );

  // Reader and writer status and the phase are kept for debug only.
  logic unused_status;
  assign unused_status = rd_busy ^ wr_busy ^ (^state) ^ (^src_beat[CNT_W-1:$clog2(C_BEATS + 1)]);

endmodule
