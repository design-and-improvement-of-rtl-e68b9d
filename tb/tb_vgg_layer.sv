// tb_vgg_layer: one complete VGG16 convolution layer on the accelerator at its
// default size, with the testbench acting as the host.
//
// The layer is VGG16's layer 24 (512 input and 512 output channels, 14 x 14
// pixels, 3x3 filters, zero padding 1); the other layers differ only in these
// sizes. The host work is done here: im2col, cutting the filter matrix into
// 32 groups of 16 filters and the depth 4608 into 8 chunks of 576, the pixels
// into 13 tiles of 16 (the last one padded), and spreading the 256 jobs over
// the two compute units (even filter groups on unit 0, odd on unit 1), each
// with its operands in its own memory bank. A new job is handed to a unit as
// soon as it is ready. The partial results of the 8 chunks are added here and
// every one of the 512 x 196 outputs is compared with a direct convolution.
// Operands are random 8-bit values, as from a quantised model. The run time
// of the layer in cycles is printed.
module tb_vgg_layer;
  import cnn_accel_pkg::*;
  localparam int NCU = 2, N = BLOCK, K = DEPTH, DW = DATA_W, SW = RES_SLOT, MW = MEM_W;
  localparam int EPB = MW / DW, RPB = MW / SW, WPR = K / EPB;
  localparam int BLK = N * WPR, CB = N * N / RPB;
  localparam int CIN = 512, COUT = 512, H = 14, W = 14, P = H * W;
  localparam int TILES = (P + N - 1) / N, GROUPS = COUT / N, CHUNKS = (CIN * 9 + K - 1) / K;
  localparam int JOBS_PER_CU = GROUPS / NCU * CHUNKS;
  localparam int A_BASE = 0;
  localparam int B_BASE = A_BASE + JOBS_PER_CU * BLK;
  localparam int C_BASE = B_BASE + CHUNKS * TILES * N * WPR;
  localparam int WORDS  = C_BASE + JOBS_PER_CU * TILES * CB;
  logic clk = 0, rst_n = 0;
  logic cmd_valid [NCU], cmd_ready [NCU], busy [NCU], done [NCU];
  job_t cmd [NCU];
  logic ar_valid [NCU], ar_ready [NCU], r_valid [NCU], r_ready [NCU], r_last [NCU];
  logic [ADDR_W-1:0] ar_addr [NCU], aw_addr [NCU];
  logic [LEN_W-1:0] ar_len [NCU], aw_len [NCU];
  logic [MW-1:0] r_data [NCU], w_data [NCU];
  logic aw_valid [NCU], aw_ready [NCU], w_valid [NCU], w_ready [NCU], w_last [NCU];
  logic b_valid [NCU], b_ready [NCU];
  int checks = 0, failures = 0;

  accel_top dut (.*);

  for (genvar u = 0; u < NCU; u++) begin : g_mem
    ddr_bank_model #(.ADDR_W(ADDR_W), .LEN_W(LEN_W), .MEM_W(MW), .WORDS(WORDS)) mem (
      .clk, .rst_n,
      .ar_valid(ar_valid[u]), .ar_ready(ar_ready[u]), .ar_addr(ar_addr[u]), .ar_len(ar_len[u]),
      .r_valid(r_valid[u]), .r_ready(r_ready[u]), .r_data(r_data[u]), .r_last(r_last[u]),
      .aw_valid(aw_valid[u]), .aw_ready(aw_ready[u]), .aw_addr(aw_addr[u]), .aw_len(aw_len[u]),
      .w_valid(w_valid[u]), .w_ready(w_ready[u]), .w_data(w_data[u]), .w_last(w_last[u]),
      .b_valid(b_valid[u]), .b_ready(b_ready[u]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [7:0] img  [CIN][H][W];
  logic signed [7:0] filt [COUT][CIN * 9];   // flattened c*9 + ky*3 + kx

  function automatic logic signed [DW-1:0] pix(input int c, input int y, input int x);
    return (y < 0 || y >= H || x < 0 || x >= W) ? '0 : DW'(img[c][y][x]);
  endfunction

  // im2col entry: depth index g, pixel p.
  function automatic logic signed [DW-1:0] bval(input int g, input int p);
    int c, ky, kx;
    c = g / 9; ky = (g % 9) / 3; kx = g % 3;
    if (g >= CIN * 9 || p >= P) return '0;
    return pix(c, p / W + ky - 1, p % W + kx - 1);
  endfunction

  function automatic logic signed [DW-1:0] aval(input int f, input int g);
    return (g >= CIN * 9) ? '0 : DW'(filt[f][g]);
  endfunction

  task automatic wr(input int u, input int word, input logic [MW-1:0] v);
    if (u == 0) g_mem[0].mem.mem[word] = v; else g_mem[1].mem.mem[word] = v;
  endtask

  function automatic logic [MW-1:0] rd(input int u, input int word);
    return (u == 0) ? g_mem[0].mem.mem[word] : g_mem[1].mem.mem[word];
  endfunction

  // Job n of unit u: filter group g = n / CHUNKS * NCU + u, depth chunk q = n % CHUNKS.
  task automatic load_memories();
    logic [MW-1:0] beat;
    for (int u = 0; u < NCU; u++) begin
      for (int n = 0; n < JOBS_PER_CU; n++) begin
        int g, q;
        g = n / CHUNKS * NCU + u; q = n % CHUNKS;
        for (int i = 0; i < N; i++)
          for (int w = 0; w < WPR; w++) begin
            for (int e = 0; e < EPB; e++) beat[e*DW +: DW] = aval(g * N + i, q * K + w * EPB + e);
            wr(u, A_BASE + n * BLK + i * WPR + w, beat);
          end
      end
      for (int q = 0; q < CHUNKS; q++)
        for (int p = 0; p < TILES * N; p++)
          for (int w = 0; w < WPR; w++) begin
            for (int e = 0; e < EPB; e++) beat[e*DW +: DW] = bval(q * K + w * EPB + e, p);
            wr(u, B_BASE + (q * TILES * N + p) * WPR + w, beat);
          end
    end
  endtask

  // Host dispatch: hand each unit its next job whenever it is ready.
  int issued [NCU], finished [NCU];
  always @(posedge clk) if (rst_n) for (int u = 0; u < NCU; u++) if (done[u]) finished[u]++;

  always @(negedge clk) begin
    for (int u = 0; u < NCU; u++) begin
      cmd_valid[u] = 1'b0;
      if (rst_n && cmd_ready[u] && issued[u] < JOBS_PER_CU && issued[u] == finished[u]) begin
        int n, q;
        n = issued[u]; q = n % CHUNKS;
        cmd[u] = '{a_base: ADDR_W'(A_BASE + n * BLK),
                   b_base: ADDR_W'(B_BASE + q * TILES * N * WPR),
                   c_base: ADDR_W'(C_BASE + n * TILES * CB),
                   n_tiles: NTILE_W'(TILES)};
        cmd_valid[u] = 1'b1;
        issued[u]++;
      end
    end
  end

  int t_start, t_end, cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    for (int u = 0; u < NCU; u++) begin
      cmd_valid[u] = 0; cmd[u] = '0; issued[u] = 0; finished[u] = 0;
    end
    for (int c = 0; c < CIN; c++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) img[c][y][x] = 8'($urandom);
    for (int f = 0; f < COUT; f++)
      for (int g = 0; g < CIN * 9; g++) filt[f][g] = 8'($urandom);
    load_memories();
    repeat (3) @(posedge clk);
    rst_n = 1;
    t_start = cyc;
    while (finished[0] < JOBS_PER_CU || finished[1] < JOBS_PER_CU) @(posedge clk);
    t_end = cyc;
    // Host: add the chunks' partial results and compare with a direct convolution.
    for (int f = 0; f < COUT; f++) begin
      int u, gl;
      u = (f / N) % NCU; gl = (f / N) / NCU;
      for (int p = 0; p < P; p++) begin
        longint got, ref_v;
        int idx;
        idx = (f % N) * N + (p % N);
        got = 0;
        for (int q = 0; q < CHUNKS; q++)
          got += longint'($signed(rd(u, C_BASE + (gl * CHUNKS + q) * TILES * CB + (p / N) * CB
                                         + idx / RPB)[(idx % RPB) * SW +: SW]));
        ref_v = 0;
        for (int g = 0; g < CIN * 9; g++) ref_v += longint'(filt[f][g]) * longint'(bval(g, p));
        checks++;
        if (got != ref_v) begin
          failures++;
          if (failures < 10) $display("out[%0d][%0d] got %0d exp %0d", f, p, got, ref_v);
        end
      end
    end
    $display("layer %0dx%0dx%0d -> %0d: %0d jobs, %0d block products, %0d cycles",
             CIN, H, W, COUT, NCU * JOBS_PER_CU, NCU * JOBS_PER_CU * TILES, t_end - t_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
