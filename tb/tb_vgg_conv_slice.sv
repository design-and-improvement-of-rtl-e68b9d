// tb_vgg_conv_slice: runs slices of VGG16 convolution layers through the
// accelerator at its default size, with the testbench acting as the host.
//
// For each case the testbench builds a random image (Cin channels, H x W,
// zero padding 1) and 16 random 3x3 filters, lays them out as GEMM operands
// (im2col: B row c*9 + ky*3 + kx, B column y*W + x; A row f holds filter f
// flattened in the same order), cuts the depth Cin*9 into chunks of 576
// (zero-padding the last chunk) and the pixels into tiles of 16 columns, runs
// the chunks on the two compute units in parallel, adds the chunks' partial
// results and compares every output pixel with a direct 3x3 convolution.
// Cases: Cin = 128 (as in layer 7: two depth chunks, one per unit), Cin = 64
// (layer 2: exactly one chunk) and Cin = 3 (layer 0: 27 values padded to 576).
module tb_vgg_conv_slice;
  import cnn_accel_pkg::*;
  localparam int NCU = 2, N = BLOCK, K = DEPTH, DW = DATA_W, SW = RES_SLOT, MW = MEM_W;
  localparam int EPB = MW / DW, RPB = MW / SW, WPR = K / EPB;
  localparam int BLK = N * WPR, CB = N * N / RPB, WORDS = 4096;
  localparam int H = 6, W = 6, P = H * W, TILES = (P + N - 1) / N;
  localparam int CMAX = 128;
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
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int dones [NCU];
  always @(posedge clk) if (rst_n) for (int u = 0; u < NCU; u++) if (done[u]) dones[u]++;

  logic signed [DW-1:0] img  [CMAX][H][W];
  logic signed [DW-1:0] filt [N][CMAX][3][3];
  localparam int A_BASE = 0, B_BASE = 300, C_BASE = 3000;

  function automatic logic [MW-1:0] get(input int u, input int word);
    return (u == 0) ? g_mem[0].mem.mem[word] : g_mem[1].mem.mem[word];
  endfunction

  task automatic put(input int u, input int word, input int lane, input logic [DW-1:0] v);
    logic [MW-1:0] x;
    x = get(u, word);
    x[lane*DW +: DW] = v;
    if (u == 0) g_mem[0].mem.mem[word] = x; else g_mem[1].mem.mem[word] = x;
  endtask

  // Image pixel with zero padding.
  function automatic logic signed [DW-1:0] pix(input int c, input int y, input int x);
    return (y < 0 || y >= H || x < 0 || x >= W) ? '0 : img[c][y][x];
  endfunction

  // Host side: im2col of depth chunk q into unit u's memory.
  task automatic load_chunk(input int u, input int q, input int cin);
    for (int r = 0; r < K; r++) begin
      int g, c, ky, kx;
      g = q * K + r;               // GEMM depth index
      c = g / 9; ky = (g % 9) / 3; kx = g % 3;
      for (int f = 0; f < N; f++)
        put(u, A_BASE + f * WPR + r / EPB, r % EPB, (c < cin) ? filt[f][c][ky][kx] : '0);
      for (int p = 0; p < TILES * N; p++) begin
        int y, x;
        y = p / W; x = p % W;
        put(u, B_BASE + p * WPR + r / EPB, r % EPB,
            (c < cin && p < P) ? pix(c, y + ky - 1, x + kx - 1) : '0);
      end
    end
  endtask

  task automatic issue(input int u);
    @(negedge clk);
    cmd[u] = '{a_base: ADDR_W'(A_BASE), b_base: ADDR_W'(B_BASE), c_base: ADDR_W'(C_BASE),
               n_tiles: NTILE_W'(TILES)};
    cmd_valid[u] = 1;
    @(negedge clk); cmd_valid[u] = 0;
  endtask

  task automatic run_case(input int cin);
    int chunks, d0, d1;
    longint outv;
    for (int c = 0; c < cin; c++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) img[c][y][x] = DW'($urandom);
    for (int f = 0; f < N; f++)
      for (int c = 0; c < cin; c++)
        for (int ky = 0; ky < 3; ky++)
          for (int kx = 0; kx < 3; kx++) filt[f][c][ky][kx] = DW'($urandom);
    chunks = (cin * 9 + K - 1) / K;
    d0 = dones[0]; d1 = dones[1];
    for (int q = 0; q < chunks; q++) load_chunk(q, q, cin);
    for (int q = 0; q < chunks; q++) issue(q);
    while (dones[0] == d0 || (chunks > 1 && dones[1] == d1)) @(posedge clk);
    for (int f = 0; f < N; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          longint ref_v;
          int p, t, idx;
          ref_v = 0;
          for (int c = 0; c < cin; c++)
            for (int ky = 0; ky < 3; ky++)
              for (int kx = 0; kx < 3; kx++)
                ref_v += longint'(filt[f][c][ky][kx]) * longint'(pix(c, y + ky - 1, x + kx - 1));
          p = y * W + x; t = p / N;
          idx = f * N + (p % N);
          outv = 0;
          for (int q = 0; q < chunks; q++)
            outv += longint'($signed(get(q, C_BASE + t * CB + idx / RPB)[(idx % RPB) * SW +: SW]));
          checks++;
          if (outv != ref_v) begin
            failures++;
            $display("Cin=%0d out[%0d][%0d][%0d] got %0d exp %0d", cin, f, y, x, outv, ref_v);
          end
        end
  endtask

  initial begin
    for (int u = 0; u < NCU; u++) begin cmd_valid[u] = 0; cmd[u] = '0; dones[u] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    run_case(128);
    run_case(64);
    run_case(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
