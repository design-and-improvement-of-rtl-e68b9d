// tb_accel_top: end-to-end test of the whole accelerator at its default size.
// Two compute units (16 x 16 array, K = 576, 512-bit beats) each get their own
// randomly stalling DDR bank model. Unit 0 runs a job of two column tiles and
// then a second job; unit 1 runs a job of three column tiles, started while
// unit 0 is busy. Every result is compared with A x B computed here. The
// testbench counts the mechanisms the design relies on and fails if one never
// happened: both units busy at once, A reused across column tiles, several
// bursts per block, stalls on read and write channels, back-to-back jobs on
// one unit, and negative results (sign extension into the 64-bit slots).
module tb_accel_top;
  import cnn_accel_pkg::*;
  localparam int NCU = 2, N = BLOCK, K = DEPTH, DW = DATA_W, SW = RES_SLOT, MW = MEM_W;
  localparam int EPB = MW / DW, RPB = MW / SW, WPR = K / EPB;
  localparam int BLK = N * WPR, CB = N * N / RPB, WORDS = 4096;
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Mechanism counters.
  int both_busy = 0, negatives = 0, back_to_back = 0, a_reuse = 0, multi_burst = 0;
  int dones [NCU];
  always @(posedge clk) if (rst_n) begin
    if (busy[0] && busy[1]) both_busy++;
    for (int u = 0; u < NCU; u++) if (done[u]) dones[u]++;
  end

  // Per-unit memory images of the operands (filled by prepare).
  logic signed [DW-1:0] A [NCU][N][K];
  logic signed [DW-1:0] B [NCU][3][K][N];

  task automatic put(input int u, input int word, input int lane, input logic [DW-1:0] v);
    logic [MW-1:0] x;
    if (u == 0) x = g_mem[0].mem.mem[word]; else x = g_mem[1].mem.mem[word];
    x[lane*DW +: DW] = v;
    if (u == 0) g_mem[0].mem.mem[word] = x; else g_mem[1].mem.mem[word] = x;
  endtask

  function automatic logic [MW-1:0] get(input int u, input int word);
    return (u == 0) ? g_mem[0].mem.mem[word] : g_mem[1].mem.mem[word];
  endfunction

  task automatic prepare(input int u, input int a_base, input int b_base, input int tiles);
    for (int i = 0; i < N; i++)
      for (int k = 0; k < K; k++) begin
        A[u][i][k] = DW'($urandom);
        put(u, a_base + i * WPR + k / EPB, k % EPB, A[u][i][k]);
      end
    for (int t = 0; t < tiles; t++)
      for (int j = 0; j < N; j++)
        for (int k = 0; k < K; k++) begin
          B[u][t][k][j] = DW'($urandom);
          put(u, b_base + (t * N + j) * WPR + k / EPB, k % EPB, B[u][t][k][j]);
        end
  endtask

  task automatic verify(input int u, input int c_base, input int tiles);
    for (int t = 0; t < tiles; t++)
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          longint c;
          int idx;
          logic [SW-1:0] got;
          c = 0;
          for (int k = 0; k < K; k++) c += longint'(A[u][i][k]) * longint'(B[u][t][k][j]);
          if (c < 0) negatives++;
          idx = i * N + j;
          got = get(u, c_base + t * CB + idx / RPB)[(idx % RPB) * SW +: SW];
          checks++;
          if (got !== SW'(c)) begin
            failures++;
            $display("unit %0d tile %0d C[%0d][%0d] got %0d exp %0d", u, t, i, j, $signed(got), c);
          end
        end
  endtask

  task automatic issue(input int u, input int a_base, input int b_base, input int c_base,
                       input int tiles);
    @(negedge clk);
    check(cmd_ready[u], "unit ready for a job");
    cmd[u] = '{a_base: ADDR_W'(a_base), b_base: ADDR_W'(b_base), c_base: ADDR_W'(c_base),
               n_tiles: NTILE_W'(tiles)};
    cmd_valid[u] = 1;
    @(negedge clk); cmd_valid[u] = 0;
  endtask

  int cycles0, ar0;

  initial begin
    for (int u = 0; u < NCU; u++) begin
      cmd_valid[u] = 0; cmd[u] = '0; dones[u] = 0;
    end
    prepare(0, 0, 300, 2);
    prepare(1, 0, 300, 3);
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // Unit 0: two tiles; unit 1 starts a few cycles later with three tiles.
    issue(0, 0, 300, 1000, 2);
    repeat (10) @(posedge clk);
    issue(1, 0, 300, 1500, 3);
    while (dones[0] < 1) @(posedge clk);
    verify(0, 1000, 2);
    check(g_mem[0].mem.ar_bursts == 3 * BLK / MAX_BURST, "unit 0 read A once and B twice");
    if (g_mem[0].mem.ar_bursts == 3 * BLK / MAX_BURST) a_reuse++;
    if (g_mem[0].mem.ar_bursts > 3) multi_burst++;

    // Unit 0: second job right away, with fresh operands at new addresses.
    ar0 = g_mem[0].mem.ar_bursts;
    prepare(0, 2000, 2300, 1);
    issue(0, 2000, 2300, 3000, 1);
    if (busy[1]) back_to_back++;
    while (dones[0] < 2 || dones[1] < 1) @(posedge clk);
    verify(0, 3000, 1);
    verify(1, 1500, 3);
    check(g_mem[0].mem.ar_bursts - ar0 == 2 * BLK / MAX_BURST, "second job burst count");
    check(g_mem[1].mem.ar_bursts == 4 * BLK / MAX_BURST, "unit 1 read A once and B three times");

    // Mechanisms.
    check(both_busy > 0, "both units busy at the same time");
    check(a_reuse > 0, "A block reused across column tiles");
    check(multi_burst > 0, "blocks split into several bursts");
    check(back_to_back > 0, "unit 0 took a second job while unit 1 was busy");
    check(negatives > 0, "negative results written");
    for (int u = 0; u < NCU; u++) begin
      check(u == 0 ? (g_mem[0].mem.ar_stalls > 0 && g_mem[0].mem.r_stalls > 0 &&
                      g_mem[0].mem.aw_stalls > 0 && g_mem[0].mem.w_stalls > 0)
                   : (g_mem[1].mem.ar_stalls > 0 && g_mem[1].mem.r_stalls > 0 &&
                      g_mem[1].mem.aw_stalls > 0 && g_mem[1].mem.w_stalls > 0),
            "memory stalls on every channel");
    end
    $display("mechanisms: both_busy=%0d a_reuse=%0d multi_burst=%0d back_to_back=%0d negatives=%0d",
             both_busy, a_reuse, multi_burst, back_to_back, negatives);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
