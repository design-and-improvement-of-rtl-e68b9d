// tb_mmult_cu: end-to-end test of one compute unit against a DDR bank model.
// Small configuration: N = 4, K = 64, 128-bit beats (8 operands or 2 results
// per beat), bursts of 4 beats, random memory stalls. Two jobs are run: one
// with three column tiles sharing an A block, then one with a single tile and
// a new A block. Every result element is compared with C = A x B computed
// here in 64-bit integers. Also checked: each compute phase lasts K + 2N - 1
// cycles from clr to capture, A is fetched once per job (burst counts), and
// the memory outside the result area is untouched.
module tb_mmult_cu;
  import cnn_accel_pkg::*;
  localparam int N = 4, K = 64, DW = 16, AW = 48, SW = 64, MW = 128, BU = 4;
  localparam int EPB = MW / DW, RPB = MW / SW, WPR = K / EPB;
  localparam int BLK = N * WPR, CB = N * N / RPB, WORDS = 2048;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, busy, done;
  job_t cmd;
  logic ar_valid, ar_ready, r_valid, r_ready, r_last;
  logic [ADDR_W-1:0] ar_addr, aw_addr;
  logic [LEN_W-1:0] ar_len, aw_len;
  logic [MW-1:0] r_data, w_data;
  logic aw_valid, aw_ready, w_valid, w_ready, w_last, b_valid, b_ready;
  int checks = 0, failures = 0;

  mmult_cu #(.N(N), .K(K), .D_W(DW), .A_W(AW), .SLOT_W(SW), .M_W(MW), .BURST(BU)) dut (.*);

  ddr_bank_model #(.ADDR_W(ADDR_W), .LEN_W(LEN_W), .MEM_W(MW), .WORDS(WORDS)) mem (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Compute-phase timing monitor.
  int cyc = 0, clr_cyc = 0, computes = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && dut.arr_clr) clr_cyc = cyc;
    if (rst_n && dut.capture) begin
      computes++;
      check(cyc - clr_cyc == K + 2 * N - 1, "compute phase length");
    end
  end

  logic signed [DW-1:0] A [N][K];
  logic signed [DW-1:0] B [4][K][N];   // up to 4 tiles

  task automatic put(input int word, input int lane, input logic [DW-1:0] v);
    logic [MW-1:0] x;
    x = mem.mem[word];
    x[lane*DW +: DW] = v;
    mem.mem[word] = x;
  endtask

  task automatic run_job(input int a_base, input int b_base, input int c_base, input int tiles);
    int ar0, dn;
    for (int i = 0; i < N; i++)
      for (int k = 0; k < K; k++) begin
        A[i][k] = DW'($urandom);
        put(a_base + i * WPR + k / EPB, k % EPB, A[i][k]);
      end
    for (int t = 0; t < tiles; t++)
      for (int j = 0; j < N; j++)
        for (int k = 0; k < K; k++) begin
          B[t][k][j] = DW'($urandom);
          put(b_base + (t * N + j) * WPR + k / EPB, k % EPB, B[t][k][j]);
        end
    for (int w = c_base - 2; w < c_base + tiles * CB + 2; w++) mem.mem[w] = '1;
    ar0 = mem.ar_bursts;
    @(negedge clk);
    check(cmd_ready, "ready for a job");
    cmd = '{a_base: ADDR_W'(a_base), b_base: ADDR_W'(b_base), c_base: ADDR_W'(c_base),
            n_tiles: NTILE_W'(tiles)};
    cmd_valid = 1;
    @(negedge clk); cmd_valid = 0;
    dn = 0;
    while (dn == 0) @(posedge clk) if (done) dn++;
    for (int t = 0; t < tiles; t++)
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          longint c;
          int idx;
          logic [SW-1:0] got;
          c = 0;
          for (int k = 0; k < K; k++) c += longint'(A[i][k]) * longint'(B[t][k][j]);
          idx = i * N + j;
          got = mem.mem[c_base + t * CB + idx / RPB][(idx % RPB) * SW +: SW];
          checks++;
          if (got !== SW'(c)) begin
            failures++;
            $display("tile %0d C[%0d][%0d] got %0d exp %0d", t, i, j, $signed(got), c);
          end
        end
    check(mem.mem[c_base - 1] == '1 && mem.mem[c_base + tiles * CB] == '1, "no stray writes");
    check(mem.ar_bursts - ar0 == (1 + tiles) * BLK / BU, "A read once per job");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    run_job(0, 100, 1000, 3);
    run_job(300, 500, 1200, 1);
    check(computes == 4, "four compute phases");
    check(mem.ar_stalls > 0 && mem.r_stalls > 0 && mem.w_stalls > 0, "memory stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
