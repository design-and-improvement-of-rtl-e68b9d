// tb_systolic_array: self-checking test of the N x N output-stationary array.
// Several random block products (N = 4, K = 10, then K = 3) are streamed in
// one slice per cycle after a clr. The result must equal C = A x B computed
// here with integers, must be complete exactly 2N - 1 cycles after the last
// slice and not one cycle earlier, and must then stay constant.
module tb_systolic_array;
  localparam int N = 4, DW = 16, AW = 48, KMAX = 10;
  logic clk = 0, rst_n = 0, clr = 0;
  logic signed [DW-1:0] a_col [N], b_row [N];
  logic signed [AW-1:0] acc [N][N];
  int checks = 0, failures = 0;
  logic signed [DW-1:0] A [N][KMAX], B [KMAX][N];
  longint C [N][N];

  systolic_array #(.N(N), .DATA_W(DW), .ACC_W(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int K);
    for (int i = 0; i < N; i++)
      for (int k = 0; k < K; k++) begin
        A[i][k] = DW'($urandom);
        B[k][i] = DW'($urandom);
        if (A[i][k] == 0) A[i][k] = 1;
        if (B[k][i] == 0) B[k][i] = 1;
      end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        C[i][j] = 0;
        for (int k = 0; k < K; k++) C[i][j] += longint'(A[i][k]) * longint'(B[k][j]);
      end
    @(negedge clk); clr = 1;
    for (int r = 0; r < N; r++) begin a_col[r] = '0; b_row[r] = '0; end
    for (int k = 0; k < K; k++) begin
      @(negedge clk); clr = 0;
      for (int r = 0; r < N; r++) begin a_col[r] = A[r][k]; b_row[r] = B[k][r]; end
    end
    // Now in the cycle that presents slice K-1; 2N-1 edges later acc is final.
    @(negedge clk);
    for (int r = 0; r < N; r++) begin a_col[r] = '0; b_row[r] = '0; end
    repeat (2 * N - 3) @(negedge clk);
    // 2N-2 cycles after the last slice: the far corner is still one short.
    checks++;
    if (acc[N-1][N-1] == AW'(C[N-1][N-1])) begin
      failures++; $display("result ready too early");
    end
    @(negedge clk);
    for (int rep = 0; rep < 3; rep++) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          checks++;
          if (acc[i][j] !== AW'(C[i][j])) begin
            failures++;
            $display("C[%0d][%0d] got %0d exp %0d", i, j, acc[i][j], C[i][j]);
          end
        end
      @(negedge clk);
    end
  endtask

  initial begin
    for (int r = 0; r < N; r++) begin a_col[r] = '0; b_row[r] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(KMAX);
    run(KMAX);
    run(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
