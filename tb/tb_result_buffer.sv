// tb_result_buffer: self-checking test of the result block buffer.
// Captures a block of random signed accumulators, changes the inputs, and
// checks every beat: results in row-major order, RPB per beat, each
// sign-extended into its slot, lowest slot first, unaffected by later inputs.
module tb_result_buffer;
  localparam int N = 4, AW = 48, SLOT = 64, MW = 256;
  localparam int RPB = MW / SLOT, BEATS = N * N / RPB;
  logic clk = 0, capture = 0;
  logic signed [AW-1:0] acc_in [N][N];
  logic [$clog2(BEATS+1)-1:0] rd_beat = '0;
  logic [MW-1:0] rd_data;
  longint exp_v [N*N];
  int checks = 0, failures = 0;

  result_buffer #(.N(N), .ACC_W(AW), .RES_SLOT(SLOT), .MEM_W(MW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          acc_in[i][j] = AW'({$urandom, $urandom});
          exp_v[i*N+j] = longint'(acc_in[i][j]);
        end
      @(negedge clk); capture = 1;
      @(negedge clk); capture = 0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) acc_in[i][j] = '0;
      for (int bt = 0; bt < BEATS; bt++) begin
        @(negedge clk); rd_beat = bt[$clog2(BEATS+1)-1:0];
        #1;
        for (int s = 0; s < RPB; s++) begin
          checks++;
          if (rd_data[s*SLOT +: SLOT] !== SLOT'(exp_v[bt*RPB + s])) begin
            failures++;
            $display("beat %0d slot %0d got %h exp %h", bt, s, rd_data[s*SLOT +: SLOT], exp_v[bt*RPB+s]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
