// result_buffer: local copy of one N x N result block, read out as memory beats.
//
// On capture the accumulators of the whole systolic array are copied in one
// cycle, which frees the array for the next block. The burst writer then reads
// beat rd_beat, which packs RES_PER_BEAT consecutive results of the block in
// row-major order (C[i][j] is result number i*N + j), each sign-extended into a
// RES_SLOT-bit slot with result 0 of the beat in the lowest bits. The read is
// combinational (rd_data follows rd_beat in the same cycle). Keeping the results
// in local memory follows the design; the packing is this implementation's choice.
module result_buffer #(
  parameter int unsigned N        = 16,
  parameter int unsigned ACC_W    = 48,
  parameter int unsigned RES_SLOT = 64,
  parameter int unsigned MEM_W    = 512,
  localparam int unsigned RES_PER_BEAT = MEM_W / RES_SLOT,
  localparam int unsigned BEATS        = (N * N) / RES_PER_BEAT
) (
  input  logic                           clk,
  input  logic                           capture,
  input  logic signed [ACC_W-1:0]        acc_in [N][N],
  input  logic [$clog2(BEATS+1)-1:0]     rd_beat,
  output logic [MEM_W-1:0]               rd_data
);

  logic signed [ACC_W-1:0] res [N*N];

  always_ff @(posedge clk) begin
    if (capture) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          res[i*N + j] <= acc_in[i][j];
    end
  end

  always_comb begin
    rd_data = '0;
    for (int s = 0; s < RES_PER_BEAT; s++) begin
      int unsigned idx;
      idx = int'(rd_beat) * RES_PER_BEAT + s;
      if (idx < N * N)
        rd_data[s*RES_SLOT +: RES_SLOT] = RES_SLOT'(res[idx]);
    end
  end

endmodule
