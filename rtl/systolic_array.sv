// systolic_array: N x N output-stationary grid of mac_pe elements.
//
// PE(i,j) accumulates C[i][j] = sum_k A[i][k] * B[k][j]. Every cycle the
// caller presents one k-slice: a_col[i] = A[i][k] for every row i and
// b_row[j] = B[k][j] for every column j. Inside, row i of A is delayed by i
// cycles and column j of B by j cycles (input skew registers), then A values
// flow to the right and B values flow down one PE per cycle. A[i][k] and
// B[k][j] therefore meet in PE(i,j) exactly i + j cycles after slice k was
// presented. The grid, the PE function and the left/top feeding follow the
// design's systolic array; the skew registers are the usual way to build it.
//
// Timing: clr (one cycle) zeroes all accumulators. Present slices k = 0..K-1
// on consecutive cycles starting the cycle after clr, and zeros otherwise.
// The last product reaches PE(N-1,N-1) 2*(N-1) cycles after slice K-1, so all
// of acc is final LATENCY = 2*N - 1 cycles after the cycle that presented
// slice K-1, and stays constant while zeros are presented.
module systolic_array #(
  parameter int unsigned N      = 16,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned ACC_W  = 48
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic signed [DATA_W-1:0] a_col [N],
  input  logic signed [DATA_W-1:0] b_row [N],
  output logic signed [ACC_W-1:0]  acc   [N][N]
);

  // Operands entering each PE from the left (ha) and from above (vb).
  logic signed [DATA_W-1:0] ha [N][N+1];
  logic signed [DATA_W-1:0] vb [N+1][N];

  // Skew: row/column r is delayed by r registers (row/column 0 is not delayed).
  for (genvar r = 0; r < N; r++) begin : g_skew
    if (r == 0) begin : g_direct
      assign ha[0][0] = a_col[0];
      assign vb[0][0] = b_row[0];
    end else begin : g_delay
      logic signed [DATA_W-1:0] a_sr [r];
      logic signed [DATA_W-1:0] b_sr [r];
      always_ff @(posedge clk) begin
        if (!rst_n) begin
          for (int s = 0; s < r; s++) begin
            a_sr[s] <= '0;
            b_sr[s] <= '0;
          end
        end else begin
          a_sr[0] <= a_col[r];
          b_sr[0] <= b_row[r];
          for (int s = 1; s < r; s++) begin
            a_sr[s] <= a_sr[s-1];
            b_sr[s] <= b_sr[s-1];
          end
        end
      end
      assign ha[r][0] = a_sr[r-1];
      assign vb[0][r] = b_sr[r-1];
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      mac_pe #(.DATA_W(DATA_W), .ACC_W(ACC_W)) u_pe (
        .clk   (clk),
        .rst_n (rst_n),
        .clr   (clr),
        .a_in  (ha[i][j]),
        .b_in  (vb[i][j]),
        .a_out (ha[i][j+1]),
        .b_out (vb[i+1][j]),
        .acc   (acc[i][j])
      );
    end
  end

  // The operands leaving the right and bottom edges are not used.
  logic unused_edge;
  always_comb begin
    unused_edge = 1'b0;
    for (int r = 0; r < N; r++) unused_edge = unused_edge ^ (^ha[r][N]) ^ (^vb[N][r]);
  end

endmodule
