// accel_top: GEMM convolution accelerator with NUM_CU parallel compute units.
//
// Convolution layers are computed as matrix products C = A x B (im2col on the
// host). The host cuts the product into N x K blocks of A and K x N blocks of
// B and hands jobs to the compute units, which run independently and in
// parallel; each unit has its own memory port, meant to be connected to its
// own DDR bank so that the units do not share bandwidth. Two units with one
// bank each follow the design; tying unit i to bank i is this implementation's
// choice. All ports of unit i are element i of the arrays below; the memory
// channels and the job format are described in mmult_cu and cnn_accel_pkg.
module accel_top
  import cnn_accel_pkg::*;
#(
  parameter int unsigned NUM_CU = 2,
  parameter int unsigned N      = BLOCK,
  parameter int unsigned K      = DEPTH,
  parameter int unsigned D_W    = DATA_W,
  parameter int unsigned A_W    = ACC_W,
  parameter int unsigned SLOT_W = RES_SLOT,
  parameter int unsigned M_W    = MEM_W,
  parameter int unsigned BURST  = MAX_BURST
) (
  input  logic              clk,
  input  logic              rst_n,
  // per-unit job commands and status
  input  logic              cmd_valid [NUM_CU],
  output logic              cmd_ready [NUM_CU],
  input  job_t              cmd       [NUM_CU],
  output logic              busy      [NUM_CU],
  output logic              done      [NUM_CU],
  // per-unit memory ports (one DDR bank each)
  output logic              ar_valid  [NUM_CU],
  input  logic              ar_ready  [NUM_CU],
  output logic [ADDR_W-1:0] ar_addr   [NUM_CU],
  output logic [LEN_W-1:0]  ar_len    [NUM_CU],
  input  logic              r_valid   [NUM_CU],
  output logic              r_ready   [NUM_CU],
  input  logic [M_W-1:0]    r_data    [NUM_CU],
  input  logic              r_last    [NUM_CU],
  output logic              aw_valid  [NUM_CU],
  input  logic              aw_ready  [NUM_CU],
  output logic [ADDR_W-1:0] aw_addr   [NUM_CU],
  output logic [LEN_W-1:0]  aw_len    [NUM_CU],
  output logic              w_valid   [NUM_CU],
  input  logic              w_ready   [NUM_CU],
  output logic [M_W-1:0]    w_data    [NUM_CU],
  output logic              w_last    [NUM_CU],
  input  logic              b_valid   [NUM_CU],
  output logic              b_ready   [NUM_CU]
);

  for (genvar u = 0; u < NUM_CU; u++) begin : g_cu
    mmult_cu #(.N(N), .K(K), .D_W(D_W), .A_W(A_W), .SLOT_W(SLOT_W), .M_W(M_W),
               .BURST(BURST)) u_cu (
      .clk, .rst_n,
      .cmd_valid(cmd_valid[u]), .cmd_ready(cmd_ready[u]), .cmd(cmd[u]),
      .busy(busy[u]), .done(done[u]),
      .ar_valid(ar_valid[u]), .ar_ready(ar_ready[u]), .ar_addr(ar_addr[u]), .ar_len(ar_len[u]),
      .r_valid(r_valid[u]), .r_ready(r_ready[u]), .r_data(r_data[u]), .r_last(r_last[u]),
      .aw_valid(aw_valid[u]), .aw_ready(aw_ready[u]), .aw_addr(aw_addr[u]), .aw_len(aw_len[u]),
      .w_valid(w_valid[u]), .w_ready(w_ready[u]), .w_data(w_data[u]), .w_last(w_last[u]),
      .b_valid(b_valid[u]), .b_ready(b_ready[u])
    );
  end

endmodule
