// cnn_accel_pkg: constants and types shared by the GEMM convolution accelerator.
//
// The accelerator computes convolution layers as matrix products (im2col/GEMM):
// a filter matrix A (filters x channels*kh*kw) times an image matrix B
// (channels*kh*kw x output pixels). The host cuts the product into blocks of
// 16 x 576 (A) and 576 x 16 (B); each block product gives one 16 x 16 piece of C.
// The block size 16 and the depth 576 follow the design; the number format
// (16-bit signed fixed point, 48-bit accumulators stored in 64-bit slots), the
// memory word of 512 bits and the command layout are this implementation's choices.
package cnn_accel_pkg;

  // Design-level defaults.
  localparam int unsigned BLOCK     = 16;   // systolic array is BLOCK x BLOCK
  localparam int unsigned DEPTH     = 576;  // shared dimension of one block product
  localparam int unsigned DATA_W    = 16;   // operand width (signed)
  localparam int unsigned ACC_W     = 48;   // accumulator width (signed)
  localparam int unsigned RES_SLOT  = 64;   // result slot width in memory
  localparam int unsigned MEM_W     = 512;  // memory beat width
  localparam int unsigned ADDR_W    = 32;   // memory address, counted in beats
  localparam int unsigned LEN_W     = 8;    // burst length field (beats - 1)
  localparam int unsigned MAX_BURST = 16;   // longest burst issued, in beats
  localparam int unsigned NTILE_W   = 16;   // width of the column-tile count

  // One job for a compute unit. A is one BLOCK x DEPTH block stored row by row;
  // B is n_tiles blocks, each stored transposed (one column of B per row of
  // memory, DEPTH elements long); C receives n_tiles BLOCK x BLOCK blocks row by row.
  typedef struct packed {
    logic [ADDR_W-1:0]  a_base;
    logic [ADDR_W-1:0]  b_base;
    logic [ADDR_W-1:0]  c_base;
    logic [NTILE_W-1:0] n_tiles;   // number of B/C column tiles, >= 1
  } job_t;

  // Compute-unit sequencer states.
  typedef enum logic [2:0] {
    S_IDLE,
    S_LOAD_A,
    S_LOAD_B,
    S_COMPUTE,
    S_CAPTURE,
    S_WRITE
  } cu_state_e;

endpackage
