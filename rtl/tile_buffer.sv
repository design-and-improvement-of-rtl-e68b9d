// tile_buffer: on-chip block RAM holding one input block, partitioned by row.
//
// The block (BANKS rows of WORDS memory beats each) is split into BANKS
// independent memories, one per row of A (or per column of B), so that the
// systolic array can read one beat of every row in the same cycle. This is the
// hardware form of partitioning the local array, which the design uses to give
// the array enough read ports.
//
// Write port: one beat per cycle, to bank wbank at word waddr (filled by the
// burst reader). Read port: every bank reads word raddr; rdata is registered,
// so it appears one cycle after raddr (synchronous block-RAM read).
// A read and a write in the same cycle to the same location return the old word.
module tile_buffer #(
  parameter int unsigned BANKS  = 16,
  parameter int unsigned WORDS  = 18,
  parameter int unsigned WORD_W = 512
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(BANKS)-1:0] wbank,
  input  logic [$clog2(WORDS)-1:0] waddr,
  input  logic [WORD_W-1:0]        wdata,
  input  logic [$clog2(WORDS)-1:0] raddr,
  output logic [WORD_W-1:0]        rdata [BANKS]
);

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    logic [WORD_W-1:0] mem [WORDS];

    always_ff @(posedge clk) begin
      if (we && wbank == ($clog2(BANKS))'(b)) mem[waddr] <= wdata;
      rdata[b] <= mem[raddr];
    end
  end

endmodule
