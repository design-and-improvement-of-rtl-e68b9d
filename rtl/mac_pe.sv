// mac_pe: one processing element of the output-stationary systolic array.
//
// Each cycle the PE multiplies the operand arriving from the left (a_in, an
// element of a row of A) by the operand arriving from above (b_in, an element
// of a column of B) and adds the product to its local accumulator: one
// multiplication and one addition per cycle, as the design's PE is defined.
// Both operands are registered and passed on unchanged to the right (a_out)
// and downwards (b_out), one cycle later, so neighbouring PEs see the same
// stream delayed by one cycle.
//
// clr zeroes the accumulator (the product of that cycle is discarded);
// operands that are zero leave the accumulator unchanged, which is how the
// array is idled and drained. Operands are signed DATA_W-bit integers, the
// accumulator a signed ACC_W-bit integer (number format is this design's
// choice). acc is valid one cycle after the last product was presented.
module mac_pe #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned ACC_W  = 48
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic signed [DATA_W-1:0] a_in,
  input  logic signed [DATA_W-1:0] b_in,
  output logic signed [DATA_W-1:0] a_out,
  output logic signed [DATA_W-1:0] b_out,
  output logic signed [ACC_W-1:0]  acc
);

  logic signed [2*DATA_W-1:0] prod;

  assign prod = a_in * b_in;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_out <= '0;
      b_out <= '0;
      acc   <= '0;
    end else begin
      a_out <= a_in;
      b_out <= b_in;
      if (clr) acc <= '0;
      else     acc <= acc + ACC_W'(prod);
    end
  end

endmodule
