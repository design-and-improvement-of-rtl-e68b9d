// tb_mac_pe: self-checking test of one multiply-accumulate PE.
// Drives random signed operands, checks that a_out/b_out repeat a_in/b_in one
// cycle later and that acc equals the running sum of products since the last
// clr (reference kept in a 64-bit integer), including clr in the middle.
module tb_mac_pe;
  localparam int DW = 16, AW = 48;
  logic clk = 0, rst_n = 0, clr = 0;
  logic signed [DW-1:0] a_in = '0, b_in = '0, a_out, b_out;
  logic signed [AW-1:0] acc;
  int checks = 0, failures = 0;
  longint ref_acc;

  mac_pe #(.DATA_W(DW), .ACC_W(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    ref_acc = 0;
    for (int n = 0; n < 400; n++) begin
      logic signed [DW-1:0] a, b;
      logic c;
      a = DW'($urandom);
      b = DW'($urandom);
      c = (n % 97 == 50);
      @(negedge clk);
      a_in = a; b_in = b; clr = c;
      @(posedge clk);
      #1;
      if (c) ref_acc = 0;
      else   ref_acc = ref_acc + longint'(a) * longint'(b);
      checks++;
      if (acc !== AW'(ref_acc)) begin
        failures++;
        $display("acc mismatch at %0d: got %0d exp %0d", n, acc, ref_acc);
      end
      checks++;
      if (a_out !== a || b_out !== b) begin
        failures++;
        $display("forwarding mismatch at %0d", n);
      end
    end
    // Zero operands must leave the accumulator unchanged.
    @(negedge clk); a_in = '0; b_in = '0; clr = 0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (acc !== AW'(ref_acc)) begin failures++; $display("acc changed on zeros"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
