// tb_tile_buffer: self-checking test of the row-partitioned input buffer.
// Fills every bank with random words, then reads each word address and checks
// that every bank returns its own word one cycle later; also checks that a
// write to one bank leaves the others untouched.
module tb_tile_buffer;
  localparam int BANKS = 4, WORDS = 6, WW = 64;
  logic clk = 0, we = 0;
  logic [$clog2(BANKS)-1:0] wbank = '0;
  logic [$clog2(WORDS)-1:0] waddr = '0, raddr = '0;
  logic [WW-1:0] wdata = '0;
  logic [WW-1:0] rdata [BANKS];
  logic [WW-1:0] model [BANKS][WORDS];
  int checks = 0, failures = 0;

  tile_buffer #(.BANKS(BANKS), .WORDS(WORDS), .WORD_W(WW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int w = 0; w < WORDS; w++) begin
      @(negedge clk); raddr = w[$clog2(WORDS)-1:0];
      @(posedge clk); #1;
      for (int b = 0; b < BANKS; b++) begin
        checks++;
        if (rdata[b] !== model[b][w]) begin
          failures++; $display("bank %0d word %0d mismatch", b, w);
        end
      end
    end
  endtask

  initial begin
    for (int b = 0; b < BANKS; b++)
      for (int w = 0; w < WORDS; w++) begin
        model[b][w] = {$urandom, $urandom};
        @(negedge clk);
        we = 1; wbank = b[$clog2(BANKS)-1:0]; waddr = w[$clog2(WORDS)-1:0]; wdata = model[b][w];
      end
    @(negedge clk); we = 0;
    check_all();
    @(negedge clk);
    we = 1; wbank = 2; waddr = 3; wdata = 64'hDEAD_BEEF_0123_4567; model[2][3] = wdata;
    @(negedge clk); we = 0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
