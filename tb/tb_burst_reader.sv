// tb_burst_reader: self-checking test of the burst read master.
// A random-stalling memory model holds random words. Runs of 37, 8 and 1
// beats are read with MAX_BURST = 8; every delivered beat must equal the
// memory word at base + n in order, exactly the requested number of beats
// must arrive, done must pulse once, and the number of bursts must be
// ceil(beats / 8).
module tb_burst_reader;
  localparam int AW = 32, LW = 8, CW = 16, MW = 64, MB = 8, WORDS = 256;
  logic clk = 0, rst_n = 0, start = 0;
  logic [AW-1:0] base = '0;
  logic [CW-1:0] beats = '0;
  logic busy, done;
  logic ar_valid, ar_ready, r_valid, r_ready, r_last;
  logic [AW-1:0] ar_addr;
  logic [LW-1:0] ar_len;
  logic [MW-1:0] r_data;
  logic out_valid;
  logic [MW-1:0] out_data;
  logic aw_ready, w_ready, b_valid;   // unused write side of the model
  int checks = 0, failures = 0;

  burst_reader #(.ADDR_W(AW), .LEN_W(LW), .CNT_W(CW), .MEM_W(MW), .MAX_BURST(MB)) dut (.*);

  ddr_bank_model #(.ADDR_W(AW), .LEN_W(LW), .MEM_W(MW), .WORDS(WORDS)) mem (
    .clk, .rst_n, .ar_valid, .ar_ready, .ar_addr, .ar_len,
    .r_valid, .r_ready, .r_data, .r_last,
    .aw_valid(1'b0), .aw_ready, .aw_addr('0), .aw_len('0),
    .w_valid(1'b0), .w_ready, .w_data('0), .w_last(1'b0),
    .b_valid, .b_ready(1'b0));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_read(input int b, input int n);
    int got, dones, bursts0;
    got = 0; dones = 0;
    bursts0 = mem.ar_bursts;
    @(negedge clk); start = 1; base = AW'(b); beats = CW'(n);
    @(negedge clk); start = 0;
    while (dones == 0) begin
      @(posedge clk);
      if (out_valid) begin
        checks++;
        if (out_data !== mem.mem[b + got]) begin
          failures++; $display("beat %0d wrong", got);
        end
        got++;
      end
      if (done) dones++;
    end
    repeat (5) @(posedge clk);
    checks++;
    if (got != n || busy) begin failures++; $display("got %0d of %0d beats", got, n); end
    checks++;
    if (mem.ar_bursts - bursts0 != (n + MB - 1) / MB) begin
      failures++; $display("burst count %0d", mem.ar_bursts - bursts0);
    end
  endtask

  initial begin
    for (int w = 0; w < WORDS; w++) mem.mem[w] = {$urandom, $urandom};
    repeat (3) @(posedge clk);
    rst_n = 1;
    do_read(5, 37);
    do_read(100, 8);
    do_read(200, 1);
    checks++;
    if (mem.ar_stalls == 0 || mem.r_stalls == 0) begin failures++; $display("no stalls seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
