// tb_burst_writer: self-checking test of the burst write master.
// The data source returns a word derived from the beat number. Runs of 21, 4
// and 1 beats are written with MAX_BURST = 8 into a random-stalling memory
// model; afterwards the memory must hold the right word at base + n, nothing
// outside the run may change, the number of bursts must be ceil(beats / 8),
// w_last must mark every burst's final beat, and done must come only after
// all responses.
module tb_burst_writer;
  localparam int AW = 32, LW = 8, CW = 16, MW = 64, MB = 8, WORDS = 256;
  logic clk = 0, rst_n = 0, start = 0;
  logic [AW-1:0] base = '0;
  logic [CW-1:0] beats = '0;
  logic busy, done;
  logic [CW-1:0] src_beat;
  logic [MW-1:0] src_data;
  logic aw_valid, aw_ready, w_valid, w_ready, w_last, b_valid, b_ready;
  logic [AW-1:0] aw_addr;
  logic [LW-1:0] aw_len;
  logic [MW-1:0] w_data;
  logic ar_ready, r_valid, r_last;
  logic [MW-1:0] r_data;
  logic [MW-1:0] salt;
  int checks = 0, failures = 0;

  burst_writer #(.ADDR_W(AW), .LEN_W(LW), .CNT_W(CW), .MEM_W(MW), .MAX_BURST(MB)) dut (.*);

  ddr_bank_model #(.ADDR_W(AW), .LEN_W(LW), .MEM_W(MW), .WORDS(WORDS)) mem (
    .clk, .rst_n, .ar_valid(1'b0), .ar_ready, .ar_addr('0), .ar_len('0),
    .r_valid, .r_ready(1'b0), .r_data, .r_last,
    .aw_valid, .aw_ready, .aw_addr, .aw_len,
    .w_valid, .w_ready, .w_data, .w_last,
    .b_valid, .b_ready);

  assign src_data = salt ^ MW'(src_beat) * 64'h9E37_79B9_7F4A_7C15;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_write(input int b, input int n);
    int dones, bursts0;
    dones = 0;
    bursts0 = mem.aw_bursts;
    salt = {$urandom, $urandom};
    @(negedge clk); start = 1; base = AW'(b); beats = CW'(n);
    @(negedge clk); start = 0;
    while (dones == 0) @(posedge clk) if (done) dones++;
    for (int w = b - 2; w < b + n + 2; w++) begin
      checks++;
      if (w >= b && w < b + n) begin
        if (mem.mem[w] !== (salt ^ MW'(w - b) * 64'h9E37_79B9_7F4A_7C15)) begin
          failures++; $display("word %0d wrong", w);
        end
      end else if (mem.mem[w] !== 64'hA5A5_A5A5_A5A5_A5A5) begin
        failures++; $display("word %0d outside the run changed", w);
      end
    end
    checks++;
    if (mem.aw_bursts - bursts0 != (n + MB - 1) / MB) begin
      failures++; $display("burst count %0d", mem.aw_bursts - bursts0);
    end
    checks++;
    if (mem.b_pending != 0) begin failures++; $display("done before all responses"); end
  endtask

  initial begin
    for (int w = 0; w < WORDS; w++) mem.mem[w] = 64'hA5A5_A5A5_A5A5_A5A5;
    repeat (3) @(posedge clk);
    rst_n = 1;
    do_write(10, 21);
    do_write(100, 4);
    do_write(200, 1);
    checks++;
    if (mem.w_last_errors != 0) begin failures++; $display("w_last misplaced"); end
    checks++;
    if (mem.aw_stalls == 0 || mem.w_stalls == 0) begin failures++; $display("no stalls seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
