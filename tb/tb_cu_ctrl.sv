// tb_cu_ctrl: self-checking test of the compute-unit sequencer on its own.
// The reader and writer are played by the testbench. A job with two column
// tiles (N = 4, K = 32, 8 operands and 2 results per beat) must produce: one
// A read and two B reads at the right addresses and lengths, buffer writes
// steered to (bank, word) = (n / 4, n % 4), a compute phase of exactly
// K + 2N - 1 cycles from clr to capture with K operand slices in order, two
// result writes at the right addresses, one done pulse, and A read once only.
module tb_cu_ctrl;
  import cnn_accel_pkg::*;
  localparam int N = 4, K = 32, EPB = 8, RPB = 2, CW = 16;
  localparam int WPR = K / EPB, BLK = N * WPR, CB = N * N / RPB;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, busy, done;
  job_t cmd;
  cu_state_e state;
  logic rd_start, rd_beat_valid = 0, rd_done = 0;
  logic [ADDR_W-1:0] rd_base, wr_base;
  logic [CW-1:0] rd_beats, wr_beats;
  logic we_a, we_b, feed_valid, arr_clr, capture, wr_start, wr_done = 0;
  logic [$clog2(N)-1:0] wbank;
  logic [$clog2(WPR)-1:0] waddr, raddr;
  logic [$clog2(EPB)-1:0] feed_sel;
  int checks = 0, failures = 0;

  cu_ctrl #(.N(N), .K(K), .EPB(EPB), .RPB(RPB), .CNT_W(CW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Reader stand-in: deliver the requested beats with gaps, then done.
  int reads = 0, a_writes = 0, b_writes = 0;
  logic [ADDR_W-1:0] rd_bases [$];
  initial begin
    forever begin
      @(posedge clk);
      if (rd_start) begin
        int n, nb;
        n = int'(rd_beats);
        rd_bases.push_back(rd_base);
        reads++;
        nb = 0;
        while (nb < n) begin
          @(negedge clk);
          rd_beat_valid = ($urandom % 3 != 0);
          @(posedge clk);
          if (rd_beat_valid) begin
            if (we_a) a_writes++;
            if (we_b) b_writes++;
            check(int'(wbank) == nb / WPR && int'(waddr) == nb % WPR, "beat steering");
            check(we_a ^ we_b, "exactly one buffer written");
            nb++;
          end
        end
        @(negedge clk); rd_beat_valid = 0; rd_done = 1;
        @(negedge clk); rd_done = 0;
      end
    end
  end

  // Writer stand-in.
  logic [ADDR_W-1:0] wr_bases [$];
  initial begin
    forever begin
      @(posedge clk);
      if (wr_start) begin
        wr_bases.push_back(wr_base);
        check(int'(wr_beats) == CB, "write length");
        repeat (7) @(negedge clk);
        wr_done = 1;
        @(negedge clk); wr_done = 0;
      end
    end
  end

  // Compute-phase monitor.
  int clr_cycle = -1, cyc = 0, slices = 0, computes = 0, dones = 0;
  int exp_raddr_q = 0;
  logic [$clog2(WPR)-1:0] raddr_q;
  always @(posedge clk) begin
    cyc++;
    raddr_q <= raddr;
    if (rst_n) begin
      if (arr_clr) begin clr_cycle = cyc; slices = 0; end
      if (feed_valid) begin
        check(int'(feed_sel) == slices % EPB && int'(raddr_q) == slices / EPB, "slice order");
        slices++;
      end
      if (capture) begin
        computes++;
        check(cyc - clr_cycle == K + 2 * N - 1, "compute cycles");
        check(slices == K, "slice count");
      end
      if (done) dones++;
    end
  end

  initial begin
    cmd = '{a_base: 32'd100, b_base: 32'd1000, c_base: 32'd5000, n_tiles: 16'd2};
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(cmd_ready && !busy, "idle after reset");
    cmd_valid = 1;
    @(negedge clk); cmd_valid = 0;
    check(busy && !cmd_ready, "busy after command");
    while (dones == 0) @(posedge clk);
    repeat (3) @(negedge clk);
    check(!busy && cmd_ready, "idle after done");
    check(reads == 3 && a_writes == BLK && b_writes == 2 * BLK, "A read once, B twice");
    check(rd_bases.size() == 3 && rd_bases[0] == 100 && rd_bases[1] == 1000
          && rd_bases[2] == 1000 + BLK, "read addresses");
    check(wr_bases.size() == 2 && wr_bases[0] == 5000 && wr_bases[1] == 5000 + CB,
          "write addresses");
    check(computes == 2 && dones == 1, "two tiles, one done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
