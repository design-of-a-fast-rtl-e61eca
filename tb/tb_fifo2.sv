// tb_fifo2: self-checking test of the dual-clock FIFO2 (256 words).
//
// Write clock 10 ns, read clock 7 ns (then 23 ns). Checks: full is raised
// after exactly 256 writes with no reads, the words come out in order and
// complete under random writes and reads in both clock ratios, a word
// written into an empty FIFO is visible on the read side within 4 read
// clocks, and empty/full never allow an overflow or underflow (scoreboard).
module tb_fifo2;
  localparam int W = 29, DEPTH = 256;

  logic wclk = 0, rclk = 0, rst_n = 0;
  logic wr = 0, rd, rd_en = 0, full, empty;
  logic [W-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [W-1:0] sb [$];
  int n_wr = 0, n_rd = 0;
  int rper = 7;

  fifo2 #(.DEPTH(DEPTH), .W(W)) dut (.wclk, .wrst_n(rst_n), .wr, .wdata, .full,
                                     .rclk, .rrst_n(rst_n), .rd, .rdata, .empty);

  always #5 wclk = ~wclk;
  always begin #(rper) rclk = ~rclk; end
  assign rd = rd_en && !empty;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  always @(posedge wclk) if (rst_n && wr && !full) begin sb.push_back(wdata); n_wr++; end
  always @(posedge rclk) if (rst_n && rd) begin
    checks++;
    if (sb.size() == 0 || rdata != sb[0]) begin failures++; $display("FAIL: read order"); end
    else void'(sb.pop_front());
    n_rd++;
  end

  bit rnd_wr = 0;
  always @(negedge wclk) begin
    if (rnd_wr) begin
      wr = ($urandom % 2 == 0) && !full;
      wdata = W'($urandom);
    end
  end

  initial begin
    int lat;
    repeat (3) @(negedge wclk);
    rst_n = 1;
    repeat (3) @(negedge wclk);
    // Fill.
    for (int i = 0; i < 300; i++) begin
      @(negedge wclk);
      wr = !full; wdata = W'(i);
    end
    wr = 0;
    check(full && n_wr == DEPTH, $sformatf("full after %0d writes", n_wr));
    rd_en = 1;
    repeat (400) @(negedge rclk);
    check(empty && sb.size() == 0, "drained");
    // Latency into an empty FIFO.
    rd_en = 0;
    @(negedge wclk); wr = 1; wdata = 29'h1234567;
    @(negedge wclk); wr = 0;
    lat = 0;
    while (empty && lat < 20) begin @(posedge rclk); lat++; end
    check(lat <= 4, $sformatf("visible after %0d read clocks", lat));
    rd_en = 1;
    repeat (5) @(negedge rclk);
    // Random traffic, two clock ratios.
    for (int p = 0; p < 2; p++) begin
      rper = p ? 23 : 7;
      rnd_wr = 1;
      for (int i = 0; i < 3000; i++) begin @(negedge rclk); rd_en = ($urandom % 3 != 0); end
      rnd_wr = 0; wr = 0;
      rd_en = 1;
      repeat (600) @(negedge rclk);
      check(sb.size() == 0 && empty, "random traffic delivered");
    end
    $display("writes=%0d reads=%0d", n_wr, n_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
