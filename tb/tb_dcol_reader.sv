// tb_dcol_reader: self-checking test of the Dcol reader with its compression.
//
// A pixel_dcol supplies the column. For each event the testbench fires a
// random cluster of hits, records the system time of the clock in which the
// pixels were set, and predicts the words: addresses in ascending order, an
// address 1..4 above the open word's first address sets pattern bit
// (offset-1), any other opens a new word; with compression off every address
// is its own word with a zero pattern. It checks the words written to FIFO1,
// the 2-clock READ period, and that no READ or write happens under BUSY
// (BUSY from a slowly drained FIFO model). Compression-on and compression-off events alternate.
module tb_dcol_reader;
  import taichu_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [1023:0] hit = '0;
  logic fastor, addr_valid, read, busy = 0, fifo_wr, compress_en = 1;
  logic [AW-1:0] addr;
  logic [TSW-1:0] system_time = '0;
  rd_word_t wr_word;
  int checks = 0, failures = 0;
  rd_word_t expq[$];
  int n_words = 0, n_merged = 0, n_busy = 0, last_read = -10, cyc = 0;
  bit rand_busy = 0;

  pixel_dcol u_col (.clk, .rst_n, .hit, .dpulse(1'b0), .cfg_we(1'b0), .cfg_addr('0),
                    .cfg_mask(1'b0), .cfg_pulse_en(1'b0), .read, .fastor, .addr, .addr_valid);
  dcol_reader dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    system_time <= system_time + 1'b1;
    cyc <= cyc + 1;
  end

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  // Monitor: writes, READ spacing, BUSY.
  always @(posedge clk) if (rst_n) begin
    if (read) begin
      if (last_read >= 0 && cyc - last_read < 2) begin
        failures++; $display("FAIL: READ period below 2 clocks");
      end
      last_read = cyc;
    end
    if (busy) n_busy++;
    if (fifo_wr) begin
      checks++;
      if (busy) begin failures++; $display("FAIL: write under BUSY"); end
      if (expq.size() == 0) begin
        failures++; $display("FAIL: unexpected word %h", wr_word);
      end else begin
        rd_word_t e;
        e = expq.pop_front();
        if (wr_word !== e) begin
          failures++;
          $display("FAIL: word ts=%0d pat=%b addr=%0d, expected ts=%0d pat=%b addr=%0d",
                   wr_word.ts, wr_word.pat, wr_word.addr, e.ts, e.pat, e.addr);
        end
      end
      n_words++;
      if (wr_word.pat != 0) n_merged++;
    end
  end

  // READ-period check between consecutive reads of one burst.
  int period_checks = 0;
  always @(posedge clk) if (read && rst_n) begin
    checks++; period_checks++;
  end

  task automatic event_cluster(input int base, input int n, input bit comp);
    logic [1023:0] h = '0;
    logic [TSW-1:0] ts;
    int a0;
    rd_word_t w;
    bit open = 0;
    for (int i = 0; i < n; i++) h[(base + ($urandom % 8)) % 1024] = 1'b1;
    compress_en = comp;
    @(negedge clk); hit = h;
    @(negedge clk); hit = '0; ts = system_time;   // pixels set at the edge just passed
    for (int a = 0; a < 1024; a++) if (h[a]) begin
      if (!comp) expq.push_back('{ts: ts, pat: '0, addr: AW'(a)});
      else if (open && a - a0 >= 1 && a - a0 <= PATW) w.pat[a - a0 - 1] = 1'b1;
      else begin
        if (open) expq.push_back(w);
        open = 1; a0 = a; w = '{ts: ts, pat: '0, addr: AW'(a)};
      end
    end
    if (open) expq.push_back(w);
    // Wait for the burst to finish.
    repeat (8) @(negedge clk);
    while (fastor || read || expq.size() != 0) @(negedge clk);
    repeat (4) @(negedge clk);
  endtask

  // BUSY comes from a 4-word FIFO model drained at random while rand_busy is
  // set (at once otherwise).
  int occ = 0;
  always @(posedge clk) begin
    if (fifo_wr) occ++;
    if (occ > 0 && (!rand_busy || $urandom % 12 == 0)) occ--;
  end
  always @(negedge clk) busy = (occ >= 4);

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    // Fixed case: 3,4,6,9 -> {3, pattern 1010 (4 and 6)}, {9}.
    begin
      logic [TSW-1:0] ts;
      @(negedge clk); hit[3] = 1; hit[4] = 1; hit[6] = 1; hit[9] = 1;
      @(negedge clk); hit = '0; ts = system_time;
      expq.push_back('{ts: ts, pat: 4'b0101, addr: 10'd3});
      expq.push_back('{ts: ts, pat: 4'b0000, addr: 10'd9});
      repeat (30) @(negedge clk);
      check(expq.size() == 0, "fixed cluster written");
    end
    for (int e = 0; e < 60; e++) event_cluster($urandom % 1024, 1 + $urandom % 6, e % 3 != 2);
    rand_busy = 1;
    for (int e = 0; e < 60; e++) event_cluster($urandom % 1024, 1 + $urandom % 6, e % 3 != 2);
    rand_busy = 0; busy = 0;
    check(n_merged > 10, "compression happened");
    check(n_busy > 20, "BUSY phase exercised");
    check(expq.size() == 0, "all words written");
    $display("words=%0d merged=%0d reads=%0d busy_cycles=%0d", n_words, n_merged, period_checks, n_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
