// tb_taichupix3_top: end-to-end test of the sensor readout at full size
// (512 double columns of 1024 pixels, FIFO2 of 256 words).
//
// clk is 40 MHz, clk_out 4.48 GHz (one serial bit per clk_out). All
// configuration goes through the SPI slave. Hits are injected on the hit
// inputs as clusters; the expected output words are predicted from the
// cluster addresses and the system time at which the pixels were set, and
// compared as a multiset with the words rebuilt from the serial output (or
// from SPI_DO in slow control mode). Every output word must carry a correct
// check bit. Phases:
//   A  triggerless, compression on  : clusters in many columns
//   B  triggerless, compression off : clusters, then one fully loaded
//                                     32-column group (FIFO1 BUSY)
//   C  mask and digital test pulse (DPULSE) set through SPI
//   D  trigger mode: only clusters inside the trigger window come out,
//                    the others are dropped; a second trigger is lost
//   E  slow control (TEST = 11): words out on SPI_DO; FIFO2 fills up
// Mechanism counters (compressed words, BUSY clocks, MUX conflicts, FIFO2
// full clocks, dropped words, lost triggers, SPI words, test-pulse words)
// must all be non-zero.
`timescale 1ns/1ps
module tb_taichupix3_top;
  import taichu_pkg::*;

  localparam int NPIX = 1024;
  localparam int NDC  = 512;

  logic clk = 0, clk_out = 0, rst_n = 0;
  logic [NDC-1:0][NPIX-1:0] hit = '0;
  logic dpulse = 0, trigger = 0, sclk = 0, cs_n = 1, mosi = 0, miso;
  logic spi_clk = 0, spi_do, sout, frame, trig_dropped, trig_lost;
  int checks = 0, failures = 0;

  taichupix3_top dut (.*);

  always #12.5 clk = ~clk;
  always #0.112 clk_out = ~clk_out;
  bit spi_run = 0;
  always begin #10; if (spi_run) spi_clk = ~spi_clk; end

  initial begin
    #3000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  // ---------------------------------------------------------------- SPI
  task automatic spi_wr(input logic [6:0] a, input logic [15:0] d);
    logic [23:0] f = {1'b0, a, d};
    cs_n = 0; #100;
    for (int b = 23; b >= 0; b--) begin
      mosi = f[b]; #60; sclk = 1; #60; sclk = 0;
    end
    #60; cs_n = 1; #200;
  endtask

  // ---------------------------------------------------------------- expected words
  int exp_w [logic [W512-1:0]];
  int n_exp = 0;

  function automatic void add_exp(input logic [W512-1:0] w);
    if (exp_w.exists(w)) exp_w[w]++; else exp_w[w] = 1;
    n_exp++;
  endfunction

  // Predict the words of one cluster in column c (sorted addresses).
  function automatic void predict(input int c, input int addrs[$], input logic [TSW-1:0] ts,
                                  input bit comp);
    int a0;
    logic [PATW-1:0] pat;
    bit open = 0;
    addrs.sort();
    foreach (addrs[i]) begin
      int a = addrs[i];
      if (!comp) add_exp({9'(c), ts, 4'b0, 10'(a)});
      else if (open && a - a0 >= 1 && a - a0 <= PATW) pat[a - a0 - 1] = 1'b1;
      else begin
        if (open) add_exp({9'(c), ts, pat, 10'(a0)});
        open = 1; a0 = a; pat = '0;
      end
    end
    if (open) add_exp({9'(c), ts, pat, 10'(a0)});
  endfunction

  // Cluster: n distinct addresses near base.
  typedef int alist_t[$];
  alist_t cl_addr [NDC];
  function automatic alist_t make_cluster(input int base, input int n, input int span = 12);
    alist_t l;
    bit used [int];
    while (l.size() < n) begin
      int a = (base + int'($urandom % span)) % NPIX;
      if (!used.exists(a)) begin used[a] = 1; l.push_back(a); end
    end
    return l;
  endfunction

  // Fire the clusters in cl_addr for the columns in cols; returns the
  // timestamp they get.
  task automatic fire(input int cols[$], input bit predict_them, input bit comp,
                      output logic [TSW-1:0] ts);
    @(negedge clk);
    foreach (cols[k]) foreach (cl_addr[cols[k]][i]) hit[cols[k]][cl_addr[cols[k]][i]] = 1'b1;
    @(negedge clk);
    hit = '0;
    ts = dut.system_time;
    if (predict_them) foreach (cols[k]) predict(cols[k], cl_addr[cols[k]], ts, comp);
  endtask

  // ---------------------------------------------------------------- receivers
  int got_w [logic [W512-1:0]];
  int n_got = 0, n_bad_check = 0, n_comp = 0, n_spi_words = 0;
  logic [OUTW-1:0] rx;
  int nbit = -1;

  function automatic void receive(input logic [OUTW-1:0] w);
    if (w == '0) return;
    if (w[OUTW-1] != check_bit(w[W512-1:0])) n_bad_check++;
    if (got_w.exists(w[W512-1:0])) got_w[w[W512-1:0]]++; else got_w[w[W512-1:0]] = 1;
    n_got++;
    if (w[AW +: PATW] != 0) n_comp++;
  endfunction

  always @(posedge clk_out) if (rst_n) begin
    if (frame) begin
      if (nbit == OUTW) receive(rx);
      rx = {{(OUTW-1){1'b0}}, sout}; nbit = 1;
    end else if (nbit >= 0) begin
      rx = {rx[OUTW-2:0], sout}; nbit++;
    end
  end

  logic [OUTW-1:0] srx;
  int sbit = 0;
  always @(posedge spi_clk) if (spi_run) begin
    srx = {srx[OUTW-2:0], spi_do}; sbit++;
    if (sbit == OUTW) begin
      sbit = 0;
      if (srx != '0) n_spi_words++;
      receive(srx);
    end
  end

  // Compare and clear.
  task automatic compare(input string phase);
    int missing = 0, extra = 0;
    foreach (exp_w[w]) begin
      int g = got_w.exists(w) ? got_w[w] : 0;
      if (g < exp_w[w]) missing += exp_w[w] - g;
    end
    foreach (got_w[w]) begin
      int e = exp_w.exists(w) ? exp_w[w] : 0;
      if (got_w[w] > e) extra += got_w[w] - e;
    end
    check(missing == 0, $sformatf("%s: %0d of %0d expected words missing", phase, missing, n_exp));
    check(extra == 0, $sformatf("%s: %0d unexpected words", phase, extra));
    check(n_bad_check == 0, $sformatf("%s: %0d words with a bad check bit", phase, n_bad_check));
    $display("%s: expected %0d words, received %0d", phase, n_exp, n_got);
    exp_w.delete(); got_w.delete(); n_exp = 0; n_got = 0; n_bad_check = 0;
  endtask

  task automatic settle(input int clocks);
    repeat (clocks) @(negedge clk);
  endtask

  // ---------------------------------------------------------------- mechanism counters
  logic [15:0] busy_q, f2full_q, conflict_q;
  for (genvar q = 0; q < 4; q++) begin : g_mon
    assign f2full_q[q]  = dut.g_q[q].u_q.f2_full;
    assign conflict_q[q] = $countones(dut.g_q[q].u_q.req) > 1;
    for (genvar g = 0; g < 4; g++) begin : g_g
      assign busy_q[4*q+g] = |dut.g_q[q].u_q.g_grp[g].u_ro.busy;
    end
  end
  int n_busy = 0, n_f2full = 0, n_conflict = 0, n_drop = 0, n_lost = 0, n_top_conflict = 0;
  always @(posedge clk) if (rst_n) begin
    if (busy_q != 0) n_busy++;
    if (f2full_q != 0) n_f2full++;
    if (conflict_q != 0) n_conflict++;
    if (trig_dropped) n_drop++;
    if (trig_lost) n_lost++;
  end
  always @(posedge clk_out) if (rst_n && $countones(dut.u_top_mux.req) > 1) n_top_conflict++;

  // ---------------------------------------------------------------- test
  initial begin
    logic [TSW-1:0] ts, ts_trig;
    int cols[$];
    int n_pulse;
    repeat (4) @(negedge clk);
    rst_n = 1;
    settle(4);

    // ---- A: triggerless, compression on.
    spi_wr(7'h00, 16'b0010);          // compress on, triggerless, TEST=00
    cols.delete();
    for (int c = 0; c < NDC; c += 7) begin
      cl_addr[c] = make_cluster($urandom % NPIX, 1 + $urandom % 5);
      cols.push_back(c);
    end
    fire(cols, 1, 1, ts);
    settle(60);
    settle(400);
    compare("A triggerless compressed");

    // ---- B: compression off.
    spi_wr(7'h00, 16'b0000);
    cols.delete();
    for (int c = 3; c < NDC; c += 5) begin
      cl_addr[c] = make_cluster($urandom % NPIX, 1 + $urandom % 4);
      cols.push_back(c);
    end
    fire(cols, 1, 0, ts);
    settle(600);
    // Fully loaded group: columns 64..95, 24 scattered hits each.
    cols.delete();
    for (int c = 64; c < 96; c++) begin
      cl_addr[c] = make_cluster($urandom % NPIX, 24, 400);
      cols.push_back(c);
    end
    fire(cols, 1, 0, ts);
    settle(1500);
    compare("B triggerless uncompressed");

    // ---- C: mask and test pulse in column 200: pulse-enable 10, 11, 500;
    // pixel 11 masked. Then a hit on masked pixel 11 gives nothing.
    spi_wr(7'h00, 16'b0010);
    spi_wr(7'h03, 16'd200);
    spi_wr(7'h04, 16'd10);  spi_wr(7'h05, 16'b10);
    spi_wr(7'h04, 16'd11);  spi_wr(7'h05, 16'b11);
    spi_wr(7'h04, 16'd500); spi_wr(7'h05, 16'b10);
    @(negedge clk); dpulse = 1;
    @(negedge clk); dpulse = 0; ts = dut.system_time;
    add_exp({9'd200, ts, 4'b0000, 10'd10});
    add_exp({9'd200, ts, 4'b0000, 10'd500});
    settle(100);
    n_pulse = n_got;
    cl_addr[200] = '{11};
    cols = '{200};
    fire(cols, 0, 1, ts);
    settle(100);
    compare("C mask and test pulse");

    // ---- D: trigger mode, LATENCY 100 (2.5 us), UNCERTAIN 3.
    spi_wr(7'h01, 16'd100);
    spi_wr(7'h02, 16'd3);
    spi_wr(7'h00, 16'b0011);
    settle(300);
    // Clusters at t0 (inside the window of the trigger 99 clocks later),
    // t0+20 and t0-30 (outside).
    cols.delete();
    for (int c = 1; c < NDC; c += 16) begin cl_addr[c] = make_cluster($urandom % NPIX, 3); cols.push_back(c); end
    fire(cols, 0, 1, ts);                 // early: outside
    settle(28);
    cols.delete();
    for (int c = 2; c < NDC; c += 16) begin cl_addr[c] = make_cluster($urandom % NPIX, 3); cols.push_back(c); end
    fire(cols, 1, 1, ts);                 // inside
    settle(18);
    cols.delete();
    for (int c = 5; c < NDC; c += 16) begin cl_addr[c] = make_cluster($urandom % NPIX, 3); cols.push_back(c); end
    fire(cols, 0, 1, ts_trig);            // late: outside
    // Trigger when the "inside" clusters are 99 clocks old.
    while (8'(dut.system_time - ts) != 8'd99) @(negedge clk);
    trigger = 1;
    @(negedge clk); trigger = 0;
    @(negedge clk); trigger = 1;          // second trigger: lost
    @(negedge clk); trigger = 0;
    settle(600);
    compare("D trigger mode");

    // ---- E: slow control through SPI_DO; a big burst fills FIFO2.
    spi_wr(7'h00, 16'b1100);              // TEST=11, compress off, triggerless
    settle(10);
    spi_clk = 1;                          // first edge falls: loads a word
    #1 spi_run = 1;
    cols.delete();
    for (int c = 0; c < 128; c++) begin cl_addr[c] = make_cluster($urandom % NPIX, 3, 200); cols.push_back(c); end
    fire(cols, 1, 0, ts);
    while (n_got < n_exp && $time < 2900000) @(negedge clk);
    settle(50);
    spi_run = 0;
    compare("E slow control");

    $display("mechanisms: compressed=%0d busy=%0d mux_conflict=%0d top_conflict=%0d fifo2_full=%0d dropped=%0d lost=%0d pulse=%0d spi=%0d",
             n_comp, n_busy, n_conflict, n_top_conflict, n_f2full, n_drop, n_lost, n_pulse, n_spi_words);
    check(n_comp > 0, "compression happened");
    check(n_busy > 0, "FIFO1 BUSY happened");
    check(n_conflict > 0, "MUX conflict in a quarter happened");
    check(n_top_conflict > 0, "top MUX conflict happened");
    check(n_f2full > 0, "FIFO2 full happened");
    check(n_drop > 0, "trigger drop happened");
    check(n_lost > 0, "lost trigger happened");
    check(n_pulse == 2, "test pulse words");
    check(n_spi_words > 0, "SPI output happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
