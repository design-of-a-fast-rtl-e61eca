// tb_fifo_tree32: self-checking test of the shared FIFO tree of 32 columns.
//
// Checks, against a per-column scoreboard:
//  - capacity: with the root not read, the tree takes 280 words from all
//    columns together, and 52 words from a single column;
//  - every word comes out once, with its column index prefixed, and words of
//    one column keep their order (random writes and reads);
//  - rate: with all columns writing and the root read every clock, one word
//    leaves per clock;
//  - fairness of the crossed pairing: columns 0 and 4 (one L2 router) both
//    get through when both are saturated.
module tb_fifo_tree32;
  import taichu_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [31:0] wr = '0, full;
  rd_word_t [31:0] wdata;
  logic rd, rd_en = 0, empty;
  logic [W32-1:0] rdata;
  int checks = 0, failures = 0;
  rd_word_t sb [32][$];
  int out_cnt [32];
  int seq [32];

  fifo_tree32 dut (.*);
  assign rd = rd_en && !empty;

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  // Scoreboard on the read side.
  always @(posedge clk) if (rst_n && rd && !empty) begin
    int c;
    rd_word_t e;
    c = int'(rdata[W32-1 -: 5]);
    if (sb[c].size() == 0) begin
      failures++; $display("FAIL: word from column %0d not written", c);
    end else begin
      e = sb[c].pop_front();
      if (rdata[RDW-1:0] != e) begin failures++; $display("FAIL: column %0d order/data", c); end
    end
    out_cnt[c]++;
  end

  // Writers: mask selects the columns that write, prob in 1/N per clock.
  logic [31:0] wmask = '0;
  int wprob = 1;
  always @(negedge clk) begin
    for (int i = 0; i < 32; i++) begin
      wr[i] = 1'b0;
      if (rst_n && wmask[i] && !full[i] && ($urandom % wprob == 0)) begin
        wr[i] = 1'b1;
        wdata[i] = '{ts: TSW'(seq[i]), pat: PATW'($urandom), addr: AW'($urandom)};
      end
    end
  end
  always @(posedge clk) for (int i = 0; i < 32; i++) if (wr[i] && !full[i]) begin
    sb[i].push_back(wdata[i]); seq[i]++;
  end

  function automatic int total_in();
    int s = 0;
    for (int i = 0; i < 32; i++) s += sb[i].size();
    return s;
  endfunction

  task automatic drain();
    rd_en = 1;
    repeat (400) @(negedge clk);
    rd_en = 0;
    check(total_in() == 0 && empty, "tree drained");
  endtask

  initial begin
    int busy_cyc, moved;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Capacity, all columns.
    wmask = '1; wprob = 1;
    repeat (200) @(negedge clk);
    wmask = '0;
    @(negedge clk);
    check(total_in() == 280, $sformatf("280 words held, got %0d", total_in()));
    drain();

    // Capacity, one column.
    wmask = 32'h1;
    repeat (200) @(negedge clk);
    wmask = '0;
    @(negedge clk);
    check(total_in() == 52, $sformatf("52 words from one column, got %0d", total_in()));
    drain();

    // Rate: saturate, read every clock, count words per clock.
    wmask = '1; wprob = 1;
    repeat (100) @(negedge clk);
    rd_en = 1;
    busy_cyc = 0; moved = 0;
    for (int i = 0; i < 200; i++) begin
      @(posedge clk); busy_cyc++; if (!empty) moved++;
    end
    check(moved == busy_cyc, $sformatf("one word per clock: %0d in %0d", moved, busy_cyc));
    wmask = '0; rd_en = 0;
    drain();

    // Fairness between columns 0 and 4.
    for (int i = 0; i < 32; i++) out_cnt[i] = 0;
    wmask = 32'h11; rd_en = 1;
    repeat (400) @(negedge clk);
    wmask = '0;
    drain();
    check(out_cnt[0] > 150 && out_cnt[4] > 150, $sformatf("columns 0/4 share: %0d/%0d", out_cnt[0], out_cnt[4]));

    // Random traffic.
    for (int r = 0; r < 20; r++) begin
      wmask = $urandom; wprob = 1 + $urandom % 8;
      for (int i = 0; i < 200; i++) begin
        @(negedge clk); rd_en = ($urandom % 3 != 0);
      end
    end
    wmask = '0;
    drain();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
