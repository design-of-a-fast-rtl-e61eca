// tb_spi_shift_reg: self-checking test of the slow-control output register.
//
// clk runs at 10 ns, SPI_CLK at 120 ns starting high. A queue of words is
// offered; the master model samples SPI_DO on rising SPI_CLK edges. Checks:
// the sampled bit stream is the offered words, MSB first, back to back (one
// word per 32 SPI_CLK periods); SPI_DO holds for 50 ns after every rising
// edge; nothing is taken while enable is low.
module tb_spi_shift_reg;
  localparam int W = 32;

  logic clk = 0, rst_n = 0, enable = 0, spi_clk = 1;
  logic word_valid, word_take, spi_do;
  logic [W-1:0] word;
  int checks = 0, failures = 0;
  logic [W-1:0] q [$];
  logic [W-1:0] taken [$];
  logic rxbits [$];
  int n_take_off = 0;

  spi_shift_reg #(.W(W)) dut (.*);

  always #5 clk = ~clk;
  bit run_spi = 0;
  always begin #60; if (run_spi) spi_clk = ~spi_clk; end

  assign word_valid = q.size() != 0;
  assign word = (q.size() != 0) ? q[0] : '0;

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

  always @(posedge clk) if (word_take) begin
    taken.push_back(q[0]); void'(q.pop_front());
    if (!enable) n_take_off++;
  end
  always @(posedge spi_clk) if (enable && taken.size() != 0) rxbits.push_back(spi_do);
  // SPI_DO may change only after a falling edge: it must hold for 50 ns after
  // each rising edge, where the master samples it.
  int n_hold = 0;
  always @(posedge spi_clk) if (enable && taken.size() != 0) begin
    logic v;
    v = spi_do;
    #50;
    n_hold++;
    if (spi_do != v) begin
      failures++;
      $display("FAIL: SPI_DO changed after a rising edge at %0t", $time);
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 6; i++) q.push_back($urandom | 32'h1);
    // Disabled: nothing moves.
    run_spi = 1;
    repeat (40) @(posedge spi_clk);
    check(n_take_off == 0 && q.size() == 6, "no word taken while disabled");
    // Enabled: six words back to back.
    @(posedge spi_clk); #1 enable = 1;
    repeat (6 * W + 4) @(posedge spi_clk);
    check(taken.size() == 6, $sformatf("6 words taken, got %0d", taken.size()));
    check(rxbits.size() >= 6 * W, "enough bits");
    check(n_hold >= 6 * W, "SPI_DO hold time checked on every bit");
    for (int k = 0; k < 6 && k < taken.size(); k++) begin
      logic [W-1:0] w = '0;
      for (int b = 0; b < W; b++) w = {w[W-2:0], rxbits[k * W + b]};
      check(w == taken[k], $sformatf("word %0d: got %h expected %h", k, w, taken[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
