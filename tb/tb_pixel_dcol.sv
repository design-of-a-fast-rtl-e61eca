// tb_pixel_dcol: self-checking test of the double-column pixel logic.
//
// A reference bit vector of pending pixels is kept next to the DUT. The test
// sets pixels by hit edges, checks that a held hit sets a pixel only once,
// that masked pixels never set, that DPULSE sets exactly the pulse-enabled
// unmasked pixels, and that repeated READ pulses return the pending pixels in
// ascending address order with FASTOR dropping during the READ of the last
// one. A random phase mixes new hits with reads.
module tb_pixel_dcol;
  localparam int NPIX = 64;
  localparam int AW   = 6;

  logic clk = 0, rst_n = 0;
  logic [NPIX-1:0] hit = '0;
  logic dpulse = 0, cfg_we = 0, cfg_mask = 0, cfg_pulse_en = 0, read = 0;
  logic [AW-1:0] cfg_addr = '0;
  logic fastor, addr_valid;
  logic [AW-1:0] addr;
  int checks = 0, failures = 0;
  logic [NPIX-1:0] ref_st = '0, ref_mask = '0;

  pixel_dcol #(.NPIX(NPIX), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  function automatic int lowest(input logic [NPIX-1:0] v);
    for (int i = 0; i < NPIX; i++) if (v[i]) return i;
    return -1;
  endfunction

  task automatic pulse_hits(input logic [NPIX-1:0] h);
    @(negedge clk); hit = h;
    @(negedge clk); hit = '0;
    ref_st |= h & ~ref_mask;
  endtask

  task automatic cfg(input int a, input bit m, input bit p);
    @(negedge clk); cfg_we = 1; cfg_addr = AW'(a); cfg_mask = m; cfg_pulse_en = p;
    if (m) ref_mask[a] = 1'b1; else ref_mask[a] = 1'b0;
    @(negedge clk); cfg_we = 0;
  endtask

  // Read everything pending, checking order and FASTOR.
  task automatic drain();
    int exp;
    while (ref_st != '0) begin
      @(negedge clk);
      exp = lowest(ref_st);
      check(addr_valid && addr == AW'(exp), $sformatf("address %0d expected, got %0d", exp, addr));
      read = 1;
      #1;
      ref_st[exp] = 1'b0;
      check(fastor == (ref_st != '0), "FASTOR during READ");
      @(negedge clk); read = 0;
    end
    #1 check(!fastor && !addr_valid, "column empty after drain");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!fastor && !addr_valid, "empty after reset");

    // Plain hits, read in ascending order.
    pulse_hits((64'd1 << 10) | (64'd1 << 3) | (64'd1 << 7));
    #1 check(fastor && addr == 3, "first pending is 3");
    drain();

    // A held hit sets the pixel once.
    @(negedge clk); hit[20] = 1;
    @(negedge clk); ref_st[20] = 1;
    drain();
    repeat (3) @(negedge clk);
    check(!fastor, "held hit does not set the pixel again");
    hit[20] = 0;

    // Mask.
    cfg(5, 1, 0);
    pulse_hits((64'd1 << 5) | (64'd1 << 6));
    #1 check(addr == 6, "masked pixel 5 not set");
    drain();

    // Test pulse: 9 and 12 enabled, 5 masked though enabled.
    cfg(9, 0, 1); cfg(12, 0, 1); cfg(5, 1, 1);
    @(negedge clk); dpulse = 1;
    @(negedge clk); dpulse = 0;
    ref_st[9] = 1; ref_st[12] = 1;
    drain();

    // Random hits mixed with reads.
    cfg(5, 0, 0); cfg(9, 0, 0); cfg(12, 0, 0);
    for (int r = 0; r < 40; r++) begin
      logic [NPIX-1:0] h;
      h = {$urandom, $urandom} & {$urandom, $urandom};
      pulse_hits(h);
      drain();
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
