// tb_spi_config: self-checking test of the SPI slave and register file.
//
// A mode-0 SPI master model (SCLK period 80 ns, clk 10 ns) writes and reads
// 24-bit frames {rw, addr[6:0], data[15:0]}. Checks: reset values; writes to
// CTRL, TRIGGER_LATENCY (123) and TRIGGER_UNCERTAIN (6) appear on cfg and
// read back on MISO; a PIX_CFG write gives one pix_we pulse with the column,
// pixel, mask and pulse-enable set before; a frame cut short or too long is
// ignored.
module tb_spi_config;
  import taichu_pkg::*;

  logic clk = 0, rst_n = 0, sclk = 0, cs_n = 1, mosi = 0, miso;
  cfg_t cfg;
  logic pix_we, pix_mask, pix_pulse_en;
  logic [8:0] pix_dcol;
  logic [AW-1:0] pix_addr;
  int checks = 0, failures = 0;
  int n_we = 0;

  spi_config dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (pix_we) n_we++;

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

  task automatic xfer(input bit rw, input logic [6:0] a, input logic [15:0] d,
                      output logic [15:0] rdv, input int nbits = 24, input int extra = 0);
    logic [23:0] f = {rw, a, d};
    rdv = '0;
    cs_n = 0; #100;
    repeat (extra) begin
      mosi = 1'b0; #40; sclk = 1; #40; sclk = 0;
    end
    for (int b = 23; b >= 24 - nbits; b--) begin
      mosi = f[b]; #40;
      sclk = 1;
      if (b < 16) rdv = {rdv[14:0], miso};
      #40; sclk = 0;
    end
    #60; cs_n = 1; #200;
  endtask

  initial begin
    logic [15:0] r;
    repeat (3) @(negedge clk);
    rst_n = 1;
    #100;
    check(!cfg.trigger_mode && cfg.compress_en && cfg.test == TEST_NORMAL &&
          cfg.latency == 0 && cfg.uncertain == 0, "reset values");
    xfer(0, 7'h01, 16'd123, r);
    xfer(0, 7'h02, 16'd6, r);
    xfer(0, 7'h00, 16'b1101, r);
    check(cfg.latency == 8'd123 && cfg.uncertain == 3'd6, "latency/uncertain written");
    check(cfg.trigger_mode && !cfg.compress_en && cfg.test == TEST_SPI, "CTRL written");
    xfer(1, 7'h01, 16'h0, r);
    check(r == 16'd123, $sformatf("latency read back %0d", r));
    xfer(1, 7'h02, 16'h0, r);
    check(r == 16'd6, $sformatf("uncertain read back %0d", r));
    xfer(1, 7'h00, 16'h0, r);
    check(r == 16'b1101, $sformatf("CTRL read back %b", r));
    // Pixel configuration.
    xfer(0, 7'h03, 16'd300, r);
    xfer(0, 7'h04, 16'd777, r);
    check(n_we == 0, "no pixel write yet");
    xfer(0, 7'h05, 16'b11, r);
    check(n_we == 1 && pix_dcol == 9'd300 && pix_addr == 10'd777 && pix_mask && pix_pulse_en,
          "pixel write");
    // Short frame ignored.
    xfer(0, 7'h01, 16'd55, r, 16);
    check(cfg.latency == 8'd123, "short frame ignored");
    xfer(0, 7'h01, 16'd55, r);
    check(cfg.latency == 8'd55, "full frame after a short one");
    // Frame too long: 8 extra bits ahead of a valid write, ignored.
    xfer(0, 7'h01, 16'd77, r, 24, 8);
    check(cfg.latency == 8'd55, "long frame ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
