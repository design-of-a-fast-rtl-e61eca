// taichupix3_top: digital part of the TaichuPix3 pixel sensor.
//
// The pixel matrix is NPIX rows x 512 double columns (1024 x 512 pixels,
// 25 um pitch in the sensor). Its digital readout works in three stages:
//   1. Every double column has in-pixel priority logic and an end-of-column
//      reader that reads one address per 50 ns (two 40 MHz clocks),
//      timestamps each FASTOR event and compresses up to five adjacent
//      addresses into one word.
//   2. Each group of 32 columns shares a FIFO tree (FIFO1, 280 words); its
//      output passes the trigger-match logic (trigger mode) or goes straight
//      on (triggerless mode).
//   3. Hierarchical 2:1 MUX trees merge 4 groups into the 256-word FIFO2 of
//      each 128-column quarter (40 MHz), and the 4 quarters into the output
//      stream on clk_out. The word {check, dcol[8:0], ts[7:0], pattern[3:0],
//      addr[9:0]} goes to the serializer (sout, one bit per clk_out) or, in
//      slow control mode (TEST = 2'b11), to SPI_DO at the pace of SPI_CLK.
// Configuration (trigger mode, COMPRESS_EN, TEST, TRIGGER_LATENCY,
// TRIGGER_UNCERTAIN, pixel mask and test-pulse enables) is written through
// the SPI slave. An 8-bit system timer counts clk (25 ns steps) for the
// timestamps.
//
// Not in this RTL: the analog front ends (their discriminator outputs are the
// hit inputs), the bias DAC, LDOs, PLL (clk_out is an input), line drivers,
// 8b10b coding, scan chain and memory BIST. hit is sampled on clk. clk_out
// must be at least 4x faster than spi_clk in slow control mode. rst_n resets
// both clock domains asynchronously.
module taichupix3_top
  import taichu_pkg::*;
#(
  parameter int unsigned NPIX        = 1024,
  parameter int unsigned FIFO2_DEPTH = 256
) (
  input  logic                   clk,
  input  logic                   clk_out,
  input  logic                   rst_n,
  input  logic [511:0][NPIX-1:0] hit,
  input  logic                   dpulse,
  input  logic                   trigger,
  input  logic                   sclk,
  input  logic                   cs_n,
  input  logic                   mosi,
  output logic                   miso,
  input  logic                   spi_clk,
  output logic                   spi_do,
  output logic                   sout,
  output logic                   frame,
  output logic                   trig_dropped,
  output logic                   trig_lost
);

  cfg_t            cfg;
  logic            pix_we, pix_mask, pix_pulse_en;
  logic [8:0]      pix_dcol;
  logic [AW-1:0]   pix_addr;
  logic [TSW-1:0]  system_time;

  spi_config u_cfg (
    .clk, .rst_n, .sclk, .cs_n, .mosi, .miso, .cfg, .pix_we, .pix_dcol,
    .pix_addr, .pix_mask, .pix_pulse_en);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) system_time <= '0;
    else        system_time <= system_time + 1'b1;
  end

  // Four quarters of 128 double columns.
  logic [3:0]             q_rd, q_empty, q_drop, q_lost;
  logic [3:0][W128-1:0]   q_data;

  for (genvar q = 0; q < 4; q++) begin : g_q
    readout128 #(.NPIX(NPIX), .FIFO2_DEPTH(FIFO2_DEPTH)) u_q (
      .clk, .rst_n, .hit(hit[128*q +: 128]), .dpulse,
      .pix_we(pix_we && pix_dcol[8:7] == 2'(q)), .pix_dcol(pix_dcol[6:0]),
      .pix_addr, .pix_mask, .pix_pulse_en, .cfg, .trigger, .system_time,
      .rclk(clk_out), .rrst_n(rst_n), .rd(q_rd[q]), .rdata(q_data[q]),
      .empty(q_empty[q]), .dropped(q_drop[q]), .trig_lost(q_lost[q]));
  end

  assign trig_dropped = |q_drop;
  assign trig_lost    = |q_lost;

  // Output side (clk_out): TEST is brought over from the clk domain.
  logic [1:0][1:0] test_s;
  logic            spi_mode;
  always_ff @(posedge clk_out or negedge rst_n) begin
    if (!rst_n) test_s <= '0;
    else        test_s <= {test_s[0], cfg.test};
  end
  assign spi_mode = (test_s[1] == TEST_SPI);

  logic            any_req, ser_take, spi_take;
  logic [W512-1:0] word31;
  logic [OUTW-1:0] word;

  hier_mux #(.N(4), .W(W128)) u_top_mux (
    .clk(clk_out), .rst_n, .req(~q_empty), .din(q_data),
    .en_top(spi_mode ? spi_take : ser_take), .grant(q_rd),
    .any_req, .dout(word31));

  assign word = {check_bit(word31), word31};

  serializer #(.W(OUTW)) u_ser (
    .clk(clk_out), .rst_n, .word_valid(any_req && !spi_mode), .word,
    .word_take(ser_take), .sout, .frame);

  spi_shift_reg #(.W(OUTW)) u_spi_do (
    .clk(clk_out), .rst_n, .enable(spi_mode), .spi_clk,
    .word_valid(any_req), .word, .word_take(spi_take), .spi_do);

endmodule
