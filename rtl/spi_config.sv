// spi_config: SPI slave and configuration registers.
//
// SPI (mode 0, MSB first) is oversampled by the 40 MHz clock, so SCLK must be
// at most a quarter of it. A frame, while cs_n is low, is 24 bits:
//   {rw, addr[6:0], data[15:0]}   rw = 1 reads, rw = 0 writes.
// A write takes effect when cs_n rises after exactly 24 bits. For a read the
// register is copied after the eighth bit and shifted out on miso, changing
// on falling SCLK edges, during the data phase.
//
// Register map (addresses and reset values are this design's choice; the
// TRIGGER_LATENCY and TRIGGER_UNCERTAIN widths are the sensor's):
//   0x00 CTRL      [0] trigger mode  [1] COMPRESS_EN (reset 1)  [3:2] TEST
//   0x01 TRIGGER_LATENCY   [7:0], 25 ns steps (0..6 us in use)
//   0x02 TRIGGER_UNCERTAIN [2:0], 25 ns steps (0..175 ns)
//   0x03 PIX_DCOL  [8:0]  double column of the next pixel write
//   0x04 PIX_ADDR  [9:0]  pixel of the next pixel write
//   0x05 PIX_CFG   [0] mask  [1] test pulse enable; a write pulses pix_we
module spi_config
  import taichu_pkg::*;
#(
  parameter int unsigned DCW = 9
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           sclk,
  input  logic           cs_n,
  input  logic           mosi,
  output logic           miso,
  output cfg_t           cfg,
  output logic           pix_we,
  output logic [DCW-1:0] pix_dcol,
  output logic [AW-1:0]  pix_addr,
  output logic           pix_mask,
  output logic           pix_pulse_en
);

  localparam logic [6:0] A_CTRL = 7'h00, A_LAT = 7'h01, A_UNC = 7'h02,
                         A_DCOL = 7'h03, A_PADDR = 7'h04, A_PCFG = 7'h05;

  logic [2:0]  sclk_s, cs_s;
  logic [1:0]  mosi_s;
  logic        rise, fall, cs_rise, active;
  logic [4:0]  bitcnt;
  logic [23:0] rx;
  logic [15:0] tx;
  logic [15:0] rd_val;

  assign active  = !cs_s[1];
  assign rise    = active && sclk_s[1] && !sclk_s[2];
  assign fall    = active && !sclk_s[1] && sclk_s[2];
  assign cs_rise = cs_s[1] && !cs_s[2];
  assign miso    = tx[15];

  always_comb begin
    unique case (rx[6:0])   // address after eight bits
      A_CTRL:  rd_val = 16'({cfg.test, cfg.compress_en, cfg.trigger_mode});
      A_LAT:   rd_val = 16'(cfg.latency);
      A_UNC:   rd_val = 16'(cfg.uncertain);
      A_DCOL:  rd_val = 16'(pix_dcol);
      A_PADDR: rd_val = 16'(pix_addr);
      A_PCFG:  rd_val = 16'({pix_pulse_en, pix_mask});
      default: rd_val = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s       <= '0;
      cs_s         <= '1;
      mosi_s       <= '0;
      bitcnt       <= '0;
      rx           <= '0;
      tx           <= '0;
      cfg          <= '{trigger_mode: 1'b0, compress_en: 1'b1, test: TEST_NORMAL,
                        latency: '0, uncertain: '0};
      pix_we       <= 1'b0;
      pix_dcol     <= '0;
      pix_addr     <= '0;
      pix_mask     <= 1'b0;
      pix_pulse_en <= 1'b0;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk};
      cs_s   <= {cs_s[1:0], cs_n};
      mosi_s <= {mosi_s[0], mosi};
      pix_we <= 1'b0;
      if (!active) bitcnt <= '0;
      if (rise) begin
        rx     <= {rx[22:0], mosi_s[1]};
        bitcnt <= bitcnt + 1'b1;
      end
      if (active && bitcnt == 5'd8 && rx[7])
        tx <= rd_val;
      if (fall && bitcnt > 5'd8) tx <= tx << 1;
      if (cs_rise) begin
        tx <= '0;
        if (bitcnt == 5'd24 && !rx[23]) begin
          unique case (rx[22:16])
            A_CTRL: begin
              cfg.trigger_mode <= rx[0];
              cfg.compress_en  <= rx[1];
              cfg.test         <= test_mode_e'(rx[3:2]);
            end
            A_LAT:   cfg.latency   <= rx[LATW-1:0];
            A_UNC:   cfg.uncertain <= rx[UNCW-1:0];
            A_DCOL:  pix_dcol      <= rx[DCW-1:0];
            A_PADDR: pix_addr      <= rx[AW-1:0];
            A_PCFG: begin
              pix_mask     <= rx[0];
              pix_pulse_en <= rx[1];
              pix_we       <= 1'b1;
            end
            default: ;
          endcase
        end
      end
    end
  end

endmodule
