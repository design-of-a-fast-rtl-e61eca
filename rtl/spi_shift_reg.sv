// spi_shift_reg: 32-bit output shift register of the slow control mode.
//
// When enable is high (TEST = 2'b11) output words are shifted out on SPI_DO
// at the pace of SPI_CLK instead of through the fast serial link. SPI_CLK is
// oversampled by clk (two-flop synchronizer, so clk must be several times
// faster). On each falling SPI_CLK edge the register shifts by one bit, MSB
// first; after the last bit of a word the next word is loaded (word_take
// pulses) or an all-zero word when none is available. The external master
// samples SPI_DO on rising SPI_CLK edges. Edge choice, bit order and idle
// word are this design's choices.
module spi_shift_reg #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         enable,
  input  logic         spi_clk,
  input  logic         word_valid,
  input  logic [W-1:0] word,
  output logic         word_take,
  output logic         spi_do
);

  localparam int unsigned CW = $clog2(W);

  logic [2:0]    sclk_s;     // synchronizer and edge detector
  logic          fall;
  logic [W-1:0]  sh;
  logic [CW-1:0] left;       // bits left in the register after the current one

  assign fall      = enable && sclk_s[2] && !sclk_s[1];
  assign word_take = fall && (left == '0) && word_valid;
  assign spi_do    = sh[W-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '0;
      sh     <= '0;
      left   <= '0;
    end else begin
      sclk_s <= {sclk_s[1:0], spi_clk};
      if (fall) begin
        if (left == '0) begin
          sh   <= word_valid ? word : '0;
          left <= CW'(W - 1);
        end else begin
          sh   <= sh << 1;
          left <= left - 1'b1;
        end
      end
    end
  end

endmodule
