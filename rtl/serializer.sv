// serializer: parallel-to-serial converter of the output data link.
//
// Runs on the bit clock (from the PLL of the sensor). Every W bit clocks it
// loads one word, taking word when word_valid is high (word_take pulses in
// that clock) and an all-zero idle word otherwise, and shifts it out MSB
// first on sout. frame is high with the first bit of each word. Output words
// carry an odd-parity check bit, so no data word is all zeros and the
// receiver can tell idle words apart. Line coding (8b10b) and the analog
// drivers are not part of this module; the framing is this design's choice.
module serializer #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         word_valid,
  input  logic [W-1:0] word,
  output logic         word_take,
  output logic         sout,
  output logic         frame
);

  localparam int unsigned CW = $clog2(W);

  logic [W-1:0]  sh;
  logic [CW-1:0] cnt;     // bit of the current word being sent
  logic          last;

  assign last      = (cnt == CW'(W - 1));
  assign word_take = last && word_valid;
  assign sout      = sh[W-1];
  assign frame     = (cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh  <= '0;
      cnt <= CW'(W - 1);
    end else if (last) begin
      sh  <= word_valid ? word : '0;
      cnt <= '0;
    end else begin
      sh  <= sh << 1;
      cnt <= cnt + 1'b1;
    end
  end

endmodule
