// pixel_dcol: digital readout logic of one double column of pixels.
//
// Each pixel holds a state register that is set by a rising edge of its
// discriminator output (hit) or, when its test-pulse enable is set, by a rising
// edge of the digital test pulse DPULSE. A masked pixel is never set. The set
// pixels form a priority chain; the address encoder reports the pending pixel
// of highest priority (lowest address) on addr. FASTOR is high while any pixel
// is pending.
//
// Timing: READ is held high for one clock by the Dcol reader. During that clock
// addr is valid and FASTOR already excludes the pixel being read (so FASTOR
// drops within the READ cycle of the last pixel, as the column timing of the
// sensor shows); at the clock edge that ends the READ cycle the pixel is
// cleared. Hit and DPULSE edges are detected on clk, a simplification of the
// asynchronous in-pixel latch.
//
// Address map (this design's choice): addr = {row[8:0], column-in-pair}.
// Configuration is written one pixel at a time through cfg_we/cfg_addr.
module pixel_dcol #(
  parameter int unsigned NPIX = 1024,
  parameter int unsigned AW   = $clog2(NPIX)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NPIX-1:0] hit,
  input  logic            dpulse,
  input  logic            cfg_we,
  input  logic [AW-1:0]   cfg_addr,
  input  logic            cfg_mask,
  input  logic            cfg_pulse_en,
  input  logic            read,
  output logic            fastor,
  output logic [AW-1:0]   addr,
  output logic            addr_valid
);

  logic [NPIX-1:0] state, mask, pulse_en, hit_q;
  logic            dpulse_q;
  logic [NPIX-1:0] lowest;   // one-hot: pending pixel of highest priority
  logic [NPIX-1:0] set_now;

  // Isolate the lowest set bit: x & -x.
  assign lowest  = state & (~state + 1'b1);
  assign set_now = ((hit & ~hit_q) | ({NPIX{dpulse & ~dpulse_q}} & pulse_en)) & ~mask;

  always_comb begin
    addr = '0;
    for (int i = NPIX - 1; i >= 0; i--)
      if (state[i]) addr = AW'(i);
  end

  assign addr_valid = |state;
  assign fastor = |(state & ~(read ? lowest : '0));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= '0;
      mask     <= '0;
      pulse_en <= '0;
      hit_q    <= '0;
      dpulse_q <= 1'b0;
    end else begin
      hit_q    <= hit;
      dpulse_q <= dpulse;
      state    <= (state & ~(read ? lowest : '0)) | set_now;
      if (cfg_we) begin
        mask[cfg_addr]     <= cfg_mask;
        pulse_en[cfg_addr] <= cfg_pulse_en;
      end
    end
  end

endmodule
