// readout128: readout of 128 double columns.
//
// Four readout32 blocks are merged by a 4:1 hierarchical MUX into the
// 256-word FIFO2 of this quarter of the sensor. A word moves into FIFO2 in
// every 40 MHz clock in which a block offers one and FIFO2 has room; the
// MUX prefixes the 2-bit block index, giving {dcol[6:0], ts, pattern, addr}.
// FIFO2 is read in the output clock domain (rclk).
module readout128
  import taichu_pkg::*;
#(
  parameter int unsigned NPIX        = 1024,
  parameter int unsigned FIFO2_DEPTH = 256
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [127:0][NPIX-1:0] hit,
  input  logic                   dpulse,
  input  logic                   pix_we,
  input  logic [6:0]             pix_dcol,
  input  logic [AW-1:0]          pix_addr,
  input  logic                   pix_mask,
  input  logic                   pix_pulse_en,
  input  cfg_t                   cfg,
  input  logic                   trigger,
  input  logic [TSW-1:0]         system_time,
  input  logic                   rclk,
  input  logic                   rrst_n,
  input  logic                   rd,
  output logic [W128-1:0]        rdata,
  output logic                   empty,
  output logic                   dropped,
  output logic                   trig_lost
);

  logic [3:0]            req, grant, drop_v, lost_v;
  logic [3:0][W32-1:0]   dout;
  logic [W128-1:0]       mux_out;
  logic                  mux_req, f2_full;

  for (genvar g = 0; g < 4; g++) begin : g_grp
    readout32 #(.NPIX(NPIX)) u_ro (
      .clk, .rst_n, .hit(hit[32*g +: 32]), .dpulse,
      .pix_we(pix_we && pix_dcol[6:5] == 2'(g)), .pix_dcol(pix_dcol[4:0]),
      .pix_addr, .pix_mask, .pix_pulse_en, .cfg, .trigger, .system_time,
      .req(req[g]), .en(grant[g]), .dout(dout[g]),
      .dropped(drop_v[g]), .trig_lost(lost_v[g]));
  end

  hier_mux #(.N(4), .W(W32)) u_mux (
    .clk, .rst_n, .req, .din(dout), .en_top(!f2_full), .grant,
    .any_req(mux_req), .dout(mux_out));

  fifo2 #(.DEPTH(FIFO2_DEPTH), .W(W128)) u_fifo2 (
    .wclk(clk), .wrst_n(rst_n), .wr(mux_req && !f2_full), .wdata(mux_out),
    .full(f2_full), .rclk, .rrst_n, .rd, .rdata, .empty);

  assign dropped   = |drop_v;
  assign trig_lost = |lost_v;

endmodule
