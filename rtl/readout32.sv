// readout32: readout of 32 double columns.
//
// 32 double columns (pixel_dcol) each with its end-of-column reader
// (dcol_reader) feed one shared FIFO tree (fifo_tree32, FIFO1). Its root is
// read by the trigger-match logic, which offers words to the hierarchical
// MUX above through req/en and dout ({dcol[4:0], ts, pattern, addr}).
// Pixel configuration writes are decoded here from the 5-bit column index.
module readout32
  import taichu_pkg::*;
#(
  parameter int unsigned NPIX = 1024
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [31:0][NPIX-1:0]  hit,
  input  logic                   dpulse,
  input  logic                   pix_we,
  input  logic [4:0]             pix_dcol,
  input  logic [AW-1:0]          pix_addr,
  input  logic                   pix_mask,
  input  logic                   pix_pulse_en,
  input  cfg_t                   cfg,
  input  logic                   trigger,
  input  logic [TSW-1:0]         system_time,
  output logic                   req,
  input  logic                   en,
  output logic [W32-1:0]         dout,
  output logic                   dropped,
  output logic                   trig_lost
);

  logic [31:0]           fastor, addr_valid, read, fifo_wr, busy;
  logic [31:0][AW-1:0]   addr;
  rd_word_t [31:0]       wr_word;
  logic                  root_rd, root_empty;

  for (genvar i = 0; i < 32; i++) begin : g_dcol
    pixel_dcol #(.NPIX(NPIX), .AW(AW)) u_pix (
      .clk, .rst_n, .hit(hit[i]), .dpulse,
      .cfg_we(pix_we && pix_dcol == 5'(i)), .cfg_addr(pix_addr),
      .cfg_mask(pix_mask), .cfg_pulse_en(pix_pulse_en),
      .read(read[i]), .fastor(fastor[i]), .addr(addr[i]),
      .addr_valid(addr_valid[i]));
    dcol_reader u_rd (
      .clk, .rst_n, .fastor(fastor[i]), .addr(addr[i]),
      .addr_valid(addr_valid[i]), .read(read[i]), .system_time,
      .compress_en(cfg.compress_en), .busy(busy[i]),
      .fifo_wr(fifo_wr[i]), .wr_word(wr_word[i]));
  end

  fifo_tree32 u_tree (
    .clk, .rst_n, .wr(fifo_wr), .wdata(wr_word), .full(busy),
    .rd(root_rd), .rdata(dout), .empty(root_empty));

  trigger_match u_trg (
    .clk, .rst_n, .trigger_mode(cfg.trigger_mode), .trigger, .system_time,
    .latency(cfg.latency), .uncertain(cfg.uncertain),
    .fifo_empty(root_empty), .fifo_ts(dout[AW+PATW +: TSW]),
    .fifo_rd(root_rd), .req, .en, .dropped, .trig_lost);

endmodule
