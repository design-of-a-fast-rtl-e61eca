// fifo_tree32: shared FIFO tree (FIFO1) of 32 double columns.
//
// Each Dcol reader writes a child FIFO of CHILD_DEPTH words (level L1). Data
// routers merge pairs of FIFOs level by level into a child FIFO each (L2..L5)
// and the last router (L6) fills the root FIFO of ROOT_DEPTH words. With the
// default depths this is 32*4 + 16*4 + 8*4 + 4*4 + 2*4 + 32 = 280 words, of
// which one column can use up to 5*4 + 32 = 52. The pairing is crossed, so
// neighbouring columns of a cluster meet only near the root:
//   L2 router : Dcol k with k+4 inside each group of 8 (0_4, 1_5, ... 27_31)
//   L3 router : 0_4 with 8_12, 1_5 with 9_13, ..., 19_23 with 27_31
//   L4 router : 0_4_8_12 with 16_20_24_28, ...
//   L5 router : even (L4 outputs 0 and 2) and odd (1 and 3)
//   L6 router : even with odd, into the root FIFO
// The tree prefixes the 5-bit column index to the 22-bit reader word, giving
// the 27-bit FIFO1 word {dcol, ts, pattern, addr}. The read side is
// first-word-fall-through: rdata is the root head while empty is low.
module fifo_tree32
  import taichu_pkg::*;
#(
  parameter int unsigned CHILD_DEPTH = 4,
  parameter int unsigned ROOT_DEPTH  = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [31:0]        wr,
  input  rd_word_t [31:0]    wdata,
  output logic [31:0]        full,
  input  logic               rd,
  output logic [W32-1:0]     rdata,
  output logic               empty
);

  localparam int unsigned W = W32;

  // FIFO outputs per level, and the read strobes from the level below.
  logic [W-1:0] d1 [32]; logic [31:0] e1, r1;
  logic [W-1:0] d2 [16]; logic [15:0] e2, r2;
  logic [W-1:0] d3 [8];  logic [7:0]  e3, r3;
  logic [W-1:0] d4 [4];  logic [3:0]  e4, r4;
  logic [W-1:0] d5 [2];  logic [1:0]  e5, r5;

  // L1: child FIFOs behind the readers.
  for (genvar i = 0; i < 32; i++) begin : g_l1
    sync_fifo #(.W(W), .DEPTH(CHILD_DEPTH)) u_fifo (
      .clk, .rst_n, .wr(wr[i]), .wdata({5'(i), wdata[i]}), .full(full[i]),
      .rd(r1[i]), .rdata(d1[i]), .empty(e1[i]));
  end

  // One router plus the child FIFO it feeds.
  // L2: k with k+4 in each group of 8.
  for (genvar r = 0; r < 16; r++) begin : g_l2
    localparam int A = 8 * (r / 4) + (r % 4);
    localparam int B = A + 4;
    logic wr_o, full_o; logic [W-1:0] dat_o;
    data_router #(.W(W)) u_rt (
      .clk, .rst_n, .a_empty(e1[A]), .a_data(d1[A]), .a_rd(r1[A]),
      .b_empty(e1[B]), .b_data(d1[B]), .b_rd(r1[B]),
      .out_full(full_o), .out_wr(wr_o), .out_data(dat_o));
    sync_fifo #(.W(W), .DEPTH(CHILD_DEPTH)) u_fifo (
      .clk, .rst_n, .wr(wr_o), .wdata(dat_o), .full(full_o),
      .rd(r2[r]), .rdata(d2[r]), .empty(e2[r]));
  end

  // L3: groups 2h and 2h+1, same position k.
  for (genvar j = 0; j < 8; j++) begin : g_l3
    localparam int A = 8 * (j / 4) + (j % 4);
    localparam int B = A + 4;
    logic wr_o, full_o; logic [W-1:0] dat_o;
    data_router #(.W(W)) u_rt (
      .clk, .rst_n, .a_empty(e2[A]), .a_data(d2[A]), .a_rd(r2[A]),
      .b_empty(e2[B]), .b_data(d2[B]), .b_rd(r2[B]),
      .out_full(full_o), .out_wr(wr_o), .out_data(dat_o));
    sync_fifo #(.W(W), .DEPTH(CHILD_DEPTH)) u_fifo (
      .clk, .rst_n, .wr(wr_o), .wdata(dat_o), .full(full_o),
      .rd(r3[j]), .rdata(d3[j]), .empty(e3[j]));
  end

  // L4: halves 0..15 and 16..31, same position k.
  for (genvar k = 0; k < 4; k++) begin : g_l4
    logic wr_o, full_o; logic [W-1:0] dat_o;
    data_router #(.W(W)) u_rt (
      .clk, .rst_n, .a_empty(e3[k]), .a_data(d3[k]), .a_rd(r3[k]),
      .b_empty(e3[k+4]), .b_data(d3[k+4]), .b_rd(r3[k+4]),
      .out_full(full_o), .out_wr(wr_o), .out_data(dat_o));
    sync_fifo #(.W(W), .DEPTH(CHILD_DEPTH)) u_fifo (
      .clk, .rst_n, .wr(wr_o), .wdata(dat_o), .full(full_o),
      .rd(r4[k]), .rdata(d4[k]), .empty(e4[k]));
  end

  // L5: even (0, 2) and odd (1, 3).
  for (genvar p = 0; p < 2; p++) begin : g_l5
    logic wr_o, full_o; logic [W-1:0] dat_o;
    data_router #(.W(W)) u_rt (
      .clk, .rst_n, .a_empty(e4[p]), .a_data(d4[p]), .a_rd(r4[p]),
      .b_empty(e4[p+2]), .b_data(d4[p+2]), .b_rd(r4[p+2]),
      .out_full(full_o), .out_wr(wr_o), .out_data(dat_o));
    sync_fifo #(.W(W), .DEPTH(CHILD_DEPTH)) u_fifo (
      .clk, .rst_n, .wr(wr_o), .wdata(dat_o), .full(full_o),
      .rd(r5[p]), .rdata(d5[p]), .empty(e5[p]));
  end

  // L6: root router and root FIFO.
  logic wr6, full6; logic [W-1:0] dat6;
  data_router #(.W(W)) u_root_rt (
    .clk, .rst_n, .a_empty(e5[0]), .a_data(d5[0]), .a_rd(r5[0]),
    .b_empty(e5[1]), .b_data(d5[1]), .b_rd(r5[1]),
    .out_full(full6), .out_wr(wr6), .out_data(dat6));
  sync_fifo #(.W(W), .DEPTH(ROOT_DEPTH)) u_root (
    .clk, .rst_n, .wr(wr6), .wdata(dat6), .full(full6),
    .rd, .rdata, .empty);

endmodule
