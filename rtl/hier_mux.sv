// hier_mux: hierarchical data multiplexer built from 2:1 token cells.
//
// N leaves (a power of two) are arranged as a binary tree of rr_mux2 cells.
// Requests are ORed up the tree (any_req); the enable from above (en_top,
// e.g. "downstream FIFO not full") travels down, each cell passing it to one
// requesting child, so at most one leaf sees its grant high. The granted
// leaf's word is selected and its leaf index is prefixed to it, so dout is
// {index, din[index]}. A word moves in every clock in which any leaf
// requests and en_top is high. Leaves pop their word on grant in the same
// clock (combinational path req -> grant).
module hier_mux #(
  parameter int unsigned N = 4,
  parameter int unsigned W = 27,
  parameter int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N-1:0]          req,
  input  logic [N-1:0][W-1:0]   din,
  input  logic                  en_top,
  output logic [N-1:0]          grant,
  output logic                  any_req,
  output logic [IW+W-1:0]       dout
);

  // Heap numbering: node 1 is the root, node n has children 2n and 2n+1,
  // leaves are nodes N..2N-1.
  logic [2*N-1:1] nreq, nen;
  logic [N-1:1]   nsel;

  for (genvar l = 0; l < N; l++) begin : g_leaf
    assign nreq[N+l] = req[l];
    assign grant[l]  = nen[N+l];
  end

  assign nen[1]  = en_top;
  assign any_req = nreq[1];

  for (genvar n = 1; n < N; n++) begin : g_cell
    rr_mux2 u_cell (
      .clk, .rst_n,
      .req_a(nreq[2*n]), .req_b(nreq[2*n+1]), .en_in(nen[n]),
      .en_a(nen[2*n]), .en_b(nen[2*n+1]), .req_out(nreq[n]), .sel_a(nsel[n]));
  end

  // Word of the leaf that holds the grant (of the requesting leaf the tree
  // would pick, so dout is meaningful before en_top rises as well).
  logic [N-1:0] pick;
  logic [2*N-1:1] pen;
  assign pen[1] = 1'b1;
  for (genvar n = 1; n < N; n++) begin : g_pick
    assign pen[2*n]   = pen[n] && nsel[n];
    assign pen[2*n+1] = pen[n] && !nsel[n];
  end
  for (genvar l = 0; l < N; l++) begin : g_pleaf
    assign pick[l] = pen[N+l];
  end

  always_comb begin
    dout = '0;
    for (int l = 0; l < N; l++)
      if (pick[l]) dout = {IW'(l), din[l]};
  end

`ifndef SYNTHESIS
  a_onehot_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  a_grant_req:    assert property (@(posedge clk) disable iff (!rst_n) (grant & ~req) == '0);
`endif

endmodule
