// data_router: 2:1 node of the shared FIFO tree.
//
// Each clock it moves one word from one of its two child FIFOs into the FIFO
// below it, if that FIFO has room. When both children hold data the side that
// was not served last goes first (round robin), so neither child can starve.
// The arbitration rule is this design's choice; the sensor describes only the
// router's place in the tree.
module data_router #(
  parameter int unsigned W = 27
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         a_empty,
  input  logic [W-1:0] a_data,
  output logic         a_rd,
  input  logic         b_empty,
  input  logic [W-1:0] b_data,
  output logic         b_rd,
  input  logic         out_full,
  output logic         out_wr,
  output logic [W-1:0] out_data
);

  logic prio_b;   // 1: side b wins a tie
  logic sel_b;

  assign sel_b    = !b_empty && (a_empty || prio_b);
  assign out_wr   = !out_full && (!a_empty || !b_empty);
  assign a_rd     = out_wr && !sel_b;
  assign b_rd     = out_wr && sel_b;
  assign out_data = sel_b ? b_data : a_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      prio_b <= 1'b0;
    else if (out_wr) prio_b <= !sel_b;
  end

endmodule
