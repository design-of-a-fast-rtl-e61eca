// sync_fifo: single-clock first-word-fall-through FIFO.
//
// DEPTH words of W bits in a register array; rdata shows the head word while
// empty is low, and rd pops it at the clock edge. A write while full and a
// read while empty are ignored (the assertions flag them). Used for the child
// and root FIFOs of the shared FIFO tree.
module sync_fifo #(
  parameter int unsigned W     = 27,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr,
  input  logic [W-1:0] wdata,
  output logic         full,
  input  logic         rd,
  output logic [W-1:0] rdata,
  output logic         empty
);

  localparam int unsigned PW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [PW:0]  wp, rp;
  logic         do_wr, do_rd;

  assign empty = (wp == rp);
  assign full  = (wp[PW-1:0] == rp[PW-1:0]) && (wp[PW] != rp[PW]);
  assign rdata = mem[rp[PW-1:0]];
  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
    end
  end

  always_ff @(posedge clk) if (do_wr) mem[wp[PW-1:0]] <= wdata;

`ifndef SYNTHESIS
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) wr |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) rd |-> !empty);
`endif

endmodule
