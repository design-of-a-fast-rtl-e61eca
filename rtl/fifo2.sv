// fifo2: second-level FIFO, one per 128 double columns.
//
// A dual-port memory of DEPTH words sits between the 40 MHz readout clock
// (write side, fed by the 4:1 hierarchical MUX of four FIFO1 trees) and the
// output clock (read side, drained by the top-level MUX towards the serial
// interface), so that bursts from the columns are matched to the interface
// speed. The sensor uses a 256 x 32-bit dual-port SRAM here; this RTL holds
// the W bits actually used (29) in an array that a memory macro can replace.
//
// Clock crossing: binary pointers with one wrap bit are converted to Gray code
// and passed through two-flop synchronizers; full is computed in the write
// domain, empty in the read domain, both conservatively. The read side is
// first-word-fall-through: rdata is the head word while empty is low.
module fifo2 #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned W     = 29
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         wr,
  input  logic [W-1:0] wdata,
  output logic         full,
  input  logic         rclk,
  input  logic         rrst_n,
  input  logic         rd,
  output logic [W-1:0] rdata,
  output logic         empty
);

  localparam int unsigned PW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [PW:0]  wbin, wgray, rbin, rgray;
  logic [PW:0]  rgray_w1, rgray_w2;   // read pointer in the write domain
  logic [PW:0]  wgray_r1, wgray_r2;   // write pointer in the read domain
  logic [PW:0]  wbin_n, rbin_n;

  function automatic logic [PW:0] bin2gray(input logic [PW:0] b);
    return b ^ (b >> 1);
  endfunction

  // Write domain.
  assign wbin_n = wbin + (PW+1)'(wr && !full);
  assign full   = (wgray == {~rgray_w2[PW:PW-1], rgray_w2[PW-2:0]});

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_n;
      wgray    <= bin2gray(wbin_n);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  always_ff @(posedge wclk) if (wr && !full) mem[wbin[PW-1:0]] <= wdata;

  // Read domain.
  assign rbin_n = rbin + (PW+1)'(rd && !empty);
  assign empty  = (rgray == wgray_r2);
  assign rdata  = mem[rbin[PW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_n;
      rgray    <= bin2gray(rbin_n);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

`ifndef SYNTHESIS
  a_no_overflow:  assert property (@(posedge wclk) disable iff (!wrst_n) wr |-> !full);
  a_no_underflow: assert property (@(posedge rclk) disable iff (!rrst_n) rd |-> !empty);
`endif

endmodule
