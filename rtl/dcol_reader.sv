// dcol_reader: end-of-column reader of one double column, with real-time
// data compression.
//
// FASTOR from the column passes a SYNC_STAGES-flop synchronizer (Fastor_syn).
// On its rising edge the system time, delayed by the same number of stages,
// is latched (TIME_LAH), so the timestamp is the time at which FASTOR rose.
// While Fastor_syn is high and FIFO1 is not full (BUSY low), READ_FSM reads
// one address per two clocks: READ high for one clock (RH), low for one clock
// (RL). The address is taken at the end of RH.
//
// Compression: the first address of a word is kept (ADDR_LAH0). A following
// address that lies 1..PATW above it only sets bit (offset-1) of the
// compression pattern; any other address closes the word, which is written
// to FIFO1 as {timestamp, pattern, first address}, and opens a new one. The
// open word is also written when the column has emptied. With COMPRESS_EN low
// every address is written at once with a zero pattern. Five adjacent
// addresses per word (first + 4 pattern bits) follow the sensor; FSM encoding,
// the pattern bit order and ignoring the READ that follows the last pixel
// (the synchronizer makes it find an empty column, flagged by addr_valid) are
// this design's choices.
//
// Interface timing: fifo_wr and the word are combinational and are written at
// the clock edge that ends the RH or RL cycle. BUSY is checked before each
// READ, so every READ has room for the one word it can produce.
module dcol_reader
  import taichu_pkg::*;
#(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            fastor,
  input  logic [AW-1:0]   addr,
  input  logic            addr_valid,
  output logic            read,
  input  logic [TSW-1:0]  system_time,
  input  logic            compress_en,
  input  logic            busy,
  output logic            fifo_wr,
  output rd_word_t        wr_word
);

  typedef enum logic [1:0] {S_IDLE, S_RH, S_RL} st_e;
  st_e st, st_n;

  logic [SYNC_STAGES-1:0] fsync;
  logic                   fastor_syn, fsyn_q;
  logic [TSW-1:0]         time_d [SYNC_STAGES];
  logic [TSW-1:0]         time_lah;     // timestamp of the current FASTOR event
  logic [TSW-1:0]         time_lah1;    // timestamp of the open word
  logic [AW-1:0]          first;        // ADDR_LAH0
  logic [PATW-1:0]        pat;
  logic                   pending;
  logic [AW:0]            diff;         // SUB
  logic                   take, merge, emit_rh, emit_rl;
  logic [$clog2(PATW)-1:0] pat_idx;

  assign fastor_syn = fsync[SYNC_STAGES-1];
  assign read       = (st == S_RH);

  assign diff  = {1'b0, addr} - {1'b0, first};
  assign pat_idx = $clog2(PATW)'(diff - 1'b1);
  assign take  = (st == S_RH) && addr_valid;
  assign merge = compress_en && pending && (time_lah1 == time_lah) &&
                 (diff != '0) && (diff <= (AW+1)'(PATW));
  // Write on RH: open word closed by a non-adjacent address, or no compression.
  assign emit_rh = take && (compress_en ? (pending && !merge) : 1'b1);
  // Write on RL: column empty, flush the open word.
  assign emit_rl = (st == S_RL) && !fastor_syn && pending && !busy;

  always_comb begin
    fifo_wr = emit_rh || emit_rl;
    if (take && !compress_en) wr_word = '{ts: time_lah, pat: '0, addr: addr};
    else                      wr_word = '{ts: time_lah1, pat: pat, addr: first};
  end

  always_comb begin
    st_n = st;
    unique case (st)
      S_IDLE: if (fastor_syn && !busy) st_n = S_RH;
      S_RH:   st_n = S_RL;
      S_RL: begin
        if (fastor_syn) begin
          if (!busy) st_n = S_RH;
        end else if (!pending || !busy) begin
          st_n = S_IDLE;
        end
      end
      default: st_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      fsync     <= '0;
      fsyn_q    <= 1'b0;
      time_d    <= '{default: '0};
      time_lah  <= '0;
      time_lah1 <= '0;
      first     <= '0;
      pat       <= '0;
      pending   <= 1'b0;
    end else begin
      st     <= st_n;
      fsync  <= {fsync[SYNC_STAGES-2:0], fastor};
      fsyn_q <= fastor_syn;
      time_d[0] <= system_time;
      for (int k = 1; k < SYNC_STAGES; k++) time_d[k] <= time_d[k-1];
      if (fastor_syn && !fsyn_q) time_lah <= time_d[SYNC_STAGES-1];

      if (take && compress_en) begin
        if (merge) begin
          pat[pat_idx] <= 1'b1;
        end else begin
          pending   <= 1'b1;
          first     <= addr;
          pat       <= '0;
          time_lah1 <= time_lah;
        end
      end else if (emit_rl) begin
        pending <= 1'b0;
      end
    end
  end

`ifndef SYNTHESIS
  // A word may only be written when FIFO1 has room.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) fifo_wr |-> !busy);
`endif

endmodule
