// trigger_match: trigger matching at the output of a FIFO1 tree.
//
// Timestamps are taken per double column, so a trigger selects a window of
// them. For a trigger that arrives at system time T the window is
//   [T - TRIGGER_LATENCY, T - TRIGGER_LATENCY + TRIGGER_UNCERTAIN]
// in 25 ns steps (LATENCY=123 and UNCERTAIN=6 with a trigger at 6 us select
// 2.925 us to 3.075 us). All comparisons use ages (now - timestamp, modulo
// 256), so the 8-bit time may wrap.
//
// Trigger mode, per head word of FIFO1:
//   trigger pending, word older than the window -> discarded
//   trigger pending, word in the window         -> offered to the data MUX
//   trigger pending, word newer than the window -> trigger retired
//   no trigger, word older than LATENCY          -> discarded (no later
//                                                   trigger can select it)
//   no trigger, word younger                     -> kept waiting
// A trigger is also retired once its window would leave the 8-bit time range.
// Only one trigger is held; a trigger that arrives while one is pending is
// reported on trig_lost. Triggerless mode offers every word.
//
// Handshake with the hierarchical MUX: req (wr_req) is combinational, the
// word is taken when en (en0) is high in the same clock, which pops FIFO1
// through fifo_rd. The one-trigger limit and the retire rules are this
// design's choices.
module trigger_match
  import taichu_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            trigger_mode,
  input  logic            trigger,
  input  logic [TSW-1:0]  system_time,
  input  logic [LATW-1:0] latency,
  input  logic [UNCW-1:0] uncertain,
  input  logic            fifo_empty,
  input  logic [TSW-1:0]  fifo_ts,
  output logic            fifo_rd,
  output logic            req,
  input  logic            en,
  output logic            dropped,
  output logic            trig_lost
);

  logic           trig_pending;

  logic [TSW-1:0] trig_time;
  logic [TSW-1:0] age_hit, age_trig;
  logic [9:0]     hi, lo;
  logic           timeout, older, in_win, newer;

  assign age_hit  = system_time - fifo_ts;
  assign age_trig = system_time - trig_time;
  assign hi       = 10'(age_trig) + 10'(latency);
  assign lo       = hi - 10'(uncertain);
  assign timeout  = trig_pending && (hi > 10'd255);
  assign older    = 10'(age_hit) > hi;
  assign in_win   = !older && (10'(age_hit) >= lo);
  assign newer    = 10'(age_hit) < lo;

  always_comb begin
    req     = 1'b0;
    dropped = 1'b0;
    if (!fifo_empty) begin
      if (!trigger_mode)                req     = 1'b1;
      else if (trig_pending && !timeout) begin
        if (older)                      dropped = 1'b1;
        else if (in_win)                req     = 1'b1;
      end else if (!trig_pending)       dropped = (age_hit > latency);
    end
  end

  assign fifo_rd   = (req && en) || dropped;
  assign trig_lost = trigger_mode && trigger && trig_pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trig_pending <= 1'b0;
      trig_time    <= '0;
    end else if (!trigger_mode) begin
      trig_pending <= 1'b0;
    end else if (trig_pending) begin
      if (timeout || (!fifo_empty && newer)) trig_pending <= 1'b0;
    end else if (trigger) begin
      trig_pending <= 1'b1;
      trig_time    <= system_time;
    end
  end

endmodule
