// tb_trigger_match: self-checking test of the trigger-match logic.
//
// A queue stands for the FIFO1 root. Checks:
//  - the worked example: trigger at time 240 (6 us), TRIGGER_LATENCY = 123,
//    TRIGGER_UNCERTAIN = 6: of the words stamped 110..130 exactly those
//    stamped 117..123 (2.925 to 3.075 us) are forwarded, the others dropped;
//  - triggerless mode forwards every word, in order, under random en;
//  - random hits and triggers: every forwarded word lies in the window of a
//    trigger, every word in a window is forwarded, the rest is dropped, and a
//    trigger arriving while one is pending is reported lost.
module tb_trigger_match;
  import taichu_pkg::*;

  logic clk = 0, rst_n = 0;
  logic trigger_mode = 0, trigger = 0, en = 1;
  logic [TSW-1:0] system_time = '0;
  logic [LATW-1:0] latency = 8'd123;
  logic [UNCW-1:0] uncertain = 3'd6;
  logic fifo_empty, fifo_rd, req, dropped, trig_lost;
  logic [TSW-1:0] fifo_ts;
  int checks = 0, failures = 0;
  logic [TSW-1:0] q[$];
  logic [TSW-1:0] fwd[$];
  int n_drop = 0, n_lost = 0;

  trigger_match dut (.*);

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  assign fifo_empty = (q.size() == 0);
  assign fifo_ts    = (q.size() == 0) ? '0 : q[0];

  always @(posedge clk) begin
    if (rst_n) begin
      if (fifo_rd) begin
        if (q.size() == 0) begin failures++; $display("FAIL: read of empty FIFO"); end
        else begin
          if (req && en) fwd.push_back(q[0]);
          q.pop_front();
        end
      end
      if (dropped) n_drop++;
      if (trig_lost) n_lost++;
    end
    system_time <= system_time + 1'b1;
  end

  function automatic bit in_window(input logic [TSW-1:0] t, input logic [TSW-1:0] w);
    logic [TSW-1:0] age = t - w;
    return age >= latency - uncertain && age <= latency;
  endfunction

  initial begin
    logic [TSW-1:0] trig_t [$];
    logic [TSW-1:0] hits [$];
    int hit_c [$], trig_c [$];
    int exp_fwd;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Worked example.
    trigger_mode = 1;
    wait (system_time == 8'd240);
    @(negedge clk);             // system_time is 240 in this clock
    trigger = 1;
    for (int a = 130; a >= 110; a--) q.push_back(TSW'(240 - a));
    @(negedge clk); trigger = 0;
    repeat (60) @(negedge clk);
    check(fwd.size() == 7, $sformatf("example: 7 words forwarded, got %0d", fwd.size()));
    for (int i = 0; i < fwd.size(); i++)
      check(fwd[i] == TSW'(117 + i), $sformatf("example: word %0d stamped %0d", i, fwd[i]));
    check(q.size() == 0, "example: the rest dropped");
    fwd.delete();

    // Triggerless: everything, in order, with back-pressure.
    trigger_mode = 0;
    for (int i = 0; i < 100; i++) q.push_back(TSW'(i * 7));
    for (int i = 0; i < 400; i++) begin @(negedge clk); en = ($urandom % 3 != 0); end
    en = 1;
    check(fwd.size() == 100, "triggerless: all forwarded");
    for (int i = 0; i < fwd.size(); i++) if (fwd[i] != TSW'(i * 7)) begin
      check(0, "triggerless order"); break;
    end
    fwd.delete();

    // Random hits and triggers in trigger mode (en always 1).
    trigger_mode = 1;
    latency = 8'd60; uncertain = 3'd4;
    n_drop = 0; n_lost = 0;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      trigger = 0;
      if ($urandom % 3 == 0) begin
        q.push_back(system_time); hits.push_back(system_time); hit_c.push_back(c);
      end
      if (c % 200 == 150) begin trigger = 1; trig_t.push_back(system_time); trig_c.push_back(c); end
      if (c % 200 == 151) trigger = 1;   // arrives while the first is pending
    end
    trigger = 0;
    repeat (300) @(negedge clk);
    // Expected: hits whose push cycle lies LATENCY-UNCERTAIN..LATENCY
    // cycles before a trigger (absolute cycles, no wrap).
    exp_fwd = 0;
    foreach (hit_c[i]) foreach (trig_c[j])
      if (trig_c[j] - hit_c[i] >= latency - uncertain && trig_c[j] - hit_c[i] <= latency)
        exp_fwd++;
    check(fwd.size() == exp_fwd, $sformatf("forwarded %0d, expected %0d", fwd.size(), exp_fwd));
    check(fwd.size() > 0, "trigger mode: words forwarded");
    foreach (fwd[i]) begin
      bit m = 0;
      foreach (trig_t[j]) if (in_window(trig_t[j], fwd[i])) m = 1;
      check(m, $sformatf("forwarded word %0d in a window", fwd[i]));
    end
    check(n_lost == 20, $sformatf("20 lost triggers, got %0d", n_lost));
    check(q.size() == 0, "FIFO emptied");
    check(n_drop + fwd.size() == hits.size(), "every word forwarded or dropped");
    $display("hits=%0d forwarded=%0d dropped=%0d", hits.size(), fwd.size(), n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
