// tb_hier_mux: self-checking test of the hierarchical 2:1 token MUX (4 leaves).
//
// Each leaf holds a queue of words and requests while it is not empty; a
// granted leaf pops its word at the clock edge. Checks every clock: at most
// one grant, only to a requesting leaf, and exactly one whenever en_top is
// high and some leaf requests (no idle clock); dout is {leaf, word}; all
// words arrive in per-leaf order; with all leaves busy each gets a quarter
// of the clocks (round robin at both levels).
module tb_hier_mux;
  localparam int N = 4, W = 8;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, grant;
  logic [N-1:0][W-1:0] din;
  logic en_top = 0, any_req;
  logic [W+1:0] dout;
  int checks = 0, failures = 0;
  logic [W-1:0] lq [N][$];
  int got [N];
  int nxt [N];

  hier_mux #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_comb for (int l = 0; l < N; l++) begin
    req[l] = lq[l].size() != 0;
    din[l] = (lq[l].size() != 0) ? lq[l][0] : '0;
  end

  always @(posedge clk) if (rst_n) begin
    int ng = $countones(grant);
    checks++;
    if (ng > 1 || (grant & ~req) != 0) begin failures++; $display("FAIL: bad grant %b req %b", grant, req); end
    if (en_top && any_req && ng != 1) begin failures++; $display("FAIL: idle clock"); end
    if (any_req != (req != 0)) begin failures++; $display("FAIL: any_req"); end
    for (int l = 0; l < N; l++) if (grant[l]) begin
      if (dout != {2'(l), lq[l][0]}) begin failures++; $display("FAIL: dout %h leaf %0d", dout, l); end
      if (lq[l][0] != W'(nxt[l])) begin failures++; $display("FAIL: order leaf %0d", l); end
      nxt[l] = (nxt[l] + 1) % 256;
      void'(lq[l].pop_front());
      got[l]++;
    end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  int fill [N];
  task automatic push(input int l);
    lq[l].push_back(W'(fill[l])); fill[l] = (fill[l] + 1) % 256;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // All leaves saturated: fairness.
    for (int l = 0; l < N; l++) repeat (200) push(l);
    en_top = 1;
    repeat (400) @(negedge clk);
    for (int l = 0; l < N; l++) check(got[l] == 100, $sformatf("leaf %0d got %0d of 400", l, got[l]));
    // Random requests and enable.
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      for (int l = 0; l < N; l++) if ($urandom % 5 == 0) push(l);
      en_top = ($urandom % 4 != 0);
    end
    en_top = 1;
    repeat (1000) @(negedge clk);
    for (int l = 0; l < N; l++) check(lq[l].size() == 0, "all words delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
