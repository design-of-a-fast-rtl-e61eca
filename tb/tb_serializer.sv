// tb_serializer: self-checking test of the output serializer.
//
// A receiver model collects W bits per frame marker and rebuilds the words.
// Checks: the word sequence received equals the words offered, with idle
// (all-zero) words in the gaps; one word is taken every W clocks while data
// are available (full link rate); the frame marker has period W.
module tb_serializer;
  localparam int W = 32;

  logic clk = 0, rst_n = 0;
  logic word_valid = 0, word_take, sout, frame;
  logic [W-1:0] word = '0;
  int checks = 0, failures = 0;
  logic [W-1:0] sent [$];
  logic [W-1:0] rx;
  int nbit = -1, n_rx = 0, n_idle = 0, last_take = -1, cyc = 0;

  serializer #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (word_take) begin
      sent.push_back(word);
      if (last_take >= 0 && word_valid_hold) begin
        checks++;
        if (cyc - last_take != W) begin failures++; $display("FAIL: take period %0d", cyc - last_take); end
      end
      last_take = cyc;
    end
    // Receiver.
    if (frame) begin
      if (nbit == W) begin
        if (rx == '0) n_idle++;
        else begin
          checks++;
          if (sent.size() == 0 || sent[0] != rx) begin failures++; $display("FAIL: word %h", rx); end
          else void'(sent.pop_front());
          n_rx++;
        end
      end else if (nbit > 0) begin failures++; $display("FAIL: frame period %0d", nbit); end
      rx = {{(W-1){1'b0}}, sout}; nbit = 1;
    end else if (nbit >= 0) begin
      rx = {rx[W-2:0], sout}; nbit++;
    end
  end

  bit word_valid_hold = 0;
  always @(negedge clk) if (rst_n) begin
    if (word_take || !word_valid) begin
      word_valid = ($urandom % 4 != 0) || word_valid_hold;
      word = {1'b1, W'($urandom)} ;   // never all zero
      word[W-1] = 1'b1;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    word_valid_hold = 1;
    repeat (W * 20) @(negedge clk);
    word_valid_hold = 0;
    repeat (W * 100) @(negedge clk);
    check(n_rx > 80, $sformatf("%0d words received", n_rx));
    check(n_idle > 3, $sformatf("%0d idle words", n_idle));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
