// rr_mux2: one cell of the hierarchical 2:1 data MUX.
//
// The two requests are ORed and passed up. The enable coming down from the
// level above is steered to one requesting side by a two-state token: when
// both sides request, the side not served last wins; when only one requests
// it wins at once, so no clock is lost. The token changes at the clock edge
// at which a grant is used. Combinational from req/en_in to en_a/en_b.
module rr_mux2 (
  input  logic clk,
  input  logic rst_n,
  input  logic req_a,
  input  logic req_b,
  input  logic en_in,
  output logic en_a,
  output logic en_b,
  output logic req_out,
  output logic sel_a     // side a would win now
);

  typedef enum logic {TOKEN_A = 1'b0, TOKEN_B = 1'b1} token_e;
  token_e token;

  assign req_out = req_a || req_b;
  assign sel_a   = req_a && (!req_b || token == TOKEN_A);
  assign en_a    = en_in && sel_a;
  assign en_b    = en_in && req_b && !sel_a;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 token <= TOKEN_A;
    else if (en_in && req_out)  token <= sel_a ? TOKEN_B : TOKEN_A;
  end

endmodule
