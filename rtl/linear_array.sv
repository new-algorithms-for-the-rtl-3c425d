// linear_array: K processing elements connected in a line.
//
// Tokens enter at PE 1 and leave from PE K; each PE passes every token to its
// right neighbour one clock later, so the array is a K-stage pipeline that
// accepts one token per clock. PE i (counting from 0 here) answers LOAD and
// READ tokens whose pe field is i. Only the first and the last PE talk to the
// interface unit, as in the paper's system figure.
//
// Interface: in_tok (from the interface unit), out_tok (to it), latency K
// clocks. K and the local-memory depth MAXD are parameters.
module linear_array
  import mat_pkg::*;
#(
  parameter int K    = 10,
  parameter int MAXD = 800
) (
  input  logic   clk,
  input  logic   rst_n,
  input  token_t in_tok,
  output token_t out_tok
);

  token_t link [K+1];

  assign link[0] = in_tok;

  for (genvar i = 0; i < K; i++) begin : g_pe
    pe #(.PE_ID(i), .MAXD(MAXD)) u_pe (
      .clk, .rst_n, .in_tok(link[i]), .out_tok(link[i+1])
    );
  end

  assign out_tok = link[K];

endmodule
