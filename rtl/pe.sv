// pe: one processing element of the linear systolic array.
//
// A PE keeps one vector of the current matrix in its local memory: a row when
// the series is multiplied left to right, a column when it is multiplied right
// to left. The next matrix is pipelined through all PEs one element per clock;
// each PE multiplies every element by the matching resident element and
// accumulates, so that when the last element of a streamed column (or row)
// has passed, the PE holds one element of the next intermediate matrix and
// writes it into its second memory bank. A SWAP token then makes that bank
// resident. With K PEs, K rows (columns) of the product are formed per pass.
//
// Parts, as in the paper's PE figure: local memory (pe_local_mem), switch
// SW (pe_switch), multiplier M and adder A (pe_mac), output register R.
// Timing: a token entering at clock n leaves through R at clock n+1, so the
// array's latency is one clock per PE and its throughput one token per clock.
// Interface: in_tok from the left neighbour (or the interface unit), out_tok
// to the right neighbour (or back to the interface unit).
module pe
  import mat_pkg::*;
#(
  parameter int PE_ID = 0,
  parameter int MAXD  = 800
) (
  input  logic   clk,
  input  logic   rst_n,
  input  token_t in_tok,
  output token_t out_tok
);

  logic               cur_bank;
  logic [LADDR_W-1:0] rd_addr, wr_addr;
  logic               we, wr_bank, mac_en, mac_first, swap;
  data_t              rd_data, wr_data, mac_b, mac_sum, mac_acc;
  token_t             sw_tok;

  pe_local_mem #(.DEPTH(MAXD)) u_mem (
    .clk, .rd_bank(cur_bank), .rd_addr, .rd_data,
    .we, .wr_bank, .wr_addr, .wr_data
  );

  pe_mac u_mac (
    .clk, .rst_n, .en(mac_en), .first(mac_first),
    .a(rd_data), .b(mac_b), .sum(mac_sum), .acc(mac_acc)
  );

  pe_switch #(.PE_ID(PE_ID)) u_sw (
    .in_tok, .cur_bank, .mem_rd_data(rd_data), .mac_sum,
    .mem_rd_addr(rd_addr), .mem_we(we), .mem_wr_bank(wr_bank),
    .mem_wr_addr(wr_addr), .mem_wr_data(wr_data),
    .mac_en, .mac_first, .mac_b, .swap, .out_tok(sw_tok)
  );

  // Bank selector and output register R.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_bank <= 1'b0;
      out_tok  <= TOKEN_NOP;
    end else begin
      if (swap) cur_bank <= ~cur_bank;
      out_tok <= sw_tok;
    end
  end

endmodule
