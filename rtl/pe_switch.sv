// pe_switch: the switch (SW) of a processing element.
//
// It decodes the token entering the PE and connects the PE's parts for it:
//   LOAD addressed to this PE : input data -> local memory, resident bank, word k
//   MAC                       : resident word k and input data -> M and A;
//                               on 'last' the sum -> other bank, word v
//   READ addressed to this PE : resident word k replaces the data going on
//   SWAP                      : asks the PE to exchange the bank roles
// Every token goes on to the output register R unchanged apart from READ.
//
// Purely combinational. The set of operations is this design's reading of the
// paper's PE figure, which shows the switch between local memory, M, A,
// the input and R but not the control.
module pe_switch
  import mat_pkg::*;
#(
  parameter int PE_ID = 0
) (
  input  token_t             in_tok,
  input  logic               cur_bank,
  input  data_t              mem_rd_data,
  input  data_t              mac_sum,
  output logic [LADDR_W-1:0] mem_rd_addr,
  output logic               mem_we,
  output logic               mem_wr_bank,
  output logic [LADDR_W-1:0] mem_wr_addr,
  output data_t              mem_wr_data,
  output logic               mac_en,
  output logic               mac_first,
  output data_t              mac_b,
  output logic               swap,
  output token_t             out_tok
);

  logic mine;

  always_comb begin
    mine        = (int'(in_tok.pe) == PE_ID);
    mem_rd_addr = in_tok.k;
    mem_we      = 1'b0;
    mem_wr_bank = cur_bank;
    mem_wr_addr = in_tok.k;
    mem_wr_data = in_tok.data;
    mac_en      = 1'b0;
    mac_first   = in_tok.first;
    mac_b       = in_tok.data;
    swap        = 1'b0;
    out_tok     = in_tok;
    unique case (in_tok.op)
      OP_LOAD: mem_we = mine;
      OP_MAC: begin
        mac_en = 1'b1;
        if (in_tok.last) begin
          mem_we      = 1'b1;
          mem_wr_bank = ~cur_bank;
          mem_wr_addr = in_tok.v;
          mem_wr_data = mac_sum;
        end
      end
      OP_SWAP: swap = 1'b1;
      OP_READ: if (mine) out_tok.data = mem_rd_data;
      default: ;
    endcase
  end

endmodule
