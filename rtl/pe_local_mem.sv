// pe_local_mem: the local memory of one processing element.
//
// Two banks of DEPTH words. One bank holds the resident vector (a row or a
// column of the matrix kept in the PE); the other receives the elements of
// the next intermediate vector while the resident one is still being read.
// Which bank plays which role is decided by the PE (see pe.sv); this block
// only stores words.
//
// Interface: one asynchronous read port (rd_bank, rd_addr -> rd_data) and one
// write port, written at the rising clock edge when we is high. Contents are
// not reset. A local memory per PE follows the paper's PE structure; two
// banks and the read/write timing are this design's choice.
module pe_local_mem
  import mat_pkg::*;
#(
  parameter int DEPTH = 800
) (
  input  logic               clk,
  input  logic               rd_bank,
  input  logic [LADDR_W-1:0] rd_addr,
  output data_t              rd_data,
  input  logic               we,
  input  logic               wr_bank,
  input  logic [LADDR_W-1:0] wr_addr,
  input  data_t              wr_data
);

  data_t mem [2][DEPTH];

  always_ff @(posedge clk) begin
    if (we && int'(wr_addr) < DEPTH) mem[wr_bank][wr_addr] <= wr_data;
  end

  assign rd_data = (int'(rd_addr) < DEPTH) ? mem[rd_bank][rd_addr] : '0;

endmodule
