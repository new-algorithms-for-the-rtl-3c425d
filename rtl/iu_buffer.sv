// iu_buffer: the buffer memory of the interface unit.
//
// Holds the input matrices and every intermediate matrix (row-major words).
// The interface unit streams matrices out of it into the array and writes
// the elements read back from the array into it.
//
// Interface: one synchronous read port (rd_en, rd_addr -> rd_data one clock
// later) and one write port, both at the rising clock edge. Contents are not
// reset. The paper places such a buffer in the interface unit; its size
// (DEPTH words) and ports are this design's choice.
module iu_buffer
  import mat_pkg::*;
#(
  parameter int DEPTH = 1 << BADDR_W
) (
  input  logic   clk,
  input  logic   rd_en,
  input  baddr_t rd_addr,
  output data_t  rd_data,
  input  logic   we,
  input  baddr_t wr_addr,
  input  data_t  wr_data
);

  data_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && int'(wr_addr) < DEPTH) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= (int'(rd_addr) < DEPTH) ? mem[rd_addr] : '0;
  end

endmodule
