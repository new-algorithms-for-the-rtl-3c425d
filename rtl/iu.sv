// iu: the interface unit between the host and the linear array.
//
// It holds the buffer memory for input and intermediate matrices
// (iu_buffer), decides the multiplication order (chain_ctrl with
// min_search) and generates the data and control tokens for the array
// (iu_executor). It feeds the first PE and takes back what leaves the last.
//
// Host side: while the unit is not busy the host reads and writes the buffer
// through host_* (reads return data one clock after host_rd_en). It writes
// the series A_1..A_s row-major from address 0, each matrix right behind the
// previous one, sets s, dims and alg and pulses start. done pulses when the
// product C is in the buffer at result.base (result.rows x result.cols).
// Buffer accesses from the host are ignored while busy.
module iu
  import mat_pkg::*;
#(
  parameter int K         = 10,
  parameter int MAXS      = 15,
  parameter int BUF_DEPTH = 1 << BADDR_W
) (
  input  logic   clk,
  input  logic   rst_n,
  // host: buffer access
  input  logic   host_we,
  input  baddr_t host_addr,
  input  data_t  host_wdata,
  input  logic   host_rd_en,
  output data_t  host_rdata,
  // host: command and status
  input  logic   start,
  input  alg_e   alg,
  input  logic [$clog2(MAXS+1)-1:0] s,
  input  dim_t   dims [MAXS+1],
  output logic   busy,
  output logic   done,
  output mdesc_t result,
  output logic [31:0] n_load,
  output logic [31:0] n_mac,
  output logic [31:0] n_cycles,
  // array
  output token_t arr_in,
  input  token_t arr_out
);

  logic   ex_start, ex_busy, ex_done, ex_issue_load, ex_issue_mac;
  dir_e   ex_dir;
  logic [$clog2(MAXS+1)-1:0] ex_nops;
  mdesc_t ex_ops [MAXS];
  baddr_t ex_dest;

  logic   ex_rd_en, ex_we;
  baddr_t ex_rd_addr, ex_wr_addr;
  data_t  ex_wr_data, buf_rdata;

  logic   b_rd_en, b_we;
  baddr_t b_rd_addr, b_wr_addr;
  data_t  b_wr_data;

  chain_ctrl #(.K(K), .MAXS(MAXS)) u_ctrl (
    .clk, .rst_n, .start, .alg, .s, .dims, .busy, .done, .result,
    .n_load, .n_mac, .n_cycles,
    .ex_start, .ex_dir, .ex_nops, .ex_ops, .ex_dest,
    .ex_busy, .ex_done, .ex_issue_load, .ex_issue_mac
  );

  iu_executor #(.K(K), .MAXOPS(MAXS)) u_exec (
    .clk, .rst_n, .start(ex_start), .dir(ex_dir), .nops(ex_nops), .ops(ex_ops),
    .dest_base(ex_dest), .busy(ex_busy), .done(ex_done),
    .buf_rd_en(ex_rd_en), .buf_rd_addr(ex_rd_addr), .buf_rd_data(buf_rdata),
    .buf_we(ex_we), .buf_wr_addr(ex_wr_addr), .buf_wr_data(ex_wr_data),
    .arr_in, .arr_out, .issue_load(ex_issue_load), .issue_mac(ex_issue_mac)
  );

  always_comb begin
    if (busy) begin
      b_rd_en   = ex_rd_en;
      b_rd_addr = ex_rd_addr;
      b_we      = ex_we;
      b_wr_addr = ex_wr_addr;
      b_wr_data = ex_wr_data;
    end else begin
      b_rd_en   = host_rd_en;
      b_rd_addr = host_addr;
      b_we      = host_we;
      b_wr_addr = host_addr;
      b_wr_data = host_wdata;
    end
  end

  iu_buffer #(.DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rd_en(b_rd_en), .rd_addr(b_rd_addr), .rd_data(buf_rdata),
    .we(b_we), .wr_addr(b_wr_addr), .wr_data(b_wr_data)
  );

  assign host_rdata = buf_rdata;

endmodule
