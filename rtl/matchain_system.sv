// matchain_system: a host-attached accelerator that multiplies a series of
// rectangular matrices on a linear systolic array of K processing elements.
//
// The interface unit (iu) keeps the matrices in its buffer memory, chooses
// the split points of the series and streams the matrices through the array
// (linear_array); the host only loads the series, starts the run and reads
// the product back. The host itself is outside this module: its side of the
// interface unit is brought out as ports (see iu.sv for the protocol).
//
// Defaults: K = 10 PEs, series of up to MAXS = 15 matrices, matrix
// dimensions up to MAXD = 800, a buffer of 1 Mi 32-bit words.
module matchain_system
  import mat_pkg::*;
#(
  parameter int K         = 10,
  parameter int MAXS      = 15,
  parameter int MAXD      = 800,
  parameter int BUF_DEPTH = 1 << BADDR_W
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   host_we,
  input  baddr_t host_addr,
  input  data_t  host_wdata,
  input  logic   host_rd_en,
  output data_t  host_rdata,
  input  logic   start,
  input  alg_e   alg,
  input  logic [$clog2(MAXS+1)-1:0] s,
  input  dim_t   dims [MAXS+1],
  output logic   busy,
  output logic   done,
  output mdesc_t result,
  output logic [31:0] n_load,
  output logic [31:0] n_mac,
  output logic [31:0] n_cycles
);

  token_t arr_in, arr_out;

  iu #(.K(K), .MAXS(MAXS), .BUF_DEPTH(BUF_DEPTH)) u_iu (
    .clk, .rst_n, .host_we, .host_addr, .host_wdata, .host_rd_en, .host_rdata,
    .start, .alg, .s, .dims, .busy, .done, .result, .n_load, .n_mac, .n_cycles,
    .arr_in, .arr_out
  );

  linear_array #(.K(K), .MAXD(MAXD)) u_array (
    .clk, .rst_n, .in_tok(arr_in), .out_tok(arr_out)
  );

endmodule
