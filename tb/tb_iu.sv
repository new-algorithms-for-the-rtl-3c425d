// tb_iu: checks the interface unit with a 4-PE array attached.
// Writes a series into the buffer through the host port, reads it back,
// runs all three multiplication orders and compares the product read from
// the buffer with one formed here. Also checks that n_load + n_mac equals
// the step count of the paper's formulas for the natural order (11):
// Q_A1 + ceil(N_1/K) * (Q_A2 + ... + Q_As).
module automatic tb_iu;
  import mat_pkg::*;
  localparam int K = 4, MAXS = 15, BD = 1 << 14;
  logic clk = 1'b0, rst_n = 1'b0;
  logic host_we = 1'b0, host_rd_en = 1'b0, start = 1'b0;
  baddr_t host_addr = '0;
  data_t host_wdata = '0, host_rdata;
  alg_e alg = ALG_NATURAL;
  logic [$clog2(MAXS+1)-1:0] s = '0;
  dim_t dims [MAXS+1];
  logic busy, done;
  mdesc_t result;
  logic [31:0] n_load, n_mac, n_cycles;
  token_t arr_in, arr_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  iu #(.K(K), .MAXS(MAXS), .BUF_DEPTH(BD)) dut (.*);
  linear_array #(.K(K), .MAXD(64)) u_arr (.clk, .rst_n, .in_tok(arr_in), .out_tok(arr_out));

  task automatic rd(baddr_t a, output data_t v);
    @(negedge clk); host_rd_en = 1'b1; host_addr = a;
    @(negedge clk); host_rd_en = 1'b0; v = host_rdata;
  endtask

  initial begin
    int d [7] = '{9, 5, 11, 3, 6, 3, 7};
    int ns = 6, total = 0;
    data_t mem [int];
    data_t refm [], tmp [];
    int rc;
    longint q_rest = 0;
    for (int x = 0; x <= MAXS; x++) dims[x] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < ns; m++) total += d[m]*d[m+1];
    for (int e = 0; e < total; e++) begin
      @(negedge clk); host_we = 1'b1; host_addr = baddr_t'(e); host_wdata = data_t'($urandom_range(0, 99)) - 50;
      mem[e] = host_wdata;
    end
    @(negedge clk); host_we = 1'b0;
    for (int e = 0; e < total; e++) begin
      data_t v;
      rd(baddr_t'(e), v);
      checks++;
      if (v !== mem[e]) failures++;
    end
    // reference product
    refm = new[d[0]*d[1]];
    foreach (refm[e]) refm[e] = mem[e];
    rc = d[1];
    begin
      int base = d[0]*d[1];
      for (int m = 1; m < ns; m++) begin
        tmp = new[d[0]*d[m+1]];
        for (int i = 0; i < d[0]; i++)
          for (int j = 0; j < d[m+1]; j++) begin
            tmp[i*d[m+1]+j] = '0;
            for (int k = 0; k < rc; k++) tmp[i*d[m+1]+j] += refm[i*rc+k] * mem[base + k*d[m+1] + j];
          end
        refm = tmp; rc = d[m+1];
        q_rest += d[m]*d[m+1];
        base += d[m]*d[m+1];
      end
    end
    for (int al = 0; al < 3; al++) begin
      @(negedge clk);
      alg = alg_e'(al); s = 4'(ns);
      for (int x = 0; x <= ns; x++) dims[x] = dim_t'(d[x]);
      start = 1'b1;
      @(negedge clk); start = 1'b0;
      while (!done) @(negedge clk);
      if (al == 0) begin
        checks++;
        if (longint'(n_load + n_mac) != longint'(d[0]*d[1]) + longint'((d[0] + K - 1) / K) * q_rest) begin
          failures++;
          $display("FAIL natural order steps %0d", n_load + n_mac);
        end
      end
      checks++;
      if (int'(result.rows) != d[0] || int'(result.cols) != d[ns]) failures++;
      for (int e = 0; e < d[0]*d[ns]; e++) begin
        data_t v;
        rd(result.base + baddr_t'(e), v);
        checks++;
        if (v !== refm[e]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
