// tb_matchain_full: the four evaluated 15-matrix series on the accelerator
// at its default size (K = 10 PEs, buffer of 1 Mi words).
//
// For each series (dimensions below) and each multiplication order the
// testbench loads random matrices, runs the accelerator, reads the product
// back and compares it with a left-to-right product formed here. It also
// checks the number of steps (LOAD + MAC tokens, one multiply-add per PE per
// step) against the published execution times for K = 10:
//   natural order and single minimum: the published values themselves;
//   all minima: the value of this design's pass model (see README), which
//   differs slightly from the published one for series 1 and 4.
// The clocks of each run (steps plus unloading and pipeline overhead) are
// printed.
module automatic tb_matchain_full;
  import mat_pkg::*;
  localparam int MAXS = 15;
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
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  matchain_system dut (.*);

  // N_1..N_15, M_15 of the four series
  int series [4][16] = '{
    '{20, 40, 40, 60, 80, 20, 100, 60, 20, 50, 40, 20, 60, 40, 60, 50},
    '{60, 80, 80, 50, 80, 60, 80, 50, 80, 100, 50, 100, 50, 100, 80, 100},
    '{100, 100, 100, 100, 40, 80, 20, 60, 20, 80, 20, 40, 100, 20, 100, 100},
    '{200, 200, 200, 200, 50, 100, 50, 800, 60, 500, 50, 600, 60, 800, 50, 400}};
  // expected steps for K = 10: natural, single minimum, all minima
  longint expect_t [4][3] = '{
    '{65600, 65600, 65800},
    '{460800, 405000, 391500},
    '{542000, 145600, 147200},
    '{8380000, 2635000, 2332500}};

  initial begin
    for (int x = 0; x <= MAXS; x++) dims[x] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int sr = 0; sr < 4; sr++) begin
      int d [16];
      int total = 0, rc;
      data_t a [];
      data_t refm [], tmp [];
      d = series[sr];
      for (int m = 0; m < 15; m++) total += d[m]*d[m+1];
      a = new[total];
      foreach (a[e]) a[e] = data_t'($urandom_range(0, 15)) - 8;
      for (int e = 0; e < total; e++) begin
        @(negedge clk);
        host_we = 1'b1; host_addr = baddr_t'(e); host_wdata = a[e];
      end
      @(negedge clk); host_we = 1'b0;
      // reference, left to right
      refm = new[d[0]*d[1]];
      foreach (refm[e]) refm[e] = a[e];
      rc = d[1];
      begin
        int base = d[0]*d[1];
        for (int m = 1; m < 15; m++) begin
          int p = d[m+1];
          tmp = new[d[0]*p];
          for (int i = 0; i < d[0]; i++)
            for (int j = 0; j < p; j++) begin
              data_t acc = '0;
              for (int k = 0; k < rc; k++) acc += refm[i*rc+k] * a[base + k*p + j];
              tmp[i*p+j] = acc;
            end
          refm = tmp; rc = p;
          base += d[m]*p;
        end
      end
      for (int al = 0; al < 3; al++) begin
        int bad = 0;
        @(negedge clk);
        alg = alg_e'(al); s = 4'd15;
        for (int x = 0; x < 16; x++) dims[x] = dim_t'(d[x]);
        start = 1'b1;
        @(negedge clk); start = 1'b0;
        while (!done) @(negedge clk);
        $display("series %0d order %0d: %0d steps (expected %0d), %0d clocks", sr + 1, al,
                 n_load + n_mac, expect_t[sr][al], n_cycles);
        checks++;
        if (longint'(n_load) + longint'(n_mac) != expect_t[sr][al]) failures++;
        checks++;
        if (int'(result.rows) != d[0] || int'(result.cols) != d[15]) failures++;
        for (int e = 0; e < d[0]*d[15]; e++) begin
          @(negedge clk); host_rd_en = 1'b1; host_addr = result.base + baddr_t'(e);
          @(negedge clk); host_rd_en = 1'b0;
          if (host_rdata !== refm[e]) bad++;
        end
        checks++;
        if (bad != 0) begin
          failures++;
          $display("FAIL series %0d order %0d: %0d wrong elements", sr + 1, al, bad);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
