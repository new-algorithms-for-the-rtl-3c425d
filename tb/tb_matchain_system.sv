// tb_matchain_system: end-to-end test of the matrix-chain accelerator.
//
// Acts as the host: writes random series of random-sized matrices into the
// buffer, runs each of the three multiplication orders, reads the product
// back and compares it with a product formed here in plain left-to-right
// order. It also predicts, from its own model of the pass structure, how
// many LOAD and MAC steps each run must take and checks the accelerator's
// count. Series are chosen so that every mechanism occurs: several passes
// (bounded parallelism), a single pass, right-to-left products, one-matrix
// "products" that need no work, and minimal matrices dropped from L_fin
// because their left neighbour is minimal too.
module automatic tb_matchain_system;
  import mat_pkg::*;

  localparam int K         = 3;
  localparam int MAXS      = 15;
  localparam int MAXD      = 64;
  localparam int BUF_DEPTH = 1 << 15;
  localparam int SW        = $clog2(MAXS+1);

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   host_we = 1'b0, host_rd_en = 1'b0, start = 1'b0;
  baddr_t host_addr = '0;
  data_t  host_wdata = '0, host_rdata;
  alg_e   alg = ALG_NATURAL;
  logic [SW-1:0] s = '0;
  dim_t   dims [MAXS+1];
  logic   busy, done;
  mdesc_t result;
  logic [31:0] n_load, n_mac, n_cycles;

  always #5 clk = ~clk;

  matchain_system #(.K(K), .MAXS(MAXS), .MAXD(MAXD), .BUF_DEPTH(BUF_DEPTH)) dut (.*);

  int checks = 0, failures = 0;

  // ---- mechanism counters (observed in the design) ----
  int n_rl = 0, n_later_pass = 0, n_products = 0, n_lfin_drop = 0;
  // ---- mechanism counters (from this testbench's plan) ----
  int n_alias = 0, n_one_pass = 0;
  int n_alg [3] = '{0, 0, 0};

  always @(posedge clk) begin
    if (dut.u_iu.u_exec.start && !dut.u_iu.u_exec.busy) begin
      n_products++;
      if (dut.u_iu.u_exec.dir == DIR_RL) n_rl++;
    end
    if (dut.u_iu.u_exec.issue_load && dut.u_iu.u_exec.p0 != 0 &&
        dut.u_iu.u_exec.o == 0 && dut.u_iu.u_exec.i == 0) n_later_pass++;
  end

  // ---- the series under test ----
  int      ns;
  int      d [MAXS+1];
  data_t   a [MAXS][];

  function automatic int ceil_div(int x, int y);
    return (x + y - 1) / y;
  endfunction

  // Steps (LOAD + MAC tokens) of one chain product of matrices with rows rr
  // and columns cc; rl selects right-to-left. Also tallies passes.
  function automatic longint chain_cost(int rr[$], int cc[$], bit rl);
    longint t = 0;
    int n = rr.size();
    if (n < 2) begin
      n_alias++;
      return 0;
    end
    if (!rl) begin
      int p = ceil_div(rr[0], K);
      if (p == 1) n_one_pass++;
      t = rr[0] * cc[0];
      for (int x = 1; x < n; x++) t += longint'(p) * rr[x] * cc[x];
    end else begin
      int p = ceil_div(cc[n-1], K);
      if (p == 1) n_one_pass++;
      t = rr[n-1] * cc[n-1];
      for (int x = 0; x < n - 1; x++) t += longint'(p) * rr[x] * cc[x];
    end
    return t;
  endfunction

  function automatic longint range_cost(int lo, int hi, bit rl, output int r0, output int c1);
    int rr[$], cc[$];
    for (int x = lo; x <= hi; x++) begin
      rr.push_back(d[x]);
      cc.push_back(d[x+1]);
    end
    r0 = d[lo];
    c1 = d[hi+1];
    return chain_cost(rr, cc, rl);
  endfunction

  function automatic longint expected_steps(alg_e al);
    longint t = 0;
    int r0, c1;
    if (al == ALG_NATURAL) return range_cost(0, ns - 1, 1'b0, r0, c1);
    if (al == ALG_SINGLE_MIN) begin
      int j = 0;
      int b1r, b1c, b2r, b2c;
      for (int x = 1; x < ns; x++) if (d[x] < d[j]) j = x;
      if (j > 0) t += range_cost(0, j - 1, 1'b1, b1r, b1c);
      t += range_cost(j, ns - 1, 1'b0, b2r, b2c);
      if (j > 0) t += chain_cost('{b1r, b2r}, '{b1c, b2c}, 1'b0);
      return t;
    end else begin
      int g [MAXS];
      int gmin = 1 << 30;
      int tl[$];
      int cr[$], cc[$], fr[$], fc[$];
      for (int x = 0; x < ns; x++) begin
        g[x] = ceil_div(d[x], K);
        if (g[x] < gmin) gmin = g[x];
      end
      for (int x = 0; x < ns; x++)
        if (g[x] == gmin && (x == 0 || g[x-1] != gmin)) tl.push_back(x);
      for (int j = 0; j + 1 < tl.size(); j++) begin
        t += range_cost(tl[j], tl[j+1] - 1, 1'b0, r0, c1);
        cr.push_back(r0);
        cc.push_back(c1);
      end
      if (tl[0] > 0) begin
        t += range_cost(0, tl[0] - 1, 1'b1, r0, c1);
        fr.push_back(r0);
        fc.push_back(c1);
      end
      if (tl.size() >= 2) begin
        t += chain_cost(cr, cc, 1'b0);
        fr.push_back(cr[0]);
        fc.push_back(cc[cc.size()-1]);
      end
      t += range_cost(tl[tl.size()-1], ns - 1, 1'b0, r0, c1);
      fr.push_back(r0);
      fc.push_back(c1);
      t += chain_cost(fr, fc, 1'b0);
      return t;
    end
  endfunction

  // ---- host tasks ----
  task automatic write_series();
    int addr = 0;
    for (int m = 0; m < ns; m++)
      for (int e = 0; e < d[m] * d[m+1]; e++) begin
        @(negedge clk);
        host_we    = 1'b1;
        host_addr  = baddr_t'(addr);
        host_wdata = a[m][e];
        addr++;
      end
    @(negedge clk);
    host_we = 1'b0;
  endtask

  task automatic run_and_check(alg_e al);
    data_t  ref_m[], tmp[];
    int     rr, rc;
    longint exp_t;
    int     mism = 0;

    // reference: left to right
    ref_m = a[0];
    rr = d[0];
    rc = d[1];
    for (int m = 1; m < ns; m++) begin
      tmp = new[rr * d[m+1]];
      for (int i = 0; i < rr; i++)
        for (int j = 0; j < d[m+1]; j++) begin
          data_t acc = '0;
          for (int k = 0; k < rc; k++) acc += ref_m[i*rc + k] * a[m][k*d[m+1] + j];
          tmp[i*d[m+1] + j] = acc;
        end
      ref_m = tmp;
      rc = d[m+1];
    end
    exp_t = expected_steps(al);

    @(negedge clk);
    alg = al;
    s = SW'(ns);
    for (int x = 0; x <= MAXS; x++) dims[x] = dim_t'(x <= ns ? d[x] : 0);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    n_alg[al]++;
    if (dut.u_iu.u_ctrl.lmin_mask != dut.u_iu.u_ctrl.lfin_mask) n_lfin_drop++;

    checks++;
    if (int'(result.rows) != d[0] || int'(result.cols) != d[ns]) begin
      failures++;
      $display("FAIL alg %0d: result is %0dx%0d, expected %0dx%0d", al, result.rows,
               result.cols, d[0], d[ns]);
    end
    checks++;
    if (longint'(n_load) + longint'(n_mac) != exp_t) begin
      failures++;
      $display("FAIL alg %0d: %0d steps, expected %0d", al, n_load + n_mac, exp_t);
    end

    for (int e = 0; e < d[0] * d[ns]; e++) begin
      @(negedge clk);
      host_rd_en = 1'b1;
      host_addr  = result.base + baddr_t'(e);
      @(negedge clk);
      host_rd_en = 1'b0;
      if (host_rdata !== ref_m[e]) mism++;
    end
    checks++;
    if (mism != 0) begin
      failures++;
      $display("FAIL alg %0d: %0d of %0d product elements wrong", al, mism, d[0] * d[ns]);
    end
  endtask

  task automatic new_series(int n, int dlist[$]);
    ns = n;
    for (int x = 0; x <= n; x++) d[x] = dlist[x];
    for (int m = 0; m < n; m++) begin
      a[m] = new[d[m] * d[m+1]];
      foreach (a[m][e]) a[m][e] = data_t'($urandom_range(0, 15)) - 7;
    end
  endtask

  initial begin
    for (int x = 0; x <= MAXS; x++) dims[x] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // fixed series: the paper's 10-matrix example, scaled (10x3 / 3x10)
    begin
      int dl[$] = '{10, 3, 10, 3, 10, 3, 10, 3, 10, 3, 10};
      new_series(10, dl);
    end
    write_series();
    for (int al = 0; al < 3; al++) run_and_check(alg_e'(al));

    // fixed series: adjacent minimal matrices and a minimum in the middle
    begin
      int dl[$] = '{7, 8, 2, 2, 5, 2, 9, 4};
      new_series(7, dl);
    end
    write_series();
    for (int al = 0; al < 3; al++) run_and_check(alg_e'(al));

    // fixed series: first matrix minimal, so no B1
    begin
      int dl[$] = '{2, 6, 4, 7, 2, 5};
      new_series(5, dl);
    end
    write_series();
    for (int al = 0; al < 3; al++) run_and_check(alg_e'(al));

    // random series
    for (int t = 0; t < 12; t++) begin
      int dl[$];
      int n;
      dl.delete();
      n = $urandom_range(1, 9);
      for (int x = 0; x <= n; x++) dl.push_back($urandom_range(1, 12));
      new_series(n, dl);
      write_series();
      for (int al = 0; al < 3; al++) run_and_check(alg_e'(al));
    end

    $display("mechanisms: products=%0d right_to_left=%0d later_passes=%0d single_pass=%0d one_matrix=%0d lfin_drops=%0d natural=%0d single_min=%0d all_min=%0d",
             n_products, n_rl, n_later_pass, n_one_pass, n_alias, n_lfin_drop,
             n_alg[0], n_alg[1], n_alg[2]);
    checks++; if (n_rl == 0) failures++;
    checks++; if (n_later_pass == 0) failures++;
    checks++; if (n_one_pass == 0) failures++;
    checks++; if (n_alias == 0) failures++;
    checks++; if (n_lfin_drop == 0) failures++;
    checks++; if (n_alg[0] == 0 || n_alg[1] == 0 || n_alg[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
