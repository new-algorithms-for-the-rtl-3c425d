// tb_min_search: checks the search for minimal matrices.
// First the 10-matrix example (alternating 10 x 3 and 3 x 10 matrices):
// the first minimal matrix is the 2nd and L_min = L_fin = {2,4,6,8,10}.
// Then random series, checked against lists formed here: jmin is the first
// smallest N_i; L_min holds every i with the same pass count ceil(N_i/K) as
// the smallest; L_fin drops members whose left neighbour is in L_min.
module automatic tb_min_search;
  import mat_pkg::*;
  localparam int K = 3, MAXS = 15;
  logic [$clog2(MAXS+1)-1:0] s;
  dim_t nrows [MAXS];
  logic [$clog2(MAXS)-1:0] jmin;
  logic [MAXS-1:0] lmin_mask, lfin_mask;
  logic [$clog2(MAXS+1)-1:0] r;
  logic [$clog2(MAXS)-1:0] tpos [MAXS];
  int checks = 0, failures = 0;

  min_search #(.K(K), .MAXS(MAXS)) dut (.*);

  task automatic check_now(int n);
    int j = 0, pm = 1 << 30, rr = 0;
    logic [MAXS-1:0] lm = '0, lf = '0;
    int tp [MAXS];
    for (int x = 0; x < n; x++) if (nrows[x] < nrows[j]) j = x;
    for (int x = 0; x < n; x++) if ((nrows[x] + K - 1) / K < pm) pm = (nrows[x] + K - 1) / K;
    for (int x = 0; x < n; x++) if ((nrows[x] + K - 1) / K == pm) lm[x] = 1'b1;
    for (int x = 0; x < n; x++)
      if (lm[x] && (x == 0 || !lm[x-1])) begin
        lf[x] = 1'b1;
        tp[rr++] = x;
      end
    #1;
    checks++; if (int'(jmin) != j) failures++;
    checks++; if (lmin_mask != lm) failures++;
    checks++; if (lfin_mask != lf) failures++;
    checks++; if (int'(r) != rr) failures++;
    for (int x = 0; x < rr; x++) begin
      checks++;
      if (int'(tpos[x]) != tp[x]) failures++;
    end
  endtask

  initial begin
    s = 10;
    for (int x = 0; x < MAXS; x++) nrows[x] = (x % 2 == 0) ? 10 : 3;
    #1;
    checks++;
    if (jmin != 1 || lfin_mask != 15'b000_0010_1010_1010 || r != 5) begin
      failures++;
      $display("FAIL example: jmin %0d lfin %b r %0d", jmin, lfin_mask, r);
    end
    check_now(10);
    for (int t = 0; t < 2000; t++) begin
      int n = $urandom_range(1, MAXS);
      s = 4'(n);
      for (int x = 0; x < MAXS; x++)
        nrows[x] = dim_t'($urandom_range(0, 3) == 0 ? $urandom_range(1, 800) : $urandom_range(1, 40));
      check_now(n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
