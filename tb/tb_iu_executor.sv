// tb_iu_executor: checks one chain product run by the interface unit's
// data and control generator, on a real 3-PE array and a buffer model.
// Runs left-to-right and right-to-left products of 2 to 4 random matrices
// whose resident side needs one or several passes, compares the product
// written back with one formed here, and checks the step count (LOAD + MAC
// tokens) against Q_first + L * (sum of Q of the streamed matrices) with
// L = ceil(resident vectors / K), and the clock count against the issued
// tokens plus the array's drain time.
module automatic tb_iu_executor;
  import mat_pkg::*;
  localparam int K = 3, MAXOPS = 15, BD = 1 << 14;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  dir_e dir = DIR_LR;
  logic [$clog2(MAXOPS+1)-1:0] nops = '0;
  mdesc_t ops [MAXOPS];
  baddr_t dest_base = '0;
  logic busy, done, buf_rd_en, buf_we, issue_load, issue_mac;
  baddr_t buf_rd_addr, buf_wr_addr;
  data_t buf_rd_data, buf_wr_data;
  token_t arr_in, arr_out;
  data_t bmem [BD];
  int checks = 0, failures = 0;
  int nl = 0, nm = 0, ncyc = 0, n_rl = 0, n_multi = 0;

  always #5 clk = ~clk;

  iu_executor #(.K(K), .MAXOPS(MAXOPS)) dut (.*);
  linear_array #(.K(K), .MAXD(64)) u_arr (.clk, .rst_n, .in_tok(arr_in), .out_tok(arr_out));

  always @(posedge clk) begin
    if (buf_rd_en) buf_rd_data <= bmem[buf_rd_addr];
    if (buf_we) bmem[buf_wr_addr] <= buf_wr_data;
    if (issue_load) nl++;
    if (issue_mac) nm++;
    if (busy) ncyc++;
  end

  task automatic run(int n, bit rl);
    int d [5];
    int base = 0, steps, passes, issued;
    data_t prod [], tmp [];
    int pr, pc;
    for (int x = 0; x <= n; x++) d[x] = $urandom_range(1, 9);
    for (int m = 0; m < n; m++) begin
      ops[m].base = baddr_t'(base);
      ops[m].rows = dim_t'(d[m]);
      ops[m].cols = dim_t'(d[m+1]);
      for (int e = 0; e < d[m]*d[m+1]; e++) bmem[base + e] = data_t'($urandom);
      // reference, left to right
      if (m == 0) begin
        prod = new[d[0]*d[1]];
        for (int e = 0; e < d[0]*d[1]; e++) prod[e] = bmem[e];
        pr = d[0]; pc = d[1];
      end else begin
        tmp = new[pr*d[m+1]];
        for (int i = 0; i < pr; i++)
          for (int j = 0; j < d[m+1]; j++) begin
            tmp[i*d[m+1]+j] = '0;
            for (int k = 0; k < pc; k++) tmp[i*d[m+1]+j] += prod[i*pc+k] * bmem[base + k*d[m+1] + j];
          end
        prod = tmp; pc = d[m+1];
      end
      base += d[m]*d[m+1];
    end
    // expected steps
    passes = rl ? (d[n] + K - 1) / K : (d[0] + K - 1) / K;
    if (passes > 1) n_multi++;
    if (rl) n_rl++;
    steps = rl ? d[n-1]*d[n] : d[0]*d[1];
    for (int m = 0; m < n; m++) if (rl ? m < n - 1 : m > 0) steps += passes * d[m]*d[m+1];
    nl = 0; nm = 0; ncyc = 0;
    @(negedge clk);
    dir = rl ? DIR_RL : DIR_LR; nops = 4'(n); dest_base = baddr_t'(base + 5); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    checks++;
    if (nl + nm != steps) begin
      failures++;
      $display("FAIL steps %0d, expected %0d", nl + nm, steps);
    end
    // issued tokens: steps, swaps, and one READ per result word
    issued = steps + passes * (n - 1) + d[0]*d[n];
    checks++;
    if (ncyc < issued + K || ncyc > issued + K + 6) begin
      failures++;
      $display("FAIL %0d clocks for %0d tokens", ncyc, issued);
    end
    for (int e = 0; e < d[0]*d[n]; e++) begin
      checks++;
      if (bmem[base + 5 + e] !== prod[e]) failures++;
    end
  endtask

  initial begin
    foreach (ops[m]) ops[m] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) run($urandom_range(2, 4), t % 2 == 1);
    checks++;
    if (n_rl == 0 || n_multi == 0) failures++;
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
