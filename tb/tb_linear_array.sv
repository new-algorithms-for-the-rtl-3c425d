// tb_linear_array: checks the K-PE array as a whole (default K = 10).
// Loads row i of a random K x L matrix A into PE i, streams a random L x C
// matrix B column by column, swaps, and reads every PE's row back: the rows
// must be those of A*B, formed here. Then streams a second matrix so that the
// array holds A*B*D. Checks that the array's latency is K clocks and that it
// takes one token per clock.
module automatic tb_linear_array;
  import mat_pkg::*;
  localparam int K = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  token_t in_tok = TOKEN_NOP, out_tok;
  int checks = 0, failures = 0;
  int cyc = 0, first_in = -1, first_out = -1;
  data_t result [int];

  always #5 clk = ~clk;
  linear_array #(.K(K), .MAXD(800)) dut (.*);

  always @(posedge clk) begin
    cyc++;
    if (in_tok.op != OP_NOP && first_in < 0) first_in = cyc;
    if (out_tok.op != OP_NOP && first_out < 0) first_out = cyc;
    if (out_tok.op == OP_READ) result[int'(out_tok.tag)] = out_tok.data;
  end

  task automatic send(token_t t);
    @(negedge clk);
    in_tok = t;
  endtask

  task automatic stream(data_t m[], int rows, int cols);
    for (int c = 0; c < cols; c++)
      for (int k = 0; k < rows; k++) begin
        token_t t = TOKEN_NOP;
        t.op = OP_MAC; t.k = LADDR_W'(k); t.v = LADDR_W'(c); t.data = m[k*cols + c];
        t.first = (k == 0); t.last = (k == rows - 1);
        send(t);
      end
    begin
      token_t t = TOKEN_NOP;
      t.op = OP_SWAP;
      send(t);
    end
  endtask

  function automatic void matmul(input data_t x[], input data_t y[], int n, int m, int p, output data_t z[]);
    z = new[n*p];
    for (int i = 0; i < n; i++)
      for (int j = 0; j < p; j++) begin
        z[i*p + j] = '0;
        for (int k = 0; k < m; k++) z[i*p + j] += x[i*m + k] * y[k*p + j];
      end
  endfunction

  initial begin
    localparam int L = 7, C = 12, E = 5;
    data_t a [], b [], d [], ab [], abd [];
    a = new[K*L]; b = new[L*C]; d = new[C*E];
    foreach (a[n]) a[n] = $urandom;
    foreach (b[n]) b[n] = $urandom;
    foreach (d[n]) d[n] = $urandom;
    matmul(a, b, K, L, C, ab);
    matmul(ab, d, K, C, E, abd);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < K; p++)
      for (int k = 0; k < L; k++) begin
        token_t t = TOKEN_NOP;
        t.op = OP_LOAD; t.pe = PE_W'(p); t.k = LADDR_W'(k); t.data = a[p*L + k];
        send(t);
      end
    for (int round = 0; round < 2; round++) begin
      int cols;
      if (round == 0) begin stream(b, L, C); cols = C; end
      else begin stream(d, C, E); cols = E; end
      for (int p = 0; p < K; p++)
        for (int c = 0; c < cols; c++) begin
          token_t t = TOKEN_NOP;
          t.op = OP_READ; t.pe = PE_W'(p); t.k = LADDR_W'(c); t.tag = baddr_t'(p*cols + c);
          send(t);
        end
      @(negedge clk); in_tok = TOKEN_NOP;
      repeat (K + 2) @(negedge clk);
      for (int n = 0; n < K*cols; n++) begin
        checks++;
        if (!result.exists(n) || result[n] !== (round == 0 ? ab[n] : abd[n])) failures++;
      end
      result.delete();
    end
    checks++;
    if (first_out - first_in != K) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", first_out - first_in, K);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
