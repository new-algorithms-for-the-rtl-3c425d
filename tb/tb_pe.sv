// tb_pe: checks one processing element on its own.
// Loads a random resident vector, streams random vectors through it as MAC
// tokens, swaps banks and reads the dot products back with READ tokens; the
// results are compared with dot products formed here. Also checks that each
// token leaves exactly one clock after it entered (the R register), that
// tokens for other PEs pass unchanged, and that a second round (resident =
// the results) works after the swap.
module automatic tb_pe;
  import mat_pkg::*;
  localparam int ID = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  token_t in_tok = TOKEN_NOP, out_tok;
  token_t sent [$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  pe #(.PE_ID(ID), .MAXD(64)) dut (.*);

  data_t resident [];
  data_t got [$];

  // every token must come out one clock later; READ for this PE carries data
  always @(posedge clk) begin
    if (rst_n && sent.size() > 0) begin
      token_t e = sent.pop_front();
      #1;
      checks++;
      if (e.op == OP_READ && int'(e.pe) == ID) begin
        if (out_tok.op != OP_READ || out_tok.tag != e.tag) failures++;
        got.push_back(out_tok.data);
      end else if (out_tok != e) failures++;
    end
  end

  task automatic send(token_t t);
    @(negedge clk);
    in_tok = t;
    sent.push_back(t);
  endtask

  initial begin
    int L, M;
    data_t vecs [][];
    data_t expect_v [];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 20; round++) begin
      L = $urandom_range(1, 16);
      M = $urandom_range(1, 16);
      resident = new[L];
      foreach (resident[k]) begin
        token_t t = TOKEN_NOP;
        resident[k] = $urandom;
        t.op = OP_LOAD; t.pe = ID; t.k = LADDR_W'(k); t.data = resident[k];
        send(t);
        // the same word for another PE must not land here
        t.pe = ID + 1; t.data = ~resident[k];
        send(t);
      end
      // two rounds: the first product becomes the resident vector of the second
      for (int pass = 0; pass < 2; pass++) begin
        expect_v = new[M];
        for (int v = 0; v < M; v++) begin
          expect_v[v] = '0;
          for (int k = 0; k < resident.size(); k++) begin
            token_t t = TOKEN_NOP;
            data_t x = $urandom;
            t.op = OP_MAC; t.k = LADDR_W'(k); t.v = LADDR_W'(v); t.data = x;
            t.first = (k == 0); t.last = (k == resident.size() - 1);
            expect_v[v] += resident[k] * x;
            send(t);
          end
        end
        begin
          token_t t = TOKEN_NOP;
          t.op = OP_SWAP;
          send(t);
        end
        resident = expect_v;
        if (pass == 0) M = $urandom_range(1, 16);
      end
      got.delete();
      for (int k = 0; k < resident.size(); k++) begin
        token_t t = TOKEN_NOP;
        t.op = OP_READ; t.pe = ID; t.k = LADDR_W'(k); t.tag = baddr_t'(k); t.data = 32'hdead_beef;
        send(t);
      end
      @(negedge clk); in_tok = TOKEN_NOP;
      repeat (3) @(negedge clk);
      checks++;
      if (got.size() != resident.size()) failures++;
      else foreach (got[k]) begin
        checks++;
        if (got[k] !== resident[k]) failures++;
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
