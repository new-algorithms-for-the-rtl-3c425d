// tb_chain_ctrl: checks the algorithm sequencer against a stand-in executor.
// The stand-in records every chain product it is asked for (direction and
// operand sizes) and answers with done a few clocks later, pulsing
// issue_load / issue_mac a known number of times. For fixed series the list
// of products of each algorithm is compared with the list worked out by hand
// from the algorithms' definitions, and the result descriptor, operand base
// addresses and step counters are checked.
module automatic tb_chain_ctrl;
  import mat_pkg::*;
  localparam int K = 2, MAXS = 15;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  alg_e alg = ALG_NATURAL;
  logic [$clog2(MAXS+1)-1:0] s = '0;
  dim_t dims [MAXS+1];
  logic busy, done;
  mdesc_t result;
  logic [31:0] n_load, n_mac, n_cycles;
  logic ex_start, ex_busy = 1'b0, ex_done = 1'b0, ex_issue_load = 1'b0, ex_issue_mac = 1'b0;
  dir_e ex_dir;
  logic [$clog2(MAXS+1)-1:0] ex_nops;
  mdesc_t ex_ops [MAXS];
  baddr_t ex_dest;
  int checks = 0, failures = 0;
  string log [$];
  baddr_t dests [$];
  int pulses = 0;

  always #5 clk = ~clk;
  chain_ctrl #(.K(K), .MAXS(MAXS)) dut (.*);

  // stand-in executor: 3 LOAD and 4 MAC pulses per product
  initial begin
    forever begin
      @(posedge clk);
      if (ex_start) begin
        string str;
        str = $sformatf("%s%0d:", ex_dir == DIR_RL ? "RL" : "LR", ex_nops);
        for (int n = 0; n < int'(ex_nops); n++) str = {str, $sformatf(" %0dx%0d", ex_ops[n].rows, ex_ops[n].cols)};
        log.push_back(str);
        dests.push_back(ex_dest);
        @(negedge clk); ex_busy = 1'b1;
        for (int p = 0; p < 4; p++) begin
          ex_issue_load = (p < 3); ex_issue_mac = 1'b1; pulses++;
          @(negedge clk);
        end
        ex_issue_load = 1'b0; ex_issue_mac = 1'b0;
        ex_done = 1'b1;
        @(negedge clk);
        ex_done = 1'b0; ex_busy = 1'b0;
      end
    end
  end

  task automatic run(alg_e al, int d[$], string expect_log[$]);
    int in_end = 0;
    for (int x = 0; x + 1 < d.size(); x++) in_end += d[x]*d[x+1];
    log.delete(); dests.delete();
    @(negedge clk);
    alg = al; s = 4'(d.size() - 1);
    for (int x = 0; x <= MAXS; x++) dims[x] = dim_t'(x < d.size() ? d[x] : 0);
    start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!done) @(negedge clk);
    checks++;
    if (log.size() != expect_log.size()) begin
      failures++;
      $display("FAIL alg %0d: %0d products, expected %0d", al, log.size(), expect_log.size());
      foreach (log[n]) $display("  got %s", log[n]);
    end else foreach (log[n]) begin
      checks++;
      if (log[n] != expect_log[n]) begin
        failures++;
        $display("FAIL alg %0d product %0d: %s, expected %s", al, n, log[n], expect_log[n]);
      end
    end
    foreach (dests[n]) begin
      checks++;
      if (int'(dests[n]) < in_end) failures++;
    end
    checks++;
    if (int'(result.rows) != d[0] || int'(result.cols) != d[d.size()-1]) failures++;
    checks++;
    if (n_load != 3 * log.size() || n_mac != 4 * log.size()) failures++;
  endtask

  initial begin
    for (int x = 0; x <= MAXS; x++) dims[x] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // the 10-matrix example: A_odd 10x3, A_even 3x10; with K = 2 the minimal
    // matrices are A2, A4, A6, A8, A10
    begin
      int d[$] = '{10, 3, 10, 3, 10, 3, 10, 3, 10, 3, 10};
      run(ALG_NATURAL, d, '{"LR10: 10x3 3x10 10x3 3x10 10x3 3x10 10x3 3x10 10x3 3x10"});
      run(ALG_SINGLE_MIN, d, '{"LR9: 3x10 10x3 3x10 10x3 3x10 10x3 3x10 10x3 3x10", "LR2: 10x3 3x10"});
      run(ALG_ALL_MIN, d, '{"LR2: 3x10 10x3", "LR2: 3x10 10x3", "LR2: 3x10 10x3", "LR2: 3x10 10x3",
                            "LR4: 3x3 3x3 3x3 3x3", "LR3: 10x3 3x3 3x10"});
    end
    // minimum in the middle: B1 formed right to left. A5 has the fewest
    // rows; with K = 2, A4 and A5 both need one pass, so L_fin = {4}
    begin
      int d[$] = '{8, 9, 7, 2, 1, 6, 5};
      run(ALG_SINGLE_MIN, d, '{"RL4: 8x9 9x7 7x2 2x1", "LR2: 1x6 6x5", "LR2: 8x1 1x5"});
      run(ALG_ALL_MIN, d, '{"LR3: 2x1 1x6 6x5", "RL3: 8x9 9x7 7x2", "LR2: 8x2 2x5"});
    end
    // two separate minimal groups, first matrix minimal (no B1)
    begin
      int d[$] = '{2, 9, 7, 1, 8, 6};
      run(ALG_ALL_MIN, d, '{"LR3: 2x9 9x7 7x1", "LR2: 1x8 8x6", "LR2: 2x1 1x6"});
    end
    // check base addresses of the inputs in the natural order
    begin
      int d[$] = '{3, 4, 5, 6};
      run(ALG_NATURAL, d, '{"LR3: 3x4 4x5 5x6"});
      checks++;
      if (dut.slot[0].base != 0 || dut.slot[1].base != 12 || dut.slot[2].base != 32) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
