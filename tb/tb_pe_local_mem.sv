// tb_pe_local_mem: checks the two-bank local memory of a PE.
// Writes random words to random addresses of both banks, keeps a copy here
// and checks every asynchronous read against it, including that a write to
// one bank leaves the same address of the other bank alone.
module automatic tb_pe_local_mem;
  import mat_pkg::*;
  localparam int DEPTH = 800;
  logic clk = 1'b0;
  logic rd_bank = 1'b0, we = 1'b0, wr_bank = 1'b0;
  logic [LADDR_W-1:0] rd_addr = '0, wr_addr = '0;
  data_t rd_data, wr_data = '0;
  data_t model [2][DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  pe_local_mem #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    // initialise both banks
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk);
        we = 1'b1; wr_bank = b[0]; wr_addr = LADDR_W'(a); wr_data = $urandom;
        model[b][a] = wr_data;
      end
    @(negedge clk); we = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      we      = $urandom_range(0, 1) == 1;
      wr_bank = 1'($urandom);
      wr_addr = LADDR_W'($urandom_range(0, DEPTH - 1));
      wr_data = $urandom;
      rd_bank = 1'($urandom);
      rd_addr = LADDR_W'($urandom_range(0, DEPTH - 1));
      #1;
      checks++;
      if (rd_data !== model[rd_bank][rd_addr]) begin
        failures++;
        if (failures < 5) $display("FAIL bank %0d addr %0d: %h vs %h", rd_bank, rd_addr, rd_data, model[rd_bank][rd_addr]);
      end
      @(posedge clk);
      if (we) model[wr_bank][wr_addr] = wr_data;
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
