// tb_iu_buffer: checks the interface unit's buffer memory.
// Random writes and synchronous reads over the whole address range, checked
// against a copy kept here; read data must appear one clock after rd_en.
module automatic tb_iu_buffer;
  import mat_pkg::*;
  localparam int DEPTH = 1 << BADDR_W;
  logic clk = 1'b0, rd_en = 1'b0, we = 1'b0;
  baddr_t rd_addr = '0, wr_addr = '0;
  data_t rd_data, wr_data = '0;
  data_t model [int];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  iu_buffer #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    baddr_t addrs [64];
    foreach (addrs[n]) addrs[n] = baddr_t'($urandom_range(0, DEPTH - 1));
    addrs[0] = '0;
    addrs[1] = baddr_t'(DEPTH - 1);
    foreach (addrs[n]) begin
      @(negedge clk);
      we = 1'b1; wr_addr = addrs[n]; wr_data = $urandom;
      model[addrs[n]] = wr_data;
    end
    @(negedge clk); we = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      baddr_t ra = addrs[$urandom_range(0, 63)];
      @(negedge clk);
      rd_en = 1'b1; rd_addr = ra;
      we = $urandom_range(0, 1) == 1; wr_addr = addrs[$urandom_range(0, 63)]; wr_data = $urandom;
      @(posedge clk);
      if (we) model[wr_addr] = wr_data;
      #1;
      checks++;
      if (rd_data !== model[ra] && !(we && wr_addr == ra)) begin
        failures++;
        if (failures < 5) $display("FAIL addr %0d: %h vs %h", ra, rd_data, model[ra]);
      end
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
