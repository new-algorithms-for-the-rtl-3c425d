// tb_pe_mac: checks the multiplier/adder with accumulator.
// Feeds random dot products of random length (first marks the start of
// each) and compares the sum after the last step with one formed here.
// Also checks that the accumulator holds while en is low.
module automatic tb_pe_mac;
  import mat_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, first = 1'b0;
  data_t a = '0, b = '0, sum, acc;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  pe_mac dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      int len;
      data_t expect_sum;
      len = $urandom_range(1, 20);
      expect_sum = '0;
      for (int k = 0; k < len; k++) begin
        @(negedge clk);
        en = 1'b1; first = (k == 0); a = $urandom; b = $urandom;
        expect_sum += a * b;
        #1;
        checks++;
        if (sum !== expect_sum) failures++;
        // an idle step in between must not disturb the sum
        if ($urandom_range(0, 3) == 0) begin
          @(negedge clk);
          en = 1'b0; a = $urandom; b = $urandom; first = 1'($urandom);
          @(negedge clk);
          checks++;
          if (acc !== expect_sum) failures++;
        end
      end
      @(negedge clk);
      en = 1'b0;
      checks++;
      if (acc !== expect_sum) begin
        failures++;
        $display("FAIL: acc %h, expected %h", acc, expect_sum);
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
