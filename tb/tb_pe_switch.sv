// tb_pe_switch: checks the token decoding of a PE's switch.
// Applies random tokens of every kind, addressed to this PE or another one,
// and checks the memory, multiplier-adder and bank-swap controls and the
// outgoing token against the rules written out here.
module automatic tb_pe_switch;
  import mat_pkg::*;
  localparam int ID = 5;
  token_t in_tok, out_tok;
  logic cur_bank;
  data_t mem_rd_data, mac_sum, mem_wr_data, mac_b;
  logic [LADDR_W-1:0] mem_rd_addr, mem_wr_addr;
  logic mem_we, mem_wr_bank, mac_en, mac_first, swap;
  int checks = 0, failures = 0;

  pe_switch #(.PE_ID(ID)) dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (op %0d pe %0d)", what, in_tok.op, in_tok.pe);
    end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      bit mine;
      in_tok       = token_t'({$urandom, $urandom, $urandom});
      in_tok.op    = op_e'($urandom_range(0, 4));
      in_tok.pe    = PE_W'($urandom_range(0, 1) ? ID : $urandom_range(0, 9));
      cur_bank     = 1'($urandom);
      mem_rd_data  = $urandom;
      mac_sum      = $urandom;
      mine         = (in_tok.pe == ID);
      #1;
      chk(mem_rd_addr == in_tok.k, "read address");
      chk(swap == (in_tok.op == OP_SWAP), "swap");
      chk(mac_en == (in_tok.op == OP_MAC), "mac enable");
      if (in_tok.op == OP_MAC) begin
        chk(mac_b == in_tok.data && mac_first == in_tok.first, "mac operands");
        chk(mem_we == in_tok.last, "mac write enable");
        if (in_tok.last)
          chk(mem_wr_bank == ~cur_bank && mem_wr_addr == in_tok.v && mem_wr_data == mac_sum, "mac write");
      end else if (in_tok.op == OP_LOAD) begin
        chk(mem_we == mine, "load write enable");
        if (mine) chk(mem_wr_bank == cur_bank && mem_wr_addr == in_tok.k && mem_wr_data == in_tok.data, "load write");
      end else chk(!mem_we, "no write");
      if (in_tok.op == OP_READ && mine) chk(out_tok.data == mem_rd_data && out_tok.tag == in_tok.tag, "read data");
      else chk(out_tok == in_tok, "pass through");
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
