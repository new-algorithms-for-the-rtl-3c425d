// iu_executor: the part of the interface unit that runs one chain product
// on the linear array.
//
// A chain product multiplies nops consecutive operand matrices (descriptors
// ops[0..nops-1], all in the buffer memory) and writes the result, row-major,
// at dest_base. It is done in passes of at most K resident vectors:
//
//   direction LR (left to right, the paper's "natural order" scheme):
//     LOAD   rows p0..p0+K-1 of ops[0], row i into PE i-p0
//     STREAM ops[1], ops[2], ... each column by column; after each matrix a
//            SWAP, so each PE then holds its row of the running product
//     UNLOAD each PE's row back to the buffer
//   direction RL (right to left, used for the part before the first minimal
//   matrix): the same with columns of ops[nops-1] resident and ops[nops-2],
//   ..., ops[0] streamed row by row, so each PE holds a column of the product.
//
// One token is issued per clock; the buffer read behind it takes one clock,
// so a token reaches the array the clock after its address was issued.
// READ tokens carry the buffer address of their result ('tag'); words coming
// back from the last PE are written there. done pulses once every result
// word is back. The number of LOAD and MAC tokens is the time measure T used
// in the paper's execution-time formulas; unload, SWAP and drain clocks
// come on top of it. The pass structure follows the paper; the token
// format and the sequencing are this design's choice.
module iu_executor
  import mat_pkg::*;
#(
  parameter int K      = 10,
  parameter int MAXOPS = 15
) (
  input  logic   clk,
  input  logic   rst_n,
  // command
  input  logic   start,
  input  dir_e   dir,
  input  logic [$clog2(MAXOPS+1)-1:0] nops,
  input  mdesc_t ops [MAXOPS],
  input  baddr_t dest_base,
  output logic   busy,
  output logic   done,
  // buffer memory
  output logic   buf_rd_en,
  output baddr_t buf_rd_addr,
  input  data_t  buf_rd_data,
  output logic   buf_we,
  output baddr_t buf_wr_addr,
  output data_t  buf_wr_data,
  // array
  output token_t arr_in,
  input  token_t arr_out,
  // one pulse per issued LOAD / MAC token, for time accounting
  output logic   issue_load,
  output logic   issue_mac
);

  localparam int NW = $clog2(MAXOPS+1);

  typedef enum logic [2:0] {E_IDLE, E_LOAD, E_STREAM, E_SWAP, E_UNLOAD, E_DRAIN} est_e;
  est_e st;

  mdesc_t        ops_r [MAXOPS];
  logic [NW-1:0] nops_r, q;
  dir_e          dir_r;
  baddr_t        dest_r;
  dim_t          p0, o, i;
  baddr_t        rd_issued, rd_back;

  // stage 1: token waiting for its data word from the buffer
  logic   s1_valid;
  token_t s1_tok;

  // ---- derived quantities ----
  logic [NW-1:0] last_op, x, fidx;
  mdesc_t        f_d, x_d;
  dim_t          res_rows, res_cols, ntot, nres, reslen, olim, ilim;
  baddr_t        addr;
  token_t        tmpl;
  logic          issue;

  always_comb begin
    last_op  = nops_r - 1'b1;
    fidx     = (dir_r == DIR_LR) ? '0 : last_op;
    x        = (dir_r == DIR_LR) ? q : NW'(last_op - q);
    f_d      = ops_r[fidx];
    x_d      = ops_r[x];
    res_rows = ops_r[0].rows;
    res_cols = ops_r[last_op].cols;
    ntot     = (dir_r == DIR_LR) ? res_rows : res_cols;
    nres     = (int'(ntot) - int'(p0) < K) ? dim_t'(ntot - p0) : dim_t'(K);
    reslen   = (dir_r == DIR_LR) ? f_d.cols : f_d.rows;

    olim  = 1;
    ilim  = 1;
    addr  = '0;
    tmpl  = TOKEN_NOP;
    issue = 1'b0;
    unique case (st)
      E_LOAD: begin
        olim    = nres;
        ilim    = reslen;
        issue   = 1'b1;
        addr    = (dir_r == DIR_LR) ? f_d.base + (baddr_t'(p0) + baddr_t'(o)) * f_d.cols + baddr_t'(i)
                                    : f_d.base + baddr_t'(i) * f_d.cols + baddr_t'(p0) + baddr_t'(o);
        tmpl.op = OP_LOAD;
        tmpl.pe = PE_W'(o);
        tmpl.k  = LADDR_W'(i);
      end
      E_STREAM: begin
        olim       = (dir_r == DIR_LR) ? x_d.cols : x_d.rows;
        ilim       = (dir_r == DIR_LR) ? x_d.rows : x_d.cols;
        issue      = 1'b1;
        addr       = (dir_r == DIR_LR) ? x_d.base + baddr_t'(i) * x_d.cols + baddr_t'(o)
                                       : x_d.base + baddr_t'(o) * x_d.cols + baddr_t'(i);
        tmpl.op    = OP_MAC;
        tmpl.k     = LADDR_W'(i);
        tmpl.v     = LADDR_W'(o);
        tmpl.first = (i == 0);
        tmpl.last  = (i == ilim - 1'b1);
      end
      E_SWAP: begin
        issue   = 1'b1;
        tmpl.op = OP_SWAP;
      end
      E_UNLOAD: begin
        olim     = nres;
        ilim     = (dir_r == DIR_LR) ? res_cols : res_rows;
        issue    = 1'b1;
        tmpl.op  = OP_READ;
        tmpl.pe  = PE_W'(o);
        tmpl.k   = LADDR_W'(i);
        tmpl.tag = (dir_r == DIR_LR) ? dest_r + (baddr_t'(p0) + baddr_t'(o)) * res_cols + baddr_t'(i)
                                     : dest_r + baddr_t'(i) * res_cols + baddr_t'(p0) + baddr_t'(o);
      end
      default: ;
    endcase
  end

  logic last_i, last_o;
  assign last_i = (i == ilim - 1'b1);
  assign last_o = (o == olim - 1'b1);

  // ---- sequencing ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= E_IDLE;
      nops_r    <= '0;
      q         <= '0;
      dir_r     <= DIR_LR;
      dest_r    <= '0;
      p0        <= '0;
      o         <= '0;
      i         <= '0;
      rd_issued <= '0;
      done      <= 1'b0;
      for (int n = 0; n < MAXOPS; n++) ops_r[n] <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        E_IDLE: if (start) begin
          ops_r     <= ops;
          nops_r    <= nops;
          dir_r     <= dir;
          dest_r    <= dest_base;
          p0        <= '0;
          o         <= '0;
          i         <= '0;
          q         <= NW'(1);
          rd_issued <= '0;
          st        <= E_LOAD;
        end
        E_LOAD, E_STREAM, E_UNLOAD: begin
          if (st == E_UNLOAD) rd_issued <= rd_issued + 1'b1;
          if (!last_i) i <= i + 1'b1;
          else begin
            i <= '0;
            if (!last_o) o <= o + 1'b1;
            else begin
              o <= '0;
              unique case (st)
                E_LOAD:   st <= E_STREAM;
                E_STREAM: st <= E_SWAP;
                default: begin  // E_UNLOAD: next pass or finish
                  if (int'(p0) + K < int'(ntot)) begin
                    p0 <= p0 + dim_t'(K);
                    q  <= NW'(1);
                    st <= E_LOAD;
                  end else st <= E_DRAIN;
                end
              endcase
            end
          end
        end
        E_SWAP: begin
          if (q < last_op) begin
            q  <= q + 1'b1;
            st <= E_STREAM;
          end else st <= E_UNLOAD;
        end
        E_DRAIN: if (rd_back == rd_issued && !s1_valid) begin
          done <= 1'b1;
          st   <= E_IDLE;
        end
        default: st <= E_IDLE;
      endcase
    end
  end

  assign busy = (st != E_IDLE);

  // ---- buffer read and token issue ----
  assign buf_rd_en   = issue && (st == E_LOAD || st == E_STREAM);
  assign buf_rd_addr = addr;
  assign issue_load  = (st == E_LOAD);
  assign issue_mac   = (st == E_STREAM);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_tok   <= TOKEN_NOP;
    end else begin
      s1_valid <= issue;
      s1_tok   <= tmpl;
    end
  end

  always_comb begin
    arr_in = s1_valid ? s1_tok : TOKEN_NOP;
    if (s1_valid && (s1_tok.op == OP_LOAD || s1_tok.op == OP_MAC)) arr_in.data = buf_rd_data;
  end

  // ---- results coming back from the last PE ----
  assign buf_we      = (arr_out.op == OP_READ);
  assign buf_wr_addr = arr_out.tag;
  assign buf_wr_data = arr_out.data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              rd_back <= '0;
    else if (start && !busy) rd_back <= '0;
    else if (buf_we)         rd_back <= rd_back + 1'b1;
  end

  // A product needs at least two operands of matching inner size.
  property p_start_ok;
    @(posedge clk) disable iff (!rst_n) (start && !busy) |-> (nops >= 2);
  endproperty
  a_start_ok: assert property (p_start_ok);

endmodule
