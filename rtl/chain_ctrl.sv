// chain_ctrl: the algorithm sequencer of the interface unit.
//
// It turns one "multiply this series" command into a sequence of chain
// products for iu_executor, following one of three orders:
//   ALG_NATURAL    C = A_1 * A_2 * ... * A_s, left to right.
//   ALG_SINGLE_MIN j = first matrix with the fewest rows;
//                  B1 = A_1..A_{j-1} right to left, B2 = A_j..A_s left to
//                  right, C = B1 * B2.
//   ALG_ALL_MIN    t_1..t_r = the list L_fin from min_search;
//                  C_j = A_{t_j}..A_{t_{j+1}-1} (j < r), B2 = C_1..C_{r-1},
//                  B3 = A_{t_r}..A_s, B1 = A_1..A_{t_1-1} right to left,
//                  C = (B1 * B2) * B3 (done as one product B1, B2, B3).
// A product of a single matrix is not run: the result simply names that
// matrix. Intermediate matrices are placed in the buffer one after another
// behind the inputs.
//
// Matrices live in a descriptor table ("slots"): 0..MAXS-1 the inputs,
// MAXS.. the C_j, then B1, B2, B3 and C. Inputs are row-major in the buffer,
// A_1 at address 0 and each next one right behind the previous one.
//
// Interface: dims[0..s] are N_1..N_s followed by M_s (so A_i is dims[i-1] x
// dims[i]). start is taken when idle; done pulses with result (the
// descriptor of C) valid until the next start. n_load and n_mac count the
// LOAD and MAC tokens of the whole run (the step count T of the paper's
// formulas); n_cycles counts clocks from start to done.
module chain_ctrl
  import mat_pkg::*;
#(
  parameter int K    = 10,
  parameter int MAXS = 15
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  alg_e   alg,
  input  logic [$clog2(MAXS+1)-1:0] s,
  input  dim_t   dims [MAXS+1],
  output logic   busy,
  output logic   done,
  output mdesc_t result,
  output logic [31:0] n_load,
  output logic [31:0] n_mac,
  output logic [31:0] n_cycles,
  // to the executor
  output logic   ex_start,
  output dir_e   ex_dir,
  output logic [$clog2(MAXS+1)-1:0] ex_nops,
  output mdesc_t ex_ops [MAXS],
  output baddr_t ex_dest,
  input  logic   ex_busy,
  input  logic   ex_done,
  input  logic   ex_issue_load,
  input  logic   ex_issue_mac
);

  localparam int SW    = $clog2(MAXS+1);
  localparam int IW    = $clog2(MAXS);
  localparam int NSLOT = 2 * MAXS + 3;
  localparam int XW    = $clog2(NSLOT);
  localparam int SL_C1 = MAXS;          // first C_j
  localparam int SL_B1 = 2 * MAXS - 1;
  localparam int SL_B2 = 2 * MAXS;
  localparam int SL_B3 = 2 * MAXS + 1;
  localparam int SL_C  = 2 * MAXS + 2;

  typedef enum logic [2:0] {C_IDLE, C_INIT, C_PLAN, C_RUN, C_FIN} cst_e;
  cst_e st;

  alg_e                 alg_r;
  logic [SW-1:0]        s_r;
  dim_t                 dims_r [MAXS+1];
  mdesc_t               slot [NSLOT];
  baddr_t               free_ptr;
  logic [2:0]           step;
  logic [IW-1:0]        jj;
  logic [XW-1:0]        dest_r;

  // ---- minima of the latched series ----
  dim_t                 nrows [MAXS];
  logic [IW-1:0]        jmin;
  logic [MAXS-1:0]      lmin_mask, lfin_mask;
  logic [SW-1:0]        r;
  logic [IW-1:0]        tpos [MAXS];

  always_comb for (int n = 0; n < MAXS; n++) nrows[n] = dims_r[n];

  min_search #(.K(K), .MAXS(MAXS)) u_min (
    .s(s_r), .nrows, .jmin, .lmin_mask, .lfin_mask, .r, .tpos
  );

  // ---- input descriptors ----
  mdesc_t in_desc [MAXS];
  baddr_t in_end;
  always_comb begin
    in_end = '0;
    for (int n = 0; n < MAXS; n++) begin
      in_desc[n].base = in_end;
      in_desc[n].rows = dims_r[n];
      in_desc[n].cols = dims_r[n+1];
      if (n < int'(s_r)) in_end = in_end + baddr_t'(dims_r[n]) * dims_r[n+1];
    end
  end

  // ---- the job of the current step ----
  logic            jv;        // this step has a product to form
  logic            jlast;     // this is the algorithm's last step
  logic            jrepeat;   // step repeats with jj+1
  logic [XW-1:0]   jl [MAXS]; // operand slots
  logic [SW-1:0]   jn;
  dir_e            jdir;
  logic [XW-1:0]   jdest;
  int              lo, hi;

  always_comb begin
    jv      = 1'b0;
    jlast   = 1'b0;
    jrepeat = 1'b0;
    jdir    = DIR_LR;
    jdest   = XW'(SL_C);
    lo      = 0;
    hi      = -1;
    unique case (alg_r)
      ALG_SINGLE_MIN: unique case (step)
        3'd0: begin  // B1 = A_1..A_{j-1}, right to left
          jv = (jmin != 0); lo = 0; hi = int'(jmin) - 1; jdir = DIR_RL; jdest = XW'(SL_B1);
        end
        3'd1: begin  // B2 = A_j..A_s
          jv = 1'b1; lo = int'(jmin); hi = int'(s_r) - 1; jdest = XW'(SL_B2);
        end
        default: begin  // C = B1 * B2
          jv = 1'b1; jlast = 1'b1;
          lo = (jmin != 0) ? SL_B1 : SL_B2; hi = SL_B2;
        end
      endcase
      ALG_ALL_MIN: unique case (step)
        3'd0: begin  // C_j = A_{t_j}..A_{t_{j+1}-1}
          jv      = (int'(r) >= 2);
          jrepeat = (int'(jj) + 2 < int'(r));
          lo      = int'(tpos[jj]);
          hi      = int'(tpos[(int'(jj) + 1) % MAXS]) - 1;
          jdest   = XW'(SL_C1 + int'(jj));
        end
        3'd1: begin  // B2 = C_1..C_{r-1}
          jv = (int'(r) >= 2); lo = SL_C1; hi = SL_C1 + int'(r) - 2; jdest = XW'(SL_B2);
        end
        3'd2: begin  // B3 = A_{t_r}..A_s
          jv = 1'b1; lo = int'(tpos[(int'(r) + MAXS - 1) % MAXS]); hi = int'(s_r) - 1;
          jdest = XW'(SL_B3);
        end
        3'd3: begin  // B1 = A_1..A_{t_1-1}, right to left
          jv = (tpos[0] != 0); lo = 0; hi = int'(tpos[0]) - 1; jdir = DIR_RL;
          jdest = XW'(SL_B1);
        end
        default: begin  // C = (B1 * B2) * B3
          jv = 1'b1; jlast = 1'b1;
          lo = (tpos[0] != 0) ? SL_B1 : ((int'(r) >= 2) ? SL_B2 : SL_B3);
          hi = SL_B3;
        end
      endcase
      default: begin  // ALG_NATURAL
        jv = 1'b1; jlast = 1'b1; lo = 0; hi = int'(s_r) - 1;
      end
    endcase

    // operand list: a slot range, with B1/B2/B3 entries that do not exist skipped
    jn = '0;
    for (int n = 0; n < MAXS; n++) jl[n] = '0;
    for (int n = 0; n < NSLOT; n++) begin
      if (n >= lo && n <= hi && int'(jn) < MAXS) begin
        if (!((n == SL_B1 && (alg_r == ALG_ALL_MIN ? tpos[0] == 0 : jmin == 0)) ||
              (n == SL_B2 && alg_r == ALG_ALL_MIN && int'(r) < 2))) begin
          jl[jn] = XW'(n);
          jn     = jn + 1'b1;
        end
      end
    end
  end

  // ---- executor command ----
  always_comb begin
    for (int n = 0; n < MAXS; n++) ex_ops[n] = slot[jl[n]];
  end
  assign ex_dir  = jdir;
  assign ex_nops = jn;
  assign ex_dest = slot[dest_r].base;  // set in C_PLAN, read by the executor at ex_start

  mdesc_t res_d;
  always_comb begin
    res_d.base = free_ptr;
    res_d.rows = slot[jl[0]].rows;
    res_d.cols = slot[jl[(int'(jn) + MAXS - 1) % MAXS]].cols;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= C_IDLE;
      alg_r    <= ALG_NATURAL;
      s_r      <= '0;
      free_ptr <= '0;
      step     <= '0;
      jj       <= '0;
      dest_r   <= '0;
      ex_start <= 1'b0;
      done     <= 1'b0;
      n_load   <= '0;
      n_mac    <= '0;
      n_cycles <= '0;
      for (int n = 0; n <= MAXS; n++) dims_r[n] <= '0;
      for (int n = 0; n < NSLOT; n++) slot[n] <= '0;
    end else begin
      ex_start <= 1'b0;
      done     <= 1'b0;
      if (st != C_IDLE) n_cycles <= n_cycles + 1'b1;
      if (ex_issue_load) n_load <= n_load + 1'b1;
      if (ex_issue_mac)  n_mac  <= n_mac + 1'b1;
      unique case (st)
        C_IDLE: if (start) begin
          alg_r    <= alg;
          s_r      <= s;
          dims_r   <= dims;
          step     <= '0;
          jj       <= '0;
          n_load   <= '0;
          n_mac    <= '0;
          n_cycles <= '0;
          st       <= C_INIT;
        end
        C_INIT: begin
          for (int n = 0; n < MAXS; n++) slot[n] <= in_desc[n];
          free_ptr <= in_end;
          st       <= C_PLAN;
        end
        C_PLAN: begin
          if (!jv || jn == 1) begin
            if (jv) slot[jdest] <= slot[jl[0]];  // one matrix: nothing to multiply
            if (jlast) st <= C_FIN;
            else if (jrepeat) jj <= jj + 1'b1;
            else begin
              step <= step + 1'b1;
              jj   <= '0;
            end
          end else begin
            slot[jdest] <= res_d;
            free_ptr    <= free_ptr + baddr_t'(res_d.rows) * res_d.cols;
            dest_r      <= jdest;
            ex_start    <= 1'b1;
            st          <= C_RUN;
          end
        end
        C_RUN: if (ex_done) begin
          if (jlast) st <= C_FIN;
          else if (jrepeat) begin
            jj <= jj + 1'b1;
            st <= C_PLAN;
          end else begin
            step <= step + 1'b1;
            jj   <= '0;
            st   <= C_PLAN;
          end
        end
        C_FIN: begin
          done <= 1'b1;
          st   <= C_IDLE;
        end
        default: st <= C_IDLE;
      endcase
    end
  end

  assign busy   = (st != C_IDLE);
  assign result = slot[SL_C];

  // The executor must be idle whenever a product is launched.
  a_exec_idle: assert property (@(posedge clk) disable iff (!rst_n) ex_start |-> !ex_busy);

endmodule
