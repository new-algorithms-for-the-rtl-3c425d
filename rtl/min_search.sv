// min_search: finds the "minimal" matrices of a series.
//
// Given the row counts N_1..N_s of the series (nrows[0..s-1]) it produces:
//   jmin      index of the first matrix with the smallest row count
//             (the split point of the single-minimum algorithm);
//   lmin_mask the list L_min of the all-minima algorithm: every matrix that
//             needs as few passes through a K-PE array as the best one,
//             i.e. ceil(N_i/K) == min over i of ceil(N_i/K);
//   lfin_mask the list L_fin: L_min without the members whose left
//             neighbour is also in L_min;
//   r, tpos   the size of L_fin and its members in ascending order
//             (t_1..t_r of the paper, numbered from 0 here).
// Purely combinational. The selection rules follow the paper; the
// ceiling form of the pass-count test is this design's reading of it.
module min_search
  import mat_pkg::*;
#(
  parameter int K    = 10,
  parameter int MAXS = 15
) (
  input  logic [$clog2(MAXS+1)-1:0] s,
  input  dim_t                      nrows [MAXS],
  output logic [$clog2(MAXS)-1:0]   jmin,
  output logic [MAXS-1:0]           lmin_mask,
  output logic [MAXS-1:0]           lfin_mask,
  output logic [$clog2(MAXS+1)-1:0] r,
  output logic [$clog2(MAXS)-1:0]   tpos [MAXS]
);

  localparam int IW = $clog2(MAXS);

  dim_t nmin;
  dim_t passes [MAXS];
  dim_t pmin;
  logic prev_min;

  always_comb begin
    nmin = nrows[0];
    jmin = '0;
    for (int n = 0; n < MAXS; n++) begin
      passes[n] = dim_t'((int'(nrows[n]) + K - 1) / K);
      if (n < int'(s) && nrows[n] < nmin) begin
        nmin = nrows[n];
        jmin = IW'(n);
      end
    end
    pmin = dim_t'((int'(nmin) + K - 1) / K);

    lmin_mask = '0;
    lfin_mask = '0;
    r         = '0;
    prev_min  = 1'b0;
    for (int n = 0; n < MAXS; n++) tpos[n] = '0;
    for (int n = 0; n < MAXS; n++) begin
      if (n < int'(s) && passes[n] == pmin) begin
        lmin_mask[n] = 1'b1;
        if (!prev_min) begin
          lfin_mask[n] = 1'b1;
          tpos[r]      = IW'(n);
          r            = r + 1'b1;
        end
      end
      prev_min = lmin_mask[n];
    end
  end

endmodule
