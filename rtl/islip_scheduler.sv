// islip_scheduler: iterative iSLIP matching for an N x N crossbar.
//
// Structure: N grant arbiters (one per output), N accept arbiters (one per
// input), each a programmable priority encoder with a round-robin pointer
// (module rr_arbiter), and a decision register of N*N bits. One iteration is
// performed per clock cycle and ITER cycles make one cell time:
//   Request - req[i][j] is high when input i holds a cell for output j. It is
//             sampled in the first cycle of a cell time and kept for the
//             remaining iterations; outputs with out_free[j] low are left out.
//   Grant   - each unmatched output grants the requesting unmatched input that
//             comes next from its grant pointer.
//   Accept  - each input that received grants accepts the one that comes next
//             from its accept pointer. The accept is added to the decision
//             register.
// The matched inputs and outputs held in the decision register are fed back so
// that later iterations only arbitrate among unmatched ports. Pointers move
// only in the first iteration: a grant pointer goes to one past the input it
// granted, and only if that grant was accepted; an accept pointer goes to one
// past the output it accepted. This is the iSLIP algorithm as described.
//
// Timing (this design's choice): the iteration counter runs freely. At the
// end of iteration ITER-1 the final match is copied to match and match_valid
// is high for the following cycle, which is also the first iteration of the
// next cell time. The requester must therefore present, in that cycle,
// requests that already exclude the cells being transferred. late_match
// pulses when an iteration after the first adds a match.
module islip_scheduler #(
  parameter int unsigned N    = 16,
  parameter int unsigned ITER = 4,
  localparam int unsigned E  = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned IW = (ITER > 1) ? $clog2(ITER) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0][N-1:0]  req,        // [input][output]
  input  logic [N-1:0]         out_free,
  output logic [N-1:0][N-1:0]  match,      // [input][output]
  output logic                 match_valid,
  output logic                 first_iter,
  output logic                 late_match
);

  logic [IW-1:0]        iter_q;
  logic [N-1:0][N-1:0]  req_q, rq, dec_q, base_dec, acc, new_dec;
  logic [N-1:0][N-1:0]  greq, gnt;      // [output][input]
  logic [N-1:0][N-1:0]  areq;           // [input][output]
  logic [N-1:0]         in_matched, out_matched;
  logic [N-1:0][E-1:0]  g_idx;
  logic [N-1:0]         g_upd;

  assign first_iter = (iter_q == '0);

  always_comb begin
    base_dec = first_iter ? '0 : dec_q;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        rq[i][j] = first_iter ? (req[i][j] && out_free[j]) : req_q[i][j];
    in_matched  = '0;
    out_matched = '0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        in_matched[i]  = in_matched[i]  | base_dec[i][j];
        out_matched[j] = out_matched[j] | base_dec[i][j];
      end
    for (int j = 0; j < N; j++)
      for (int i = 0; i < N; i++)
        greq[j][i] = rq[i][j] && !in_matched[i] && !out_matched[j];
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        areq[i][j] = gnt[j][i];
  end

  for (genvar j = 0; j < N; j++) begin : g_grant
    logic          nr;
    logic [E-1:0]  p;
    rr_arbiter #(.N(N)) u_garb (
      .clk(clk), .rst_n(rst_n), .req(greq[j]), .update_en(g_upd[j]),
      .gnt(gnt[j]), .gnt_idx(g_idx[j]), .no_req(nr), .rpt(p)
    );
    // Grant accepted in the first iteration.
    assign g_upd[j] = first_iter && acc[g_idx[j]][j];
  end

  for (genvar i = 0; i < N; i++) begin : g_accept
    logic          nr;
    logic [E-1:0]  p, a_idx;
    rr_arbiter #(.N(N)) u_aarb (
      .clk(clk), .rst_n(rst_n), .req(areq[i]), .update_en(first_iter),
      .gnt(acc[i]), .gnt_idx(a_idx), .no_req(nr), .rpt(p)
    );
  end

  assign new_dec = base_dec | acc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      iter_q      <= '0;
      req_q       <= '0;
      dec_q       <= '0;
      match       <= '0;
      match_valid <= 1'b0;
      late_match  <= 1'b0;
    end else begin
      iter_q <= (32'(iter_q) == ITER - 1) ? '0 : iter_q + IW'(1);
      if (first_iter) req_q <= rq;
      dec_q       <= new_dec;
      match_valid <= (32'(iter_q) == ITER - 1);
      if (32'(iter_q) == ITER - 1) match <= new_dec;
      late_match  <= !first_iter && (acc != '0);
    end
  end

  // The decision register always holds a conflict-free match.
  for (genvar k = 0; k < N; k++) begin : g_chk
    logic [N-1:0] col;
    for (genvar m = 0; m < N; m++) begin : g_col
      assign col[m] = dec_q[m][k];
    end
    assert property (@(posedge clk) disable iff (!rst_n) $onehot0(dec_q[k]) && $onehot0(col));
  end

endmodule
