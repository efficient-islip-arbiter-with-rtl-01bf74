// tb_islip_scheduler: runs the scheduler at its default size (16 x 16,
// 4 iterations) against an independent iSLIP model written here:
// request / grant (round robin from the grant pointer) / accept (round robin
// from the accept pointer), only unmatched ports in later iterations,
// pointers moved in the first iteration only (grant pointers only when
// accepted). Checks every decision, that it arrives ITER cycles after the
// requests are sampled, that later iterations add matches, and that under
// full uniform load the pointers desynchronise so every cell gets a full
// 16-way match (100% throughput).
module tb_islip_scheduler;
  localparam int N = 16, ITER = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0][N-1:0] req, match;
  logic [N-1:0] out_free;
  logic match_valid, first_iter, late_match;
  int checks = 0, failures = 0;
  int gp [N], ap [N];
  logic [N-1:0][N-1:0] exp_q [$];
  int cyc = 0, sample_cyc [$];
  int late_seen = 0, model_late = 0, full_cells = 0;
  bit full_load = 0;

  islip_scheduler #(.N(N), .ITER(ITER)) dut (.clk(clk), .rst_n(rst_n), .req(req), .out_free(out_free),
    .match(match), .match_valid(match_valid), .first_iter(first_iter), .late_match(late_match));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0][N-1:0] model(input logic [N-1:0][N-1:0] r);
    logic [N-1:0][N-1:0] m;
    logic [N-1:0] im, om;
    m = '0; im = '0; om = '0;
    for (int it = 0; it < ITER; it++) begin
      int g [N];   // input granted by output j, or -1
      int added;
      added = 0;
      for (int j = 0; j < N; j++) begin
        g[j] = -1;
        if (!om[j])
          for (int k = 0; k < N; k++) begin
            int i;
            i = (gp[j] + k) % N;
            if (g[j] < 0 && r[i][j] && !im[i]) g[j] = i;
          end
      end
      for (int i = 0; i < N; i++) begin
        int a;
        a = -1;
        for (int k = 0; k < N; k++) begin
          int j;
          j = (ap[i] + k) % N;
          if (a < 0 && g[j] == i) a = j;
        end
        if (a >= 0) begin
          m[i][a] = 1'b1;
          added++;
          if (it == 0) begin
            ap[i] = (a + 1) % N;
            gp[a] = (i + 1) % N;
          end
        end
      end
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          if (m[i][j]) begin im[i] = 1; om[j] = 1; end
      if (it > 0 && added > 0) model_late++;
    end
    return m;
  endfunction

  initial begin
    foreach (gp[i]) begin gp[i] = 0; ap[i] = 0; end
    req = '0; out_free = '1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000 * ITER; c++) begin
      full_load = (c >= 2000 * ITER);
      if (first_iter) begin
        logic [N-1:0][N-1:0] rq;
        for (int i = 0; i < N; i++) begin
          req[i] = N'($urandom) & (($urandom_range(1) == 0) ? N'($urandom) : '1);
          if ($urandom_range(4) == 0) req[i] = '0;
        end
        out_free = N'($urandom) | N'($urandom) | N'($urandom);
        if (full_load) begin req = '1; out_free = '1; end
        for (int i = 0; i < N; i++) rq[i] = req[i] & out_free;
        exp_q.push_back(model(rq));
        sample_cyc.push_back(cyc);
      end else begin
        req = {N*N{1'b1}} ^ req;   // later iterations must ignore the live inputs
        out_free = ~out_free;
      end
      #1;
      if (match_valid) begin
        logic [N-1:0][N-1:0] e;
        int s, n;
        e = exp_q.pop_front();
        s = sample_cyc.pop_front();
        checks++;
        if (match != e) begin
          failures++;
          if (failures < 4) $display("cell mismatch at cycle %0d", cyc);
        end
        checks++;
        if (cyc - s != ITER) failures++;
        n = 0;
        for (int i = 0; i < N; i++) n += $countones(match[i]);
        if (full_load && c >= 2100 * ITER) begin
          checks++;
          if (n != N) failures++;
          else full_cells++;
        end
      end
      if (late_match) late_seen++;
      @(negedge clk);
    end
    checks++;
    if (late_seen == 0 || model_late == 0) failures++;
    checks++;
    if (full_cells == 0) failures++;
    $display("late-iteration matches: %0d, full 16-way cells: %0d", late_seen, full_cells);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
