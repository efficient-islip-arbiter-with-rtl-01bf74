// tb_islip_convergence: with as many iterations as ports (ITER = N = 8), iSLIP
// must always end in a maximal match: no unmatched input is left with a
// request to an unmatched output, and only requested pairs may be matched.
module tb_islip_convergence;
  localparam int N = 8, ITER = 8;
  logic clk = 0, rst_n = 0;
  logic [N-1:0][N-1:0] req, rq, match;
  logic [N-1:0] out_free;
  logic match_valid, first_iter, late_match;
  int checks = 0, failures = 0, cells = 0;

  islip_scheduler #(.N(N), .ITER(ITER)) dut (.clk(clk), .rst_n(rst_n), .req(req), .out_free(out_free),
    .match(match), .match_valid(match_valid), .first_iter(first_iter), .late_match(late_match));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; out_free = '1; rq = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000 * ITER; c++) begin
      #1;
      if (match_valid) begin
        logic [N-1:0] im, om;
        bit maximal;
        im = '0; om = '0;
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++)
            if (match[i][j]) begin im[i] = 1; om[j] = 1; end
        maximal = 1;
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++)
            if (rq[i][j] && !im[i] && !om[j]) maximal = 0;
        checks++;
        if (!maximal) failures++;
        for (int i = 0; i < N; i++) begin
          checks++;
          if ((match[i] & ~rq[i]) != '0) failures++;  // only requested pairs
        end
        cells++;
      end
      if (first_iter) begin
        for (int i = 0; i < N; i++) req[i] = N'($urandom) & N'($urandom) & N'($urandom | $urandom);
        out_free = N'($urandom) | N'($urandom) | N'($urandom);
        for (int i = 0; i < N; i++) rq[i] = req[i] & out_free;
      end
      @(negedge clk);
    end
    $display("cells=%0d, all maximal: %0d", cells, failures == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
