// tb_rr_arbiter: checks the generic round-robin arbiter against a reference
// pointer model: grant = first request at or after RPT (circularly), RPT moves
// to grant+1 mod N after a grant when update_en is high, and stays otherwise.
// Also checks fairness: with all N inputs requesting, each is granted once in
// every N cycles.
module tb_rr_arbiter;
  localparam int N = 8;
  localparam int E = $clog2(N);
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt;
  logic update_en, no_req;
  logic [E-1:0] gnt_idx, rpt;
  int checks = 0, failures = 0;
  int model_ptr;

  rr_arbiter #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .req(req), .update_en(update_en),
                           .gnt(gnt), .gnt_idx(gnt_idx), .no_req(no_req), .rpt(rpt));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_cycle();
    int exp_idx;
    exp_idx = -1;
    for (int k = 0; k < N; k++) begin
      int c;
      c = (model_ptr + k) % N;
      if (exp_idx < 0 && req[c]) exp_idx = c;
    end
    checks++;
    if (int'(rpt) != model_ptr) failures++;
    checks++;
    if (exp_idx < 0) begin
      if (!no_req || gnt != '0) failures++;
    end else if (no_req || gnt != N'(1 << exp_idx) || int'(gnt_idx) != exp_idx) begin
      failures++;
      if (failures < 5) $display("rr mismatch req=%b ptr=%0d gnt=%b exp=%0d", req, model_ptr, gnt, exp_idx);
    end
    if (update_en && exp_idx >= 0) model_ptr = (exp_idx + 1) % N;
  endtask

  initial begin
    int seen [N];
    req = '0; update_en = 1;
    model_ptr = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // Fairness: all requesting, each granted once per N cycles.
    req = '1;
    foreach (seen[i]) seen[i] = 0;
    for (int c = 0; c < 2 * N; c++) begin
      #1;
      check_cycle();
      seen[gnt_idx]++;
      @(negedge clk);
    end
    foreach (seen[i]) begin
      checks++;
      if (seen[i] != 2) failures++;
    end
    // Random requests and update enables.
    for (int c = 0; c < 3000; c++) begin
      req = N'($urandom) & N'($urandom);
      update_en = ($urandom_range(3) != 0);
      #1;
      check_cycle();
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
