// tb_islip_fairness: fairness and starvation freedom of iSLIP under heavy
// load. A 16-port islip_switch runs with a single iteration per cell time.
// All 256 virtual output queues are first filled while the outputs are held,
// then kept backlogged (each input refills one non-full queue per cycle,
// round robin). Over a long window every (input, output) pair must be served
// (no starvation), and all pairs sharing an output must get the same share
// of it, within 5 % of the mean. The total rate must be one packet per port
// per cell time.
module tb_islip_fairness;
  import islip_pkg::*;
  localparam int N = 16, ITER = 1, DEPTH = 4;
  localparam int E = $clog2(N);
  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_valid, in_ready, out_valid, out_ready;
  packet_t in_pkt [N];
  packet_t out_pkt [N];
  logic [N-1:0][E-1:0] in_port;
  logic [N-1:0][N-1:0] in_space;
  logic busy, late_match;
  int checks = 0, failures = 0;
  int served [N][N];
  int rr [N];
  bit measure = 0;

  islip_switch #(.N(N), .ITER(ITER), .DEPTH(DEPTH)) dut (.clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_pkt(in_pkt), .in_port(in_port), .in_ready(in_ready), .in_space(in_space),
    .out_valid(out_valid), .out_pkt(out_pkt), .out_ready(out_ready), .busy(busy), .late_match(late_match));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && measure)
    for (int j = 0; j < N; j++)
      if (out_valid[j] && out_ready[j]) served[int'(out_pkt[j].data[31:24])][j]++;

  // Each input offers to the next queue (round robin) that has room.
  task automatic refill();
    for (int i = 0; i < N; i++) begin
      in_valid[i] = 1'b0;
      for (int k = 1; k <= N; k++) begin
        int j;
        j = (rr[i] + k) % N;
        if (!in_valid[i] && in_space[i][j]) begin
          in_valid[i] = 1'b1;
          in_port[i]  = E'(j);
          in_pkt[i]   = '0;
          in_pkt[i].data = {8'(i), 8'(j), 16'h0};
          rr[i] = j;
        end
      end
    end
  endtask

  initial begin
    int total, window;
    in_valid = '0; in_port = '0; out_ready = '0;
    foreach (in_pkt[i]) in_pkt[i] = '0;
    foreach (rr[i]) rr[i] = 0;
    foreach (served[i, j]) served[i][j] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // Fill every queue with the outputs held.
    for (int c = 0; c < N * DEPTH + 8; c++) begin
      refill(); @(negedge clk);
    end
    out_ready = '1;
    for (int c = 0; c < 200; c++) begin
      refill(); @(negedge clk);
    end
    measure = 1;
    window = 8000;
    for (int c = 0; c < window; c++) begin
      refill(); @(negedge clk);
    end
    measure = 0;
    total = 0;
    for (int j = 0; j < N; j++) begin
      int col, lo, hi;
      col = 0; lo = 1 << 30; hi = 0;
      for (int i = 0; i < N; i++) begin
        col += served[i][j];
        if (served[i][j] < lo) lo = served[i][j];
        if (served[i][j] > hi) hi = served[i][j];
      end
      total += col;
      checks++;
      if (lo == 0) failures++;                       // starvation
      checks++;
      if (real'(hi - lo) > 0.05 * real'(col) / N) begin
        failures++;
        $display("output %0d: shares %0d..%0d of %0d", j, lo, hi, col);
      end
    end
    $display("delivered %0d packets in %0d cycles (%0.3f per port per cell time)",
             total, window, real'(total) / real'(window * N / ITER));
    checks++;
    if (real'(total) < 0.98 * real'(window * N / ITER)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
