// tb_islip_switch: end-to-end check of the N x N VOQ switch at its default
// size (16 ports, 4 iterations, 4-deep queues).
//  1. Latency: one packet into an idle switch appears at its output within
//     two cell times.
//  2. No head-of-line blocking: with output 1 stalled, a packet queued at
//     input 0 behind packets for output 1 still reaches output 2.
//  3. Random traffic with random output back-pressure: every packet arrives
//     once, at the right output, in order per input/output pair; full queues
//     refuse packets (in_ready low).
//  4. Saturation: every input always has cells for every output; the switch
//     must deliver close to N packets per cell time (ITER cycles).
module tb_islip_switch;
  import islip_pkg::*;
  localparam int N = 16, ITER = 4, DEPTH = 4;
  localparam int E = $clog2(N);
  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_valid, in_ready, out_valid, out_ready;
  packet_t in_pkt [N];
  packet_t out_pkt [N];
  logic [N-1:0][E-1:0] in_port;
  logic [N-1:0][N-1:0] in_space;
  logic busy, late_match;
  int checks = 0, failures = 0;
  int exp_q [N][N][$];          // sequence numbers per (input, output)
  int seq [N];
  int delivered = 0, sent = 0, stalls = 0, late = 0, cyc = 0;
  bit check_on = 1;

  islip_switch #(.N(N), .ITER(ITER), .DEPTH(DEPTH)) dut (.clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_pkt(in_pkt), .in_port(in_port), .in_ready(in_ready), .in_space(in_space),
    .out_valid(out_valid), .out_pkt(out_pkt), .out_ready(out_ready), .busy(busy), .late_match(late_match));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // data = {input[7:0], output[7:0], seq[15:0]}
  function automatic packet_t mk(int i, int j, int s);
    packet_t p;
    p = '0;
    p.r = 1'b1;
    p.data = {8'(i), 8'(j), 16'(s)};
    return p;
  endfunction

  // Scoreboard on every output handshake.
  always @(posedge clk) if (rst_n && check_on) begin
    for (int j = 0; j < N; j++)
      if (out_valid[j] && out_ready[j]) begin
        int i, oj, s;
        i = int'(out_pkt[j].data[31:24]); oj = int'(out_pkt[j].data[23:16]); s = int'(out_pkt[j].data[15:0]);
        checks++;
        if (oj != j || i >= N || exp_q[i][j].size() == 0 || exp_q[i][j][0] != s) begin
          failures++;
          if (failures < 5) $display("bad delivery out=%0d in=%0d seq=%0d", j, i, s);
        end else void'(exp_q[i][j].pop_front());
        delivered++;
      end
    if (late_match) late++;
  end

  task automatic offer(int i, int j);
    in_valid[i] = 1; in_port[i] = E'(j); in_pkt[i] = mk(i, j, seq[i]);
  endtask

  // Commit the offers that were accepted at the coming edge.
  task automatic step();
    #1;
    for (int i = 0; i < N; i++)
      if (in_valid[i]) begin
        if (in_ready[i]) begin
          exp_q[i][in_port[i]].push_back(seq[i]);
          seq[i]++; sent++;
        end else stalls++;
      end
    @(negedge clk);
    in_valid = '0;
  endtask

  initial begin
    int t0, lat, d0;
    bit blocked_ok;
    in_valid = '0; out_ready = '1; in_port = '0;
    foreach (in_pkt[i]) in_pkt[i] = '0;
    foreach (seq[i]) seq[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // 1. Latency of one packet.
    offer(3, 7);
    t0 = cyc;
    step();
    while (!out_valid[7] && cyc - t0 < 100) @(negedge clk);
    lat = cyc - t0;
    checks++;
    if (!out_valid[7] || lat > 2 * ITER + 1) failures++;
    $display("single-packet latency: %0d cycles", lat);
    repeat (3) @(negedge clk);

    // 2. Head-of-line: output 1 stalled, input 0 queues two for 1 then one for 2.
    out_ready[1] = 0;
    offer(0, 1); step();
    offer(0, 1); step();
    offer(0, 2); step();
    d0 = 0; blocked_ok = 0;
    for (int c = 0; c < 6 * ITER; c++) begin
      if (out_valid[2] && out_pkt[2].data[31:24] == 0) blocked_ok = 1;
      @(negedge clk);
    end
    checks++;
    if (!blocked_ok) failures++;
    out_ready[1] = 1;
    repeat (8 * ITER) @(negedge clk);

    // 3. Random traffic with back-pressure.
    for (int c = 0; c < 6000; c++) begin
      out_ready = N'($urandom) | N'($urandom);
      for (int i = 0; i < N; i++)
        if ($urandom_range(3) == 0) offer(i, $urandom_range(N-1));
      step();
    end
    out_ready = '1;
    repeat (300 * ITER) @(negedge clk);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        checks++;
        if (exp_q[i][j].size() != 0) failures++;
      end
    checks++;
    if (delivered != sent || busy) failures++;
    checks++;
    if (stalls == 0 || late == 0) failures++;
    $display("random phase: sent=%0d delivered=%0d stalls=%0d late-iteration matches=%0d", sent, delivered, stalls, late);

    // 4. Saturation throughput.
    begin
      int d_start, cycles;
      cycles = 400 * ITER;
      for (int c = 0; c < cycles + 40 * ITER; c++) begin
        if (c == 40 * ITER) d_start = delivered;
        for (int i = 0; i < N; i++) offer(i, (seq[i] + i) % N);
        step();
      end
      begin
        real rate;
        rate = real'(delivered - d_start) / real'(cycles / ITER);
        $display("saturation: %0.2f packets per cell time (N=%0d)", rate, N);
        checks++;
        if (rate < 0.9 * N) failures++;
      end
    end
    check_on = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
