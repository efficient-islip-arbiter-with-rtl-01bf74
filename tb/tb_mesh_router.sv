// tb_mesh_router: one router at node (3, 4) with random packets on all five
// inputs and random back-pressure on all five outputs. Every packet must
// leave through the port that the x-then-y rule gives for its destination
// (worked out here independently), exactly once, in order per input/output
// pair; local_space must match the local input's queue room.
module tb_mesh_router;
  import islip_pkg::*;
  localparam int X = 3, Y = 4, NP = 5;
  logic clk = 0, rst_n = 0;
  logic [NP-1:0] in_valid, in_ready, out_valid, out_ready, local_space;
  packet_t in_pkt [NP];
  packet_t out_pkt [NP];
  logic busy, late_match;
  int checks = 0, failures = 0, sent = 0, delivered = 0, stalls = 0;
  int exp_q [NP][NP][$];
  int seq [NP];
  int per_port [NP];

  mesh_router #(.X(X), .Y(Y)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_pkt(in_pkt),
    .in_ready(in_ready), .out_valid(out_valid), .out_pkt(out_pkt), .out_ready(out_ready),
    .local_space(local_space), .busy(busy), .late_match(late_match));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int exp_port(int dx, int dy);
    if (dx > X) return 1;
    if (dx < X) return 2;
    if (dy > Y) return 3;
    if (dy < Y) return 4;
    return 0;
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < NP; o++)
      if (out_valid[o] && out_ready[o]) begin
        int i, s, ep;
        i = int'(out_pkt[o].data[31:24]);
        s = int'(out_pkt[o].data[15:0]);
        ep = exp_port(int'(out_pkt[o].dst.x), int'(out_pkt[o].dst.y));
        checks++;
        if (ep != o || i >= NP || exp_q[i][o].size() == 0 || exp_q[i][o][0] != s) begin
          failures++;
          if (failures < 5) $display("bad delivery port %0d from %0d seq %0d", o, i, s);
        end else void'(exp_q[i][o].pop_front());
        delivered++;
        per_port[o]++;
      end
  end

  initial begin
    in_valid = '0; out_ready = '1;
    foreach (in_pkt[i]) in_pkt[i] = '0;
    foreach (seq[i]) begin seq[i] = 0; per_port[i] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 8000; c++) begin
      out_ready = (c < 6000) ? (NP'($urandom) | NP'($urandom)) : '1;
      for (int i = 0; i < NP; i++) begin
        in_valid[i] = (c < 6000) && ($urandom_range(2) == 0);
        in_pkt[i] = '0;
        in_pkt[i].dst = node_addr_t'($urandom_range(63));
        in_pkt[i].src = node_addr_t'($urandom_range(63));
        in_pkt[i].data = {8'(i), 8'h0, 16'(seq[i])};
      end
      #1;
      // local_space reflects the local input's queue room, per output.
      checks++;
      if (local_space != dut.u_sw.in_space[0]) failures++;
      for (int i = 0; i < NP; i++)
        if (in_valid[i]) begin
          if (in_ready[i]) begin
            exp_q[i][exp_port(int'(in_pkt[i].dst.x), int'(in_pkt[i].dst.y))].push_back(seq[i]);
            seq[i]++; sent++;
          end else stalls++;
        end
      @(negedge clk);
    end
    for (int i = 0; i < NP; i++)
      for (int o = 0; o < NP; o++) begin
        checks++;
        if (exp_q[i][o].size() != 0) failures++;
      end
    checks++;
    if (sent != delivered || busy || stalls == 0) failures++;
    for (int o = 0; o < NP; o++) begin
      checks++;
      if (per_port[o] == 0) failures++;
    end
    $display("sent=%0d delivered=%0d stalls=%0d", sent, delivered, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
