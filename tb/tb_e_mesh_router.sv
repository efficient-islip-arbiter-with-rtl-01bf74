// tb_e_mesh_router: end-to-end test of the whole network at its default size
// (9 input ports, 8 x 8 mesh, 4 iterations, 4-deep queues).
//  1. Two requesting ports (3 and 4, counted from 1) are granted in turn,
//     one per clock: 3, 4, 3, 4, 3.
//  2. Port 4 sends from node (2,3) to node (6,7) and port 2 from (0,0) to
//     (4,4). Each packet must arrive only at its destination, and out_mesh
//     must show its data at every node of the x-then-y path and nowhere else.
//  3. Heavy random traffic from all nine ports (a third of it from node
//     (0,0), half of it to one column), with random ejection
//     back-pressure: every packet arrives once, at its destination, in order
//     per (source, destination) pair, and processing falls when all is done.
// Counted mechanisms, each of which must occur: a port held back because its
// source router had no room, a router input refusing a packet from a
// neighbour (full queue), a match found in a later iSLIP iteration, and an
// ejection stalled by back-pressure.
module tb_e_mesh_router;
  import islip_pkg::*;
  localparam int NUM_IN = 9, MX = 8, MY = 8;
  logic clk = 0, reset = 1;
  packet_t input_port [NUM_IN];
  logic [NUM_IN-1:0] grant;
  logic processing, late_match;
  logic [31:0] out_mesh [MX][MY];
  logic eject_valid [MX][MY];
  packet_t eject_pkt [MX][MY];
  logic eject_ready [MX][MY];
  int checks = 0, failures = 0, cyc = 0;
  int sent = 0, delivered = 0;
  int n_port_hold = 0, n_link_stall = 0, n_late = 0, n_eject_stall = 0;
  int exp_q [64][64][$];        // data words per (source, destination)
  bit randomize_ready = 0;

  e_mesh_router dut (.clk(clk), .reset(reset), .input_port(input_port), .grant(grant),
    .processing(processing), .out_mesh(out_mesh), .eject_valid(eject_valid),
    .eject_pkt(eject_pkt), .eject_ready(eject_ready), .late_match(late_match));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Ejection scoreboard and mechanism counters.
  always @(posedge clk) if (!reset) begin
    for (int x = 0; x < MX; x++)
      for (int y = 0; y < MY; y++) begin
        if (eject_valid[x][y] && eject_ready[x][y]) begin
          int s, d;
          s = int'(eject_pkt[x][y].src);
          d = int'(eject_pkt[x][y].dst);
          checks++;
          if (d != x * 8 + y || exp_q[s][d].size() == 0 || exp_q[s][d][0] != eject_pkt[x][y].data) begin
            failures++;
            if (failures < 5) $display("bad ejection at (%0d,%0d) src=%0d dst=%0d", x, y, s, d);
          end else void'(exp_q[s][d].pop_front());
          delivered++;
        end
        if (eject_valid[x][y] && !eject_ready[x][y]) n_eject_stall++;
        for (int p = 1; p < NUM_PORTS; p++)
          if (dut.r_in_valid[x][y][p] && !dut.r_in_ready[x][y][p]) n_link_stall++;
      end
    for (int k = 0; k < NUM_IN; k++)
      if (input_port[k].r && !dut.port_ready[k]) n_port_hold++;
    if (late_match) n_late++;
  end

  always @(negedge clk)
    for (int x = 0; x < MX; x++)
      for (int y = 0; y < MY; y++)
        eject_ready[x][y] = randomize_ready ? ($urandom_range(3) != 0) : 1'b1;

  function automatic packet_t mk(int sx, int sy, int dx, int dy, logic [31:0] data);
    packet_t p;
    p = '0;
    p.r = 1'b1;
    p.src = '{x: 3'(sx), y: 3'(sy)};
    p.dst = '{x: 3'(dx), y: 3'(dy)};
    p.data = data;
    return p;
  endfunction

  // Send one packet on port k and wait for its grant.
  task automatic send_one(int k, packet_t p);
    input_port[k] = p;
    forever begin
      #1;
      if (grant[k]) break;
      @(negedge clk);
    end
    exp_q[int'(p.src)][int'(p.dst)].push_back(p.data);
    sent++;
    @(negedge clk);
    input_port[k].r = 1'b0;
  endtask

  task automatic wait_idle(int limit);
    int t0;
    t0 = cyc;
    while ((processing || delivered != sent) && cyc - t0 < limit) @(negedge clk);
  endtask

  // Is (x,y) on the x-then-y path from (sx,sy) to (dx,dy)?
  function automatic bit on_path(int sx, int sy, int dx, int dy, int x, int y);
    if (y == sy && ((x >= sx && x <= dx) || (x <= sx && x >= dx))) return 1;
    if (x == dx && ((y >= sy && y <= dy) || (y <= sy && y >= dy))) return 1;
    return 0;
  endfunction

  task automatic path_test(int k, int sx, int sy, int dx, int dy, logic [31:0] data);
    send_one(k, mk(sx, sy, dx, dy, data));
    wait_idle(2000);
    for (int x = 0; x < MX; x++)
      for (int y = 0; y < MY; y++) begin
        checks++;
        if ((out_mesh[x][y] == data) != on_path(sx, sy, dx, dy, x, y)) begin
          failures++;
          $display("out_mesh(%0d)(%0d)=%h, on path %0d", x, y, out_mesh[x][y], on_path(sx, sy, dx, dy, x, y));
        end
      end
    checks++;
    if (processing) failures++;
  endtask

  initial begin
    int lat0;
    foreach (input_port[k]) input_port[k] = '0;
    repeat (4) @(posedge clk);
    @(negedge clk);
    reset = 0;
    @(negedge clk);

    // 1. Ports 3 and 4 requesting: grants alternate, one per clock.
    begin
      automatic int order [5] = '{3, 4, 3, 4, 3};
      int cnt3, cnt4;
      for (int c = 0; c < 5; c++) begin
        input_port[2] = mk(1, 1, 1, 2, 32'h3000_0000 + c);
        input_port[3] = mk(5, 5, 5, 6, 32'h4000_0000 + c);
        #1;
        checks++;
        if (grant != NUM_IN'(1 << (order[c] - 1))) begin
          failures++;
          $display("cycle %0d grant=%b expected port %0d", c, grant, order[c]);
        end
        if (grant[2]) begin exp_q[int'(input_port[2].src)][int'(input_port[2].dst)].push_back(input_port[2].data); sent++; end
        if (grant[3]) begin exp_q[int'(input_port[3].src)][int'(input_port[3].dst)].push_back(input_port[3].data); sent++; end
        @(negedge clk);
      end
      input_port[2].r = 0; input_port[3].r = 0;
      wait_idle(2000);
    end

    // 2. The two example transfers.
    lat0 = cyc;
    path_test(3, 2, 3, 6, 7, 32'hCAFE_0001);
    $display("(2,3)->(6,7) done after %0d cycles", cyc - lat0);
    path_test(1, 0, 0, 4, 4, 32'hCAFE_0002);

    // 3. Heavy random traffic from all ports.
    randomize_ready = 1;
    begin
      int left [NUM_IN];
      int hot;
      foreach (left[k]) left[k] = 300;
      hot = 0;
      for (int c = 0; c < 200000; c++) begin
        bit any_left;
        any_left = 0;
        for (int k = 0; k < NUM_IN; k++) begin
          if (!input_port[k].r && left[k] > 0) begin
            int sx, sy, dx, dy;
            // Half of the traffic converges on one hot column to load links.
            // A third of it starts at node (0,0), so that its local queues fill.
            sx = $urandom_range(7); sy = $urandom_range(7);
            if ($urandom_range(2) == 0) begin sx = 0; sy = 0; end
            dx = ($urandom_range(1) == 0) ? hot : $urandom_range(7);
            dy = $urandom_range(7);
            input_port[k] = mk(sx, sy, dx, dy, $urandom);
            left[k]--;
          end
          if (left[k] > 0 || input_port[k].r) any_left = 1;
        end
        #1;
        begin
          logic [NUM_IN-1:0] g;
          g = grant;
          for (int k = 0; k < NUM_IN; k++)
            if (g[k]) begin
              exp_q[int'(input_port[k].src)][int'(input_port[k].dst)].push_back(input_port[k].data);
              sent++;
            end
          @(negedge clk);
          for (int k = 0; k < NUM_IN; k++) if (g[k]) input_port[k].r = 1'b0;
        end
        if (!any_left) break;
      end
    end
    randomize_ready = 0;
    wait_idle(20000);
    for (int s = 0; s < 64; s++)
      for (int d = 0; d < 64; d++)
        if (exp_q[s][d].size() != 0) begin
          checks++; failures++;
        end
    checks++;
    if (sent != delivered || processing) begin
      failures++;
      $display("sent=%0d delivered=%0d processing=%0d", sent, delivered, processing);
    end
    $display("sent=%0d delivered=%0d port_hold=%0d link_stall=%0d late_match=%0d eject_stall=%0d",
             sent, delivered, n_port_hold, n_link_stall, n_late, n_eject_stall);
    checks++; if (n_port_hold == 0) failures++;
    checks++; if (n_link_stall == 0) failures++;
    checks++; if (n_late == 0) failures++;
    checks++; if (n_eject_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
