// tb_crossbar: random permutations (partial matches) drive the crossbar;
// each output must carry exactly the packet of the input connected to it.
module tb_crossbar;
  import islip_pkg::*;
  localparam int N = 16;
  logic [N-1:0][N-1:0] conn;
  logic [N-1:0] in_valid, out_valid;
  packet_t in_pkt [N];
  packet_t out_pkt [N];
  int checks = 0, failures = 0;

  crossbar #(.N(N)) dut (.conn(conn), .in_valid(in_valid), .in_pkt(in_pkt),
                         .out_valid(out_valid), .out_pkt(out_pkt));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      int perm [N];
      int src_of [N];
      foreach (perm[i]) perm[i] = i;
      perm.shuffle();
      conn = '0;
      foreach (src_of[j]) src_of[j] = -1;
      for (int i = 0; i < N; i++) begin
        in_pkt[i] = {16'($urandom), $urandom};
        in_valid[i] = ($urandom_range(3) != 0);
        if ($urandom_range(3) != 0) begin
          conn[i][perm[i]] = 1'b1;
          src_of[perm[i]] = i;
        end
      end
      #1;
      for (int j = 0; j < N; j++) begin
        checks++;
        if (src_of[j] >= 0 && in_valid[src_of[j]]) begin
          if (!out_valid[j] || out_pkt[j] != in_pkt[src_of[j]]) failures++;
        end else if (out_valid[j]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
