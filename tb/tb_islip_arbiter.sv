// tb_islip_arbiter: reproduces the grant sequence of the two-requester case
// (ports 3 and 4, counted from 1, requesting: grants 3, 4, 3, 4, 3), then
// checks random request patterns against a round-robin reference, that a
// not-ready port is never granted, and that the granted packet is passed on.
module tb_islip_arbiter;
  import islip_pkg::*;
  localparam int NUM_IN = 9;
  localparam int E = $clog2(NUM_IN);
  logic clk = 0, rst_n = 0;
  packet_t in_pkt [NUM_IN];
  logic [NUM_IN-1:0] in_ready, grant;
  logic gnt_valid;
  logic [E-1:0] gnt_idx;
  packet_t gnt_pkt;
  int checks = 0, failures = 0;
  int model_ptr = 0;

  islip_arbiter #(.NUM_IN(NUM_IN)) dut (.clk(clk), .rst_n(rst_n), .in_pkt(in_pkt), .in_ready(in_ready),
    .grant(grant), .gnt_valid(gnt_valid), .gnt_idx(gnt_idx), .gnt_pkt(gnt_pkt));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_grant();
    for (int k = 0; k < NUM_IN; k++) begin
      int c;
      c = (model_ptr + k) % NUM_IN;
      if (in_pkt[c].r && in_ready[c]) return c;
    end
    return -1;
  endfunction

  task automatic check_cycle();
    int e;
    e = ref_grant();
    checks++;
    if (e < 0) begin
      if (gnt_valid || grant != '0) failures++;
    end else begin
      if (!gnt_valid || grant != NUM_IN'(1 << e) || gnt_pkt != in_pkt[e]) begin
        failures++;
        if (failures < 5) $display("arb mismatch exp=%0d grant=%b", e, grant);
      end
      model_ptr = (e + 1) % NUM_IN;
    end
  endtask

  initial begin
    automatic int table1 [5] = '{3, 4, 3, 4, 3};
    for (int i = 0; i < NUM_IN; i++) begin
      in_pkt[i] = '0;
      in_pkt[i].data = 32'(i * 1000);
    end
    in_ready = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    in_pkt[2].r = 1; in_pkt[3].r = 1;
    for (int c = 0; c < 5; c++) begin
      #1;
      checks++;
      if (grant != NUM_IN'(1 << (table1[c] - 1))) begin
        failures++;
        $display("sequence cycle %0d: grant=%b expected port %0d", c, grant, table1[c]);
      end
      check_cycle();
      @(negedge clk);
    end
    for (int c = 0; c < 3000; c++) begin
      for (int i = 0; i < NUM_IN; i++) begin
        in_pkt[i].r = ($urandom_range(2) == 0);
        in_pkt[i].data = $urandom;
      end
      in_ready = NUM_IN'($urandom) | NUM_IN'($urandom);
      #1;
      check_cycle();
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
