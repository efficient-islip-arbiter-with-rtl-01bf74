// tb_input_block: packets tagged with random destination outputs are written
// into the VOQs and dequeued in random order; per-output order is checked
// against a model, as are the request vector (which must leave out a cell
// being dequeued in this cycle when it is the last one), space and in_ready.
module tb_input_block;
  import islip_pkg::*;
  localparam int N = 4, DEPTH = 3;
  localparam int E = $clog2(N);
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, deq_valid, busy;
  packet_t in_pkt, deq_pkt;
  logic [E-1:0] in_port, deq_port;
  logic [N-1:0] space, req;
  packet_t model [N][$];
  int checks = 0, failures = 0, stalls = 0;

  input_block #(.N(N), .DEPTH(DEPTH)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_pkt(in_pkt),
    .in_port(in_port), .in_ready(in_ready), .space(space), .req(req), .busy(busy),
    .deq_valid(deq_valid), .deq_port(deq_port), .deq_pkt(deq_pkt));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; deq_valid = 0; in_pkt = '0; in_port = '0; deq_port = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      logic do_in, do_deq;
      @(negedge clk);
      in_pkt   = {16'($urandom), $urandom};
      in_port  = E'($urandom_range(N-1));
      deq_port = E'($urandom_range(N-1));
      in_valid = ($urandom_range(1) == 0);
      deq_valid = (model[deq_port].size() > 0) && ($urandom_range(2) == 0);
      #1;
      for (int j = 0; j < N; j++) begin
        int left;
        left = model[j].size() - ((deq_valid && int'(deq_port) == j) ? 1 : 0);
        checks++;
        if (req[j] != (left > 0) || space[j] != (model[j].size() < DEPTH)) failures++;
      end
      checks++;
      if (in_ready != (model[in_port].size() < DEPTH)) failures++;
      checks++;
      if (busy != (model[0].size() + model[1].size() + model[2].size() + model[3].size() > 0)) failures++;
      if (deq_valid) begin
        checks++;
        if (deq_pkt != model[deq_port][0]) failures++;
      end
      do_in  = in_valid && in_ready;
      do_deq = deq_valid;
      if (in_valid && !in_ready) stalls++;
      @(posedge clk);
      if (do_deq) void'(model[deq_port].pop_front());
      if (do_in) model[in_port].push_back(in_pkt);
    end
    checks++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
