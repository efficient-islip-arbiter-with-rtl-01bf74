// tb_voq_fifo: random push/pop traffic against a queue model; checks the
// head, full/empty, count, and that a full queue refuses further writes.
module tb_voq_fifo;
  import islip_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic push, pop, full, empty;
  packet_t din, dout;
  logic [$clog2(DEPTH+1)-1:0] count;
  packet_t model [$];
  int checks = 0, failures = 0, full_seen = 0;

  voq_fifo #(.DEPTH(DEPTH)) dut (.clk(clk), .rst_n(rst_n), .push(push), .din(din), .pop(pop),
    .dout(dout), .full(full), .empty(empty), .count(count));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      checks++;
      if (int'(count) != model.size() || empty != (model.size() == 0) || full != (model.size() == DEPTH))
        failures++;
      if (model.size() > 0) begin
        checks++;
        if (dout != model[0]) failures++;
      end
      if (full) full_seen++;
      // Phases favour filling, then draining.
      din  = {16'($urandom), $urandom};
      push = ((c / 200) % 2 == 0) ? ($urandom_range(3) != 0) : ($urandom_range(3) == 0);
      pop  = ((c / 200) % 2 == 0) ? ($urandom_range(3) == 0) : ($urandom_range(3) != 0);
      if (empty) pop = 0;
      @(posedge clk);
      begin
        bit accept;
        accept = push && model.size() < DEPTH;
        if (pop) void'(model.pop_front());
        if (accept) model.push_back(din);
      end
    end
    checks++;
    if (full_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
