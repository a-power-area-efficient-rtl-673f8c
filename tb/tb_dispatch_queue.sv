// tb_dispatch_queue: self-checking testbench for the double-buffered
// dispatch queue (two buffers of six entries).
// A random producer and a random consumer exchange entries; the popped
// sequence must equal the pushed sequence, everything pushed must be
// delivered once the producer stops (liveness), and idle must be high
// exactly when nothing is stored. Counted mechanisms that must occur:
// hand-over of a full buffer, hand-over of a partly filled buffer when the
// producer pauses, and a push and a pop in the same cycle (the two buffers
// working at once).
module tb_dispatch_queue;
  import ge_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic push, push_ready, pop, pop_valid, idle;
  ent_t push_data, pop_data;
  int checks = 0, failures = 0;
  int n_full_hand = 0, n_part_hand = 0, n_both = 0;
  ent_t model [$];

  dispatch_queue #(.DEPTH(6)) dut (.*);

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // hand-over monitor
  always @(posedge clk) if (rst_n && dut.hand) begin
    if (dut.cnt[dut.wsel] == 3'd5 && push) n_full_hand++;
    else n_part_hand++;
  end

  initial begin
    int pushed = 0, popped = 0, t = 0;
    push = 0; pop = 0; push_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (t < 4000 || model.size() > 0) begin
      @(negedge clk);
      if (pop_valid) begin
        checks++;
        if (model.size() == 0 || pop_data != model[0]) begin
          failures++;
          $display("FAIL pop data %0d", pop_data);
        end
      end
      checks++;
      if (idle != (model.size() == 0)) begin failures++; $display("FAIL idle at %0d", t); end
      push = (t < 4000) && ($urandom_range(0, 99) < ((t / 300) % 2 ? 90 : 40));
      pop  = $urandom_range(0, 99) < 60;
      push_data = ent_t'($urandom);
      if (push && push_ready && pop && pop_valid) n_both++;
      @(posedge clk);
      if (pop && pop_valid) begin void'(model.pop_front()); popped++; end
      if (push && push_ready) begin model.push_back(push_data); pushed++; end
      t++;
      if (t > 6000) break;
    end
    checks += 4;
    if (model.size() != 0) begin failures++; $display("FAIL %0d entries never delivered", model.size()); end
    if (n_full_hand == 0) begin failures++; $display("FAIL no full hand-over"); end
    if (n_part_hand == 0) begin failures++; $display("FAIL no partial hand-over"); end
    if (n_both == 0)      begin failures++; $display("FAIL no concurrent push and pop"); end
    $display("pushed %0d popped %0d full %0d partial %0d both %0d", pushed, popped, n_full_hand, n_part_hand, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
