// tb_sync_fifo: self-checking testbench for the synchronous FIFO used as the
// primitive queue (triangles of three 5-bit entries, four deep).
// Random pushes and pops against a queue model: data order, full, empty and
// count are compared every cycle; pushes into a full FIFO are not issued.
// Pushing and popping in the same cycle, fill to full and drain to empty
// must each have happened.
module tb_sync_fifo;
  localparam int W = 15, D = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic push, pop, full, empty;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  int n_full = 0, n_both = 0, n_empty = 0;
  logic [W-1:0] model [$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; wr_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      // compare state
      checks += 3;
      if (count != model.size()) begin failures++; $display("FAIL count %0d vs %0d", count, model.size()); end
      if (full != (model.size() == D)) begin failures++; $display("FAIL full"); end
      if (empty != (model.size() == 0)) begin failures++; $display("FAIL empty"); end
      if (model.size() > 0) begin
        checks++;
        if (rd_data != model[0]) begin failures++; $display("FAIL data %h vs %h", rd_data, model[0]); end
      end
      if (full) n_full++;
      if (empty && t > 0) n_empty++;
      // next operation; bias changes every 200 cycles to reach full and empty
      push = !full && ($urandom_range(0, 99) < ((t / 200) % 2 ? 30 : 70));
      pop  = !empty && ($urandom_range(0, 99) < ((t / 200) % 2 ? 70 : 30));
      wr_data = W'($urandom);
      if (push && pop) n_both++;
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(wr_data);
    end
    checks += 3;
    if (n_full == 0)  begin failures++; $display("FAIL never full"); end
    if (n_empty == 0) begin failures++; $display("FAIL never empty"); end
    if (n_both == 0)  begin failures++; $display("FAIL never push and pop together"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
