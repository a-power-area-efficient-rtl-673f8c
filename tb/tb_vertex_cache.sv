// tb_vertex_cache: self-checking testbench for the vertex cache data array.
// First writes every word of every entry (so nothing unwritten is read),
// then runs random cycles with three write ports and three read ports
// against an array model: reads are combinational and see the data written
// at the previous clock edge; same-word collisions are resolved in favour of
// the highest-numbered port. Out-of-range word addresses read zero.
module tb_vertex_cache;
  import ge_pkg::*;
  localparam int NENT = 32, NRD = 3, NWR = 3;
  logic clk = 0;
  always #5 clk = ~clk;

  caddr_t rd_addr [NRD];
  vec4_t  rd_data [NRD];
  logic   wr_en   [NWR];
  caddr_t wr_addr [NWR];
  vec4_t  wr_data [NWR];
  vec4_t  model [NENT][NWORDS];
  int checks = 0, failures = 0, n_coll = 0;

  vertex_cache #(.NENT(NENT), .NRD(NRD), .NWR(NWR)) dut (.*);

  function automatic vec4_t rvec();
    return '{x: fx_t'($urandom), y: fx_t'($urandom), z: fx_t'($urandom), w: fx_t'($urandom)};
  endfunction
  function automatic caddr_t raddr();
    return '{ent: ent_t'($urandom_range(0, NENT - 1)), word: word_t'($urandom_range(0, NWORDS - 1))};
  endfunction

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NWR; p++) begin wr_en[p] = 0; wr_addr[p] = '0; wr_data[p] = '0; end
    for (int p = 0; p < NRD; p++) rd_addr[p] = '0;
    // fill
    for (int e = 0; e < NENT; e++)
      for (int w = 0; w < NWORDS; w++) begin
        @(negedge clk);
        wr_en[0] = 1; wr_addr[0] = '{ent: ent_t'(e), word: word_t'(w)}; wr_data[0] = rvec();
        model[e][w] = wr_data[0];
      end
    @(negedge clk);
    wr_en[0] = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int p = 0; p < NRD; p++) begin
        rd_addr[p] = raddr();
        #1;
        checks++;
        if (rd_data[p] != model[rd_addr[p].ent][rd_addr[p].word]) begin
          failures++;
          $display("FAIL read port %0d entry %0d word %0d", p, rd_addr[p].ent, rd_addr[p].word);
        end
      end
      for (int p = 0; p < NWR; p++) begin
        wr_en[p] = ($urandom_range(0, 1) == 1);
        wr_addr[p] = raddr();
        if (t % 10 == 0 && p > 0) wr_addr[p] = wr_addr[0];   // force collisions
        wr_data[p] = rvec();
      end
      if (wr_en[1] && wr_en[2] && wr_addr[1] == wr_addr[2]) n_coll++;
      @(posedge clk);
      for (int p = 0; p < NWR; p++)
        if (wr_en[p]) model[wr_addr[p].ent][wr_addr[p].word] = wr_data[p];
    end
    // out-of-range word reads zero
    @(negedge clk);
    rd_addr[0] = '{ent: 0, word: word_t'(3'd7)};
    #1;
    checks++;
    if (rd_data[0] != '0) begin failures++; $display("FAIL out-of-range read"); end
    checks++;
    if (n_coll == 0) begin failures++; $display("FAIL no write collision exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
