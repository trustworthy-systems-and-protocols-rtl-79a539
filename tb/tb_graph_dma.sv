// tb_graph_dma: a behavioural graph pool holds graphs of different lengths;
// each load must write exactly rows frame..frame+N-1 with the pool's words,
// in N+4 cycles.
// The row count in word 0 of each pool graph is this design's pool format;
// the document says graphs come from a graph pool through a DMA interface.
module tb_graph_dma;
  logic        clk = 0, rst_n = 0, start = 0;
  logic [4:0]  gid = 0;
  logic [13:0] frame = 0;
  logic        busy, done, pool_rd, gm_we;
  logic [4:0]  pool_gid;
  logic [13:0] pool_addr, gm_waddr;
  logic [31:0] pool_rdata, gm_wdata;
  logic [31:0] mem [16384];
  bit          wrote [16384];
  int checks = 0, failures = 0;

  graph_dma #(.AW(14), .GID_W(5)) dut (.*);
  always #5 clk = ~clk;

  // pool: word 0 of graph g = 20 + 7*g rows, word k = {g, k}
  function automatic logic [31:0] pool_word(int g, int k);
    return (k == 0) ? 32'(20 + 7 * g) : {8'hA5, 8'(g), 16'(k)};
  endfunction
  always_ff @(posedge clk) pool_rdata <= pool_word(int'(pool_gid), int'(pool_addr));
  always_ff @(posedge clk) if (gm_we) begin mem[gm_waddr] <= gm_wdata; wrote[gm_waddr] <= 1; end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 6; g++) begin
      int n, cyc, f;
      n = 20 + 7 * g; cyc = 0; f = g * 1000 + 17;
      foreach (wrote[a]) wrote[a] = 0;
      @(negedge clk);
      start = 1; gid = 5'(g); frame = 14'(f);
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      @(negedge clk);
      checks++;
      if (cyc != n + 4) begin
        failures++; $display("FAIL graph %0d took %0d cycles, expected %0d", g, cyc, n + 4);
      end
      for (int a = 0; a < 16384; a++) begin
        bit in_range;
        in_range = (a >= f) && (a < f + n);
        if (in_range || wrote[a]) begin
          checks++;
          if (!in_range || !wrote[a] || mem[a] !== pool_word(g, a - f + 1)) begin
            failures++; $display("FAIL graph %0d row %0d", g, a);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
