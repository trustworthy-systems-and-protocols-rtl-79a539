// tb_graph_mem: writes random rows and reads them back through two read
// ports, checking the one-cycle read latency and port independence.
// Runs a 1,024-row memory (smaller than the default to keep the run short);
// 32-bit rows and the synchronous read follow the design, port count is a
// parameter of this design.
module tb_graph_mem;
  localparam int DEPTH = 1024;
  logic        clk = 0, we = 0;
  logic [13:0] waddr = 0;
  logic [31:0] wdata = 0;
  logic [13:0] raddr [2];
  logic [31:0] rdata [2];
  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;

  graph_mem #(.DEPTH(DEPTH), .AW(14), .NRD(2)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    raddr[0] = 0; raddr[1] = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 14'(a); wdata = $urandom(); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 500; t++) begin
      int a0, a1;
      a0 = $urandom_range(0, DEPTH-1); a1 = $urandom_range(0, DEPTH-1);
      @(negedge clk);
      raddr[0] = 14'(a0); raddr[1] = 14'(a1);
      @(negedge clk);
      checks += 2;
      if (rdata[0] !== model[a0] || rdata[1] !== model[a1]) begin
        failures++;
        $display("FAIL %0d:%h %0d:%h", a0, rdata[0], a1, rdata[1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
