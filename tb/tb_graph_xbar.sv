// tb_graph_xbar: for every selection pattern, each IVSL address must reach
// port i of its chosen memory only, and that port's data must come back.
// Three memories and two IVSLs; the crossbar is combinational, so every
// check is made in the same time step. The crossbar itself is from the
// document; its port-per-IVSL arrangement is this design's.
module tb_graph_xbar;
  localparam int NIV = 2, NGM = 3;
  logic [1:0]  sel       [NIV];
  logic [13:0] iv_addr   [NIV];
  logic [31:0] iv_rdata  [NIV];
  logic [13:0] mem_raddr [NGM][NIV];
  logic [31:0] mem_rdata [NGM][NIV];
  int checks = 0, failures = 0;

  graph_xbar #(.NIV(NIV), .NGM(NGM), .AW(14)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < NIV; i++) begin
        sel[i] = 2'($urandom_range(0, NGM-1));
        iv_addr[i] = 14'($urandom_range(1, 16383));
      end
      for (int m = 0; m < NGM; m++)
        for (int i = 0; i < NIV; i++) mem_rdata[m][i] = $urandom();
      #1;
      for (int i = 0; i < NIV; i++) begin
        checks++;
        if (iv_rdata[i] !== mem_rdata[sel[i]][i]) begin
          failures++; $display("FAIL data iv%0d", i);
        end
        for (int m = 0; m < NGM; m++) begin
          checks++;
          if (mem_raddr[m][i] !== ((m == int'(sel[i])) ? iv_addr[i] : 14'd0)) begin
            failures++; $display("FAIL addr mem%0d port%0d", m, i);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
