// tb_base_addr_rf: writes header rows and reads every group register back;
// also checks the reset value and that a row write touches only its pair.
// Timing: writes on the clock edge, reads combinational. The two-groups-per-
// row packing checked here is this design's header layout; sixteen 16-bit
// registers are the document's.
module tb_base_addr_rf;
  logic        clk = 0, rst_n = 0, we = 0;
  logic [2:0]  wr_row = 0;
  logic [31:0] wr_data = 0;
  logic [3:0]  rd_sel = 0;
  logic [15:0] rd_base;
  logic [15:0] model [16];
  int checks = 0, failures = 0;

  base_addr_rf dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int g = 0; g < 16; g++) begin
      rd_sel = 4'(g);
      #1;
      checks++;
      if (rd_base !== model[g]) begin
        failures++;
        $display("FAIL group %0d = %h expected %h", g, rd_base, model[g]);
      end
    end
  endtask

  initial begin
    foreach (model[g]) model[g] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check_all();
    for (int t = 0; t < 40; t++) begin
      @(negedge clk);
      wr_row = 3'($urandom_range(0, 7));
      wr_data = $urandom();
      we = 1;
      model[2*wr_row]   = wr_data[31:16];
      model[2*wr_row+1] = wr_data[15:0];
      @(negedge clk);
      we = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
