// graph_xbar: switch fabric between the IVSLs and the graph memory array.
//
// Every graph memory has one read port per IVSL. IVSL i drives its address
// into port i of the memory named by sel[i] (the others see address 0) and
// receives port i's data of that memory back. Because each IVSL owns its own
// port, two cores may walk the same graph at once without arbitration.
// `sel` is set by the coordinator before it hands a command to an IVSL and
// stays put while that IVSL reads, so the data mux can use it directly
// (memory reads take one cycle). The crossbar and its control by the
// coordinator follow the document; the port-per-IVSL organisation is this
// design's choice.
module graph_xbar #(
  parameter int unsigned NIV = 2,
  parameter int unsigned NGM = 2,
  parameter int unsigned AW  = 14,
  parameter int unsigned SW  = (NGM > 1) ? $clog2(NGM) : 1
) (
  input  logic [SW-1:0] sel        [NIV],
  input  logic [AW-1:0] iv_addr    [NIV],
  output logic [31:0]   iv_rdata   [NIV],
  output logic [AW-1:0] mem_raddr  [NGM][NIV],
  input  logic [31:0]   mem_rdata  [NGM][NIV]
);

  always_comb begin
    for (int m = 0; m < NGM; m++) begin
      for (int i = 0; i < NIV; i++) begin
        mem_raddr[m][i] = (32'(sel[i]) == m) ? iv_addr[i] : '0;
      end
    end
    for (int i = 0; i < NIV; i++) begin
      iv_rdata[i] = '0;
      for (int m = 0; m < NGM; m++) begin
        if (32'(sel[i]) == m) iv_rdata[i] = mem_rdata[m][i];
      end
    end
  end

endmodule
