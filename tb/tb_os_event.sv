// tb_os_event: the interrupt follower against a model of the controller's
// busy signal (busy for a random 3..14 cycles after each start, and random
// processor operations in between). Checked: a request per enabled IRQ
// edge and none when disabled or when the line merely stays high; start in
// the cycle after the edge when the controller is idle; waiting while busy
// and yielding to a processor operation; dropping when monitoring is off;
// stall from the edge to the end of the switch.
// The cycle-level behaviour checked is this design's; following the IRQ line
// in hardware and stalling the processor come from the document.
module tb_os_event;
  logic clk = 0, rst_n = 0;
  logic irq = 0, irq_en = 0, ready = 1, busy = 0, proc_op = 0;
  logic ev_start, stall;
  int checks = 0, failures = 0, starts = 0;

  os_event dut (.*);

  always #5 clk = ~clk;

  task automatic expect_true(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  // controller model: busy for n cycles after a start
  always @(posedge clk) begin
    if (ev_start || proc_op) begin
      starts += ev_start ? 1 : 0;
      fork
        begin
          #1 busy = 1;
          repeat ($urandom_range(3, 14)) @(posedge clk);
          #1 busy = 0;
        end
      join_none
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s0, n;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // disabled: no request
    @(negedge clk); irq = 1; #1;
    expect_true(!stall, "disabled: no stall");
    repeat (3) @(negedge clk);
    irq = 0;
    expect_true(starts == 0, "disabled: no request");

    // enabled, idle controller: request the cycle after the edge
    irq_en = 1;
    @(negedge clk); irq = 1; #1;
    expect_true(stall && !ev_start, "stall at the edge");
    @(negedge clk);
    expect_true(ev_start && stall, "request one cycle after the edge");
    @(negedge clk);
    expect_true(stall && busy, "stall while the switch runs");
    n = 0;
    while (busy && n < 50) begin @(negedge clk); n++; end
    expect_true(stall, "stall held in the cycle busy falls");
    @(negedge clk);
    expect_true(!stall && starts == 1, "stall released after the switch");
    // the line staying high is not a new request
    repeat (5) @(negedge clk);
    expect_true(starts == 1, "level is not an edge");
    irq = 0;

    // edge while busy with a processor operation: waits, then starts
    @(negedge clk); proc_op = 1;
    @(negedge clk); proc_op = 0; irq = 1; #1;
    expect_true(stall && busy, "edge during a processor operation");
    s0 = starts;
    n = 0;
    while (busy && n < 50) begin
      expect_true(!ev_start, "no request while busy");
      @(negedge clk); n++;
    end
    @(negedge clk);
    expect_true(starts == s0 + 1, "request after the operation");
    irq = 0;
    while (busy) @(negedge clk);
    @(negedge clk);
    expect_true(!stall, "released");

    // processor write in the cycle the request would go: the write wins
    @(negedge clk); irq = 1;
    @(negedge clk); proc_op = 1; #1;
    expect_true(!ev_start, "processor operation has precedence");
    @(negedge clk); proc_op = 0; irq = 0;
    while (busy) @(negedge clk);
    @(negedge clk); #1;
    expect_true(ev_start || starts == s0 + 2, "request after the write");
    while (busy || stall) @(negedge clk);

    // monitoring off: request dropped, stall released
    ready = 0;
    s0 = starts;
    @(negedge clk); irq = 1;
    repeat (3) @(negedge clk);
    expect_true(!stall && starts == s0, "dropped when monitoring is off");
    irq = 0; ready = 1;

    // random IRQ edges: every enabled edge seen while idle gives one request
    for (int i = 0; i < 40; i++) begin
      while (busy || stall) @(negedge clk);
      s0 = starts;
      @(negedge clk); irq = 1;
      repeat ($urandom_range(1, 4)) @(negedge clk);
      irq = 0;
      while (busy || stall) @(negedge clk);
      expect_true(starts == s0 + 1, "one request per edge");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
