// tb_coordinator: coordinator with three cores and three graph memories.
// Stub IVSLs acknowledge each internal bus command after a random delay.
// For every CPU command the testbench checks the bus word (command, source,
// destination, PID, graph ID), the crossbar selection, the transfer-bus
// grant during a migration, the table update after it, done/error, and the
// per-core interrupt lines with the attacked PID.
module tb_coordinator;
  import mon_pkg::*;

  localparam int NC = 3;
  logic              clk = 0, rst_n = 0;
  logic              cpu_valid = 0;
  cpu_cmd_e          cpu_cmd = CMD_NONE;
  logic [31:0]       cpu_pid = 0;
  logic [7:0]        cpu_gid = 0;
  logic [1:0]        cpu_core = 0;
  logic              cpu_busy, cpu_done, cpu_err, ib_valid;
  ib_word_t          ib_word, seen;
  logic [1:0]        grant;
  logic [NC-1:0]     ivsl_ack = 0, ivsl_disc = 0, irq;
  logic [1:0]        xbar_sel [NC];
  logic [31:0]       ivsl_pid [NC];
  logic [31:0]       attack_pid [NC];
  int checks = 0, failures = 0, words = 0;

  coordinator #(.NCORE(NC), .NENT(4), .NGM(3)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_true(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  // stub IVSLs: the destination acknowledges 2..9 cycles after the word
  initial begin
    forever begin
      @(posedge clk);
      if (ib_valid) begin
        seen = ib_word;
        words++;
        repeat ($urandom_range(2, 9)) @(posedge clk);
        #1 ivsl_ack[seen.dst] = 1'b1;
        @(posedge clk);
        #1 ivsl_ack = '0;
      end
    end
  end

  task automatic cmd(cpu_cmd_e c, logic [31:0] pid, int gid, int core, output bit e);
    int n;
    @(negedge clk);
    cpu_valid = 1; cpu_cmd = c; cpu_pid = pid; cpu_gid = 8'(gid); cpu_core = 2'(core);
    @(negedge clk);
    cpu_valid = 0;
    n = 0;
    while (!cpu_done && n < 100) begin @(negedge clk); n++; end
    e = cpu_err;
    expect_true(cpu_done, $sformatf("%s done", c.name()));
    @(negedge clk);
    expect_true(!cpu_busy, "idle after done");
  endtask

  task automatic expect_word(ib_cmd_e c, int s, int d, logic [31:0] pid, int gid, string msg);
    expect_true(seen.cmd == c && seen.src == 4'(s) && seen.dst == 4'(d) &&
                seen.data == pid && seen.gid == 8'(gid), msg);
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit e;
    int w;
    foreach (ivsl_pid[i]) ivsl_pid[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    cmd(CMD_TASK_INIT, 32'h100, 2, 0, e);
    expect_true(!e, "init ok");
    expect_word(IB_TASK_INIT, 0, 0, 32'h100, 2, "task init word");
    cmd(CMD_TASK_INIT, 32'h200, 1, 1, e);
    expect_word(IB_TASK_INIT, 1, 1, 32'h200, 1, "task init word, core 1");
    cmd(CMD_TASK_INIT, 32'h300, 3, 1, e);
    expect_true(e, "graph ID without a graph memory rejected");

    cmd(CMD_CTX_SW, 32'h100, 0, 0, e);
    expect_word(IB_CTX_SW, 0, 0, 32'h100, 2, "context switch word");
    expect_true(xbar_sel[0] == 2'd2, "crossbar: core 0 reads graph memory 2");
    cmd(CMD_CTX_SW, 32'h200, 0, 1, e);
    expect_true(xbar_sel[1] == 2'd1, "crossbar: core 1 reads graph memory 1");

    // unknown PID: stop
    cmd(CMD_CTX_SW, 32'h555, 0, 2, e);
    expect_word(IB_STOP, 2, 2, 32'h555, 0, "unmonitored task stops the IVSL");

    // migration of 0x100 from core 0 to core 2
    fork
      cmd(CMD_CTX_SW, 32'h100, 0, 2, e);
      begin
        @(posedge clk); @(posedge clk); #1;
        expect_true(grant == 2'd0, "transfer bus granted to the source");
      end
    join
    expect_word(IB_RETRIEVE, 0, 2, 32'h100, 2, "retrieve word");
    expect_true(xbar_sel[2] == 2'd2, "crossbar follows the task");
    // the table now records core 2: a switch on core 2 is a plain switch
    cmd(CMD_CTX_SW, 32'h100, 0, 2, e);
    expect_word(IB_CTX_SW, 2, 2, 32'h100, 2, "table updated after migration");

    // terminate
    cmd(CMD_TERMINATE, 32'h200, 0, 1, e);
    expect_word(IB_FREE, 1, 1, 32'h200, 1, "free word");
    w = words;
    cmd(CMD_TERMINATE, 32'h200, 0, 1, e);
    expect_true(words == w && !e, "terminate of an unknown PID sends nothing");
    cmd(CMD_CTX_SW, 32'h200, 0, 1, e);
    expect_word(IB_STOP, 1, 1, 32'h200, 0, "terminated task is not monitored");

    // table full
    for (int i = 0; i < 3; i++) cmd(CMD_TASK_INIT, 32'h400 + i, 0, 1, e);
    cmd(CMD_TASK_INIT, 32'h500, 0, 1, e);
    expect_true(e, "table full");

    // attacks: one interrupt line per IVSL
    ivsl_pid[1] = 32'h401;
    @(negedge clk);
    ivsl_disc = 3'b010;
    @(negedge clk);
    expect_true(irq == 3'b010 && attack_pid[1] == 32'h401, "interrupt only to core 1");
    ivsl_disc = 3'b000;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
