// tb_ivsl: one IVSL with a graph memory holding a program's monitoring graph.
// The testbench plays the coordinator and the core: task init, context switch
// (latency checked against 12 cycles), kernel instructions while paused, the
// program's legal path, a trap and resume at PC+4, annulled instructions,
// record retrieval (source and destination sides), job completion and an
// injected illegal instruction.
module tb_ivsl;
  import mon_pkg::*;
  import tb_graph_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        instr_valid = 0, annul = 0, trap = 0;
  logic [31:0] pc = 0, instr = 0;
  logic        ib_valid = 0;
  ib_word_t    ib_word;
  logic        xin_valid = 0;
  logic [31:0] xin_data = 0;
  logic        xout_valid, ack, discrepancy, job_done;
  logic [31:0] xout_data, gm_rdata;
  logic [13:0] gm_addr;
  mon_state_e  state;
  logic [31:0] cur_pid;
  // graph memory
  logic        we = 0;
  logic [13:0] waddr = 0;
  logic [31:0] wdata = 0;
  logic [13:0] raddr [1];
  logic [31:0] rdata [1];

  int checks = 0, failures = 0;
  prog_c p;
  logic [31:0] sent [3];

  ivsl #(.ID(1), .NENT(4), .AW(14)) dut (.*);
  assign raddr[0] = gm_addr;
  assign gm_rdata = rdata[0];
  graph_mem #(.DEPTH(1024), .AW(14), .NRD(1)) mem (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  task automatic expect_true(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic cmd(ib_cmd_e c, int src, int dst, logic [31:0] pid, int gid,
                     int max_cycles, bit want_ack = 1);
    int n;
    @(negedge clk);
    ib_valid = 1;
    ib_word = '0;
    ib_word.cmd = c; ib_word.src = 4'(src); ib_word.dst = 4'(dst);
    ib_word.data = pid; ib_word.gid = 8'(gid);
    @(negedge clk);
    ib_valid = 0;
    n = 1;
    if (want_ack) begin
      while (!ack && n < 100) begin @(negedge clk); n++; end
      expect_true(ack && n <= max_cycles, $sformatf("%s ack after %0d cycles", c.name(), n));
    end
  endtask

  task automatic exec(logic [31:0] a, logic [31:0] w, bit an = 0, bit tr = 0);
    @(negedge clk);
    instr_valid = 1; pc = a; instr = w; annul = an; trap = tr;
    @(negedge clk);
    instr_valid = 0; annul = 0; trap = 0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int j, k, last;
    p = new(40, 5, 32'h0001_0000);
    p.build(1);
    ib_word = '0;
    for (int r = 0; r < p.rows.size(); r++) begin
      @(negedge clk); we = 1; waddr = 14'(r); wdata = p.rows[r];
    end
    @(negedge clk); we = 0;
    rst_n = 1;

    // task init and first context switch
    cmd(IB_TASK_INIT, 1, 1, 32'h91, 0, 2);
    expect_true(state == MON_STOPPED, "stopped after task init");
    cmd(IB_CTX_SW, 1, 1, 32'h91, 0, 12);
    expect_true(state == MON_PAUSED, "paused after context switch");
    expect_true(cur_pid == 32'h91, "current PID");

    // kernel code is ignored while paused
    for (int i = 0; i < 5; i++) exec(32'hF001_0000 + 32'(4*i), $urandom());
    expect_true(state == MON_PAUSED && !discrepancy, "kernel code ignored");

    // the program starts at the start PC stored in the graph
    j = 0;
    exec(p.pc_of(0), p.ins[0]);
    expect_true(state == MON_ACTIVE, "active at start PC");
    k = 1;
    for (int i = 0; i < 12; i++) begin
      j = p.step(j, k++);
      exec(p.pc_of(j), p.ins[j]);
      // an annulled instruction with a wrong hash is ignored
      if (i == 4) exec(p.pc_of(j) + 4, p.bad_after(j), 1);
    end
    expect_true(state == MON_ACTIVE && !discrepancy, "legal path accepted");

    // trap: pause, kernel runs, resume at PC + 4 of the last instruction
    last = j;
    exec(32'hF000_0100, 32'h91D0_2010, 0, 1);
    expect_true(state == MON_PAUSED, "paused by trap");
    exec(32'hF000_0104, $urandom());
    exec(32'hF000_0108, $urandom());
    // resume only when the PC equals last PC + 4; continue on the fall-through
    j = p.s0[last];
    exec(p.pc_of(last) + 4, p.ins[j]);
    expect_true(state == MON_ACTIVE && !discrepancy, "resumed at PC+4");

    // switch away (stop) and back (context switch restores the pointer)
    cmd(IB_STOP, 1, 1, 32'h0, 0, 2);
    expect_true(state == MON_STOPPED, "stopped");
    cmd(IB_CTX_SW, 1, 1, 32'h91, 0, 12);
    j = p.s0[j];
    exec(p.pc_of(j), p.ins[j]);   // resume PC was saved as last PC + 4
    expect_true(state == MON_ACTIVE && !discrepancy, "pointer restored");

    // pause again, then migrate away: this IVSL is the source
    exec(32'hF000_0200, 32'h0, 0, 1);
    fork
      cmd(IB_RETRIEVE, 1, 0, 32'h91, 0, 1, 0);
      begin
        for (int w = 0; w < 3; w++) begin
          int n;
          n = 0;
          while (!xout_valid && n < 10) begin @(posedge clk); #1; n++; end
          sent[w] = xout_data;
          @(posedge clk); #1;
        end
      end
    join
    expect_true(sent[0][7:0] == 8'd0 && sent[0][31] == 1'b1, "record word 0: GID, resume valid");
    expect_true(sent[1] == p.pc_of(j) + 4, "record word 1: resume PC");
    expect_true(state == MON_STOPPED, "source stopped");
    // the entry is gone: a context switch to that PID now finds nothing
    cmd(IB_CTX_SW, 1, 1, 32'h91, 0, 2);
    expect_true(state == MON_STOPPED, "entry freed at source");

    // migrate back: this IVSL is the destination
    fork
      cmd(IB_RETRIEVE, 0, 1, 32'h91, 0, 18);
      begin
        @(negedge clk); @(negedge clk);
        for (int w = 0; w < 3; w++) begin
          xin_valid = 1; xin_data = sent[w];
          @(negedge clk);
        end
        xin_valid = 0;
      end
    join
    expect_true(state == MON_PAUSED && cur_pid == 32'h91, "destination took over");
    j = p.s0[j];
    exec(p.pc_of(j), p.ins[j]);
    expect_true(state == MON_ACTIVE && !discrepancy, "monitoring continues after migration");

    // run to the end of the program
    while (p.s0[j] >= 0) begin
      j = p.s0[j];
      exec(p.pc_of(j), p.ins[j]);
    end
    @(negedge clk);
    expect_true(job_done && !discrepancy && state == MON_STOPPED, "job done at last instruction");

    // a second task; an illegal instruction is caught
    cmd(IB_TASK_INIT, 1, 1, 32'h92, 0, 2);
    cmd(IB_CTX_SW, 1, 1, 32'h92, 0, 12);
    expect_true(!job_done, "flags cleared by command");
    exec(p.pc_of(0), p.ins[0]);
    j = p.s0[0];
    exec(p.pc_of(j), p.ins[j]);
    expect_true(!discrepancy, "no false alarm");
    exec(p.pc_of(j) + 4, p.bad_after(j));
    @(negedge clk);
    expect_true(discrepancy && state == MON_STOPPED, "attack detected");

    // terminate frees the entry
    cmd(IB_FREE, 1, 1, 32'h92, 0, 2);
    cmd(IB_CTX_SW, 1, 1, 32'h92, 0, 2);
    expect_true(state == MON_STOPPED, "terminated task not resumed");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
