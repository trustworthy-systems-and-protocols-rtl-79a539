// tb_mthm: single-core multi-task monitor at its default size (16K-row graph
// memory, four 4096-row slots, four processes).
// A behavioural graph pool holds five program graphs (GID 1..5; word 0 of
// each is its row count). The testbench plays the processor: it writes PID,
// GID and OP, polls Done in STATUS and checks the latencies the document
// gives (context switch within 17 cycles, creation of a process whose graph
// is resident in under 20), then runs instruction streams back to back.
// Covered: creation with a graph load, creation with a resident graph,
// context switches with and without a base register reload, pointer save and
// restore across switches, replacement of the least recently used graph,
// terminate, an injected illegal instruction (recovery pulse, attack bit,
// monitoring disabled) and error on an unknown PID; interrupt following: an
// IRQ edge stalls the processor while the monitor switches to the resident
// handler graph, the handler is followed, the next context switch returns to
// the interrupted process where it stopped, no effect while interrupts are
// ignored, and an illegal instruction in the handler pulses cpu_reset
// instead of recovery.
module tb_mthm;
  import mon_pkg::*;
  import tb_graph_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        instr_valid = 0;
  logic [31:0] instr = 0;
  logic        recovery;
  logic        irq = 0, stall, cpu_reset;
  logic        reg_we = 0;
  logic [2:0]  reg_addr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic        pool_rd;
  logic [4:0]  pool_gid;
  logic [13:0] pool_addr;
  logic [31:0] pool_rdata = 0;

  int checks = 0, failures = 0, recov_seen = 0, reset_seen = 0;
  prog_c progs [6];
  int    pj [32];      // position of each PID in its program (-1: not started)
  int    pg [32];      // GID of each PID
  int    seed = 1;
  logic [31:0] pool [8][4096];   // word 0: row count, then the rows

  mthm dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (pool_rd) begin
      pool_rdata <= pool[pool_gid[2:0]][pool_addr[11:0]];
    end
    if (rst_n && recovery) recov_seen++;
    if (rst_n && cpu_reset) reset_seen++;
  end

  task automatic expect_true(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic wr(logic [2:0] a, logic [31:0] d);
    @(negedge clk);
    reg_we = 1; reg_addr = 3'(a); reg_wdata = d;
    @(negedge clk);
    reg_we = 0; reg_addr = REG_STATUS;
  endtask

  // issue an operation and return the cycles from the OP write to Done
  task automatic op(mt_op_e o, int pid, int gid, output int cycles, output bit e);
    wr(REG_PID, 32'(pid));
    wr(REG_GID, 32'(gid));
    @(negedge clk);
    reg_we = 1; reg_addr = REG_OP; reg_wdata = 32'(o);
    @(negedge clk);
    reg_we = 0; reg_addr = REG_STATUS;
    cycles = 1;
    while (!reg_rdata[1] && cycles < 20000) begin @(negedge clk); cycles++; end
    e = reg_rdata[2];
    if (o == OP_CREATE && !e) begin pj[pid] = -1; pg[pid] = gid; end
  endtask

  // run n instructions of a process's legal path back to back
  task automatic run(int pid, int n);
    prog_c p = progs[pg[pid]];
    int nx;
    for (int i = 0; i < n; i++) begin
      nx = (pj[pid] < 0) ? 0 : p.step(pj[pid], seed);
      seed++;
      if (nx < 0) break;
      @(negedge clk);
      instr_valid = 1; instr = p.ins[nx];
      pj[pid] = nx;
    end
    @(negedge clk);
    instr_valid = 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c, r0;
    bit e;
    for (int g = 1; g <= 5; g++) begin
      progs[g] = new(60 + 10 * g, 4 + g, 32'h0);
      progs[g].build(0);
      pool[g][0] = 32'(progs[g].rows.size());
      foreach (progs[g].rows[r]) pool[g][r + 1] = progs[g].rows[r];
    end
    progs[0] = progs[1];
    repeat (3) @(negedge clk);
    rst_n = 1;

    // create process 1 (graph 1 loaded from the pool)
    op(OP_CREATE, 1, 1, c, e);
    expect_true(!e && c > progs[1].rows.size(), $sformatf("create with load: %0d cycles", c));
    // create process 2 sharing graph 1: resident
    op(OP_CREATE, 2, 1, c, e);
    expect_true(!e && c < 20, $sformatf("create, resident graph: %0d cycles", c));

    // switch to process 1 (base registers loaded)
    op(OP_SWITCH, 1, 0, c, e);
    expect_true(!e && c <= 17, $sformatf("context switch: %0d cycles", c));
    wr(REG_ENABLE, 1);
    run(1, 25);
    expect_true(recov_seen == 0, "process 1 path accepted");

    // switch to process 2: same graph, no reload
    op(OP_SWITCH, 2, 0, c, e);
    expect_true(!e && c <= 17, $sformatf("switch, same graph: %0d cycles", c));
    wr(REG_ENABLE, 1);
    run(2, 30);
    // back to process 1: its pointer was saved
    op(OP_SWITCH, 1, 0, c, e);
    wr(REG_ENABLE, 1);
    run(1, 20);
    expect_true(recov_seen == 0, "pointers saved and restored");

    // fill the other slots: graphs 2 and 3, then 4
    op(OP_CREATE, 3, 2, c, e); expect_true(!e, "create 3");
    op(OP_CREATE, 4, 3, c, e); expect_true(!e, "create 4");
    op(OP_SWITCH, 3, 0, c, e);
    wr(REG_ENABLE, 1);
    run(3, 30);
    op(OP_SWITCH, 4, 0, c, e);
    wr(REG_ENABLE, 1);
    run(4, 30);
    expect_true(recov_seen == 0, "graphs 2 and 3 monitored");
    // process table full
    op(OP_CREATE, 9, 4, c, e);
    expect_true(e, "error when no process entry is free");
    // terminate 3 and 4: graphs 2 and 3 become replaceable
    op(OP_KILL, 3, 0, c, e); expect_true(!e, "kill 3");
    op(OP_KILL, 4, 0, c, e); expect_true(!e, "kill 4");
    op(OP_CREATE, 3, 4, c, e); expect_true(!e, "create 3 with graph 4 (free slot)");
    // graph 5: no free slot, graph 2 is the least recently used
    op(OP_CREATE, 4, 5, c, e);
    expect_true(!e && c > progs[5].rows.size(), "create 4 with graph 5 replaces a slot");
    op(OP_KILL, 2, 0, c, e);
    op(OP_CREATE, 2, 3, c, e);
    expect_true(!e && c < 20, $sformatf("graph 3 still resident: %0d cycles", c));
    op(OP_KILL, 2, 0, c, e);
    op(OP_CREATE, 2, 2, c, e);
    expect_true(!e && c > progs[2].rows.size(), "graph 2 was replaced and is loaded again");
    // all of them run correctly
    for (int p = 1; p <= 4; p++) begin
      op(OP_SWITCH, p, 0, c, e);
      expect_true(!e && c <= 17, $sformatf("switch to %0d: %0d cycles", p, c));
      wr(REG_ENABLE, 1);
      run(p, 40);
    end
    expect_true(recov_seen == 0, "no false alarm on any graph");

    // interrupts: graph 2 (kept resident by process 2) is the handler's graph
    wr(REG_IRQ, 32'h0000_0201);
    op(OP_SWITCH, 1, 0, c, e);
    wr(REG_ENABLE, 1);
    run(1, 10);
    @(negedge clk);
    irq = 1;
    #1;
    c = 0;
    while (stall && c < 100) begin @(negedge clk); c++; end
    irq = 0;
    $display("stall: %0d cycles", c);
    expect_true(c >= 4 && c <= 17, $sformatf("processor stalled %0d cycles for the handler switch", c));
    pg[31] = 2; pj[31] = -1;
    run(31, 30);
    expect_true(recov_seen == 0, "handler followed on its own graph");
    op(OP_SWITCH, 1, 0, c, e);
    wr(REG_ENABLE, 1);
    run(1, 20);
    expect_true(recov_seen == 0, "interrupted process resumes where it stopped");
    // interrupt following disabled: nothing happens
    wr(REG_IRQ, 32'h0000_0200);
    @(negedge clk);
    irq = 1;
    #1;
    expect_true(!stall, "no stall with interrupts ignored");
    @(negedge clk);
    irq = 0;
    run(1, 10);
    expect_true(recov_seen == 0 && !stall, "process still followed");
    // an illegal instruction inside the handler resets the processor
    wr(REG_IRQ, 32'h0000_0201);
    @(negedge clk);
    irq = 1;
    #1;
    c = 0;
    while (stall && c < 100) begin @(negedge clk); c++; end
    irq = 0;
    pg[31] = 2; pj[31] = -1;
    run(31, 5);
    @(negedge clk);
    instr_valid = 1; instr = progs[2].bad_after(pj[31]);
    @(negedge clk);
    instr_valid = 0;
    expect_true(cpu_reset == 1'b1 && recovery == 1'b0, "attack in the handler: reset, not recovery");
    @(negedge clk);
    expect_true(reset_seen == 1 && recov_seen == 0, "exactly one reset pulse");
    wr(REG_IRQ, 32'h0000_0200);

    // unknown PID
    op(OP_SWITCH, 17, 0, c, e);
    expect_true(e, "error on unknown PID");

    // attack: an instruction that is not a legal successor
    op(OP_SWITCH, 2, 0, c, e);
    wr(REG_ENABLE, 1);
    run(2, 5);
    @(negedge clk);
    instr_valid = 1; instr = progs[2].bad_after(pj[2]);
    @(negedge clk);
    instr_valid = 0;
    expect_true(recovery == 1'b1, "recovery one cycle after the instruction");
    @(negedge clk);
    r0 = recov_seen;
    expect_true(r0 == 1 && reg_rdata[3] && !reg_rdata[0], "attack flagged, monitoring disabled");
    run(2, 5);
    expect_true(recov_seen == r0, "no checks while disabled");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
