// tb_mc_monitor: the multi-core monitor with two cores and two graph
// memories at their default depth. Two programs' graphs are written through
// the loading port; two tasks run on the two cores at the same time,
// interleaved with kernel code, trap into the kernel, migrate to the other
// core (crossing each other), resume and finish; then one task is attacked.
// Checked: no false alarm on legal paths, states, command latencies (context
// switch and migration, printed), job done, one interrupt on the attacked
// core only with the attacked PID, and terminate.
module tb_mc_monitor;
  import mon_pkg::*;
  import tb_graph_pkg::*;

  logic              clk = 0, rst_n = 0;
  logic [1:0]        core_valid = 0, core_annul = 0, core_trap = 0;
  logic [31:0]       core_pc [2], core_instr [2];
  logic              cpu_valid = 0;
  cpu_cmd_e          cpu_cmd = CMD_NONE;
  logic [31:0]       cpu_pid = 0;
  logic [7:0]        cpu_gid = 0;
  logic              cpu_core = 0;
  logic              cpu_busy, cpu_done, cpu_err;
  logic [1:0]        irq, job_done;
  logic [31:0]       attack_pid [2];
  mon_state_e        ivsl_state [2];
  logic              ld_we = 0, ld_gm = 0;
  logic [13:0]       ld_addr = 0;
  logic [31:0]       ld_data = 0;

  int checks = 0, failures = 0;
  prog_c progs [2];
  int    pj [2];       // task t's position in its program
  int    seed = 1;
  int    irq_seen = 0;

  mc_monitor dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && irq != 0) irq_seen++;

  task automatic expect_true(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic logic [31:0] pid_of(int t);
    return 32'h1100 + 32'(t);
  endfunction

  task automatic cmd(cpu_cmd_e c, int t, int core, output int cycles);
    @(negedge clk);
    cpu_valid = 1; cpu_cmd = c; cpu_pid = pid_of(t); cpu_gid = 8'(t); cpu_core = core[0];
    @(negedge clk);
    cpu_valid = 0;
    cycles = 1;
    while (!cpu_done && cycles < 100) begin @(negedge clk); cycles++; end
    expect_true(cpu_done && !cpu_err, $sformatf("%s of task %0d done", c.name(), t));
  endtask

  task automatic issue(int core, logic [31:0] pc, logic [31:0] w, bit tr = 0, bit an = 0);
    @(negedge clk);
    core_valid[core] = 1; core_pc[core] = pc; core_instr[core] = w;
    core_trap[core] = tr; core_annul[core] = an;
    @(negedge clk);
    core_valid[core] = 0; core_trap[core] = 0; core_annul[core] = 0;
  endtask

  task automatic kernel(int core, int n);
    for (int i = 0; i < n; i++) issue(core, 32'hF000_0000 + 32'(4 * ($urandom() % 64)), $urandom());
  endtask

  // task t runs n instructions on `core`; resume: continue at last PC + 4
  task automatic run(int core, int t, int n, bit resume);
    int nx;
    for (int i = 0; i < n; i++) begin
      if (pj[t] < 0) nx = 0;
      else if (resume && i == 0) nx = progs[t].s0[pj[t]];
      else nx = progs[t].step(pj[t], seed);
      seed++;
      if (nx < 0) break;
      issue(core, progs[t].pc_of(nx), progs[t].ins[nx]);
      pj[t] = nx;
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c;
    core_pc[0] = 0; core_pc[1] = 0; core_instr[0] = 0; core_instr[1] = 0;
    for (int t = 0; t < 2; t++) begin
      progs[t] = new(80, 5 + t, 32'h0001_0000 * 32'(t + 1));
      progs[t].build(1);
      pj[t] = -1;
      for (int r = 0; r < progs[t].rows.size(); r++) begin
        @(negedge clk);
        ld_we = 1; ld_gm = t[0]; ld_addr = 14'(r); ld_data = progs[t].rows[r];
      end
    end
    @(negedge clk);
    ld_we = 0;
    rst_n = 1;

    cmd(CMD_TASK_INIT, 0, 0, c);
    cmd(CMD_TASK_INIT, 1, 1, c);
    cmd(CMD_CTX_SW, 0, 0, c);
    $display("context switch: %0d cycles", c);
    expect_true(c <= 14, "context switch latency");
    cmd(CMD_CTX_SW, 1, 1, c);
    expect_true(ivsl_state[0] == MON_PAUSED && ivsl_state[1] == MON_PAUSED, "both paused");

    // both cores: kernel code, then their tasks, in parallel
    fork
      begin kernel(0, 4); run(0, 0, 30, 0); end
      begin kernel(1, 7); run(1, 1, 30, 0); end
    join
    expect_true(irq_seen == 0 && ivsl_state[0] == MON_ACTIVE && ivsl_state[1] == MON_ACTIVE,
                "both tasks monitored concurrently");

    // both trap into the kernel; the tasks swap cores
    fork
      begin issue(0, 32'hF000_0800, 32'h91D0_2003, 1); kernel(0, 3); end
      begin issue(1, 32'hF000_0800, 32'h91D0_2003, 1); kernel(1, 5); end
    join
    cmd(CMD_CTX_SW, 0, 1, c);
    $display("migration: %0d cycles", c);
    expect_true(c <= 20, "migration latency");
    cmd(CMD_CTX_SW, 1, 0, c);
    expect_true(ivsl_state[0] == MON_PAUSED && ivsl_state[1] == MON_PAUSED, "both paused after migration");
    fork
      begin kernel(0, 2); run(0, 1, 30, 1); end
      begin kernel(1, 4); run(1, 0, 30, 1); end
    join
    expect_true(irq_seen == 0 && ivsl_state[0] == MON_ACTIVE && ivsl_state[1] == MON_ACTIVE,
                "migrated tasks monitored on their new cores");

    // task 0 runs to its end on core 1
    while (progs[0].s0[pj[0]] >= 0) begin
      int nx;
      nx = progs[0].s0[pj[0]];
      issue(1, progs[0].pc_of(nx), progs[0].ins[nx]);
      pj[0] = nx;
    end
    @(negedge clk);
    expect_true(job_done == 2'b10 && irq_seen == 0, "job done on core 1");

    // attack on core 0 (task 1)
    issue(0, progs[1].pc_of(pj[1]) + 4, progs[1].bad_after(pj[1]));
    @(negedge clk);
    expect_true(irq == 2'b01 && attack_pid[0] == pid_of(1), "interrupt on core 0 only");

    cmd(CMD_TERMINATE, 0, 1, c);
    cmd(CMD_CTX_SW, 0, 1, c);
    expect_true(ivsl_state[1] == MON_STOPPED, "terminated task is not monitored");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
