// tb_hwmon_top: end-to-end test of the top level at its default size (two
// cores with two 9,472-row graph memories; a 16K-row single-core monitor
// with four slots). Both monitors run at the same time.
//   Multi-core side: two tasks are registered, switched in, run on both
//   cores with kernel code and annulled instructions between, trap, migrate
//   across cores, resume, finish (job done); an unregistered task stops an
//   IVSL; an attack raises the interrupt of its core only; a task ends.
//   Single-core side: five graphs in a behavioural graph pool; processes are
//   created (graph load and resident graph), switched with and without a
//   base register reload, graphs replaced by LRU, processes terminated,
//   interrupts switch monitoring to the handler's graph while the processor
//   is stalled, and an illegal instruction triggers recovery.
// Each mechanism has a counter that is incremented when the outputs show it
// worked; the test fails if any counter stays at zero. Latencies checked:
// single-core context switch within 17 cycles and creation with a resident
// graph under 20 (document figures); multi-core switch 14, migration 18.
module tb_hwmon_top;
  import mon_pkg::*;
  import tb_graph_pkg::*;

  logic              clk = 0, rst_n = 0;
  // multi-core side
  logic [1:0]        mc_core_valid = 0, mc_core_annul = 0, mc_core_trap = 0;
  logic [31:0]       mc_core_pc [2], mc_core_instr [2];
  logic              mc_cpu_valid = 0;
  cpu_cmd_e          mc_cpu_cmd = CMD_NONE;
  logic [31:0]       mc_cpu_pid = 0;
  logic [7:0]        mc_cpu_gid = 0;
  logic              mc_cpu_core = 0;
  logic              mc_cpu_busy, mc_cpu_done, mc_cpu_err;
  logic [1:0]        mc_irq, mc_job_done;
  logic [31:0]       mc_attack_pid [2];
  mon_state_e        mc_ivsl_state [2];
  logic              mc_ld_we = 0, mc_ld_gm = 0;
  logic [13:0]       mc_ld_addr = 0;
  logic [31:0]       mc_ld_data = 0;
  // single-core side
  logic              mt_instr_valid = 0;
  logic [31:0]       mt_instr = 0;
  logic              mt_recovery;
  logic              mt_irq = 0, mt_stall, mt_cpu_reset;
  logic              mt_reg_we = 0;
  logic [2:0]        mt_reg_addr = 0;
  logic [31:0]       mt_reg_wdata = 0, mt_reg_rdata;
  logic              mt_pool_rd;
  logic [4:0]        mt_pool_gid;
  logic [13:0]       mt_pool_addr;
  logic [31:0]       mt_pool_rdata = 0;

  hwmon_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_task_init = 0, n_ctx_sw = 0, n_migration = 0, n_pause = 0, n_resume = 0;
  int n_annul = 0, n_job_done = 0, n_stop = 0, n_irq = 0, n_terminate = 0;
  int n_create_load = 0, n_create_res = 0, n_sw_reload = 0, n_sw_noreload = 0;
  int n_lru = 0, n_kill = 0, n_recovery = 0, n_mt_instr = 0, n_mc_instr = 0;
  int n_irq_follow = 0, n_stall = 0;
  int mc_irq_seen = 0, mt_rec_seen = 0;

  task automatic expect_true(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  always @(posedge clk) if (rst_n && mc_irq != 0) mc_irq_seen++;
  always @(posedge clk) if (rst_n && mt_recovery) mt_rec_seen++;

  // ================================================= multi-core side
  prog_c mp [2];
  int    mj [2];
  int    mseed = 7;

  function automatic logic [31:0] mpid(int t);
    return 32'h2200 + 32'(t);
  endfunction

  task automatic mc_cmd(cpu_cmd_e c, int t, int core, output int cycles, output bit e);
    @(negedge clk);
    mc_cpu_valid = 1; mc_cpu_cmd = c; mc_cpu_pid = mpid(t); mc_cpu_gid = 8'(t % 2);
    mc_cpu_core = core[0];
    @(negedge clk);
    mc_cpu_valid = 0;
    cycles = 1;
    while (!mc_cpu_done && cycles < 100) begin @(negedge clk); cycles++; end
    e = mc_cpu_err || !mc_cpu_done;
  endtask

  task automatic mc_issue(int core, logic [31:0] pc, logic [31:0] w, bit tr = 0, bit an = 0);
    @(negedge clk);
    mc_core_valid[core] = 1; mc_core_pc[core] = pc; mc_core_instr[core] = w;
    mc_core_trap[core] = tr; mc_core_annul[core] = an;
    @(negedge clk);
    mc_core_valid[core] = 0; mc_core_trap[core] = 0; mc_core_annul[core] = 0;
  endtask

  task automatic mc_kernel(int core, int n);
    for (int i = 0; i < n; i++)
      mc_issue(core, 32'hF000_0000 + 32'(4 * ($urandom() % 256)), $urandom());
  endtask

  task automatic mc_run(int core, int t, int n, bit resume);
    int nx;
    for (int i = 0; i < n; i++) begin
      if (mj[t] < 0) nx = 0;
      else if (resume && i == 0) nx = mp[t].s0[mj[t]];
      else nx = mp[t].step(mj[t], mseed);
      mseed++;
      if (nx < 0) break;
      mc_issue(core, mp[t].pc_of(nx), mp[t].ins[nx]);
      n_mc_instr++;
      mj[t] = nx;
      // an annulled delay-slot instruction with a wrong hash now and then
      if (i % 9 == 4) begin
        mc_issue(core, mp[t].pc_of(nx) + 4, mp[t].bad_after(nx), 0, 1);
        n_annul++;
      end
    end
  endtask

  task automatic mc_trap(int core);
    mc_issue(core, 32'hF000_0800, 32'h91D0_2003, 1);
    @(negedge clk);
    if (mc_ivsl_state[core] == MON_PAUSED) n_pause++;
  endtask

  task automatic mc_side();
    int c;
    bit e;
    for (int t = 0; t < 2; t++) begin
      mc_cmd(CMD_TASK_INIT, t, t, c, e);
      if (!e) n_task_init++;
    end
    for (int t = 0; t < 2; t++) begin
      mc_cmd(CMD_CTX_SW, t, t, c, e);
      expect_true(!e && c == 14 && mc_ivsl_state[t] == MON_PAUSED,
                  $sformatf("mc context switch: %0d cycles", c));
      if (!e) n_ctx_sw++;
    end
    fork
      begin mc_kernel(0, 5); mc_run(0, 0, 40, 0); end
      begin mc_kernel(1, 3); mc_run(1, 1, 40, 0); end
    join
    expect_true(mc_irq_seen == 0 && mc_ivsl_state[0] == MON_ACTIVE &&
                mc_ivsl_state[1] == MON_ACTIVE, "mc tasks active, no alarm");
    if (mc_ivsl_state[0] == MON_ACTIVE) n_resume++;
    // three rounds: trap, swap cores, resume
    for (int round = 0; round < 3; round++) begin
      int a, b;
      a = round % 2;       // task on core 0 before the swap
      b = 1 - a;
      fork
        begin mc_trap(0); mc_kernel(0, 4); end
        begin mc_trap(1); mc_kernel(1, 2); end
      join
      mc_cmd(CMD_CTX_SW, a, 1, c, e);
      expect_true(!e && c == 18, $sformatf("mc migration: %0d cycles", c));
      mc_cmd(CMD_CTX_SW, b, 0, c, e);
      expect_true(!e && c == 18, $sformatf("mc migration: %0d cycles", c));
      fork
        begin mc_kernel(0, 3); mc_run(0, b, 25, 1); end
        begin mc_kernel(1, 3); mc_run(1, a, 25, 1); end
      join
      if (mc_irq_seen == 0 && mc_ivsl_state[0] == MON_ACTIVE && mc_ivsl_state[1] == MON_ACTIVE) begin
        n_migration += 2;
        n_resume += 2;
      end else begin
        expect_true(0, "mc tasks continue after migration");
      end
    end
    // task 1 is now on core 0 and task 0 on core 1 (three swaps); task 0 ends
    while (mp[0].s0[mj[0]] >= 0) begin
      int nx;
      nx = mp[0].s0[mj[0]];
      mc_issue(1, mp[0].pc_of(nx), mp[0].ins[nx]);
      mj[0] = nx;
    end
    @(negedge clk);
    if (mc_job_done[1] && mc_ivsl_state[1] == MON_STOPPED) n_job_done++;
    // a task the monitor does not know: core 1's IVSL stops
    mc_cmd(CMD_CTX_SW, 5, 1, c, e);
    mc_kernel(1, 5);
    if (!e && mc_ivsl_state[1] == MON_STOPPED && mc_irq_seen == 0) n_stop++;
    // attack on task 1 (core 0)
    mc_issue(0, mp[1].pc_of(mj[1]) + 4, mp[1].bad_after(mj[1]));
    @(negedge clk);
    if (mc_irq == 2'b01 && mc_attack_pid[0] == mpid(1)) n_irq++;
    expect_true(mc_irq == 2'b01 && mc_attack_pid[0] == mpid(1), "mc interrupt on core 0 only");
    // terminate task 0; switching to it afterwards does not monitor it
    mc_cmd(CMD_TERMINATE, 0, 1, c, e);
    mc_cmd(CMD_CTX_SW, 0, 1, c, e);
    if (mc_ivsl_state[1] == MON_STOPPED) n_terminate++;
  endtask

  // ================================================= single-core side
  prog_c sp [6];
  int    sj [32];
  int    sg [32];
  int    sseed = 3;
  logic [31:0] pool [8][4096];

  always @(posedge clk)
    if (mt_pool_rd) mt_pool_rdata <= pool[mt_pool_gid[2:0]][mt_pool_addr[11:0]];

  task automatic mt_wr(logic [2:0] a, logic [31:0] d);
    @(negedge clk);
    mt_reg_we = 1; mt_reg_addr = 3'(a); mt_reg_wdata = d;
    @(negedge clk);
    mt_reg_we = 0; mt_reg_addr = REG_STATUS;
  endtask

  task automatic mt_op(mt_op_e o, int pid, int gid, output int cycles, output bit e);
    mt_wr(REG_PID, 32'(pid));
    mt_wr(REG_GID, 32'(gid));
    @(negedge clk);
    mt_reg_we = 1; mt_reg_addr = REG_OP; mt_reg_wdata = 32'(o);
    @(negedge clk);
    mt_reg_we = 0; mt_reg_addr = REG_STATUS;
    cycles = 1;
    while (!mt_reg_rdata[1] && cycles < 20000) begin @(negedge clk); cycles++; end
    e = mt_reg_rdata[2];
    if (o == OP_CREATE && !e) begin sj[pid] = -1; sg[pid] = gid; end
  endtask

  task automatic mt_run(int pid, int n);
    int nx;
    for (int i = 0; i < n; i++) begin
      nx = (sj[pid] < 0) ? 0 : sp[sg[pid]].step(sj[pid], sseed);
      sseed++;
      if (nx < 0) break;
      @(negedge clk);
      mt_instr_valid = 1; mt_instr = sp[sg[pid]].ins[nx];
      sj[pid] = nx;
      n_mt_instr++;
    end
    @(negedge clk);
    mt_instr_valid = 0;
  endtask

  task automatic mt_switch_run(int pid, int n, bit reload);
    int c;
    bit e;
    mt_op(OP_SWITCH, pid, 0, c, e);
    expect_true(!e && c <= 17, $sformatf("mt context switch: %0d cycles", c));
    if (!e && reload && c == 13) n_sw_reload++;
    if (!e && !reload && c == 4) n_sw_noreload++;
    mt_wr(REG_ENABLE, 1);
    mt_run(pid, n);
  endtask

  task automatic mt_create(int pid, int gid, bit resident);
    int c;
    bit e;
    mt_op(OP_CREATE, pid, gid, c, e);
    if (resident) begin
      expect_true(!e && c < 20, $sformatf("mt create, resident graph: %0d cycles", c));
      if (!e && c < 20) n_create_res++;
    end else begin
      expect_true(!e && c > sp[gid].rows.size(), $sformatf("mt create with load: %0d cycles", c));
      if (!e && c > sp[gid].rows.size()) n_create_load++;
    end
  endtask

  task automatic mt_kill(int pid);
    int c;
    bit e;
    mt_op(OP_KILL, pid, 0, c, e);
    if (!e) n_kill++;
  endtask

  task automatic mt_side();
    int l0, r0;
    mt_create(1, 1, 0);
    mt_create(2, 1, 1);
    mt_create(3, 2, 0);
    mt_create(4, 3, 0);
    mt_switch_run(1, 30, 1);
    mt_switch_run(2, 30, 0);
    mt_switch_run(3, 30, 1);
    mt_switch_run(4, 30, 1);
    mt_switch_run(1, 30, 1);
    expect_true(mt_rec_seen == 0, "mt no false alarm");
    mt_kill(3);
    mt_kill(4);
    mt_create(3, 4, 0);          // free slot
    l0 = n_create_load;
    r0 = n_create_res;
    mt_create(4, 5, 0);          // replaces graph 2 (least recently used)
    mt_kill(2);
    mt_create(2, 3, 1);          // graph 3 still resident
    mt_kill(2);
    mt_create(2, 2, 0);          // graph 2 was the one replaced
    if (n_create_load == l0 + 2 && n_create_res == r0 + 1) n_lru++;
    for (int p = 1; p <= 4; p++) mt_switch_run(p, 40, 1);
    expect_true(mt_rec_seen == 0, "mt graphs after replacement");
    // interrupts: graph 4 (resident through process 3) is the handler's
    mt_wr(REG_IRQ, 32'h0000_0401);
    for (int k = 0; k < 3; k++) begin
      int c;
      bit e;
      mt_switch_run(1 + k, 15, 1);
      @(negedge clk);
      mt_irq = 1;
      #1;
      c = 0;
      while (mt_stall && c < 100) begin @(negedge clk); c++; end
      mt_irq = 0;
      if (c > 0 && c <= 17) n_stall++;
      expect_true(c > 0 && c <= 17, $sformatf("mt stall for the handler switch: %0d cycles", c));
      sg[31] = 4; sj[31] = -1;
      mt_run(31, 25);
      mt_op(OP_SWITCH, 1 + k, 0, c, e);
      mt_wr(REG_ENABLE, 1);
      mt_run(1 + k, 15);
      if (mt_rec_seen == 0) n_irq_follow++;
    end
    expect_true(mt_rec_seen == 0, "mt handler and interrupted processes followed");
    // attack
    mt_switch_run(4, 10, 1);
    @(negedge clk);
    mt_instr_valid = 1; mt_instr = sp[sg[4]].bad_after(sj[4]);
    @(negedge clk);
    mt_instr_valid = 0;
    if (mt_recovery) n_recovery++;
    @(negedge clk);
    expect_true(mt_reg_rdata[3] && !mt_reg_rdata[0], "mt attack flagged, monitoring off");
  endtask

  // ================================================= main
  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mc_core_pc[0] = 0; mc_core_pc[1] = 0; mc_core_instr[0] = 0; mc_core_instr[1] = 0;
    for (int g = 1; g <= 5; g++) begin
      sp[g] = new(50 + 15 * g, 3 + g, 32'h0);
      sp[g].build(0);
      pool[g][0] = 32'(sp[g].rows.size());
      foreach (sp[g].rows[r]) pool[g][r + 1] = sp[g].rows[r];
    end
    for (int t = 0; t < 2; t++) begin
      mp[t] = new(150, 6 + t, 32'h4000_0000 + 32'h0010_0000 * 32'(t));
      mp[t].build(1);
      mj[t] = -1;
      for (int r = 0; r < mp[t].rows.size(); r++) begin
        @(negedge clk);
        mc_ld_we = 1; mc_ld_gm = t[0]; mc_ld_addr = 14'(r); mc_ld_data = mp[t].rows[r];
      end
    end
    @(negedge clk);
    mc_ld_we = 0;
    rst_n = 1;

    fork
      mc_side();
      mt_side();
    join

    $display("COUNT mc: task_init=%0d ctx_sw=%0d migration=%0d pause=%0d resume=%0d annul=%0d job_done=%0d stop=%0d irq=%0d terminate=%0d instr=%0d",
             n_task_init, n_ctx_sw, n_migration, n_pause, n_resume, n_annul, n_job_done,
             n_stop, n_irq, n_terminate, n_mc_instr);
    $display("COUNT mt: create_load=%0d create_resident=%0d switch_reload=%0d switch_noreload=%0d lru=%0d kill=%0d recovery=%0d instr=%0d irq_follow=%0d stall=%0d",
             n_create_load, n_create_res, n_sw_reload, n_sw_noreload, n_lru, n_kill,
             n_recovery, n_mt_instr, n_irq_follow, n_stall);
    expect_true(n_task_init > 0, "mechanism: task init");
    expect_true(n_ctx_sw > 0, "mechanism: context switch");
    expect_true(n_migration > 0, "mechanism: migration");
    expect_true(n_pause > 0, "mechanism: pause on trap");
    expect_true(n_resume > 0, "mechanism: resume at saved PC");
    expect_true(n_annul > 0, "mechanism: annulled instruction ignored");
    expect_true(n_job_done > 0, "mechanism: job done");
    expect_true(n_stop > 0, "mechanism: unmonitored task stops IVSL");
    expect_true(n_irq > 0, "mechanism: attack interrupt");
    expect_true(n_terminate > 0, "mechanism: terminate");
    expect_true(n_create_load > 0, "mechanism: create with graph load");
    expect_true(n_create_res > 0, "mechanism: create with resident graph");
    expect_true(n_sw_reload > 0, "mechanism: switch with base reload");
    expect_true(n_sw_noreload > 0, "mechanism: switch without base reload");
    expect_true(n_lru > 0, "mechanism: LRU graph replacement");
    expect_true(n_kill > 0, "mechanism: process terminate");
    expect_true(n_recovery > 0, "mechanism: recovery on attack");
    expect_true(n_irq_follow > 0, "mechanism: interrupt handler graph followed");
    expect_true(n_stall > 0, "mechanism: processor stalled by the monitor");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
