// mc_monitor: hardware monitor for a multi-core processor.
//
// One IVSL per core follows that core's instruction stream; a coordinator
// talks to the operating system and to the IVSLs over a monitor-internal
// bus that the cores cannot reach; a crossbar connects each IVSL to the
// graph memory of the program it is following; NGM graph memories hold one
// monitoring graph each. Graphs are written through the `ld_*` port by a
// secure graph loading engine outside this block.
//
// Interfaces:
//   core_*     per-core instruction tap: retired-instruction strobe, PC,
//              instruction word, annul and trap flags;
//   cpu_*      command port of the monitor driver: a one-cycle `cpu_valid`
//              strobe while `cpu_busy` is low, finished by `cpu_done`;
//   irq        one interrupt line per core, high while that core's IVSL has
//              seen a discrepancy; `attack_pid` is the PID under attack;
//   ld_*       graph memory write port (memory index, row, data).
// Record transfers during migration use the transfer output of the IVSL the
// coordinator grants the bus to. Counted from the clock edge that samples
// `cpu_valid` to the edge that raises `cpu_done`, a context switch takes 14
// cycles and a migration 18.
// The structure (coordinator, IVSL per core, crossbar, graph memory array,
// separate loading engine) follows the document; the graph memory size
// default comes from its resource table (303,104 bits = 9,472 rows of 32
// bits).
module mc_monitor
  import mon_pkg::*;
#(
  parameter int unsigned NCORE    = 2,
  parameter int unsigned NGM      = 2,
  parameter int unsigned GM_DEPTH = 9472,
  parameter int unsigned AW       = 14,
  parameter int unsigned IV_NENT  = 4,
  parameter int unsigned CO_NENT  = 8,
  parameter int unsigned SW       = (NGM > 1) ? $clog2(NGM) : 1,
  parameter int unsigned CW       = (NCORE > 1) ? $clog2(NCORE) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // instruction taps
  input  logic [NCORE-1:0]  core_valid,
  input  logic [31:0]       core_pc    [NCORE],
  input  logic [31:0]       core_instr [NCORE],
  input  logic [NCORE-1:0]  core_annul,
  input  logic [NCORE-1:0]  core_trap,
  // monitor driver command port
  input  logic              cpu_valid,
  input  cpu_cmd_e          cpu_cmd,
  input  logic [PID_W-1:0]  cpu_pid,
  input  logic [7:0]        cpu_gid,
  input  logic [CW-1:0]     cpu_core,
  output logic              cpu_busy,
  output logic              cpu_done,
  output logic              cpu_err,
  // attack reporting
  output logic [NCORE-1:0]  irq,
  output logic [PID_W-1:0]  attack_pid [NCORE],
  // status
  output logic [NCORE-1:0]  job_done,
  output mon_state_e        ivsl_state [NCORE],
  // graph loading
  input  logic              ld_we,
  input  logic [SW-1:0]     ld_gm,
  input  logic [AW-1:0]     ld_addr,
  input  logic [31:0]       ld_data
);

  logic              ib_valid;
  ib_word_t          ib_word;
  logic [CW-1:0]     grant;
  logic [NCORE-1:0]  ivsl_ack, ivsl_disc;
  logic [PID_W-1:0]  ivsl_pid [NCORE];
  logic [SW-1:0]     xbar_sel [NCORE];
  logic [NCORE-1:0]  xout_valid;
  logic [31:0]       xout_data [NCORE];
  logic [AW-1:0]     iv_addr   [NCORE];
  logic [31:0]       iv_rdata  [NCORE];
  logic [AW-1:0]     mem_raddr [NGM][NCORE];
  logic [31:0]       mem_rdata [NGM][NCORE];

  coordinator #(.NCORE(NCORE), .NENT(CO_NENT), .NGM(NGM)) u_coord (
    .clk(clk), .rst_n(rst_n),
    .cpu_valid(cpu_valid), .cpu_cmd(cpu_cmd), .cpu_pid(cpu_pid),
    .cpu_gid(cpu_gid), .cpu_core(cpu_core),
    .cpu_busy(cpu_busy), .cpu_done(cpu_done), .cpu_err(cpu_err),
    .ib_valid(ib_valid), .ib_word(ib_word), .grant(grant),
    .ivsl_ack(ivsl_ack), .xbar_sel(xbar_sel),
    .ivsl_disc(ivsl_disc), .ivsl_pid(ivsl_pid),
    .irq(irq), .attack_pid(attack_pid)
  );

  // transfer bus: driven by the IVSL holding the grant
  logic        xbus_valid;
  logic [31:0] xbus_data;
  assign xbus_valid = xout_valid[grant];
  assign xbus_data  = xout_data[grant];

  for (genvar c = 0; c < NCORE; c++) begin : g_ivsl
    ivsl #(.ID(c), .NENT(IV_NENT), .AW(AW)) u_ivsl (
      .clk(clk), .rst_n(rst_n),
      .instr_valid(core_valid[c]), .pc(core_pc[c]), .instr(core_instr[c]),
      .annul(core_annul[c]), .trap(core_trap[c]),
      .ib_valid(ib_valid), .ib_word(ib_word),
      .xin_valid(xbus_valid), .xin_data(xbus_data),
      .xout_valid(xout_valid[c]), .xout_data(xout_data[c]),
      .ack(ivsl_ack[c]),
      .gm_addr(iv_addr[c]), .gm_rdata(iv_rdata[c]),
      .discrepancy(ivsl_disc[c]), .job_done(job_done[c]),
      .state(ivsl_state[c]), .cur_pid(ivsl_pid[c])
    );
  end

  graph_xbar #(.NIV(NCORE), .NGM(NGM), .AW(AW)) u_xbar (
    .sel(xbar_sel), .iv_addr(iv_addr), .iv_rdata(iv_rdata),
    .mem_raddr(mem_raddr), .mem_rdata(mem_rdata)
  );

  for (genvar m = 0; m < NGM; m++) begin : g_mem
    graph_mem #(.DEPTH(GM_DEPTH), .AW(AW), .NRD(NCORE)) u_mem (
      .clk(clk),
      .we(ld_we && (32'(ld_gm) == m)), .waddr(ld_addr), .wdata(ld_data),
      .raddr(mem_raddr[m]), .rdata(mem_rdata[m])
    );
  end

endmodule
