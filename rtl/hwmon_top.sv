// hwmon_top: the two instruction-level hardware monitors side by side.
//
// mc  - the multi-core monitor (mc_monitor): coordinator, one IVSL per core,
//       crossbar and graph memory array, for a multi-core processor running
//       a full operating system;
// mt  - the single-core multi-task monitor (mthm): processor interface,
//       bookkeeping tables, graph slots and DMA from a graph pool, for an
//       embedded processor running a real-time operating system.
// The two share the hash, comparison, sequencing and base-register blocks
// but serve different processors, so each keeps its own ports: mc_* for the
// multi-core monitor and mt_* for the single-core one. mt_irq is the
// embedded processor's interrupt line; mt_stall (hold the processor while
// the monitor switches to the handler's graph), mt_recovery (to the
// interrupt controller) and mt_cpu_reset (to the reset pin, on an attack
// inside the handler) go back to it. Timing is that of each monitor; the
// top adds no registers. The processors, the
// secure graph loading engine and the graph pool are outside this design.
module hwmon_top
  import mon_pkg::*;
#(
  parameter int unsigned NCORE       = 2,
  parameter int unsigned NGM         = 2,
  parameter int unsigned MC_GM_DEPTH = 9472,
  parameter int unsigned MT_DEPTH    = 16384,
  parameter int unsigned MT_NSLOT    = 4,
  parameter int unsigned MT_SLOT_ROWS = 4096,
  parameter int unsigned MT_NPROC    = 4,
  parameter int unsigned AW          = 14,
  parameter int unsigned SW          = (NGM > 1) ? $clog2(NGM) : 1,
  parameter int unsigned CW          = (NCORE > 1) ? $clog2(NCORE) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // ---- multi-core monitor
  input  logic [NCORE-1:0]  mc_core_valid,
  input  logic [31:0]       mc_core_pc    [NCORE],
  input  logic [31:0]       mc_core_instr [NCORE],
  input  logic [NCORE-1:0]  mc_core_annul,
  input  logic [NCORE-1:0]  mc_core_trap,
  input  logic              mc_cpu_valid,
  input  cpu_cmd_e          mc_cpu_cmd,
  input  logic [PID_W-1:0]  mc_cpu_pid,
  input  logic [7:0]        mc_cpu_gid,
  input  logic [CW-1:0]     mc_cpu_core,
  output logic              mc_cpu_busy,
  output logic              mc_cpu_done,
  output logic              mc_cpu_err,
  output logic [NCORE-1:0]  mc_irq,
  output logic [PID_W-1:0]  mc_attack_pid [NCORE],
  output logic [NCORE-1:0]  mc_job_done,
  output mon_state_e        mc_ivsl_state [NCORE],
  input  logic              mc_ld_we,
  input  logic [SW-1:0]     mc_ld_gm,
  input  logic [AW-1:0]     mc_ld_addr,
  input  logic [31:0]       mc_ld_data,
  // ---- single-core multi-task monitor
  input  logic              mt_instr_valid,
  input  logic [31:0]       mt_instr,
  output logic              mt_recovery,
  output logic              mt_cpu_reset,
  input  logic              mt_irq,
  output logic              mt_stall,
  input  logic              mt_reg_we,
  input  logic [2:0]        mt_reg_addr,
  input  logic [31:0]       mt_reg_wdata,
  output logic [31:0]       mt_reg_rdata,
  output logic              mt_pool_rd,
  output logic [4:0]        mt_pool_gid,
  output logic [AW-1:0]     mt_pool_addr,
  input  logic [31:0]       mt_pool_rdata
);

  mc_monitor #(
    .NCORE(NCORE), .NGM(NGM), .GM_DEPTH(MC_GM_DEPTH), .AW(AW)
  ) u_mc (
    .clk(clk), .rst_n(rst_n),
    .core_valid(mc_core_valid), .core_pc(mc_core_pc),
    .core_instr(mc_core_instr), .core_annul(mc_core_annul),
    .core_trap(mc_core_trap),
    .cpu_valid(mc_cpu_valid), .cpu_cmd(mc_cpu_cmd), .cpu_pid(mc_cpu_pid),
    .cpu_gid(mc_cpu_gid), .cpu_core(mc_cpu_core),
    .cpu_busy(mc_cpu_busy), .cpu_done(mc_cpu_done), .cpu_err(mc_cpu_err),
    .irq(mc_irq), .attack_pid(mc_attack_pid),
    .job_done(mc_job_done), .ivsl_state(mc_ivsl_state),
    .ld_we(mc_ld_we), .ld_gm(mc_ld_gm), .ld_addr(mc_ld_addr),
    .ld_data(mc_ld_data)
  );

  mthm #(
    .AW(AW), .DEPTH(MT_DEPTH), .NSLOT(MT_NSLOT), .SLOT_ROWS(MT_SLOT_ROWS),
    .NPROC(MT_NPROC), .PIDW(5), .GID_W(5)
  ) u_mt (
    .clk(clk), .rst_n(rst_n),
    .instr_valid(mt_instr_valid), .instr(mt_instr), .recovery(mt_recovery), .cpu_reset(mt_cpu_reset),
    .irq(mt_irq), .stall(mt_stall),
    .reg_we(mt_reg_we), .reg_addr(mt_reg_addr), .reg_wdata(mt_reg_wdata),
    .reg_rdata(mt_reg_rdata),
    .pool_rd(mt_pool_rd), .pool_gid(mt_pool_gid), .pool_addr(mt_pool_addr),
    .pool_rdata(mt_pool_rdata)
  );

endmodule
