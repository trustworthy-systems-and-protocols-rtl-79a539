// coordinator: the multi-core monitor's link between the operating system
// and the per-core IVSLs.
//
// The CPU cores (through the monitor driver) issue one command at a time:
// `cpu_valid` with `cpu_cmd`, the PID, the graph ID and the core ID. While a
// command is handled `cpu_busy` is high; `cpu_done` pulses when it is
// finished and `cpu_err` with it if it could not be carried out (table full,
// graph ID with no graph memory).
//   TASK_INIT  - record {PID, GID, core} in the table (NENT entries) and
//                forward the command to that core's IVSL;
//   CTX_SW     - a PID not in the table is not monitored: the core's IVSL is
//                told to stop. A PID on the same core as recorded: the
//                crossbar is pointed at its graph memory and the IVSL does a
//                context switch. A PID recorded on another core has migrated:
//                the coordinator issues RETRIEVE {source, destination, PID},
//                grants the transfer bus to the source IVSL, and updates the
//                table when the destination IVSL acknowledges;
//   TERMINATE  - the entry is removed here and in the IVSL.
// Each command is sent as a one-cycle word on the internal bus; the
// coordinator then waits for `ivsl_ack` of the IVSL concerned.
// Attacks: each IVSL's discrepancy drives an interrupt line of its own, so
// only the core under attack is interrupted, and `attack_pid` gives the PID
// the kernel's handler needs.
// The table (PID, GID, CPU ID), the command flow and one interrupt line per
// IVSL follow the document. The command encodings, the graph memory chosen
// as the graph ID itself, the stop command and the error output are this
// design's choices.
module coordinator
  import mon_pkg::*;
#(
  parameter int unsigned NCORE = 2,
  parameter int unsigned NENT  = 8,
  parameter int unsigned NGM   = 2,
  parameter int unsigned SW    = (NGM > 1) ? $clog2(NGM) : 1,
  parameter int unsigned CW    = (NCORE > 1) ? $clog2(NCORE) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // CPU side (monitor driver)
  input  logic              cpu_valid,
  input  cpu_cmd_e          cpu_cmd,
  input  logic [PID_W-1:0]  cpu_pid,
  input  logic [7:0]        cpu_gid,
  input  logic [CW-1:0]     cpu_core,
  output logic              cpu_busy,
  output logic              cpu_done,
  output logic              cpu_err,
  // internal bus
  output logic              ib_valid,
  output ib_word_t          ib_word,
  output logic [CW-1:0]     grant,
  input  logic [NCORE-1:0]  ivsl_ack,
  // crossbar control
  output logic [SW-1:0]     xbar_sel [NCORE],
  // attack reporting
  input  logic [NCORE-1:0]  ivsl_disc,
  input  logic [PID_W-1:0]  ivsl_pid [NCORE],
  output logic [NCORE-1:0]  irq,
  output logic [PID_W-1:0]  attack_pid [NCORE]
);

  localparam int unsigned EW = (NENT > 1) ? $clog2(NENT) : 1;

  logic             e_valid [NENT];
  logic [PID_W-1:0] e_pid   [NENT];
  logic [7:0]       e_gid   [NENT];
  logic [CW-1:0]    e_cpu   [NENT];

  typedef enum logic [1:0] {S_IDLE, S_WAIT} st_e;
  st_e            st_q;
  logic [CW-1:0]  wait_core_q;
  logic [EW-1:0]  upd_idx_q;
  logic           upd_q;      // move the entry to wait_core_q on ack

  logic          hit, vac;
  logic [EW-1:0] hit_idx, vac_idx;

  always_comb begin
    hit = 1'b0; hit_idx = '0;
    vac = 1'b0; vac_idx = '0;
    for (int i = NENT-1; i >= 0; i--) begin
      if (e_valid[i] && e_pid[i] == cpu_pid) begin
        hit = 1'b1; hit_idx = EW'(i);
      end
      if (!e_valid[i]) begin
        vac = 1'b1; vac_idx = EW'(i);
      end
    end
  end

  function automatic ib_word_t mk_word(ib_cmd_e c, logic [CW-1:0] s,
                                       logic [CW-1:0] d, logic [31:0] pid,
                                       logic [7:0] g);
    ib_word_t w;
    w.gid  = g;
    w.cmd  = c;
    w.dst  = CORE_W'(d);
    w.src  = CORE_W'(s);
    w.data = pid;
    return w;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NENT; i++) begin
        e_valid[i] <= 1'b0;
        e_pid[i]   <= '0;
        e_gid[i]   <= '0;
        e_cpu[i]   <= '0;
      end
      for (int c = 0; c < NCORE; c++) xbar_sel[c] <= '0;
      st_q        <= S_IDLE;
      wait_core_q <= '0;
      upd_idx_q   <= '0;
      upd_q       <= 1'b0;
      ib_valid    <= 1'b0;
      ib_word     <= '0;
      grant       <= '0;
      cpu_done    <= 1'b0;
      cpu_err     <= 1'b0;
    end else begin
      ib_valid <= 1'b0;
      cpu_done <= 1'b0;
      cpu_err  <= 1'b0;
      unique case (st_q)
        S_IDLE: begin
          if (cpu_valid) begin
            unique case (cpu_cmd)
              CMD_TASK_INIT: begin
                if (!vac || 32'(cpu_gid) >= NGM) begin
                  cpu_done <= 1'b1;
                  cpu_err  <= 1'b1;
                end else begin
                  e_valid[vac_idx] <= 1'b1;
                  e_pid[vac_idx]   <= cpu_pid;
                  e_gid[vac_idx]   <= cpu_gid;
                  e_cpu[vac_idx]   <= cpu_core;
                  ib_valid    <= 1'b1;
                  ib_word     <= mk_word(IB_TASK_INIT, cpu_core, cpu_core,
                                         cpu_pid, cpu_gid);
                  wait_core_q <= cpu_core;
                  upd_q       <= 1'b0;
                  st_q        <= S_WAIT;
                end
              end
              CMD_CTX_SW: begin
                ib_valid    <= 1'b1;
                wait_core_q <= cpu_core;
                st_q        <= S_WAIT;
                upd_q       <= 1'b0;
                if (!hit) begin
                  ib_word <= mk_word(IB_STOP, cpu_core, cpu_core, cpu_pid, 8'd0);
                end else begin
                  xbar_sel[cpu_core] <= SW'(e_gid[hit_idx]);
                  if (e_cpu[hit_idx] == cpu_core) begin
                    ib_word <= mk_word(IB_CTX_SW, cpu_core, cpu_core, cpu_pid,
                                       e_gid[hit_idx]);
                  end else begin
                    // process migration
                    ib_word   <= mk_word(IB_RETRIEVE, e_cpu[hit_idx], cpu_core,
                                         cpu_pid, e_gid[hit_idx]);
                    grant     <= e_cpu[hit_idx];
                    upd_idx_q <= hit_idx;
                    upd_q     <= 1'b1;
                  end
                end
              end
              CMD_TERMINATE: begin
                if (hit) begin
                  e_valid[hit_idx] <= 1'b0;
                  ib_valid    <= 1'b1;
                  ib_word     <= mk_word(IB_FREE, e_cpu[hit_idx], e_cpu[hit_idx],
                                         cpu_pid, e_gid[hit_idx]);
                  wait_core_q <= e_cpu[hit_idx];
                  upd_q       <= 1'b0;
                  st_q        <= S_WAIT;
                end else begin
                  cpu_done <= 1'b1;
                end
              end
              default: cpu_done <= 1'b1;
            endcase
          end
        end
        S_WAIT: begin
          if (ivsl_ack[wait_core_q]) begin
            if (upd_q) e_cpu[upd_idx_q] <= wait_core_q;
            cpu_done <= 1'b1;
            st_q     <= S_IDLE;
          end
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  assign cpu_busy = (st_q != S_IDLE);

  always_comb begin
    for (int c = 0; c < NCORE; c++) begin
      irq[c]        = ivsl_disc[c];
      attack_pid[c] = ivsl_disc[c] ? ivsl_pid[c] : '0;
    end
  end

endmodule
