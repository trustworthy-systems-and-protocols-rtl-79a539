// ivsl: instruction validation and sequencing logic for one CPU core.
//
// The IVSL taps the core's retired instructions (PC and instruction word) and
// walks the monitoring graph of the task running on that core. It is always
// in one of three states:
//   stopped - the core runs something that is not monitored;
//   paused  - a monitored task is scheduled but not executing its own code;
//             the IVSL waits for an instruction whose PC equals the task's
//             resume PC;
//   active  - every instruction is hashed and checked against the current
//             graph entry; a match moves the graph pointer, a miss raises
//             `discrepancy` and stops monitoring.
// A trap seen while active is a pause trigger: the resume PC (PC of the last
// checked instruction + 4) and the graph pointer are saved and the IVSL
// pauses. Annulled instructions are ignored.
//
// A table of NENT entries {PID, GID, graph PTR, resume PC} keeps the state of
// every task the IVSL is responsible for; a vacant entry has PID all ones.
// Commands arrive from the coordinator on the internal bus (`ib_valid`,
// `ib_word`, addressed by `dst`, or by `src` for a record retrieval):
//   TASK_INIT - create an entry (graph pointer at the start entry) and stop;
//   CTX_SW    - save the current task, read rows 0..7 of the graph (sixteen
//               group base addresses) and row 8 (start PC), restore the
//               task's pointer and resume PC, then pause;
//   STOP      - save the current task and stop;
//   RETRIEVE  - task migration. The source IVSL puts three words on its
//               transfer output (GID with a "resume PC valid" flag in bit
//               31, resume PC, graph PTR), each with `xout_valid`, then frees
//               the entry. The destination IVSL creates an entry for the PID,
//               takes the three words from `xin_*` and performs a local
//               context switch;
//   FREE      - remove the task's entry (process termination).
// `ack` pulses for one cycle when a command addressed to this IVSL by `dst`
// is complete. A context switch takes 12 cycles from the command.
// `job_done` is raised when the walk reaches an entry with no successors
// (the program's last instruction) and held until the next command.
//
// Graph memory: `gm_addr` is a synchronous-read address. Outside commands it
// carries the pointer the next cycle will need (the updated pointer after a
// match), so `gm_rdata` always holds the entry for the current pointer and
// one instruction can be checked per cycle.
//
// From the document: the three states and their triggers, the table fields,
// the 16 group registers and start PC in the graph, resume PC = PC + 4, the
// migration order (PID first, then the saved state, then the source frees
// its entry with PID 0xFFFFFFFF), the discrepancy and done flags. This
// design's own choices: the encodings, the graph header rows, the "stop"
// command for unmonitored tasks, and that traps and annulled instructions
// are the pause triggers (the document leaves them to the CPU architecture).
// Calls into functions marked trusted are not handled: the document gives no
// encoding for the mark.
// Lint note: the hash unit's binary hash output is left open; only the
// one-hot form is compared.
module ivsl
  import mon_pkg::*;
#(
  parameter int unsigned ID   = 0,
  parameter int unsigned NENT = 4,
  parameter int unsigned AW   = 14,
  parameter int unsigned IW   = (NENT > 1) ? $clog2(NENT) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // instruction tap from the core
  input  logic              instr_valid,
  input  logic [31:0]       pc,
  input  logic [31:0]       instr,
  input  logic              annul,
  input  logic              trap,
  // internal bus: command from the coordinator
  input  logic              ib_valid,
  input  ib_word_t          ib_word,
  // internal bus: record transfer
  input  logic              xin_valid,
  input  logic [31:0]       xin_data,
  output logic              xout_valid,
  output logic [31:0]       xout_data,
  output logic              ack,
  // graph memory read port (through the crossbar)
  output logic [AW-1:0]     gm_addr,
  input  logic [31:0]       gm_rdata,
  // status
  output logic              discrepancy,
  output logic              job_done,
  output mon_state_e        state,
  output logic [PID_W-1:0]  cur_pid
);

  // ---------------------------------------------------------------- table
  logic [PID_W-1:0] t_pid  [NENT];
  logic [7:0]       t_gid  [NENT];
  logic [AW-1:0]    t_ptr  [NENT];
  logic [31:0]      t_rpc  [NENT];
  logic             t_rpcv [NENT];

  typedef enum logic [2:0] {
    C_IDLE, C_LOAD, C_XSEND, C_XRECV, C_FREE
  } ctl_e;

  ctl_e             ctl_q;
  mon_state_e       st_q;
  logic [IW-1:0]    cur_q;       // table index of the task being tracked
  logic [AW-1:0]    ptr_q;       // graph pointer (entry of last instruction)
  logic [31:0]      rpc_q;       // resume PC
  logic [31:0]      last_pc_q;   // PC of the last checked instruction
  logic [3:0]       cnt_q;       // header row / transfer word counter
  logic [IW-1:0]    xidx_q;      // entry being sent or received
  logic             disc_q, done_q;

  // ------------------------------------------------------------ datapath
  graph_entry_t         entry;
  logic [ONEHOT_W-1:0]  onehot;
  logic                 match;
  logic [4:0]           fanout;
  logic [3:0]           position, group;
  logic [GADDR_W-1:0]   gbase;
  logic [AW-1:0]        seq_next;

  assign entry = graph_entry_t'(gm_rdata);

  hash_unit u_hash (.instr(instr), .hash(), .onehot(onehot));

  hash_compare u_cmp (
    .onehot(onehot), .valid_hash(entry.valid_hash),
    .match(match), .fanout(fanout), .position(position), .group(group)
  );

  logic             rf_we;
  logic [2:0]       rf_row;

  base_addr_rf u_rf (
    .clk(clk), .rst_n(rst_n), .we(rf_we), .wr_row(rf_row),
    .wr_data(gm_rdata), .rd_sel(group), .rd_base(gbase)
  );

  seq_logic #(.AW(AW)) u_seq (
    .group_base(gbase), .next_state(entry.next_state),
    .fanout(fanout), .position(position), .next_addr(seq_next)
  );

  // An instruction is checked when it is retired by the core, not annulled,
  // the IVSL is not busy with a command, and either the IVSL is active (and
  // the instruction does not trap) or it is paused and the PC is the resume PC.
  logic inst_ok, resume_hit, check, pause_evt, terminal;
  assign terminal   = (st_q == MON_ACTIVE) && (ctl_q == C_IDLE) &&
                      (entry.valid_hash == '0);
  assign inst_ok    = instr_valid && !annul && (ctl_q == C_IDLE) && !terminal;
  assign resume_hit = inst_ok && (st_q == MON_PAUSED) && (pc == rpc_q);
  assign pause_evt  = inst_ok && (st_q == MON_ACTIVE) && trap;
  assign check      = (inst_ok && (st_q == MON_ACTIVE) && !trap) || resume_hit;

  // ------------------------------------------------------------ commands
  logic cmd_here, cmd_src;
  assign cmd_here = ib_valid && (ctl_q == C_IDLE) && (32'(ib_word.dst) == ID);
  assign cmd_src  = ib_valid && (ctl_q == C_IDLE) && (32'(ib_word.src) == ID)
                    && (ib_word.cmd == IB_RETRIEVE);

  // table lookups
  logic          hit_found, vac_found;
  logic [IW-1:0] hit_idx, vac_idx;
  always_comb begin
    hit_found = 1'b0; hit_idx = '0;
    vac_found = 1'b0; vac_idx = '0;
    for (int i = NENT-1; i >= 0; i--) begin
      if (t_pid[i] == ib_word.data && t_pid[i] != PID_VACANT) begin
        hit_found = 1'b1; hit_idx = IW'(i);
      end
      if (t_pid[i] == PID_VACANT) begin
        vac_found = 1'b1; vac_idx = IW'(i);
      end
    end
  end

  // graph memory address
  always_comb begin
    rf_we  = 1'b0;
    rf_row = cnt_q[2:0] - 3'd1;
    if (ctl_q == C_LOAD) begin
      gm_addr = AW'(cnt_q);
      rf_we   = (cnt_q >= 4'd1) && (cnt_q <= 4'(HDR_ROWS));
    end else if (check && match) begin
      gm_addr = seq_next;
    end else begin
      gm_addr = ptr_q;
    end
  end

  // save the state of the task being tracked into its table entry
  task automatic save_current();
    if (st_q != MON_STOPPED) begin
      t_ptr[cur_q]  <= ptr_q;
      t_rpc[cur_q]  <= (st_q == MON_ACTIVE) ? last_pc_q + 32'd4 : rpc_q;
      t_rpcv[cur_q] <= 1'b1;
    end
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NENT; i++) begin
        t_pid[i]  <= PID_VACANT;
        t_gid[i]  <= '0;
        t_ptr[i]  <= '0;
        t_rpc[i]  <= '0;
        t_rpcv[i] <= 1'b0;
      end
      ctl_q      <= C_IDLE;
      st_q       <= MON_STOPPED;
      cur_q      <= '0;
      ptr_q      <= '0;
      rpc_q      <= '0;
      last_pc_q  <= '0;
      cnt_q      <= '0;
      xidx_q     <= '0;
      disc_q     <= 1'b0;
      done_q     <= 1'b0;
      ack        <= 1'b0;
      xout_valid <= 1'b0;
      xout_data  <= '0;
    end else begin
      ack        <= 1'b0;
      xout_valid <= 1'b0;

      // ---------------------------------------------- monitoring walk
      if (terminal) begin
        // the walk has reached the entry of the program's last instruction
        done_q <= 1'b1;
        st_q   <= MON_STOPPED;
      end else if (check) begin
        last_pc_q <= pc;
        if (match) begin
          ptr_q <= seq_next;
          st_q  <= MON_ACTIVE;
        end else begin
          disc_q <= 1'b1;
          st_q   <= MON_STOPPED;
        end
      end else if (pause_evt) begin
        rpc_q <= last_pc_q + 32'd4;
        st_q  <= MON_PAUSED;
      end

      // ---------------------------------------------- command sequencer
      unique case (ctl_q)
        C_IDLE: begin
          if (cmd_src) begin
            // source side of a migration
            if (hit_found) begin
              if (st_q != MON_STOPPED && cur_q == hit_idx) begin
                save_current();
                st_q <= MON_STOPPED;
              end
              xidx_q <= hit_idx;
              cnt_q  <= '0;
              ctl_q  <= C_XSEND;
            end
          end else if (cmd_here) begin
            disc_q <= 1'b0;
            done_q <= 1'b0;
            unique case (ib_word.cmd)
              IB_TASK_INIT: begin
                save_current();
                st_q <= MON_STOPPED;
                if (vac_found) begin
                  t_pid[vac_idx]  <= ib_word.data;
                  t_gid[vac_idx]  <= ib_word.gid;
                  t_ptr[vac_idx]  <= AW'(MC_START_ROW);
                  t_rpcv[vac_idx] <= 1'b0;
                end
                ack <= 1'b1;
              end
              IB_CTX_SW: begin
                save_current();
                st_q <= MON_STOPPED;
                if (hit_found) begin
                  cur_q <= hit_idx;
                  cnt_q <= '0;
                  ctl_q <= C_LOAD;
                end else begin
                  ack <= 1'b1;
                end
              end
              IB_STOP: begin
                save_current();
                st_q <= MON_STOPPED;
                ack  <= 1'b1;
              end
              IB_RETRIEVE: begin
                // destination side: create the entry, then wait for the data
                save_current();
                st_q <= MON_STOPPED;
                if (vac_found) begin
                  t_pid[vac_idx] <= ib_word.data;
                  xidx_q <= vac_idx;
                  cnt_q  <= '0;
                  ctl_q  <= C_XRECV;
                end else begin
                  ack <= 1'b1;
                end
              end
              IB_FREE: begin
                if (hit_found) begin
                  t_pid[hit_idx] <= PID_VACANT;
                  if (cur_q == hit_idx) st_q <= MON_STOPPED;
                end
                ack <= 1'b1;
              end
              default: ack <= 1'b1;
            endcase
          end
        end

        C_LOAD: begin
          // cycle k presents row k; row k-1's data is in gm_rdata
          cnt_q <= cnt_q + 4'd1;
          if (cnt_q == 4'(MC_PC_ROW + 1)) begin
            rpc_q <= t_rpcv[cur_q] ? t_rpc[cur_q] : gm_rdata;
            ptr_q <= t_ptr[cur_q];
            ctl_q <= C_FREE;
          end
        end

        C_FREE: begin
          // one cycle with gm_addr = restored pointer primes the read data
          st_q  <= MON_PAUSED;
          ctl_q <= C_IDLE;
          ack   <= 1'b1;
        end

        C_XSEND: begin
          xout_valid <= 1'b1;
          cnt_q      <= cnt_q + 4'd1;
          unique case (cnt_q)
            4'd0:    xout_data <= {t_rpcv[xidx_q], 23'd0, t_gid[xidx_q]};
            4'd1:    xout_data <= t_rpc[xidx_q];
            default: xout_data <= 32'(t_ptr[xidx_q]);
          endcase
          if (cnt_q == 4'd2) begin
            t_pid[xidx_q] <= PID_VACANT;
            ctl_q         <= C_IDLE;
          end
        end

        C_XRECV: begin
          if (xin_valid) begin
            cnt_q <= cnt_q + 4'd1;
            unique case (cnt_q)
              4'd0: begin
                t_gid[xidx_q]  <= xin_data[7:0];
                t_rpcv[xidx_q] <= xin_data[31];
              end
              4'd1: t_rpc[xidx_q] <= xin_data;
              default: begin
                t_ptr[xidx_q] <= AW'(xin_data);
                // local context switch to the migrated task
                cur_q <= xidx_q;
                cnt_q <= '0;
                ctl_q <= C_LOAD;
              end
            endcase
          end
        end

        default: ctl_q <= C_IDLE;
      endcase
    end
  end

  assign discrepancy = disc_q;
  assign job_done    = done_q;
  assign state       = st_q;
  assign cur_pid     = t_pid[cur_q];

endmodule
