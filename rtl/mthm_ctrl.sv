// mthm_ctrl: controller of the single-core multi-task hardware monitor.
//
// It holds the three bookkeeping tables and the control FSM:
//   PID addresses + PID to GID binding (NPROC entries: valid, PID, GID and
//   the saved address pointer of each process);
//   GID to frame binding (one entry per graph slot: valid, GID, number of
//   active processes, last-use stamp). Slot s starts at frame s * SLOT_ROWS.
// Operations, started by `op_start` with `op`, `pid` and `gid`:
//   SWITCH - save the running process's address pointer, look up the next
//            process and its graph slot, reload the sixteen base address
//            registers from rows 0..7 of the slot if the graph differs from
//            the previous one, restore the next process's pointer, set done.
//            13 cycles with a base reload, 4 without.
//   CREATE - put {PID, GID, start pointer} in a free process entry. If the
//            graph is not resident, take a free slot or else the least
//            recently used slot with no active processes, and have the DMA
//            copy the graph from the pool before done is set. 3 cycles when
//            the graph is resident.
//   KILL   - free the process entry and decrement the slot's process count.
//   ENTER  - issued by the monitor on an interrupt: save the running
//            process's pointer, select the slot holding graph `gid` (the
//            interrupt handler's, kept resident), reload the base registers
//            if needed and start from that graph's start entry. The handler
//            is not a process: its pointer is not saved, and the next SWITCH
//            restores a process without overwriting any saved pointer.
//            13 cycles with a base reload, 4 without; err if not resident.
// `done` is a level, cleared when the next operation starts; `err` is set
// with it when an operation cannot be completed (no such PID, no free
// entry, no slot that may be replaced).
// While `busy` is high the controller owns the graph memory read port
// (`hdr_rd`, `hdr_addr`) and monitoring is suspended.
// The tables, their fields, the steps of both operations and the LRU choice
// follow the document. Slot placement, the start pointer, the KILL operation
// (the document's active-process count needs one) and leaving the base
// registers alone after a graph load until the next switch are this design's
// choices.
module mthm_ctrl
  import mon_pkg::*;
#(
  parameter int unsigned AW        = 14,
  parameter int unsigned NSLOT     = 4,
  parameter int unsigned SLOT_ROWS = 4096,
  parameter int unsigned NPROC     = 4,
  parameter int unsigned PIDW      = 5,
  parameter int unsigned GID_W     = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             op_start,
  input  mt_op_e           op,
  input  logic [PIDW-1:0]  pid,
  input  logic [GID_W-1:0] gid,
  output logic             busy,
  output logic             done,
  output logic             err,
  // address pointer save / restore
  input  logic [AW-1:0]    cur_ptr,
  output logic             ptr_load,
  output logic [AW-1:0]    ptr_load_val,
  output logic [AW-1:0]    frame,
  output logic             cur_valid,
  output logic             in_handler,
  // header reads into the base address registers
  output logic             hdr_rd,
  output logic [AW-1:0]    hdr_addr,
  output logic             rf_we,
  output logic [2:0]       rf_row,
  // graph loading
  output logic             dma_start,
  output logic [GID_W-1:0] dma_gid,
  output logic [AW-1:0]    dma_frame,
  input  logic             dma_done
);

  localparam int unsigned PW = (NPROC > 1) ? $clog2(NPROC) : 1;
  localparam int unsigned SW = (NSLOT > 1) ? $clog2(NSLOT) : 1;

  // PID addresses / PID to GID binding
  logic             p_valid [NPROC];
  logic [PIDW-1:0]  p_pid   [NPROC];
  logic [GID_W-1:0] p_gid   [NPROC];
  logic [AW-1:0]    p_ptr   [NPROC];
  // GID to frame binding
  logic             g_valid [NSLOT];
  logic [GID_W-1:0] g_gid   [NSLOT];
  logic [PW:0]      g_count [NSLOT];
  logic [7:0]       g_stamp [NSLOT];

  typedef enum logic [2:0] {
    F_IDLE, F_SWITCH, F_HDR, F_RESTORE, F_DMA, F_DONE
  } st_e;
  st_e st_q;

  logic [PW-1:0]    cur_q, nxt_q;
  logic             curv_q;
  logic [GID_W-1:0] cur_gid_q;
  logic             gidv_q;     // base registers hold cur_gid_q's graph
  logic             sys_q;      // following the interrupt handler's graph
  logic             start_q;    // the pending restore is an ENTER
  logic [3:0]       cnt_q;
  logic [7:0]       clock_q;    // LRU time stamp source
  logic [PIDW-1:0]  pid_q;
  logic [GID_W-1:0] gid_q;
  mt_op_e           op_q;

  // ------------------------------------------------------------ lookups
  logic          p_hit, p_vac, g_hit, g_free, g_evict;
  logic [PW-1:0] p_hit_idx, p_vac_idx;
  logic [SW-1:0] g_hit_idx, g_free_idx, g_evict_idx;
  logic [7:0]    best_stamp;

  always_comb begin
    p_hit = 1'b0; p_hit_idx = '0; p_vac = 1'b0; p_vac_idx = '0;
    for (int i = NPROC-1; i >= 0; i--) begin
      if (p_valid[i] && p_pid[i] == pid_q) begin p_hit = 1'b1; p_hit_idx = PW'(i); end
      if (!p_valid[i]) begin p_vac = 1'b1; p_vac_idx = PW'(i); end
    end
    g_hit = 1'b0; g_hit_idx = '0; g_free = 1'b0; g_free_idx = '0;
    for (int s = NSLOT-1; s >= 0; s--) begin
      if (g_valid[s] && g_gid[s] == gid_q) begin g_hit = 1'b1; g_hit_idx = SW'(s); end
      if (!g_valid[s]) begin g_free = 1'b1; g_free_idx = SW'(s); end
    end
    // least recently used slot without active processes
    g_evict = 1'b0; g_evict_idx = '0; best_stamp = '1;
    for (int s = 0; s < NSLOT; s++) begin
      if (g_valid[s] && g_count[s] == '0 &&
          (!g_evict || (clock_q - g_stamp[s]) > (clock_q - best_stamp))) begin
        g_evict = 1'b1; g_evict_idx = SW'(s); best_stamp = g_stamp[s];
      end
    end
  end

  function automatic logic [AW-1:0] slot_frame(logic [SW-1:0] s);
    return AW'(32'(s) * SLOT_ROWS);
  endfunction

  // ------------------------------------------------------------ FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NPROC; i++) begin
        p_valid[i] <= 1'b0; p_pid[i] <= '0; p_gid[i] <= '0; p_ptr[i] <= '0;
      end
      for (int s = 0; s < NSLOT; s++) begin
        g_valid[s] <= 1'b0; g_gid[s] <= '0; g_count[s] <= '0; g_stamp[s] <= '0;
      end
      st_q      <= F_IDLE;
      cur_q     <= '0;
      nxt_q     <= '0;
      curv_q    <= 1'b0;
      cur_gid_q <= '0;
      gidv_q    <= 1'b0;
      sys_q     <= 1'b0;
      start_q   <= 1'b0;
      cnt_q     <= '0;
      clock_q   <= '0;
      pid_q     <= '0;
      gid_q     <= '0;
      op_q      <= OP_NONE;
      done      <= 1'b0;
      err       <= 1'b0;
      frame     <= '0;
    end else begin
      unique case (st_q)
        F_IDLE: begin
          if (op_start) begin
            done  <= 1'b0;
            err   <= 1'b0;
            pid_q <= pid;
            gid_q <= gid;
            op_q  <= op;
            clock_q <= clock_q + 8'd1;
            unique case (op)
              OP_SWITCH, OP_ENTER: begin
                // step 1: save the address pointer of the running process
                if (curv_q && !sys_q) p_ptr[cur_q] <= cur_ptr;
                st_q <= F_SWITCH;
              end
              OP_CREATE: st_q <= F_SWITCH;   // shares the lookup cycle
              OP_KILL:   st_q <= F_SWITCH;
              default:   st_q <= F_DONE;
            endcase
          end
        end

        F_SWITCH: begin
          // table lookups for the registered PID / GID
          unique case (op_q)
            OP_ENTER: begin
              start_q <= 1'b1;
              if (!g_hit) begin
                err  <= 1'b1;
                st_q <= F_DONE;
              end else begin
                frame              <= slot_frame(g_hit_idx);
                g_stamp[g_hit_idx] <= clock_q;
                if (!gidv_q || cur_gid_q != gid_q) begin
                  cnt_q     <= '0;
                  cur_gid_q <= gid_q;
                  gidv_q    <= 1'b1;
                  st_q      <= F_HDR;
                end else begin
                  st_q <= F_RESTORE;
                end
              end
            end
            OP_SWITCH: begin
              start_q <= 1'b0;
              if (!p_hit) begin
                err  <= 1'b1;
                st_q <= F_DONE;
              end else begin
                nxt_q <= p_hit_idx;
                // step 2-4: GID of the next process and its frame
                for (int s = 0; s < NSLOT; s++) begin
                  if (g_valid[s] && g_gid[s] == p_gid[p_hit_idx]) begin
                    frame      <= slot_frame(SW'(s));
                    g_stamp[s] <= clock_q;
                  end
                end
                if (!gidv_q || cur_gid_q != p_gid[p_hit_idx]) begin
                  cnt_q     <= '0;
                  cur_gid_q <= p_gid[p_hit_idx];
                  gidv_q    <= 1'b1;
                  st_q      <= F_HDR;
                end else begin
                  st_q <= F_RESTORE;
                end
              end
            end
            OP_CREATE: begin
              if (!p_vac) begin
                err  <= 1'b1;
                st_q <= F_DONE;
              end else if (g_hit) begin
                p_valid[p_vac_idx]  <= 1'b1;
                p_pid[p_vac_idx]    <= pid_q;
                p_gid[p_vac_idx]    <= gid_q;
                p_ptr[p_vac_idx]    <= AW'(MT_START_ROW);
                g_count[g_hit_idx]  <= g_count[g_hit_idx] + 1'b1;
                g_stamp[g_hit_idx]  <= clock_q;
                st_q <= F_DONE;
              end else if (g_free || g_evict) begin
                g_valid[g_free ? g_free_idx : g_evict_idx] <= 1'b1;
                g_gid[g_free ? g_free_idx : g_evict_idx]   <= gid_q;
                g_count[g_free ? g_free_idx : g_evict_idx] <= (PW+1)'(1);
                g_stamp[g_free ? g_free_idx : g_evict_idx] <= clock_q;
                // a slot being replaced may hold the graph in the base registers
                if (gidv_q && g_valid[g_free ? g_free_idx : g_evict_idx] &&
                    g_gid[g_free ? g_free_idx : g_evict_idx] == cur_gid_q)
                  gidv_q <= 1'b0;
                p_valid[p_vac_idx] <= 1'b1;
                p_pid[p_vac_idx]   <= pid_q;
                p_gid[p_vac_idx]   <= gid_q;
                p_ptr[p_vac_idx]   <= AW'(MT_START_ROW);
                st_q <= F_DMA;
              end else begin
                err  <= 1'b1;
                st_q <= F_DONE;
              end
            end
            OP_KILL: begin
              if (!p_hit) begin
                err <= 1'b1;
              end else begin
                p_valid[p_hit_idx] <= 1'b0;
                for (int s = 0; s < NSLOT; s++) begin
                  if (g_valid[s] && g_gid[s] == p_gid[p_hit_idx] && g_count[s] != '0)
                    g_count[s] <= g_count[s] - 1'b1;
                end
                if (curv_q && !sys_q && cur_q == p_hit_idx) curv_q <= 1'b0;
              end
              st_q <= F_DONE;
            end
            default: st_q <= F_DONE;
          endcase
        end

        F_HDR: begin
          // cycle k reads header row k; row k-1 is written to the registers
          cnt_q <= cnt_q + 4'd1;
          if (cnt_q == 4'(HDR_ROWS)) st_q <= F_RESTORE;
        end

        F_RESTORE: begin
          // step 5: restore the next process's address pointer
          if (start_q) begin
            sys_q <= 1'b1;
          end else begin
            cur_q <= nxt_q;
            sys_q <= 1'b0;
          end
          curv_q <= 1'b1;
          st_q   <= F_DONE;
        end

        F_DMA: begin
          if (dma_done) st_q <= F_DONE;
        end

        F_DONE: begin
          // step 6: done bit for the processor
          done <= 1'b1;
          st_q <= F_IDLE;
        end

        default: st_q <= F_IDLE;
      endcase
    end
  end

  assign busy         = (st_q != F_IDLE);
  assign cur_valid    = curv_q;
  assign in_handler   = sys_q;
  assign hdr_rd       = (st_q == F_HDR);
  assign hdr_addr     = AW'(cnt_q);
  assign rf_we        = (st_q == F_HDR) && (cnt_q != 4'd0);
  assign rf_row       = cnt_q[2:0] - 3'd1;
  assign ptr_load     = (st_q == F_RESTORE);
  assign ptr_load_val = start_q ? AW'(MT_START_ROW) : p_ptr[nxt_q];
  assign dma_start    = (st_q == F_SWITCH) && (op_q == OP_CREATE) && p_vac &&
                        !g_hit && (g_free || g_evict);
  assign dma_gid      = gid_q;
  assign dma_frame    = slot_frame(g_free ? g_free_idx : g_evict_idx);

endmodule
