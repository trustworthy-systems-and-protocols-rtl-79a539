// mthm: multi-task hardware monitor for a single embedded processor.
//
// The monitor checks every instruction the processor executes against the
// monitoring graph of the task that is running, and follows the operating
// system through process creation and context switches. Up to NSLOT graphs
// are resident in the graph memory at once (one per slot of SLOT_ROWS
// rows); graphs not resident are copied in from an external graph pool by
// the DMA engine.
//
// Monitoring hardware: the instruction's 4-bit hash (count of ones) is made
// one-hot and compared with the valid-hash vector of the graph entry of the
// previous instruction. On a match the sequencing logic forms the next entry
// address from the entry's next-state field, the position of the matched
// hash and the base address of the entry's group; the address pointer keeps
// it and the frame address of the slot is added to form the read address.
// On a mismatch `recovery` pulses for one cycle (one cycle after the
// instruction), the attack bit is set in the status register and monitoring
// is disabled until the processor enables it again. If the mismatch happens
// while the interrupt handler's graph is followed, `cpu_reset` pulses
// instead of `recovery`.
//
// Interrupts: the processor's IRQ line is also wired to `irq`. When bit 0
// of the IRQ register is set, a rising edge makes the monitor switch to the
// graph named in bits 12..8 of that register (it must be resident) and
// follow it from its start entry, keeping the interrupted process's pointer.
// `stall` is high from the IRQ edge until the switch is done (about 15
// cycles); the processor must hold its first handler instruction meanwhile.
// When the handler returns, the operating system's ordinary context switch
// (OP 2) brings monitoring back to the interrupted process.
//
// Processor interface (word registers, write with reg_we, read
// combinationally through reg_rdata):
//   0 ENABLE  bit 0: monitoring enabled (read/write)
//   1 PID     process ID of the next / new process
//   2 GID     graph ID of the new process
//   3 OP      writing 1 = create, 2 = context switch, 3 = terminate starts
//             the operation, clears Done and disables monitoring
//   4 STATUS  bit 0 enable, bit 1 done, bit 2 error, bit 3 attack seen
//   5 IRQ     bit 0: follow interrupts, bits 12..8: handler graph ID
// A context switch takes 13 cycles from the OP write to Done when the base
// registers must be reloaded; process creation with a resident graph takes 3.
// The processor sets ENABLE after Done to resume monitoring.
//
// From the document: the blocks and widths of its detailed figure (16-bit
// valid hash and next state, 4-bit hash, 14-bit read address, 32-bit rows,
// 16K rows), the register set, the operation codes 1 and 2, the context
// switch and creation steps. Register addresses, status bits, the terminate
// code and the disabling after an attack are this design's choices.
// Also from the document: the IRQ line going to both processor and
// monitor, the always-resident handler graph, the register that tells the
// monitor to ignore IRQ strobes, stalling the processor during the switch,
// and resetting (rather than interrupting) the processor on an attack in
// the handler. The IRQ register layout and the stall signal are our own.
// Lint notes: the hash unit's binary hash output and the DMA busy output
// are left open (only the one-hot hash and done are needed); bits 31..5 of
// a register write are ignored, and bits 31..5 of a register read are 0.
module mthm
  import mon_pkg::*;
#(
  parameter int unsigned AW        = 14,
  parameter int unsigned DEPTH     = 16384,
  parameter int unsigned NSLOT     = 4,
  parameter int unsigned SLOT_ROWS = 4096,
  parameter int unsigned NPROC     = 4,
  parameter int unsigned PIDW      = 5,
  parameter int unsigned GID_W     = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  // instructions from the CPU pipeline
  input  logic             instr_valid,
  input  logic [31:0]      instr,
  output logic             recovery,
  output logic             cpu_reset,
  // interrupt request line of the processor, and the stall back to it
  input  logic             irq,
  output logic             stall,
  // processor interface
  input  logic             reg_we,
  input  logic [2:0]       reg_addr,
  input  logic [31:0]      reg_wdata,
  output logic [31:0]      reg_rdata,
  // graph pool
  output logic             pool_rd,
  output logic [GID_W-1:0] pool_gid,
  output logic [AW-1:0]    pool_addr,
  input  logic [31:0]      pool_rdata
);

  // ---------------------------------------------------- processor interface
  logic             enable_q, attack_q;
  logic [PIDW-1:0]  pid_q;
  logic [GID_W-1:0] gid_q;
  logic             irq_en_q;
  logic [GID_W-1:0] isr_gid_q;
  logic             op_start, ev_start, ctl_start;
  mt_op_e           op, ctl_op;
  logic [GID_W-1:0] ctl_gid;
  logic             busy, done, err;

  assign op_start  = reg_we && (reg_addr == REG_OP);
  assign op        = mt_op_e'(reg_wdata[2:0]);
  // the interrupt follower's ENTER and the processor's operations share the
  // controller; a processor write takes precedence
  assign ctl_start = op_start || ev_start;
  assign ctl_op    = op_start ? op : OP_ENTER;
  assign ctl_gid   = op_start ? gid_q : isr_gid_q;

  always_comb begin
    unique case (reg_addr)
      REG_ENABLE: reg_rdata = 32'(enable_q);
      REG_PID:    reg_rdata = 32'(pid_q);
      REG_GID:    reg_rdata = 32'(gid_q);
      REG_STATUS: reg_rdata = {28'd0, attack_q, err, done, enable_q};
      REG_IRQ:    reg_rdata = {19'd0, 5'(isr_gid_q), 7'd0, irq_en_q};
      default:    reg_rdata = '0;
    endcase
  end

  // ---------------------------------------------------- monitoring hardware
  logic [AW-1:0]        ptr_q, ptr_next, frame, seq_next;
  logic [AW-1:0]        ptr_load_val, hdr_addr;
  logic                 ptr_load, hdr_rd, cur_valid, in_handler;
  logic                 rf_we;
  logic [2:0]           rf_row;
  logic [31:0]          rdata;
  graph_entry_t         entry;
  logic [ONEHOT_W-1:0]  onehot;
  logic                 match, check;
  logic [4:0]           fanout;
  logic [3:0]           position, group;
  logic [GADDR_W-1:0]   gbase;

  assign entry = graph_entry_t'(rdata);
  assign check = instr_valid && enable_q && cur_valid && !busy;

  hash_unit u_hash (.instr(instr), .hash(), .onehot(onehot));

  hash_compare u_cmp (
    .onehot(onehot), .valid_hash(entry.valid_hash),
    .match(match), .fanout(fanout), .position(position), .group(group)
  );

  base_addr_rf u_rf (
    .clk(clk), .rst_n(rst_n), .we(rf_we), .wr_row(rf_row),
    .wr_data(rdata), .rd_sel(group), .rd_base(gbase)
  );

  seq_logic #(.AW(AW)) u_seq (
    .group_base(gbase), .next_state(entry.next_state),
    .fanout(fanout), .position(position), .next_addr(seq_next)
  );

  // address pointer with the controller's override
  always_comb begin
    if (ptr_load)           ptr_next = ptr_load_val;
    else if (check && match) ptr_next = seq_next;
    else                    ptr_next = ptr_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr_q    <= '0;
      enable_q <= 1'b0;
      attack_q <= 1'b0;
      pid_q    <= '0;
      gid_q    <= '0;
      irq_en_q  <= 1'b0;
      isr_gid_q <= '0;
      recovery <= 1'b0;
      cpu_reset <= 1'b0;
    end else begin
      ptr_q    <= ptr_next;
      recovery <= 1'b0;
      cpu_reset <= 1'b0;
      if (reg_we) begin
        unique case (reg_addr)
          REG_ENABLE: enable_q <= reg_wdata[0];
          REG_PID:    pid_q    <= PIDW'(reg_wdata);
          REG_GID:    gid_q    <= GID_W'(reg_wdata);
          REG_OP:     enable_q <= 1'b0;
          REG_IRQ: begin
            irq_en_q  <= reg_wdata[0];
            isr_gid_q <= GID_W'(reg_wdata[12:8]);
          end
          default: ;
        endcase
      end
      if (check && !match) begin
        // inside the interrupt handler the whole system is suspect: reset
        if (in_handler) cpu_reset <= 1'b1;
        else            recovery  <= 1'b1;
        attack_q <= 1'b1;
        enable_q <= 1'b0;
      end
    end
  end

  // ---------------------------------------------------- graph memory
  logic [AW-1:0] raddr [1];
  logic [31:0]   rdata_a [1];
  logic          gm_we;
  logic [AW-1:0] gm_waddr;
  logic [31:0]   gm_wdata;

  assign raddr[0] = frame + (hdr_rd ? hdr_addr : ptr_next);
  assign rdata    = rdata_a[0];

  graph_mem #(.DEPTH(DEPTH), .AW(AW), .NRD(1)) u_mem (
    .clk(clk), .we(gm_we), .waddr(gm_waddr), .wdata(gm_wdata),
    .raddr(raddr), .rdata(rdata_a)
  );

  // ---------------------------------------------------- controller and DMA
  logic             dma_start, dma_done;
  logic [GID_W-1:0] dma_gid;
  logic [AW-1:0]    dma_frame;

  mthm_ctrl #(
    .AW(AW), .NSLOT(NSLOT), .SLOT_ROWS(SLOT_ROWS), .NPROC(NPROC),
    .PIDW(PIDW), .GID_W(GID_W)
  ) u_ctrl (
    .clk(clk), .rst_n(rst_n),
    .op_start(ctl_start), .op(ctl_op), .pid(pid_q), .gid(ctl_gid),
    .busy(busy), .done(done), .err(err),
    .cur_ptr(ptr_q), .ptr_load(ptr_load), .ptr_load_val(ptr_load_val),
    .frame(frame), .cur_valid(cur_valid), .in_handler(in_handler),
    .hdr_rd(hdr_rd), .hdr_addr(hdr_addr), .rf_we(rf_we), .rf_row(rf_row),
    .dma_start(dma_start), .dma_gid(dma_gid), .dma_frame(dma_frame),
    .dma_done(dma_done)
  );

  os_event u_irq (
    .clk(clk), .rst_n(rst_n), .irq(irq), .irq_en(irq_en_q),
    .ready(enable_q && cur_valid), .busy(busy), .proc_op(op_start),
    .ev_start(ev_start), .stall(stall)
  );

  graph_dma #(.AW(AW), .GID_W(GID_W)) u_dma (
    .clk(clk), .rst_n(rst_n),
    .start(dma_start), .gid(dma_gid), .frame(dma_frame),
    .busy(), .done(dma_done),
    .pool_rd(pool_rd), .pool_gid(pool_gid), .pool_addr(pool_addr),
    .pool_rdata(pool_rdata),
    .gm_we(gm_we), .gm_waddr(gm_waddr), .gm_wdata(gm_wdata)
  );

endmodule
