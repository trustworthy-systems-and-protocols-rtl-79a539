// os_event: interrupt follower of the single-core monitor.
//
// Interrupts reach the processor without notice, so the monitor cannot be
// told about them by software beforehand. The processor's IRQ line is
// therefore also wired to the monitor. On a rising edge of `irq`, while
// interrupt following is enabled (`irq_en`, the processor's "disable
// interrupt" command clears it), this block asks the controller to switch
// monitoring to the interrupt handler's graph (`ev_start`, an ENTER
// operation). `stall` holds the processor from the IRQ edge until the
// controller has finished, so no handler instruction goes unchecked.
//   - If the controller is busy with an operation, the request waits.
//   - If monitoring is off when the controller is free (`ready` low, e.g.
//     the processor is between a context switch and its Enable write), the
//     request is dropped: there is nothing to follow.
//   - A processor operation written in the same cycle wins (`proc_op`); the
//     request then waits for it.
// Timing: with the controller idle, `ev_start` is high in the cycle after
// the IRQ edge is sampled; `stall` is high from that edge's cycle until
// the cycle after the controller drops `busy`.
// Following interrupts in hardware, the disable command and stalling the
// processor through the monitor's Done handshake follow the document; the
// edge detection, the waiting and dropping rules are this design's.
module os_event (
  input  logic clk,
  input  logic rst_n,
  input  logic irq,
  input  logic irq_en,
  input  logic ready,
  input  logic busy,
  input  logic proc_op,
  output logic ev_start,
  output logic stall
);

  logic irq_q, pend_q, act_q, rise;

  assign rise     = irq && !irq_q && irq_en;
  assign ev_start = pend_q && !busy && ready && !proc_op;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq_q  <= 1'b0;
      pend_q <= 1'b0;
      act_q  <= 1'b0;
    end else begin
      irq_q <= irq;
      if (ev_start) begin
        pend_q <= 1'b0;
        act_q  <= 1'b1;
      end else if (pend_q && !busy && !ready && !proc_op) begin
        pend_q <= 1'b0;           // monitoring is off: nothing to follow
      end else if (rise) begin
        pend_q <= 1'b1;
      end
      if (act_q && !busy && !ev_start) act_q <= 1'b0;
    end
  end

  assign stall = rise || pend_q || act_q;

endmodule
