// seq_logic: next-address calculation of the monitoring graph walk.
//
// States are stored in groups of equal fan-out; a state with fan-out n owns a
// block of n consecutive successor entries inside the region of group n,
// which starts at `group_base`. The entry's next-state field numbers that
// block, and the matched position picks the successor inside it:
//     next_addr = group_base + next_state * fanout + position
// The document says the next address is formed from these three values "via
// addition and multiplication"; the exact formula is this design's.
// Purely combinational; the result is relative to the start of the graph.
// Bits of the sum above AW are left unused: a graph that fits the memory
// never produces them.
module seq_logic
  import mon_pkg::*;
#(
  parameter int unsigned AW = 14
) (
  input  logic [GADDR_W-1:0] group_base,
  input  logic [GADDR_W-1:0] next_state,
  input  logic [4:0]         fanout,
  input  logic [3:0]         position,
  output logic [AW-1:0]      next_addr
);

  logic [GADDR_W+4:0] sum;

  always_comb begin
    sum = (GADDR_W+5)'(group_base)
        + (GADDR_W+5)'(next_state) * (GADDR_W+5)'(fanout)
        + (GADDR_W+5)'(position);
    next_addr = sum[AW-1:0];
  end

endmodule
