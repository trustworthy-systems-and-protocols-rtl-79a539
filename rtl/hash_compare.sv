// hash_compare: checks one instruction against the current graph entry.
//
// `onehot` is the one-hot hash of the executed instruction and `valid_hash`
// the set of hashes the graph allows after the previous instruction. The
// instruction is legal when the two overlap (`match`). Because a branch has
// several successors, the entry may hold several set bits: `fanout` is their
// count (1..16, 0 for a terminal entry) and `position` is the rank of the
// matched bit among them, counted from bit 0. `group` = fanout-1 selects the
// base address register of the group of states that share this fan-out.
// The comparison and the "position of matching hash" output follow the
// document; the rank order and the group = fan-out mapping are this
// design's choice. Purely combinational.
module hash_compare
  import mon_pkg::*;
(
  input  logic [ONEHOT_W-1:0] onehot,
  input  logic [ONEHOT_W-1:0] valid_hash,
  output logic                match,
  output logic [4:0]          fanout,
  output logic [3:0]          position,
  output logic [3:0]          group
);

  always_comb begin
    match    = |(onehot & valid_hash);
    fanout   = '0;
    position = '0;
    for (int i = 0; i < ONEHOT_W; i++) begin
      if (onehot[i]) position = fanout[3:0];
      fanout = fanout + 5'(valid_hash[i]);
    end
    group = 4'(fanout - 5'd1);
  end

endmodule
