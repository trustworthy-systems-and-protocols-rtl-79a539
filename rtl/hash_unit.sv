// hash_unit: instruction hash for the hardware monitors.
//
// The hash of an instruction is the number of ones in its 32-bit word, kept
// modulo 16 so that it fits the 4-bit hash field; the one-hot form (bit
// `hash` set) is what the graph entries' valid-hash vectors are compared
// against. Counting ones is the hash the document names; taking it modulo 16
// for words with 16 or more ones is this design's reading of "a four-bit
// hash value". Purely combinational.
module hash_unit
  import mon_pkg::*;
(
  input  logic [31:0]         instr,
  output logic [HASH_W-1:0]   hash,
  output logic [ONEHOT_W-1:0] onehot
);

  logic [5:0] ones;

  always_comb begin
    ones = '0;
    for (int i = 0; i < 32; i++) ones = ones + 6'(instr[i]);
    hash   = ones[HASH_W-1:0];
    onehot = ONEHOT_W'(1) << hash;
  end

endmodule
