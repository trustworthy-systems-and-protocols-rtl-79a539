// tb_graph_pkg: reference model for the monitor testbenches.
//
// Builds a small random program (instruction words and a control-flow graph
// with at most two successors per instruction, successors with distinct
// hashes) and compiles it into a monitoring-graph memory image in the layout
// the monitors expect:
//   rows 0..7         sixteen 16-bit group base addresses (0xFFFF if unused),
//                     group 2r+1 in bits [31:16] of row r;
//   row  pc_row       start PC (multi-core layout only);
//   row  start_row    start entry, whose only successor is instruction 0;
//   then per fan-out n = 1..16 a region of blocks of n entries. The block
//   of instruction j holds, ordered by hash, the entries of j's successors.
// An entry is {next_state = block number of the instruction, valid_hash =
// one-hot hashes of its successors}. Hashes are the count of ones mod 16.
// The model is written from the graph format, independently of the RTL.
package tb_graph_pkg;

  function automatic int hash_of(logic [31:0] w);
    int c = 0;
    for (int i = 0; i < 32; i++) c += int'(w[i]);
    return c % 16;
  endfunction

  class prog_c;
    int              n;
    logic [31:0]     ins[];
    int              s0[];     // successor 0 (-1: none)
    int              s1[];     // successor 1 (-1: none)
    logic [31:0]     rows[$];
    int              start_row;
    logic [31:0]     base_pc;

    // random instruction whose hash differs from `avoid`
    static function logic [31:0] rnd_ins(int avoid);
      logic [31:0] w;
      do w = $urandom(); while (hash_of(w) == avoid);
      return w;
    endfunction

    // n instructions; a backward branch every `br` instructions; the last
    // instruction ends the program (no successors)
    function new(int n_, int br, logic [31:0] pc0);
      n = n_;
      base_pc = pc0;
      ins = new[n]; s0 = new[n]; s1 = new[n];
      for (int i = 0; i < n; i++) begin
        ins[i] = $urandom();
        s0[i]  = (i + 1 < n) ? i + 1 : -1;
        s1[i]  = -1;
      end
      for (int i = br; i + 1 < n; i += br) begin
        s1[i] = i - br / 2;
        // successors of one instruction must differ in hash
        while (hash_of(ins[s1[i]]) == hash_of(ins[i + 1]))
          ins[i + 1] = rnd_ins(hash_of(ins[s1[i]]));
      end
    endfunction

    function int fan(int j);
      return (s0[j] >= 0 ? 1 : 0) + (s1[j] >= 0 ? 1 : 0);
    endfunction

    function logic [15:0] vh(int j);
      logic [15:0] v = '0;
      if (s0[j] >= 0) v[hash_of(ins[s0[j]])] = 1'b1;
      if (s1[j] >= 0) v[hash_of(ins[s1[j]])] = 1'b1;
      return v;
    endfunction

    // build the graph image; with_pc: multi-core layout (start PC in row 8)
    function void build(bit with_pc);
      int blk[];         // block number of each instruction within its group
      int cnt[17];
      int base[17];
      int cur;
      blk = new[n];
      foreach (cnt[k]) cnt[k] = 0;
      // the start entry's virtual predecessor is block 0 of group 1
      cnt[1] = 1;
      for (int j = 0; j < n; j++) begin
        if (fan(j) > 0) begin blk[j] = cnt[fan(j)]; cnt[fan(j)]++; end
        else blk[j] = 0;
      end
      start_row = with_pc ? 9 : 8;
      cur = start_row + 1;
      for (int k = 1; k <= 16; k++) begin
        base[k] = (cnt[k] > 0) ? cur : 'hFFFF;
        cur += cnt[k] * k;
      end
      rows.delete();
      for (int r = 0; r < cur; r++) rows.push_back('0);
      for (int r = 0; r < 8; r++)
        rows[r] = {base[2*r+1][15:0], base[2*r+2][15:0]};
      if (with_pc) rows[8] = base_pc;
      // start entry: successor = instruction 0, held in group 1 block 0
      rows[start_row] = {16'd0, 16'(1) << hash_of(ins[0])};
      rows[base[1]] = entry(0);
      for (int j = 0; j < n; j++) begin
        int f = fan(j);
        if (f == 0) continue;
        if (f == 1) rows[base[1] + blk[j]] = entry(s0[j]);
        else begin
          int a = s0[j], b = s1[j], t;
          if (hash_of(ins[a]) > hash_of(ins[b])) begin t = a; a = b; b = t; end
          rows[base[2] + blk[j]*2 + 0] = entry(a);
          rows[base[2] + blk[j]*2 + 1] = entry(b);
        end
      end
    endfunction


    function logic [31:0] entry(int j);
      return {16'(blk_of(j)), vh(j)};
    endfunction

    function int blk_of(int j);
      int c = (fan(j) == 1) ? 1 : 0;   // group 1 block 0 is the start's
      if (fan(j) == 0) return 0;
      for (int i = 0; i < j; i++) if (fan(i) == fan(j)) c++;
      return c;
    endfunction

    function logic [31:0] pc_of(int j);
      return base_pc + 32'(4 * j);
    endfunction

    // next instruction on a path: take the branch about one time in three
    function int step(int j, int taken_seed);
      if (s1[j] >= 0 && (taken_seed % 3 == 0)) return s1[j];
      return s0[j];
    endfunction

    // an instruction word that is not a legal successor of instruction j
    function logic [31:0] bad_after(int j);
      logic [31:0] w;
      logic [15:0] v = vh(j);
      do w = $urandom(); while (v[hash_of(w)]);
      return w;
    endfunction
  endclass

endpackage
