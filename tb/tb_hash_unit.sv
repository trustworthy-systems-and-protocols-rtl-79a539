// tb_hash_unit: checks the instruction hash against an independent count of
// ones, for the hashes the document's waveforms show and random words.
// Combinational block, checked after a settling delay. The hash function
// (count of ones, four bits) is the document's; the modulo-16 wrap is this
// design's.
module tb_hash_unit;
  import tb_graph_pkg::*;
  logic [31:0] instr;
  logic [3:0]  hash;
  logic [15:0] onehot;
  int checks = 0, failures = 0;

  hash_unit dut (.instr(instr), .hash(hash), .onehot(onehot));

  task automatic check(logic [31:0] w);
    int h;
    instr = w;
    #1;
    h = hash_of(w);
    checks++;
    if (hash !== 4'(h) || onehot !== (16'd1 << h)) begin
      failures++;
      $display("FAIL instr=%h hash=%0d onehot=%h expected %0d", w, hash, onehot, h);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h0000_0000);           // hash 0, one-hot 0001
    check(32'h0000_000F);           // 4 ones -> 0010
    check(32'h0000_0003);           // 2 ones -> 0004
    check(32'hFFFF_FFFF);           // 32 ones -> 0 mod 16
    check(32'h0000_7FFF);           // 15 ones -> 8000
    for (int i = 0; i < 2000; i++) check($urandom());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
