// tb_hash_compare: exhaustive over one-hot inputs, random valid-hash
// vectors; match, fan-out, rank of the matched bit and group are compared
// with values computed here bit by bit.
// Combinational block. Match against the valid-hash vector is the
// document's; the rank order and group = fan-out - 1 are this design's.
module tb_hash_compare;
  logic [15:0] onehot, valid_hash;
  logic        match;
  logic [4:0]  fanout;
  logic [3:0]  position, group;
  int checks = 0, failures = 0;

  hash_compare dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      logic [15:0] v;
      v = 16'($urandom());
      if (t < 16) v = 16'd1 << t;          // single successors
      if (t == 16) v = 16'h0800;           // the document's example entry
      for (int h = 0; h < 16; h++) begin
        int f, p;
        bit m;
        f = 0; p = 0;
        for (int i = 0; i < 16; i++) begin
          if (i < h && v[i]) p++;
          if (v[i]) f++;
        end
        m = v[h];
        onehot = 16'd1 << h; valid_hash = v;
        #1;
        checks++;
        if (match !== m || fanout !== 5'(f) || (m && position !== 4'(p)) ||
            group !== 4'(f - 1)) begin
          failures++;
          $display("FAIL v=%h h=%0d match=%b fan=%0d pos=%0d grp=%0d", v, h,
                   match, fanout, position, group);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
