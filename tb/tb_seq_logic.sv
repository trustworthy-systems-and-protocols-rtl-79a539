// tb_seq_logic: next address = base + next_state * fan-out + position,
// checked on random operands with a 14-bit result.
// Combinational block. The document only says the address comes from
// addition and multiplication; this formula is this design's.
module tb_seq_logic;
  logic [15:0] group_base, next_state;
  logic [4:0]  fanout;
  logic [3:0]  position;
  logic [13:0] next_addr;
  int checks = 0, failures = 0;

  seq_logic #(.AW(14)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int unsigned exp;
      group_base = 16'($urandom_range(0, 8000));
      next_state = 16'($urandom_range(0, 600));
      fanout     = 5'($urandom_range(1, 16));
      position   = 4'($urandom_range(0, int'(fanout) - 1));
      #1;
      exp = (int'(group_base) + int'(next_state) * int'(fanout) + int'(position)) % 16384;
      checks++;
      if (next_addr !== 14'(exp)) begin
        failures++;
        $display("FAIL base=%0d ns=%0d f=%0d p=%0d got %0d exp %0d",
                 group_base, next_state, fanout, position, next_addr, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
