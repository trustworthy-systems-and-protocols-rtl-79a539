// tb_mthm_ctrl: controller of the single-core monitor on its own, with two
// slots and three process entries so that replacement happens quickly.
// A stub answers DMA requests after a random delay. Checked: the exact
// cycle counts of each operation (switch with base reload 13 cycles from
// op_start to done, without reload 4, creation with a resident graph 3),
// the header read sequence (rows 0..7, register row k-1 written while row k
// is read), pointer save/restore, the frame of each slot, LRU replacement of
// a slot with no active processes, the error cases, and ENTER (interrupt
// handler graph from its start entry, interrupted pointer kept).
module tb_mthm_ctrl;
  import mon_pkg::*;

  localparam int SLOT_ROWS = 4096;
  logic        clk = 0, rst_n = 0;
  logic        op_start = 0;
  mt_op_e      op = OP_NONE;
  logic [4:0]  pid = 0, gid = 0;
  logic        busy, done, err;
  logic [13:0] cur_ptr = 0, ptr_load_val, frame, hdr_addr, dma_frame;
  logic        ptr_load, cur_valid, in_handler, hdr_rd, rf_we, dma_start;
  logic [2:0]  rf_row;
  logic [4:0]  dma_gid;
  logic        dma_done = 0;

  int checks = 0, failures = 0, hdr_ok;
  int dma_count = 0;
  logic [13:0] last_dma_frame;

  mthm_ctrl #(.AW(14), .NSLOT(2), .SLOT_ROWS(SLOT_ROWS), .NPROC(3), .PIDW(5), .GID_W(5)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_true(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  // DMA stub
  initial begin
    forever begin
      @(posedge clk);
      if (dma_start) begin
        dma_count++;
        last_dma_frame = dma_frame;
        repeat ($urandom_range(3, 30)) @(posedge clk);
        #1 dma_done = 1;
        @(posedge clk);
        #1 dma_done = 0;
      end
    end
  end

  // header read checker: while hdr_rd, rf_we writes row hdr_addr-1
  always @(posedge clk) begin
    if (rf_we && (32'(rf_row) != 32'(hdr_addr) - 1 || !hdr_rd)) hdr_ok = 0;
    if (hdr_rd && hdr_addr > 14'(HDR_ROWS)) hdr_ok = 0;
  end

  task automatic do_op(mt_op_e o, int p, int g, output int cycles, output bit e);
    @(negedge clk);
    op_start = 1; op = o; pid = 5'(p); gid = 5'(g);
    @(negedge clk);
    op_start = 0;
    cycles = 1;
    while (!done && cycles < 1000) begin @(negedge clk); cycles++; end
    e = err;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c;
    bit e;
    repeat (2) @(negedge clk);
    rst_n = 1;
    hdr_ok = 1;

    do_op(OP_CREATE, 1, 7, c, e);
    expect_true(!e && dma_count == 1 && last_dma_frame == 0, "create 1 loads graph 7 into slot 0");
    do_op(OP_CREATE, 2, 7, c, e);
    expect_true(!e && c == 3 && dma_count == 1, $sformatf("create 2, resident: %0d cycles", c));
    do_op(OP_SWITCH, 1, 0, c, e);
    expect_true(!e && c == 13 && frame == 0, $sformatf("switch with reload: %0d cycles", c));
    expect_true(cur_valid && hdr_ok, "header rows 0..7 loaded");
    // process 1 advances; its pointer must be saved on the next switch
    cur_ptr = 14'd123;
    do_op(OP_SWITCH, 2, 0, c, e);
    expect_true(!e && c == 4, $sformatf("switch without reload: %0d cycles", c));
    cur_ptr = 14'd77;
    fork
      do_op(OP_SWITCH, 1, 0, c, e);
      begin
        int n = 0;
        while (!ptr_load && n < 50) begin @(posedge clk); #1; n++; end
        expect_true(ptr_load && ptr_load_val == 14'd123, "pointer of process 1 restored");
      end
    join
    fork
      do_op(OP_SWITCH, 2, 0, c, e);
      begin
        int n = 0;
        while (!ptr_load && n < 50) begin @(posedge clk); #1; n++; end
        expect_true(ptr_load && ptr_load_val == 14'd77, "pointer of process 2 restored");
      end
    join
    // new process, new graph: slot 1
    do_op(OP_CREATE, 3, 9, c, e);
    expect_true(!e && dma_count == 2 && last_dma_frame == 14'(SLOT_ROWS), "graph 9 into slot 1");
    do_op(OP_CREATE, 4, 9, c, e);
    expect_true(e, "process table full");
    // no slot replaceable while both graphs have processes
    do_op(OP_KILL, 3, 0, c, e);
    do_op(OP_CREATE, 3, 11, c, e);
    expect_true(!e && dma_count == 3 && last_dma_frame == 14'(SLOT_ROWS), "graph 11 replaces graph 9");
    do_op(OP_KILL, 3, 0, c, e);
    do_op(OP_CREATE, 3, 12, c, e);
    expect_true(!e && dma_count == 4 && last_dma_frame == 14'(SLOT_ROWS), "only the idle slot is replaced");
    do_op(OP_SWITCH, 3, 0, c, e);
    expect_true(!e && frame == 14'(SLOT_ROWS), "frame of slot 1");
    do_op(OP_KILL, 1, 0, c, e);
    do_op(OP_KILL, 2, 0, c, e);
    do_op(OP_KILL, 3, 0, c, e);
    // both idle: slot 0 (graph 7) was used longer ago than slot 1
    do_op(OP_CREATE, 1, 13, c, e);
    expect_true(!e && last_dma_frame == 0, "least recently used slot replaced");
    do_op(OP_CREATE, 2, 12, c, e);
    expect_true(!e && c == 3, "graph 12 kept");
    do_op(OP_KILL, 5, 0, c, e);
    expect_true(e, "error on unknown PID");
    do_op(OP_SWITCH, 1, 0, c, e);
    expect_true(!e && c == 13 && hdr_ok, "switch to another graph reloads the registers");

    // ENTER (interrupt): handler graph 12 from its start entry
    cur_ptr = 14'd55;
    fork
      do_op(OP_ENTER, 0, 12, c, e);
      begin
        int n = 0;
        while (!ptr_load && n < 50) begin @(posedge clk); #1; n++; end
        expect_true(ptr_load && ptr_load_val == 14'(MT_START_ROW), "handler starts at its start entry");
      end
    join
    expect_true(!e && c == 13 && frame == 14'(SLOT_ROWS) && cur_valid, $sformatf("enter with reload: %0d cycles", c));
    // the handler runs; the OS then switches back to process 1
    cur_ptr = 14'd99;
    fork
      do_op(OP_SWITCH, 1, 0, c, e);
      begin
        int n = 0;
        while (!ptr_load && n < 50) begin @(posedge clk); #1; n++; end
        expect_true(ptr_load && ptr_load_val == 14'd55, "process pointer saved at the interrupt");
      end
    join
    expect_true(!e && frame == 0, "back on process 1's slot");
    do_op(OP_ENTER, 0, 21, c, e);
    expect_true(e, "enter into a graph that is not resident fails");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
