// tb_tail_buffer -- checks the t-SRAM and t-MMA.
//
// Q=4 queues, b=2, M=16, B=8: the t-SRAM holds Q(b-1)+1 = 5 cells. A cell of
// a random queue arrives in almost every slot, which is the load the size is
// set for. The reference keeps each queue's cells in order. Every cell the
// t-MMA sends to DRAM must be the oldest of its queue, blocks must be b cells
// of one queue with indices 0..b-1 on consecutive cycles, block ordinals of a
// queue must count up from 0, and bank and address must follow the CFDS
// mapping (computed here by division and remainder). The t-SRAM must never
// overflow, and once arrivals stop every queue must be left with fewer than
// b cells.
module tb_tail_buffer;

  localparam int Q = 4, M = 16, B = 8, BS = 2, ORD_W = 6, CELL_W = 16;
  localparam int G = M / (B / BS), BPG = B / BS;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, wr_valid, err_full;
  logic [1:0] in_q, wr_q;
  logic [CELL_W-1:0] in_cell, wr_cell;
  logic [ORD_W-1:0] wr_ord;
  logic [3:0] wr_bank;
  logic [4:0] wr_addr;
  logic [0:0] wr_idx;

  tail_buffer #(.Q(Q), .M(M), .B(B), .BSMALL(BS), .ORD_W(ORD_W), .CELL_W(CELL_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0, n_blk = 0, seq = 0;
  logic [CELL_W-1:0] fifo [Q][$];
  int   blkno [Q];
  int   cur_q = -1, cur_k = 0;
  bit   feed = 1'b0;

  task automatic fail(string m);
    failures++;
    if (failures < 20) $display("FAIL @%0d: %s", cyc, m);
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    int q;
    if (rst_n) begin
      cyc++;
      checks++;
      if (err_full) fail("t-SRAM overflow");
      if (cur_q >= 0 && !(wr_valid && int'(wr_q) == cur_q)) fail("block cut short");
      if (wr_valid) begin
        checks++;
        if (cur_q < 0) begin
          if (wr_idx != 0) fail("block does not start at index 0");
          cur_q = int'(wr_q);
          cur_k = 0;
          n_blk++;
        end
        if (int'(wr_idx) != cur_k) fail("cell index out of order");
        if (fifo[wr_q].size() == 0) fail("cell sent that never arrived");
        else if (wr_cell != fifo[wr_q].pop_front()) fail("cell out of queue order");
        if (int'(wr_ord) != blkno[wr_q] % (1 << ORD_W)) fail("block ordinal wrong");
        if (int'(wr_bank) != (int'(wr_q) % G) * BPG + int'(wr_ord) % BPG ||
            int'(wr_addr) != (int'(wr_q) / G) * ((1 << ORD_W) / BPG) + int'(wr_ord) / BPG)
          fail("bank or address wrong");
        cur_k++;
        if (cur_k == BS) begin
          blkno[wr_q]++;
          cur_q = -1;
        end
      end
    end
    in_valid <= 1'b0;
    if (feed && $urandom_range(19) != 0) begin
      q = int'($urandom_range(Q - 1));
      seq++;
      in_valid <= 1'b1;
      in_q     <= 2'(q);
      in_cell  <= CELL_W'(seq * 5 + q);
      fifo[q].push_back(CELL_W'(seq * 5 + q));
    end
  end

  initial begin
    in_valid = 1'b0; in_q = '0; in_cell = '0;
    for (int i = 0; i < Q; i++) blkno[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    feed = 1'b1;
    repeat (20000) @(negedge clk);
    feed = 1'b0;
    repeat (50) @(negedge clk);
    for (int i = 0; i < Q; i++) begin
      checks++;
      if (fifo[i].size() >= BS) fail($sformatf("queue %0d left with %0d cells", i, fifo[i].size()));
    end
    checks++;
    if (n_blk < 1000) fail("too few blocks");
    $display("blocks sent %0d", n_blk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
