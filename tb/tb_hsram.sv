// tb_hsram -- checks the h-SRAM with blocks arriving out of order.
//
// Q=4 queues, b=2, 12 data cells, 16 descriptors. Each cycle the test may
// (a) ask for a descriptor for a random queue, as the V-MMA does, (b) carry
// on or start the transfer of a block, picked at random among the three
// oldest not yet written, so blocks of one queue arrive out of order as the
// DRAM scheduler may deliver them, and (c) read the next cell of a random
// queue. The reference keeps, per queue, the blocks in request order and
// which of their cells have arrived. A read of a cell that has arrived must
// return it, in queue order; a read of a cell that has not must report a
// miss and change nothing. The cell count must match the reference, the
// pools must never run dry while the reference says there is room, and a
// transfer into a full SRAM must raise err_full.
module tb_hsram;

  localparam int Q = 4, BS = 2, NC = 12, ND = 16, CELL_W = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic da_valid, wr_valid, rd_valid, out_valid, out_miss, err_full;
  logic [1:0] da_q, rd_q;
  logic [3:0] da_desc, wr_desc;
  logic [0:0] wr_idx;
  logic [CELL_W-1:0] wr_cell, out_cell;
  logic [4:0] cells_used;

  hsram #(.Q(Q), .M(16), .B(8), .BSMALL(BS), .CELL_W(CELL_W), .NCELLS(NC), .NDESC(ND)) dut (.*);

  always #5 clk = ~clk;

  typedef struct { int q, desc, seq; bit arr [BS]; } blk_t;
  blk_t blk [int];
  int   qblk [Q][$];       // block ids per queue, request order
  int   qoff [Q];          // next cell offset in the head block
  int   qseq [Q];          // sequence number of the next block
  int   pending [$];       // blocks not yet written
  int   nblk = 0, held = 0, ndesc = 0;
  int   cur = -1, cur_k = 0;
  int   checks = 0, failures = 0, cyc = 0, n_hit = 0, n_miss = 0, n_ooo = 0, n_full = 0;
  bit   exp_out, exp_miss, exp_full;
  logic [CELL_W-1:0] exp_cell;
  bit   force_full = 1'b0;

  function automatic logic [CELL_W-1:0] cell_of(int q, int seq, int k);
    return CELL_W'((q << 12) ^ (seq * BS + k) * 7);
  endfunction

  task automatic fail(string m);
    failures++;
    if (failures < 20) $display("FAIL @%0d: %s", cyc, m);
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    int q, p, id;
    bit do_da, do_wr, do_rd, hit;
    if (rst_n) begin
      cyc++;
      checks++;
      if (out_valid != exp_out) fail("out_valid wrong");
      if (exp_out) begin
        if (out_miss != exp_miss) fail($sformatf("miss %0b, expected %0b", out_miss, exp_miss));
        else if (!exp_miss && out_cell != exp_cell) fail("wrong cell");
      end
      checks++;
      if (err_full != exp_full) fail($sformatf("err_full %0b, expected %0b", err_full, exp_full));
      if (err_full) n_full++;
      checks++;
      if (int'(cells_used) != held) fail($sformatf("cells_used %0d, reference %0d", cells_used, held));
    end
    exp_out = 1'b0; exp_full = 1'b0;
    da_valid <= 1'b0; wr_valid <= 1'b0; rd_valid <= 1'b0;
    if (rst_n && cyc <= 30000) begin : act
    // read
    q = int'($urandom_range(Q - 1));
    do_rd = ($urandom_range(2) == 0) && !force_full;
    hit = 1'b0;
    if (do_rd) begin
      exp_out = 1'b1;
      if (qblk[q].size() > 0) begin
        id = qblk[q][0];
        hit = blk[id].arr[qoff[q]];
      end
      exp_miss = !hit;
      if (hit) begin
        exp_cell = cell_of(q, blk[id].seq, qoff[q]);
        n_hit++;
      end else n_miss++;
      rd_valid <= 1'b1;
      rd_q <= 2'(q);
    end
    // write: continue or start a transfer
    do_wr = 1'b0;
    if (cur < 0 && pending.size() > 0 && $urandom_range(1) == 0 &&
        (held < NC - 1 || force_full)) begin
      p = int'($urandom_range((pending.size() > 3 ? 3 : pending.size()) - 1));
      if (p != 0) n_ooo++;
      cur = pending[p];
      pending.delete(p);
      cur_k = 0;
    end
    if (cur >= 0) begin
      do_wr = 1'b1;
      wr_valid <= 1'b1;
      wr_desc  <= 4'(blk[cur].desc);
      wr_idx   <= 1'(cur_k);
      wr_cell  <= cell_of(blk[cur].q, blk[cur].seq, cur_k);
    end
    // descriptor request
    do_da = ($urandom_range(3) == 0) && ndesc < ND - 2 && !force_full;
    if (do_da) begin
      da_valid <= 1'b1;
      da_q <= 2'(int'($urandom_range(Q - 1)));
    end
    #1;
    // reference update after the DUT's inputs settle
    if (do_da) begin
      blk_t b;
      b.q = int'(da_q); b.desc = int'(da_desc); b.seq = qseq[b.q];
      for (int k = 0; k < BS; k++) b.arr[k] = 1'b0;
      qseq[b.q]++;
      blk[nblk] = b;
      qblk[b.q].push_back(nblk);
      pending.push_back(nblk);
      nblk++;
      ndesc++;
    end
    if (do_wr) begin
      bit room;
      room = (held < NC) || hit;
      if (room) begin
        blk[cur].arr[cur_k] = 1'b1;
        held++;
      end else exp_full = 1'b1;
      cur_k++;
      if (cur_k == BS) cur = -1;
    end
    if (hit) begin
      held--;
      qoff[q]++;
      if (qoff[q] == BS) begin
        qoff[q] = 0;
        blk.delete(qblk[q].pop_front());
        ndesc--;
      end
    end
    end
  end

  initial begin
    da_valid = 0; wr_valid = 0; rd_valid = 0; da_q = 0; rd_q = 0; wr_desc = 0; wr_idx = 0; wr_cell = 0;
    for (int i = 0; i < Q; i++) begin qoff[i] = 0; qseq[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (20000) @(negedge clk);
    // fill the SRAM beyond its size: no reads, all pending blocks written
    force_full = 1'b1;
    repeat (10000) @(negedge clk);
    force_full = 1'b0;
    repeat (2) @(negedge clk);
    checks++;
    if (n_hit < 200 || n_miss < 100 || n_ooo < 50) fail("too few hits, misses or out-of-order blocks");
    checks++;
    if (n_full == 0) fail("a full SRAM never reported");
    $display("hits %0d, misses %0d, out-of-order blocks %0d, full reports %0d", n_hit, n_miss, n_ooo, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
