// tb_cfds_full -- the CFDS packet buffer at its default size, end to end.
//
// Q=512 queues, M=256 banks, B=32, b=4: G=32 groups of 8 banks, RR of 218
// entries, latency register 1736+22 slots, ECQF lookahead 1537, h-SRAM 2404
// cells of 512 bits. Same traffic and checks as tb_cfds_buffer: every
// requested cell must come out in order, exactly on time, with no DRAM bank
// conflict, no h-SRAM overflow and no error flag; every mechanism of the
// design must have happened at least once.
module tb_cfds_full;
  import cfds_pkg::*;

  localparam int Q        = 512;
  localparam int M        = 256;
  localparam int B        = 32;
  localparam int BSMALL   = 4;
  localparam int ORD_W    = 12;
  localparam int CELL_W   = 512;
  localparam int DRAM_LAT = B / 2;
  localparam int LA       = ecqf_lookahead(Q, BSMALL);
  localparam int CYCLES   = 40000;
  localparam int QW     = $clog2(Q);
  localparam int MW     = $clog2(M);
  localparam int GW     = $clog2(M / (B / BSMALL));
  localparam int BW     = $clog2(B / BSMALL);
  localparam int AW     = (QW - GW) + (ORD_W - BW);
  localparam int PW     = (BSMALL > 1) ? $clog2(BSMALL) : 1;
  localparam int NCELLS = hsram_cells(Q, M, B, BSMALL);
  localparam int CW     = $clog2(NCELLS);
  localparam int LAT    = latency_len(Q, M, B, BSMALL) + BSMALL + DRAM_LAT + 2;
  localparam int NDESC  = hsram_descs(Q, BSMALL, LA, LAT);
  localparam int DW     = $clog2(NDESC);
  localparam int DELAY  = 1 + LA + LAT;   // request to cell, in slots

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              in_valid;
  logic [QW-1:0]     in_q;
  logic [CELL_W-1:0] in_cell;
  logic              req_valid;
  logic [QW-1:0]     req_q;
  logic              out_valid, out_miss;
  logic [CELL_W-1:0] out_cell;
  logic              dram_wr_valid;
  logic [MW-1:0]     dram_wr_bank;
  logic [AW-1:0]     dram_wr_addr;
  logic [PW-1:0]     dram_wr_idx;
  logic [CELL_W-1:0] dram_wr_cell;
  logic [QW-1:0]     dram_wr_q;
  logic [ORD_W-1:0]  dram_wr_ord;
  logic              dram_rd_valid;
  logic [MW-1:0]     dram_rd_bank;
  logic [AW-1:0]     dram_rd_addr;
  logic [DW-1:0]     dram_rd_tag;
  logic [QW-1:0]     dram_rd_q;
  logic [ORD_W-1:0]  dram_rd_ord;
  logic              dram_rdata_valid;
  logic [DW-1:0]     dram_rdata_tag;
  logic [PW-1:0]     dram_rdata_idx;
  logic [CELL_W-1:0] dram_rdata_cell;
  logic              ev_replenish, ev_critical, ev_empty_request, ev_dsa_skip, ev_tail_block;
  logic              err_vmiss, err_rr_overflow, err_hsram_full, err_tsram_full;
  logic [CW:0]       hsram_cells_used;

  dram_model #(
    .M(M), .AW(AW), .PW(PW), .DW(DW), .QW(QW), .ORD_W(ORD_W), .CELL_W(CELL_W),
    .B(B), .BSMALL(BSMALL), .DRAM_LAT(DRAM_LAT)
  ) u_dram (
    .clk, .rst_n,
    .wr_valid(dram_wr_valid), .wr_bank(dram_wr_bank), .wr_addr(dram_wr_addr),
    .wr_idx(dram_wr_idx), .wr_cell(dram_wr_cell),
    .rd_valid(dram_rd_valid), .rd_bank(dram_rd_bank), .rd_addr(dram_rd_addr),
    .rd_tag(dram_rd_tag), .rd_q(dram_rd_q), .rd_ord(dram_rd_ord),
    .rdata_valid(dram_rdata_valid), .rdata_tag(dram_rdata_tag),
    .rdata_idx(dram_rdata_idx), .rdata_cell(dram_rdata_cell)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  int     checks = 0, failures = 0;
  longint cyc = 0;
  int     seq_in  [Q];
  int     in_dram [Q];
  int     reqd    [Q];
  int     seq_out [Q];
  int     exp_q   [$];
  longint exp_t   [$];
  int     n_rep = 0, n_crit = 0, n_empty = 0, n_skip = 0, n_tblk = 0, n_out = 0;
  int     n_err = 0, max_used = 0;
  bit     traffic = 1'b0;
  int     phase2 = 0;

  function automatic logic [CELL_W-1:0] mk_cell(int q, int s);
    logic [63:0] w;
    w = {32'(s), 8'hA5, 24'(q)};
    return CELL_W'(w ^ (w >> 17));
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0d: %s", cyc, msg);
  endtask

  // watchdog
  initial begin
    repeat (CYCLES + 20 * DELAY + 2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // line and arbiter, driven after each falling edge
  always @(negedge clk) begin
    int q, tries;
    in_valid  <= 1'b0;
    in_q      <= '0;
    in_cell   <= '0;
    req_valid <= 1'b0;
    req_q     <= '0;
    if (rst_n && traffic) begin
      if ($urandom_range(99) < 90) begin
        q = (phase2 != 0) ? (($urandom_range(1) == 0) ? 0 : (1 << GW)) % Q
                          : int'($urandom_range(Q - 1));
        in_valid <= 1'b1;
        in_q     <= QW'(q);
        in_cell  <= mk_cell(q, seq_in[q]);
        seq_in[q]++;
      end
      if ($urandom_range(99) < 97) begin
        q = int'($urandom_range(Q - 1));
        tries = 0;
        while (in_dram[q] - reqd[q] <= 0 && tries < Q) begin
          q = (q + 1) % Q;
          tries++;
        end
        if (in_dram[q] - reqd[q] > 0) begin
          req_valid <= 1'b1;
          req_q     <= QW'(q);
          reqd[q]++;
          exp_q.push_back(q);
          exp_t.push_back(cyc + DELAY);
        end
      end
    end
  end

  // observe
  always @(negedge clk) begin
    if (rst_n) begin
      if (dram_wr_valid) in_dram[dram_wr_q]++;
      if (ev_replenish)     n_rep++;
      if (ev_critical)      n_crit++;
      if (ev_empty_request) n_empty++;
      if (ev_dsa_skip)      n_skip++;
      if (ev_tail_block)    n_tblk++;
      if (int'(hsram_cells_used) > max_used) max_used = int'(hsram_cells_used);
      if (err_vmiss || err_rr_overflow || err_hsram_full || err_tsram_full) begin
        n_err++;
        fail($sformatf("error flag vmiss=%0b rr=%0b hfull=%0b tfull=%0b",
                       err_vmiss, err_rr_overflow, err_hsram_full, err_tsram_full));
      end
      if (out_valid) begin
        int q;
        longint et;
        n_out++;
        checks++;
        if (exp_q.size() == 0) fail("cell with no request");
        else begin
          q = exp_q.pop_front();
          et = exp_t.pop_front();
          if (et != cyc) fail($sformatf("cell out at slot %0d, expected %0d", cyc, et));
          if (out_miss) fail($sformatf("miss on queue %0d", q));
          else if (out_cell != mk_cell(q, seq_out[q]))
            fail($sformatf("queue %0d cell %0d wrong: %h", q, seq_out[q], out_cell));
          seq_out[q]++;
        end
      end
    end
  end

  initial begin
    for (int i = 0; i < Q; i++) begin
      seq_in[i] = 0; in_dram[i] = 0; reqd[i] = 0; seq_out[i] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    traffic = 1'b1;
    repeat (CYCLES / 2) @(negedge clk);
    phase2 = 1;
    repeat (CYCLES / 2) @(negedge clk);
    traffic = 1'b0;
    repeat (DELAY + 4 * LAT + 200) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) fail($sformatf("%0d requested cells never came out", exp_q.size()));
    checks++;
    if (u_dram.conflicts != 0) fail($sformatf("%0d DRAM bank conflicts", u_dram.conflicts));
    checks++;
    if (u_dram.overlaps != 0) fail($sformatf("%0d DRAM transfer overlaps", u_dram.overlaps));
    checks++;
    if (u_dram.uninit != 0) fail($sformatf("%0d reads of unwritten DRAM", u_dram.uninit));
    checks++;
    if (max_used > NCELLS) fail("h-SRAM over its size");
    // every mechanism happened at least once
    checks++; if (n_rep == 0)   fail("no replenishment");
    checks++; if (n_crit == 0)  fail("no critical queue found");
    checks++; if (n_empty == 0) fail("no empty request");
    checks++; if (n_skip == 0)  fail("DSA never overtook a locked request");
    checks++; if (u_dram.reorders == 0) fail("no out-of-order block delivery");
    checks++; if (n_tblk == 0)  fail("no t-MMA block transfer");
    checks++; if (n_out < 100)  fail("too few cells delivered");
    $display("cells out %0d, replenish %0d (critical %0d), empty requests %0d",
             n_out, n_rep, n_crit, n_empty);
    $display("DSA overtakes %0d, out-of-order blocks %0d, t-MMA blocks %0d",
             n_skip, u_dram.reorders, n_tblk);
    $display("h-SRAM cells used max %0d of %0d, request-to-cell delay %0d slots",
             max_used, NCELLS, DELAY);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cfds_buffer dut (.*);

endmodule
