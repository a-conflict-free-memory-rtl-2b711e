// tail_buffer -- tail SRAM (t-SRAM) and its memory management algorithm
// (t-MMA).
//
// Cells arriving from the line (at most one per slot, in_*) are appended to
// their queue in the t-SRAM. Whenever it is not already sending, the t-MMA
// picks a queue that holds at least b (BSMALL) cells and moves its b oldest
// cells to DRAM, one cell per cycle over b cycles, as one block. Since cells
// leave as fast as they arrive once some queue holds b cells, a t-SRAM of
// Q(b-1)+1 cells never overflows, whichever eligible queue is picked.
// Deciding in any idle cycle, rather than only once every b slots, is what
// keeps the bound at Q(b-1)+1 with one arrival per cycle. Blocks of a queue get consecutive ordinals and are
// placed in DRAM by bank_map, the same mapping the read side uses.
//
// The t-SRAM is a shared cell pool with a linked list per queue and a stack
// of freed cells plus a high-water mark of never used ones. Among eligible
// queues the t-MMA takes the first at or after a round-robin pointer.
//
// Timing: a cell offered at cycle t can be part of a block chosen at t+1 or
// later; blocks follow each other without a gap. The write port (wr_*) is registered: cell k (wr_idx = k) of a block
// chosen at cycle t appears at cycle t+1+k with the block's bank, bank-local
// address, queue and ordinal. err_full pulses for a cell dropped because the
// pool is full.
//
// The t-MMA rule (any queue with at least b cells) and the t-SRAM size follow
// the hybrid SRAM/DRAM buffer the CFDS scheme builds on, at CFDS's granularity
// b. The linked-list organisation, the round-robin choice and the write port
// are this design's choices; how write transfers share the DRAM banks with
// read transfers is not part of this block.
module tail_buffer
  import cfds_pkg::*;
#(
  parameter int Q      = 512,
  parameter int M      = 256,
  parameter int B      = 32,
  parameter int BSMALL = 4,
  parameter int ORD_W  = 12,
  parameter int CELL_W = 512,
  parameter int NCELLS = tsram_cells(Q, BSMALL),
  localparam int QW = $clog2(Q),
  localparam int MW = $clog2(M),
  localparam int GW = $clog2(M / (B / BSMALL)),
  localparam int BW = $clog2(B / BSMALL),
  localparam int AW = (QW - GW) + (ORD_W - BW),
  localparam int PW = (BSMALL > 1) ? $clog2(BSMALL) : 1,
  localparam int NW = $clog2(NCELLS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [QW-1:0]     in_q,
  input  logic [CELL_W-1:0] in_cell,
  output logic              wr_valid,
  output logic [QW-1:0]     wr_q,
  output logic [ORD_W-1:0]  wr_ord,
  output logic [MW-1:0]     wr_bank,
  output logic [AW-1:0]     wr_addr,
  output logic [PW-1:0]     wr_idx,
  output logic [CELL_W-1:0] wr_cell,
  output logic              err_full
);

  logic [CELL_W-1:0] data  [NCELLS];
  logic [NW-1:0]     cnext [NCELLS];
  logic [NW-1:0]     chead [Q];
  logic [NW-1:0]     ctail [Q];
  logic [NW:0]       tcnt  [Q];
  logic [ORD_W-1:0]  word  [Q];
  logic [NW-1:0]     fstk  [NCELLS];
  logic [NW:0]       fsp, fhwm;
  logic [PW-1:0]     phase;   // cell of the block being sent
  logic [QW-1:0]     cur_q, rr_ptr;
  logic              cur_act;

  logic          pick_found;
  logic [QW-1:0] pick_q;
  logic          pop;
  logic [QW-1:0] pop_q;
  logic [NW-1:0] pop_c, new_c;
  logic          f_empty;
  logic [NW:0]   cnt_after_pop;
  logic [MW-1:0] m_bank;
  logic [AW-1:0] m_addr;

  // t-MMA: first queue at or after rr_ptr holding at least b cells
  always_comb begin
    pick_found = 1'b0;
    pick_q     = '0;
    for (int i = Q - 1; i >= 0; i--) begin
      if (tcnt[i] >= (NW+1)'(BSMALL)) begin
        pick_found = 1'b1;
        pick_q     = QW'(i);
      end
    end
    for (int i = Q - 1; i >= 0; i--) begin
      if (QW'(i) >= rr_ptr && tcnt[i] >= (NW+1)'(BSMALL)) pick_q = QW'(i);
    end
  end

  always_comb begin
    if (!cur_act) begin
      pop   = pick_found;
      pop_q = pick_q;
    end else begin
      pop   = cur_act;
      pop_q = cur_q;
    end
    pop_c   = chead[pop_q];
    f_empty = (fsp == '0) && (fhwm == (NW+1)'(NCELLS));
    if (pop)            new_c = pop_c;
    else if (fsp != '0) new_c = fstk[fsp[NW-1:0] - 1'b1];
    else                new_c = fhwm[NW-1:0];
    cnt_after_pop = tcnt[in_q];
    if (pop && pop_q == in_q) cnt_after_pop = cnt_after_pop - 1'b1;
  end

  bank_map #(.Q(Q), .M(M), .B(B), .BSMALL(BSMALL), .ORD_W(ORD_W)) u_map (
    .q(pop_q), .ord(word[pop_q]),
    .group(), .bank_in_group(), .bank(m_bank), .addr(m_addr)
  );

  always_ff @(posedge clk) begin
    if (in_valid && !(f_empty && !pop)) data[new_c] <= in_cell;
    wr_cell <= data[pop_c];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < Q; i++) begin
        tcnt[i] <= '0;
        word[i] <= '0;
      end
      fsp      <= '0;
      fhwm     <= '0;
      phase    <= '0;
      cur_q    <= '0;
      cur_act  <= 1'b0;
      rr_ptr   <= '0;
      wr_valid <= 1'b0;
      wr_q     <= '0;
      wr_ord   <= '0;
      wr_bank  <= '0;
      wr_addr  <= '0;
      wr_idx   <= '0;
      err_full <= 1'b0;
    end else begin
      if (pop) begin
        phase <= (phase == PW'(BSMALL - 1)) ? '0 : phase + 1'b1;
        cur_act <= (phase != PW'(BSMALL - 1));
      end
      if (!cur_act) begin
        cur_q <= pick_q;
        if (pick_found) rr_ptr <= pick_q + 1'b1;
      end
      // pop one cell of the block being sent
      wr_valid <= pop;
      wr_q     <= pop_q;
      wr_ord   <= word[pop_q];
      wr_bank  <= m_bank;
      wr_addr  <= m_addr;
      wr_idx   <= phase;
      if (pop) begin
        chead[pop_q] <= cnext[pop_c];
        tcnt[pop_q]  <= tcnt[pop_q] - 1'b1;
        if (phase == PW'(BSMALL - 1)) word[pop_q] <= word[pop_q] + 1'b1;
      end
      // append the arriving cell
      err_full <= in_valid && f_empty && !pop;
      if (in_valid && !(f_empty && !pop)) begin
        if (cnt_after_pop == '0) chead[in_q] <= new_c;
        else                     cnext[ctail[in_q]] <= new_c;
        ctail[in_q] <= new_c;
        tcnt[in_q]  <= cnt_after_pop + 1'b1;
      end
      // free pool
      if (pop && !in_valid) begin
        fstk[fsp[NW-1:0]] <= pop_c;
        fsp <= fsp + 1'b1;
      end else if (!pop && in_valid && !f_empty) begin
        if (fsp != '0) fsp <= fsp - 1'b1;
        else           fhwm <= fhwm + 1'b1;
      end
    end
  end

endmodule
