// hsram -- head SRAM of the packet buffer: holds, per queue, the cells
// fetched from DRAM until the arbiter's request for them leaves the latency
// register.
//
// NCELLS, the data capacity, defaults to the CFDS size for the full ECQF
// lookahead, Q(b-1) + b*Rmax cells. The DRAM scheduler may start the
// transfers of one queue out of order, so cells cannot simply be appended to
// their queue as they come back. Instead each replenish request is given a
// descriptor when the V-MMA makes it; descriptors are linked per queue in
// request order, which is cell order, and each holds BSMALL (b) cell
// pointers. The DRAM transfer carries the descriptor number as its tag. Each
// returning cell takes a free data cell and its pointer is written into the
// descriptor; reading a cell frees it at once, and the last cell of a
// descriptor frees the descriptor. The data SRAM thus holds a cell only from
// its arrival to its read, as the CFDS sizing counts it. Free cells and
// descriptors come from a stack of returned entries, or from a high-water
// mark of never used ones, so nothing needs clearing at reset. NDESC, the
// number of descriptors, must cover every block decided and not yet fully
// read: cfds_pkg::hsram_descs gives that bound from the lookahead and latency
// lengths, and the top passes the value for its own pipeline.
//
// Ports and timing:
//   da_*  descriptor alloc for queue da_q; da_desc is valid in the same cycle
//   wr_*  cell write for descriptor wr_desc; wr_idx is the cell's place in
//         the block
//   rd_*  read the next cell of queue rd_q; out_* one cycle later. out_miss
//         is set when the cell is not there; the queue state then stays put.
//   cells_used  cells held; err_full pulses when an alloc finds its pool empty.
// The descriptor organisation is this design's choice: the CFDS scheme gives
// the SRAM's size and role, not its organisation.
module hsram
  import cfds_pkg::*;
#(
  parameter int Q      = 512,
  parameter int M      = 256,
  parameter int B      = 32,
  parameter int BSMALL = 4,
  parameter int CELL_W = 512,
  parameter int NCELLS = hsram_cells(Q, M, B, BSMALL),
  parameter int NDESC  = hsram_descs(Q, BSMALL, ecqf_lookahead(Q, BSMALL),
                                    latency_len(Q, M, B, BSMALL)),
  localparam int QW = $clog2(Q),
  localparam int PW = (BSMALL > 1) ? $clog2(BSMALL) : 1,
  localparam int DW = $clog2(NDESC),
  localparam int CW = $clog2(NCELLS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              da_valid,
  input  logic [QW-1:0]     da_q,
  output logic [DW-1:0]     da_desc,
  input  logic              wr_valid,
  input  logic [DW-1:0]     wr_desc,
  input  logic [PW-1:0]     wr_idx,
  input  logic [CELL_W-1:0] wr_cell,
  input  logic              rd_valid,
  input  logic [QW-1:0]     rd_q,
  output logic              out_valid,
  output logic              out_miss,
  output logic [CELL_W-1:0] out_cell,
  output logic [CW:0]       cells_used,
  output logic              err_full
);

  logic [CELL_W-1:0] data  [NCELLS];
  logic [DW-1:0]     dnext [NDESC];
  logic [CW-1:0]     dcell [NDESC][BSMALL];
  logic              dv    [NDESC][BSMALL];
  logic [DW-1:0]     qhead [Q];
  logic [DW-1:0]     qtail [Q];
  logic [DW:0]       qcnt  [Q];
  logic [PW-1:0]     roff  [Q];
  logic [DW-1:0]     dstk  [NDESC];
  logic [DW:0]       dsp, dhwm;
  logic [CW-1:0]     cstk  [NCELLS];
  logic [CW:0]       csp, chwm;

  logic [DW-1:0] r_desc;
  logic [CW-1:0] r_cell;
  logic          r_hit, r_take, r_last, r_free;
  logic [DW:0]   cnt_after_pop;
  logic          d_empty, c_empty, w_ok, d_ok;
  logic [CW-1:0] w_cell;

  always_comb begin
    r_desc  = qhead[rd_q];
    r_cell  = dcell[r_desc][roff[rd_q]];
    r_hit   = (qcnt[rd_q] != '0) && dv[r_desc][roff[rd_q]];
    r_take  = rd_valid && r_hit;
    r_last  = (roff[rd_q] == PW'(BSMALL - 1));
    r_free  = r_take && r_last;
    // allocation, with a same-cycle free handed straight over
    d_empty = (dsp == '0) && (dhwm == (DW+1)'(NDESC));
    c_empty = (csp == '0) && (chwm == (CW+1)'(NCELLS));
    if (r_free)          da_desc = r_desc;
    else if (dsp != '0)  da_desc = dstk[dsp[DW-1:0] - 1'b1];
    else                 da_desc = dhwm[DW-1:0];
    if (r_take)          w_cell = r_cell;
    else if (csp != '0)  w_cell = cstk[csp[CW-1:0] - 1'b1];
    else                 w_cell = chwm[CW-1:0];
    d_ok = da_valid && (r_free || !d_empty);
    w_ok = wr_valid && (r_take || !c_empty);
    cnt_after_pop = qcnt[da_q];
    if (r_free && rd_q == da_q) cnt_after_pop = cnt_after_pop - 1'b1;
  end

  always_ff @(posedge clk) begin
    if (w_ok) data[w_cell] <= wr_cell;
    out_cell <= data[r_cell];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < Q; i++) begin
        qcnt[i] <= '0;
        roff[i] <= '0;
      end
      dsp        <= '0;
      dhwm       <= '0;
      csp        <= '0;
      chwm       <= '0;
      cells_used <= '0;
      out_valid  <= 1'b0;
      out_miss   <= 1'b0;
      err_full   <= 1'b0;
    end else begin
      out_valid <= rd_valid;
      out_miss  <= rd_valid && !r_hit;
      err_full  <= (da_valid && !d_ok) || (wr_valid && !w_ok);
      // cell read
      if (r_take) begin
        dv[r_desc][roff[rd_q]] <= 1'b0;
        if (r_last) begin
          roff[rd_q]  <= '0;
          qhead[rd_q] <= dnext[r_desc];
          qcnt[rd_q]  <= qcnt[rd_q] - 1'b1;
        end else begin
          roff[rd_q] <= roff[rd_q] + 1'b1;
        end
      end
      // descriptor alloc and link at the queue tail
      if (d_ok) begin
        for (int k = 0; k < BSMALL; k++) dv[da_desc][k] <= 1'b0;
        if (cnt_after_pop == '0) qhead[da_q] <= da_desc;
        else                     dnext[qtail[da_q]] <= da_desc;
        qtail[da_q] <= da_desc;
        qcnt[da_q]  <= cnt_after_pop + 1'b1;
      end
      // cell write from DRAM
      if (w_ok) begin
        dcell[wr_desc][wr_idx] <= w_cell;
        dv[wr_desc][wr_idx]    <= 1'b1;
      end
      // free pools
      if (r_free && !da_valid) begin
        dstk[dsp[DW-1:0]] <= r_desc;
        dsp <= dsp + 1'b1;
      end else if (!r_free && d_ok) begin
        if (dsp != '0) dsp <= dsp - 1'b1;
        else           dhwm <= dhwm + 1'b1;
      end
      if (r_take && !wr_valid) begin
        cstk[csp[CW-1:0]] <= r_cell;
        csp <= csp + 1'b1;
      end else if (!r_take && w_ok) begin
        if (csp != '0) csp <= csp - 1'b1;
        else           chwm <= chwm + 1'b1;
      end
      cells_used <= cells_used + (CW+1)'(w_ok) - (CW+1)'(r_take);
    end
  end

endmodule
