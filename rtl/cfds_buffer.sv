// cfds_buffer -- VOQ packet buffer with a conflict-free DRAM system (CFDS).
//
// Q virtual output queues are kept in three places: the tail of each queue in
// the t-SRAM, the head in the h-SRAM and the body in an external DRAM of M
// banks. One clock cycle is one slot. Each slot at most one cell arrives from
// the line (in_*) and the arbiter (switch fabric scheduler) asks for at most
// one cell (req_*); the cell comes out on out_* a fixed delay later.
//
// Write side: tail_buffer gathers cells and every b slots sends a block of b
// cells of one queue to DRAM (dram_wr_*).
//
// Read side, as in the CFDS scheme:
//   vmma         lookahead of LA requests, virtual occupancy counters and
//                the ECQF V-MMA, which every b slots asks for one block of b
//                cells of the earliest critical queue;
//   dss          Requests Register, Ongoing Requests Register and DSA, which
//                issue each request to a DRAM bank that is not busy
//                (dram_rd_*), possibly out of order;
//   latency_sr   delays each request leaving the lookahead by the largest
//                reordering delay, plus this implementation's pipeline;
//   hsram        receives the blocks (dram_rdata_*) and hands out cells in
//                queue order.
// The arbiter's request thus waits LA + DEPTH slots plus one for the SRAM
// read: out_* follows req_* by LA + LAT + 1 cycles, LAT being
//   2b(2Q/G-1)(B/b-1) + b + DRAM_LAT + 2.
// The three extra terms are this design's: b because a decision enters the
// RR one decision before it can leave it, DRAM_LAT for the DRAM access,
// 2 for the issue register and the SRAM write.
//
// DRAM interface (the DRAM itself is outside this design): a read command
// names a bank, a bank-local block address and a tag; the DRAM must return
// the b cells of the block DRAM_LAT cycles later, one per cycle, in order,
// with the tag and the cell index. dram_rd_q/ord and dram_wr_q/ord name the
// queue and block ordinal of each transfer; a DRAM needs only bank and
// address. Bank accesses are at least b cycles apart
// and the same bank is not accessed again within B cycles.
//
// Defaults are the main configuration evaluated for the CFDS scheme:
// OC3072 (160 Gb/s) with 64-byte cells, Q = 512, M = 256, B = 32, b = 4.
// DRAM_LAT = B/2 slots is the DRAM random access time implied by
// B = 2RT/C; it is this design's assumption.
module cfds_buffer
  import cfds_pkg::*;
#(
  parameter int Q        = 512,
  parameter int M        = 256,
  parameter int B        = 32,
  parameter int BSMALL   = 4,
  parameter int ORD_W    = 12,
  parameter int CELL_W   = 512,
  parameter int DRAM_LAT = B / 2,
  parameter int LA       = ecqf_lookahead(Q, BSMALL),
  parameter bit MDQF     = 1'b0,
  localparam int QW     = $clog2(Q),
  localparam int MW     = $clog2(M),
  localparam int GW     = $clog2(M / (B / BSMALL)),
  localparam int BW     = $clog2(B / BSMALL),
  localparam int AW     = (QW - GW) + (ORD_W - BW),
  localparam int PW     = (BSMALL > 1) ? $clog2(BSMALL) : 1,
  localparam int NCELLS = hsram_cells(Q, M, B, BSMALL),
  localparam int EXTRA  = BSMALL + DRAM_LAT + 2,
  localparam int NDESC  = hsram_descs(Q, BSMALL, LA, latency_len(Q, M, B, BSMALL) + EXTRA),
  localparam int DW     = $clog2(NDESC),
  localparam int CW     = $clog2(NCELLS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // cells from the line
  input  logic              in_valid,
  input  logic [QW-1:0]     in_q,
  input  logic [CELL_W-1:0] in_cell,
  // requests from the arbiter, cells to the switch fabric
  input  logic              req_valid,
  input  logic [QW-1:0]     req_q,
  output logic              out_valid,
  output logic              out_miss,
  output logic [CELL_W-1:0] out_cell,
  // DRAM write port
  output logic              dram_wr_valid,
  output logic [MW-1:0]     dram_wr_bank,
  output logic [AW-1:0]     dram_wr_addr,
  output logic [PW-1:0]     dram_wr_idx,
  output logic [CELL_W-1:0] dram_wr_cell,
  output logic [QW-1:0]     dram_wr_q,
  output logic [ORD_W-1:0]  dram_wr_ord,
  // DRAM read command and returned cells
  output logic              dram_rd_valid,
  output logic [MW-1:0]     dram_rd_bank,
  output logic [AW-1:0]     dram_rd_addr,
  output logic [DW-1:0]     dram_rd_tag,
  output logic [QW-1:0]     dram_rd_q,
  output logic [ORD_W-1:0]  dram_rd_ord,
  input  logic              dram_rdata_valid,
  input  logic [DW-1:0]     dram_rdata_tag,
  input  logic [PW-1:0]     dram_rdata_idx,
  input  logic [CELL_W-1:0] dram_rdata_cell,
  // events and errors
  output logic              ev_replenish,
  output logic              ev_critical,
  output logic              ev_empty_request,
  output logic              ev_dsa_skip,
  output logic              ev_tail_block,
  output logic              err_vmiss,
  output logic              err_rr_overflow,
  output logic              err_hsram_full,
  output logic              err_tsram_full,
  output logic [CW:0]       hsram_cells_used
);

  // V-MMA
  logic          head_valid;
  logic [QW-1:0] head_q;
  logic          rep_valid, rep_real;
  logic [QW-1:0] rep_q;
  // latency register
  logic          lat_valid;
  logic [QW-1:0] lat_q;
  // h-SRAM descriptors
  logic [DW-1:0] da_desc;

  tail_buffer #(
    .Q(Q), .M(M), .B(B), .BSMALL(BSMALL), .ORD_W(ORD_W), .CELL_W(CELL_W)
  ) u_tail (
    .clk, .rst_n,
    .in_valid, .in_q, .in_cell,
    .wr_valid(dram_wr_valid), .wr_q(dram_wr_q), .wr_ord(dram_wr_ord),
    .wr_bank(dram_wr_bank), .wr_addr(dram_wr_addr), .wr_idx(dram_wr_idx),
    .wr_cell(dram_wr_cell), .err_full(err_tsram_full)
  );

  vmma #(.Q(Q), .BSMALL(BSMALL), .LA(LA), .MDQF(MDQF)) u_vmma (
    .clk, .rst_n,
    .arb_valid(req_valid), .arb_q(req_q),
    .head_valid, .head_q,
    .rep_valid, .rep_real, .rep_q, .rep_critical(ev_critical),
    .vmiss(err_vmiss)
  );

  dss #(
    .Q(Q), .M(M), .B(B), .BSMALL(BSMALL), .ORD_W(ORD_W), .DW(DW)
  ) u_dss (
    .clk, .rst_n,
    .in_valid(rep_valid), .in_real(rep_real), .in_q(rep_q), .in_desc(da_desc),
    .iss_valid(dram_rd_valid), .iss_q(dram_rd_q), .iss_ord(dram_rd_ord),
    .iss_bank(dram_rd_bank), .iss_addr(dram_rd_addr), .iss_desc(dram_rd_tag),
    .err_overflow(err_rr_overflow), .dsa_skip(ev_dsa_skip)
  );

  latency_sr #(
    .Q(Q), .M(M), .B(B), .BSMALL(BSMALL), .EXTRA(EXTRA)
  ) u_lat (
    .clk, .rst_n,
    .in_valid(head_valid), .in_q(head_q),
    .out_valid(lat_valid), .out_q(lat_q)
  );

  hsram #(
    .Q(Q), .M(M), .B(B), .BSMALL(BSMALL), .CELL_W(CELL_W),
    .NCELLS(NCELLS), .NDESC(NDESC)
  ) u_hsram (
    .clk, .rst_n,
    .da_valid(rep_valid && rep_real), .da_q(rep_q), .da_desc,
    .wr_valid(dram_rdata_valid), .wr_desc(dram_rdata_tag),
    .wr_idx(dram_rdata_idx), .wr_cell(dram_rdata_cell),
    .rd_valid(lat_valid), .rd_q(lat_q),
    .out_valid, .out_miss, .out_cell,
    .cells_used(hsram_cells_used), .err_full(err_hsram_full)
  );

  assign ev_replenish     = rep_valid && rep_real;
  assign ev_empty_request = rep_valid && !rep_real;
  assign ev_tail_block    = dram_wr_valid && (dram_wr_idx == '0);

endmodule
