// bank_map -- DRAM address mapping of the conflict-free bank organisation.
//
// A DRAM transfer moves one block of b cells of one queue. A block is named
// by its queue number and its ordinal, the position of the block inside that
// queue (0, 1, 2, ...). The M banks are split into G = M/(B/b) groups of B/b
// banks. The group is given by the low-order bits of the queue number, so
// each group holds Q/G queues; the bank inside the group is given by the
// low-order bits of the ordinal, so consecutive blocks of a queue go round
// robin over the B/b banks of its group and B/b consecutive transfers of one
// queue never meet a busy bank. The remaining bits, the high bits of the queue
// number above the high bits of the ordinal, address the block inside the
// bank. This split is the one of the CFDS scheme; packing the rest into one
// bank-local block address (instead of separate row and column fields) is
// this design's choice.
//
// Purely combinational. Q, M and B/b must be powers of two, with Q >= G.
//   q, ord   -> group, bank_in_group, bank (= group*(B/b) + bank_in_group),
//               addr (bank-local block address)
module bank_map #(
  parameter int Q      = 512,
  parameter int M      = 256,
  parameter int B      = 32,
  parameter int BSMALL = 4,
  parameter int ORD_W  = 12,
  localparam int QW  = $clog2(Q),
  localparam int GW  = $clog2(M / (B / BSMALL)),
  localparam int BW  = $clog2(B / BSMALL),
  localparam int MW  = $clog2(M),
  localparam int AW  = (QW - GW) + (ORD_W - BW)
) (
  input  logic [QW-1:0]    q,
  input  logic [ORD_W-1:0] ord,
  output logic [GW-1:0]    group,
  output logic [BW-1:0]    bank_in_group,
  output logic [MW-1:0]    bank,
  output logic [AW-1:0]    addr
);

  initial begin
    assert (GW + BW == MW) else $error("bank_map: M must equal G*(B/b)");
    assert (QW >= GW) else $error("bank_map: need at least one queue per group");
  end

  always_comb begin
    group         = q[GW-1:0];
    bank_in_group = ord[BW-1:0];
    bank          = {group, bank_in_group};
    addr          = {q[QW-1:GW], ord[ORD_W-1:BW]};
  end

endmodule
