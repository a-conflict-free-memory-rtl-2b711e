// dram_model -- behavioural model of the interleaved DRAM of M banks
// (simulation only, not synthesizable).
//
// Stores cells by {bank, bank-local block address, cell index} in an
// associative array. A write cell (wr_*) is stored at once. A read command
// (rd_*) at cycle t returns the b cells of the block at cycles
// t+DRAM_LAT .. t+DRAM_LAT+b-1 on rdata_*, with the command's tag. The model
// ignores commands while rst_n is low, when the controller's outputs are not
// yet defined. It counts rule breaks instead of stopping:
//   conflicts    a read to a bank read less than B cycles before
//   overlaps     a read whose cells would collide with the previous one's
//   uninit       a read of a cell never written
// reorders counts reads of a queue's block whose ordinal is below one already
// read (out-of-order delivery), using the rd_q/rd_ord side information.
module dram_model #(
  parameter int M        = 256,
  parameter int AW       = 13,
  parameter int PW       = 2,
  parameter int DW       = 10,
  parameter int QW       = 9,
  parameter int ORD_W    = 12,
  parameter int CELL_W   = 512,
  parameter int B        = 32,
  parameter int BSMALL   = 4,
  parameter int DRAM_LAT = 16,
  localparam int MW = $clog2(M)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_valid,
  input  logic [MW-1:0]     wr_bank,
  input  logic [AW-1:0]     wr_addr,
  input  logic [PW-1:0]     wr_idx,
  input  logic [CELL_W-1:0] wr_cell,
  input  logic              rd_valid,
  input  logic [MW-1:0]     rd_bank,
  input  logic [AW-1:0]     rd_addr,
  input  logic [DW-1:0]     rd_tag,
  input  logic [QW-1:0]     rd_q,
  input  logic [ORD_W-1:0]  rd_ord,
  output logic              rdata_valid,
  output logic [DW-1:0]     rdata_tag,
  output logic [PW-1:0]     rdata_idx,
  output logic [CELL_W-1:0] rdata_cell
);

  typedef struct {
    longint          due;
    logic [DW-1:0]   tag;
    logic [MW-1:0]   bank;
    logic [AW-1:0]   addr;
  } cmd_t;

  logic [CELL_W-1:0] mem [logic [MW+AW+PW-1:0]];
  longint            last_rd [M];
  longint            max_ord [int];
  cmd_t              pend [$];
  longint            now = 0;
  longint            last_due = -1000;
  int                conflicts = 0;
  int                overlaps = 0;
  int                uninit = 0;
  int                reads = 0;
  int                reorders = 0;
  int                k = 0;

  initial begin
    for (int i = 0; i < M; i++) last_rd[i] = -1000;
    rdata_valid = 1'b0;
    rdata_tag   = '0;
    rdata_idx   = '0;
    rdata_cell  = '0;
  end

  always @(posedge clk) begin
    now <= now + 1;
    if (wr_valid && rst_n) mem[{wr_bank, wr_addr, wr_idx}] = wr_cell;
    if (rd_valid && rst_n) begin
      cmd_t c;
      reads++;
      if (now - last_rd[rd_bank] < B) conflicts++;
      last_rd[rd_bank] = now;
      c.due  = now + DRAM_LAT;
      c.tag  = rd_tag;
      c.bank = rd_bank;
      c.addr = rd_addr;
      if (c.due < last_due + BSMALL) overlaps++;
      last_due = c.due;
      pend.push_back(c);
      if (max_ord.exists(int'(rd_q)) && longint'(rd_ord) < max_ord[int'(rd_q)]) reorders++;
      if (!max_ord.exists(int'(rd_q)) || longint'(rd_ord) > max_ord[int'(rd_q)])
        max_ord[int'(rd_q)] = longint'(rd_ord);
    end
    rdata_valid <= 1'b0;
    if (pend.size() > 0 && pend[0].due <= now) begin
      logic [MW+AW+PW-1:0] key;
      key = {pend[0].bank, pend[0].addr, PW'(k)};
      rdata_valid <= 1'b1;
      rdata_tag   <= pend[0].tag;
      rdata_idx   <= PW'(k);
      if (mem.exists(key)) rdata_cell <= mem[key];
      else begin
        rdata_cell <= '1;
        uninit++;
      end
      if (k == BSMALL - 1) begin
        k = 0;
        void'(pend.pop_front());
      end else k++;
    end
  end

endmodule
