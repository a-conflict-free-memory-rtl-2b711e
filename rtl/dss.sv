// dss -- DRAM scheduler subsystem: Requests Register (RR), Ongoing Requests
// Register (ORR) and DRAM Scheduler Algorithm (DSA).
//
// Every BSMALL (b) cycles the V-MMA hands over one replenish request (in_*),
// either for a queue or empty. The request is given the next block ordinal of
// its queue, mapped to a DRAM bank (bank_map) and placed at the tail of the
// RR, a shift register of L = (2Q/G-1)(B/b-1)+1 entries that starts filled
// with empty requests. In the same cycle the DSA picks the oldest RR entry
// that is empty or addressed to a bank not held in the ORR, removes it and
// shifts the younger entries one place ahead. The ORR remembers the banks of
// the last B/b-1 transfers: a bank is busy for B slots, that is B/b
// decisions, so these banks are locked. A chosen real request starts a
// transfer of b cells, reported one cycle later on iss_*; a chosen empty one
// starts nothing; dsa_skip marks a pick that overtook locked requests. A
// request that always sits at the head leaves (L-1)b slots after it
// entered; a request can be overtaken at most Rmax = L-1 times.
// If every RR entry is a real request to a locked bank (which the RR size
// rules out) the new request is dropped and err_overflow pulses.
//
// RR, ORR, their sizes and the oldest-unlocked-first rule are those of the
// CFDS scheme. The per-queue ordinal counters, the empty-filled reset state,
// the descriptor tag (desc) carried for the h-SRAM and the registered issue
// port are this design's choices. The assertion a_no_locked_issue checks the
// DSA rule in simulation; its disable iff reads rst_n synchronously, so lint
// reports rst_n as both a synchronous and an asynchronous signal. The flops
// themselves all reset asynchronously.
module dss
  import cfds_pkg::*;
#(
  parameter int Q      = 512,
  parameter int M      = 256,
  parameter int B      = 32,
  parameter int BSMALL = 4,
  parameter int ORD_W  = 12,
  parameter int L      = rr_len(Q, M, B, BSMALL),
  parameter int DW     = 10,
  localparam int QW  = $clog2(Q),
  localparam int MW  = $clog2(M),
  localparam int GW  = $clog2(M / (B / BSMALL)),
  localparam int BW  = $clog2(B / BSMALL),
  localparam int AW  = (QW - GW) + (ORD_W - BW),
  localparam int NO  = B / BSMALL - 1,
  localparam int LW  = $clog2(L + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // replenish requests from the V-MMA
  input  logic             in_valid,
  input  logic             in_real,
  input  logic [QW-1:0]    in_q,
  input  logic [DW-1:0]    in_desc,
  // transfer started (one cycle after the decision)
  output logic             iss_valid,
  output logic [QW-1:0]    iss_q,
  output logic [ORD_W-1:0] iss_ord,
  output logic [MW-1:0]    iss_bank,
  output logic [AW-1:0]    iss_addr,
  output logic [DW-1:0]    iss_desc,
  output logic             err_overflow,
  // the DSA passed over the locked request(s) ahead of its pick
  output logic             dsa_skip
);

  typedef struct packed {
    logic             real_req;
    logic [QW-1:0]    q;
    logic [ORD_W-1:0] ord;
    logic [MW-1:0]    bank;
    logic [AW-1:0]    addr;
    logic [DW-1:0]    desc;
  } rr_entry_t;

  typedef struct packed {
    logic          v;
    logic [MW-1:0] bank;
  } orr_entry_t;

  rr_entry_t        rr  [L];
  orr_entry_t       orr [NO];
  logic [ORD_W-1:0] ord_cnt [Q];

  rr_entry_t new_e;
  logic [MW-1:0] nm_bank;
  logic [AW-1:0] nm_addr;
  logic          pick_found;
  logic [LW-1:0] pick;
  logic [L-1:0]  lockd;

  bank_map #(.Q(Q), .M(M), .B(B), .BSMALL(BSMALL), .ORD_W(ORD_W)) u_map (
    .q(in_q), .ord(ord_cnt[in_q]),
    .group(), .bank_in_group(), .bank(nm_bank), .addr(nm_addr)
  );

  always_comb begin
    new_e.real_req = in_real;
    new_e.q        = in_q;
    new_e.ord      = ord_cnt[in_q];
    new_e.desc     = in_desc;
    new_e.bank     = nm_bank;
    new_e.addr     = nm_addr;
  end

  always_comb begin
    for (int i = 0; i < L; i++) begin
      lockd[i] = 1'b0;
      for (int j = 0; j < NO; j++)
        if (orr[j].v && orr[j].bank == rr[i].bank) lockd[i] = 1'b1;
    end
    pick_found = 1'b0;
    pick       = '0;
    for (int i = L - 1; i >= 0; i--) begin
      if (!rr[i].real_req || !lockd[i]) begin
        pick_found = 1'b1;
        pick       = LW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < L; i++)  rr[i] <= '0;
      for (int j = 0; j < NO; j++) orr[j] <= '0;
      for (int i = 0; i < Q; i++)  ord_cnt[i] <= '0;
      iss_valid    <= 1'b0;
      iss_q        <= '0;
      iss_ord      <= '0;
      iss_bank     <= '0;
      iss_addr     <= '0;
      iss_desc     <= '0;
      err_overflow <= 1'b0;
      dsa_skip     <= 1'b0;
    end else begin
      iss_valid    <= 1'b0;
      err_overflow <= 1'b0;
      dsa_skip     <= in_valid && pick_found && (pick != '0);
      if (in_valid) begin
        if (pick_found) begin
          for (int i = 0; i < L - 1; i++)
            if (LW'(i) >= pick) rr[i] <= rr[i+1];
          rr[L-1] <= new_e;
          if (in_real) ord_cnt[in_q] <= ord_cnt[in_q] + 1'b1;
          iss_valid <= rr[pick].real_req;
          iss_q     <= rr[pick].q;
          iss_ord   <= rr[pick].ord;
          iss_bank  <= rr[pick].bank;
          iss_addr  <= rr[pick].addr;
          iss_desc  <= rr[pick].desc;
        end else begin
          err_overflow <= 1'b1;
        end
        // the ORR ages by one decision
        for (int j = 0; j < NO - 1; j++) orr[j] <= orr[j+1];
        orr[NO-1].v    <= pick_found && rr[pick].real_req;
        orr[NO-1].bank <= rr[pick].bank;
      end
    end
  end

  // the bank handed to DRAM is never one of the locked banks
  a_no_locked_issue: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && pick_found && rr[pick].real_req |-> !lockd[pick])
    else $error("dss: transfer to a locked bank");

endmodule
