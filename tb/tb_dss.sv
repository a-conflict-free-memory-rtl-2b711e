// tb_dss -- checks the DRAM scheduler subsystem against a reference model.
//
// Q=8, M=16, B=8, b=2: G=4 groups of B/b=4 banks, RR of L=10 entries, ORR of
// 3. Every b cycles a request goes in: mostly for queues of one group, so
// that their blocks meet locked banks, sometimes for any queue, sometimes
// empty. The reference keeps its own RR and ORR, computes banks by division
// and remainder, picks the oldest request that is empty or to an unlocked
// bank, and the transfer the DSS starts must match it. It also checks that a
// bank is never reused within B slots, that no request waits more than
// (L-1)+Rmax decisions, that the DSA overtook locked requests at least once
// and that err_overflow never rises.
module tb_dss;
  import cfds_pkg::*;

  localparam int Q = 8, M = 16, B = 8, BS = 2, ORD_W = 8;
  localparam int G = M / (B / BS), BPG = B / BS, NO = BPG - 1;
  localparam int L = rr_len(Q, M, B, BS);
  localparam int RMAX = rmax(Q, M, B, BS);

  typedef struct {
    bit real_req;
    int q, ord, bank, addr, desc, born;
  } req_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_real;
  logic [2:0] in_q;
  logic [5:0] in_desc;
  logic iss_valid, err_overflow, dsa_skip;
  logic [2:0] iss_q;
  logic [ORD_W-1:0] iss_ord;
  logic [3:0] iss_bank;
  logic [6:0] iss_addr;
  logic [5:0] iss_desc;

  dss #(.Q(Q), .M(M), .B(B), .BSMALL(BS), .ORD_W(ORD_W), .DW(6)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0, ndec = 0, n_skip = 0, n_iss = 0, max_wait = 0;
  req_t rr [$];
  int   orr [$];
  int   ordc [Q];
  int   last_use [M];
  req_t exp_iss;
  bit   exp_valid = 1'b0;

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
    if (rst_n) begin
      cyc++;
      // outputs of the decision made in the previous cycle
      checks++;
      if (iss_valid != exp_valid) fail("issue valid mismatch");
      else if (exp_valid) begin
        n_iss++;
        if (int'(iss_q) != exp_iss.q || int'(iss_ord) != exp_iss.ord ||
            int'(iss_bank) != exp_iss.bank || int'(iss_addr) != exp_iss.addr ||
            int'(iss_desc) != exp_iss.desc)
          fail($sformatf("issued q%0d ord%0d bank%0d, ref q%0d ord%0d bank%0d",
                         iss_q, iss_ord, iss_bank, exp_iss.q, exp_iss.ord, exp_iss.bank));
        checks++;
        if (cyc - last_use[iss_bank] < B) fail("bank reused within B slots");
        last_use[iss_bank] = cyc;
      end
      checks++;
      if (err_overflow) fail("RR overflow");
      if (dsa_skip) n_skip++;
    end
    exp_valid = 1'b0;
    in_valid <= 1'b0;
    if (rst_n && cyc % BS == 0 && cyc < 20000) begin
      req_t n;
      int pick, r;
      r = int'($urandom_range(99));
      n.real_req = (r < 92);
      n.q    = (r < 70) ? G * int'($urandom_range(Q / G - 1)) : int'($urandom_range(Q - 1));
      n.ord  = n.real_req ? ordc[n.q] : 0;
      n.desc = int'($urandom_range(63));
      n.born = ndec;
      if (n.real_req) ordc[n.q] = (ordc[n.q] + 1) % (1 << ORD_W);
      n.bank = (n.q % G) * BPG + n.ord % BPG;
      n.addr = (n.q / G) * ((1 << ORD_W) / BPG) + n.ord / BPG;
      in_valid <= 1'b1;
      in_real  <= n.real_req;
      in_q     <= 3'(n.q);
      in_desc  <= 6'(n.desc);
      // reference DSA
      pick = -1;
      foreach (rr[i]) begin
        bit locked;
        locked = 1'b0;
        foreach (orr[j]) if (orr[j] == rr[i].bank) locked = 1'b1;
        if (pick < 0 && (!rr[i].real_req || !locked)) pick = i;
      end
      if (pick < 0) fail("reference found no request");
      else begin
        exp_valid = rr[pick].real_req;
        exp_iss   = rr[pick];
        if (rr[pick].real_req && ndec - rr[pick].born > max_wait) max_wait = ndec - rr[pick].born;
        void'(orr.pop_front());
        orr.push_back(rr[pick].real_req ? rr[pick].bank : -1);
        rr.delete(pick);
        rr.push_back(n);
      end
      ndec++;
    end
  end

  initial begin
    in_valid = 1'b0; in_real = 1'b0; in_q = '0; in_desc = '0;
    for (int i = 0; i < Q; i++) ordc[i] = 0;
    for (int i = 0; i < M; i++) last_use[i] = -1000;
    for (int i = 0; i < L; i++) begin
      req_t e;
      e.real_req = 1'b0; e.q = 0; e.ord = 0; e.bank = 0; e.addr = 0; e.desc = 0; e.born = 0;
      rr.push_back(e);
    end
    for (int j = 0; j < NO; j++) orr.push_back(-1);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (20100) @(negedge clk);
    checks++;
    if (max_wait > (L - 1) + RMAX) fail($sformatf("a request waited %0d decisions", max_wait));
    checks++;
    if (n_skip == 0) fail("DSA never overtook a locked request");
    checks++;
    if (n_iss < 1000) fail("too few transfers");
    $display("transfers %0d, overtakes %0d, longest wait %0d decisions (bound %0d)",
             n_iss, n_skip, max_wait, (L - 1) + RMAX);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
