// tb_vmma -- checks the V-MMA against a direct ECQF reference.
//
// Q=4 queues, b=3, lookahead LA = Q(b-1)+1 = 9. Random requests (including
// idle slots and bursts on one queue) go in. The reference keeps the
// lookahead contents and the virtual occupancy counters itself and, at every
// decision, walks the lookahead from head to tail decrementing a copy of the
// counters; the first queue to go below zero must be the one the V-MMA picks,
// and with no such queue the V-MMA must issue an empty request. It also checks
// that a decision comes exactly every b cycles, that each request leaves the
// lookahead head exactly LA cycles after entering it, and that no virtual
// miss occurs. A second instance with a short lookahead (LA=4, MDQF) is
// checked the same way, the reference then picking the queue with the lowest
// end-of-lookahead counter when none is critical.
module tb_vmma;
  import cfds_pkg::*;

  localparam int Q = 4, BS = 3;
  localparam int LA1 = ecqf_lookahead(Q, BS);
  localparam int LA2 = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic arb_valid;
  logic [1:0] arb_q;
  logic hv1, rv1, rr1, rc1, vm1, hv2, rv2, rr2, rc2, vm2;
  logic [1:0] hq1, rq1, hq2, rq2;

  vmma #(.Q(Q), .BSMALL(BS), .LA(LA1)) dut1 (
    .clk, .rst_n, .arb_valid, .arb_q,
    .head_valid(hv1), .head_q(hq1), .rep_valid(rv1), .rep_real(rr1), .rep_q(rq1),
    .rep_critical(rc1), .vmiss(vm1)
  );
  vmma #(.Q(Q), .BSMALL(BS), .LA(LA2), .MDQF(1'b1)) dut2 (
    .clk, .rst_n, .arb_valid, .arb_q,
    .head_valid(hv2), .head_q(hq2), .rep_valid(rv2), .rep_real(rr2), .rep_q(rq2),
    .rep_critical(rc2), .vmiss(vm2)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_crit = 0, n_empty = 0, n_mdqf = 0;
  // reference state: lookahead entries (-1 = idle), counters
  int la1 [$], la2 [$];
  int vc1 [Q], vc2 [Q];
  int cyc = 0;

  task automatic fail(string m);
    failures++;
    if (failures < 20) $display("FAIL @%0d: %s", cyc, m);
  endtask

  // decision by an explicit walk: returns queue, -1 for none
  function automatic int walk(ref int la [$], ref int vc [Q], input bit mdqf);
    int t [Q];
    int best;
    for (int i = 0; i < Q; i++) t[i] = vc[i];
    foreach (la[i]) begin
      if (la[i] >= 0) begin
        t[la[i]]--;
        if (t[la[i]] < 0) return la[i];
      end
    end
    if (!mdqf) return -1;
    best = 0;
    for (int i = 1; i < Q; i++) if (t[i] < t[best]) best = i;
    return best;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    int r, q;
    if (rst_n) begin
      cyc++;
      // compare the outputs of this cycle with the reference
      checks++;
      if (rv1 != (cyc % BS == 1) || rv2 != rv1) fail("decision not every b cycles");
      if (rv1) begin
        r = walk(la1, vc1, 1'b0);
        checks++;
        if (r < 0 && rr1) fail("real request with no critical queue");
        if (r >= 0 && (!rr1 || int'(rq1) != r)) fail($sformatf("ECQF picked %0d/%0b, ref %0d", rq1, rr1, r));
        if (r >= 0) begin vc1[r] += BS; n_crit++; end else n_empty++;
        r = walk(la2, vc2, 1'b1);
        checks++;
        if (!rr2 || int'(rq2) != r) fail($sformatf("MDQFP picked %0d, ref %0d", rq2, r));
        if (!rc2) n_mdqf++;
        vc2[r] += BS;
      end
      checks++;
      if (hv1 != (la1[0] >= 0) || (hv1 && int'(hq1) != la1[0])) fail("lookahead head wrong");
      if (hv2 != (la2[0] >= 0) || (hv2 && int'(hq2) != la2[0])) fail("short lookahead head wrong");
      if (la1[0] >= 0) vc1[la1[0]]--;
      if (la2[0] >= 0) vc2[la2[0]]--;
      void'(la1.pop_front());
      void'(la2.pop_front());
      checks++;
      if (vm1) fail("virtual miss with the full ECQF lookahead");
    end
    // next request
    q = -1;
    if (rst_n && $urandom_range(9) < 9) begin
      q = (cyc % 400 < 100) ? 2 : int'($urandom_range(Q - 1));
    end
    arb_valid <= (q >= 0);
    arb_q     <= (q >= 0) ? 2'(q) : 2'd0;
    if (rst_n) begin
      la1.push_back(q);
      la2.push_back(q);
    end
  end

  initial begin
    arb_valid = 1'b0;
    arb_q = '0;
    for (int i = 0; i < Q; i++) begin vc1[i] = 0; vc2[i] = 0; end
    repeat (2) @(negedge clk);
    for (int i = 0; i < LA1; i++) la1.push_back(-1);
    for (int i = 0; i < LA2; i++) la2.push_back(-1);
    rst_n = 1'b1;
    repeat (12000) @(negedge clk);
    checks++;
    if (n_crit == 0 || n_empty == 0 || n_mdqf == 0) fail("a decision kind never happened");
    $display("critical picks %0d, empty requests %0d, MDQF picks %0d", n_crit, n_empty, n_mdqf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
