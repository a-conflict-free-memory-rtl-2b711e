// tb_bank_map -- checks the CFDS address mapping.
//
// For a small configuration (Q=8, M=16, B=8, b=2: 4 groups of 4 banks) every
// {queue, ordinal} pair is applied and group, bank and bank-local address are
// compared with values computed here by division and remainder: group =
// queue mod G, bank in group = ordinal mod (B/b), address = (queue div G) *
// 2^(ORD_W - log2(B/b)) + ordinal div (B/b). It also checks the two
// properties the mapping exists for: B/b consecutive blocks of one queue use
// B/b different banks, and two distinct blocks never share bank and address.
// The default-size mapping is checked on random pairs.
module tb_bank_map;

  localparam int Q = 8, M = 16, B = 8, BS = 2, ORD_W = 4;
  localparam int G = M / (B / BS), BPG = B / BS;

  logic [2:0] q;
  logic [3:0] ord;
  logic [1:0] group, bib;
  logic [3:0] bank;
  logic [2:0] addr;

  bank_map #(.Q(Q), .M(M), .B(B), .BSMALL(BS), .ORD_W(ORD_W)) dut (
    .q, .ord, .group, .bank_in_group(bib), .bank, .addr
  );

  // default size: Q=512, M=256, B=32, b=4 -> 32 groups of 8 banks
  logic [8:0]  q2;
  logic [11:0] ord2;
  logic [4:0]  group2;
  logic [2:0]  bib2;
  logic [7:0]  bank2;
  logic [12:0] addr2;

  bank_map dut2 (
    .q(q2), .ord(ord2), .group(group2), .bank_in_group(bib2), .bank(bank2), .addr(addr2)
  );

  int checks = 0, failures = 0;
  bit used [int];

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int qi = 0; qi < Q; qi++) begin
      int banks_seen [int];
      for (int oi = 0; oi < (1 << ORD_W); oi++) begin
        int key;
        q = 3'(qi); ord = 4'(oi);
        #1;
        checks++;
        if (int'(group) != qi % G || int'(bib) != oi % BPG ||
            int'(bank) != (qi % G) * BPG + oi % BPG ||
            int'(addr) != (qi / G) * ((1 << ORD_W) / BPG) + oi / BPG) begin
          failures++;
          $display("FAIL q=%0d ord=%0d: group %0d bank %0d addr %0d", qi, oi, group, bank, addr);
        end
        key = int'(bank) * 64 + int'(addr);
        checks++;
        if (used.exists(key)) begin
          failures++;
          $display("FAIL q=%0d ord=%0d shares bank %0d addr %0d", qi, oi, bank, addr);
        end
        used[key] = 1'b1;
        // consecutive blocks of one queue: distinct banks within a window
        if (oi % BPG == 0) banks_seen.delete();
        checks++;
        if (banks_seen.exists(int'(bank))) begin
          failures++;
          $display("FAIL q=%0d ord=%0d: bank repeats within %0d blocks", qi, oi, BPG);
        end
        banks_seen[int'(bank)] = 1;
      end
    end
    for (int n = 0; n < 2000; n++) begin
      int qi, oi;
      qi = int'($urandom_range(511));
      oi = int'($urandom_range(4095));
      q2 = 9'(qi); ord2 = 12'(oi);
      #1;
      checks++;
      if (int'(group2) != qi % 32 || int'(bib2) != oi % 8 ||
          int'(bank2) != (qi % 32) * 8 + oi % 8 ||
          int'(addr2) != (qi / 32) * 512 + oi / 8) begin
        failures++;
        $display("FAIL default q=%0d ord=%0d", qi, oi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
