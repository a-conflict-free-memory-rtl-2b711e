// tb_latency_sr -- checks the latency shift register.
//
// With Q=8, M=16, B=8, b=2 the register must be 2b(2Q/G-1)(B/b-1) = 36 slots
// long, plus EXTRA = 3 here. Random {valid, queue} pairs go in every cycle;
// each must come out exactly 39 cycles later, unchanged, and nothing may come
// out that was not put in.
module tb_latency_sr;

  localparam int DEPTH = 36 + 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, out_valid;
  logic [2:0] in_q, out_q;

  latency_sr #(.Q(8), .M(16), .B(8), .BSMALL(2), .EXTRA(3)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0, n_valid = 0;
  int hist [$];   // -1 for an idle slot

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    int v;
    if (rst_n) begin
      cyc++;
      checks++;
      if (hist.size() >= DEPTH) begin
        v = hist.pop_front();
        if (out_valid != (v >= 0) || (out_valid && int'(out_q) != v)) begin
          failures++;
          if (failures < 10) $display("FAIL @%0d: out %0b/%0d, expected %0d", cyc, out_valid, out_q, v);
        end
        if (out_valid) n_valid++;
      end else if (out_valid) begin
        failures++;
        $display("FAIL @%0d: output before the register filled", cyc);
      end
    end
    v = ($urandom_range(3) == 0) ? -1 : int'($urandom_range(7));
    in_valid <= (v >= 0);
    in_q     <= (v >= 0) ? 3'(v) : 3'd0;
    if (rst_n) hist.push_back(v);
  end

  initial begin
    in_valid = 1'b0;
    in_q = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (3000) @(negedge clk);
    checks++;
    if (n_valid < 1000) begin failures++; $display("FAIL: too few outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
