// tb_cfds_workloads -- the CFDS packet buffer at the OC3072 sizes with block
// sizes other than the default b = 4.
//
// Q = 512 queues, M = 256 banks and B = 32 as in the default configuration;
// b = 1, 2, 8 and 16 run side by side, each in its own cfds_e2e_run harness with
// the same traffic and checks as tb_cfds_buffer (exact request-to-cell
// delay, cell order, no bank conflict, h-SRAM within its size, every
// mechanism seen). The sizes follow from the parameters:
//   b = 1:  G = 8,  RR 3938, latency 7874, lookahead 1,   h-SRAM 3937 cells
//   b = 2:  G = 16, RR 946, latency 3780, lookahead 513,  h-SRAM 2402 cells
//   b = 8:  G = 64, RR 46,  latency 720,  lookahead 3585, h-SRAM 3944 cells
//   b = 16: G = 128, RR 8,  latency 224,  lookahead 7681, h-SRAM 7792 cells
// Cells are narrowed to 64 bits to keep the simulation light; the cell width
// plays no part in the scheduling. The watchdog bounds the whole run.
module tb_cfds_workloads;

  localparam int CYCLES = 30000;

  bit done1, done2, done8, done16;
  int checks1, checks2, checks8, checks16;
  int failures1, failures2, failures8, failures16;
  int checks, failures;

  cfds_e2e_run #(.BSMALL(1),  .CYCLES(CYCLES)) run_b1  (.done(done1),  .checks(checks1),  .failures(failures1));
  cfds_e2e_run #(.BSMALL(2),  .CYCLES(CYCLES)) run_b2  (.done(done2),  .checks(checks2),  .failures(failures2));
  cfds_e2e_run #(.BSMALL(8),  .CYCLES(CYCLES)) run_b8  (.done(done8),  .checks(checks8),  .failures(failures8));
  cfds_e2e_run #(.BSMALL(16), .CYCLES(CYCLES)) run_b16 (.done(done16), .checks(checks16), .failures(failures16));

  initial begin
    #(10 * (CYCLES + 60000));
    $display("FAIL: watchdog (done b1=%0b b2=%0b b8=%0b b16=%0b)", done1, done2, done8, done16);
    checks   = checks1 + checks2 + checks8 + checks16;
    failures = failures1 + failures2 + failures8 + failures16 + 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (done1 && done2 && done8 && done16);
    checks   = checks1 + checks2 + checks8 + checks16;
    failures = failures1 + failures2 + failures8 + failures16;
    $display("b=1: checks %0d failures %0d", checks1, failures1);
    $display("b=2: checks %0d failures %0d", checks2, failures2);
    $display("b=8: checks %0d failures %0d", checks8, failures8);
    $display("b=16: checks %0d failures %0d", checks16, failures16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
