// latency_sr -- the latency shift register between the lookahead and the
// h-SRAM.
//
// Requests leaving the lookahead head wait here DEPTH cycles before they read
// their cell from the h-SRAM. The DRAM scheduler may hold a replenish request
// back and deliver blocks out of order; this delay hides the worst case. Its
// length in the CFDS scheme is b((L-1) + Rmax) = 2b(2Q/G-1)(B/b-1) slots.
// EXTRA adds the few cycles of this implementation's own pipeline (register
// stages between decision and DRAM, DRAM access time in slots, SRAM write);
// it is this design's addition and the top sets it.
//
// Plain shift register of {valid, queue}: in_* at cycle t appears on out_* at
// cycle t + DEPTH, DEPTH defaulting to the CFDS length plus EXTRA. Reset
// empties it.
module latency_sr
  import cfds_pkg::*;
#(
  parameter int Q      = 512,
  parameter int M      = 256,
  parameter int B      = 32,
  parameter int BSMALL = 4,
  parameter int EXTRA  = 0,
  parameter int DEPTH  = latency_len(Q, M, B, BSMALL) + EXTRA,
  localparam int QW = $clog2(Q)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [QW-1:0] in_q,
  output logic          out_valid,
  output logic [QW-1:0] out_q
);

  typedef struct packed {
    logic          v;
    logic [QW-1:0] q;
  } slot_t;

  slot_t sr [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) sr[i] <= '0;
    end else begin
      for (int i = 0; i < DEPTH - 1; i++) sr[i] <= sr[i+1];
      sr[DEPTH-1] <= '{v: in_valid, q: in_q};
    end
  end

  assign out_valid = sr[0].v;
  assign out_q     = sr[0].q;

endmodule
