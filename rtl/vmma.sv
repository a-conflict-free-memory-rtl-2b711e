// vmma -- virtual SRAM subsystem: lookahead, virtual occupancy counters and
// the virtual memory management algorithm (V-MMA).
//
// The arbiter issues at most one cell request per slot (one clock cycle).
// Each request enters the tail of a lookahead shift register of LA positions
// and leaves its head LA cycles later, when it is passed on (head_*) towards
// the latency register and the h-SRAM. Every BSMALL (b) cycles the V-MMA picks
// one queue to be replenished with b cells from DRAM and reports it on rep_*.
//
// The algorithm is Earliest Critical Queue First (ECQF): walk the lookahead
// from head to tail, decrementing a copy of each queue's occupancy counter per
// request; the first queue whose counter goes below zero is critical and is
// chosen. Walking LA entries every b cycles is not practical, so the walk is
// kept incrementally, which gives the same choice:
//   * s[q] is the virtual occupancy of queue q minus the requests for q still
//     in the lookahead, i.e. the counter at the end of the walk.
//   * each lookahead entry carries an "uncovered" bit: set when the request
//     enters with s[q] falling below zero. The uncovered entries of q are then
//     always the last -s[q] requests for q in the lookahead.
//   * the earliest critical queue is the queue of the oldest uncovered entry
//     (one priority encoder over the lookahead).
//   * replenishing q adds b to s[q] and covers the oldest min(b, -s[q])
//     uncovered entries of q, one per cycle during the b cycles before the
//     next decision.
// A request that reaches the head still uncovered is a virtual miss (vmiss):
// with LA >= Q(b-1)+1 there is always a critical queue when the lookahead is
// full and no virtual miss can happen. When no queue is critical the V-MMA
// issues an empty request (rep_real = 0); with MDQF = 1 it instead picks the
// queue with the lowest s[q] (Most Deficit Queue First with pipeline delay,
// for lookaheads shorter than Q(b-1)+1).
//
// ECQF, MDQFP, the lookahead size and the b-slot decision period follow the
// CFDS scheme. The incremental uncovered-bit formulation, the empty request
// when nothing is critical and the reset state (empty lookahead, all counters
// zero) are this design's choices.
module vmma
  import cfds_pkg::*;
#(
  parameter int Q      = 512,
  parameter int BSMALL = 4,
  parameter int LA     = ecqf_lookahead(Q, BSMALL),
  parameter bit MDQF   = 1'b0,
  parameter int SW     = 16,
  localparam int QW = $clog2(Q),
  localparam int PW = (BSMALL > 1) ? $clog2(BSMALL) : 1,
  localparam int IW = $clog2(LA + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // arbiter requests
  input  logic          arb_valid,
  input  logic [QW-1:0] arb_q,
  // request leaving the lookahead head this cycle
  output logic          head_valid,
  output logic [QW-1:0] head_q,
  // replenish decision, one pulse every BSMALL cycles
  output logic          rep_valid,
  output logic          rep_real,
  output logic [QW-1:0] rep_q,
  output logic          rep_critical,
  // a request left the lookahead with no cell reserved for it
  output logic          vmiss
);

  typedef struct packed {
    logic          v;
    logic          u;
    logic [QW-1:0] q;
  } la_entry_t;

  la_entry_t            la [LA];
  logic signed [SW-1:0] s  [Q];
  logic [PW-1:0]        phase;
  logic [QW-1:0]        clr_q_r;
  logic [PW:0]          clr_left_r;

  // oldest uncovered entry
  logic          crit_found;
  logic [QW-1:0] crit_q;
  // most deficit queue
  logic [QW-1:0] min_q;
  // decision of this cycle
  logic          dec, dec_real;
  logic [QW-1:0] sel_q;
  logic [PW:0]   dec_cnt;
  // cover of this cycle
  logic          cov_active;
  logic [QW-1:0] cov_q;
  logic          cov_hit;
  logic [IW-1:0] cov_idx;
  logic signed [SW-1:0] s_arb_next;

  always_comb begin
    crit_found = 1'b0;
    crit_q     = '0;
    for (int i = LA - 1; i >= 0; i--) begin
      if (la[i].v && la[i].u) begin
        crit_found = 1'b1;
        crit_q     = la[i].q;
      end
    end
  end

  always_comb begin
    min_q = '0;
    if (MDQF) begin
      for (int i = 1; i < Q; i++)
        if (s[i] < s[min_q]) min_q = QW'(i);
    end
  end

  always_comb begin
    dec      = (phase == '0);
    sel_q    = crit_found ? crit_q : min_q;
    dec_real = dec && (crit_found || MDQF);
    dec_cnt  = '0;
    if (dec_real && s[sel_q] < 0)
      dec_cnt = (-s[sel_q] >= SW'(BSMALL)) ? (PW+1)'(BSMALL) : (PW+1)'(-s[sel_q]);
    cov_active = dec ? (dec_cnt != '0) : (clr_left_r != '0);
    cov_q      = dec ? sel_q : clr_q_r;
  end

  always_comb begin
    cov_hit = 1'b0;
    cov_idx = '0;
    for (int i = LA - 1; i >= 0; i--) begin
      if (la[i].v && la[i].u && la[i].q == cov_q) begin
        cov_hit = cov_active;
        cov_idx = IW'(i);
      end
    end
  end

  always_comb begin
    s_arb_next = s[arb_q] - SW'(1);
    if (dec_real && sel_q == arb_q) s_arb_next = s_arb_next + SW'(BSMALL);
  end

  assign head_valid   = la[0].v;
  assign head_q       = la[0].q;
  assign vmiss        = la[0].v && la[0].u && !(cov_hit && cov_idx == '0);
  assign rep_valid    = dec;
  assign rep_real     = dec_real;
  assign rep_q        = dec_real ? sel_q : '0;
  assign rep_critical = dec && crit_found;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LA; i++) la[i] <= '0;
      for (int i = 0; i < Q; i++)  s[i] <= '0;
      phase      <= '0;
      clr_q_r    <= '0;
      clr_left_r <= '0;
    end else begin
      phase <= (phase == PW'(BSMALL - 1)) ? '0 : phase + 1'b1;
      // shift the lookahead, covering one entry on the way
      for (int i = 0; i < LA - 1; i++) begin
        la[i] <= la[i+1];
        if (cov_hit && cov_idx == IW'(i + 1)) la[i].u <= 1'b0;
      end
      la[LA-1].v <= arb_valid;
      la[LA-1].q <= arb_q;
      la[LA-1].u <= arb_valid && (s_arb_next < 0);
      // counters
      if (dec_real) s[sel_q] <= s[sel_q] + SW'(BSMALL);
      if (arb_valid) s[arb_q] <= s_arb_next;
      // pending covers
      if (dec) begin
        clr_q_r    <= sel_q;
        clr_left_r <= (dec_cnt != '0) ? dec_cnt - 1'b1 : '0;
      end else if (clr_left_r != '0) begin
        clr_left_r <= clr_left_r - 1'b1;
      end
    end
  end

endmodule
