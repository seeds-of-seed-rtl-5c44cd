// age_matrix_iq: instruction queue scheduled through an age matrix, with a
// pre-allocation bit for non-pipelined instructions.
//
// Entries are kept in any slot; their program order lives in a DEPTH x DEPTH
// matrix, older[i][j] = 1 meaning entry i entered the queue before entry j.
// Each cycle every valid entry whose two sources are ready and whose issue
// port is free "bids". An older entry cancels the bid of a younger entry that
// wants the same port, so each port is granted to its oldest bidder. This is
// the usual age-based select of the ready instructions.
//
// Pre-allocation (PREALLOC = 1): each entry also holds a one-bit register,
// np, set when a non-pipelined instruction enters the queue. The cancel
// ("conflict") signal of an entry is driven by its bid OR by its np bit, so an
// older non-pipelined entry cancels every younger bid in this queue even
// while it is still waiting for its operands. A queue that only holds
// non-pipelined instructions therefore issues them strictly in program order,
// and a younger (possibly speculative) divide can never occupy the divider
// ahead of an older one. With PREALLOC = 0 the queue is the plain age-based
// scheduler. Age-matrix select, the cancel signal and the np register follow
// the described scheme; the port assignment per entry, the two-source wakeup
// and all sizes are this design's own choices.
//
// Interface: one allocation per cycle (alloc_valid/alloc_ready) with the
// source tags, their ready bits, the issue port, the np bit and an opaque
// payload. NWAKE destination tags are broadcast per cycle on wake_*; a
// broadcast in the allocation cycle also wakes the entering entry. port_free
// says which issue ports can take an instruction this cycle.
//
// Timing: select is combinational in the cycle the entry is ready;
// issue_valid[p] and issue_payload[p] are valid in that same cycle and the
// entry leaves the queue at the next clock edge. A newly allocated entry can
// issue at the earliest in the cycle after allocation. prealloc_hold pulses in
// a cycle where some entry would have been granted its port had it not been
// cancelled by a not-bidding older non-pipelined entry (statistics only).
module age_matrix_iq
  import seed_pkg::*;
#(
  parameter int unsigned DEPTH    = 48,
  parameter int unsigned PORTS    = 7,
  parameter int unsigned NWAKE    = 9,
  parameter bit          PREALLOC = 1'b1,
  parameter type         payload_t = uop_t,
  localparam int unsigned PW = (PORTS > 1) ? $clog2(PORTS) : 1,
  localparam int unsigned CW = $clog2(DEPTH + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // allocation (dispatch)
  input  logic                 alloc_valid,
  output logic                 alloc_ready,
  input  preg_t                alloc_src1,
  input  preg_t                alloc_src2,
  input  logic                 alloc_rdy1,
  input  logic                 alloc_rdy2,
  input  logic [PW-1:0]        alloc_port,
  input  logic                 alloc_np,
  input  payload_t             alloc_payload,
  // wakeup broadcast
  input  logic [NWAKE-1:0]     wake_valid,
  input  preg_t                wake_tag [NWAKE],
  // issue
  input  logic [PORTS-1:0]     port_free,
  output logic [PORTS-1:0]     issue_valid,
  output payload_t             issue_payload [PORTS],
  // status
  output logic [CW-1:0]        count,
  output logic                 prealloc_hold
);

  logic [DEPTH-1:0] valid_q, np_q, rdy1_q, rdy2_q;
  logic [PW-1:0]    port_q  [DEPTH];
  preg_t            src1_q  [DEPTH];
  preg_t            src2_q  [DEPTH];
  payload_t         pay_q   [DEPTH];
  logic [DEPTH-1:0] older_q [DEPTH];   // older_q[i][j]: entry i older than entry j

  logic [DEPTH-1:0] bid, conflict_np, cancel_bid, cancel_np, pick, held;
  logic [DEPTH-1:0] wake1, wake2;
  logic             free_found;
  logic [$clog2(DEPTH)-1:0] free_idx;
  logic             in_wake1, in_wake2;

  // wakeup matches for stored entries and for the entering one
  always_comb begin
    for (int e = 0; e < DEPTH; e++) begin
      wake1[e] = 1'b0;
      wake2[e] = 1'b0;
      for (int w = 0; w < NWAKE; w++) begin
        if (wake_valid[w] && wake_tag[w] == src1_q[e]) wake1[e] = 1'b1;
        if (wake_valid[w] && wake_tag[w] == src2_q[e]) wake2[e] = 1'b1;
      end
    end
    in_wake1 = 1'b0;
    in_wake2 = 1'b0;
    for (int w = 0; w < NWAKE; w++) begin
      if (wake_valid[w] && wake_tag[w] == alloc_src1) in_wake1 = 1'b1;
      if (wake_valid[w] && wake_tag[w] == alloc_src2) in_wake2 = 1'b1;
    end
  end

  // bids, age-matrix cancellation and pick
  always_comb begin
    for (int e = 0; e < DEPTH; e++) begin
      bid[e]         = valid_q[e] && rdy1_q[e] && rdy2_q[e] && port_free[port_q[e]];
      conflict_np[e] = PREALLOC && valid_q[e] && np_q[e];
    end
    for (int j = 0; j < DEPTH; j++) begin
      cancel_bid[j] = 1'b0;
      cancel_np[j]  = 1'b0;
      for (int i = 0; i < DEPTH; i++) begin
        if (older_q[i][j] && bid[i] && port_q[i] == port_q[j]) cancel_bid[j] = 1'b1;
        if (older_q[i][j] && conflict_np[i])                    cancel_np[j]  = 1'b1;
      end
      pick[j] = bid[j] && !cancel_bid[j] && !cancel_np[j];
      held[j] = bid[j] && !cancel_bid[j] && cancel_np[j];
    end
    prealloc_hold = |held;
  end

  always_comb begin
    for (int p = 0; p < PORTS; p++) begin
      issue_valid[p]   = 1'b0;
      issue_payload[p] = pay_q[0];
      for (int e = 0; e < DEPTH; e++) begin
        if (pick[e] && port_q[e] == PW'(p)) begin
          issue_valid[p]   = 1'b1;
          issue_payload[p] = pay_q[e];
        end
      end
    end
  end

  // lowest free slot
  always_comb begin
    free_found = 1'b0;
    free_idx   = '0;
    for (int e = DEPTH - 1; e >= 0; e--) begin
      if (!valid_q[e]) begin
        free_found = 1'b1;
        free_idx   = e[$clog2(DEPTH)-1:0];
      end
    end
  end
  assign alloc_ready = free_found;

  always_comb begin
    count = '0;
    for (int e = 0; e < DEPTH; e++) count = count + CW'(valid_q[e]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q <= '0;
      np_q    <= '0;
      rdy1_q  <= '0;
      rdy2_q  <= '0;
    end else begin
      for (int e = 0; e < DEPTH; e++) begin
        rdy1_q[e] <= rdy1_q[e] | wake1[e];
        rdy2_q[e] <= rdy2_q[e] | wake2[e];
        if (pick[e]) valid_q[e] <= 1'b0;
      end
      if (alloc_valid && free_found) begin
        valid_q[free_idx] <= 1'b1;
        np_q[free_idx]    <= alloc_np;
        rdy1_q[free_idx]  <= alloc_rdy1 | in_wake1;
        rdy2_q[free_idx]  <= alloc_rdy2 | in_wake2;
      end
    end
  end

  // payload and age matrix need no reset: they are only read under valid_q
  always_ff @(posedge clk) begin
    if (alloc_valid && free_found) begin
      port_q[free_idx] <= alloc_port;
      src1_q[free_idx] <= alloc_src1;
      src2_q[free_idx] <= alloc_src2;
      pay_q[free_idx]  <= alloc_payload;
      for (int e = 0; e < DEPTH; e++) begin
        // every entry now present is older than the new one
        older_q[e][free_idx] <= valid_q[e] && !pick[e];
        older_q[free_idx][e] <= 1'b0;
      end
    end
  end

  // at most one grant per port and only to a valid entry
  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int p = 0; p < PORTS; p++) begin
        automatic int n = 0;
        for (int e = 0; e < DEPTH; e++) if (pick[e] && port_q[e] == PW'(p)) n++;
        assert (n <= 1) else $error("age_matrix_iq: port %0d granted %0d times", p, n);
        assert (!issue_valid[p] || port_free[p]) else $error("age_matrix_iq: grant to busy port %0d", p);
      end
    end
  end

endmodule
