// shift_queue_iq: collapsing (shifting) instruction queue whose select stops
// at the first non-pipelined instruction.
//
// Entries are held in program order: slot 0 is the oldest, valid slots are
// contiguous from slot 0, and new instructions are appended behind the
// youngest. Each cycle the select walks the slots from the oldest and grants
// each issue port to the first ready entry that wants it (oldest-first, age
// based). Issued entries leave and the younger entries shift down to close the
// gaps in the same clock edge.
//
// Pre-allocation (PREALLOC = 1): the walk never looks past the first entry
// marked non-pipelined (np), whether that entry is ready or not. The np entry
// itself may issue if it is ready and its port is free; nothing younger than
// it can. In a queue that only holds non-pipelined instructions they thus
// issue strictly in program order. With PREALLOC = 0 the queue is a plain
// age-ordered shifting scheduler. The shifting organisation and the stopping
// rule follow the described scheme; port assignment, wakeup and sizes are this
// design's own choices.
//
// Interface and timing are identical to age_matrix_iq, so either can serve a
// queue: one allocation per cycle, NWAKE wakeup tags per cycle (which also
// wake the entering entry), combinational select with issue_* valid in the
// cycle the entry is ready, entry removed at the next clock edge, earliest
// issue one cycle after allocation.
module shift_queue_iq
  import seed_pkg::*;
#(
  parameter int unsigned DEPTH    = 16,
  parameter int unsigned PORTS    = 1,
  parameter int unsigned NWAKE    = 9,
  parameter bit          PREALLOC = 1'b1,
  parameter type         payload_t = uop_t,
  localparam int unsigned PW = (PORTS > 1) ? $clog2(PORTS) : 1,
  localparam int unsigned CW = $clog2(DEPTH + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 alloc_valid,
  output logic                 alloc_ready,
  input  preg_t                alloc_src1,
  input  preg_t                alloc_src2,
  input  logic                 alloc_rdy1,
  input  logic                 alloc_rdy2,
  input  logic [PW-1:0]        alloc_port,
  input  logic                 alloc_np,
  input  payload_t             alloc_payload,
  input  logic [NWAKE-1:0]     wake_valid,
  input  preg_t                wake_tag [NWAKE],
  input  logic [PORTS-1:0]     port_free,
  output logic [PORTS-1:0]     issue_valid,
  output payload_t             issue_payload [PORTS],
  output logic [CW-1:0]        count,
  output logic                 prealloc_hold
);

  typedef struct packed {
    logic          np;
    logic          rdy1;
    logic          rdy2;
    logic [PW-1:0] port;
    preg_t         src1;
    preg_t         src2;
    payload_t      pay;
  } entry_t;

  entry_t          ent_q [DEPTH];
  logic [CW-1:0]   cnt_q;

  logic [DEPTH-1:0] pick, held;
  entry_t          woke    [DEPTH];
  entry_t          nxt     [DEPTH];
  entry_t          in_ent;
  logic [CW-1:0]   npicked;

  function automatic logic woken(preg_t tag, logic [NWAKE-1:0] wv, preg_t wt [NWAKE]);
    logic m = 1'b0;
    for (int w = 0; w < NWAKE; w++) if (wv[w] && wt[w] == tag) m = 1'b1;
    return m;
  endfunction

  // walk from the oldest slot; stop after the first np entry
  always_comb begin
    logic             stop;
    logic [PORTS-1:0] taken;
    stop  = 1'b0;
    taken = '0;
    for (int e = 0; e < DEPTH; e++) begin
      pick[e] = 1'b0;
      held[e] = 1'b0;
      if (CW'(e) < cnt_q) begin
        if (ent_q[e].rdy1 && ent_q[e].rdy2 && port_free[ent_q[e].port] &&
            !taken[ent_q[e].port]) begin
          if (stop) held[e] = 1'b1;
          else begin
            pick[e] = 1'b1;
            taken[ent_q[e].port] = 1'b1;
          end
        end
        if (PREALLOC && ent_q[e].np) stop = 1'b1;
      end
    end
    prealloc_hold = |held;
  end

  always_comb begin
    for (int p = 0; p < PORTS; p++) begin
      issue_valid[p]   = 1'b0;
      issue_payload[p] = ent_q[0].pay;
      for (int e = 0; e < DEPTH; e++) begin
        if (pick[e] && ent_q[e].port == PW'(p)) begin
          issue_valid[p]   = 1'b1;
          issue_payload[p] = ent_q[e].pay;
        end
      end
    end
  end

  // next state: apply wakeup, drop picked entries, shift, append
  always_comb begin
    logic [CW-1:0] k;
    in_ent.np   = alloc_np;
    in_ent.rdy1 = alloc_rdy1 | woken(alloc_src1, wake_valid, wake_tag);
    in_ent.rdy2 = alloc_rdy2 | woken(alloc_src2, wake_valid, wake_tag);
    in_ent.port = alloc_port;
    in_ent.src1 = alloc_src1;
    in_ent.src2 = alloc_src2;
    in_ent.pay  = alloc_payload;
    for (int e = 0; e < DEPTH; e++) begin
      woke[e] = ent_q[e];
      woke[e].rdy1 = ent_q[e].rdy1 | woken(ent_q[e].src1, wake_valid, wake_tag);
      woke[e].rdy2 = ent_q[e].rdy2 | woken(ent_q[e].src2, wake_valid, wake_tag);
      nxt[e] = ent_q[e];
    end
    k = '0;
    for (int e = 0; e < DEPTH; e++) begin
      if (CW'(e) < cnt_q && !pick[e]) begin
        nxt[k[$clog2(DEPTH)-1:0]] = woke[e];
        k = k + 1'b1;
      end
    end
    npicked = cnt_q - k;
    if (alloc_valid && alloc_ready) nxt[k[$clog2(DEPTH)-1:0]] = in_ent;
  end

  assign alloc_ready = (cnt_q != CW'(DEPTH));
  assign count       = cnt_q;

  always_ff @(posedge clk) begin
    if (!rst_n) cnt_q <= '0;
    else        cnt_q <= cnt_q - npicked + CW'(alloc_valid && alloc_ready);
  end

  // entries beyond cnt_q are never read
  always_ff @(posedge clk) begin
    for (int e = 0; e < DEPTH; e++) ent_q[e] <= nxt[e];
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int p = 0; p < PORTS; p++)
        assert (!issue_valid[p] || port_free[p]) else $error("shift_queue_iq: grant to busy port %0d", p);
    end
  end

endmodule
