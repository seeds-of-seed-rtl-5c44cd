// mshr_file: L1 miss status holding registers under Delay-on-Miss, with
// preemption of speculative targets.
//
// Each MSHR tracks one outstanding cache line and holds up to N_TGT targets,
// the loads waiting for that line. A load that missed in the L1 is handled as
// follows ("speculative" means: not older than spec_head, the oldest
// instruction whose execution is not yet known to be bound to commit):
//   * it matches an MSHR (same line): it is coalesced as a new target, even
//     when speculative (Delay-on-Miss counts a hit in an MSHR as a hit).
//     If every target slot is taken, the youngest target that belongs to a
//     speculative load younger than the requester is preempted: it is dropped
//     and reported on preempt_*, so that the load queue replays that load, and
//     the requester takes its slot. Targets of non-speculative loads, and of
//     loads older than the requester, are never preempted. If no target can be
//     preempted, the requester must retry.
//   * no match, speculative: the miss is delayed (Delay-on-Miss); a
//     speculative load never allocates an MSHR.
//   * no match, non-speculative: a free MSHR is allocated and the line is
//     requested from the next level (l2_req_*); with no free MSHR it retries.
// A target's speculative status is evaluated every cycle against spec_head,
// so a load that has since become non-speculative is no longer preemptable.
// Age is decided from ROB positions with a wrap bit (seed_pkg::rob_older).
// The coalescing rules and the preemption rule follow the described policy;
// the victim choice (youngest), the retry outcome and the fill/drain protocol
// are this design's own choices.
//
// Interface and timing: one miss request per cycle on req_*; its outcome
// (resp_kind, resp_mshr, preempt_*) is combinational in the same cycle and the
// MSHR state changes at the next edge. The next level answers with fill_valid
// and the MSHR index; a fill is always accepted (fill_ready is high) and marks
// that MSHR as filled. From the next cycle, one target per cycle is presented
// on tgt_*: the oldest load among the targets of all filled MSHRs. An MSHR is
// freed when its last target has been delivered. Requests may still coalesce
// into a filled MSHR. Delivering oldest-first across all MSHRs is this
// design's own addition in the same spirit as preemption: with slot order, or
// with one line drained at a time, younger speculative targets would delay an
// older load's data, so their number would still shift its timing.
module mshr_file
  import seed_pkg::*;
#(
  parameter int unsigned N_MSHR = 4,
  parameter int unsigned N_TGT  = 20,
  localparam int unsigned MW = (N_MSHR > 1) ? $clog2(N_MSHR) : 1,
  localparam int unsigned TW = (N_TGT > 1) ? $clog2(N_TGT) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // speculation frontier
  input  logic              spec_valid,
  input  rob_id_t           spec_head,
  // miss request from the load pipeline
  input  logic              req_valid,
  input  line_addr_t        req_line,
  input  mshr_tgt_t         req_tgt,
  output logic              req_spec,
  output miss_kind_t        resp_kind,
  output logic [MW-1:0]     resp_mshr,
  output logic              preempt_valid,
  output mshr_tgt_t         preempt_tgt,
  // request to the next level
  output logic              l2_req_valid,
  output line_addr_t        l2_req_line,
  output logic [MW-1:0]     l2_req_mshr,
  // fill from the next level
  input  logic              fill_valid,
  input  logic [MW-1:0]     fill_mshr,
  output logic              fill_ready,
  // target delivery
  output logic              tgt_valid,
  output mshr_tgt_t         tgt_out,
  output logic [MW-1:0]     tgt_mshr,
  // status
  output logic [N_MSHR-1:0] mshr_busy
);

  logic [N_MSHR-1:0] valid_q;
  line_addr_t        line_q   [N_MSHR];
  logic [N_TGT-1:0]  tv_q     [N_MSHR];   // target valid
  mshr_tgt_t         tgt_q    [N_MSHR][N_TGT];
  logic [N_MSHR-1:0] filled_q;            // line has arrived, draining

  // request decode
  logic              hit;
  logic [MW-1:0]     hit_idx;
  logic              mshr_free_found;
  logic [MW-1:0]     mshr_free_idx;
  logic              slot_free_found;
  logic [TW-1:0]     slot_free_idx;
  logic              victim_found;
  logic [TW-1:0]     victim_idx;
  logic [N_TGT-1:0]  deliver_mask;
  logic              deliver;
  logic [MW-1:0]     deliver_m;
  logic [TW-1:0]     deliver_idx;

  function automatic logic is_spec(rob_id_t r, logic sv, rob_id_t sh);
    return sv && !rob_older(r, sh);
  endfunction

  // target delivered this cycle: the oldest target of all filled MSHRs, so
  // that younger loads never delay an older one's data
  always_comb begin
    deliver      = 1'b0;
    deliver_m    = '0;
    deliver_idx  = '0;
    deliver_mask = '0;
    for (int m = 0; m < N_MSHR; m++) begin
      for (int k = 0; k < N_TGT; k++) begin
        if (filled_q[m] && tv_q[m][k] &&
            (!deliver || rob_older(tgt_q[m][k].rob, tgt_q[deliver_m][deliver_idx].rob))) begin
          deliver     = 1'b1;
          deliver_m   = m[MW-1:0];
          deliver_idx = k[TW-1:0];
        end
      end
    end
    if (deliver) deliver_mask[deliver_idx] = 1'b1;
  end

  assign tgt_valid = deliver;
  assign tgt_out   = tgt_q[deliver_m][deliver_idx];
  assign tgt_mshr  = deliver_m;

  always_comb begin
    req_spec = is_spec(req_tgt.rob, spec_valid, spec_head);

    hit     = 1'b0;
    hit_idx = '0;
    mshr_free_found = 1'b0;
    mshr_free_idx   = '0;
    for (int m = N_MSHR - 1; m >= 0; m--) begin
      if (valid_q[m] && line_q[m] == req_line) begin
        hit     = 1'b1;
        hit_idx = m[MW-1:0];
      end
      if (!valid_q[m]) begin
        mshr_free_found = 1'b1;
        mshr_free_idx   = m[MW-1:0];
      end
    end

    slot_free_found = 1'b0;
    slot_free_idx   = '0;
    for (int k = N_TGT - 1; k >= 0; k--) begin
      if (!tv_q[hit_idx][k]) begin
        slot_free_found = 1'b1;
        slot_free_idx   = k[TW-1:0];
      end
    end

    // youngest preemptable target: speculative, younger than the requester,
    // and not being delivered this cycle
    victim_found = 1'b0;
    victim_idx   = '0;
    for (int k = 0; k < N_TGT; k++) begin
      if (tv_q[hit_idx][k] &&
          !(deliver && deliver_m == hit_idx && deliver_mask[k]) &&
          is_spec(tgt_q[hit_idx][k].rob, spec_valid, spec_head) &&
          rob_older(req_tgt.rob, tgt_q[hit_idx][k].rob)) begin
        if (!victim_found || rob_older(tgt_q[hit_idx][victim_idx].rob, tgt_q[hit_idx][k].rob)) begin
          victim_found = 1'b1;
          victim_idx   = k[TW-1:0];
        end
      end
    end

    preempt_valid = 1'b0;
    preempt_tgt   = tgt_q[hit_idx][victim_idx];
    resp_mshr     = hit_idx;
    if (hit) begin
      if (slot_free_found)   resp_kind = MISS_TARGET;
      else if (victim_found) begin
        resp_kind     = MISS_TARGET;
        preempt_valid = req_valid;
      end else               resp_kind = MISS_RETRY;
    end else if (req_spec)   resp_kind = MISS_DELAY;
    else if (mshr_free_found) begin
      resp_kind = MISS_ALLOC;
      resp_mshr = mshr_free_idx;
    end else                 resp_kind = MISS_RETRY;
  end

  assign l2_req_valid = req_valid && resp_kind == MISS_ALLOC;
  assign l2_req_line  = req_line;
  assign l2_req_mshr  = mshr_free_idx;
  assign fill_ready   = 1'b1;
  assign mshr_busy    = valid_q;

  // next target-valid vectors
  logic [N_TGT-1:0] tv_nxt [N_MSHR];
  always_comb begin
    for (int m = 0; m < N_MSHR; m++) begin
      tv_nxt[m] = tv_q[m];
      if (deliver && deliver_m == MW'(m)) tv_nxt[m] = tv_nxt[m] & ~deliver_mask;
    end
    if (req_valid) begin
      if (resp_kind == MISS_ALLOC) begin
        tv_nxt[mshr_free_idx]    = '0;
        tv_nxt[mshr_free_idx][0] = 1'b1;
      end else if (resp_kind == MISS_TARGET) begin
        if (slot_free_found) tv_nxt[hit_idx][slot_free_idx] = 1'b1;
        // a preempted slot stays valid and is overwritten by the requester
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q     <= '0;
      filled_q    <= '0;
      for (int m = 0; m < N_MSHR; m++) tv_q[m] <= '0;
    end else begin
      for (int m = 0; m < N_MSHR; m++) begin
        tv_q[m] <= tv_nxt[m];
        if (filled_q[m] && tv_nxt[m] == '0) begin
          filled_q[m] <= 1'b0;
          valid_q[m]  <= 1'b0;
        end
      end
      if (req_valid && resp_kind == MISS_ALLOC) valid_q[mshr_free_idx] <= 1'b1;
      if (fill_valid) filled_q[fill_mshr] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (req_valid && resp_kind == MISS_ALLOC) begin
      line_q[mshr_free_idx]   <= req_line;
      tgt_q[mshr_free_idx][0] <= req_tgt;
    end else if (req_valid && resp_kind == MISS_TARGET) begin
      if (slot_free_found) tgt_q[hit_idx][slot_free_idx] <= req_tgt;
      else                 tgt_q[hit_idx][victim_idx]    <= req_tgt;
    end
  end

  // rules of the policy
  always_ff @(posedge clk) begin
    if (rst_n && req_valid) begin
      assert (!(req_spec && resp_kind == MISS_ALLOC))
        else $error("mshr_file: speculative load allocated an MSHR");
      assert (!preempt_valid || (is_spec(preempt_tgt.rob, spec_valid, spec_head) &&
                                 rob_older(req_tgt.rob, preempt_tgt.rob)))
        else $error("mshr_file: preempted a non-speculative or older target");
    end
    if (rst_n && fill_valid)
      assert (valid_q[fill_mshr] && !filled_q[fill_mshr])
        else $error("mshr_file: fill for a free or already filled MSHR");
  end

endmodule
