// seed_issue_top: issue/execute cluster that cannot be made to suffer
// scheduling-priority inversion by younger instructions.
//
// A younger, possibly speculative instruction can change the timing of an
// older instruction that is bound to commit by taking a resource the older one
// needs: a non-pipelined functional unit, or the last free target of an MSHR.
// This cluster closes both paths:
//   * Instructions are dispatched into a partially split instruction queue.
//     ALU operations and loads go to the main queue (age-based select, one
//     grant per issue port to its oldest ready instruction). Divisions, the
//     non-pipelined class, go to their own queue, which sets the pre-allocation
//     bit of every entry, so divisions issue strictly in program order and a
//     younger division never occupies the divider ahead of an older one.
//     Single-cycle work is not held back by this rule.
//   * Loads that miss in the L1 go to the MSHR file, which applies
//     Delay-on-Miss (speculative misses without a matching MSHR are delayed and
//     never allocate) and lets an older load preempt the MSHR target of a
//     younger speculative load instead of being turned away.
// Both queues are age-matrix queues (IQ_SHIFTING = 0) or shifting queues
// (IQ_SHIFTING = 1); the two are interchangeable implementations of the same
// policy.
//
// Issue width is 8: ALU_PORTS = 6 ALU ports and one load port from the main
// queue plus one divider port from the non-pipelined queue. The register file
// (256 x 64 bit, zero at reset) and the scoreboard of pending destinations are
// part of the cluster; renaming, the reorder buffer, the load queue, the L1
// data array and the next cache level are outside it. The split queue, the
// pre-allocation rule and the MSHR policy follow the described scheme; queue
// depths, port counts beyond the issue width of 8, the load pipeline, the
// MSHR sizes and all interfaces are this design's own choices.
//
// Interfaces:
//   dispatch    disp_valid/disp_ready with a uop_t (one per cycle). Sources are
//               looked up in the scoreboard; a load's src2 is unused.
//   spec_*      the oldest instruction not yet known to be bound to commit;
//               instructions at or after it are speculative.
//   l1_*        request in the cycle after a load issues (line address and
//               word), answer (hit and 64-bit word) one cycle later: a two-cycle
//               L1 access.
//   l2_*        line request when a non-speculative miss allocates an MSHR.
//   fill_*      line fill from the next level: MSHR index and 512-bit line.
//   replay_*    a load that the load queue must send again (delayed miss,
//               retry, or a preempted target) and its ROB position.
//   wb_*        writeback bus, NWB ports: ALU ports, divider, load hit,
//               MSHR target delivery.
//   ev_*        one-cycle event pulses for statistics.
// Timing: ALU result one cycle after issue; division W+1 = 65 cycles after
// issue; load hit written back two cycles after issue; a load that misses is
// written back when its MSHR delivers it after the fill.
module seed_issue_top
  import seed_pkg::*;
#(
  parameter int unsigned MAIN_IQ_DEPTH = 48,
  parameter int unsigned NP_IQ_DEPTH   = 16,
  parameter int unsigned ALU_PORTS     = 6,
  parameter int unsigned N_MSHR        = 4,
  parameter int unsigned N_TGT         = 20,
  parameter bit          IQ_SHIFTING   = 1'b0,
  localparam int unsigned NWB   = ALU_PORTS + 3,
  localparam int unsigned MPORTS = ALU_PORTS + 1,
  localparam int unsigned MW    = (N_MSHR > 1) ? $clog2(N_MSHR) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // dispatch
  input  logic                  disp_valid,
  output logic                  disp_ready,
  input  uop_t                  disp_uop,
  // speculation frontier
  input  logic                  spec_valid,
  input  rob_id_t               spec_head,
  // L1 lookup
  output logic                  l1_req_valid,
  output xlen_t                 l1_req_addr,
  input  logic                  l1_resp_hit,
  input  xlen_t                 l1_resp_data,
  // next level
  output logic                  l2_req_valid,
  output line_addr_t            l2_req_line,
  output logic [MW-1:0]         l2_req_mshr,
  input  logic                  fill_valid,
  input  logic [MW-1:0]         fill_mshr,
  input  logic [LINE_BITS-1:0]  fill_data,
  output logic                  fill_ready,
  // load replay requests to the load queue
  output logic                  replay_valid,
  output rob_id_t               replay_rob,
  output replay_kind_t          replay_kind,
  // writeback bus
  output logic [NWB-1:0]        wb_valid,
  output rob_id_t               wb_rob   [NWB],
  output preg_t                 wb_tag   [NWB],
  output xlen_t                 wb_data  [NWB],
  // statistics
  output logic                  ev_prealloc_hold,
  output logic                  ev_div_busy_stall,
  output logic                  ev_coalesce_spec,
  output logic                  ev_preempt,
  output logic                  ev_delay,
  output logic                  ev_retry
);

  localparam int unsigned MPW = $clog2(MPORTS);
  localparam int unsigned LDP = ALU_PORTS;          // main-queue port of the load pipe
  localparam int unsigned WB_DIV = ALU_PORTS;
  localparam int unsigned WB_LD  = ALU_PORTS + 1;
  localparam int unsigned WB_FIL = ALU_PORTS + 2;

  // ---------------------------------------------------------------- state
  xlen_t            prf_q  [NPREG];
  logic [NPREG-1:0] busy_q;

  // ---------------------------------------------------------------- dispatch
  logic              to_np;
  logic              main_ready, np_ready;
  logic              main_alloc, np_alloc;
  logic [MPW-1:0]    alu_rr_q;
  logic [MPW-1:0]    main_port;
  logic              rdy1, rdy2;

  assign to_np      = disp_uop.fu == FU_DIV;
  assign disp_ready = to_np ? np_ready : main_ready;
  assign main_alloc = disp_valid && !to_np;
  assign np_alloc   = disp_valid && to_np;
  assign main_port  = (disp_uop.fu == FU_LOAD) ? MPW'(LDP) : alu_rr_q;
  assign rdy1       = !busy_q[disp_uop.src1];
  assign rdy2       = (disp_uop.fu == FU_ALU && disp_uop.use_imm) || disp_uop.fu == FU_LOAD ||
                      !busy_q[disp_uop.src2];

  always_ff @(posedge clk) begin
    if (!rst_n) alu_rr_q <= '0;
    else if (main_alloc && main_ready && disp_uop.fu == FU_ALU)
      alu_rr_q <= (alu_rr_q == MPW'(ALU_PORTS - 1)) ? '0 : alu_rr_q + 1'b1;
  end

  // ---------------------------------------------------------------- queues
  logic [NWB-1:0]    wake_valid;
  preg_t             wake_tag [NWB];
  logic [MPORTS-1:0] main_issue;
  uop_t              main_uop [MPORTS];
  logic [0:0]        np_issue;
  uop_t              np_uop   [1];
  logic              div_busy;
  logic              main_hold, np_hold;
  logic [$clog2(NP_IQ_DEPTH+1)-1:0] np_count;

  assign wake_valid = wb_valid;
  assign wake_tag   = wb_tag;

  if (IQ_SHIFTING) begin : g_shift
    shift_queue_iq #(.DEPTH(MAIN_IQ_DEPTH), .PORTS(MPORTS), .NWAKE(NWB), .PREALLOC(1'b1),
                     .payload_t(uop_t)) u_main_iq (
      .clk, .rst_n,
      .alloc_valid(main_alloc), .alloc_ready(main_ready),
      .alloc_src1(disp_uop.src1), .alloc_src2(disp_uop.src2),
      .alloc_rdy1(rdy1), .alloc_rdy2(rdy2),
      .alloc_port(main_port), .alloc_np(1'b0), .alloc_payload(disp_uop),
      .wake_valid, .wake_tag,
      .port_free({MPORTS{1'b1}}),
      .issue_valid(main_issue), .issue_payload(main_uop),
      .count(), .prealloc_hold(main_hold));
    shift_queue_iq #(.DEPTH(NP_IQ_DEPTH), .PORTS(1), .NWAKE(NWB), .PREALLOC(1'b1),
                     .payload_t(uop_t)) u_np_iq (
      .clk, .rst_n,
      .alloc_valid(np_alloc), .alloc_ready(np_ready),
      .alloc_src1(disp_uop.src1), .alloc_src2(disp_uop.src2),
      .alloc_rdy1(rdy1), .alloc_rdy2(rdy2),
      .alloc_port(1'b0), .alloc_np(1'b1), .alloc_payload(disp_uop),
      .wake_valid, .wake_tag,
      .port_free(!div_busy),
      .issue_valid(np_issue), .issue_payload(np_uop),
      .count(np_count), .prealloc_hold(np_hold));
  end else begin : g_matrix
    age_matrix_iq #(.DEPTH(MAIN_IQ_DEPTH), .PORTS(MPORTS), .NWAKE(NWB), .PREALLOC(1'b1),
                    .payload_t(uop_t)) u_main_iq (
      .clk, .rst_n,
      .alloc_valid(main_alloc), .alloc_ready(main_ready),
      .alloc_src1(disp_uop.src1), .alloc_src2(disp_uop.src2),
      .alloc_rdy1(rdy1), .alloc_rdy2(rdy2),
      .alloc_port(main_port), .alloc_np(1'b0), .alloc_payload(disp_uop),
      .wake_valid, .wake_tag,
      .port_free({MPORTS{1'b1}}),
      .issue_valid(main_issue), .issue_payload(main_uop),
      .count(), .prealloc_hold(main_hold));
    age_matrix_iq #(.DEPTH(NP_IQ_DEPTH), .PORTS(1), .NWAKE(NWB), .PREALLOC(1'b1),
                    .payload_t(uop_t)) u_np_iq (
      .clk, .rst_n,
      .alloc_valid(np_alloc), .alloc_ready(np_ready),
      .alloc_src1(disp_uop.src1), .alloc_src2(disp_uop.src2),
      .alloc_rdy1(rdy1), .alloc_rdy2(rdy2),
      .alloc_port(1'b0), .alloc_np(1'b1), .alloc_payload(disp_uop),
      .wake_valid, .wake_tag,
      .port_free(!div_busy),
      .issue_valid(np_issue), .issue_payload(np_uop),
      .count(np_count), .prealloc_hold(np_hold));
  end

  assign ev_prealloc_hold = main_hold | np_hold;

  // ---------------------------------------------------------------- ALUs
  logic [ALU_PORTS-1:0] alu_v_q;
  uop_t                 alu_uop_q [ALU_PORTS];
  xlen_t                alu_res_q [ALU_PORTS];
  xlen_t                alu_y     [ALU_PORTS];

  for (genvar p = 0; p < ALU_PORTS; p++) begin : g_alu
    xlen_t opb;
    assign opb = main_uop[p].use_imm ? main_uop[p].imm : prf_q[main_uop[p].src2];
    int_alu #(.W(XLEN)) u_alu (
      .op(main_uop[p].alu_op), .a(prf_q[main_uop[p].src1]), .b(opb), .y(alu_y[p]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) alu_v_q <= '0;
    else        alu_v_q <= main_issue[ALU_PORTS-1:0];
    for (int p = 0; p < ALU_PORTS; p++) begin
      alu_uop_q[p] <= main_uop[p];
      alu_res_q[p] <= alu_y[p];
    end
  end

  // ---------------------------------------------------------------- divider
  logic  div_done;
  xlen_t div_res;
  uop_t  div_uop;

  int_divider #(.W(XLEN), .tag_t(uop_t)) u_div (
    .clk, .rst_n,
    .start(np_issue[0]),
    .a(prf_q[np_uop[0].src1]), .b(prf_q[np_uop[0].src2]),
    .op(np_uop[0].div_op), .tag_in(np_uop[0]),
    .busy(div_busy), .done(div_done), .result(div_res), .tag_out(div_uop));

  // divisions wait in their queue while the divider is occupied
  assign ev_div_busy_stall = div_busy && np_count != '0;

  // ---------------------------------------------------------------- load pipe
  // s1: address computed, L1 lookup sent; s2: L1 answer, MSHR decision
  logic  ld1_v_q, ld2_v_q;
  uop_t  ld1_uop_q, ld2_uop_q;
  xlen_t ld1_addr_q, ld2_addr_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ld1_v_q <= 1'b0;
      ld2_v_q <= 1'b0;
    end else begin
      ld1_v_q <= main_issue[LDP];
      ld2_v_q <= ld1_v_q;
    end
    ld1_uop_q  <= main_uop[LDP];
    ld1_addr_q <= prf_q[main_uop[LDP].src1] + main_uop[LDP].imm;
    ld2_uop_q  <= ld1_uop_q;
    ld2_addr_q <= ld1_addr_q;
  end

  assign l1_req_valid = ld1_v_q;
  assign l1_req_addr  = ld1_addr_q;

  logic       miss_req;
  mshr_tgt_t  miss_tgt;
  logic       miss_spec;
  miss_kind_t miss_kind;
  logic       preempt_v;
  mshr_tgt_t  preempt_tgt;
  logic       tgt_v;
  mshr_tgt_t  tgt;
  logic [MW-1:0] tgt_m;
  logic [LINE_BITS-1:0] fill_buf_q [N_MSHR];   // one line buffer per MSHR

  assign miss_req = ld2_v_q && !l1_resp_hit;
  assign miss_tgt = '{rob: ld2_uop_q.rob, dst: ld2_uop_q.dst,
                      word: ld2_addr_q[LINE_OFF_W-1:LINE_OFF_W-WORD_OFF_W]};

  mshr_file #(.N_MSHR(N_MSHR), .N_TGT(N_TGT)) u_mshr (
    .clk, .rst_n,
    .spec_valid, .spec_head,
    .req_valid(miss_req), .req_line(ld2_addr_q[XLEN-1:LINE_OFF_W]), .req_tgt(miss_tgt),
    .req_spec(miss_spec), .resp_kind(miss_kind), .resp_mshr(),
    .preempt_valid(preempt_v), .preempt_tgt(preempt_tgt),
    .l2_req_valid, .l2_req_line, .l2_req_mshr,
    .fill_valid, .fill_mshr, .fill_ready,
    .tgt_valid(tgt_v), .tgt_out(tgt), .tgt_mshr(tgt_m),
    .mshr_busy());

  always_ff @(posedge clk) begin
    if (fill_valid && fill_ready) fill_buf_q[fill_mshr] <= fill_data;
  end

  always_comb begin
    replay_valid = 1'b0;
    replay_rob   = ld2_uop_q.rob;
    replay_kind  = REPLAY_RETRY;
    if (miss_req) begin
      if (preempt_v) begin
        replay_valid = 1'b1;
        replay_rob   = preempt_tgt.rob;
        replay_kind  = REPLAY_PREEMPTED;
      end else if (miss_kind == MISS_DELAY) begin
        replay_valid = 1'b1;
        replay_kind  = REPLAY_DELAYED;
      end else if (miss_kind == MISS_RETRY) begin
        replay_valid = 1'b1;
      end
    end
  end

  assign ev_coalesce_spec = miss_req && miss_spec && miss_kind == MISS_TARGET;
  assign ev_preempt       = miss_req && preempt_v;
  assign ev_delay         = miss_req && miss_kind == MISS_DELAY;
  assign ev_retry         = miss_req && miss_kind == MISS_RETRY;

  // ---------------------------------------------------------------- writeback
  always_comb begin
    for (int p = 0; p < ALU_PORTS; p++) begin
      wb_valid[p] = alu_v_q[p];
      wb_rob[p]   = alu_uop_q[p].rob;
      wb_tag[p]   = alu_uop_q[p].dst;
      wb_data[p]  = alu_res_q[p];
    end
    wb_valid[WB_DIV] = div_done;
    wb_rob[WB_DIV]   = div_uop.rob;
    wb_tag[WB_DIV]   = div_uop.dst;
    wb_data[WB_DIV]  = div_res;
    wb_valid[WB_LD]  = ld2_v_q && l1_resp_hit;
    wb_rob[WB_LD]    = ld2_uop_q.rob;
    wb_tag[WB_LD]    = ld2_uop_q.dst;
    wb_data[WB_LD]   = l1_resp_data;
    wb_valid[WB_FIL] = tgt_v;
    wb_rob[WB_FIL]   = tgt.rob;
    wb_tag[WB_FIL]   = tgt.dst;
    wb_data[WB_FIL]  = fill_buf_q[tgt_m][tgt.word * XLEN +: XLEN];
  end

  // register file and scoreboard
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q <= '0;
      for (int r = 0; r < NPREG; r++) prf_q[r] <= '0;
    end else begin
      for (int w = 0; w < NWB; w++) begin
        if (wb_valid[w]) begin
          prf_q[wb_tag[w]]  <= wb_data[w];
          busy_q[wb_tag[w]] <= 1'b0;
        end
      end
      if (disp_valid && disp_ready) busy_q[disp_uop.dst] <= 1'b1;
    end
  end

endmodule
