// tb_seed_interference: a speculative-interference attack run against the
// cluster, checking that the older instructions' timing does not depend on
// the secret.
//
// Two copies of the cluster (default sizes) run the same program, which
// differs only in its speculative part, standing for the two values of a
// secret:
//   older, bound to commit:
//     0-2  constants
//     3    division dslow (65 cycles)
//     4    division dA = f(dslow): the address of load A, ready late
//     5    load to line A (allocates its MSHR)
//     6    load A, address from dA (needs a target in the same MSHR)
//     7    load B to another line
//   speculative (at and after the frontier, instruction 8):
//     secret = 1: a ready division (would take the divider before dA) and 19
//                 loads to line A (would take every remaining MSHR target)
//     secret = 0: the same number of independent ALU operations
// The next level answers after L2_LAT = 300 cycles, so load A arrives while
// the MSHR of line A is still waiting for its fill. With pre-allocation and
// target preemption, instructions 0-7 must write back in exactly the same
// cycles and with the same values in both copies. Both attack paths must
// actually be exercised in the secret = 1 copy (a pre-allocation hold and a
// preemption).
module tb_seed_interference;
  import seed_pkg::*;

  localparam int unsigned NWB    = 9;
  localparam int unsigned L2_LAT = 300;
  localparam int unsigned NPROG  = 28;
  localparam int unsigned NOLD   = 8;
  localparam xlen_t A_LINE = 64'h2000;
  localparam xlen_t B_LINE = 64'h5000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  function automatic xlen_t memval(xlen_t addr);
    xlen_t w = {addr[63:3], 3'b000};
    return (w * 64'h9E37_79B9_7F4A_7C15) ^ 64'h0123_4567_89AB_CDEF;
  endfunction

  function automatic uop_t mk(int i, fu_class_t fu, div_op_t dop, int s1, int s2, xlen_t imm, logic use_imm);
    uop_t u;
    u.rob.wrap = 1'b0; u.rob.idx = 8'(i);
    u.fu = fu; u.alu_op = ALU_ADD; u.div_op = dop;
    u.dst = preg_t'(i + 1);
    u.src1 = preg_t'(s1); u.src2 = preg_t'(s2);
    u.imm = imm; u.use_imm = use_imm;
    return u;
  endfunction

  longint wb_cyc  [2][NPROG];
  xlen_t  wb_val  [2][NPROG];
  int     wb_cnt  [2][NPROG];
  int     n_hold  [2];
  int     n_pre   [2];

  for (genvar g = 0; g < 2; g++) begin : g_run
    localparam bit SECRET = (g == 1);

    logic disp_valid, disp_ready;
    uop_t disp_uop;
    logic spec_valid;
    rob_id_t spec_head;
    logic l1_req_valid;
    xlen_t l1_req_addr;
    logic l1_resp_hit;
    xlen_t l1_resp_data;
    logic l2_req_valid;
    line_addr_t l2_req_line;
    logic [1:0] l2_req_mshr;
    logic fill_valid;
    logic [1:0] fill_mshr;
    logic [LINE_BITS-1:0] fill_data;
    logic fill_ready;
    logic replay_valid;
    rob_id_t replay_rob;
    replay_kind_t replay_kind;
    logic [NWB-1:0] wb_valid;
    rob_id_t wb_rob [NWB];
    preg_t wb_tag [NWB];
    xlen_t wb_data [NWB];
    logic ev_prealloc_hold, ev_div_busy_stall, ev_coalesce_spec, ev_preempt, ev_delay, ev_retry;

    seed_issue_top dut (.*);

    // program
    uop_t prog [NPROG];
    initial begin
      prog[0] = mk(0, FU_ALU, DIV_QUO, 0, 0, 64'd7, 1'b1);           // r1 = 7
      prog[1] = mk(1, FU_ALU, DIV_QUO, 0, 0, 64'd49, 1'b1);          // r2 = 49
      prog[2] = mk(2, FU_ALU, DIV_QUO, 0, 0, A_LINE * 7, 1'b1);      // r3
      prog[3] = mk(3, FU_DIV, DIV_QUO, 2, 1, '0, 1'b0);              // r4 = 49 / 7
      prog[4] = mk(4, FU_DIV, DIV_QUO, 3, 4, '0, 1'b0);              // r5 = A_LINE
      prog[5] = mk(5, FU_LOAD, DIV_QUO, 0, 0, A_LINE + 8, 1'b1);
      prog[6] = mk(6, FU_LOAD, DIV_QUO, 5, 0, 64'd0, 1'b1);          // load A
      prog[7] = mk(7, FU_LOAD, DIV_QUO, 0, 0, B_LINE, 1'b1);         // load B
      prog[8] = SECRET ? mk(8, FU_DIV, DIV_QUO, 1, 1, '0, 1'b0)
                       : mk(8, FU_ALU, DIV_QUO, 1, 0, 64'd1, 1'b1);
      for (int k = 9; k < NPROG; k++)
        prog[k] = SECRET ? mk(k, FU_LOAD, DIV_QUO, 0, 0, A_LINE + {58'd0, 3'(k), 3'b000}, 1'b1)
                         : mk(k, FU_ALU, DIV_QUO, 1, 0, xlen_t'(k), 1'b1);
    end

    // L1 and next level
    bit present [line_addr_t];
    always @(posedge clk) begin
      l1_resp_hit  <= l1_req_valid && present.exists(l1_req_addr[63:6]);
      l1_resp_data <= memval(l1_req_addr);
    end
    typedef struct { longint due; line_addr_t line; logic [1:0] mshr; } l2_t;
    l2_t l2q [$];
    always @(posedge clk) begin
      if (rst_n && fill_valid && fill_ready) begin
        present[l2q[0].line] = 1'b1;
        void'(l2q.pop_front());
      end
      if (rst_n && l2_req_valid) l2q.push_back('{cyc + longint'(L2_LAT), l2_req_line, l2_req_mshr});
    end
    always_comb begin
      fill_valid = 1'b0;
      fill_mshr  = '0;
      fill_data  = '0;
      if (l2q.size() > 0 && l2q[0].due <= cyc) begin
        fill_valid = 1'b1;
        fill_mshr  = l2q[0].mshr;
        for (int w = 0; w < 8; w++)
          fill_data[w*64 +: 64] = memval({l2q[0].line, 3'(w), 3'b000});
      end
    end

    // speculation frontier at instruction 8, lifted at cycle 800
    assign spec_valid = cyc < 800;
    assign spec_head  = prog[8].rob;

    // dispatch in order, replays first
    typedef struct { int idx; longint when; logic need_nonspec; } rep_t;
    rep_t reps [$];
    int next_i = 0;
    int cur_sel, cur_rep;
    always_comb begin
      cur_sel = -1;
      cur_rep = -1;
      for (int k = 0; k < reps.size(); k++)
        if (cur_rep < 0 && reps[k].when <= cyc &&
            (!reps[k].need_nonspec || !spec_valid || rob_older(prog[reps[k].idx].rob, spec_head)))
          cur_rep = k;
      if (cur_rep >= 0) cur_sel = reps[cur_rep].idx;
      else if (next_i < NPROG && rst_n) cur_sel = next_i;
      disp_valid = cur_sel >= 0;
      disp_uop   = (cur_sel >= 0) ? prog[cur_sel] : '0;
    end
    always @(posedge clk) begin
      if (rst_n && disp_valid && disp_ready) begin
        if (cur_rep >= 0) reps.delete(cur_rep);
        else next_i++;
      end
      if (rst_n && replay_valid) reps.push_back('{int'(replay_rob.idx), cyc + 10, replay_kind == REPLAY_DELAYED});
    end

    // record writebacks and events
    always @(posedge clk) begin
      if (rst_n) begin
        for (int w = 0; w < NWB; w++) begin
          if (wb_valid[w]) begin
            automatic int i = int'(wb_rob[w].idx);
            wb_cyc[g][i] = cyc;
            wb_val[g][i] = wb_data[w];
            wb_cnt[g][i]++;
          end
        end
        n_hold[g] += int'(ev_prealloc_hold);
        n_pre[g]  += int'(ev_preempt);
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    for (int g = 0; g < 2; g++) begin
      n_hold[g] = 0; n_pre[g] = 0;
      for (int i = 0; i < NPROG; i++) wb_cnt[g][i] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    do begin
      @(posedge clk);
      all_done = 1;
      for (int g = 0; g < 2; g++)
        for (int i = 0; i < NPROG; i++) if (wb_cnt[g][i] == 0) all_done = 0;
    end while (!all_done && cyc < 4000);
    repeat (5) @(posedge clk);
    for (int g = 0; g < 2; g++)
      for (int i = 0; i < NPROG; i++) chk($sformatf("copy %0d instruction %0d written back once", g, i), longint'(wb_cnt[g][i]), 1);
    for (int i = 0; i < NOLD; i++) begin
      $display("instruction %0d: writeback cycle secret=0 %0d, secret=1 %0d", i, wb_cyc[0][i], wb_cyc[1][i]);
      chk($sformatf("instruction %0d writeback cycle independent of the secret", i), wb_cyc[1][i], wb_cyc[0][i]);
      chk($sformatf("instruction %0d value independent of the secret", i), longint'(wb_val[1][i] == wb_val[0][i]), 1);
    end
    chk("load A value", longint'(wb_val[0][6] == memval(A_LINE)), 1);
    chk("load B value", longint'(wb_val[0][7] == memval(B_LINE)), 1);
    $display("secret=1: prealloc holds=%0d preemptions=%0d", n_hold[1], n_pre[1]);
    chk("divider path exercised (pre-allocation hold)", longint'(n_hold[1] > 0), 1);
    chk("MSHR path exercised (preemption)", longint'(n_pre[1] > 0), 1);
    chk("no preemption without the attack", longint'(n_pre[0]), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
