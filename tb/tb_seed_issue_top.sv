// tb_seed_issue_top: end-to-end test of the issue/execute cluster at its
// default size (48 + 16 queue entries, 8 issue ports, 4 MSHRs x 20 targets).
//
// The testbench plays the parts around the cluster: a dispatcher that sends a
// program in order, a load queue that replays the loads the cluster hands
// back, an L1 with a two-cycle lookup, a next level that fills lines after
// L2_LAT cycles, and the ROB's speculation frontier, which it moves forward.
// Every instruction writes its own physical register, so the expected value
// of every writeback is worked out by a program-order interpreter here. The
// program holds:
//   * latency probes: an ALU op (writeback 2 cycles after dispatch), a load
//     that hits (3 cycles) and a division (66 cycles from the writeback of
//     its last operand to its own);
//   * a division chain d1 -> d2 with a younger independent d3: d3 is ready
//     while d2 is not, and must wait (pre-allocation); divisions must write
//     back in program order;
//   * an older load whose address comes from a division, issued after 19
//     younger speculative loads have taken every target of the MSHR it
//     needs: it must preempt one;
//   * speculative misses without an MSHR (delayed, replayed once
//     non-speculative) and more non-speculative misses than MSHRs (retry);
//   * a random mix of ALU operations, loads and divisions.
// Every instruction must write back exactly once with the right value, and
// each mechanism must be seen at least once.
module tb_seed_issue_top;
  import seed_pkg::*;

  localparam int unsigned NWB    = 9;
  localparam int unsigned L2_LAT = 100;
  localparam int unsigned NPROG  = 250;

  logic clk = 1'b0, rst_n = 1'b0;
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

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL cyc=%0d %s got=%0h exp=%0h", cyc, what, got, exp);
    end
  endtask

  // ------------------------------------------------------------ memory
  function automatic xlen_t memval(xlen_t addr);
    xlen_t w = {addr[63:3], 3'b000};
    return (w * 64'h9E37_79B9_7F4A_7C15) ^ 64'h0123_4567_89AB_CDEF;
  endfunction

  bit present [line_addr_t];

  // L1: answer one cycle after the request
  always @(posedge clk) begin
    l1_resp_hit  <= l1_req_valid && present.exists(l1_req_addr[63:6]);
    l1_resp_data <= memval(l1_req_addr);
  end

  // next level: fill each requested line L2_LAT cycles later
  typedef struct { longint due; line_addr_t line; logic [1:0] mshr; } l2_t;
  l2_t l2q [$];
  always @(posedge clk) begin
    if (fill_valid && fill_ready) begin
      present[l2q[0].line] = 1'b1;
      void'(l2q.pop_front());
    end
    if (l2_req_valid) l2q.push_back('{cyc + L2_LAT, l2_req_line, l2_req_mshr});
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

  // ------------------------------------------------------------ program
  uop_t  prog [NPROG];
  xlen_t expv [NPROG];
  xlen_t regv [NPREG];
  int    nprog = 0;
  int    done_cnt [NPROG];
  longint disp_cyc [NPROG];
  longint wb_cyc [NPROG];

  function automatic xlen_t interp(uop_t u);
    xlen_t a = regv[u.src1], b = u.use_imm ? u.imm : regv[u.src2];
    case (u.fu)
      FU_ALU: case (u.alu_op)
        ALU_ADD: return a + b;
        ALU_SUB: return a - b;
        ALU_AND: return a & b;
        ALU_OR:  return a | b;
        ALU_XOR: return a ^ b;
        ALU_SLL: return a << b[5:0];
        ALU_SRL: return a >> b[5:0];
        default: return ($signed(a) < $signed(b)) ? 64'd1 : 64'd0;
      endcase
      FU_LOAD: return memval(a + u.imm);
      default: begin
        b = regv[u.src2];
        if (b == 0) return (u.div_op == DIV_QUO) ? '1 : a;
        return (u.div_op == DIV_QUO) ? a / b : a % b;
      end
    endcase
  endfunction

  function automatic int add(fu_class_t fu, alu_op_t aop, div_op_t dop, int s1, int s2,
                              xlen_t imm, logic use_imm);
    uop_t u;
    int i = nprog;
    u.rob.wrap = 1'b0; u.rob.idx = 8'(i);
    u.fu = fu; u.alu_op = aop; u.div_op = dop;
    u.dst = preg_t'(i + 1);
    u.src1 = preg_t'(s1); u.src2 = preg_t'(s2);
    u.imm = imm; u.use_imm = use_imm;
    prog[i] = u;
    expv[i] = interp(u);
    regv[u.dst] = expv[i];
    nprog++;
    return i + 1;                  // register holding the result
  endfunction

  function automatic int li(xlen_t v);
    return add(FU_ALU, ALU_ADD, DIV_QUO, 0, 0, v, 1'b1);
  endfunction
  function automatic int ld(int base, xlen_t off);
    return add(FU_LOAD, ALU_ADD, DIV_QUO, base, 0, off, 1'b1);
  endfunction
  function automatic int dv(int a, int b, div_op_t op);
    return add(FU_DIV, ALU_ADD, op, a, b, '0, 1'b0);
  endfunction

  localparam xlen_t HIT_LINE = 64'h1000;     // present from the start
  localparam xlen_t X_LINE   = 64'h2000;     // contended line
  localparam xlen_t Y_LINE   = 64'h3000;     // speculative miss, no MSHR
  int i_alu0, i_ld0, i_div0, i_spec_first, i_old_load, i_d3;  // positions in the program

  function automatic void build();
    int c7, cx, q, d1, d2;
    for (int k = 0; k < NPREG; k++) regv[k] = '0;
    // latency probes
    i_alu0 = li(64'd42) - 1;
    i_ld0  = ld(0, HIT_LINE + 16) - 1;
    c7 = li(64'd7);
    cx = li(X_LINE * 7);
    // q = X_LINE; also the division latency probe
    q = dv(cx, c7, DIV_QUO);
    i_div0 = q - 1;
    // pre-allocation: d1 ready, d2 waits for d1, d3 ready but younger
    d1 = dv(cx, c7, DIV_REM);
    d2 = dv(d1, c7, DIV_QUO);
    i_d3 = dv(cx, c7, DIV_QUO) - 1;
    void'(ld(0, X_LINE + 8));                        // non-speculative: allocates X
    i_old_load = ld(q, 0) - 1;                       // older load, waits for q
    i_spec_first = nprog;
    for (int k = 0; k < 19; k++) void'(ld(0, X_LINE + 8 * (k % 8)));  // speculative targets
    void'(ld(0, X_LINE + 24));                       // one more: no target left
    void'(ld(0, Y_LINE));                            // speculative miss: delayed
    // non-speculative misses to more lines than there are MSHRs
    for (int k = 0; k < 6; k++) void'(ld(0, 64'h10000 + 64 * k));
    // random mix
    while (nprog < NPROG) begin
      int s1 = $urandom_range(1, nprog), s2 = $urandom_range(1, nprog);
      int sel = $urandom_range(0, 99);
      if (sel < 70)
        void'(add(FU_ALU, alu_op_t'($urandom_range(0, 7)), DIV_QUO, s1, s2,
                  xlen_t'($urandom_range(0, 63)), $urandom_range(0, 1)));
      else if (sel < 90)
        void'(ld(0, 64'h4000 + 8 * $urandom_range(0, 63)));
      else
        void'(dv(s1, s2, div_op_t'($urandom_range(0, 1))));
    end
  endfunction

  // ------------------------------------------------------------ dispatch and replay
  typedef struct { int idx; longint when; logic need_nonspec; } rep_t;
  rep_t reps [$];
  int next_i = 0;
  // instructions sent but not yet written back; new ones are held back
  // before the queues could fill with work that waits on a replay
  int n_out_main = 0, n_out_div = 0;
  int cur_sel;                      // -1: none, else program index
  int cur_rep;                      // index into reps, or -1

  function automatic logic is_nonspec(int i);
    return !spec_valid || rob_older(prog[i].rob, spec_head);
  endfunction

  always_comb begin
    cur_sel = -1;
    cur_rep = -1;
    for (int k = 0; k < reps.size(); k++) begin
      if (cur_rep < 0 && reps[k].when <= cyc &&
          (!reps[k].need_nonspec || is_nonspec(reps[k].idx))) cur_rep = k;
    end
    if (cur_rep >= 0) cur_sel = reps[cur_rep].idx;
    else if (next_i < nprog && rst_n &&
             (prog[next_i].fu == FU_DIV ? n_out_div < 12 : n_out_main < 40)) cur_sel = next_i;
    disp_valid = cur_sel >= 0;
    disp_uop   = (cur_sel >= 0) ? prog[cur_sel] : '0;
  end

  int n_disp_replay = 0;
  int rep_cnt [NPROG];
  always @(posedge clk) begin
    if (disp_valid && disp_ready) begin
      if (cur_rep >= 0) begin
        reps.delete(cur_rep);
        n_disp_replay++;
      end else begin
        disp_cyc[next_i] = cyc;
        if (prog[next_i].fu == FU_DIV) n_out_div++; else n_out_main++;
        next_i++;
      end
    end
    if (replay_valid) begin
      automatic int i = replay_rob.idx;
      rep_cnt[i]++;
      reps.push_back('{i, cyc + 10, replay_kind == REPLAY_DELAYED});
    end
  end

  // ------------------------------------------------------------ writeback check
  int last_div = -1;
  always @(posedge clk) begin
    if (rst_n) begin
      for (int w = 0; w < NWB; w++) begin
        if (wb_valid[w]) begin
          automatic int i = wb_rob[w].idx;
          chk("wb tag", wb_tag[w], prog[i].dst);
          chk("wb data", wb_data[w], expv[i]);
          done_cnt[i]++;
          if (prog[i].fu == FU_DIV) n_out_div--; else n_out_main--;
          wb_cyc[i] = cyc;
          if (prog[i].fu == FU_DIV) begin
            checks++;
            if (i <= last_div) begin
              failures++;
              $display("FAIL division %0d written back after division %0d", i, last_div);
            end
            last_div = i;
          end
        end
      end
    end
  end

  // ------------------------------------------------------------ statistics
  int n_hold = 0, n_stall = 0, n_coal = 0, n_pre = 0, n_delay = 0, n_retry = 0;
  int n_multi = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      n_hold  += int'(ev_prealloc_hold);
      n_stall += int'(ev_div_busy_stall);
      n_coal  += int'(ev_coalesce_spec);
      n_pre   += int'(ev_preempt);
      n_delay += int'(ev_delay);
      n_retry += int'(ev_retry);
      if ($countones(wb_valid[5:0]) > 1) n_multi++;
    end
  end

  // the speculation frontier: starts at the first speculative load, then
  // moves forward by one instruction every 8 cycles from cycle 300
  int spec_i;
  always @(posedge clk) begin
    if (!rst_n) begin
      spec_i <= i_spec_first;
    end else if (cyc >= 300 && cyc % 8 == 0 && spec_i < NPROG) begin
      spec_i <= spec_i + 1;
    end
  end
  assign spec_valid = spec_i < NPROG;
  assign spec_head  = prog[(spec_i < NPROG) ? spec_i : 0].rob;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int all_done;
    build();
    for (int i = 0; i < NPROG; i++) begin done_cnt[i] = 0; rep_cnt[i] = 0; end
    present[HIT_LINE[63:6]] = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // run until everything has written back
    do begin
      @(posedge clk);
      all_done = 1;
      for (int i = 0; i < NPROG; i++) if (done_cnt[i] == 0) all_done = 0;
    end while (!all_done && cyc < 15000);
    repeat (5) @(posedge clk);
    for (int i = 0; i < NPROG; i++) chk($sformatf("instruction %0d written back once", i), done_cnt[i], 1);
    // the older load got its target although younger speculative loads had
    // taken them all: it was never sent back
    chk("older load never replayed", rep_cnt[i_old_load], 0);
    chk("ALU latency (dispatch to writeback)", wb_cyc[i_alu0] - disp_cyc[i_alu0], 2);
    chk("load hit latency", wb_cyc[i_ld0] - disp_cyc[i_ld0], 3);
    chk("division latency (last operand written back to result)", wb_cyc[i_div0] - wb_cyc[i_div0 - 1], 66);
    $display("prealloc_hold=%0d div_busy_stall=%0d spec_coalesce=%0d preempt=%0d delay=%0d retry=%0d replays=%0d multi_alu_wb=%0d cycles=%0d",
             n_hold, n_stall, n_coal, n_pre, n_delay, n_retry, n_disp_replay, n_multi, cyc);
    chk("pre-allocation hold seen", n_hold > 0, 1);
    chk("divider busy stall seen", n_stall > 0, 1);
    chk("speculative coalescing seen", n_coal > 0, 1);
    chk("target preemption seen", n_pre > 0, 1);
    chk("delay-on-miss seen", n_delay > 0, 1);
    chk("MSHR retry seen", n_retry > 0, 1);
    chk("several ALU ports in one cycle seen", n_multi > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
