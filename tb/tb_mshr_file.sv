// tb_mshr_file: self-checking test of the MSHR file with Delay-on-Miss and
// target preemption.
//
// A small configuration (2 MSHRs, 3 targets each) is driven with random miss
// requests to a few cache lines, random ROB positions and a moving
// speculation frontier, plus random fills. A reference model in the
// testbench applies the policy (coalesce, delay, allocate, preempt the
// youngest younger speculative target, retry) and the drain order, and every
// outcome, preemption, next-level request and delivered target (the oldest
// target of all filled MSHRs) is compared each cycle. Every outcome must occur at least once.
module tb_mshr_file;
  import seed_pkg::*;

  localparam int unsigned NM = 2, NT = 3;
  localparam int unsigned MW = 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic spec_valid;
  rob_id_t spec_head;
  logic req_valid;
  line_addr_t req_line;
  mshr_tgt_t req_tgt;
  logic req_spec;
  miss_kind_t resp_kind;
  logic [MW-1:0] resp_mshr;
  logic preempt_valid;
  mshr_tgt_t preempt_tgt;
  logic l2_req_valid;
  line_addr_t l2_req_line;
  logic [MW-1:0] l2_req_mshr;
  logic fill_valid;
  logic [MW-1:0] fill_mshr;
  logic fill_ready;
  logic tgt_valid;
  mshr_tgt_t tgt_out;
  logic [MW-1:0] tgt_mshr;
  logic [NM-1:0] mshr_busy;

  mshr_file #(.N_MSHR(NM), .N_TGT(NT)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_alloc = 0, n_coal_spec = 0, n_coal_ns = 0, n_preempt = 0, n_delay = 0,
      n_retry = 0, n_deliver = 0;

  // ---------------- reference model
  logic       m_valid [NM];
  line_addr_t m_line  [NM];
  logic       m_tv    [NM][NT];
  mshr_tgt_t  m_tgt   [NM][NT];
  logic       m_filled [NM];

  function automatic logic spec_of(rob_id_t r);
    return spec_valid && !rob_older(r, spec_head);
  endfunction

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL t=%0t %s got=%0h exp=%0h", $time, what, got, exp);
    end
  endtask

  function automatic rob_id_t pos2rob(int pos);
    rob_id_t r;
    r.wrap = pos[8];
    r.idx  = pos[7:0];
    return r;
  endfunction

  int base = 0;

  task automatic cycle();
    int deliver_k = -1, deliver_m = -1;
    int hit = -1, freem = -1, slot = -1, victim = -1;
    miss_kind_t ek;
    logic epre = 1'b0;
    #1;
    // delivery
    for (int m = 0; m < NM; m++)
      for (int k = 0; k < NT; k++)
        if (m_filled[m] && m_tv[m][k] &&
            (deliver_k < 0 || rob_older(m_tgt[m][k].rob, m_tgt[deliver_m][deliver_k].rob))) begin
          deliver_m = m;
          deliver_k = k;
        end
    chk("tgt_valid", tgt_valid, deliver_k >= 0);
    if (deliver_k >= 0) begin
      chk("tgt_out", tgt_out, m_tgt[deliver_m][deliver_k]);
      chk("tgt_mshr", tgt_mshr, deliver_m);
      n_deliver++;
    end
    chk("fill_ready", fill_ready, 1);
    for (int m = 0; m < NM; m++) chk("busy", mshr_busy[m], m_valid[m]);
    // request
    if (req_valid) begin
      for (int m = 0; m < NM; m++) begin
        if (m_valid[m] && m_line[m] == req_line && hit < 0) hit = m;
        if (!m_valid[m] && freem < 0) freem = m;
      end
      if (hit >= 0) begin
        for (int k = 0; k < NT; k++) if (!m_tv[hit][k] && slot < 0) slot = k;
        for (int k = 0; k < NT; k++) begin
          if (m_tv[hit][k] && !(deliver_m == hit && deliver_k == k) &&
              spec_of(m_tgt[hit][k].rob) && rob_older(req_tgt.rob, m_tgt[hit][k].rob)) begin
            if (victim < 0 || rob_older(m_tgt[hit][victim].rob, m_tgt[hit][k].rob)) victim = k;
          end
        end
        if (slot >= 0) ek = MISS_TARGET;
        else if (victim >= 0) begin ek = MISS_TARGET; epre = 1'b1; end
        else ek = MISS_RETRY;
      end else if (spec_of(req_tgt.rob)) ek = MISS_DELAY;
      else if (freem >= 0) ek = MISS_ALLOC;
      else ek = MISS_RETRY;
      chk("req_spec", req_spec, spec_of(req_tgt.rob));
      chk("resp_kind", resp_kind, ek);
      chk("preempt_valid", preempt_valid, epre);
      if (epre) chk("preempt_tgt", preempt_tgt, m_tgt[hit][victim]);
      if (ek == MISS_TARGET) chk("resp_mshr", resp_mshr, hit);
      chk("l2_req_valid", l2_req_valid, ek == MISS_ALLOC);
      if (ek == MISS_ALLOC) begin
        chk("resp_mshr", resp_mshr, freem);
        chk("l2_req_mshr", l2_req_mshr, freem);
        chk("l2_req_line", l2_req_line, req_line);
      end
      case (ek)
        MISS_ALLOC:  n_alloc++;
        MISS_DELAY:  n_delay++;
        MISS_RETRY:  n_retry++;
        default: if (req_spec) n_coal_spec++; else n_coal_ns++;
      endcase
      if (epre) n_preempt++;
    end else begin
      chk("l2_req_valid idle", l2_req_valid, 0);
      chk("preempt idle", preempt_valid, 0);
    end
    // model update
    if (deliver_k >= 0) m_tv[deliver_m][deliver_k] = 1'b0;
    if (req_valid) begin
      if (ek == MISS_ALLOC) begin
        m_valid[freem] = 1'b1; m_line[freem] = req_line;
        for (int k = 0; k < NT; k++) m_tv[freem][k] = 1'b0;
        m_tv[freem][0] = 1'b1; m_tgt[freem][0] = req_tgt;
      end else if (ek == MISS_TARGET) begin
        int k = (slot >= 0) ? slot : victim;
        m_tv[hit][k] = 1'b1; m_tgt[hit][k] = req_tgt;
      end
    end
    for (int m = 0; m < NM; m++) begin
      logic any = 1'b0;
      for (int k = 0; k < NT; k++) any |= m_tv[m][k];
      if (m_filled[m] && !any) begin m_filled[m] = 1'b0; m_valid[m] = 1'b0; end
    end
    if (fill_valid) m_filled[fill_mshr] = 1'b1;
    @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req_valid = 0; req_line = '0; req_tgt = '0; fill_valid = 0; fill_mshr = '0;
    spec_valid = 0; spec_head = '0;
    for (int m = 0; m < NM; m++) begin
      m_valid[m] = 0; m_filled[m] = 0;
      for (int k = 0; k < NT; k++) m_tv[m][k] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int c = 0; c < 40000; c++) begin
      if (c % 8 == 0) base = (base + 1) % 512;
      spec_valid = ($urandom_range(0, 9) != 0);
      spec_head  = pos2rob((base + $urandom_range(0, 60)) % 512);
      req_valid  = ($urandom_range(0, 99) < 70);
      req_line   = line_addr_t'($urandom_range(0, 3));
      req_tgt.rob  = pos2rob((base + $urandom_range(0, 100)) % 512);
      req_tgt.dst  = preg_t'($urandom);
      req_tgt.word = 3'($urandom);
      // fill only a busy MSHR whose line has not arrived yet
      fill_valid = 1'b0;
      fill_mshr  = MW'($urandom_range(0, NM - 1));
      if ($urandom_range(0, 99) < 15 && m_valid[fill_mshr] && !m_filled[fill_mshr]) fill_valid = 1'b1;
      cycle();
      // once the DUT has diverged from the model, the model's fills may no
      // longer be legal for the DUT: stop here
      if (failures >= 100) break;
    end
    $display("alloc=%0d coalesce_spec=%0d coalesce_nonspec=%0d preempt=%0d delay=%0d retry=%0d deliver=%0d",
             n_alloc, n_coal_spec, n_coal_ns, n_preempt, n_delay, n_retry, n_deliver);
    chk("alloc seen", n_alloc > 0, 1);
    chk("spec coalesce seen", n_coal_spec > 0, 1);
    chk("preempt seen", n_preempt > 0, 1);
    chk("delay seen", n_delay > 0, 1);
    chk("retry seen", n_retry > 0, 1);
    chk("deliver seen", n_deliver > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
