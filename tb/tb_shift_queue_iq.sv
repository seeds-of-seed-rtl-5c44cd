// tb_shift_queue_iq: self-checking test of the shifting instruction queue.
//
// Two queues receive the same random stimulus, one with pre-allocation and
// one without. A reference model in the testbench keeps the entries in
// program order and, every cycle, grants each free port to its oldest ready
// entry; with pre-allocation an entry younger than any non-pipelined (np)
// entry may not issue. Grants, payloads, occupancy and the prealloc_hold flag
// are compared every cycle. A directed case first replays the two-division
// example: the younger division is ready first, the older one a cycle later.
module tb_shift_queue_iq;
  import seed_pkg::*;

  localparam int unsigned DEPTH = 8, PORTS = 3, NWAKE = 2;
  localparam int unsigned PW = $clog2(PORTS);
  typedef logic [15:0] pay_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic alloc_valid;
  preg_t alloc_src1, alloc_src2;
  logic alloc_rdy1, alloc_rdy2, alloc_np;
  logic [PW-1:0] alloc_port;
  pay_t alloc_payload;
  logic [NWAKE-1:0] wake_valid;
  preg_t wake_tag [NWAKE];
  logic [PORTS-1:0] port_free;
  logic alloc_ready [2];
  logic [PORTS-1:0] issue_valid [2];
  pay_t issue_payload [2][PORTS];
  logic [$clog2(DEPTH+1)-1:0] count [2];
  logic hold [2];
  int checks = 0, failures = 0;
  int n_hold = 0, n_issue = 0;

  for (genvar g = 0; g < 2; g++) begin : g_dut
    shift_queue_iq #(.DEPTH(DEPTH), .PORTS(PORTS), .NWAKE(NWAKE), .PREALLOC(g == 0),
                    .payload_t(pay_t)) dut (
      .clk, .rst_n, .alloc_valid, .alloc_ready(alloc_ready[g]),
      .alloc_src1, .alloc_src2, .alloc_rdy1, .alloc_rdy2, .alloc_port, .alloc_np,
      .alloc_payload, .wake_valid, .wake_tag, .port_free,
      .issue_valid(issue_valid[g]), .issue_payload(issue_payload[g]),
      .count(count[g]), .prealloc_hold(hold[g]));
  end

  always #5 clk = ~clk;

  // ---------------- reference model: entries in program order
  typedef struct packed {
    pay_t pay; logic [PW-1:0] port; logic np; logic r1; logic r2; preg_t s1; preg_t s2;
  } ment_t;
  ment_t mq [2][$];

  function automatic logic woken(preg_t t);
    for (int w = 0; w < NWAKE; w++) if (wake_valid[w] && wake_tag[w] == t) return 1'b1;
    return 1'b0;
  endfunction

  // expected grants of model m under the current inputs
  function automatic void expect_picks(int m, output logic [PORTS-1:0] v, output pay_t p [PORTS],
                                       output int idx [PORTS], output logic h);
    logic blocked = 1'b0;
    v = '0; h = 1'b0;
    for (int k = 0; k < PORTS; k++) begin p[k] = '0; idx[k] = -1; end
    for (int e = 0; e < mq[m].size(); e++) begin
      ment_t x = mq[m][e];
      if (x.r1 && x.r2 && port_free[x.port] && !v[x.port]) begin
        if (blocked) begin
          // would it have won its port without the np rule?
          h = 1'b1;
        end else begin
          v[x.port] = 1'b1; p[x.port] = x.pay; idx[x.port] = e;
        end
      end
      if (m == 0 && x.np) blocked = 1'b1;
    end
  endfunction

  // the held flag only counts entries that are the oldest bidder of their
  // port; recompute it exactly
  function automatic logic expect_hold(int m);
    logic [PORTS-1:0] seen = '0;
    logic blocked = 1'b0, h = 1'b0;
    if (m != 0) return 1'b0;
    for (int e = 0; e < mq[m].size(); e++) begin
      ment_t x = mq[m][e];
      if (x.r1 && x.r2 && port_free[x.port]) begin
        if (!seen[x.port] && blocked) h = 1'b1;
        seen[x.port] = 1'b1;
      end
      if (x.np) blocked = 1'b1;
    end
    return h;
  endfunction

  pay_t next_pay = 1;

  task automatic step_and_check();
    logic [PORTS-1:0] v; pay_t p [PORTS]; int idx [PORTS]; logic h;
    #1;
    for (int m = 0; m < 2; m++) begin
      expect_picks(m, v, p, idx, h);
      checks++;
      if (issue_valid[m] !== v) begin
        failures++;
        $display("FAIL t=%0t q%0d issue_valid=%b exp=%b", $time, m, issue_valid[m], v);
      end
      for (int k = 0; k < PORTS; k++) if (v[k]) begin
        checks++;
        if (issue_payload[m][k] !== p[k]) begin
          failures++;
          $display("FAIL q%0d port %0d payload=%h exp=%h", m, k, issue_payload[m][k], p[k]);
        end
      end
      checks++;
      if (count[m] != mq[m].size()) begin
        failures++; $display("FAIL q%0d count=%0d exp=%0d", m, count[m], mq[m].size());
      end
      checks++;
      if (hold[m] !== expect_hold(m)) begin
        failures++; $display("FAIL q%0d hold=%b", m, hold[m]);
      end
      if (m == 0 && hold[m]) n_hold++;
      n_issue += $countones(v);
      // model update at the edge
      begin
        ment_t nq[$];
        for (int e = 0; e < mq[m].size(); e++) begin
          logic gone = 1'b0;
          for (int k = 0; k < PORTS; k++) if (idx[k] == e) gone = 1'b1;
          if (!gone) begin
            ment_t x = mq[m][e];
            x.r1 = x.r1 | woken(x.s1);
            x.r2 = x.r2 | woken(x.s2);
            nq.push_back(x);
          end
        end
        if (alloc_valid && mq[m].size() < DEPTH) begin
          ment_t x;
          x.pay = alloc_payload; x.port = alloc_port; x.np = alloc_np;
          x.s1 = alloc_src1; x.s2 = alloc_src2;
          x.r1 = alloc_rdy1 | woken(alloc_src1);
          x.r2 = alloc_rdy2 | woken(alloc_src2);
          nq.push_back(x);
        end
        checks++;
        if (alloc_ready[m] !== (mq[m].size() < DEPTH)) begin
          failures++; $display("FAIL q%0d alloc_ready", m);
        end
        mq[m] = nq;
      end
    end
    @(posedge clk);
    #1;
  endtask

  task automatic idle_inputs();
    alloc_valid = 0; alloc_np = 0; alloc_rdy1 = 0; alloc_rdy2 = 0; alloc_port = '0;
    alloc_src1 = '0; alloc_src2 = '0; alloc_payload = '0;
    wake_valid = '0; wake_tag[0] = '0; wake_tag[1] = '0;
  endtask

  task automatic alloc(preg_t s1, logic r1, logic np, logic [PW-1:0] port);
    idle_inputs();
    alloc_valid = 1; alloc_src1 = s1; alloc_rdy1 = r1; alloc_src2 = 8'd0; alloc_rdy2 = 1;
    alloc_np = np; alloc_port = port; alloc_payload = next_pay++;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle_inputs();
    port_free = '1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    // directed: OLDER division waits on tag 5, YOUNGER division is ready;
    // both use port 0. The YOUNGER one becomes issuable first.
    port_free = 3'b001;
    alloc(8'd5, 1'b0, 1'b1, 2'd0); step_and_check();   // OLDER (pay 1)
    alloc(8'd6, 1'b1, 1'b1, 2'd0); step_and_check();   // YOUNGER (pay 2)
    idle_inputs(); #1;
    checks++;
    if (issue_valid[0][0] || !issue_valid[1][0] || issue_payload[1][0] != 16'd2) begin
      failures++; $display("FAIL directed: YOUNGER must wait only with pre-allocation");
    end
    step_and_check();
    idle_inputs(); wake_valid = 2'b01; wake_tag[0] = 8'd5; step_and_check();  // OLDER ready
    idle_inputs(); #1;
    checks++;
    if (!issue_valid[0][0] || issue_payload[0][0] != 16'd1) begin
      failures++; $display("FAIL directed: OLDER must issue first with pre-allocation");
    end
    step_and_check();
    idle_inputs(); #1;
    checks++;
    if (!issue_valid[0][0] || issue_payload[0][0] != 16'd2) begin
      failures++; $display("FAIL directed: YOUNGER must follow");
    end
    step_and_check();
    // random traffic
    for (int c = 0; c < 20000; c++) begin
      idle_inputs();
      port_free = PORTS'($urandom);
      if ($urandom_range(0, 99) < 60) begin
        alloc_valid = 1;
        alloc_src1 = 8'($urandom_range(0, 15)); alloc_rdy1 = $urandom_range(0, 1);
        alloc_src2 = 8'($urandom_range(0, 15)); alloc_rdy2 = $urandom_range(0, 1);
        alloc_np = ($urandom_range(0, 99) < 25);
        alloc_port = PW'($urandom_range(0, PORTS - 1));
        alloc_payload = next_pay++;
      end
      for (int w = 0; w < NWAKE; w++) begin
        wake_valid[w] = ($urandom_range(0, 99) < 30);
        wake_tag[w] = 8'($urandom_range(0, 15));
      end
      step_and_check();
    end
    checks++;
    if (n_hold == 0 || n_issue < 1000) begin
      failures++; $display("FAIL coverage: holds=%0d issues=%0d", n_hold, n_issue);
    end
    $display("pre-allocation holds=%0d issues=%0d", n_hold, n_issue);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
