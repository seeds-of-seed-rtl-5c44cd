// tb_int_divider: self-checking test of the non-pipelined divider.
// Random and corner operands, quotient and remainder compared with the
// language's own / and % (division by zero: all-ones quotient, dividend as
// remainder). Also checks the latency of W+1 cycles, that busy is high for
// the whole operation, and that a new division can start in the done cycle.
module tb_int_divider;
  import seed_pkg::*;

  localparam int unsigned W = XLEN;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start;
  xlen_t a, b, result;
  div_op_t op;
  logic [7:0] tag_in, tag_out;
  logic busy, done;
  int checks = 0, failures = 0;

  int_divider #(.W(W), .tag_t(logic [7:0])) dut (
    .clk, .rst_n, .start, .a, .b, .op, .tag_in, .busy, .done, .result, .tag_out);

  always #5 clk = ~clk;

  task automatic expect_eq(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  // one division started right now; returns with the done cycle current
  task automatic run(xlen_t x, xlen_t z, div_op_t o, logic [7:0] t);
    int cyc;
    xlen_t e;
    a = x; b = z; op = o; tag_in = t; start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    cyc = 1;
    while (!done) begin
      checks++;
      if (!busy) begin failures++; $display("FAIL busy low during division"); end
      @(posedge clk); #1;
      cyc++;
    end
    if (z == 0) e = (o == DIV_QUO) ? '1 : x;
    else        e = (o == DIV_QUO) ? x / z : x % z;
    expect_eq("result", result, e);
    expect_eq("tag", 64'(tag_out), 64'(t));
    expect_eq("latency", 64'(cyc), 64'(W + 1));
    expect_eq("busy low in done cycle", 64'(busy), 64'd0);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; a = 0; b = 0; op = DIV_QUO; tag_in = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    run(64'd100, 64'd7, DIV_QUO, 8'd1);
    run(64'd100, 64'd7, DIV_REM, 8'd2);   // starts in the done cycle
    run(64'hFFFF_FFFF_FFFF_FFFF, 64'd1, DIV_QUO, 8'd3);
    run(64'hFFFF_FFFF_FFFF_FFFF, 64'hFFFF_FFFF_FFFF_FFFF, DIV_REM, 8'd4);
    run(64'd5, 64'd0, DIV_QUO, 8'd5);
    run(64'd5, 64'd0, DIV_REM, 8'd6);
    for (int i = 0; i < 300; i++) begin
      xlen_t x, z;
      x = {$urandom, $urandom};
      z = (i % 3 == 0) ? xlen_t'($urandom_range(1, 1000)) : {$urandom, $urandom} >> $urandom_range(0, 63);
      run(x, z, div_op_t'(i % 2), 8'(i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
