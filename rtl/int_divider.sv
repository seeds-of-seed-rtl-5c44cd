// int_divider: multi-cycle, non-pipelined unsigned integer divider.
//
// This is the kind of functional unit the scheduling policy protects: once an
// instruction starts in it, the unit stays occupied for many cycles and no
// other division can begin, so whoever starts first blocks everyone else.
// The divider is a radix-2 restoring divider that produces one quotient bit
// per cycle. Its algorithm, width and latency are this design's own choice;
// the unit is only characterised as "multi-cycle and non-pipelined".
//
// Interface: start with dividend a, divisor b, op (quotient or remainder) and
// an opaque tag that is handed back with the result. busy is high while a
// division is in progress; start is only accepted when busy is low.
// Division by zero returns an all-ones quotient and the dividend as the
// remainder, which the restoring recurrence yields by itself.
//
// Timing: start in cycle t; the W iterations run in cycles t+1 .. t+W, during
// which busy is high; done pulses for one cycle in cycle t+W+1 with result
// and tag. busy is low again in the done cycle, so a new division may start
// then: latency and repeat interval are both W+1 cycles.
module int_divider
  import seed_pkg::*;
#(
  parameter int unsigned W     = XLEN,
  parameter type         tag_t = logic [PREG_W-1:0]
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  div_op_t      op,
  input  tag_t         tag_in,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] result,
  output tag_t         tag_out
);

  localparam int unsigned SW = $clog2(W + 1);

  logic [W-1:0]  quo_q, div_q;     // shifting dividend/quotient, divisor
  logic [W-1:0]  rem_q;            // partial remainder (always below the divisor)
  logic [SW-1:0] step_q;
  div_op_t       op_q;
  tag_t          tag_q;
  logic          busy_q, done_q;

  logic [W:0]    shifted, diff;
  always_comb begin
    shifted = {rem_q, quo_q[W-1]};
    diff    = shifted - {1'b0, div_q};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      done_q <= 1'b0;
      step_q <= '0;
    end else begin
      done_q <= 1'b0;
      if (start && !busy_q) begin
        busy_q <= 1'b1;
        step_q <= '0;
      end else if (busy_q) begin
        step_q <= step_q + 1'b1;
        if (step_q == SW'(W - 1)) begin
          busy_q <= 1'b0;
          done_q <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (start && !busy_q) begin
      quo_q <= a;
      div_q <= b;
      rem_q <= '0;
      op_q  <= op;
      tag_q <= tag_in;
    end else if (busy_q) begin
      if (!diff[W]) begin
        rem_q <= diff[W-1:0];
        quo_q <= {quo_q[W-2:0], 1'b1};
      end else begin
        rem_q <= shifted[W-1:0];
        quo_q <= {quo_q[W-2:0], 1'b0};
      end
    end
  end

  assign busy    = busy_q;
  assign done    = done_q;
  assign result  = (op_q == DIV_REM) ? rem_q : quo_q;
  assign tag_out = tag_q;

endmodule
