// som_alu: general processing unit of the distance accelerator.
//
// Every unit can execute any elementary operation, and the units are all
// alike, as the document's cost model requires. Durations follow its
// operation timing table: add, sub and cmp take one cycle, mul and div two.
//
// Interface and timing: the scheduler raises `start` with `op`, `a` and `b`
// in the first cycle of an operation. For a one-cycle operation `y` is the
// combinational result in that same cycle and is captured by the consumer at
// the closing clock edge. A two-cycle operation registers its first half at
// that edge; `y` then shows the final result during the second cycle and
// `busy` is high. `start` must stay low in a second cycle (asserted).
//
// How the two-cycle operations are split is this design's choice:
//   mul  low W bits of a*b (two's complement wrap-around). Cycle 1 forms
//        a*b[H-1:0], cycle 2 adds (a*b[W-1:H]) << H, so one W x H multiplier
//        is used twice.
//   div  unsigned restoring division, quotient returned (all ones for a zero
//        divisor); cycle 1 produces the upper W-H quotient bits, cycle 2 the
//        lower H bits.
//   cmp  1 when a < b as signed numbers, else 0.
module som_alu
  import som_pkg::*;
#(
  parameter int unsigned W = 37
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  alu_op_e      op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y,
  output logic         busy
);

  localparam int unsigned H = (W + 1) / 2;   // low half width
  localparam int unsigned HI = W - H;        // high half width

  typedef struct packed {
    logic [W:0]   rem;
    logic [W-1:0] quo;
  } div_state_t;

  // Restoring division steps for dividend bits hi_bit down to lo_bit.
  function automatic div_state_t div_steps(div_state_t s, logic [W-1:0] dvd,
                                           logic [W-1:0] dvs, int hi_bit,
                                           int lo_bit);
    div_state_t r = s;
    for (int i = hi_bit; i >= lo_bit; i--) begin
      r.rem = {r.rem[W-1:0], dvd[i]};
      if (r.rem >= {1'b0, dvs}) begin
        r.rem    = r.rem - {1'b0, dvs};
        r.quo[i] = 1'b1;
      end
    end
    return r;
  endfunction

  logic          second;      // in the second cycle of a two-cycle op
  alu_op_e       op_q;
  logic [W-1:0]  part_q;      // mul: partial product
  logic [W-1:0]  a_q, b_q;
  div_state_t    dst_q;
  div_state_t    div_first;

  always_comb begin
    div_first = div_steps('0, a, b, W - 1, H);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      second <= 1'b0;
      op_q   <= OP_ADD;
      part_q <= '0;
      a_q    <= '0;
      b_q    <= '0;
      dst_q  <= '0;
    end else begin
      second <= start && (op == OP_MUL || op == OP_DIV);
      if (start) begin
        op_q <= op;
        a_q  <= a;
        b_q  <= b;
        if (op == OP_MUL) part_q <= W'(a * {{HI{1'b0}}, b[H-1:0]});
        if (op == OP_DIV) dst_q  <= div_first;
      end
    end
  end

  always_comb begin
    div_state_t fin;
    fin = div_steps(dst_q, a_q, b_q, H - 1, 0);
    y = '0;
    if (second) begin
      if (op_q == OP_MUL) y = part_q + W'((a_q * {{H{1'b0}}, b_q[W-1:H]}) << H);
      else                y = fin.quo;
    end else begin
      case (op)
        OP_ADD:  y = a + b;
        OP_SUB:  y = a - b;
        OP_CMP:  y = W'($signed(a) < $signed(b));
        default: y = '0;
      endcase
    end
  end

  assign busy = second;

  // The schedule must never start an operation on a busy unit.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
                                 !(start && second))
    else $error("som_alu: start during the second cycle of an operation");

endmodule
