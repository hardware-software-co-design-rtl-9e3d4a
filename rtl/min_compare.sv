// min_compare: the comparison that ends the CompareDistance step of the SOM
// winner search. It keeps the smallest squared distance seen since the last
// `clear` and, for each incoming distance, reports whether it is smaller
// than that minimum, in which case the minimum is replaced by it.
//
// Interface and timing: one distance per cycle at most (in_valid/distance).
// The outcome appears one cycle later: out_valid, is_smaller (the "returns
// 1" case) and mindist, which always shows the current minimum. `clear`
// sets the minimum to the largest representable value, so the next distance
// is always smaller; a distance arriving with `clear` is compared against
// that cleared value. The compare rule (strictly smaller) follows the
// document; the clear input and the one-cycle registered outputs are this
// design's choice.
module min_compare #(
  parameter int unsigned DIST_W = 36
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              in_valid,
  input  logic [DIST_W-1:0] distance,
  output logic              out_valid,
  output logic              is_smaller,
  output logic [DIST_W-1:0] mindist
);

  logic [DIST_W-1:0] cur_min;
  logic              smaller;

  always_comb begin
    cur_min = clear ? '1 : mindist;
    smaller = in_valid && (distance < cur_min);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mindist    <= '1;
      out_valid  <= 1'b0;
      is_smaller <= 1'b0;
    end else begin
      out_valid  <= in_valid;
      is_smaller <= smaller;
      mindist    <= smaller ? distance : cur_min;
    end
  end

endmodule
