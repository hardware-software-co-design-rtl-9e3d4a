// som_compare_distance: hardware CompareDistance for the winner search of a
// Kohonen self-organizing map. The host streams one (neuron weight vector,
// training pattern) pair per restart period; for each pair the unit returns
// the squared Euclidean distance, whether it is below the smallest distance
// found since the last clear_min, and that minimum. Scanning all neurons of
// the map for one pattern (clear_min with or before the first pair) leaves
// the winner's distance in mindist, and the last pair flagged is_smaller is
// the winning neuron.
//
// Structure: compute_distance (the pipelined, shared-unit distance datapath)
// feeds min_compare. Timing: in_ready is high one cycle every RESTART cycles;
// a pair taken then produces res_valid LATENCY + 1 cycles after the cycle
// following the accept (LATENCY is compute_distance's scheduled latency; one
// more cycle for the compare). clear_min acts in the cycle it is high, on
// the compare stage, so raise it before the first result of a scan arrives.
// Results leave in input order, one per RESTART cycles at full rate.
//
// From the document: the split into distance computation and compare, the
// vector length 9 and the restart time 5 on 13 units. This design's own:
// the handshake, the widths and the clear input.
module som_compare_distance
  import som_pkg::*;
#(
  parameter int unsigned DIM     = 9,
  parameter int unsigned DATA_W  = 16,
  parameter int unsigned RESTART = 5,
  parameter int unsigned NUM_ALU = 13,
  localparam int unsigned DIST_W = 2 * DATA_W + $clog2(DIM)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [DATA_W-1:0] weight  [DIM],
  input  logic signed [DATA_W-1:0] pattern [DIM],
  input  logic                     clear_min,
  output logic                     res_valid,
  output logic [DIST_W-1:0]        distance,
  output logic                     is_smaller,
  output logic [DIST_W-1:0]        mindist
);

  logic              cd_valid;
  logic [DIST_W-1:0] cd_dist;

  compute_distance #(
    .DIM     (DIM),
    .DATA_W  (DATA_W),
    .RESTART (RESTART),
    .NUM_ALU (NUM_ALU)
  ) u_dist (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_ready  (in_ready),
    .a         (weight),
    .b         (pattern),
    .out_valid (cd_valid),
    .distance  (cd_dist)
  );

  logic [DIST_W-1:0] dist_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        dist_q <= '0;
    else if (cd_valid) dist_q <= cd_dist;
  end

  min_compare #(.DIST_W(DIST_W)) u_cmp (
    .clk        (clk),
    .rst_n      (rst_n),
    .clear      (clear_min),
    .in_valid   (cd_valid),
    .distance   (cd_dist),
    .out_valid  (res_valid),
    .is_smaller (is_smaller),
    .mindist    (mindist)
  );

  assign distance = dist_q;

endmodule
