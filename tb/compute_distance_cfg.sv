// compute_distance_cfg: drives one compute_distance instance of a given
// restart time and unit count and checks it. Phase 1 sends NBURST random
// pairs back to back (one at every in_ready), phase 2 sends NGAP pairs with
// random idle restart periods between them. Every output is compared with
// the squared distance computed here; the time from accept to out_valid must
// be LATENCY + 1 cycles, and in phase 1 successive outputs must be exactly
// RESTART cycles apart. The scheduled latency must not exceed MAX_LAT.
// Reports its counts through checks/failures when done goes high.
module compute_distance_cfg #(
  parameter int unsigned DIM     = 9,
  parameter int unsigned DATA_W  = 16,
  parameter int unsigned RESTART = 5,
  parameter int unsigned NUM_ALU = 13,
  parameter int unsigned MAX_LAT = 13,
  parameter int unsigned NBURST  = 40,
  parameter int unsigned NGAP    = 20
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   overlaps,
  output logic done
);
  localparam int unsigned DIST_W = 2 * DATA_W + $clog2(DIM);
  localparam int unsigned NTOT   = NBURST + NGAP;

  logic                     in_valid = 1'b0;
  logic                     in_ready;
  logic signed [DATA_W-1:0] a [DIM];
  logic signed [DATA_W-1:0] b [DIM];
  logic                     out_valid;
  logic [DIST_W-1:0]        distance;

  compute_distance #(.DIM(DIM), .DATA_W(DATA_W), .RESTART(RESTART),
                     .NUM_ALU(NUM_ALU)) dut (.*);

  logic [DIST_W-1:0] exp_q [$];
  longint            t_acc [$];
  longint            cyc = 0;
  longint            last_out = -1;
  int                n_in = 0, n_out = 0, in_flight = 0;

  initial begin
    checks = 0; failures = 0; overlaps = 0; done = 1'b0;
    for (int i = 0; i < DIM; i++) begin a[i] = '0; b[i] = '0; end
  end

  function automatic logic signed [DATA_W-1:0] rval();
    case ($urandom_range(0, 7))
      0: return {1'b0, {(DATA_W-1){1'b1}}};   // most positive
      1: return {1'b1, {(DATA_W-1){1'b0}}};   // most negative
      2: return DATA_W'($urandom_range(0, 15));
      default: return DATA_W'($urandom);
    endcase
  endfunction

  function automatic logic [DIST_W-1:0] ref_dist();
    longint s = 0;
    for (int i = 0; i < DIM; i++)
      s += (longint'(a[i]) - longint'(b[i])) * (longint'(a[i]) - longint'(b[i]));
    return DIST_W'(s);
  endfunction

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  // input side: present a pair in the in_ready cycle
  initial begin
    int gap;
    @(posedge rst_n);
    while (n_in < NTOT) begin
      @(negedge clk);
      if (in_ready) begin
        gap = (n_in >= NBURST) ? $urandom_range(0, 2) : 0;
        if (gap == 0) begin
          for (int i = 0; i < DIM; i++) begin a[i] = rval(); b[i] = rval(); end
          in_valid = 1'b1;
          exp_q.push_back(ref_dist());
          t_acc.push_back(cyc);
          n_in++;
        end else in_valid = 1'b0;
      end else in_valid = 1'b0;
    end
    @(negedge clk);
    in_valid = 1'b0;
  end

  // output side
  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) in_flight++;
    if (rst_n && out_valid) begin
      if (in_flight > 1) overlaps++;
      in_flight--;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL R=%0d: output without input", RESTART);
      end else begin
        logic [DIST_W-1:0] e;
        longint ta;
        e  = exp_q.pop_front();
        ta = t_acc.pop_front();
        if (distance !== e) begin
          failures++;
          $display("FAIL R=%0d item %0d: distance %0d expected %0d", RESTART,
                   n_out, distance, e);
        end
        checks++;
        if (cyc - ta != longint'(dut.LATENCY) + 1) begin
          failures++;
          $display("FAIL R=%0d item %0d: latency %0d expected %0d", RESTART,
                   n_out, cyc - ta - 1, dut.LATENCY);
        end
        if (n_out > 0 && n_out < NBURST) begin
          checks++;
          if (cyc - last_out != longint'(RESTART)) begin
            failures++;
            $display("FAIL R=%0d: outputs %0d cycles apart", RESTART, cyc - last_out);
          end
        end
      end
      last_out = cyc;
      n_out++;
      if (n_out == NTOT) begin
        checks++;
        if (dut.LATENCY > MAX_LAT || dut.LATENCY < RESTART / 2) begin
          failures++;
          $display("FAIL R=%0d: latency %0d outside bound %0d", RESTART,
                   dut.LATENCY, MAX_LAT);
        end
        $display("R=%0d units=%0d latency=%0d outputs=%0d overlapping=%0d",
                 RESTART, NUM_ALU, dut.LATENCY, n_out, overlaps);
        done = 1'b1;
      end
    end
  end
endmodule
