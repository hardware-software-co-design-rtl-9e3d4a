// som_scan_run: runs NPAT complete winner searches through one
// som_compare_distance instance of the given size: for each pattern all MAPN
// neurons are streamed at full rate, clear_min is pulsed between scans, and
// every distance, is_smaller flag, mindist and the winner are checked
// against a reference computed here with 64-bit arithmetic. Reports its
// counts through checks/failures when done goes high.
module som_scan_run #(
  parameter int unsigned DIM     = 9,
  parameter int unsigned DATA_W  = 16,
  parameter int unsigned RESTART = 5,
  parameter int unsigned NUM_ALU = 13,
  parameter int unsigned MAPN    = 100,
  parameter int unsigned NPAT    = 2
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int unsigned DIST_W = 2 * DATA_W + $clog2(DIM);

  logic                     in_valid = 1'b0;
  logic                     in_ready;
  logic signed [DATA_W-1:0] weight  [DIM];
  logic signed [DATA_W-1:0] pattern [DIM];
  logic                     clear_min = 1'b0;
  logic                     res_valid;
  logic [DIST_W-1:0]        distance;
  logic                     is_smaller;
  logic [DIST_W-1:0]        mindist;

  som_compare_distance #(.DIM(DIM), .DATA_W(DATA_W), .RESTART(RESTART),
                         .NUM_ALU(NUM_ALU)) dut (.*);

  logic signed [DATA_W-1:0] wmap [MAPN][DIM];
  logic signed [DATA_W-1:0] pats [NPAT][DIM];
  logic [DIST_W-1:0]        exp_d [NPAT][MAPN];
  int                       exp_win [NPAT];
  logic                     clear_req = 1'b0;

  initial begin
    longint s, best;
    checks = 0; failures = 0; done = 1'b0;
    for (int n = 0; n < MAPN; n++)
      for (int i = 0; i < DIM; i++) wmap[n][i] = DATA_W'($urandom);
    for (int p = 0; p < NPAT; p++) begin
      for (int i = 0; i < DIM; i++) pats[p][i] = DATA_W'($urandom);
      best = -1;
      for (int n = 0; n < MAPN; n++) begin
        s = 0;
        for (int i = 0; i < DIM; i++)
          s += (longint'(wmap[n][i]) - longint'(pats[p][i])) *
               (longint'(wmap[n][i]) - longint'(pats[p][i]));
        exp_d[p][n] = DIST_W'(s);
        if (best < 0 || s < best) begin best = s; exp_win[p] = n; end
      end
    end
    for (int i = 0; i < DIM; i++) begin weight[i] = '0; pattern[i] = '0; end
  end

  initial begin
    int n;
    @(posedge rst_n);
    clear_req = 1'b1;
    for (int p = 0; p < NPAT; p++) begin
      n = 0;
      while (n < MAPN) begin
        @(negedge clk);
        in_valid = 1'b0;
        if (in_ready) begin
          weight   = wmap[n];
          pattern  = pats[p];
          in_valid = 1'b1;
          n++;
        end
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
  end

  always @(negedge clk) begin
    if (clear_req) begin
      clear_min = 1'b1;
      clear_req = 1'b0;
    end else begin
      clear_min = 1'b0;
    end
  end

  int rp = 0, rn = 0, win = -1;
  logic [DIST_W-1:0] ref_min = '1;
  always @(posedge clk) begin
    if (rst_n && res_valid && !done) begin
      logic e_small;
      checks++;
      if (distance !== exp_d[rp][rn]) begin
        failures++;
        $display("FAIL DIM=%0d pattern %0d neuron %0d distance %0d expected %0d",
                 DIM, rp, rn, distance, exp_d[rp][rn]);
      end
      e_small = exp_d[rp][rn] < ref_min;
      if (e_small) begin ref_min = exp_d[rp][rn]; win = rn; end
      checks++;
      if (is_smaller !== e_small || mindist !== ref_min) begin
        failures++;
        $display("FAIL DIM=%0d pattern %0d neuron %0d compare", DIM, rp, rn);
      end
      rn++;
      if (rn == MAPN) begin
        checks++;
        if (win != exp_win[rp]) begin
          failures++;
          $display("FAIL DIM=%0d pattern %0d winner %0d expected %0d", DIM, rp,
                   win, exp_win[rp]);
        end
        rn = 0;
        rp++;
        ref_min = '1;
        win = -1;
        if (rp == NPAT) begin
          $display("DIM=%0d map=%0d R=%0d units=%0d latency=%0d: %0d scans done",
                   DIM, MAPN, RESTART, NUM_ALU, dut.u_dist.LATENCY, NPAT);
          done = 1'b1;
        end else clear_req = 1'b1;
      end
    end
  end
endmodule
