// som_compare_distance_tb: end-to-end test at the default configuration
// (9-element vectors, restart time 5, 13 units). It runs the winner search
// of a self-organizing map: for each of NPAT training patterns every neuron
// of a 10 x 10 map is sent with the pattern, and the host pulses clear_min
// between scans. Checked against values computed here: every distance, every
// is_smaller flag, mindist, the winning neuron (the last flagged one), the
// accept-to-result latency and, during back-to-back streaming, one result
// every restart period. Counted mechanisms, each of which must occur:
// overlapping items in the pipeline, back-to-back restarts, idle restart
// periods (bubbles), new minimum, no new minimum, clear between scans.
module som_compare_distance_tb;
  localparam int unsigned DIM    = 9;
  localparam int unsigned DATA_W = 16;
  localparam int unsigned R      = 5;
  localparam int unsigned DIST_W = 2 * DATA_W + $clog2(DIM);
  localparam int unsigned MAPX = 10, MAPY = 10, NN = MAPX * MAPY;
  localparam int unsigned NPAT = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                     in_valid = 1'b0;
  logic                     in_ready;
  logic signed [DATA_W-1:0] weight  [DIM];
  logic signed [DATA_W-1:0] pattern [DIM];
  logic                     clear_min = 1'b0;
  logic                     res_valid;
  logic [DIST_W-1:0]        distance;
  logic                     is_smaller;
  logic [DIST_W-1:0]        mindist;

  som_compare_distance dut (.*);

  logic signed [DATA_W-1:0] wmap [NN][DIM];
  logic signed [DATA_W-1:0] pats [NPAT][DIM];
  logic [DIST_W-1:0]        exp_d [NPAT][NN];
  int                       exp_win [NPAT];

  int checks = 0, failures = 0;
  int n_overlap = 0, n_b2b = 0, n_bubble = 0, n_new = 0, n_keep = 0, n_clear = 0;
  longint cyc = 0;
  longint t_acc [$];
  int     in_flight = 0;

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  task automatic report();
    checks++;
    if (n_overlap == 0) fail("pipeline overlap never occurred");
    checks++;
    if (n_b2b == 0) fail("back-to-back restart never occurred");
    checks++;
    if (n_bubble == 0) fail("idle restart period never occurred");
    checks++;
    if (n_new == 0) fail("new minimum never occurred");
    checks++;
    if (n_keep == 0) fail("kept minimum never occurred");
    checks++;
    if (n_clear == 0) fail("clear never occurred");
    $display("overlap=%0d back_to_back=%0d bubbles=%0d new_min=%0d kept=%0d clears=%0d",
             n_overlap, n_b2b, n_bubble, n_new, n_keep, n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    fail("watchdog: simulation did not finish");
    report();
  end

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  // stimulus: map and patterns with a reference winner search
  initial begin
    longint s, best;
    for (int n = 0; n < NN; n++)
      for (int i = 0; i < DIM; i++) wmap[n][i] = DATA_W'($urandom);
    for (int p = 0; p < NPAT; p++) begin
      for (int i = 0; i < DIM; i++) pats[p][i] = DATA_W'($urandom);
      // one pattern equal to a neuron, and one neuron duplicated: ties
      if (p == 1) pats[p] = wmap[37];
      best = -1;
      for (int n = 0; n < NN; n++) begin
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

  // host: send every neuron for each pattern; pattern 2 has idle periods
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < NPAT; p++) begin
      int n;
      n = 0;
      while (n < NN) begin
        @(negedge clk);
        in_valid = 1'b0;
        if (in_ready) begin
          if (p == 2 && $urandom_range(0, 3) == 0) begin
            n_bubble++;
          end else begin
            weight   = wmap[n];
            pattern  = pats[p];
            in_valid = 1'b1;
            n++;
          end
        end
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
  end

  // clear_min in the cycle after the last result of each scan
  initial begin
    @(posedge rst_n);
    clear_req = 1'b1;
  end

  // the pulse itself, requested by the result side
  logic clear_req = 1'b0;
  always @(negedge clk) begin
    if (clear_req) begin
      clear_min = 1'b1;
      clear_req = 1'b0;
      n_clear++;
    end else if (rst_n && n_clear > 0) begin
      clear_min = 1'b0;
    end
  end

  // result side
  int rp = 0, rn = 0, win = -1;
  longint last_res = -1;
  logic [DIST_W-1:0] ref_min = '1;
  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) begin
      t_acc.push_back(cyc);
      in_flight++;
    end
    if (rst_n && res_valid) begin
      longint ta;
      logic   e_small;
      if (in_flight > 1) n_overlap++;
      in_flight--;
      ta = t_acc.pop_front();
      checks++;
      if (cyc - ta != longint'(dut.u_dist.LATENCY) + 2)
        fail($sformatf("latency %0d for item %0d/%0d", cyc - ta, rp, rn));
      if (last_res >= 0 && cyc - last_res == longint'(R) && rp != 2) n_b2b++;
      if (last_res >= 0 && rp != 2 && rn != 0) begin
        checks++;
        if (cyc - last_res != longint'(R))
          fail($sformatf("results %0d cycles apart", cyc - last_res));
      end
      last_res = cyc;
      checks++;
      if (distance !== exp_d[rp][rn])
        fail($sformatf("pattern %0d neuron %0d distance %0d expected %0d",
                       rp, rn, distance, exp_d[rp][rn]));
      e_small = exp_d[rp][rn] < ref_min;
      if (e_small) begin ref_min = exp_d[rp][rn]; win = rn; n_new++; end
      else n_keep++;
      checks++;
      if (is_smaller !== e_small)
        fail($sformatf("pattern %0d neuron %0d is_smaller %0b", rp, rn, is_smaller));
      checks++;
      if (mindist !== ref_min)
        fail($sformatf("pattern %0d neuron %0d mindist %0d expected %0d",
                       rp, rn, mindist, ref_min));
      rn++;
      if (rn == NN) begin
        checks++;
        if (win != exp_win[rp])
          fail($sformatf("pattern %0d winner %0d expected %0d", rp, win, exp_win[rp]));
        $display("pattern %0d: winner %0d distance %0d", rp, win, mindist);
        rn = 0;
        rp++;
        ref_min = '1;
        win = -1;
        if (rp == NPAT) begin
          repeat (2) @(posedge clk);
          report();
        end else begin
          clear_req = 1'b1;
        end
      end
    end
  end
endmodule
