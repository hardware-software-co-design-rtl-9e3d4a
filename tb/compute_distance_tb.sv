// compute_distance_tb: runs compute_distance in the restart-time / unit-count
// configurations examined for the 9-element distance: R=5 on 13 units (the
// default), R=8 on 8, R=11 on 6, R=21 on 3 and R=3 on 25. Each instance is
// checked by compute_distance_cfg: exact distances, latency, restart time.
// MAX_LAT is the latency reported for that configuration by the scheduling
// study the design follows; the schedule built here must be no slower.
// Pipelining (a new pair entering before the previous result is out) must
// occur in every configuration whose latency exceeds its restart time.
module compute_distance_tb;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NCFG = 5;
  int   c_checks [NCFG];
  int   c_fail   [NCFG];
  int   c_ovl    [NCFG];
  logic c_done   [NCFG];
  int checks, failures;

  compute_distance_cfg #(.RESTART(5),  .NUM_ALU(13), .MAX_LAT(13)) u_r5
    (.clk, .rst_n, .checks(c_checks[0]), .failures(c_fail[0]), .overlaps(c_ovl[0]), .done(c_done[0]));
  compute_distance_cfg #(.RESTART(8),  .NUM_ALU(8),  .MAX_LAT(28)) u_r8
    (.clk, .rst_n, .checks(c_checks[1]), .failures(c_fail[1]), .overlaps(c_ovl[1]), .done(c_done[1]));
  compute_distance_cfg #(.RESTART(11), .NUM_ALU(6),  .MAX_LAT(82)) u_r11
    (.clk, .rst_n, .checks(c_checks[2]), .failures(c_fail[2]), .overlaps(c_ovl[2]), .done(c_done[2]));
  compute_distance_cfg #(.RESTART(21), .NUM_ALU(3),  .MAX_LAT(46)) u_r21
    (.clk, .rst_n, .checks(c_checks[3]), .failures(c_fail[3]), .overlaps(c_ovl[3]), .done(c_done[3]));
  compute_distance_cfg #(.RESTART(3),  .NUM_ALU(25), .MAX_LAT(10)) u_r3
    (.clk, .rst_n, .checks(c_checks[4]), .failures(c_fail[4]), .overlaps(c_ovl[4]), .done(c_done[4]));

  task automatic finish_run(bit timed_out);
    checks = 0;
    failures = timed_out ? 1 : 0;
    for (int i = 0; i < NCFG; i++) begin
      checks   += c_checks[i];
      failures += c_fail[i];
      if (!c_done[i]) failures++;
    end
    // pipelining must have happened where latency > restart time
    checks++;
    if (u_r5.dut.LATENCY > 5 && c_ovl[0] == 0) begin
      failures++;
      $display("FAIL: no overlapping items at R=5");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    finish_run(1'b1);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (c_done[0] && c_done[1] && c_done[2] && c_done[3] && c_done[4]);
    repeat (2) @(posedge clk);
    finish_run(1'b0);
  end
endmodule
