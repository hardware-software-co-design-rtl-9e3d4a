// som_workload_tb: winner searches at the edges of the usual SOM sizes:
// vector length 4 on a 4 x 4 map, the default build (length 9) on a 32 x 32
// map, and vector length 64 on a 32 x 32 map. Length 64 needs a larger ALU
// pool; it is built here with restart time 16 on 20 units. Each run is
// checked by som_scan_run.
module som_workload_tb;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NRUN = 3;
  int   r_checks [NRUN];
  int   r_fail   [NRUN];
  logic r_done   [NRUN];

  som_scan_run #(.DIM(4), .MAPN(16), .NPAT(4)) u_small
    (.clk, .rst_n, .checks(r_checks[0]), .failures(r_fail[0]), .done(r_done[0]));
  som_scan_run #(.DIM(9), .MAPN(1024), .NPAT(2)) u_default
    (.clk, .rst_n, .checks(r_checks[1]), .failures(r_fail[1]), .done(r_done[1]));
  som_scan_run #(.DIM(64), .RESTART(16), .NUM_ALU(20), .MAPN(1024), .NPAT(1)) u_large
    (.clk, .rst_n, .checks(r_checks[2]), .failures(r_fail[2]), .done(r_done[2]));

  task automatic finish_run(bit timed_out);
    int checks, failures;
    checks = 0;
    failures = timed_out ? 1 : 0;
    for (int i = 0; i < NRUN; i++) begin
      checks   += r_checks[i];
      failures += r_fail[i];
      if (!r_done[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    finish_run(1'b1);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (r_done[0] && r_done[1] && r_done[2]);
    repeat (2) @(posedge clk);
    finish_run(1'b0);
  end
endmodule
