// min_compare_tb: feeds random distance streams with idle cycles, periodic
// clears (some in the same cycle as a distance) and ties, and checks
// is_smaller, out_valid and mindist one cycle later against a reference
// minimum kept here.
module min_compare_tb;
  localparam int unsigned DIST_W = 36;
  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              clear = 1'b0;
  logic              in_valid = 1'b0;
  logic [DIST_W-1:0] distance = '0;
  logic              out_valid;
  logic              is_smaller;
  logic [DIST_W-1:0] mindist;
  int checks = 0, failures = 0;
  int n_smaller = 0, n_not = 0, n_clear = 0, n_tie = 0;

  min_compare dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [DIST_W-1:0] got,
                       logic [DIST_W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    logic [DIST_W-1:0] ref_min;
    logic              exp_small, exp_valid;
    ref_min = '1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      clear    = ($urandom_range(0, 40) == 0);
      in_valid = ($urandom_range(0, 3) != 0);
      case ($urandom_range(0, 3))
        0:       distance = ref_min;                    // tie
        1:       distance = DIST_W'($urandom_range(0, 1000));
        default: distance = DIST_W'({$urandom, $urandom});
      endcase
      if (clear) begin ref_min = '1; n_clear++; end
      exp_valid = in_valid;
      exp_small = in_valid && (distance < ref_min);
      if (in_valid && distance == ref_min) n_tie++;
      if (exp_small) ref_min = distance;
      if (exp_small) n_smaller++;
      else if (in_valid) n_not++;
      @(posedge clk);
      #1;
      check("out_valid", DIST_W'(out_valid), DIST_W'(exp_valid));
      check("is_smaller", DIST_W'(is_smaller), DIST_W'(exp_small));
      check("mindist", mindist, ref_min);
    end
    checks++;
    if (n_smaller == 0 || n_not == 0 || n_clear == 0 || n_tie == 0) begin
      failures++;
      $display("FAIL: a case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
