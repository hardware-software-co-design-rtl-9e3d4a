// som_alu_tb: self-checking test of the general processing unit. Random
// operands (plus corner values) for every operation; one-cycle operations
// are checked in their issue cycle, two-cycle ones in the following cycle
// with busy high, against results computed here with plain SystemVerilog
// arithmetic. Operations are issued back to back, so a unit starting right
// after a two-cycle operation is covered too.
module som_alu_tb;
  import som_pkg::*;

  localparam int unsigned W = 37;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  alu_op_e      op = OP_ADD;
  logic [W-1:0] a = '0, b = '0;
  logic [W-1:0] y;
  logic         busy;
  int checks = 0, failures = 0;
  int n_op [5];

  som_alu dut (.*);

  always #5 clk = ~clk;

  function automatic logic [W-1:0] model(alu_op_e o, logic [W-1:0] x,
                                         logic [W-1:0] z);
    logic [2*W-1:0] p;
    case (o)
      OP_ADD: return x + z;
      OP_SUB: return x - z;
      OP_MUL: begin p = x * z; return p[W-1:0]; end
      OP_DIV: return (z == 0) ? '1 : x / z;
      OP_CMP: return W'($signed(x) < $signed(z));
      default: return '0;
    endcase
  endfunction

  function automatic logic [W-1:0] rnd(int sel);
    case (sel % 6)
      0: return '0;
      1: return '1;
      2: return W'($urandom_range(0, 20));
      3: return W'({$urandom, $urandom} >> $urandom_range(0, 40));
      default: return W'({$urandom, $urandom});
    endcase
  endfunction

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      op    = alu_op_e'($urandom_range(0, 4));
      a     = rnd($urandom);
      b     = rnd($urandom);
      start = 1'b1;
      exp   = model(op, a, b);
      n_op[op]++;
      #1;
      if (op_duration(op) == 1) begin
        check($sformatf("%s result", op.name()), y, exp);
      end else begin
        @(negedge clk);
        start = 1'b0;
        #1;
        check($sformatf("%s busy", op.name()), W'(busy), W'(1));
        check($sformatf("%s result", op.name()), y, exp);
      end
    end
    @(negedge clk);
    start = 1'b0;
    #1;
    check("idle not busy", W'(busy), '0);
    for (int o = 0; o < 5; o++) begin
      checks++;
      if (n_op[o] == 0) begin
        failures++;
        $display("FAIL operation %0d never issued", o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
