// compute_distance: pipelined squared Euclidean distance of two DIM-element
// vectors, distance = sum_i (a_i - b_i)^2, built from NUM_ALU shared general
// processing units (som_alu) under a fixed modulo schedule with restart time
// RESTART.
//
// How it works. The 3*DIM-1 elementary operations of the distance graph
// (DIM subtractions, DIM squarings, an addition tree; see som_pkg) are
// placed at elaboration time by a modulo list scheduler: each operation in
// graph order gets the earliest start cycle, and the first unit, at which
// its operands are ready and the unit is free in every phase (cycle mod
// RESTART) the operation occupies. A free-running phase counter then replays
// that one schedule for every item, so a new vector pair can enter every
// RESTART cycles while earlier pairs are still in flight (latency LATENCY may
// exceed RESTART). Every operation writes its own result register; a result
// stays readable for RESTART cycles, until the next item's same operation
// overwrites it, and the scheduler only accepts a start cycle at which every
// operand is still held. Elaboration stops with an error if no such schedule
// is found with the given unit count.
//
// Interface and timing. in_ready is high one cycle in every RESTART (phase
// RESTART-1); a pair is taken at that clock edge when in_valid is high and is
// held in the input registers for the next RESTART cycles. out_valid pulses
// exactly LATENCY cycles after the first of those cycles, with `distance` holding
// the result (it stays unchanged for RESTART cycles). Inputs are signed
// DATA_W-bit numbers; `distance` is exact and unsigned.
//
// From the document: the operation graph, the unit types and durations, and
// the default restart time and unit count (R = 5 with 13 units, its fastest
// highlighted solution). This design's own: the scheduler (so LATENCY is not
// the document's number), one result register per operation, the
// valid/ready handshake and the data widths.
module compute_distance
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
  input  logic signed [DATA_W-1:0] a [DIM],
  input  logic signed [DATA_W-1:0] b [DIM],
  output logic                     out_valid,
  output logic [DIST_W-1:0]        distance
);

  localparam int unsigned NEO   = 3 * DIM - 1;   // elementary operations
  localparam int unsigned ALU_W = DIST_W + 1;    // signed differences fit
  localparam int unsigned PH_W  = $clog2(RESTART);
  localparam int unsigned OUT_EO = NEO - 1;

  typedef struct packed {
    logic                  ok;
    logic [15:0]           lat;
    logic [NEO-1:0][15:0]  st;    // start cycle of each operation
    logic [NEO-1:0][15:0]  al;    // unit of each operation
  } sched_t;

  // Modulo list scheduler (elaboration time).
  function automatic sched_t make_schedule();
    sched_t s;
    logic [RESTART-1:0][NUM_ALU-1:0] occ;
    int unsigned earliest, deadline, dur, src, p, fin, t, k, j;
    logic found, free;
    s   = '0;
    occ = '0;
    s.ok = 1'b1;
    for (int unsigned e = 0; e < NEO; e++) begin
      dur      = op_duration(eo_op(DIM, e));
      earliest = 0;
      deadline = 1 << 15;
      for (int unsigned w = 0; w < 2; w++) begin
        src = eo_src(DIM, e, w);
        if (src < 2 * DIM) begin
          // input registers hold the pair for cycles 0..RESTART-1
          if (deadline > RESTART - 1) deadline = RESTART - 1;
        end else begin
          p   = src - 2 * DIM;
          fin = 32'(s.st[p]) + op_duration(eo_op(DIM, p)) - 1;
          if (earliest < fin + 1) earliest = fin + 1;
        end
      end
      // every phase has been tried after RESTART consecutive start cycles
      if (deadline > earliest + RESTART - 1) deadline = earliest + RESTART - 1;
      found = 1'b0;
      for (t = earliest; t <= deadline && !found; t++) begin
        for (k = 0; k < NUM_ALU && !found; k++) begin
          free = 1'b1;
          for (j = 0; j < dur; j++)
            if (occ[(t + j) % RESTART][k]) free = 1'b0;
          if (free) begin
            for (j = 0; j < dur; j++) occ[(t + j) % RESTART][k] = 1'b1;
            s.st[e] = 16'(t);
            s.al[e] = 16'(k);
            found   = 1'b1;
          end
        end
      end
      if (!found) s.ok = 1'b0;
    end
    s.lat = 16'(32'(s.st[OUT_EO]) + op_duration(OP_ADD));
    return s;
  endfunction

  // Last cycle (relative to the item) of operation e.
  function automatic int unsigned fin_of(sched_t s, int unsigned e);
    return 32'(s.st[e]) + op_duration(eo_op(DIM, e)) - 1;
  endfunction

  // Copy of producer p's result that a consumer starting in cycle c reads:
  // copy d holds the value during cycles fin+1+d*RESTART .. fin+(d+1)*RESTART.
  function automatic int unsigned copy_of(sched_t s, int unsigned p,
                                          int unsigned c);
    return (c - fin_of(s, p) - 1) / RESTART;
  endfunction

  // Number of copies operation p must keep for its latest consumer.
  function automatic int unsigned depth_of(sched_t s, int unsigned p);
    int unsigned d = 1;
    for (int unsigned e = 0; e < NEO; e++)
      for (int unsigned w = 0; w < 2; w++)
        if (eo_src(DIM, e, w) == 2 * DIM + p &&
            copy_of(s, p, 32'(s.st[e])) + 1 > d)
          d = copy_of(s, p, 32'(s.st[e])) + 1;
    return d;
  endfunction

  localparam sched_t SCHED = make_schedule();

  // Cycles from the first cycle an input pair is held to out_valid.
  localparam int unsigned LATENCY = int'(SCHED.lat);

  // Elaboration-time checks of the configuration.
  if (RESTART < 2) begin : g_bad_restart
    $error("compute_distance: RESTART must be at least 2 (a mul occupies two cycles)");
  end
  if (SCHED.ok != 1'b1) begin : g_no_schedule
    $error("compute_distance: no schedule with RESTART=%0d and NUM_ALU=%0d",
           RESTART, NUM_ALU);
  end

  // ---------------------------------------------------------------- phase
  logic [PH_W-1:0] ph;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       ph <= '0;
    else if (ph == PH_W'(RESTART - 1)) ph <= '0;
    else                              ph <= ph + 1'b1;
  end

  assign in_ready = (ph == PH_W'(RESTART - 1));
  wire accept = in_valid && in_ready;

  // ------------------------------------------------------- operand values
  logic signed [DATA_W-1:0] a_q [DIM];
  logic signed [DATA_W-1:0] b_q [DIM];
  logic [ALU_W-1:0]         res  [NEO];   // newest result of each operation
  logic [ALU_W-1:0]         opa  [NEO];   // operands as each operation reads them
  logic [ALU_W-1:0]         opb  [NEO];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DIM; i++) begin
        a_q[i] <= '0;
        b_q[i] <= '0;
      end
    end else if (accept) begin
      a_q <= a;
      b_q <= b;
    end
  end

  // -------------------------------------------------------------- units
  logic             alu_start [NUM_ALU];
  alu_op_e          alu_op    [NUM_ALU];
  logic [ALU_W-1:0] alu_a     [NUM_ALU];
  logic [ALU_W-1:0] alu_b     [NUM_ALU];
  logic [ALU_W-1:0] alu_y     [NUM_ALU];

  // Issue: in each phase, every unit runs the operation scheduled there.
  always_comb begin
    for (int k = 0; k < NUM_ALU; k++) begin
      alu_start[k] = 1'b0;
      alu_op[k]    = OP_ADD;
      alu_a[k]     = '0;
      alu_b[k]     = '0;
      for (int e = 0; e < NEO; e++) begin
        if (int'(SCHED.al[e]) == k &&
            ph == PH_W'(int'(SCHED.st[e]) % RESTART)) begin
          alu_start[k] = 1'b1;
          alu_op[k]    = eo_op(DIM, e);
          alu_a[k]     = opa[e];
          alu_b[k]     = opb[e];
        end
      end
    end
  end

  for (genvar k = 0; k < NUM_ALU; k++) begin : g_alu
    som_alu #(.W(ALU_W)) u_alu (
      .clk   (clk),
      .rst_n (rst_n),
      .start (alu_start[k]),
      .op    (alu_op[k]),
      .a     (alu_a[k]),
      .b     (alu_b[k]),
      .y     (alu_y[k]),
      .busy  ()
    );
  end

  // Write-back: an operation's result is loaded into copy 0 in its last
  // cycle; at the same phase every later copy takes over the one before it,
  // so copy d holds the result of the item d restart periods older.
  for (genvar e = 0; e < NEO; e++) begin : g_res
    localparam int unsigned UNIT  = int'(SCHED.al[e]);
    localparam int unsigned LAST  = fin_of(SCHED, e) % RESTART;
    localparam int unsigned DEPTH = depth_of(SCHED, e);
    logic [ALU_W-1:0] q [DEPTH];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int d = 0; d < DEPTH; d++) q[d] <= '0;
      end else if (ph == PH_W'(LAST)) begin
        q[0] <= alu_y[UNIT];
        for (int d = 1; d < DEPTH; d++) q[d] <= q[d-1];
      end
    end
    assign res[e] = q[0];
  end

  // Operand routing: each operation reads its inputs from the input
  // registers or from the copy of the producer's result valid at its start.
  for (genvar e = 0; e < NEO; e++) begin : g_opnd
    for (genvar w = 0; w < 2; w++) begin : g_w
      localparam int unsigned SRC = eo_src(DIM, e, w);
      logic [ALU_W-1:0] v;
      if (SRC < DIM) begin : g_a
        assign v = ALU_W'(a_q[SRC]);                 // sign-extended
      end else if (SRC < 2 * DIM) begin : g_b
        assign v = ALU_W'(b_q[SRC - DIM]);
      end else begin : g_r
        localparam int unsigned P = SRC - 2 * DIM;
        localparam int unsigned C = copy_of(SCHED, P, int'(SCHED.st[e]));
        assign v = g_res[P].q[C];
      end
      if (w == 0) begin : g_0
        assign opa[e] = v;
      end else begin : g_1
        assign opb[e] = v;
      end
    end
  end

  // ------------------------------------------------------------- output
  logic [LATENCY:0] vd;   // vd[c] high in cycle c of an accepted item
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vd <= '0;
    else        vd <= {vd[LATENCY-1:0], accept};
  end

  assign out_valid = vd[LATENCY];
  assign distance      = res[OUT_EO][DIST_W-1:0];

endmodule
