// tb_mult - end-to-end self-checking testbench of the double precision
// multiplier, at its default (and only) size.
//
// A reference model in this file computes every expected result from the
// operand bit fields alone: the exact 106-bit significand product with the
// '*' operator, normalization by the leading one, truncation, and the
// exponent rules (final exponent <= 0: +-0 and underflow; >= 2047: +-Inf
// and overflow; zero operand: +-0; denormal operand: +-0 and underflow;
// Inf/NaN operand: +-Inf and overflow). For normal results it is further
// cross-checked against the simulator's own double arithmetic: the
// truncated result must equal the correctly rounded product or lie one
// unit in the last place below it in magnitude.
//
// The run resets the pipeline, checks the worked example 99 * -9.75 =
// -965.25 and its latency of exactly seven clock cycles, then streams
// directed and random operand pairs one per clock while enable is dropped
// at random. A reference pipeline of seven entries, advanced only on
// enabled edges, holds the expected outputs, so every clock checks value,
// flags and latency at once. A reset in mid-stream follows. Each mechanism
// (normalization shift or none, overflow by exponent sum, overflow caused
// by normalization, uncompensated underflow, intermediate exponent 0
// repaired by normalization, zero/denormal/Inf operands, truncation that
// drops a non-zero remainder, a stall, a reset) is counted, and one never
// seen is a failure.
module tb_mult;

  localparam int unsigned LAT = 7;

  typedef struct packed {
    logic [63:0] fp;
    logic        ovf;
    logic        unf;
  } res_t;

  // Mechanisms counted at the operand side.
  typedef enum int {
    EV_SHIFT, EV_NOSHIFT, EV_OVF_SUM, EV_OVF_NORM, EV_UNF_NEG, EV_ZERO_REPAIRED,
    EV_ZERO_UNF, EV_ZERO_OP, EV_DENORM_OP, EV_INF_OP, EV_INEXACT, EV_STALL,
    EV_RESET, EV_COUNT
  } event_e;

  logic        clk = 0, rst = 1, enable = 0;
  logic [63:0] a = '0, b = '0;
  logic [63:0] fpout;
  logic        overflow, underflow;
  res_t        ref_pipe [LAT];
  int          checks = 0, failures = 0;
  int          events [EV_COUNT];
  int          real_checks = 0;

  mult dut (.clk(clk), .rst(rst), .enable(enable), .a(a), .b(b),
            .fpout(fpout), .overflow(overflow), .underflow(underflow));

  always #5 clk = ~clk;

  // Reference result of a * b, and the mechanism it exercises.
  function automatic res_t ref_mul(input logic [63:0] x, input logic [63:0] y,
                                   output event_e ev, output logic inexact);
    res_t         r;
    logic         s;
    logic [10:0]  ex, ey;
    logic [105:0] p;
    int           e;
    logic [51:0]  f;
    s  = x[63] ^ y[63];
    ex = x[62:52];
    ey = y[62:52];
    inexact = 1'b0;
    r.ovf = 1'b0;
    r.unf = 1'b0;
    if (ex == 11'h7FF || ey == 11'h7FF) begin
      r.fp = {s, 11'h7FF, 52'd0}; r.ovf = 1'b1; ev = EV_INF_OP;
      return r;
    end
    if ((ex == 0 && x[51:0] != 0) || (ey == 0 && y[51:0] != 0)) begin
      r.fp = {s, 63'd0}; r.unf = 1'b1; ev = EV_DENORM_OP;
      return r;
    end
    if (ex == 0 || ey == 0) begin
      r.fp = {s, 63'd0}; ev = EV_ZERO_OP;
      return r;
    end
    p = 106'({1'b1, x[51:0]}) * 106'({1'b1, y[51:0]});
    e = int'(ex) + int'(ey) - 1023;
    if (p[105]) begin
      f = p[104:53]; inexact = (p[52:0] != 0); e = e + 1; ev = EV_SHIFT;
    end else begin
      f = p[103:52]; inexact = (p[51:0] != 0); ev = EV_NOSHIFT;
    end
    if (e <= 0) begin
      r.fp = {s, 63'd0}; r.unf = 1'b1;
      ev = (e == 0 && !p[105]) ? EV_ZERO_UNF : EV_UNF_NEG;
    end else if (e >= 2047) begin
      r.fp = {s, 11'h7FF, 52'd0}; r.ovf = 1'b1;
      ev = (e == 2047 && p[105]) ? EV_OVF_NORM : EV_OVF_SUM;
    end else begin
      r.fp = {s, 11'(e), f};
      if (e == 1 && p[105] && int'(ex) + int'(ey) == 1023) ev = EV_ZERO_REPAIRED;
    end
    return r;
  endfunction

  // Cross-check of a normal result against double arithmetic.
  function automatic bit real_agrees(input logic [63:0] x, input logic [63:0] y,
                                     input logic [63:0] got);
    logic [63:0] rn;
    rn = $realtobits($bitstoreal(x) * $bitstoreal(y));
    return (got == rn) || (got == rn - 64'd1);
  endfunction

  // Reference pipeline, updated on the same edges as the DUT.
  always_ff @(posedge clk) begin
    event_e ev;
    logic   inx;
    if (rst) begin
      for (int i = 0; i < LAT; i++) ref_pipe[i] <= '0;
    end else if (enable) begin
      ref_pipe[0] <= ref_mul(a, b, ev, inx);
      for (int i = 1; i < LAT; i++) ref_pipe[i] <= ref_pipe[i-1];
    end
  end

  task automatic note(input logic [63:0] x, input logic [63:0] y);
    event_e ev;
    logic   inx;
    res_t   r;
    r = ref_mul(x, y, ev, inx);
    events[ev]++;
    if (inx && r.fp[62:52] != 0 && r.fp[62:52] != 11'h7FF) events[EV_INEXACT]++;
  endtask

  function automatic logic [63:0] mk(input logic s, input int e, input logic [51:0] f);
    return {s, 11'(e), f};
  endfunction

  function automatic logic [51:0] rfrac();
    return {20'($urandom), $urandom};
  endfunction

  // A random operand pair aimed at one region of the result exponent.
  task automatic pick(output logic [63:0] x, output logic [63:0] y);
    int ea, eb, target;
    case ($urandom_range(0, 11))
      0: target = int'($urandom_range(0, 6)) - 3;          // around 0
      1: target = int'($urandom_range(2043, 2050));        // around 2046
      2: begin x = {1'($urandom), 63'd0}; y = mk(1'($urandom), $urandom_range(1, 2046), rfrac()); return; end
      3: begin x = mk(1'($urandom), 0, rfrac() | 52'd1); y = mk(1'($urandom), $urandom_range(1, 2046), rfrac()); return; end
      4: begin x = mk(1'($urandom), $urandom_range(1, 2046), rfrac()); y = mk(1'($urandom), 2047, rfrac()); return; end
      5: begin x = {$urandom, $urandom}; y = {$urandom, $urandom}; return; end
      6: target = int'($urandom_range(0, 4092)) - 1021;
      default: target = int'($urandom_range(1, 2046));
    endcase
    ea = int'($urandom_range(1, 2046));
    eb = target + 1023 - ea;
    if (eb < 1) begin ea = ea + 1 - eb; eb = 1; end
    if (eb > 2046) begin ea = ea - (eb - 2046); eb = 2046; end
    if (ea < 1) ea = 1;
    if (ea > 2046) ea = 2046;
    x = mk(1'($urandom), ea, rfrac());
    y = mk(1'($urandom), eb, rfrac());
  endtask

  task automatic compare(input string where);
    checks++;
    if (fpout !== ref_pipe[LAT-1].fp || overflow !== ref_pipe[LAT-1].ovf ||
        underflow !== ref_pipe[LAT-1].unf) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: got %h o%b u%b expected %h o%b u%b", where, fpout, overflow,
                 underflow, ref_pipe[LAT-1].fp, ref_pipe[LAT-1].ovf, ref_pipe[LAT-1].unf);
    end
  endtask

  // Operands at the pipeline input, kept to cross-check results with reals.
  logic [127:0] op_pipe [LAT];
  always_ff @(posedge clk) begin
    if (enable) begin
      op_pipe[0] <= {a, b};
      for (int i = 1; i < LAT; i++) op_pipe[i] <= op_pipe[i-1];
    end
  end

  initial begin
    int lat;
    logic [63:0] x, y;
    for (int i = 0; i < EV_COUNT; i++) events[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0; enable = 1;
    events[EV_RESET]++;

    // Worked example: 99 * -9.75 = -965.25, latency of seven cycles.
    a = 64'h4058C00000000000; b = 64'hC023800000000000;
    note(a, b);
    @(posedge clk); #1;
    a = '0; b = '0;
    lat = 1;
    while (fpout == '0 && lat < 20) begin @(posedge clk); #1; lat++; end
    checks++;
    if (lat != LAT || fpout != 64'hC08E2A0000000000 || overflow || underflow) begin
      failures++;
      $display("FAIL example: latency %0d fpout %h o%b u%b", lat, fpout, overflow, underflow);
    end
    repeat (LAT) @(posedge clk);
    #1;

    // Directed corner pairs, then a random stream, with stalls.
    for (int i = 0; i < 100000; i++) begin
      case (i)
        0: begin x = 64'h3FF0000000000000; y = 64'h3FF0000000000000; end     // 1 * 1
        1: begin x = 64'h7FEFFFFFFFFFFFFF; y = 64'h4000000000000000; end     // max * 2
        2: begin x = 64'h7FEFFFFFFFFFFFFF; y = 64'h3FFFFFFFFFFFFFFF; end     // 2046 + shift
        3: begin x = 64'h0010000000000000; y = 64'h3FE0000000000000; end     // min / 2
        4: begin x = 64'h1FF8000000000000; y = 64'h2008000000000000; end     // exp 0 repaired
        5: begin x = 64'h1FF0000000000000; y = 64'h2000000000000000; end     // exp 0, no repair
        6: begin x = 64'h3FFFFFFFFFFFFFFF; y = 64'h3FFFFFFFFFFFFFFF; end     // all ones
        7: begin x = 64'h3FF0000000000001; y = 64'h3FF0000000000001; end     // tiny remainder
        default: pick(x, y);
      endcase
      a = x; b = y;
      enable = (i < 8) || ($urandom_range(0, 9) != 0);
      if (enable) note(x, y); else events[EV_STALL]++;
      @(posedge clk); #1;
      compare("stream");
      if (enable && ref_pipe[LAT-1].fp[62:52] != 0 && ref_pipe[LAT-1].fp[62:52] != 11'h7FF) begin
        real_checks++;
        checks++;
        if (!real_agrees(op_pipe[LAT-1][127:64], op_pipe[LAT-1][63:0], fpout)) begin
          failures++;
          if (failures < 10)
            $display("FAIL real cross-check %h * %h -> %h", op_pipe[LAT-1][127:64],
                     op_pipe[LAT-1][63:0], fpout);
        end
      end
    end

    // Reset with operations in flight: the pipeline must empty.
    rst = 1;
    @(posedge clk); #1;
    rst = 0;
    events[EV_RESET]++;
    a = '0; b = '0;
    for (int i = 0; i < LAT + 2; i++) begin
      compare("after reset");
      @(posedge clk); #1;
    end

    for (int i = 0; i < EV_COUNT; i++) begin
      $display("event %s: %0d", event_e'(i), events[i]);
      checks++;
      if (events[i] == 0) begin
        failures++;
        $display("FAIL mechanism %s never exercised", event_e'(i));
      end
    end
    $display("real-arithmetic cross-checks: %0d", real_checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
