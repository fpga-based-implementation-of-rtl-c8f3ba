// tb_tile_mantissa_mul - self-checking testbench of the tiled significand
// multiplier.
//
// Streams random 53-bit significand pairs (hidden bit set, and fully random
// ones) plus all-ones and single-bit corners into the pipeline, one per
// clock, while enable is randomly dropped. A reference pipeline of five
// entries, advanced only on enabled edges, holds the exact products
// computed with the 106-bit '*' operator; the DUT's product must match the
// reference on every clock, which checks both the value and the latency of
// five enabled clock edges. A separate directed test feeds one pair into an
// idle pipeline and checks that it appears after exactly five edges.
// Watchdog as in the other testbenches.
module tb_tile_mantissa_mul;

  localparam int unsigned LAT = 5;

  logic         clk = 0, rst = 1, enable = 0;
  logic [52:0]  mul_a = '0, mul_b = '0;
  logic [105:0] product;
  logic [105:0] ref_pipe [LAT];
  int checks = 0, failures = 0, stalls = 0;

  tile_mantissa_mul dut (.clk(clk), .rst(rst), .enable(enable),
                         .mul_a(mul_a), .mul_b(mul_b), .product(product));

  always #5 clk = ~clk;

  // Reference pipeline, updated on the same edges as the DUT.
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < LAT; i++) ref_pipe[i] <= '0;
    end else if (enable) begin
      ref_pipe[0] <= 106'(mul_a) * 106'(mul_b);
      for (int i = 1; i < LAT; i++) ref_pipe[i] <= ref_pipe[i-1];
    end
  end

  task automatic drive_random();
    case ($urandom_range(0, 5))
      0: begin mul_a = '1; mul_b = '1; end
      1: begin mul_a = 53'(1) << $urandom_range(0, 52); mul_b = 53'(1) << $urandom_range(0, 52); end
      2: begin mul_a = {21'($urandom), $urandom}; mul_b = {21'($urandom), $urandom}; end
      default: begin mul_a = {1'b1, 20'($urandom), $urandom}; mul_b = {1'b1, 20'($urandom), $urandom}; end
    endcase
  endtask

  initial begin
    int lat;
    repeat (3) @(posedge clk);
    #1 rst = 0; enable = 1;
    // Directed latency test: one pair into a pipeline of zeros.
    mul_a = {1'b1, 52'hC000000000000}; mul_b = {1'b1, 52'h3800000000000};
    @(posedge clk); #1;
    mul_a = '0; mul_b = '0;
    lat = 1;
    while (product == '0 && lat < 20) begin @(posedge clk); #1; lat++; end
    checks++;
    if (lat != LAT || product != 106'(53'h1C000000000000) * 106'(53'h13800000000000)) begin
      failures++;
      $display("FAIL latency %0d (expected %0d), product %h", lat, LAT, product);
    end
    // Random stream with stalls.
    for (int i = 0; i < 4000; i++) begin
      drive_random();
      enable = ($urandom_range(0, 7) != 0);
      if (!enable) stalls++;
      @(posedge clk); #1;
      checks++;
      if (product !== ref_pipe[LAT-1]) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: got %h expected %h", i, product, ref_pipe[LAT-1]);
      end
    end
    if (stalls == 0) begin failures++; $display("FAIL no stall exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
