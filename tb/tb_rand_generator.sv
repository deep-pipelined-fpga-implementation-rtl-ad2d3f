// tb_rand_generator: checks the LFSR against an independent bit-level
// model: two shifts per clock, feedback from bits 31, 21, 1 and 0, rand1 =
// bits 31..0 and rand2 = bits 32..1 of the 33-bit register.
module tb_rand_generator;
  localparam logic [32:0] SEED = 33'h1_8765_4321;
  logic clk = 0, rst_n = 0;
  logic [31:0] rand1, rand2;
  int checks = 0, failures = 0;

  rand_generator #(.SEED(SEED)) dut (.clk, .rst_n, .rand1, .rand2);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit model [33];
  initial begin
    bit fb;
    bit [32:0] mv;
    int distinct_changes = 0;
    logic [31:0] prev;
    for (int k = 0; k < 33; k++) model[k] = SEED[k];
    repeat (2) @(posedge clk);
    #1;
    // held at the seed while in reset
    checks++;
    if (rand1 !== SEED[31:0] || rand2 !== SEED[32:1]) begin
      failures++; $display("reset value wrong %h %h", rand1, rand2);
    end
    rst_n = 1;
    prev = rand1;
    for (int c = 0; c < 1000; c++) begin
      @(posedge clk); #1;
      for (int s = 0; s < 2; s++) begin
        fb = model[31] ^ model[21] ^ model[1] ^ model[0];
        for (int k = 32; k > 0; k--) model[k] = model[k-1];
        model[0] = fb;
      end
      for (int k = 0; k < 33; k++) mv[k] = model[k];
      checks++;
      if (rand1 !== mv[31:0] || rand2 !== mv[32:1]) begin
        failures++;
        if (failures < 5) $display("cycle %0d: got %h/%h want %h/%h", c, rand1, rand2, mv[31:0], mv[32:1]);
      end
      if (rand1 != prev) distinct_changes++;
      prev = rand1;
    end
    checks++;
    if (distinct_changes < 990) begin failures++; $display("output stuck"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
