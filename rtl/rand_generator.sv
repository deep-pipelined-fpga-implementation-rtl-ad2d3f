// rand_generator: linear feedback shift register giving two 32-bit random
// words every clock.
//
// The register is 33 bits long (x^32 is added to a 32-bit LFSR).  Feedback
// is the XOR of bits 31, 21, 1 and 0 (characteristic polynomial
// x^31 + x^21 + x + 1) and the register shifts by two bits per clock.
// rand1 is bits 31..0 and rand2 bits 32..1 of the register.  The tap set,
// the two outputs and the two-bit shift follow the architecture; the shift
// direction (towards the MSB, feedback entering at bit 0) and the seed
// parameter are this design's choices.  The seed's low 32 bits must not be
// all zero.
//
// Timing: outputs are registered and change every clock after reset.
module rand_generator #(
  parameter logic [32:0] SEED = 33'h0_1234_5678
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [31:0] rand1,
  output logic [31:0] rand2
);

  logic [32:0] sr;

  function automatic logic [32:0] step(input logic [32:0] s);
    logic fb;
    fb = s[31] ^ s[21] ^ s[1] ^ s[0];
    return {s[31:0], fb};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr <= SEED;
    else        sr <= step(step(sr));
  end

  assign rand1 = sr[31:0];
  assign rand2 = sr[32:1];

endmodule
