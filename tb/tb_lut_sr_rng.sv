// tb_lut_sr_rng: end-to-end, self-checking bench for the LUT-SR generator at its default size.
//
// The generator runs with its default tuple: 127 state bits, 8 output bits per clock, 4-input
// XOR gates, shift registers up to 16 deep. The checks, shared with the other generator benches,
// are in lut_sr_rng_checks.svh: reset, seeding, linearity, a proof that every output bit has
// period 2^127 - 1 (Berlekamp-Massey and a primitivity test) and bit balance.
module tb_lut_sr_rng;
  localparam int N = 127;  // state bits of the default generator
  localparam int R = 8;    // output bits per clock
  localparam int K = 16;   // deepest lane shift register

`include "lut_sr_rng_checks.svh"

  lut_sr_rng dut (.clk(clk), .rst(rst), .ld(ld), .din(din), .dout(dout));

  initial begin
    @(done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
