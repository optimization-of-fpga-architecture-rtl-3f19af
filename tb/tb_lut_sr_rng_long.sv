// tb_lut_sr_rng_long: self-checking bench for a long-period member of the LUT-SR family.
//
// The generator is built with 1279 state bits, 80 output bits per clock, 4-input XOR gates and
// shift registers up to 16 deep, so its period is 2^1279 - 1, beyond the 2^1000 - 1 that
// long-running simulations call for. The free parameter 3427 is the first one found that gives
// a primitive characteristic polynomial for this tuple. The checks are the shared ones of
// lut_sr_rng_checks.svh: reset, seeding, linearity, a proof of the period for all 80 output
// bits, and bit balance. It takes some 20 seconds, nearly all of it in the primitivity test.
module tb_lut_sr_rng_long;
  localparam int N = 1279;  // state bits
  localparam int R = 80;    // output bits per clock
  localparam int K = 16;    // maximum lane shift-register length

`include "lut_sr_rng_checks.svh"

  lut_sr_rng #(.N(N), .R(R), .T(4), .K(K), .S(3427)) dut (
    .clk(clk), .rst(rst), .ld(ld), .din(din), .dout(dout)
  );

  initial begin
    @(done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
