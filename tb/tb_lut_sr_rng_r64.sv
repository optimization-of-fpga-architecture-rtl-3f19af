// tb_lut_sr_rng_r64: self-checking bench for a 64-output member of the LUT-SR family.
//
// The generator is built with 64 output bits per clock, as in the 64-lane illustration of the
// method (state bits s0..s63 in flip-flops), and 127 state bits, so the shift registers hold
// only 63 bits in all. The free parameter 912 is the first one that gives a primitive
// characteristic polynomial for this tuple. The checks are the shared ones of
// lut_sr_rng_checks.svh: reset, seeding, linearity, a proof that all 64 output bits have
// period 2^127 - 1, and bit balance.
module tb_lut_sr_rng_r64;
  localparam int N = 127;  // state bits
  localparam int R = 64;   // output bits per clock
  localparam int K = 16;   // maximum lane shift-register length

`include "lut_sr_rng_checks.svh"

  lut_sr_rng #(.N(N), .R(R), .T(4), .K(K), .S(912)) dut (
    .clk(clk), .rst(rst), .ld(ld), .din(din), .dout(dout)
  );

  initial begin
    @(done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
