// lut_sr_shreg: fixed-length shift register of one LUT-SR lane.
//
// Every clock the register shifts in d; q is d delayed by LEN clocks. This is the storage a
// 4-input LUT offers when it is configured as a 16-deep shift register, which is what lets a
// LUT-SR generator hold many more state bits than it has flip-flops. There is deliberately no
// reset and no clock enable: LUT shift registers on FPGAs have no reset, and the generator
// never pauses. Its contents are defined by the generator's load mode, which fills every
// lane before the stream is used.
//
// Interface: clk, d (serial in), q (serial out). Timing: q(t) = d(t - LEN), LEN >= 1.
// LEN is a per-lane length chosen by the generator's construction; its default of 16 is the
// depth of one 4-input LUT used as a shift register, an assumption about the target device.
module lut_sr_shreg #(
  parameter int unsigned LEN = 16
) (
  input  logic clk,
  input  logic d,
  output logic q
);

  if (LEN < 1) begin : g_bad_len
    $error("lut_sr_shreg: LEN must be at least 1");
  end

  logic [LEN-1:0] bits;

  if (LEN == 1) begin : g_one
    always_ff @(posedge clk) bits <= d;
  end else begin : g_many
    always_ff @(posedge clk) bits <= {bits[LEN-2:0], d};
  end

  assign q = bits[LEN-1];

endmodule
