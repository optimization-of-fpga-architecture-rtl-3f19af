// tb_lut_sr_shreg: self-checking bench for the lane shift register.
//
// Three instances (lengths 16, 5 and 1) are fed the same random bit stream. The bench keeps
// its own history of the stream and checks every clock that each output equals the input of
// exactly LEN clocks before, once that many bits have gone in.
module tb_lut_sr_shreg;
  localparam int unsigned CYCLES = 400;

  logic clk = 1'b0;
  logic d   = 1'b0;
  logic q16, q5, q1;
  logic [63:0] hist = '0;  // hist[k] = bit shifted in k+1 clocks ago
  int checks = 0, failures = 0;

  lut_sr_shreg             u16 (.clk(clk), .d(d), .q(q16));
  lut_sr_shreg #(.LEN(5))  u5  (.clk(clk), .d(d), .q(q5));
  lut_sr_shreg #(.LEN(1))  u1  (.clk(clk), .d(d), .q(q1));

  always #5 clk = ~clk;

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < CYCLES; n++) begin
      @(posedge clk);
      hist = {hist[62:0], d};
      #1;
      if (n >= 16) check("LEN=16", q16, hist[15]);
      if (n >= 5)  check("LEN=5",  q5,  hist[4]);
      if (n >= 1)  check("LEN=1",  q1,  hist[0]);
      d = 1'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES * 4) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
