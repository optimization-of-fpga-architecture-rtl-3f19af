// lut_sr_rng_checks.svh: body of the self-checking LUT-SR generator benches.
//
// Included inside a bench module after it has declared localparams N (state bits, a Mersenne
// exponent), R (output bits) and K (deepest shift register); the bench then instantiates the
// generator on clk, rst, ld, din and dout. The checks:
//   - reset: one clock of rst leaves exactly one output bit set, also when ld is high too;
//   - load: the output permutation is learnt from one-hot loads, after which every loaded word
//     must show on dout, permuted, one clock later;
//   - seeding depth: K+1 load clocks fix the whole state, so the same seed after different
//     earlier loads gives the same stream;
//   - linearity over GF(2): stream(X xor Y) = stream(X) xor stream(Y), and the zero seed gives
//     an all-zero stream;
//   - period: for every output bit, the Berlekamp-Massey algorithm finds the shortest linear
//     recurrence of its stream; it must have degree N and its characteristic polynomial p must
//     satisfy x^(2^N) = x mod p. As N is prime, p is then irreducible, and as 2^N - 1 is prime,
//     p is primitive: the period is 2^N - 1;
//   - balance: over 4096 clocks each output bit is one between 45% and 55% of the time.
// It counts how often each mechanism (reset, load, free run) happened and fails if one never
// did, then triggers the event done. A watchdog ends the run with a failure after a fixed
// number of clocks.

  localparam int LOADLEN = K + 1;     // clocks needed to fill every lane
  localparam int SEQ     = 2 * N + 16;
  localparam int BAL     = 4096;
  localparam int W       = 2 * N + 2; // width of Berlekamp-Massey polynomials

  typedef logic [R-1:0] word_t;

  logic  clk = 1'b0;
  logic  rst = 1'b0;
  logic  ld  = 1'b0;
  word_t din = '0;
  word_t dout;

  int checks = 0, failures = 0;
  event done;                          // all checks have run; the bench reports and ends
  int n_reset = 0, n_load = 0, n_run = 0;
  int pos [R];                         // dout bit that shows flip-flop loaded from din[j]

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst) n_reset++;
    else if (ld) n_load++;
    else n_run++;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic step();
    @(posedge clk);
    #1;
  endtask

  function automatic word_t permute(word_t w);
    word_t p = '0;
    for (int j = 0; j < R; j++) p[pos[j]] = w[j];
    return p;
  endfunction

  // Load a seed of LOADLEN words, checking each loaded word on dout one clock later.
  task automatic load_seed(input word_t seed [LOADLEN]);
    ld = 1'b1;
    for (int n = 0; n < LOADLEN; n++) begin
      din = seed[n];
      step();
      check($sformatf("load word %0d visible", n), dout == permute(seed[n]));
    end
    ld  = 1'b0;
    din = '0;
  endtask

  task automatic load_junk(input int words);
    ld = 1'b1;
    repeat (words) begin
      din = word_t'($urandom);
      step();
    end
    ld = 1'b0;
  endtask

  // Record the stream, starting with the last loaded word.
  task automatic run(output word_t out [SEQ]);
    for (int n = 0; n < SEQ; n++) begin
      out[n] = dout;
      step();
    end
  endtask

  // Berlekamp-Massey over GF(2): shortest recurrence of bit b of the stream.
  task automatic berlekamp_massey(input word_t out [SEQ], input int b,
                                  output int len, output logic [W-1:0] c);
    logic [W-1:0] bb, t;
    int m;
    logic d;
    c = W'(1); bb = W'(1); len = 0; m = 1;
    for (int n = 0; n < SEQ; n++) begin
      d = out[n][b];
      for (int i = 1; i <= len; i++) d ^= c[i] & out[n-i][b];
      if (!d) m++;
      else if (2 * len <= n) begin
        t = c; c ^= bb << m; len = n + 1 - len; bb = t; m = 1;
      end else begin
        c ^= bb << m; m++;
      end
    end
  endtask

  function automatic logic [N-1:0] mulmod(logic [N-1:0] a, logic [N-1:0] b, logic [N:0] p);
    logic [N:0]   aa = {1'b0, a};
    logic [N-1:0] r  = '0;
    for (int i = 0; i < N; i++) begin
      if (b[i]) r ^= aa[N-1:0];
      aa = aa << 1;
      if (aa[N]) aa ^= p;
    end
    return r;
  endfunction

  word_t seed_x [LOADLEN], seed_y [LOADLEN], seed_xy [LOADLEN], seed_0 [LOADLEN];
  word_t out_x [SEQ], out_x2 [SEQ], out_y [SEQ], out_xy [SEQ], out_0 [SEQ];

  initial begin : main
    int seen [R];
    int len;
    logic [W-1:0] c;
    logic [N:0] p;
    logic [N-1:0] x;
    int ones [R];
    bit same;

    // Reset, alone and together with a load.
    rst = 1'b1;
    step();
    rst = 1'b0;
    check("reset leaves one bit set", $countones(dout) == 1);
    rst = 1'b1; ld = 1'b1; din = '1;
    step();
    rst = 1'b0; ld = 1'b0; din = '0;
    check("reset wins over load", $countones(dout) == 1);

    // Learn the output permutation from one-hot loads.
    foreach (seen[j]) seen[j] = 0;
    ld = 1'b1;
    for (int j = 0; j < R; j++) begin
      din = word_t'(1) << j;
      step();
      check($sformatf("one-hot load %0d", j), $countones(dout) == 1);
      pos[j] = 0;
      for (int i = 0; i < R; i++) if (dout[i]) pos[j] = i;
      seen[pos[j]]++;
    end
    ld = 1'b0;
    for (int i = 0; i < R; i++) check($sformatf("output bit %0d driven once", i), seen[i] == 1);

    foreach (seed_x[n]) begin
      seed_x[n]  = word_t'($urandom);
      seed_y[n]  = word_t'($urandom);
      seed_xy[n] = seed_x[n] ^ seed_y[n];
      seed_0[n]  = '0;
    end

    // The same seed after different earlier loads gives the same stream.
    load_junk(10);  load_seed(seed_x); run(out_x);
    load_junk(25);  load_seed(seed_x); run(out_x2);
    same = 1'b1;
    foreach (out_x[n]) if (out_x[n] != out_x2[n]) same = 1'b0;
    check($sformatf("%0d load clocks fix the state", LOADLEN), same);

    // Linearity and the zero state.
    load_junk(3);  load_seed(seed_y);  run(out_y);
    load_junk(7);  load_seed(seed_xy); run(out_xy);
    foreach (out_x[n]) check($sformatf("linearity word %0d", n),
                             out_xy[n] == (out_x[n] ^ out_y[n]));
    load_junk(5);  load_seed(seed_0);  run(out_0);
    same = 1'b1;
    foreach (out_0[n]) if (out_0[n] != '0) same = 1'b0;
    check("zero seed gives zero stream", same);
    check("non-zero seed gives non-zero stream", out_x[SEQ-1] != '0 || out_x[SEQ-2] != '0);

    // Period 2^N - 1 for every output bit.
    for (int b = 0; b < R; b++) begin
      berlekamp_massey(out_x, b, len, c);
      check($sformatf("bit %0d linear complexity %0d == %0d", b, len, N), len == N);
      for (int i = 0; i <= N; i++) p[i] = c[N-i];
      check($sformatf("bit %0d recurrence has degree %0d", b, N), p[N] && p[0]);
      x = N'(2);
      for (int i = 0; i < N; i++) x = mulmod(x, x, p);
      check($sformatf("bit %0d polynomial primitive", b), x == N'(2));
    end

    // Balance of every output bit over a longer run.
    load_seed(seed_y);
    foreach (ones[b]) ones[b] = 0;
    repeat (BAL) begin
      for (int b = 0; b < R; b++) ones[b] += int'(dout[b]);
      step();
    end
    for (int b = 0; b < R; b++)
      check($sformatf("bit %0d balance %0d/%0d", b, ones[b], BAL),
            ones[b] > BAL * 45 / 100 && ones[b] < BAL * 55 / 100);

    $display("mechanisms: reset=%0d load=%0d run=%0d", n_reset, n_load, n_run);
    check("reset happened", n_reset > 0);
    check("load happened",  n_load > 0);
    check("free run happened", n_run > 0);
    -> done;
  end

  initial begin
    repeat (10 * SEQ + 2 * BAL) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
