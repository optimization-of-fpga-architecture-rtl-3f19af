// lut_sr_rng: LUT-SR uniform random number generator, R random bits per clock.
//
// Structure. The generator has R lanes. Lane i holds one output flip-flop ff[i] followed by a
// shift register of LEN[i] bits (0..K), so the whole state is N = R + sum(LEN) bits. Each
// flip-flop is fed by a T-input XOR gate. One XOR input is the "cycle" input: the end of the
// shift register of lane CYC[i]. The CYC map is a single cycle over the lanes, so that,
// ignoring the other XOR inputs, all N state bits form one ring:
// ff -> shift register -> next lane's ff -> ... The remaining T-1 XOR inputs are taps on
// other flip-flop outputs or shift-register ends. The output word is a fixed permutation of
// the flip-flops: dout[i] = ff[OUTP[i]].
//
// Construction. The generator is selected by the tuple (N, R, T, K, S). The four stages run at
// elaboration time in construct():
//   1. initial cycle:   a random single cycle CYC over the R lanes;
//   2. cycle extension: the N-R shift-register bits are dealt one at a time to random lanes
//                       that are still shorter than K, lengthening the ring;
//   3. input taps:      each XOR gate gets T-1 random extra inputs, all distinct signals and
//                       distinct from its cycle input;
//   4. output taps:     a random permutation OUTP of the flip-flops onto dout.
// All random choices come from the lut_sr_pkg source seeded with S. The stage names and the
// five parameters follow the LUT-SR method; the exact random rules above are this design's
// own. Not every S gives a maximal-period generator: the default S = 89 was chosen because,
// for N = 127 (a Mersenne exponent), the resulting recurrence has a primitive characteristic
// polynomial, so the period is 2^127 - 1. The testbench proves this from the output stream.
// Any other tuple must be validated in the same way before use.
//
// Loading (seeding). While ld is high every flip-flop takes din[i] instead of its XOR output,
// and the shift registers keep shifting. Each lane is thus filled serially from its own din
// bit; after K+1 load cycles the whole state is set by the last K+1 din words. This lane-wise
// serial load is this design's choice; the generator's ports (din, ld, rst, clk, dout) follow
// the 8-bit generator block of the reference design.
//
// Reset. rst (synchronous, priority over ld) sets ff to 0...01 and leaves the shift registers
// alone, like LUT shift registers on an FPGA, which have no reset. The state can then never be
// all zero, so the generator always runs, but its stream is only defined after a load.
//
// Timing. dout is the flip-flop state: a new R-bit word every clock, one XOR level deep. A word
// loaded through din appears on dout (permuted) one clock later.
//
// Defaults: R = 8 output bits (the 8-bit generator), T = 4 (the device's 4-input LUTs), K = 16
// (one 4-input LUT used as a shift register); N = 127 and S = 89 are this design's choice.
module lut_sr_rng
  import lut_sr_pkg::*;
#(
  parameter int unsigned N = 127,  // state bits
  parameter int unsigned R = 8,    // output bits per clock
  parameter int unsigned T = 4,    // XOR gate input count
  parameter int unsigned K = 16,   // maximum shift-register length
  parameter int unsigned S = 89    // free parameter selecting the generator
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ld,
  input  logic [R-1:0] din,
  output logic [R-1:0] dout
);

  localparam int unsigned IW = $clog2(2 * R);  // width of a signal index (ff or sr end)
  localparam int unsigned LW = $clog2(K + 1);  // width of a shift-register length
  localparam int unsigned OW = $clog2(R);      // width of a flip-flop index

  // Signal index c: c < R is ff[c], c >= R is the end of lane c-R's shift register.
  typedef struct packed {
    logic [R-1:0][IW-1:0]        cyc;   // cycle input of each XOR (signal index >= R)
    logic [R-1:0][LW-1:0]        len;   // shift-register length of each lane
    logic [R-1:0][T-2:0][IW-1:0] taps;  // extra XOR inputs of each lane
    logic [R-1:0][OW-1:0]        outp;  // flip-flop driving each output bit
  } plan_t;

  // The distinct signal a tap index stands for: a zero-length lane's end is its flip-flop.
  function automatic int unsigned effective(int unsigned c, logic [R-1:0][LW-1:0] len);
    if (c >= R && len[c-R] == '0) return c - R;
    return c;
  endfunction

  function automatic plan_t construct();
    plan_t       p;
    word_t       st;
    int unsigned perm [R];
    int unsigned j, tmp, nfree, pick, got, c, e;
    int unsigned used [T];
    logic        clash;
    p  = '0;
    st = word_t'(S);
    // Stage 1: single cycle over the lanes (Sattolo shuffle).
    for (int unsigned i = 0; i < R; i++) perm[i] = i;
    for (int unsigned i = R - 1; i >= 1; i--) begin
      st = lcg_next(st);
      j = draw_below(st, i);
      tmp = perm[i]; perm[i] = perm[j]; perm[j] = tmp;
    end
    for (int unsigned i = 0; i < R; i++) p.cyc[i] = IW'(R + perm[i]);
    // Stage 2: extend the cycle one shift-register bit at a time.
    for (int unsigned b = 0; b < N - R; b++) begin
      nfree = 0;
      for (int unsigned i = 0; i < R; i++) if (p.len[i] < LW'(K)) nfree++;
      st = lcg_next(st);
      pick = draw_below(st, nfree);
      for (int unsigned i = 0; i < R; i++) begin
        if (p.len[i] < LW'(K)) begin
          if (pick == 0) p.len[i] = p.len[i] + 1'b1;
          pick--;
        end
      end
    end
    // Stage 3: extra XOR inputs, distinct from each other and from the cycle input.
    for (int unsigned i = 0; i < R; i++) begin
      used[0] = effective(R + perm[i], p.len);
      got = 0;
      while (got < T - 1) begin
        st = lcg_next(st);
        c = draw_below(st, 2 * R);
        e = effective(c, p.len);
        clash = 1'b0;
        for (int unsigned u = 0; u <= got; u++) if (used[u] == e) clash = 1'b1;
        if (!clash) begin
          p.taps[i][got] = IW'(c);
          got++;
          used[got] = e;
        end
      end
    end
    // Stage 4: output permutation (Fisher-Yates shuffle).
    for (int unsigned i = 0; i < R; i++) perm[i] = i;
    for (int unsigned i = R - 1; i >= 1; i--) begin
      st = lcg_next(st);
      j = draw_below(st, i + 1);
      tmp = perm[i]; perm[i] = perm[j]; perm[j] = tmp;
    end
    for (int unsigned i = 0; i < R; i++) p.outp[i] = OW'(perm[i]);
    return p;
  endfunction

  if (R < 2 || T < 2 || T > R || N <= R || N - R > R * K) begin : g_bad_tuple
    $error("lut_sr_rng: need 2 <= T <= R, R >= 2 and R < N <= R*(K+1)");
  end

  localparam plan_t PLAN = construct();

  logic [R-1:0]   ff;       // output flip-flops
  logic [R-1:0]   sr_end;   // last bit of each lane's shift register
  logic [R-1:0]   ff_next;  // XOR gate outputs
  logic [2*R-1:0] sig;      // every signal an XOR may tap

  for (genvar i = 0; i < R; i++) begin : g_lane
    localparam int unsigned LEN = int'(PLAN.len[i]);
    if (LEN == 0) begin : g_no_sr
      assign sr_end[i] = ff[i];
    end else begin : g_sr
      lut_sr_shreg #(.LEN(LEN)) u_sr (.clk(clk), .d(ff[i]), .q(sr_end[i]));
    end
  end

  assign sig = {sr_end, ff};

  always_comb begin
    for (int i = 0; i < R; i++) begin
      ff_next[i] = sig[PLAN.cyc[i]];
      for (int k = 0; k < T - 1; k++) ff_next[i] = ff_next[i] ^ sig[PLAN.taps[i][k]];
    end
  end

  always_ff @(posedge clk) begin
    if (rst)     ff <= R'(1);
    else if (ld) ff <= din;
    else         ff <= ff_next;
  end

  always_comb begin
    for (int i = 0; i < R; i++) dout[i] = ff[PLAN.outp[i]];
  end

  // A loaded word shows on dout, through the output permutation, one clock later.
  property p_load_visible;
    logic [R-1:0] w;
    @(posedge clk) (ld && !rst, w = din) |=> (dout == permute(w));
  endproperty
  function automatic logic [R-1:0] permute(logic [R-1:0] w);
    for (int i = 0; i < R; i++) permute[i] = w[PLAN.outp[i]];
  endfunction
  a_load_visible: assert property (p_load_visible);

endmodule
