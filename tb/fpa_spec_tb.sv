// fpa_spec_tb: runs both adders of fpa_top (default parameters) through every
// case of the specification partition of normal-operand addition:
//   true addition     Ex-Ey = i for |i| < 53, and Ex-Ey >= 53 or <= -53
//                     (2*53+1 = 107 cases);
//   far subtraction   Ex-Ey = i for 2 <= |i| <= 53, and |Ex-Ey| > 53
//                     (106 cases);
//   close subtraction |Ex-Ey| = 1 with i = 0..52 leading zeros in the exact
//                     mantissa difference, Ex = Ey with i = 1..52 leading zeros
//                     for either operand larger, and the exact zero
//                     (211 cases).
// Operands for each case are built from the case's definition (for the close
// cases from a chosen difference D and a random subtrahend), then classified
// again from the operands alone; a case that is never reached counts as a
// failure. True-addition cases also get operands whose upper sum is all ones,
// so that only the rounding increment carries out. Each case gets K operations spread over the four rounding modes,
// one operation per cycle. Results of both adders are compared with the
// wide-integer reference model, and the three-cycle latency is checked.
module fpa_spec_tb;
  import fpa_pkg::*;
  import fpa_ref_pkg::*;
  import fpa_stim_pkg::*;

  localparam int K      = 24;   // operations per case
  localparam int NCASES = 424;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, sub = 1'b0;
  logic [63:0] x = '0, y = '0;
  logic [1:0] rm = 2'd0;
  logic ov1, ov2, inv1, inv2, of1, of2, uf1, uf2;
  logic [63:0] z1, z2;
  logic [63:0] s2d_out;
  logic [31:0] d2s_out;
  logic d2s_ovf, d2s_unf;
  int checks = 0, failures = 0, cycle = 0;
  int hits [NCASES];

  fpa_top u_top (
    .clk, .rst_n,
    .a1_valid(in_valid), .a1_x(x), .a1_y(y), .a1_sub(sub), .a1_rm(rm),
    .r1_valid(ov1), .r1_z(z1), .r1_invalid(inv1), .r1_overflow(of1), .r1_underflow(uf1),
    .a2_valid(in_valid), .a2_x(x), .a2_y(y), .a2_sub(sub), .a2_rm(rm),
    .r2_valid(ov2), .r2_z(z2), .r2_invalid(inv2), .r2_overflow(of2), .r2_underflow(uf2),
    .s2d_in(32'h0), .s2d_out, .d2s_in(64'h0), .d2s_rm(2'd0), .d2s_out,
    .d2s_overflow(d2s_ovf), .d2s_underflow(d2s_unf));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------------------------------------------------------- cases
  // Position of the most significant set bit of a non-zero value.
  function automatic int msb(longint unsigned v);
    for (int i = 63; i >= 0; i--) if (v[i]) return i;
    return -1;
  endfunction

  // Case number of a pair of normal operands, from the operands alone.
  function automatic int classify(logic [63:0] a, logic [63:0] b, logic s);
    int d, i;
    logic eff_sub;
    longint unsigned ma, mb, dv;
    d  = int'(a[62:52]) - int'(b[62:52]);
    eff_sub = a[63] ^ b[63] ^ s;
    ma = {11'b0, 1'b1, a[51:0]};
    mb = {11'b0, 1'b1, b[51:0]};
    if (!eff_sub) begin
      if (d >= 0 && d < 53)  return d;                 // Ca1[d]
      if (d >= 53)           return 53;                // Ca2
      if (d > -53)           return 54 + (-d - 1);     // Ca3[-d]
      return 106;                                      // Ca4
    end
    if (d >= 2 && d <= 53)   return 107 + d - 2;       // Cs1[d]
    if (d > 53)              return 159;               // Cs2
    if (d <= -2 && d >= -53) return 160 + (-d - 2);    // Cs3[-d]
    if (d < -53)             return 212;               // Cs4
    if (d == 1 || d == -1) begin
      dv = (d == 1) ? 2 * ma - mb : 2 * mb - ma;
      i  = 53 - msb(dv);
      return (d == 1 ? 213 : 266) + i;                 // Cc1[i], Cc2[i]
    end
    if (ma == mb) return 423;                          // exact zero
    dv = (ma > mb) ? ma - mb : mb - ma;
    i  = 52 - msb(dv);
    return (ma > mb ? 319 : 371) + i - 1;              // Cc3[i], Cc4[i]
  endfunction

  function automatic longint unsigned rand64();
    return {$urandom, $urandom};
  endfunction

  // Mantissas (with hidden bit) with k*Mbig - Msmall = D, both in [2^52, 2^53).
  // D is drawn from [dlo, 2*dlo), at its ends now and then; returns 0 when the
  // drawn D admits no pair.
  function automatic bit close_pair(int k, longint unsigned dlo,
                                    output longint unsigned mbig, output longint unsigned msmall);
    longint unsigned dd, lo, hi, one52;
    one52 = 64'd1 << 52;
    case ($urandom % 6)
      0:       dd = dlo;
      1:       dd = 2 * dlo - 1;
      default: dd = dlo + rand64() % dlo;
    endcase
    lo = one52;
    if (k * one52 > dd && k * one52 - dd > lo) lo = k * one52 - dd;
    hi = 2 * one52;
    if (k * 2 * one52 - dd < hi) hi = k * 2 * one52 - dd;
    if (hi <= lo + 2) return 1'b0;
    msmall = lo + rand64() % (hi - lo - 1);
    if ((msmall + dd) % 64'(k) != 0) msmall++;
    mbig = (msmall + dd) / 64'(k);
    return 1'b1;
  endfunction

  // Exponent distance of a "beyond m" case, from dmin on: often 54 with a
  // zero fraction in the smaller operand, where the leading one lands in the
  // round position and the sticky bit must stay 0; otherwise small or large.
  function automatic int far_dist(int dmin, inout logic [51:0] fa, inout logic [51:0] fb);
    case ($urandom % 4)
      0: begin
        fb = '0;
        if ($urandom % 2 != 0) fa = ($urandom % 2 != 0) ? '0 : '1;
        return 54;
      end
      1:       return dmin + int'($urandom % 4);
      default: return dmin + int'($urandom % 900);
    endcase
  endfunction

  // Builds one operand pair for case c (exponents kept inside the normal
  // range so that no operand is special).
  function automatic void make_case(int c, output logic [63:0] a, output logic [63:0] b,
                                    output logic s);
    int d, i, elo;
    logic eff_sub, sa, swap;
    longint unsigned mbig, msmall;
    logic [51:0] fa, fb;
    fa = rand_frac();
    fb = rand_frac();
    swap = 1'b0;
    if (c < 107) begin
      eff_sub = 1'b0;
      if (c < 53)        d = c;
      else if (c == 53)  d = far_dist(53, fa, fb);
      else if (c < 106)  begin d = c - 53; swap = 1'b1; end
      else               begin d = far_dist(53, fa, fb); swap = 1'b1; end
      // now and then an upper sum of all ones (01.11..1), which carries out
      // only when rounding adds one
      if (d >= 1 && d < 53 && $urandom % 3 == 0) begin
        msmall = {12'b1, fb};
        mbig   = ((64'd1 << 53) - 1) - (msmall >> d);
        if (mbig[52]) fa = mbig[51:0];
      end
    end else if (c < 213) begin
      eff_sub = 1'b1;
      if (c < 159)       d = c - 107 + 2;
      else if (c == 159) d = far_dist(54, fa, fb);
      else if (c < 212)  begin d = c - 160 + 2; swap = 1'b1; end
      else               begin d = far_dist(54, fa, fb); swap = 1'b1; end
    end else begin
      eff_sub = 1'b1;
      if (c < 319) begin
        d = 1;
        swap = (c >= 266);
        i = swap ? c - 266 : c - 213;
        while (!close_pair(2, 64'd1 << (53 - i), mbig, msmall)) ;
      end else if (c < 423) begin
        d = 0;
        swap = (c >= 371);
        i = (swap ? c - 371 : c - 319) + 1;
        while (!close_pair(1, 64'd1 << (52 - i), mbig, msmall)) ;
      end else begin
        d = 0;
        mbig = {12'b1, fa};
        msmall = mbig;
      end
      fa = mbig[51:0];
      fb = msmall[51:0];
    end
    elo = 40 + int'($urandom % (1950 - d));
    a = {1'b0, 11'(elo + d), fa};
    b = {1'b0, 11'(elo), fb};
    if (swap) begin
      logic [63:0] t;
      t = a; a = b; b = t;
    end
    sa = 1'($urandom);
    s = 1'($urandom);
    a[63] = sa;
    b[63] = sa ^ s ^ eff_sub;
  endfunction

  // ---------------------------------------------------------------- driver
  typedef struct { logic [63:0] x, y; logic sub; logic [1:0] rm; } stim_t;
  typedef struct { ref_t r; int t; logic [63:0] x, y; logic sub; logic [1:0] rm; } exp_t;
  stim_t stim[$];
  exp_t  q[$];
  logic running = 1'b0;

  always @(posedge clk) begin
    if (running && stim.size() != 0) begin
      stim_t st;
      exp_t e;
      st = stim.pop_front();
      e.r = ref_add(st.x, st.y, st.sub, st.rm);
      e.t = cycle; e.x = st.x; e.y = st.y; e.sub = st.sub; e.rm = st.rm;
      q.push_back(e);
      x <= st.x; y <= st.y; sub <= st.sub; rm <= st.rm; in_valid <= 1'b1;
    end else begin
      in_valid <= 1'b0;
    end
  end

  always @(posedge clk) begin
    if (rst_n && ov1 !== ov2) begin failures++; $display("valid mismatch"); end
    if (rst_n && ov1) begin
      exp_t e;
      logic [66:0] want;
      e = q.pop_front();
      checks += 3;
      if (cycle - e.t != 4) begin  // sampled one edge after the third register
        failures++;
        $display("LATENCY %0d", cycle - e.t);
      end
      want = {e.r.z, e.r.inv, e.r.ovf, e.r.unf};
      if ({z1, inv1, of1, uf1} !== want) begin
        failures++;
        if (failures < 20) $display("FAIL I  x=%h y=%h sub=%0d rm=%0d got %h want %h", e.x, e.y, e.sub, e.rm, z1, e.r.z);
      end
      if ({z2, inv2, of2, uf2} !== want) begin
        failures++;
        if (failures < 20) $display("FAIL II x=%h y=%h sub=%0d rm=%0d got %h want %h", e.x, e.y, e.sub, e.rm, z2, e.r.z);
      end
    end
  end

  initial begin
    #(10 * (NCASES * K + 2000));
    failures++;
    $display("WATCHDOG expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] a, b;
    logic s;
    int c, reached;
    reached = 0;
    foreach (hits[n]) hits[n] = 0;
    for (int n = 0; n < NCASES; n++) begin
      for (int k = 0; k < K; k++) begin
        make_case(n, a, b, s);
        c = classify(a, b, s);
        checks++;
        if (c != n) begin
          failures++;
          $display("CASE %0d built as %0d: %h %h sub=%0d", n, c, a, b, s);
        end
        hits[c]++;
        stim.push_back('{a, b, s, 2'(k)});
      end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    running = 1'b1;
    wait (stim.size() == 0);
    repeat (8) @(posedge clk);
    if (q.size() != 0) begin failures++; $display("results missing: %0d", q.size()); end
    for (int n = 0; n < NCASES; n++) begin
      checks++;
      if (hits[n] == 0) begin failures++; $display("case %0d never reached", n); end
      else reached++;
    end
    $display("cases reached: %0d of %0d", reached, NCASES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
