// fpa_top_tb: end-to-end testbench of the whole design at its default
// (double-precision) parameters. Adder I and adder II receive the same stream
// of one operation per cycle (directed corner cases, then random operand
// pairs in all rounding modes); their results are checked against the
// wide-integer reference model with a three-cycle latency. The converters are
// checked in the same cycles: single to double against a value rebuilt with
// real arithmetic, double to single by choosing between the two neighbouring
// singles of the input in each rounding mode.
// Each mechanism of the adder is counted and must occur at least once: right
// shift by one, no shift, left shift by one, massive left shift with and
// without the LZA fine adjust, the rounding carry out of A+C+1, the sticky bit
// at an exponent difference of 54, the ones complementer (adder I) and the
// comparator swap (adder II), overflow, underflow, exact zero, invalid and NaN,
// and for the converters a denormal single, a rounded double and an overflow.
module fpa_top_tb;
  import fpa_ref_pkg::*;
  import fpa_stim_pkg::*;

  localparam int NRAND = 30000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, sub = 1'b0;
  logic [63:0] x = '0, y = '0;
  logic [1:0] rm = '0;
  logic ov1, ov2, inv1, inv2, of1, of2, uf1, uf2;
  logic [63:0] z1, z2;
  logic [31:0] s2d_in = '0, d2s_out;
  logic [63:0] s2d_out, d2s_in = '0;
  logic [1:0]  d2s_rm = '0;
  logic        d2s_ovf, d2s_unf;
  int checks = 0, failures = 0, cycle = 0;

  fpa_top u_top (
    .clk, .rst_n,
    .a1_valid(in_valid), .a1_x(x), .a1_y(y), .a1_sub(sub), .a1_rm(rm),
    .r1_valid(ov1), .r1_z(z1), .r1_invalid(inv1), .r1_overflow(of1), .r1_underflow(uf1),
    .a2_valid(in_valid), .a2_x(x), .a2_y(y), .a2_sub(sub), .a2_rm(rm),
    .r2_valid(ov2), .r2_z(z2), .r2_invalid(inv2), .r2_overflow(of2), .r2_underflow(uf2),
    .s2d_in, .s2d_out, .d2s_in, .d2s_rm, .d2s_out, .d2s_overflow(d2s_ovf), .d2s_underflow(d2s_unf));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  typedef enum int { M_R1, M_NONE, M_L1, M_MASSIVE, M_FINEADJ, M_RC, M_STICKY54, M_ONESC,
                     M_CMPSWAP, M_OVF, M_UNF, M_ZERO, M_INV, M_NAN, M_S2D_DEN, M_D2S_RND,
                     M_D2S_OVF, M_NUM } mech_e;
  int cnt[M_NUM];
  string mname[M_NUM] = '{"right_shift", "no_shift", "left_shift_1", "massive_left_shift",
    "lza_fine_adjust", "rounding_carry", "sticky_at_54", "ones_complement", "compare_swap",
    "overflow", "underflow", "exact_zero", "invalid", "nan", "s2d_denormal", "d2s_rounded",
    "d2s_overflow"};

  typedef struct { ref_t r; int t; logic [63:0] x, y; logic sub; logic [1:0] rm; } exp_t;
  typedef struct { logic [63:0] x, y; logic sub; logic [1:0] rm; } stim_t;
  exp_t  q[$];
  stim_t stim[$];
  logic  running = 1'b0;

  function automatic void send(logic [63:0] a, logic [63:0] b, logic s, logic [1:0] m);
    stim.push_back('{a, b, s, m});
  endfunction

  // value of a single-precision encoding, built with real arithmetic
  function automatic real pow2(int k);
    real p = 1.0;
    if (k >= 0) for (int i = 0; i < k; i++) p = p * 2.0;
    else        for (int i = 0; i < -k; i++) p = p / 2.0;
    return p;
  endfunction

  function automatic real sval(logic [31:0] v);
    real m;
    if (v[30:23] == 0) m = real'(v[22:0]) * pow2(-149);
    else               m = real'({1'b1, v[22:0]}) * pow2(int'(v[30:23]) - 150);
    return v[31] ? -m : m;
  endfunction

  // expected double-to-single result: pick between the neighbours below and
  // above |d| (normal single range only; other inputs are checked by class)
  task automatic check_d2s(logic [63:0] d, logic [1:0] m, logic [31:0] got, logic ovf);
    logic [31:0] t, u, want;
    real v, rt, ru;
    int es;
    logic up;
    es = int'(d[62:52]) - 896;
    if (d[62:52] == 0 || d[62:52] == 11'h7FF || es <= 0) return;
    t = {1'b0, 8'(es), d[51:29]};
    u = t + 1;
    v  = $bitstoreal({1'b0, d[62:0]});
    rt = sval(t);
    ru = sval(u);   // for exponent field 255 this is 2^128, the overflow point
    if (v == rt) up = 0;
    else case (m)
      2'd0: up = (v - rt > ru - v) || (v - rt == ru - v && t[0]);
      2'd1: up = 0;
      2'd2: up = !d[63];
      default: up = d[63];
    endcase
    want = up ? u : t;
    if (v != rt) cnt[M_D2S_RND]++;
    checks++;
    if (want[30:23] == 8'hFF || (es >= 255)) begin
      cnt[M_D2S_OVF]++;
      if (!ovf) begin failures++; $display("D2S overflow missed %h", d); end
      return;
    end
    want[31] = d[63];
    if (got != want || ovf) begin
      failures++;
      $display("D2S FAIL d=%h rm=%0d got %h want %h", d, m, got, want);
    end
  endtask

  always @(posedge clk) begin
    if (running && stim.size() != 0) begin
      stim_t st;
      exp_t e;
      logic [52:0] mx, my;
      st = stim.pop_front();
      e.r = ref_add(st.x, st.y, st.sub, st.rm);
      e.t = cycle; e.x = st.x; e.y = st.y; e.sub = st.sub; e.rm = st.rm;
      q.push_back(e);
      mx = {1'b1, st.x[51:0]};
      my = {1'b1, st.y[51:0]};
      if (st.x[62:52] == st.y[62:52] && (st.x[63] ^ st.y[63] ^ st.sub) && mx < my &&
          st.x[62:52] != 0 && st.x[62:52] != 11'h7FF) begin
        cnt[M_ONESC]++;
        cnt[M_CMPSWAP]++;
      end
      if (st.x[62:52] - st.y[62:52] == 11'd54 || st.y[62:52] - st.x[62:52] == 11'd54) cnt[M_STICKY54]++;
      x <= st.x; y <= st.y; sub <= st.sub; rm <= st.rm; in_valid <= 1'b1;
      // converters: a single from the low word, the double operand
      s2d_in <= st.y[31:0];
      d2s_in <= st.x;
      d2s_rm <= st.rm;
    end else begin
      in_valid <= 1'b0;
    end
  end

  // converter checks (combinational outputs, inputs set by the previous edge)
  always @(posedge clk) begin
    if (running) begin
      checks++;
      if (s2d_in[30:23] == 8'hFF) begin
        if (s2d_out[62:52] != 11'h7FF || (s2d_out[51:0] == 0) != (s2d_in[22:0] == 0) || s2d_out[63] != s2d_in[31])
          begin failures++; $display("S2D FAIL %h -> %h", s2d_in, s2d_out); end
      end else if ($bitstoreal(s2d_out) != sval(s2d_in) || s2d_out[63] != s2d_in[31]) begin
        failures++;
        $display("S2D FAIL %h -> %h", s2d_in, s2d_out);
      end
      if (s2d_in[30:23] == 0 && s2d_in[22:0] != 0) cnt[M_S2D_DEN]++;
      check_d2s(d2s_in, d2s_rm, d2s_out, d2s_ovf);
    end
  end

  // LZA fine adjust in adder I, seen in its last stage on the close path
  always @(posedge clk)
    if (u_top.u_adder_i.v2 && u_top.u_adder_i.r2.norm == fpa_pkg::NORM_CLOSE &&
        u_top.u_adder_i.adj && !u_top.u_adder_i.r2.exact_zero)
      cnt[M_FINEADJ]++;

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
      if (e.r.inv) cnt[M_INV]++;
      else if (e.r.z[62:52] == 11'h7FF && e.r.z[51:0] != 0) cnt[M_NAN]++;
      else if (e.r.ovf) cnt[M_OVF]++;
      else if (e.r.unf) cnt[M_UNF]++;
      else if (e.r.ezero) cnt[M_ZERO]++;
      else if (e.r.z[62:52] != 11'h7FF && e.r.z[62:0] != 0) begin
        if (e.r.rc) cnt[M_RC]++;
        if ($signed(e.r.eshift) == 1)       cnt[M_R1]++;
        else if ($signed(e.r.eshift) == 0)  cnt[M_NONE]++;
        else if ($signed(e.r.eshift) == -1) cnt[M_L1]++;
        else                                cnt[M_MASSIVE]++;
      end
    end
  end

  initial begin
    #(10 * (NRAND + 2000));
    failures++;
    $display("WATCHDOG expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] a, b;
    // rounding carry out of A+C+1, sticky at 54, cancellation, specials
    send(64'h3FFF_FFFF_FFFF_FFFF, {1'b0, 11'd970, 52'h0}, 1'b0, 2'd0);
    send(64'h3FF0_0000_0000_0000, {1'b0, 11'd969, 52'h1}, 1'b1, 2'd0);
    send(64'h3FF0_0000_0000_0001, 64'h3FF0_0000_0000_0000, 1'b1, 2'd0);
    send(64'h4010_0000_0000_0000, 64'h4010_0000_0000_0000, 1'b1, 2'd0);
    send(64'h7FEF_FFFF_FFFF_FFFF, 64'h7FEF_FFFF_FFFF_FFFF, 1'b0, 2'd0);
    send(64'h0010_0000_0000_0001, 64'h0010_0000_0000_0000, 1'b1, 2'd0);
    send(64'h7FF0_0000_0000_0000, 64'h7FF0_0000_0000_0000, 1'b1, 2'd0);
    send(64'h3FF0_0000_0000_0000, 64'h7FF0_0000_0000_0001, 1'b0, 2'd0);
    send(64'h47EF_FFFF_F000_0000, 64'h0000_0000_0000_0001, 1'b0, 2'd0);
    for (int i = 0; i < NRAND; i++) begin
      gen_pair(a, b);
      send(a, b, 1'($urandom), 2'($urandom));
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    running = 1'b1;
    wait (stim.size() == 0);
    repeat (8) @(posedge clk);
    running = 1'b0;
    if (q.size() != 0) begin failures++; $display("results missing: %0d", q.size()); end
    for (int i = 0; i < M_NUM; i++) begin
      $display("mechanism %-20s %0d", mname[i], cnt[i]);
      checks++;
      if (cnt[i] == 0) begin failures++; $display("mechanism %s never happened", mname[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
