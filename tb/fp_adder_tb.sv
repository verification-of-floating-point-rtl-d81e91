// fp_adder_tb: self-checking testbench of the pipelined adder. Both variants
// (without and with the mantissa comparator) receive the same stream of one
// operation per cycle: directed cases for the rounding carry out of A+C+1,
// the sticky bit at an exponent difference of 54, massive cancellation, zeros,
// overflow and underflow, then random operand pairs in all rounding modes.
// Each result is compared with the wide-integer reference model and, in
// round-to-nearest for operands and results well inside the normal range,
// also with the simulator's own double-precision addition. The latency is
// checked: every result must appear exactly three cycles after its operands.
module fp_adder_tb;
  import fpa_pkg::*;
  import fpa_ref_pkg::*;
  import fpa_stim_pkg::*;

  localparam int NRAND = 40000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, sub = 1'b0;
  logic [63:0] x = '0, y = '0;
  rmode_e rm = RM_RNE;
  logic ov0, ov1, inv0, inv1, of0, of1, uf0, uf1;
  logic [63:0] z0, z1;
  int checks = 0, failures = 0, cycle = 0;

  fp_adder #(.COMPARE(1'b0)) dut0 (.clk, .rst_n, .in_valid, .x, .y, .sub, .rm,
    .out_valid(ov0), .z(z0), .invalid(inv0), .overflow(of0), .underflow(uf0));
  fp_adder #(.COMPARE(1'b1)) dut1 (.clk, .rst_n, .in_valid, .x, .y, .sub, .rm,
    .out_valid(ov1), .z(z1), .invalid(inv1), .overflow(of1), .underflow(uf1));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { ref_t r; int t; logic [63:0] x, y; logic sub; logic [1:0] rm; } exp_t;
  exp_t q[$];

  function automatic logic real_ok(logic [63:0] a);
    return a[62:52] > 11'd60 && a[62:52] < 11'd1980;
  endfunction

  typedef struct { logic [63:0] x, y; logic sub; logic [1:0] rm; } stim_t;
  stim_t stim[$];
  logic running = 1'b0;

  function automatic void send(logic [63:0] a, logic [63:0] b, logic s, logic [1:0] m);
    stim.push_back('{a, b, s, m});
  endfunction

  // Drive one operation per cycle and record what the reference expects.
  always @(posedge clk) begin
    if (running && stim.size() != 0) begin
      stim_t st;
      exp_t e;
      real ra, rb;
      logic [63:0] rz;
      st = stim.pop_front();
      e.r = ref_add(st.x, st.y, st.sub, st.rm);
      e.t = cycle; e.x = st.x; e.y = st.y; e.sub = st.sub; e.rm = st.rm;
      q.push_back(e);
      // independent cross-check of the reference model in round-to-nearest
      if (st.rm == 2'd0 && real_ok(st.x) && real_ok(st.y)) begin
        ra = $bitstoreal(st.x);
        rb = $bitstoreal(st.y);
        rz = $realtobits(st.sub ? ra - rb : ra + rb);
        if (rz[62:52] > 11'd1 || rz[62:0] == 63'b0) begin
          checks++;
          if (rz != e.r.z) begin
            failures++;
            $display("REF MISMATCH %h %h sub=%0d: ref %h real %h", st.x, st.y, st.sub, e.r.z, rz);
          end
        end
      end
      x <= st.x; y <= st.y; sub <= st.sub; rm <= rmode_e'(st.rm); in_valid <= 1'b1;
    end else begin
      in_valid <= 1'b0;
    end
  end

  always @(posedge clk) begin
    if (rst_n && ov0 !== ov1) begin failures++; $display("valid mismatch"); end
    if (rst_n && ov0) begin
      exp_t e;
      logic [66:0] got0, got1, want;
      e = q.pop_front();
      checks += 3;
      if (cycle - e.t != 4) begin  // sampled one edge after the third register
        failures++;
        $display("LATENCY %0d", cycle - e.t);
      end
      want = {e.r.z, e.r.inv, e.r.ovf, e.r.unf};
      got0 = {z0, inv0, of0, uf0};
      got1 = {z1, inv1, of1, uf1};
      if (got0 !== want) begin
        failures++;
        if (failures < 20) $display("FAIL v0 x=%h y=%h sub=%0d rm=%0d got %h %b%b%b want %h %b%b%b",
          e.x, e.y, e.sub, e.rm, z0, inv0, of0, uf0, e.r.z, e.r.inv, e.r.ovf, e.r.unf);
      end
      if (got1 !== want) begin
        failures++;
        if (failures < 20) $display("FAIL v1 x=%h y=%h sub=%0d rm=%0d got %h %b%b%b want %h %b%b%b",
          e.x, e.y, e.sub, e.rm, z1, inv1, of1, uf1, e.r.z, e.r.inv, e.r.ovf, e.r.unf);
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
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int m = 0; m < 4; m++) begin
      // A+C = 01.11..1 and rounding up: carry out of A+C+1
      send(64'h3FFF_FFFF_FFFF_FFFF, {1'b0, 11'd1023 - 11'd53, 52'h0}, 1'b0, 2'(m));
      send(64'h3FFF_FFFF_FFFF_FFFF, {1'b0, 11'd1023 - 11'd53, 52'h1}, 1'b0, 2'(m));
      // exponent difference 54: leading one in the round position
      for (int s = 0; s < 2; s++) begin
        send(64'h3FF0_0000_0000_0000, {1'b0, 11'd1023 - 11'd54, 52'h0}, 1'(s), 2'(m));
        send(64'h3FF0_0000_0000_0000, {1'b0, 11'd1023 - 11'd54, 52'h1}, 1'(s), 2'(m));
        send({1'b0, 11'd1023 - 11'd54, 52'h1}, 64'h3FF0_0000_0000_0000, 1'(s), 2'(m));
        send(64'h3FF0_0000_0000_0000, {1'b0, 11'd1023 - 11'd55, 52'h8}, 1'(s), 2'(m));
      end
      // massive cancellation, both orders
      send(64'h3FF0_0000_0000_0001, 64'h3FF0_0000_0000_0000, 1'b1, 2'(m));
      send(64'h3FF0_0000_0000_0000, 64'h3FF0_0000_0000_0001, 1'b1, 2'(m));
      send(64'h4000_0000_0000_0000, 64'h3FFF_FFFF_FFFF_FFFF, 1'b1, 2'(m));
      // exact zero, zeros of both signs
      send(64'h4010_0000_0000_0000, 64'h4010_0000_0000_0000, 1'b1, 2'(m));
      send(64'h8000_0000_0000_0000, 64'h0000_0000_0000_0000, 1'b0, 2'(m));
      send(64'h8000_0000_0000_0000, 64'h0000_0000_0000_0000, 1'b1, 2'(m));
      // overflow, underflow
      send(64'h7FEF_FFFF_FFFF_FFFF, 64'h7FEF_FFFF_FFFF_FFFF, 1'b0, 2'(m));
      send(64'hFFEF_FFFF_FFFF_FFFF, 64'h7CA0_0000_0000_0000, 1'b1, 2'(m));
      send(64'h0010_0000_0000_0001, 64'h0010_0000_0000_0000, 1'b1, 2'(m));
      // NaN, infinities
      send(64'h7FF0_0000_0000_0000, 64'h7FF0_0000_0000_0000, 1'b1, 2'(m));
      send(64'hFFF0_0000_0000_0000, 64'h3FF0_0000_0000_0000, 1'b0, 2'(m));
      send(64'h3FF0_0000_0000_0000, 64'h7FF0_0000_0000_0001, 1'b0, 2'(m));
    end
    for (int i = 0; i < NRAND; i++) begin
      gen_pair(a, b);
      send(a, b, 1'($urandom), 2'($urandom));
    end
    running = 1'b1;
    wait (stim.size() == 0);
    repeat (8) @(posedge clk);
    if (q.size() != 0) begin failures++; $display("results missing: %0d", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
