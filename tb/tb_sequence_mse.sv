// tb_sequence_mse: quality test on artificially interlaced progressive video.
//
// Progressive frames are generated procedurally and interlaced (frame t keeps
// the lines of parity t mod 2). The core rebuilds the missing lines of each
// field from the previous, current and next field, and the mean square error
// against the original frame is measured. The same is done for two simple
// methods: line averaging (mean of the lines above and below) and field
// insertion (the previous field's pixel). Two scenes at 352x288 are used:
//   "slow": static texture with one-line-thick horizontal and diagonal lines
//           and a smooth object moving 1 pixel per frame;
//   "fast": static texture with a thin white diagonal line and a bright object
//           moving 9 pixels per frame to the right and 3 down.
// Checks: every output equals the reference model and arrives 63 cycles after
// its first sample; the core's MSE is below that of line averaging in both
// scenes and below that of field insertion in the fast scene. (The slow scene
// is almost static, which field insertion reconstructs nearly perfectly; its
// MSE there is printed but not checked.)
module tb_sequence_mse;
  import deint_pkg::*;
  import deint_ref_pkg::*;

  localparam int W = 352;
  localparam int H = 288;
  localparam int NF = 3;          // fields rebuilt per scene (t = 1..NF)
  localparam int GAP = 4;
  localparam longint MAX_CYCLES = 2 * longint'(NF) * (H / 2) * (W + 4 + GAP) * 8 + 2000;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   h_valid = 1'b0;
  pix_t   h_top = '0, h_bot = '0, v_prev = '0, v_next = '0;
  phase_t ph;
  pix_t   y_out;
  logic   y_valid;

  deinterlacer dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int scene = 0;

  function automatic int hash(int r, int c);
    int unsigned h;
    h = 32'(r * 19349663) ^ 32'(c * 83492791);
    h ^= h >> 13; h *= 32'h5bd1e995; h ^= h >> 15;
    return int'(h & 32'h7);
  endfunction

  // Original progressive frame t.
  function automatic int prog(int t, int r, int c);
    int v, dx, dy;
    v = 60 + (c + r) / 8 + hash(r, c);                       // gradient, mild noise
    if (scene == 0) begin
      if (r % 24 == 11 && c > 20 && c < 330) v = 235;        // thin static lines
      if (c - 2 * r == 40 || c - 2 * r == -300) v = 230;     // thin diagonal lines
      dx = c - (120 + t); dy = r - 150;                      // slow smooth blob
      if (dx * dx + dy * dy < 900) v = 150 + (dx * dx + dy * dy) / 20;
    end else begin
      if (c + r == 300 || c + r == 301) v = 250;             // thin table edge
      dx = c - (60 + 9 * t); dy = r - (90 + 3 * t);          // fast object
      if (dx >= 0 && dx < 40 && dy >= 0 && dy < 30) v = 200 + (dx % 5) * 5;
    end
    return (v > 255) ? 255 : v;
  endfunction

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // Pixel of field t: only lines of parity t mod 2 exist; clamp to them.
  function automatic int fld(int t, int r, int c);
    int par, rr;
    par = t % 2;
    rr = r;
    if (rr < par) rr = par;
    if (rr > H - 1) rr = H - 1;
    if ((rr % 2) != par) rr = rr - 1;
    return prog(t, rr, clampi(c, 0, W - 1));
  endfunction

  typedef struct { int y; longint start; int truth; } exp_t;
  exp_t exp_q[$];
  longint se_core, se_avg, se_ins, se_ref;
  int     n_pix;

  task automatic wait_phase(int p);
    do @(negedge clk); while (ph != phase_t'(p));
  endtask

  task automatic run_interval(int t, int r, int k, bit valid);
    nbhd_t n;
    ref_t  e;
    int    c, a, b;
    c = k;
    wait_phase(0);
    h_valid = valid;
    h_top   = pix_t'(fld(t, r - 1, k - 2));
    h_bot   = pix_t'(fld(t, r + 1, k - 2));
    if (valid && k < W) begin
      for (int i = 2; i <= 6; i++)  n.x[i] = fld(t, r - 1, c + i - 4);
      for (int i = 8; i <= 12; i++) n.x[i] = fld(t, r + 1, c + i - 10);
      n.x[1] = 0; n.x[7] = 0; n.x[13] = 0;
      n.p1 = fld(t - 1, r - 2, c); n.p7 = fld(t - 1, r, c); n.p13 = fld(t - 1, r + 2, c);
      n.f1 = fld(t + 1, r - 2, c); n.f7 = fld(t + 1, r, c); n.f13 = fld(t + 1, r + 2, c);
      e = compute(n);
      exp_q.push_back('{e.y, cyc, prog(t, r, c)});
      a = (n.x[4] + n.x[10] + 1) / 2;
      b = n.p7;
      se_avg += (a - prog(t, r, c)) * (a - prog(t, r, c));
      se_ins += (b - prog(t, r, c)) * (b - prog(t, r, c));
      se_ref += (e.y - prog(t, r, c)) * (e.y - prog(t, r, c));
    end
    wait_phase(2);
    v_prev = pix_t'(fld(t - 1, r - 2, c)); v_next = pix_t'(fld(t + 1, r - 2, c));
    wait_phase(4);
    v_prev = pix_t'(fld(t - 1, r, c));     v_next = pix_t'(fld(t + 1, r, c));
    wait_phase(6);
    v_prev = pix_t'(fld(t - 1, r + 2, c)); v_next = pix_t'(fld(t + 1, r + 2, c));
  endtask

  always @(negedge clk) begin
    if (rst_n && y_valid) begin
      exp_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("ERROR: unexpected output at cycle %0d", cyc);
      end else begin
        e = exp_q.pop_front();
        if (int'(y_out) != e.y || cyc - e.start != 63) begin
          failures++;
          if (failures < 10) $display("ERROR: output %0d (expected %0d), latency %0d", y_out, e.y, cyc - e.start);
        end
        se_core += (int'(y_out) - e.truth) * (int'(y_out) - e.truth);
        n_pix++;
      end
    end
  end

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 2; s++) begin
      scene = s;
      se_core = 0; se_ref = 0; se_avg = 0; se_ins = 0; n_pix = 0;
      for (int t = 1; t <= NF; t++) begin
        for (int r = 1 - t % 2; r < H; r += 2) begin
          for (int k = 0; k < W + 4; k++) run_interval(t, r, k, 1'b1);
          for (int k = 0; k < GAP; k++)   run_interval(t, r, W + 4 + k, 1'b0);
        end
      end
      repeat (80) @(negedge clk);
      $display("  reference model MSE %0.2f", real'(se_ref) / n_pix);
      $display("scene %s: MSE core %0.2f, line averaging %0.2f, field insertion %0.2f (%0d pixels)",
               s == 0 ? "slow" : "fast", real'(se_core) / n_pix, real'(se_avg) / n_pix,
               real'(se_ins) / n_pix, n_pix);
      checks++;
      if (n_pix != NF * (H / 2) * W) begin
        failures++;
        $display("ERROR: %0d pixels rebuilt", n_pix);
      end
      checks++;
      if (!(se_core < se_avg && (s == 0 || se_core < se_ins))) begin
        failures++;
        $display("ERROR: core MSE above a simple method");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
