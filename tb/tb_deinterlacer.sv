// tb_deinterlacer: end-to-end test of the deinterlacer core on one complete
// 720x576 frame (all 288 missing lines of one field), core at its defaults.
//
// Three fields are generated procedurally: the current field holds the even
// lines, the previous and next fields the odd lines. The picture has four
// vertical stripes, each aimed at one behaviour of the algorithm:
//   static texture with one-line-thick horizontal lines (temporal path),
//   a diagonal edge pattern moving between fields (spatial path),
//   uncorrelated noise (mixed weights),
//   vertical bars moving horizontally (image-flow case).
// The host side streams each missing line as W+4 horizontal samples (edge
// pixels replicated) followed by a 4-interval gap with h_valid low, presents
// the vertical columns in phases 2/4/6, and compares every output with the
// integer reference model. It checks the 63-cycle input-to-output delay of
// every iteration, one output per 8 cycles inside a line, and that each
// mechanism (pure spatial, pure temporal and mixed weights, each edge
// direction winning, either temporal candidate winning, pipeline bubbles,
// output limiting) occurred at least once.
module tb_deinterlacer;
  import deint_pkg::*;
  import deint_ref_pkg::*;

  localparam int W = 720;
  localparam int H = 576;
  localparam int GAP = 4;
  localparam longint MAX_CYCLES = longint'(H / 2) * (W + 4 + GAP) * 8 + 1000;

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

  // ---------------------------------------------------------------- scene
  function automatic int hash(int t, int r, int c);
    int unsigned h;
    h = 32'(t * 73856093) ^ 32'(r * 19349663) ^ 32'(c * 83492791);
    h ^= h >> 13; h *= 32'h5bd1e995; h ^= h >> 15;
    return int'(h & 32'hff);
  endfunction

  // Pixel of the frame at time t (-1 previous, 0 current, +1 next).
  function automatic int pixel(int t, int r, int c);
    int v;
    if (c < W / 4) begin
      v = (r * 3 + c * 5) % 200;
      if (r % 16 == 5) v = 250;                         // static thin line
    end else if (c < W / 2) begin
      v = (((c - r + 8 * t) % 64 + 64) % 64 < 32) ? 40 : 200;   // moving edges
    end else if (c < 3 * W / 4) begin
      v = hash(t, r, c);                                // noise
    end else begin
      v = ((((c + 6 * t) / 6) % 2) != 0) ? 30 : 220;    // horizontal motion
      v = v + (r % 8);
    end
    return v;
  endfunction

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // Current field: even rows. Other fields: odd rows.
  function automatic int cur(int r, int c);
    return pixel(0, clampi(r, 0, H - 2), clampi(c, 0, W - 1));
  endfunction
  function automatic int oth(int t, int r, int c);
    return pixel(t, clampi(r, 1, H - 1), clampi(c, 0, W - 1));
  endfunction

  // ------------------------------------------------------- expected values
  typedef struct { int y; longint start; } exp_t;
  exp_t exp_q[$];

  int n_spatial = 0, n_temporal = 0, n_mixed = 0;
  int n_dir[3] = '{0, 0, 0};
  int n_prev_wins = 0, n_next_wins = 0, n_bubble = 0, n_limit = 0;
  int n_out = 0;

  task automatic wait_phase(int p);
    do @(negedge clk); while (ph != phase_t'(p));
  endtask

  // One interval: sample k of missing line r (k may exceed the line: gap).
  task automatic run_interval(int r, int k, bit valid);
    nbhd_t n;
    ref_t  e;
    int    c;
    c = k;  // iteration k reconstructs column k
    wait_phase(0);
    h_valid = valid;
    h_top   = pix_t'(cur(r - 1, k - 2));
    h_bot   = pix_t'(cur(r + 1, k - 2));
    if (valid && k < W) begin
      for (int i = 2; i <= 6; i++)  n.x[i] = cur(r - 1, c + i - 4);
      for (int i = 8; i <= 12; i++) n.x[i] = cur(r + 1, c + i - 10);
      n.x[1] = 0; n.x[7] = 0; n.x[13] = 0;
      n.p1 = oth(-1, r - 2, c); n.p7 = oth(-1, r, c); n.p13 = oth(-1, r + 2, c);
      n.f1 = oth(1, r - 2, c);  n.f7 = oth(1, r, c);  n.f13 = oth(1, r + 2, c);
      e = compute(n);
      exp_q.push_back('{e.y, cyc});
      if (e.wt == 0) n_spatial++; else if (e.wt == 256) n_temporal++; else n_mixed++;
      n_dir[e.dir]++;
      if (e.wp > e.wf) n_prev_wins++; else if (e.wf > e.wp) n_next_wins++;
      if (blend(e.ys, e.yt, e.wt) == 255 && ((e.ys * 256 + longint'(e.wt) * (e.yt - e.ys) + 2048) >>> 12) > 255)
        n_limit++;
    end else begin
      n_bubble++;
    end
    wait_phase(2);
    v_prev = pix_t'(oth(-1, r - 2, c)); v_next = pix_t'(oth(1, r - 2, c));
    wait_phase(4);
    v_prev = pix_t'(oth(-1, r, c));     v_next = pix_t'(oth(1, r, c));
    wait_phase(6);
    v_prev = pix_t'(oth(-1, r + 2, c)); v_next = pix_t'(oth(1, r + 2, c));
  endtask

  // --------------------------------------------------------------- monitor
  longint last_out = -1;
  always @(negedge clk) begin
    if (rst_n && y_valid) begin
      exp_t e;
      n_out++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("ERROR: unexpected output %0d at cycle %0d", y_out, cyc);
      end else begin
        e = exp_q.pop_front();
        if (int'(y_out) != e.y) begin
          failures++;
          if (failures < 10) $display("ERROR: output %0d expected %0d (cycle %0d)", y_out, e.y, cyc);
        end
        checks++;
        if (cyc - e.start != 63) begin
          failures++;
          if (failures < 10) $display("ERROR: latency %0d, expected 63", cyc - e.start);
        end
      end
      if (last_out >= 0 && cyc - last_out < 8) begin
        failures++;
        $display("ERROR: outputs %0d cycles apart", cyc - last_out);
      end
      last_out = cyc;
    end
  end

  // -------------------------------------------------------------- watchdog
  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------- stimulus
  task automatic need(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("ERROR: mechanism never exercised: %s", what);
    end else begin
      $display("  %-28s %0d", what, count);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 1; r < H; r += 2) begin
      for (int k = 0; k < W + 4; k++) run_interval(r, k, 1'b1);
      for (int k = 0; k < GAP; k++)   run_interval(r, W + 4 + k, 1'b0);
    end
    repeat (80) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || n_out != (H / 2) * W) begin
      failures++;
      $display("ERROR: %0d outputs, %0d still expected", n_out, exp_q.size());
    end
    $display("mechanisms:");
    need("pure spatial (w_temp=0)", n_spatial);
    need("pure temporal (w_temp=1)", n_temporal);
    need("mixed weight", n_mixed);
    need("45 deg direction best", n_dir[0]);
    need("90 deg direction best", n_dir[1]);
    need("135 deg direction best", n_dir[2]);
    need("previous field preferred", n_prev_wins);
    need("next field preferred", n_next_wins);
    need("pipeline bubble", n_bubble);
    $display("  output limited to 255       %0d", n_limit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
