// tb_gpr_rnmf_accel -- end-to-end testbench of gpr_rnmf_accel at its default size.
//
// Runs ITERS (= 2) RNMF iterations on one full 256 x 183 radar image the way the
// DMA engines feed the datapath, with every parameter of the top at its default.
// Each iteration uses new W and H (as the factorisation updates them) and does:
//   1. A synthetic image X: a flat clutter level with small noise plus a buried-
//      target hyperbola of larger amplitude; per iteration, positive W (256) and
//      H (183) whose product is close to the clutter level.
//   2. Target update: X is streamed in storage order (column by column), W
//      repeated once per column and H with each value repeated once per row, as
//      the three read DMAs do; each stream marks its last beat with TLAST.  T is
//      collected into a target memory with random backpressure, and the three
//      input streams have random gaps.
//   3. Shrinkage: the target memory is streamed into the soft-threshold core with
//      no gaps and no backpressure, and its output collected.
// Every T and every shrunk sample is compared with a reference computed in real
// arithmetic (tb_fp_pkg).  Also checked: TLAST only on the last sample of each
// output image (one per iteration), the 20-clock latency of the first pixel, and
// each shrinkage pass
// taking exactly 46848 + 15 clocks.  Each mechanism of the datapath is counted and
// must occur at least once: operand gaps, X held while its product is computed,
// backpressure on T, T TLAST, shrink TLAST, and the three shrink outcomes (kept
// positive, kept negative, cut to zero).
module tb_gpr_rnmf_accel;
  import gpr_pkg::*;
  import tb_fp_pkg::*;

  localparam int ROWS = IMG_ROWS;
  localparam int COLS = IMG_COLS;
  localparam int N    = IMG_SAMPLES;
  localparam int ITERS = 2;

  logic clk = 1'b0, rstn = 1'b0;
  always #5 clk = ~clk;

  logic       xv = 0, wv = 0, hv = 0, xr, wr, hr, tv, tr = 0;
  logic       sv = 0, sr, ov, orr = 0;
  axis_beat_t x = '0, w = '0, h = '0, t, s = '0, o;

  gpr_rnmf_accel dut (
    .aclk(clk), .aresetn(rstn),
    .s_axis_x_tvalid(xv), .s_axis_x_tready(xr), .s_axis_x(x),
    .s_axis_w_tvalid(wv), .s_axis_w_tready(wr), .s_axis_w(w),
    .s_axis_h_tvalid(hv), .s_axis_h_tready(hr), .s_axis_h(h),
    .m_axis_t_tvalid(tv), .m_axis_t_tready(tr), .m_axis_t(t),
    .s_axis_shrink_tvalid(sv), .s_axis_shrink_tready(sr), .s_axis_shrink(s),
    .m_axis_shrink_tvalid(ov), .m_axis_shrink_tready(orr), .m_axis_shrink(o)
  );

  int checks = 0, failures = 0;
  logic [31:0] X [N];
  logic [31:0] W [ROWS];
  logic [31:0] H [COLS];
  logic [31:0] T [N];
  logic [31:0] T_ref [N];
  int cyc = 0, w_first = -1, s_first = -1;
  int ix = 0, iw = 0, ih = 0, it = 0, is_ = 0, io = 0;
  bit ready_gen = 0, shrink_phase = 0;
  int iter = 0;
  int n_gap = 0, n_xwait = 0, n_tstall = 0, n_tlast = 0, n_olast = 0;
  int n_pos = 0, n_neg = 0, n_cut = 0;

  function automatic logic [31:0] ref_shrink(input logic [31:0] v);
    real d;
    logic [31:0] n;
    if (is_nan(v) || v[30:0] == 0) return 32'h0;
    d = (v[31] ? -f2r(v) : f2r(v)) - 0.00015;
    n = (d > 0.0) ? r2f(d) : 32'h0;
    return {v[31], n[30:0]};
  endfunction

  task automatic make_image();
    for (int c = 0; c < COLS; c++)
      for (int r = 0; r < ROWS; r++) begin
        real v, dr;
        v  = 0.5625 + (real'(int'($urandom % 2001) - 1000) / 1000.0) * 0.0004;
        dr = real'(r) - (100.0 + 0.002 * real'((c - 90) * (c - 90)));
        if (dr >= 0.0 && dr < 4.0) v = v + 0.05;   // target hyperbola
        X[r + (c << 8)] = r2f(v);
      end
  endtask

  // W and H of one iteration: W*H near the clutter level, so T holds small values
  // on both sides of the threshold plus the target
  task automatic make_factors();
    for (int r = 0; r < ROWS; r++) W[r] = r2f(0.75 + 0.0002 * real'(int'($urandom % 1001) - 500) / 500.0);
    for (int c = 0; c < COLS; c++) H[c] = r2f(0.75 + 0.0002 * real'(int'($urandom % 1001) - 500) / 500.0);
    for (int k = 0; k < N; k++)
      T_ref[k] = r2f(f2r(X[k]) - f2r(r2f(f2r(W[k % ROWS]) * f2r(H[k / ROWS]))));
  endtask

  // read DMA models for X, W_temp and H_temp: valid held until taken
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rstn && ready_gen) begin
      if (xv && xr) ix = ix + 1;
      if (wv && wr) begin
        if (w_first < 0) w_first = cyc;
        iw = iw + 1;
      end
      if (hv && hr) ih = ih + 1;
      if (xv && !xr && wv && hv) n_xwait++;
      if (!(xv && !xr)) begin
        bit go;
        go = ($urandom % 16 != 0);
        xv <= (ix < N) && go;
        if (ix < N) x <= '{data: X[ix], last: ix == N - 1};
        if (ix < N && !go) n_gap++;
      end
      if (!(wv && !wr)) begin
        wv <= (iw < N) && ($urandom % 16 != 1);
        if (iw < N) w <= '{data: W[iw % ROWS], last: iw == N - 1};
      end
      if (!(hv && !hr)) begin
        hv <= (ih < N) && ($urandom % 16 != 2);
        if (ih < N) h <= '{data: H[ih / ROWS], last: ih == N - 1};
      end
    end
  end

  // write DMA model for T
  always @(posedge clk) begin
    if (rstn) begin
      if (tv && !tr) n_tstall++;
      if (tv && tr) begin
        T[it] = t.data;
        checks++;
        if (t.data !== T_ref[it] || t.last !== (it == N - 1)) begin
          failures++;
          if (failures < 10) $display("FAIL T[%0d] = %h/%0d, expected %h", it, t.data, t.last, T_ref[it]);
        end
        if (t.last) n_tlast++;
        if (it == 0) begin
          checks++;
          if (cyc - w_first != 20) begin failures++; $display("FAIL first T after %0d clocks", cyc - w_first); end
        end
        it = it + 1;
      end
      tr <= ($urandom % 8 != 0);
    end
  end

  // read DMA model for the shrinkage pass (started once T is complete)
  always @(posedge clk) begin
    if (rstn && shrink_phase) begin
      if (sv && sr) begin
        if (s_first < 0) s_first = cyc;
        is_ = is_ + 1;
      end
      if (!(sv && !sr)) begin
        sv <= (is_ < N);
        if (is_ < N) s <= '{data: T[is_], last: is_ == N - 1};
      end
    end
  end

  // write DMA model for the shrunk target
  always @(posedge clk) begin
    if (rstn) begin
      orr <= 1'b1;
      if (ov && orr) begin
        logic [31:0] e;
        e = ref_shrink(T_ref[io]);
        checks++;
        if (o.data !== e || o.last !== (io == N - 1)) begin
          failures++;
          if (failures < 10) $display("FAIL shrink[%0d] = %h/%0d, expected %h", io, o.data, o.last, e);
        end
        if (o.last) n_olast++;
        if (e[30:0] == 0) n_cut++;
        else if (e[31]) n_neg++;
        else n_pos++;
        if (io == N - 1) begin
          checks++;
          if (cyc - s_first + 1 != N + 15) begin
            failures++; $display("FAIL shrink pass %0d clocks, expected %0d", cyc - s_first + 1, N + 15);
          end
        end
        io = io + 1;
      end
    end
  end

  initial begin
    make_image();
    repeat (3) @(posedge clk);
    rstn <= 1'b1;
    for (iter = 0; iter < ITERS; iter++) begin
      make_factors();
      ix = 0; iw = 0; ih = 0; it = 0; is_ = 0; io = 0; w_first = -1; s_first = -1;
      @(posedge clk);
      ready_gen = 1;
      wait (it == N);
      @(posedge clk);
      ready_gen = 0;
      shrink_phase = 1;
      wait (io == N);
      @(posedge clk);
      shrink_phase = 0;
      repeat (2) @(posedge clk);
    end
    $display("mechanisms: gaps=%0d x_wait=%0d t_stall=%0d t_last=%0d shrink_last=%0d pos=%0d neg=%0d cut=%0d",
             n_gap, n_xwait, n_tstall, n_tlast, n_olast, n_pos, n_neg, n_cut);
    checks += 8;
    if (n_gap == 0)        begin failures++; $display("FAIL: no operand gap"); end
    if (n_xwait == 0)      begin failures++; $display("FAIL: X never waited"); end
    if (n_tstall == 0)     begin failures++; $display("FAIL: T never stalled"); end
    if (n_tlast != ITERS)  begin failures++; $display("FAIL: T TLAST count %0d", n_tlast); end
    if (n_olast != ITERS)  begin failures++; $display("FAIL: shrink TLAST count %0d", n_olast); end
    if (n_pos == 0)        begin failures++; $display("FAIL: no positive output"); end
    if (n_neg == 0)        begin failures++; $display("FAIL: no negative output"); end
    if (n_cut == 0)        begin failures++; $display("FAIL: nothing cut to zero"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (800000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, T %0d, shrink %0d of %0d", it, io, N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
