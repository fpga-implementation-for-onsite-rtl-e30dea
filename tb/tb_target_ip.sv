// tb_target_ip -- self-checking testbench for target_ip (T = X - W*H).
//
// Streams lists of (X, W, H) triples into the three input channels and compares
// every T with a reference from tb_fp_pkg: the product W*H rounded to single
// precision, then X minus it rounded again.  The first pixel is the worked example
// X = 0.43865281, W = H = 0.19797084, whose result must be 0.39946038 (0x3ECC8612).
// The first PH1 triples go in without gaps or backpressure, which checks the
// 20-clock latency from W and H being taken to T (9 for the multiply, 11 for the
// subtract; X is held at the subtractor until its product arrives) and one pixel
// per clock; the rest use random, independent gaps on X, W and H and random
// backpressure on T.  TLAST of T must be the AND of the three input TLASTs.
module tb_target_ip;
  import gpr_pkg::*;
  import tb_fp_pkg::*;

  localparam int LAT   = 20;
  localparam int PH1   = 64;
  localparam int NRAND = 3000;

  logic clk = 1'b0, rstn = 1'b0;
  always #5 clk = ~clk;

  logic       xv = 0, wv = 0, hv = 0, xr, wr, hr, tv, tr = 0;
  axis_beat_t x = '0, w = '0, h = '0, t;

  target_ip dut (
    .aclk(clk), .aresetn(rstn),
    .s_axis_w_tvalid(wv), .s_axis_w_tready(wr), .s_axis_w(w),
    .s_axis_h_tvalid(hv), .s_axis_h_tready(hr), .s_axis_h(h),
    .s_axis_x_tvalid(xv), .s_axis_x_tready(xr), .s_axis_x(x),
    .m_axis_t_tvalid(tv), .m_axis_t_tready(tr), .m_axis_t(t)
  );

  int checks = 0, failures = 0;
  logic [31:0] vx[$], vw[$], vh[$];
  logic        lx[$], lw[$], lh[$];
  int          acc_cyc[$];
  int          cyc = 0;
  int          ix = 0, iw = 0, ih = 0, io = 0, nv = 0;
  int          stalls = 0, x_waits = 0;

  function automatic logic [31:0] ref_t(input int k);
    return r2f(f2r(vx[k]) - f2r(r2f(f2r(vw[k]) * f2r(vh[k]))));
  endfunction

  initial begin
    vx.push_back(32'h3EE0_971A); vw.push_back(32'h3E4A_B8DE); vh.push_back(32'h3E4A_B8DE);
    lx.push_back(0); lw.push_back(0); lh.push_back(0);
    for (int i = 1; i < PH1 + NRAND; i++) begin
      vx.push_back(rand_f32(-4, 4)); vw.push_back(rand_f32(-4, 4)); vh.push_back(rand_f32(-4, 4));
      lx.push_back(1'($urandom)); lw.push_back(1'($urandom)); lh.push_back(1'($urandom));
    end
    nv = vx.size();
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rstn) begin
      if (xv && xr) ix = ix + 1;
      if (xv && !xr && wv && hv) x_waits++;
      if (wv && wr) begin iw = iw + 1; acc_cyc.push_back(cyc); end
      if (hv && hr) ih = ih + 1;
      if (!(xv && !xr)) begin
        xv <= (ix < nv) && (ix < PH1 || ($urandom % 4 != 0));
        if (ix < nv) x <= '{data: vx[ix], last: lx[ix]};
      end
      if (!(wv && !wr)) begin
        wv <= (iw < nv) && (iw < PH1 || ($urandom % 3 != 0));
        if (iw < nv) w <= '{data: vw[iw], last: lw[iw]};
      end
      if (!(hv && !hr)) begin
        hv <= (ih < nv) && (ih < PH1 || ($urandom % 5 != 0));
        if (ih < nv) h <= '{data: vh[ih], last: lh[ih]};
      end
    end
  end

  always @(posedge clk) begin
    if (rstn) begin
      if (tv && !tr) stalls++;
      if (tv && tr) begin
        logic [31:0] e;
        e = ref_t(io);
        checks++;
        if (t.data !== e || t.last !== (lx[io] & lw[io] & lh[io])) begin
          failures++;
          if (failures < 10)
            $display("FAIL #%0d: X=%h W=%h H=%h -> %h/%0d, expected %h/%0d", io, vx[io], vw[io],
                     vh[io], t.data, t.last, e, lx[io] & lw[io] & lh[io]);
        end
        if (io == 0) begin
          checks++;
          if (t.data !== 32'h3ECC_8612) begin failures++; $display("FAIL worked example: %h", t.data); end
        end
        if (io < PH1) begin
          checks++;
          if (cyc - acc_cyc[io] != LAT) begin
            failures++;
            $display("FAIL latency #%0d: %0d clocks, expected %0d", io, cyc - acc_cyc[io], LAT);
          end
        end
        io = io + 1;
      end
      tr <= (io < PH1) || ($urandom % 3 != 0);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rstn <= 1'b1;
    wait (nv > 0 && io == nv);
    repeat (2) @(posedge clk);
    checks += 2;
    if (stalls == 0)  begin failures++; $display("FAIL: backpressure never exercised"); end
    if (x_waits == 0) begin failures++; $display("FAIL: X never waited for its product"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d of %0d results", io, nv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
