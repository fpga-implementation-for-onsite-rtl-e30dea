// tb_fp_sub_axis -- self-checking testbench for fp_sub_axis (A - B, 11-clock latency).
//
// Drives a list of operand pairs through the two operand channels and compares each
// result with a reference from tb_fp_pkg (real arithmetic, one rounding).  The list
// holds directed special cases (zeros, infinities, NaN, inf-inf, exact cancellation,
// overflow, results flushed to zero) and random normal operands, among them pairs
// that nearly cancel.  Operand exponents differ by less than 29, so the real
// difference is exact and the reference is rounded once.  The first PH1 pairs are sent with
// no gaps and no backpressure, checking the latency (result exactly LATENCY clocks
// after its operands are taken) and one result per clock; the rest are sent with
// random, independent gaps on A and B and random backpressure on the result, which
// checks the join (A and B are always taken in the same cycle), the stall and
// TLAST = A.last & B.last.
module tb_fp_sub_axis;
  import gpr_pkg::*;
  import tb_fp_pkg::*;

  localparam int LAT = 11;
  localparam int PH1 = 64;
  localparam int NRAND = 3000;

  logic clk = 1'b0, rstn = 1'b0;
  always #5 clk = ~clk;

  logic       av = 0, bv = 0, ar, br, rv, rr = 0;
  axis_beat_t a = '0, b = '0, r;

  fp_sub_axis #(.LATENCY(LAT)) dut (
    .aclk(clk), .aresetn(rstn),
    .s_axis_a_tvalid(av), .s_axis_a_tready(ar), .s_axis_a(a),
    .s_axis_b_tvalid(bv), .s_axis_b_tready(br), .s_axis_b(b),
    .m_axis_result_tvalid(rv), .m_axis_result_tready(rr), .m_axis_result(r)
  );

  int checks = 0, failures = 0;
  logic [31:0] va[$], vb[$];
  logic        la[$], lb[$];
  int          acc_cyc[$];
  int          cyc = 0;
  int          ia = 0, ib = 0, io = 0, nv = 0;
  int          stalls = 0;

  function automatic logic [31:0] ref_op(input logic [31:0] x, input logic [31:0] y);
    logic sx, sy;
    bit xz, yz, xi, yi;
    sx = x[31];  sy = ~y[31];   // sign of -y
    xz = x[30:23] == 0;  yz = y[30:23] == 0;
    xi = x[30:0] == 31'h7F80_0000;  yi = y[30:0] == 31'h7F80_0000;
    if (is_nan(x) || is_nan(y) || (xi && yi && sx != sy)) return F_QNAN;
    if (xi) return x;
    if (yi) return {sy, y[30:0]};
    if (xz && yz) return {sx & sy, 31'h0};
    if (xz) return {sy, y[30:0]};
    if (yz) return x;
    return r2f(f2r(x) - f2r(y));
  endfunction

  task automatic add(input logic [31:0] x, input logic [31:0] y, input logic lx, input logic ly);
    va.push_back(x); vb.push_back(y); la.push_back(lx); lb.push_back(ly);
  endtask

  initial begin
    // no-stall phase: plain values
    for (int i = 0; i < PH1; i++) add(rand_f32(-8, 8), rand_f32(-8, 8), 1'b0, 1'b0);
    // directed special cases
    add(32'h40C0_0000, 32'h4000_0000, 1, 1);   // 6 - 2 = 4
    add(32'h3F80_0000, 32'h3F80_0000, 1, 0);   // 1 - 1 = +0
    add(32'h8000_0000, 32'h0000_0000, 0, 1);   // -0 - +0 = -0
    add(32'h0000_0000, 32'h4040_0000, 0, 0);   // 0 - 3 = -3
    add(F_PINF,        F_PINF,        0, 0);   // inf - inf = NaN
    add(F_PINF,        F_NINF,        0, 0);   // inf - -inf = inf
    add(32'h4000_0000, F_QNAN,        0, 0);   // NaN operand
    add(32'h7F7F_FFFF, 32'hFF7F_FFFF, 0, 0);   // overflow to inf
    add(32'h0090_0000, 32'h0080_0001, 0, 0);   // difference below smallest normal -> 0
    add(32'h3EE0_971A, 32'h3D20_8A40, 0, 0);   // 0.43865 - 0.03919
    for (int i = 0; i < NRAND; i++) begin
      logic [31:0] x;
      x = rand_f32(-20, 0);
      if (i % 10 == 0) add(x, {x[31:8], 8'($urandom)}, 1'($urandom), 1'($urandom));
      else if (i % 10 == 1) add(rand_f32(-126, -120), rand_f32(-126, -120), 1'($urandom), 1'($urandom));
      else if (i % 10 == 2) add(rand_f32(120, 127), rand_f32(120, 127), 1'($urandom), 1'($urandom));
      else add(rand_f32(-10, 10), rand_f32(-10, 10), 1'($urandom), 1'($urandom));
    end
    nv = va.size();
  end

  // operand drivers: valid is held until taken
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rstn) begin
      if (av && ar) begin
        ia = ia + 1;
        acc_cyc.push_back(cyc);
        checks++;
        if (!(bv && br)) begin failures++; $display("FAIL join: A taken without B"); end
      end
      if (bv && br) ib = ib + 1;
      if (!(av && !ar)) begin
        av <= (ia < nv) && (ia < PH1 || ($urandom % 4 != 0));
        if (ia < nv) a <= '{data: va[ia], last: la[ia]};
      end
      if (!(bv && !br)) begin
        bv <= (ib < nv) && (ib < PH1 || ($urandom % 3 != 0));
        if (ib < nv) b <= '{data: vb[ib], last: lb[ib]};
      end
    end
  end

  // result monitor with random backpressure after the first phase
  always @(posedge clk) begin
    if (rstn) begin
      if (rv && !rr) stalls++;
      if (rv && rr) begin
        logic [31:0] e;
        e = ref_op(va[io], vb[io]);
        checks++;
        if (r.data !== e || r.last !== (la[io] & lb[io])) begin
          failures++;
          if (failures < 10)
            $display("FAIL #%0d: %h op %h -> %h/%0d, expected %h/%0d", io, va[io], vb[io],
                     r.data, r.last, e, la[io] & lb[io]);
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
      rr <= (io < PH1) || ($urandom % 3 != 0);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rstn <= 1'b1;
    wait (nv > 0 && io == nv);
    repeat (2) @(posedge clk);
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL: backpressure never exercised"); end
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
