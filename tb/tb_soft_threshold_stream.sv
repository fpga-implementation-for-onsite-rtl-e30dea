// tb_soft_threshold_stream -- self-checking testbench for soft_threshold_stream.
//
// Runs FRAMES frames of N (reduced from 46848 to keep the run short) samples through
// the core.  Each output is compared with sign(x) * max(0, |x| - 0.00015) computed
// with real (double) arithmetic and rounded to single precision once, as the C
// reference does.  Samples cover values near the threshold (a few ulps either
// side), zeros of both signs, small negatives (which must give -0), subnormals,
// infinities, NaN and random magnitudes from 2^-20 to 2^4.  Input TLAST is random
// and must be ignored: output TLAST must mark every N-th sample.  Frame 0 is sent
// with no gaps and no backpressure: its first sample must come out 15 clocks after
// it was taken and the whole frame must pass in N + 15 clocks (first input taken to
// last output taken, both counted).  Later frames use random gaps and backpressure.
module tb_soft_threshold_stream;
  import gpr_pkg::*;
  import tb_fp_pkg::*;

  localparam int N      = 1000;
  localparam int LAT    = 15;
  localparam int FRAMES = 4;

  logic clk = 1'b0, rstn = 1'b0;
  always #5 clk = ~clk;

  logic       iv = 0, ir, ov, orr = 0;
  axis_beat_t din = '0, dout;

  soft_threshold_stream #(.N_SAMPLES(N)) dut (
    .ap_clk(clk), .ap_rst_n(rstn),
    .target_in_tvalid(iv), .target_in_tready(ir), .target_in(din),
    .target_out_tvalid(ov), .target_out_tready(orr), .target_out(dout)
  );

  int checks = 0, failures = 0;
  logic [31:0] vx[$];
  int          acc_cyc[$];
  int          cyc = 0;
  int          ii = 0, io = 0, nv = 0;
  int          n_pos = 0, n_neg = 0, n_cut = 0, n_stall = 0;

  function automatic logic [31:0] ref_shrink(input logic [31:0] x);
    real d;
    logic [31:0] n;
    if (is_nan(x) || x[30:0] == 0) return 32'h0;
    d = (x[31] ? -f2r(x) : f2r(x)) - 0.00015;
    n = (d > 0.0) ? r2f(d) : 32'h0;
    return {x[31], n[30:0]};
  endfunction

  initial begin
    logic [31:0] th;
    th = r2f(0.00015);
    for (int f = 0; f < FRAMES; f++)
      for (int i = 0; i < N; i++) begin
        case ($urandom % 8)
          0: vx.push_back({1'($urandom), th[30:0] + 31'($urandom % 9) - 31'd4});
          1: vx.push_back(rand_f32(-14, -12));
          2: vx.push_back(rand_f32(-20, 4));
          3: vx.push_back(rand_f32(-16, -10));
          4: case ($urandom % 6)
               0: vx.push_back(32'h0000_0000);
               1: vx.push_back(32'h8000_0000);
               2: vx.push_back({1'($urandom), 8'h00, 23'($urandom)});
               3: vx.push_back({1'($urandom), 31'h7F80_0000});
               4: vx.push_back(F_QNAN);
               default: vx.push_back({1'b1, th[30:0] - 31'd1});
             endcase
          default: vx.push_back(rand_f32(-13, 0));
        endcase
      end
    nv = vx.size();
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rstn) begin
      if (iv && ir) begin ii = ii + 1; acc_cyc.push_back(cyc); end
      if (!(iv && !ir)) begin
        iv <= (ii < nv) && (ii < N || ($urandom % 4 != 0));
        if (ii < nv) din <= '{data: vx[ii], last: 1'($urandom)};
      end
    end
  end

  always @(posedge clk) begin
    if (rstn) begin
      if (ov && !orr) n_stall++;
      if (ov && orr) begin
        logic [31:0] e;
        e = ref_shrink(vx[io]);
        checks++;
        if (dout.data !== e || dout.last !== ((io % N) == N - 1)) begin
          failures++;
          if (failures < 10)
            $display("FAIL #%0d: x=%h -> %h/%0d, expected %h/%0d", io, vx[io], dout.data,
                     dout.last, e, (io % N) == N - 1);
        end
        if (e[30:0] == 0) n_cut++;
        else if (e[31]) n_neg++;
        else n_pos++;
        if (io == 0) begin
          checks++;
          if (cyc - acc_cyc[0] != LAT) begin
            failures++; $display("FAIL latency: %0d clocks", cyc - acc_cyc[0]);
          end
        end
        if (io == N - 1) begin
          checks++;
          if (cyc - acc_cyc[0] + 1 != N + LAT) begin
            failures++; $display("FAIL frame time: %0d clocks, expected %0d", cyc - acc_cyc[0] + 1, N + LAT);
          end
        end
        io = io + 1;
      end
      orr <= (io < N) || ($urandom % 3 != 0);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rstn <= 1'b1;
    wait (nv > 0 && io == nv);
    repeat (2) @(posedge clk);
    checks++;
    if (n_pos == 0 || n_neg == 0 || n_cut == 0 || n_stall == 0) begin
      failures++;
      $display("FAIL: case not reached pos=%0d neg=%0d cut=%0d stall=%0d", n_pos, n_neg, n_cut, n_stall);
    end
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
