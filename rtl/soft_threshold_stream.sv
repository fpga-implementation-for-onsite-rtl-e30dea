// soft_threshold_stream -- AXI-Stream shrinkage core of the RNMF target update.
//
// For every sample x of the target image it computes
//     y = sign(x) * max(0, |x| - THRESHOLD),      THRESHOLD = 0.00015,
// the soft-threshold step that follows T = X - W*H and keeps only target energy
// above the threshold.  It takes one 32-bit float per clock on target_in and
// returns the result LATENCY (= 15) clocks later on target_out, so a whole image of
// N_SAMPLES (= 46848) samples passes in N_SAMPLES + LATENCY clocks when nothing
// stalls.  Backpressure on target_out stalls the pipeline without losing samples.
//
// Arithmetic, matching the C reference bit for bit: |x| is extended exactly to
// double precision, the double constant 0.00015 is subtracted in double precision,
// and the difference is rounded to single precision (round to nearest even).  A
// negative (or NaN) difference gives +0.  The sign step multiplies by -1, 0 or +1,
// which is exact and is done on the sign bit: a negative x gives the negated
// magnitude (so a small negative x gives -0.0), a positive x the magnitude, and
// x = +/-0 gives +0.  A NaN input gives +0; that choice is this design's own.
//
// Structure: an input register slice, the arithmetic, a stall_pipe of LATENCY - 2
// stages and an output register slice.  The two slices register TVALID, TDATA and
// TREADY on both stream ports, so neither port has a combinational path through the
// core; they count toward the 15-clock latency.
//
// TLAST on target_out is not copied from target_in: the core counts accepted
// samples and marks sample N_SAMPLES-1 of every frame, then starts over.  target_in
// TLAST is accepted and ignored.  The 15-clock latency and the counted TLAST follow
// the high-level-synthesis core this block re-implements; computing everything in
// the first stage and delaying the result is this implementation's choice.
module soft_threshold_stream
  import gpr_pkg::*;
#(
  parameter int unsigned    N_SAMPLES = IMG_SAMPLES,
  parameter int unsigned    LATENCY   = 15,
  parameter logic [63:0]    THRESHOLD = SHRINK_THRESHOLD
) (
  input  logic       ap_clk,
  input  logic       ap_rst_n,
  input  logic       target_in_tvalid,
  output logic       target_in_tready,
  input  axis_beat_t target_in,
  output logic       target_out_tvalid,
  input  logic       target_out_tready,
  output axis_beat_t target_out
);
  localparam int unsigned CW = (N_SAMPLES > 1) ? $clog2(N_SAMPLES) : 1;

  float32_t   x, mag32, norms32, a_x;
  float64_t   mag64, norms64;
  logic       x_neg, x_pos;
  axis_beat_t res;
  logic [CW-1:0] count;

  // input register slice
  logic       in_v, pipe_ready;
  axis_beat_t in_b;

  axis_reg_slice #(.W($bits(axis_beat_t))) u_in_slice (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .s_valid(target_in_tvalid), .s_ready(target_in_tready), .s_data(target_in),
    .m_valid(in_v), .m_ready(pipe_ready), .m_data(in_b)
  );

  assign x     = in_b.data;
  assign mag32 = {1'b0, x[30:0]};
  assign x_neg = x[31] && (x[30:0] != '0) && !(x[30:23] == 8'hFF && x[22:0] != '0);
  assign x_pos = !x[31] && (x[30:0] != '0) && !(x[30:23] == 8'hFF && x[22:0] != '0);

  fp_widen  #(.EWI(SP_EW), .MWI(SP_MW), .EWO(DP_EW), .MWO(DP_MW)) u_ext (.a(mag32), .y(mag64));
  fp_addsub #(.EW(DP_EW), .MW(DP_MW)) u_sub (.a(mag64), .b(THRESHOLD), .sub(1'b1), .y(norms64));
  fp_narrow #(.EWI(DP_EW), .MWI(DP_MW), .EWO(SP_EW), .MWO(SP_MW)) u_trunc (.a(norms64), .y(norms32));

  // max(0, norms): a negative difference, -0 or NaN gives +0
  always_comb begin
    if (norms32[31] || (norms32[30:23] == 8'hFF && norms32[22:0] != '0)) a_x = '0;
    else                                                                 a_x = norms32;
  end

  always_comb begin
    if (x_neg)      res.data = {1'b1, a_x[30:0]};
    else if (x_pos) res.data = a_x;
    else            res.data = '0;
    res.last = (count == CW'(N_SAMPLES - 1));
  end

  always_ff @(posedge ap_clk) begin
    if (!ap_rst_n)                 count <= '0;
    else if (in_v && pipe_ready)   count <= res.last ? '0 : count + 1'b1;
  end

  logic       out_v, out_ready;
  axis_beat_t out_b;

  stall_pipe #(.W($bits(axis_beat_t)), .DEPTH(LATENCY - 2)) u_pipe (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .in_valid(in_v), .in_ready(pipe_ready), .in_data(res),
    .out_valid(out_v), .out_ready(out_ready), .out_data(out_b)
  );

  // output register slice
  axis_reg_slice #(.W($bits(axis_beat_t))) u_out_slice (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .s_valid(out_v), .s_ready(out_ready), .s_data(out_b),
    .m_valid(target_out_tvalid), .m_ready(target_out_tready), .m_data(target_out)
  );

  initial assert (LATENCY >= 3) else $error("soft_threshold_stream: LATENCY must be at least 3");

endmodule
