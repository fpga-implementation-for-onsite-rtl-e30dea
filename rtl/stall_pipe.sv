// stall_pipe -- fixed-latency pipeline with a ready/valid handshake on both ends.
//
// A word accepted on the input (in_valid && in_ready at a rising clock edge) is
// presented on the output DEPTH edges later.  The pipeline advances as a whole:
// every stage moves one place whenever the last stage is empty or its word is being
// taken (out_ready), and freezes otherwise, so backpressure from the consumer stalls
// it without losing or duplicating a word.  in_ready is that advance condition and
// so does not depend on in_valid.  With no stall, a new word can enter every clock.
// Valid bits are cleared by the active-low synchronous reset; data registers are
// not reset.
module stall_pipe #(
  parameter int unsigned W     = 33,
  parameter int unsigned DEPTH = 9
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);
  logic [DEPTH-1:0] vld;
  logic [W-1:0]     stage [DEPTH];
  logic             adv;

  assign adv       = !vld[DEPTH-1] || out_ready;
  assign in_ready  = adv;
  assign out_valid = vld[DEPTH-1];
  assign out_data  = stage[DEPTH-1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vld <= '0;
    end else if (adv) begin
      vld[0] <= in_valid;
      for (int i = 1; i < int'(DEPTH); i++) vld[i] <= vld[i-1];
    end
  end

  always_ff @(posedge clk) begin
    if (adv) begin
      stage[0] <= in_data;
      for (int i = 1; i < int'(DEPTH); i++) stage[i] <= stage[i-1];
    end
  end

  // a presented word must stay until it is taken
  property p_hold;
    @(posedge clk) disable iff (!rst_n) out_valid && !out_ready |=> out_valid && $stable(out_data);
  endproperty
  a_hold: assert property (p_hold);

endmodule
