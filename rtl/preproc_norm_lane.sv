// preproc_norm_lane: normalizes one raw pixel to the network's INT8 input.
//
// y = saturate_int8( round( (x - mean) * inv_std * 2^fix_pos ) )
//
// The three steps (subtract the normalization mean, multiply by the inverse
// standard deviation, apply the power-of-two gain chosen by quantization) are
// those of the published preprocessing kernel. This lane does them in fixed
// point, which is this design's choice: inv_std is unsigned with INV_FRAC
// fraction bits, the gain is a right shift by INV_FRAC - fix_pos, rounding is
// half up (towards +infinity on ties) and the result saturates to [-128, 127].
//
// Timing: three register stages (subtract, multiply, round/shift/saturate), so
// y belongs to the x presented three enabled cycles earlier. All stages advance
// together when en is high and hold when it is low. The constants travel down
// the pipeline with their pixel, so they may change on any beat. The datapath
// needs no reset.
module preproc_norm_lane
  import opir_pkg::*;
#(
  parameter int unsigned PW = PIX_W,
  parameter int unsigned IW = INV_W,
  parameter int unsigned IF = INV_FRAC,
  parameter int unsigned FW = FIXPOS_W,
  parameter int unsigned OW = OUT_W
) (
  input  logic                 clk,
  input  logic                 en,
  input  logic [PW-1:0]        x,
  input  logic [PW-1:0]        mean,
  input  logic [IW-1:0]        inv_std,
  input  logic [FW-1:0]        fix_pos,
  output logic signed [OW-1:0] y
);
  localparam int unsigned DW = PW + 1;        // signed difference
  localparam int unsigned MW = DW + IW + 1;   // signed product

  logic signed [DW-1:0] diff_q;
  logic signed [MW-1:0] prod_q;
  logic [IW-1:0]        inv_q1;
  logic [FW-1:0]        fix_q1, fix_q2;

  // Stage 1: subtract the mean.
  always_ff @(posedge clk) begin
    if (en) begin
      diff_q <= $signed({1'b0, x}) - $signed({1'b0, mean});
      inv_q1 <= inv_std;
      fix_q1 <= fix_pos;
    end
  end

  // Stage 2: scale by the inverse standard deviation.
  always_ff @(posedge clk) begin
    if (en) begin
      prod_q <= MW'(diff_q) * $signed({1'b0, inv_q1});
      fix_q2 <= fix_q1;
    end
  end

  // Stage 3: power-of-two gain, round half up, saturate.
  logic signed [MW-1:0] rounded, shifted;
  int unsigned          sh;
  logic signed [OW-1:0] sat;
  always_comb begin
    sh = (int'(fix_q2) >= int'(IF)) ? 0 : IF - int'(fix_q2);
    if (sh == 0) rounded = prod_q;
    else         rounded = prod_q + (MW'(1) <<< (sh - 1));
    shifted = rounded >>> sh;
    if (shifted > MW'(2 ** (OW - 1) - 1))
      sat = {1'b0, {(OW-1){1'b1}}};
    else if (shifted < -MW'(2 ** (OW - 1)))
      sat = {1'b1, {(OW-1){1'b0}}};
    else
      sat = shifted[OW-1:0];
  end

  always_ff @(posedge clk) begin
    if (en) y <= sat;
  end

endmodule
