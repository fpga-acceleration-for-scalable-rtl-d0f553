// preproc_norm_vector: LANES normalization lanes side by side, behind a
// valid/ready stream interface.
//
// The published kernel processes 32 elements at once in parallel streams; here
// those are LANES copies of preproc_norm_lane sharing one stall signal. An input
// beat is one AXI read word holding LANES raw pixels, element 0 in the least
// significant bits; an output beat holds LANES INT8 results in the same order.
//
// Timing: latency LAT = 3 cycles, throughput one beat per cycle. The pipeline
// advances whenever its last stage is empty or being taken (en = !out_valid ||
// out_ready), so a stall downstream freezes every stage and nothing is lost.
// in_ready equals en. rst_n is synchronous and active low. The stall scheme,
// the reset and the valid/ready protocol are this
// design's choice.
module preproc_norm_vector
  import opir_pkg::*;
#(
  parameter int unsigned N  = LANES,
  parameter int unsigned PW = PIX_W,
  parameter int unsigned OW = OUT_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  norm_cfg_t       cfg,
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [N*PW-1:0] in_data,
  output logic            out_valid,
  input  logic            out_ready,
  output logic [N*OW-1:0] out_data
);
  localparam int unsigned LAT = 3;

  logic           en;
  logic [LAT-1:0] vld;

  assign en        = !vld[LAT-1] || out_ready;
  assign in_ready  = en;
  assign out_valid = vld[LAT-1];

  always_ff @(posedge clk) begin
    if (!rst_n)  vld <= '0;
    else if (en) vld <= {vld[LAT-2:0], in_valid};
  end

  for (genvar i = 0; i < N; i++) begin : g_lane
    logic signed [OW-1:0] y;
    preproc_norm_lane #(.PW(PW), .OW(OW)) u_lane (
      .clk     (clk),
      .en      (en),
      .x       (in_data[i*PW +: PW]),
      .mean    (cfg.mean[PW-1:0]),
      .inv_std (cfg.inv_std),
      .fix_pos (cfg.fix_pos),
      .y       (y)
    );
    assign out_data[i*OW +: OW] = y;
  end

  // A beat offered downstream stays until it is taken.
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
