// preproc_pack: joins two consecutive INT8 result vectors into one AXI word.
//
// The normalization datapath emits LANES signed bytes per beat (256 bits for 32
// lanes) while the kernel's single AXI master is as wide as one raw input beat
// (512 bits). This block stores the first vector and, when the second arrives,
// emits {second, first}, so byte k of the output word is element k of the
// stream. Output therefore runs at half the input beat rate, exactly matching
// the halved byte count. Sharing one AXI master between reads and writes follows
// the published kernel; the packing is this design's consequence of that.
//
// Timing: valid/ready on both sides, one register stage; the output word
// appears the cycle after the second half is accepted. rst_n is synchronous,
// active low.
module preproc_pack #(
  parameter int unsigned IW = 256
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [IW-1:0] in_data,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [2*IW-1:0] out_data
);
  logic          have_lo;
  logic [IW-1:0] lo_q;
  logic          in_fire, out_fire;

  assign in_ready = !have_lo || !out_valid || out_ready;
  assign in_fire  = in_valid && in_ready;
  assign out_fire = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      have_lo   <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      if (out_fire) out_valid <= 1'b0;
      if (in_fire) begin
        if (!have_lo) begin
          have_lo <= 1'b1;
        end else begin
          have_lo   <= 1'b0;
          out_valid <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_fire && !have_lo) lo_q <= in_data;
    if (in_fire && have_lo)  out_data <= {in_data, lo_q};
  end

endmodule
