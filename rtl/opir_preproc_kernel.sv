// opir_preproc_kernel: programmable-logic preprocessing kernel of a batched
// OPIR (overhead persistent infrared) target-detection pipeline.
//
// Large infrared frames are cut by software into overlapping 128x128 subframes
// that a quantized segmentation network processes in batches. Before inference
// every raw 16-bit pixel must become the network's INT8 input:
//   y = saturate_int8(round((x - mean) * inv_std * 2^fix_pos)).
// This kernel does that for a whole batch buffer in DDR: it reads the raw
// pixels through its AXI4 master, normalizes LANES = 32 pixels per clock and
// writes the INT8 results back through the same master. The 16-bit input, the
// INT8 output, the 32-wide parallelism, the single AXI master and the three
// normalization steps follow the published design; the fixed-point arithmetic,
// the burst scheme, the 512-bit data width and the register map are this
// design's choices.
//
// Structure: preproc_ctrl (AXI4-Lite registers) -> preproc_axi_rd (reads)
// -> preproc_norm_vector (32 x preproc_norm_lane) -> preproc_pack (two INT8
// vectors per 512-bit word) -> preproc_axi_wr (writes).
//
// Timing: after start the read and write engines run concurrently. In steady
// state one 512-bit input beat (32 pixels) is consumed per clock, so a 128x128
// subframe takes 512 clocks plus fill and drain; 64 output bytes leave every
// second clock. CTRL.done is set after the last write response. n_elem must be
// a multiple of 64 and both buffers 64-byte aligned. ap_rst_n is synchronous.
module opir_preproc_kernel
  import opir_pkg::*;
#(
  parameter int unsigned BURST   = 16,   // max AXI burst, beats
  parameter int unsigned MAX_OUT = 4     // bursts in flight per direction
) (
  input  logic                    ap_clk,
  input  logic                    ap_rst_n,
  output logic                    irq,
  // AXI4-Lite control
  input  logic                    s_axi_control_awvalid,
  output logic                    s_axi_control_awready,
  input  logic [7:0]              s_axi_control_awaddr,
  input  logic                    s_axi_control_wvalid,
  output logic                    s_axi_control_wready,
  input  logic [31:0]             s_axi_control_wdata,
  input  logic [3:0]              s_axi_control_wstrb,
  output logic                    s_axi_control_bvalid,
  input  logic                    s_axi_control_bready,
  output logic [1:0]              s_axi_control_bresp,
  input  logic                    s_axi_control_arvalid,
  output logic                    s_axi_control_arready,
  input  logic [7:0]              s_axi_control_araddr,
  output logic                    s_axi_control_rvalid,
  input  logic                    s_axi_control_rready,
  output logic [31:0]             s_axi_control_rdata,
  output logic [1:0]              s_axi_control_rresp,
  // AXI4 master to DDR through the NoC
  output logic                    m_axi_gmem_awvalid,
  input  logic                    m_axi_gmem_awready,
  output logic [AXI_ADDR_W-1:0]   m_axi_gmem_awaddr,
  output logic [7:0]              m_axi_gmem_awlen,
  output logic [2:0]              m_axi_gmem_awsize,
  output logic [1:0]              m_axi_gmem_awburst,
  output logic [3:0]              m_axi_gmem_awcache,
  output logic [2:0]              m_axi_gmem_awprot,
  output logic                    m_axi_gmem_wvalid,
  input  logic                    m_axi_gmem_wready,
  output logic [AXI_DATA_W-1:0]   m_axi_gmem_wdata,
  output logic [AXI_DATA_W/8-1:0] m_axi_gmem_wstrb,
  output logic                    m_axi_gmem_wlast,
  input  logic                    m_axi_gmem_bvalid,
  output logic                    m_axi_gmem_bready,
  input  logic [1:0]              m_axi_gmem_bresp,
  output logic                    m_axi_gmem_arvalid,
  input  logic                    m_axi_gmem_arready,
  output logic [AXI_ADDR_W-1:0]   m_axi_gmem_araddr,
  output logic [7:0]              m_axi_gmem_arlen,
  output logic [2:0]              m_axi_gmem_arsize,
  output logic [1:0]              m_axi_gmem_arburst,
  output logic [3:0]              m_axi_gmem_arcache,
  output logic [2:0]              m_axi_gmem_arprot,
  input  logic                    m_axi_gmem_rvalid,
  output logic                    m_axi_gmem_rready,
  input  logic [AXI_DATA_W-1:0]   m_axi_gmem_rdata,
  input  logic [1:0]              m_axi_gmem_rresp,
  input  logic                    m_axi_gmem_rlast
);
  localparam int unsigned VW = LANES * OUT_W;   // one INT8 vector, 256 bits

  job_t             job;
  logic             start, busy, done, err;
  logic             rd_busy, rd_err, wr_busy, wr_done, wr_err;
  logic             wr_started;
  logic [LEN_W-1:0] rd_beats, wr_beats;

  // stream links
  logic                  raw_valid, raw_ready;
  logic [AXI_DATA_W-1:0] raw_data;
  logic                  nv_valid, nv_ready;
  logic [VW-1:0]         nv_data;
  logic                  pk_valid, pk_ready;
  logic [AXI_DATA_W-1:0] pk_data;

  // The job registers are copied on `start`; the engines load one cycle later.
  logic start_d;
  always_ff @(posedge ap_clk) begin
    if (!ap_rst_n) start_d <= 1'b0;
    else           start_d <= start;
  end

  assign rd_beats = job.n_elem / LEN_W'(LANES);
  assign wr_beats = job.n_elem / LEN_W'(2 * LANES);
  assign busy     = start_d || rd_busy || wr_busy || wr_started;
  assign done     = wr_done;
  assign err      = wr_done && (rd_err || wr_err);   // reported with done

  // Marks the kernel busy until the write engine reports done.
  always_ff @(posedge ap_clk) begin
    if (!ap_rst_n)    wr_started <= 1'b0;
    else if (start_d) wr_started <= 1'b1;
    else if (wr_done) wr_started <= 1'b0;
  end

  preproc_ctrl u_ctrl (
    .clk     (ap_clk),
    .rst_n   (ap_rst_n),
    .awvalid (s_axi_control_awvalid),
    .awready (s_axi_control_awready),
    .awaddr  (s_axi_control_awaddr),
    .wvalid  (s_axi_control_wvalid),
    .wready  (s_axi_control_wready),
    .wdata   (s_axi_control_wdata),
    .wstrb   (s_axi_control_wstrb),
    .bvalid  (s_axi_control_bvalid),
    .bready  (s_axi_control_bready),
    .bresp   (s_axi_control_bresp),
    .arvalid (s_axi_control_arvalid),
    .arready (s_axi_control_arready),
    .araddr  (s_axi_control_araddr),
    .rvalid  (s_axi_control_rvalid),
    .rready  (s_axi_control_rready),
    .rdata   (s_axi_control_rdata),
    .rresp   (s_axi_control_rresp),
    .job     (job),
    .start   (start),
    .busy    (busy),
    .done_in (done),
    .err_in  (err),
    .irq     (irq)
  );

  preproc_axi_rd #(
    .AW(AXI_ADDR_W), .DW(AXI_DATA_W), .NW(LEN_W), .BURST(BURST), .MAX_OUT(MAX_OUT)
  ) u_rd (
    .clk       (ap_clk),
    .rst_n     (ap_rst_n),
    .start     (start_d),
    .base      (job.src_addr),
    .n_beats   (rd_beats),
    .busy      (rd_busy),
    .done      (),           // the job ends on the write side
    .err       (rd_err),
    .arvalid   (m_axi_gmem_arvalid),
    .arready   (m_axi_gmem_arready),
    .araddr    (m_axi_gmem_araddr),
    .arlen     (m_axi_gmem_arlen),
    .arsize    (m_axi_gmem_arsize),
    .arburst   (m_axi_gmem_arburst),
    .arcache   (m_axi_gmem_arcache),
    .arprot    (m_axi_gmem_arprot),
    .rvalid    (m_axi_gmem_rvalid),
    .rready    (m_axi_gmem_rready),
    .rdata     (m_axi_gmem_rdata),
    .rresp     (m_axi_gmem_rresp),
    .rlast     (m_axi_gmem_rlast),
    .out_valid (raw_valid),
    .out_ready (raw_ready),
    .out_data  (raw_data)
  );

  preproc_norm_vector u_norm (
    .clk       (ap_clk),
    .rst_n     (ap_rst_n),
    .cfg       (job.norm),
    .in_valid  (raw_valid),
    .in_ready  (raw_ready),
    .in_data   (raw_data),
    .out_valid (nv_valid),
    .out_ready (nv_ready),
    .out_data  (nv_data)
  );

  preproc_pack #(.IW(VW)) u_pack (
    .clk       (ap_clk),
    .rst_n     (ap_rst_n),
    .in_valid  (nv_valid),
    .in_ready  (nv_ready),
    .in_data   (nv_data),
    .out_valid (pk_valid),
    .out_ready (pk_ready),
    .out_data  (pk_data)
  );

  preproc_axi_wr #(
    .AW(AXI_ADDR_W), .DW(AXI_DATA_W), .NW(LEN_W), .BURST(BURST), .MAX_OUT(MAX_OUT)
  ) u_wr (
    .clk      (ap_clk),
    .rst_n    (ap_rst_n),
    .start    (start_d),
    .base     (job.dst_addr),
    .n_beats  (wr_beats),
    .busy     (wr_busy),
    .done     (wr_done),
    .err      (wr_err),
    .in_valid (pk_valid),
    .in_ready (pk_ready),
    .in_data  (pk_data),
    .awvalid  (m_axi_gmem_awvalid),
    .awready  (m_axi_gmem_awready),
    .awaddr   (m_axi_gmem_awaddr),
    .awlen    (m_axi_gmem_awlen),
    .awsize   (m_axi_gmem_awsize),
    .awburst  (m_axi_gmem_awburst),
    .awcache  (m_axi_gmem_awcache),
    .awprot   (m_axi_gmem_awprot),
    .wvalid   (m_axi_gmem_wvalid),
    .wready   (m_axi_gmem_wready),
    .wdata    (m_axi_gmem_wdata),
    .wstrb    (m_axi_gmem_wstrb),
    .wlast    (m_axi_gmem_wlast),
    .bvalid   (m_axi_gmem_bvalid),
    .bready   (m_axi_gmem_bready),
    .bresp    (m_axi_gmem_bresp)
  );

endmodule
