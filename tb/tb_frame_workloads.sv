// tb_frame_workloads: pushes whole frames of the evaluated sizes (500x500,
// 1000x1000, 2000x2000 and 4000x4000 pixels) through the preprocessing kernel
// and measures its clock count per frame.
//
// Each frame is cut into 128x128 subframes overlapped by 3 pixels (16, 64, 256
// and 1024 subframes) and normalized in kernel calls of six subframes, the
// batch size of the inference engine that consumes them. Pixels come from a
// fixed hash of (frame, row, column), so the reference never needs the frame
// in memory; one batch at a time is copied into the memory model, run, and
// every output byte compared with the integer reference. Memory never stalls,
// so each call must finish within 512 clocks per subframe plus 200.
// The clocks per frame are printed together with the time at 333 MHz.
module tb_frame_workloads;
  import opir_pkg::*;
  import opir_ref_pkg::*;

  localparam int S = SUBFRAME, D = OVERLAP, BATCH = 6, SUB_ELEMS = S * S;
  localparam longint SRC = 64'h0000_0000_3000_0000;
  localparam longint DST = 64'h0000_0000_5000_0000;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  logic        c_awvalid, c_awready, c_wvalid, c_wready, c_bvalid;
  logic        c_arvalid, c_arready, c_rvalid;
  logic [7:0]  c_awaddr, c_araddr;
  logic [31:0] c_wdata, c_rdata;
  logic [1:0]  c_bresp, c_rresp;
  logic        irq;
  logic                    awvalid, awready, wvalid, wready, wlast, bvalid, bready;
  logic                    arvalid, arready, rvalid, rready, rlast;
  logic [AXI_ADDR_W-1:0]   awaddr, araddr;
  logic [7:0]              awlen, arlen;
  logic [2:0]              awsize, arsize, awprot, arprot;
  logic [1:0]              awburst, arburst, bresp, rresp;
  logic [3:0]              awcache, arcache;
  logic [AXI_DATA_W-1:0]   wdata, rdata;
  logic [AXI_DATA_W/8-1:0] wstrb;

  int checks = 0, failures = 0;

  opir_preproc_kernel dut (
    .ap_clk(clk), .ap_rst_n(rst_n), .irq,
    .s_axi_control_awvalid(c_awvalid), .s_axi_control_awready(c_awready),
    .s_axi_control_awaddr(c_awaddr), .s_axi_control_wvalid(c_wvalid),
    .s_axi_control_wready(c_wready), .s_axi_control_wdata(c_wdata),
    .s_axi_control_wstrb(4'hF), .s_axi_control_bvalid(c_bvalid),
    .s_axi_control_bready(1'b1), .s_axi_control_bresp(c_bresp),
    .s_axi_control_arvalid(c_arvalid), .s_axi_control_arready(c_arready),
    .s_axi_control_araddr(c_araddr), .s_axi_control_rvalid(c_rvalid),
    .s_axi_control_rready(1'b1), .s_axi_control_rdata(c_rdata),
    .s_axi_control_rresp(c_rresp),
    .m_axi_gmem_awvalid(awvalid), .m_axi_gmem_awready(awready),
    .m_axi_gmem_awaddr(awaddr), .m_axi_gmem_awlen(awlen),
    .m_axi_gmem_awsize(awsize), .m_axi_gmem_awburst(awburst),
    .m_axi_gmem_awcache(awcache), .m_axi_gmem_awprot(awprot),
    .m_axi_gmem_wvalid(wvalid), .m_axi_gmem_wready(wready),
    .m_axi_gmem_wdata(wdata), .m_axi_gmem_wstrb(wstrb), .m_axi_gmem_wlast(wlast),
    .m_axi_gmem_bvalid(bvalid), .m_axi_gmem_bready(bready), .m_axi_gmem_bresp(bresp),
    .m_axi_gmem_arvalid(arvalid), .m_axi_gmem_arready(arready),
    .m_axi_gmem_araddr(araddr), .m_axi_gmem_arlen(arlen),
    .m_axi_gmem_arsize(arsize), .m_axi_gmem_arburst(arburst),
    .m_axi_gmem_arcache(arcache), .m_axi_gmem_arprot(arprot),
    .m_axi_gmem_rvalid(rvalid), .m_axi_gmem_rready(rready),
    .m_axi_gmem_rdata(rdata), .m_axi_gmem_rresp(rresp), .m_axi_gmem_rlast(rlast)
  );

  axi_mem_model #(.AW(AXI_ADDR_W), .DW(AXI_DATA_W), .READY_PCT(100)) mem (
    .clk, .rst_n,
    .awvalid, .awready, .awaddr, .awlen, .awsize, .awburst,
    .wvalid, .wready, .wdata, .wstrb, .wlast, .bvalid, .bready, .bresp,
    .arvalid, .arready, .araddr, .arlen, .arsize, .arburst,
    .rvalid, .rready, .rdata, .rresp, .rlast);

  initial begin
    #2000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit aw_acc, w_acc;
  always @(posedge clk) begin
    if (c_awvalid && c_awready) aw_acc = 1;
    if (c_wvalid && c_wready)   w_acc = 1;
  end

  task automatic reg_wr(logic [7:0] a, logic [31:0] d);
    aw_acc = 0; w_acc = 0;
    @(negedge clk);
    c_awvalid = 1; c_awaddr = a; c_wvalid = 1; c_wdata = d;
    while (!(aw_acc && w_acc)) begin
      @(negedge clk);
      if (aw_acc) c_awvalid = 0;
      if (w_acc)  c_wvalid = 0;
    end
    while (!c_bvalid) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic reg_rd(logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    c_arvalid = 1; c_araddr = a;
    do @(posedge clk); while (!c_arready);
    @(negedge clk);
    c_arvalid = 0;
    while (!c_rvalid) @(negedge clk);
    d = c_rdata;
    @(negedge clk);
  endtask

  // Deterministic pixel: smooth ramp, hashed noise, sparse bright targets.
  function automatic logic [15:0] pixel(int f, int r, int c);
    int unsigned h;
    h = (32'(r) * 32'h9E3779B1) ^ (32'(c) * 32'h85EBCA77) ^ (32'(f) * 32'hC2B2AE3D);
    h ^= h >> 15;
    h *= 32'h2C1B3C6D;
    h ^= h >> 12;
    if (h % 4001 == 0) return 16'd62000;
    return 16'(8000 + (r * 7 + c * 5) % 9000 + int'(h % 600));
  endfunction

  norm_cfg_t cfg;

  task automatic run_frame(int fsz);
    int n, nsub, origin_r, origin_c, first, cnt, t_call, t_frame;
    logic [31:0] st;
    logic [AXI_DATA_W-1:0] w;
    n = (fsz - S + (S - D) - 1) / (S - D) + 1;
    nsub = n * n;
    checks++;
    if (nsub != subframes_per_frame(fsz)) failures++;
    t_frame = 0;
    for (first = 0; first < nsub; first += BATCH) begin
      cnt = (nsub - first < BATCH) ? nsub - first : BATCH;
      // host side: copy this batch's subframes into the source buffer
      for (int k = 0; k < cnt; k++) begin
        origin_r = ((first + k) / n) * (S - D); if (origin_r > fsz - S) origin_r = fsz - S;
        origin_c = ((first + k) % n) * (S - D); if (origin_c > fsz - S) origin_c = fsz - S;
        for (int e = 0; e < SUB_ELEMS; e += LANES) begin
          for (int l = 0; l < LANES; l++)
            w[l*16 +: 16] = pixel(fsz, origin_r + (e + l) / S, origin_c + (e + l) % S);
          mem.poke(SRC + longint'(k * SUB_ELEMS + e) * 2, w);
        end
      end
      reg_wr(REG_NELEM, 32'(cnt * SUB_ELEMS));
      t_call = int'($time / 10);
      reg_wr(REG_CTRL, 32'h1);
      while (!irq) @(negedge clk);
      t_call = int'($time / 10) - t_call;
      t_frame += t_call;
      checks++;
      if (t_call > cnt * 512 + 200) begin
        failures++; $display("F=%0d batch at %0d: %0d clocks", fsz, first, t_call);
      end
      reg_rd(REG_CTRL, st);
      checks++; if (st[3:1] != 3'b011) failures++;
      // check the batch
      for (int k = 0; k < cnt; k++) begin
        origin_r = ((first + k) / n) * (S - D); if (origin_r > fsz - S) origin_r = fsz - S;
        origin_c = ((first + k) % n) * (S - D); if (origin_c > fsz - S) origin_c = fsz - S;
        for (int e = 0; e < SUB_ELEMS; e += 2 * LANES) begin
          bit bad = 0;
          w = mem.peek(DST + longint'(k * SUB_ELEMS + e));
          for (int l = 0; l < 2 * LANES; l++)
            if (int'($signed(w[l*8 +: 8])) != ref_norm(int'(pixel(fsz, origin_r + (e + l) / S, origin_c + (e + l) % S)),
                                                       int'(cfg.mean), longint'(cfg.inv_std), int'(cfg.fix_pos)))
              bad = 1;
          checks++;
          if (bad) begin
            failures++;
            if (failures < 5) $display("F=%0d subframe %0d word %0d wrong", fsz, first + k, e / 64);
          end
        end
      end
    end
    $display("frame %0dx%0d: %0d subframes, %0d kernel calls, %0d kernel clocks = %0d us at 333 MHz",
             fsz, fsz, nsub, (nsub + BATCH - 1) / BATCH, t_frame, t_frame / 333);
  endtask

  initial begin
    rst_n = 0; c_awvalid = 0; c_wvalid = 0; c_arvalid = 0; c_awaddr = 0; c_araddr = 0; c_wdata = 0;
    cfg = '{mean: 16'd12500, inv_std: 24'(1048576 / 3000), fix_pos: 4'd5};
    repeat (4) @(negedge clk);
    rst_n = 1;
    reg_wr(REG_IER, 32'h1);
    reg_wr(REG_SRC_LO, SRC[31:0]); reg_wr(REG_SRC_HI, SRC[63:32]);
    reg_wr(REG_DST_LO, DST[31:0]); reg_wr(REG_DST_HI, DST[63:32]);
    reg_wr(REG_MEAN, 32'(cfg.mean));
    reg_wr(REG_INVSTD, 32'(cfg.inv_std));
    reg_wr(REG_FIXPOS, 32'(cfg.fix_pos));
    run_frame(500);
    run_frame(1000);
    run_frame(2000);
    run_frame(4000);
    checks++; if (mem.proto_errors != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
