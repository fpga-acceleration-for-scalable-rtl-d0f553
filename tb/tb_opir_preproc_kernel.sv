// tb_opir_preproc_kernel: end-to-end test of the preprocessing kernel at its
// default parameters, playing the part of the host software around it.
//
// A synthetic 500x500 16-bit infrared frame (smooth background, noise and a few
// bright point targets) is cut into 128x128 subframes overlapped by 3 pixels:
// ceil((500-128)/(128-3) + 1)^2 = 16 subframes, the last row and column of
// subframes clamped to the frame edge. The subframes are copied into memory
// and normalized in batches of six (the batch size of the inference engine),
// i.e. kernel calls of 6, 6 and 4 subframes, each started through the control
// registers. Every output byte is compared with the integer reference model.
//
// Mechanisms that must each occur at least once: a batch at full rate (memory
// never stalls; 6 subframes must finish within 6*512 + 200 clocks), read
// back-pressure from the datapath, write back-pressure from memory, a burst cut
// at a 4 KiB boundary, several read bursts in flight, a start queued while
// the kernel is busy, the interrupt, saturation to +127 and -128, and an error
// response reported in CTRL.
module tb_opir_preproc_kernel;
  import opir_pkg::*;
  import opir_ref_pkg::*;

  localparam int F = 500, S = SUBFRAME, D = OVERLAP, BATCH = 6;
  localparam int SUB_ELEMS = S * S;
  localparam longint SRC = 64'h0000_0000_1000_0040;   // not 4 KiB aligned
  localparam longint DST = 64'h0000_0000_2000_0000;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  // control
  logic        c_awvalid, c_awready, c_wvalid, c_wready, c_bvalid, c_bready;
  logic        c_arvalid, c_arready, c_rvalid, c_rready;
  logic [7:0]  c_awaddr, c_araddr;
  logic [31:0] c_wdata, c_rdata;
  logic [3:0]  c_wstrb;
  logic [1:0]  c_bresp, c_rresp;
  logic        irq;
  // memory
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
    .s_axi_control_wstrb(c_wstrb), .s_axi_control_bvalid(c_bvalid),
    .s_axi_control_bready(c_bready), .s_axi_control_bresp(c_bresp),
    .s_axi_control_arvalid(c_arvalid), .s_axi_control_arready(c_arready),
    .s_axi_control_araddr(c_araddr), .s_axi_control_rvalid(c_rvalid),
    .s_axi_control_rready(c_rready), .s_axi_control_rdata(c_rdata),
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
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- mechanisms
  int n_rd_backpressure = 0, n_wr_backpressure = 0, n_4k_split = 0;
  int n_queued_start = 0, n_irq = 0, n_sat_hi = 0, n_sat_lo = 0, n_err = 0, n_full_rate = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (rvalid && !rready) n_rd_backpressure++;
      if (wvalid && !wready) n_wr_backpressure++;
      if (arvalid && arready && arlen != 8'd15 && ((araddr + 64'((arlen + 1) * 64)) & 64'hFFF) == 0)
        n_4k_split++;
      if (irq) n_irq++;
    end
  end

  // ---------------------------------------------------------------- AXI-Lite
  bit aw_acc, w_acc;
  always @(posedge clk) begin
    if (c_awvalid && c_awready) aw_acc = 1;
    if (c_wvalid && c_wready)   w_acc = 1;
  end

  task automatic reg_wr(logic [7:0] a, logic [31:0] d);
    aw_acc = 0; w_acc = 0;
    @(negedge clk);
    c_awvalid = 1; c_awaddr = a; c_wvalid = 1; c_wdata = d; c_wstrb = 4'hF;
    while (!(aw_acc && w_acc)) begin
      @(negedge clk);
      if (aw_acc) c_awvalid = 0;
      if (w_acc)  c_wvalid = 0;
    end
    c_awvalid = 0; c_wvalid = 0;
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

  // ---------------------------------------------------------------- frame
  logic [15:0] frame [F][F];
  int          origin_r [$], origin_c [$];

  function automatic logic [15:0] pixel(int r, int c);
    int v;
    v = 9000 + 25 * r + 12 * c + int'($urandom_range(400));
    if ((r % 97 == 40) && (c % 113 == 60)) v = 60000;   // point targets
    if (r == 7 && c < 20) v = 0;                        // dead pixels
    return 16'(v);
  endfunction

  // Subframe origins: k*(S-D), the last one clamped to F-S.
  task automatic make_regions();
    int n = 1;
    if (F > S) n = (F - S + (S - D) - 1) / (S - D) + 1;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        origin_r.push_back((i * (S - D) > F - S) ? F - S : i * (S - D));
        origin_c.push_back((j * (S - D) > F - S) ? F - S : j * (S - D));
      end
  endtask

  // Raw subframe k sits at SRC + k*S*S*2, row-major, 32 pixels per word.
  task automatic load_subframe(int k);
    logic [AXI_DATA_W-1:0] w;
    for (int e = 0; e < SUB_ELEMS; e += LANES) begin
      for (int l = 0; l < LANES; l++)
        w[l*16 +: 16] = frame[origin_r[k] + (e + l) / S][origin_c[k] + (e + l) % S];
      mem.poke(SRC + longint'(k) * SUB_ELEMS * 2 + longint'(e) * 2, w);
    end
  endtask

  norm_cfg_t cfg;

  task automatic check_subframe(int k);
    logic [AXI_DATA_W-1:0] w;
    int e8, got, exp;
    for (int e = 0; e < SUB_ELEMS; e += 2 * LANES) begin
      w = mem.peek(DST + longint'(k) * SUB_ELEMS + longint'(e));
      for (int l = 0; l < 2 * LANES; l++) begin
        e8  = e + l;
        exp = ref_norm(int'(frame[origin_r[k] + e8 / S][origin_c[k] + e8 % S]),
                       int'(cfg.mean), longint'(cfg.inv_std), int'(cfg.fix_pos));
        got = int'($signed(w[l*8 +: 8]));
        checks++;
        if (got != exp) begin
          failures++;
          if (failures < 10) $display("subframe %0d elem %0d: got %0d exp %0d", k, e8, got, exp);
        end
        if (exp == 127)  n_sat_hi++;
        if (exp == -128) n_sat_lo++;
      end
    end
  endtask

  task automatic program_job(int first, int count);
    longint s = SRC + longint'(first) * SUB_ELEMS * 2;
    longint d = DST + longint'(first) * SUB_ELEMS;
    reg_wr(REG_SRC_LO, s[31:0]);  reg_wr(REG_SRC_HI, s[63:32]);
    reg_wr(REG_DST_LO, d[31:0]);  reg_wr(REG_DST_HI, d[63:32]);
    reg_wr(REG_NELEM, 32'(count * SUB_ELEMS));
    reg_wr(REG_MEAN, 32'(cfg.mean));
    reg_wr(REG_INVSTD, 32'(cfg.inv_std));
    reg_wr(REG_FIXPOS, 32'(cfg.fix_pos));
  endtask

  task automatic wait_done(output logic [31:0] st);
    do reg_rd(REG_CTRL, st); while (!st[1]);
  endtask

  initial begin
    logic [31:0] st;
    int t0, nsub;
    rst_n = 0;
    c_awvalid = 0; c_wvalid = 0; c_arvalid = 0; c_bready = 1; c_rready = 1;
    c_awaddr = 0; c_araddr = 0; c_wdata = 0; c_wstrb = 0;
    for (int r = 0; r < F; r++)
      for (int c = 0; c < F; c++) frame[r][c] = pixel(r, c);
    make_regions();
    nsub = origin_r.size();
    checks++;
    if (nsub != subframes_per_frame(F)) begin failures++; $display("subframe count %0d", nsub); end
    for (int k = 0; k < nsub; k++) load_subframe(k);
    // mean 16000, std 2000 -> inv 1/2000 in Q20, gain 2^4
    cfg = '{mean: 16'd16000, inv_std: 24'(1048576 / 2000), fix_pos: 4'd4};
    repeat (4) @(negedge clk);
    rst_n = 1;
    reg_wr(REG_IER, 32'h1);

    // Batch 0: six subframes with memory never stalling, timed.
    program_job(0, BATCH);
    t0 = $time / 10;
    reg_wr(REG_CTRL, 32'h1);
    while (!irq) @(negedge clk);
    checks++;
    if ($time / 10 - t0 > BATCH * 512 + 200) begin
      failures++; $display("batch 0 took %0d clocks", $time / 10 - t0);
    end else n_full_rate++;
    reg_rd(REG_CTRL, st);
    checks++; if (st[3:1] != 3'b011) begin failures++; $display("status %h", st); end

    // Batch 1 with a stalling memory; batch 2 queued while batch 1 runs.
    mem.ready_pct = 55;
    program_job(BATCH, BATCH);
    reg_wr(REG_CTRL, 32'h1);
    program_job(2 * BATCH, nsub - 2 * BATCH);   // registers only, batch 1 holds its copy
    reg_wr(REG_CTRL, 32'h1);
    reg_rd(REG_CTRL, st);
    if (st[0] && !st[2]) n_queued_start++;
    wait_done(st);
    do reg_rd(REG_CTRL, st); while (!(st[1] && st[2]));   // second done, now idle

    for (int k = 0; k < nsub; k++) check_subframe(k);

    // Error response: a short job whose first read burst answers SLVERR.
    mem.rd_err_once = 1;
    reg_wr(REG_NELEM, 32'd128);
    reg_wr(REG_CTRL, 32'h1);
    wait_done(st);
    if (st[3]) n_err++;

    checks++; if (mem.proto_errors != 0) begin failures++; $display("AXI protocol errors %0d", mem.proto_errors); end
    checks++; if (mem.max_rd_outstanding < 2) begin failures++; $display("one read burst in flight at most"); end
    $display("full_rate=%0d rd_backpressure=%0d wr_backpressure=%0d 4k_split=%0d queued_start=%0d irq=%0d sat_hi=%0d sat_lo=%0d err=%0d",
             n_full_rate, n_rd_backpressure, n_wr_backpressure, n_4k_split, n_queued_start,
             n_irq, n_sat_hi, n_sat_lo, n_err);
    begin
      int counts[9];
      counts = '{n_full_rate, n_rd_backpressure, n_wr_backpressure, n_4k_split,
                 n_queued_start, n_irq, n_sat_hi, n_sat_lo, n_err};
      foreach (counts[i]) begin
        checks++;
        if (counts[i] == 0) begin failures++; $display("mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
