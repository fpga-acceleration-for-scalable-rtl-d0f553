// tb_preproc_ctrl: exercises the AXI4-Lite control block.
//
// Checks register write/read-back (with byte strobes and with address and
// data arriving in either order), that a start request waits while the kernel
// is busy and then pulses `start` exactly once with the job copy equal to the
// registers, that later register writes do not disturb the running job, the
// sticky done and error bits with clear-on-read, and the interrupt enable.
module tb_preproc_ctrl;
  import opir_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  logic        awvalid, awready, wvalid, wready, bvalid, bready;
  logic        arvalid, arready, rvalid, rready;
  logic [7:0]  awaddr, araddr;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;
  job_t        job;
  logic        start, busy, done_in, err_in, irq;

  int checks = 0, failures = 0, starts = 0;

  preproc_ctrl dut (.clk, .rst_n, .awvalid, .awready, .awaddr, .wvalid, .wready,
    .wdata, .wstrb, .bvalid, .bready, .bresp, .arvalid, .arready, .araddr,
    .rvalid, .rready, .rdata, .rresp, .job, .start, .busy, .done_in, .err_in, .irq);

  always @(posedge clk) if (rst_n && start) starts++;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // order: 0 = together, 1 = address first, 2 = data first
  bit aw_acc, w_acc;
  always @(posedge clk) begin
    if (awvalid && awready) aw_acc = 1;
    if (wvalid && wready)   w_acc = 1;
  end

  task automatic wr(logic [7:0] a, logic [31:0] d, logic [3:0] s = 4'hF, int order = 0);
    aw_acc = 0; w_acc = 0;
    @(negedge clk);
    if (order != 2) begin awvalid = 1; awaddr = a; end
    if (order != 1) begin wvalid = 1; wdata = d; wstrb = s; end
    for (int c = 0; !(aw_acc && w_acc); c++) begin
      @(negedge clk);
      if (aw_acc) awvalid = 0;
      if (w_acc)  wvalid = 0;
      if (c == 1 && order == 1) begin wvalid = 1; wdata = d; wstrb = s; end
      if (c == 1 && order == 2) begin awvalid = 1; awaddr = a; end
    end
    awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic rd(logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    arvalid = 1; araddr = a;
    do @(posedge clk); while (!arready);
    @(negedge clk);
    arvalid = 0;
    while (!rvalid) @(negedge clk);
    d = rdata;
    @(negedge clk);
  endtask

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [31:0] d;
    rst_n = 0; awvalid = 0; wvalid = 0; arvalid = 0; bready = 1; rready = 1;
    awaddr = 0; araddr = 0; wdata = 0; wstrb = 0; busy = 0; done_in = 0; err_in = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    rd(REG_CTRL, d);  expect_eq("idle after reset", d, 32'h4);

    wr(REG_SRC_LO, 32'h1234_5000, 4'hF, 1);
    wr(REG_SRC_HI, 32'h0000_0008, 4'hF, 2);
    wr(REG_DST_LO, 32'hABCD_0040);
    wr(REG_DST_HI, 32'h0000_0009);
    wr(REG_NELEM,  32'd98304);
    wr(REG_MEAN,   32'd21000);
    wr(REG_INVSTD, 32'h0000_1234);
    wr(REG_INVSTD, 32'h00AB_0000, 4'b0100);     // only byte 2
    wr(REG_FIXPOS, 32'd6);
    rd(REG_SRC_LO, d); expect_eq("src lo", d, 32'h1234_5000);
    rd(REG_SRC_HI, d); expect_eq("src hi", d, 32'h8);
    rd(REG_NELEM, d);  expect_eq("n_elem", d, 32'd98304);
    rd(REG_INVSTD, d); expect_eq("inv_std strobed", d, 32'h00AB_1234);

    // Start while busy: must wait.
    busy = 1;
    wr(REG_CTRL, 32'h1);
    repeat (5) @(negedge clk);
    expect_eq("no start while busy", 32'(starts), 0);
    rd(REG_CTRL, d);  expect_eq("start pending", d, 32'h1);
    busy = 0;
    @(negedge clk);
    busy = 1;
    repeat (3) @(negedge clk);
    expect_eq("one start", 32'(starts), 1);
    expect_eq("job src lo", job.src_addr[31:0], 32'h1234_5000);
    expect_eq("job dst hi", job.dst_addr[63:32], 32'h9);
    expect_eq("job mean", 32'(job.norm.mean), 32'd21000);
    expect_eq("job inv", 32'(job.norm.inv_std), 32'h00AB_1234);
    expect_eq("job fix", 32'(job.norm.fix_pos), 32'd6);
    wr(REG_MEAN, 32'd5);          // next job's value, running job unchanged
    expect_eq("job frozen", 32'(job.norm.mean), 32'd21000);

    // Completion with interrupt enabled.
    wr(REG_IER, 32'h1);
    @(negedge clk); done_in = 1; err_in = 1; busy = 0;
    @(negedge clk); done_in = 0; err_in = 0;
    @(negedge clk);
    expect_eq("irq", 32'(irq), 1);
    rd(REG_CTRL, d);  expect_eq("done+err+idle", d, 32'hE);
    rd(REG_CTRL, d);  expect_eq("cleared on read", d, 32'h4);
    expect_eq("irq cleared", 32'(irq), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
