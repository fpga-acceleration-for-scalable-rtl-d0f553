// tb_preproc_axi_rd: runs the AXI4 read engine against a randomly stalling
// memory model. Each job reads a buffer filled with a known pattern; the
// stream must return every word in order, the number of address bursts must
// match a count worked out from the base address (16-beat bursts cut at 4 KiB
// boundaries), no burst may cross 4 KiB, more than one burst must be in flight
// at some point, done must pulse once and an injected SLVERR must set err.
module tb_preproc_axi_rd;
  localparam int unsigned AW = 64, DW = 512;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  logic          start, busy, done, err;
  logic [AW-1:0] base;
  logic [31:0]   n_beats;
  logic          arvalid, arready, rvalid, rready, rlast;
  logic [AW-1:0] araddr;
  logic [7:0]    arlen;
  logic [2:0]    arsize, arprot;
  logic [1:0]    arburst, rresp;
  logic [3:0]    arcache;
  logic [DW-1:0] rdata, out_data;
  logic          out_valid, out_ready;

  // unused write side of the model
  logic          awready, wready, bvalid;
  logic [1:0]    bresp;

  int checks = 0, failures = 0;

  preproc_axi_rd dut (.clk, .rst_n, .start, .base, .n_beats, .busy, .done, .err,
    .arvalid, .arready, .araddr, .arlen, .arsize, .arburst, .arcache, .arprot,
    .rvalid, .rready, .rdata, .rresp, .rlast, .out_valid, .out_ready, .out_data);

  axi_mem_model #(.READY_PCT(60)) mem (.clk, .rst_n,
    .awvalid(1'b0), .awready, .awaddr('0), .awlen('0), .awsize('0), .awburst('0),
    .wvalid(1'b0), .wready, .wdata('0), .wstrb('0), .wlast(1'b0),
    .bvalid, .bready(1'b1), .bresp,
    .arvalid, .arready, .araddr, .arlen, .arsize, .arburst,
    .rvalid, .rready, .rdata, .rresp, .rlast);

  function automatic logic [DW-1:0] pattern(longint a);
    logic [DW-1:0] d;
    for (int i = 0; i < DW / 32; i++) d[i*32 +: 32] = 32'(a) ^ (32'(i) * 32'h9E3779B9);
    return d;
  endfunction

  function automatic int expected_bursts(longint a, int n);
    int cnt = 0, room, len;
    while (n > 0) begin
      room = (4096 - int'(a & 4095)) / 64;
      len = (n < 16) ? n : 16;
      if (len > room) len = room;
      a += len * 64; n -= len; cnt++;
    end
    return cnt;
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int got = 0, dones = 0;
  longint cur_base;
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (out_data !== pattern(cur_base + longint'(got) * 64)) failures++;
      got++;
    end
    if (done) dones++;
  end

  task automatic job(longint b, int n, bit inject);
    int b0 = mem.ar_bursts;
    cur_base = b; got = 0; dones = 0;
    for (int i = 0; i < n; i++) mem.poke(b + i * 64, pattern(b + i * 64));
    mem.rd_err_once = inject;
    @(negedge clk);
    base = AW'(b); n_beats = 32'(n); start = 1;
    @(negedge clk);
    start = 0;
    while (busy) begin
      out_ready = ($urandom_range(99) < 75);
      @(negedge clk);
    end
    repeat (3) @(negedge clk);
    checks++; if (got != n)   begin failures++; $display("got %0d of %0d", got, n); end
    checks++; if (dones != 1) begin failures++; $display("done pulsed %0d times", dones); end
    checks++; if (err != inject) begin failures++; $display("err=%0d expected %0d", err, inject); end
    checks++;
    if (mem.ar_bursts - b0 != expected_bursts(b, n)) begin
      failures++;
      $display("bursts %0d expected %0d", mem.ar_bursts - b0, expected_bursts(b, n));
    end
  endtask

  initial begin
    rst_n = 0; start = 0; base = '0; n_beats = '0; out_ready = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    job(64'h0000_0000_8000_0000, 512, 0);      // one 128x128 16-bit subframe
    job(64'h0000_0001_2345_6F40, 77, 0);       // unaligned to 4 KiB, odd length
    job(64'h0000_0000_0000_0FC0, 3, 1);        // SLVERR on the first burst
    checks++; if (mem.proto_errors != 0) begin failures++; $display("protocol errors %0d", mem.proto_errors); end
    checks++; if (mem.max_rd_outstanding < 2) begin failures++; $display("never more than one burst in flight"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
