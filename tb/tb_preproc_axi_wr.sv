// tb_preproc_axi_wr: runs the AXI4 write engine against a randomly stalling
// memory model. Random words are offered on the stream input with random gaps;
// after done the memory must hold every word at its address, no word past the
// end may be touched, the burst count must match 16-beat bursts cut at 4 KiB,
// WLAST must sit on the last beat of every burst (checked by the model), done
// must pulse once and an injected SLVERR on B must set err.
module tb_preproc_axi_wr;
  localparam int unsigned AW = 64, DW = 512;
  localparam logic [DW-1:0] FILL = {16{32'hDEAD_BEEF}};

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  logic            start, busy, done, err;
  logic [AW-1:0]   base;
  logic [31:0]     n_beats;
  logic            in_valid, in_ready;
  logic [DW-1:0]   in_data;
  logic            awvalid, awready, wvalid, wready, wlast, bvalid, bready;
  logic [AW-1:0]   awaddr;
  logic [7:0]      awlen;
  logic [2:0]      awsize, awprot;
  logic [1:0]      awburst, bresp;
  logic [3:0]      awcache;
  logic [DW-1:0]   wdata;
  logic [DW/8-1:0] wstrb;
  // unused read side of the model
  logic            arready, rvalid, rlast;
  logic [DW-1:0]   rdata;
  logic [1:0]      rresp;

  int checks = 0, failures = 0;

  preproc_axi_wr dut (.clk, .rst_n, .start, .base, .n_beats, .busy, .done, .err,
    .in_valid, .in_ready, .in_data,
    .awvalid, .awready, .awaddr, .awlen, .awsize, .awburst, .awcache, .awprot,
    .wvalid, .wready, .wdata, .wstrb, .wlast, .bvalid, .bready, .bresp);

  axi_mem_model #(.READY_PCT(55), .FILL(FILL)) mem (.clk, .rst_n,
    .awvalid, .awready, .awaddr, .awlen, .awsize, .awburst,
    .wvalid, .wready, .wdata, .wstrb, .wlast, .bvalid, .bready, .bresp,
    .arvalid(1'b0), .arready, .araddr('0), .arlen('0), .arsize('0), .arburst('0),
    .rvalid, .rready(1'b0), .rdata, .rresp, .rlast);

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

  function automatic logic [DW-1:0] rnd_word();
    logic [DW-1:0] d;
    for (int i = 0; i < DW / 32; i++) d[i*32 +: 32] = $urandom;
    return d;
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int dones = 0;
  bit in_acc = 0;
  always @(posedge clk) begin
    in_acc = in_valid && in_ready;
    if (done) dones++;
  end

  logic [DW-1:0] words[$];

  task automatic job(longint b, int n, bit inject);
    int b0 = mem.aw_bursts, sent = 0;
    words.delete();
    for (int i = 0; i < n; i++) words.push_back(rnd_word());
    dones = 0;
    mem.wr_err_once = inject;
    @(negedge clk);
    base = AW'(b); n_beats = 32'(n); start = 1;
    @(negedge clk);
    start = 0;
    while (busy) begin
      if (in_acc) sent++;
      if (in_acc || !in_valid) begin
        if (sent < n && $urandom_range(99) < 80) begin
          in_valid = 1; in_data = words[sent];
        end else in_valid = 0;
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (3) @(negedge clk);
    for (int i = 0; i < n; i++) begin
      checks++;
      if (mem.peek(b + i * 64) !== words[i]) failures++;
    end
    checks++; if (mem.peek(b + n * 64) !== FILL) begin failures++; $display("wrote past end"); end
    checks++; if (dones != 1) begin failures++; $display("done pulsed %0d times", dones); end
    checks++; if (err != inject) begin failures++; $display("err=%0d expected %0d", err, inject); end
    checks++;
    if (mem.aw_bursts - b0 != expected_bursts(b, n)) begin
      failures++;
      $display("bursts %0d expected %0d", mem.aw_bursts - b0, expected_bursts(b, n));
    end
  endtask

  initial begin
    rst_n = 0; start = 0; base = '0; n_beats = '0; in_valid = 0; in_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    job(64'h0000_0000_4000_0000, 256, 0);      // one 128x128 INT8 subframe
    job(64'h0000_0002_0000_0E80, 45, 0);       // crosses a 4 KiB boundary mid-burst
    job(64'h0000_0000_0010_0000, 20, 1);       // SLVERR on a write response
    checks++; if (mem.proto_errors != 0) begin failures++; $display("protocol errors %0d", mem.proto_errors); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
