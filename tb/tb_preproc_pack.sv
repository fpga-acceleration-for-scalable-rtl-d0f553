// tb_preproc_pack: checks that pairs of 256-bit vectors come out as one
// 512-bit word {second, first}, in order, under random valid and ready, and
// that at full input rate a word leaves every second clock.
module tb_preproc_pack;
  localparam int unsigned IW = 256;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [IW-1:0]   in_data;
  logic [2*IW-1:0] out_data;

  int checks = 0, failures = 0, stalls = 0;
  logic [IW-1:0] sent_q[$];
  bit in_acc = 0;

  preproc_pack dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
                               .out_valid, .out_ready, .out_data);

  function automatic logic [IW-1:0] rnd256();
    logic [IW-1:0] d;
    for (int i = 0; i < IW / 32; i++) d[i*32 +: 32] = $urandom;
    return d;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int words = 0;
  always @(posedge clk) begin
    in_acc = in_valid && in_ready;
    if (rst_n && out_valid && out_ready) begin
      logic [IW-1:0] lo, hi;
      lo = sent_q.pop_front();
      hi = sent_q.pop_front();
      checks++;
      words++;
      if (out_data !== {hi, lo}) failures++;
    end
    if (rst_n && out_valid && !out_ready) stalls++;
  end

  task automatic run(int n, int vpct, int rpct, output int cycles);
    int sent = 0, w0 = words;
    cycles = 0;
    while (words - w0 < n / 2) begin
      @(negedge clk);
      if (in_acc) sent++;
      out_ready = ($urandom_range(99) < rpct);
      if (in_acc || !in_valid) begin
        if (sent < n && $urandom_range(99) < vpct) begin
          in_valid = 1; in_data = rnd256(); sent_q.push_back(in_data);
        end else in_valid = 0;
      end
      cycles++;
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    int cyc;
    rst_n = 0; in_valid = 0; out_ready = 0; in_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(400, 100, 100, cyc);
    checks++;
    if (cyc > 400 + 2) begin failures++; $display("rate: %0d cycles", cyc); end
    run(2000, 70, 40, cyc);
    checks++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
