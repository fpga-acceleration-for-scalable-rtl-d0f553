// tb_preproc_norm_vector: checks the 32-lane normalization stream.
//
// Phase 1 streams beats with valid and ready both held high and checks the
// published rate of 32 elements per clock: B beats must leave within B + 3
// clocks. Phase 2 toggles in_valid and out_ready at random to exercise stalls
// and bubbles and checks that every element of every beat arrives, in order,
// equal to the reference model.
module tb_preproc_norm_vector;
  import opir_pkg::*;
  import opir_ref_pkg::*;

  localparam int unsigned N = LANES;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  norm_cfg_t         cfg;
  logic              in_valid, in_ready, out_valid, out_ready;
  logic [N*16-1:0]   in_data;
  logic [N*8-1:0]    out_data;

  int checks = 0, failures = 0, stalls = 0;

  preproc_norm_vector dut (.clk, .rst_n, .cfg, .in_valid, .in_ready, .in_data,
                           .out_valid, .out_ready, .out_data);

  logic [N*8-1:0] exp_q[$];

  function automatic logic [N*8-1:0] ref_beat(logic [N*16-1:0] d);
    logic [N*8-1:0] r;
    for (int i = 0; i < N; i++)
      r[i*8 +: 8] = 8'(ref_norm(int'(d[i*16 +: 16]), int'(cfg.mean), longint'(cfg.inv_std), int'(cfg.fix_pos)));
    return r;
  endfunction

  function automatic logic [N*16-1:0] rand_beat();
    logic [N*16-1:0] d;
    for (int i = 0; i < N; i++) d[i*16 +: 16] = 16'($urandom);
    return d;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scoreboard on the output side; the input handshake is sampled here too.
  int received = 0;
  bit in_acc = 0;
  always @(posedge clk) begin
    in_acc = in_valid && in_ready;
    if (rst_n && out_valid && out_ready) begin
      logic [N*8-1:0] e;
      e = exp_q.pop_front();
      checks++;
      received++;
      if (out_data !== e) begin
        failures++;
        if (failures < 5) $display("beat %0d mismatch", received);
      end
    end
    if (rst_n && out_valid && !out_ready) stalls++;
  end

  task automatic run(int beats, int vpct, int rpct, output int cycles);
    int sent = 0, start_rx = received;
    cycles = 0;
    while (received - start_rx < beats) begin
      @(negedge clk);
      if (in_acc) sent++;   // accepted at the edge just passed
      out_ready = ($urandom_range(99) < rpct);
      if (in_acc || !in_valid) begin
        if (sent < beats && $urandom_range(99) < vpct) begin
          in_valid = 1;
          in_data  = rand_beat();
          exp_q.push_back(ref_beat(in_data));
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
    cfg = '{mean: 16'd12000, inv_std: 24'd600, fix_pos: 4'd5};
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Full rate: one beat per clock, latency 3.
    run(200, 100, 100, cyc);
    checks++;
    if (cyc > 200 + 3 + 1) begin
      failures++;
      $display("rate: 200 beats took %0d cycles", cyc);
    end
    // Random stalls and bubbles, new constants.
    cfg = '{mean: 16'd300, inv_std: 24'd90000, fix_pos: 4'd2};
    repeat (5) @(negedge clk);
    run(1000, 60, 50, cyc);
    checks++;
    if (stalls == 0) begin failures++; $display("no stall exercised"); end
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
