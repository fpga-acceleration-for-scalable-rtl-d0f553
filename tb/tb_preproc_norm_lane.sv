// tb_preproc_norm_lane: checks one normalization lane against an integer
// reference model.
//
// Reference: d = x - mean; p = d * inv_std; s = INV_FRAC - fix_pos;
// y = clamp(floor((p + 2^(s-1)) / 2^s), -128, 127). Random and corner inputs
// (extreme pixels, zero inverse std, largest gain) are applied back to back;
// every result must appear exactly three rising edges after it was applied. A second phase
// holds en low for random cycles and checks that the output does not move.
module tb_preproc_norm_lane;
  import opir_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic                    en;
  logic [PIX_W-1:0]        x, mean;
  logic [INV_W-1:0]        inv_std;
  logic [FIXPOS_W-1:0]     fix_pos;
  logic signed [OUT_W-1:0] y;

  int checks = 0, failures = 0, saturations = 0;

  preproc_norm_lane dut (.clk, .en, .x, .mean, .inv_std, .fix_pos, .y);

  function automatic int ref_norm(int xx, int mm, longint inv, int fp);
    longint p, r;
    int s;
    p = longint'(xx - mm) * inv;
    s = int'(INV_FRAC) - fp;
    r = (s > 0) ? ((p + (longint'(1) <<< (s - 1))) >>> s) : p;
    if (r > 127)  return 127;
    if (r < -128) return -128;
    return int'(r);
  endfunction

  int exp_q[$];

  task automatic drive(int xx, int mm, longint inv, int fp);
    x = PIX_W'(xx); mean = PIX_W'(mm); inv_std = INV_W'(inv); fix_pos = FIXPOS_W'(fp);
    exp_q.push_back(ref_norm(xx, mm, inv, fp));
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, held;
    en = 1;
    @(negedge clk);
    drive(0, 0, 0, 0);
    // Stream of random and corner vectors; output compared 3 edges later.
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (i >= 2) begin
        e = exp_q.pop_front();
        checks++;
        if (y !== OUT_W'(e)) begin
          failures++;
          if (failures < 10) $display("mismatch i=%0d y=%0d exp=%0d", i, y, e);
        end
        if (e == 127 || e == -128) saturations++;
      end
      case (i % 7)
        0: drive(65535, 0, 24'hFFFFFF, 15);
        1: drive(0, 65535, 24'hFFFFFF, 15);
        2: drive($urandom_range(65535), $urandom_range(65535), 0, $urandom_range(15));
        default: drive($urandom_range(65535), $urandom_range(65535),
                       $urandom_range(24'hFFFFFF) >> $urandom_range(23), $urandom_range(15));
      endcase
    end
    // Tie breaking: (x-mean)*inv = 3 * 2^(s-1) must round up to 2, -3*2^(s-1) to -1.
    exp_q.delete();
    @(negedge clk); drive(1003, 1000, 1 << 19, 0);   // 3 * 0.5 = 1.5 -> 2
    @(negedge clk); drive(1000, 1003, 1 << 19, 0);   // -1.5 -> -1
    @(negedge clk);
    @(negedge clk); checks++; if (y !== 8'sd2)  begin failures++; $display("tie +1.5 gave %0d", y); end
    @(negedge clk); checks++; if (y !== -8'sd1) begin failures++; $display("tie -1.5 gave %0d", y); end
    // Stall: output must hold while en is low.
    drive(40000, 1000, 24'h000800, 7);
    @(negedge clk); en = 0; held = y;
    for (int k = 0; k < 20; k++) begin
      x = PIX_W'($urandom);
      @(negedge clk);
      checks++;
      if (y !== OUT_W'(held)) failures++;
    end
    en = 1;
    checks++;
    if (saturations == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
