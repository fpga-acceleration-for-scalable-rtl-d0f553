// axi_mem_model: simulation-only AXI4 slave memory standing in for DDR behind
// the network on chip. It is a behavioural model, not hardware.
//
// Memory is sparse (an associative array of DW-bit words indexed by byte
// address / (DW/8)); unwritten words read as FILL. Address and data handshakes
// are randomly delayed: each ready/valid it drives is high with probability
// ready_pct percent (READY_PCT at start, 100 gives no stalls). Any number of
// bursts may be outstanding; read bursts are answered in order, write
// responses follow the last beat. The model counts bursts and stall cycles and flags protocol errors: a burst crossing 4 KiB,
// a WLAST in the wrong place, a non-INCR burst or a narrow transfer size.
// Setting rd_err_once or wr_err_once makes the next burst answer SLVERR.
module axi_mem_model #(
  parameter int unsigned AW        = 64,
  parameter int unsigned DW        = 512,
  parameter int unsigned READY_PCT = 70,
  parameter logic [DW-1:0] FILL    = '0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            awvalid,
  output logic            awready,
  input  logic [AW-1:0]   awaddr,
  input  logic [7:0]      awlen,
  input  logic [2:0]      awsize,
  input  logic [1:0]      awburst,
  input  logic            wvalid,
  output logic            wready,
  input  logic [DW-1:0]   wdata,
  input  logic [DW/8-1:0] wstrb,
  input  logic            wlast,
  output logic            bvalid,
  input  logic            bready,
  output logic [1:0]      bresp,
  input  logic            arvalid,
  output logic            arready,
  input  logic [AW-1:0]   araddr,
  input  logic [7:0]      arlen,
  input  logic [2:0]      arsize,
  input  logic [1:0]      arburst,
  output logic            rvalid,
  input  logic            rready,
  output logic [DW-1:0]   rdata,
  output logic [1:0]      rresp,
  output logic            rlast
);
  localparam int unsigned BYTES  = DW / 8;
  localparam int unsigned BSHIFT = $clog2(BYTES);

  logic [DW-1:0] mem [longint];

  typedef struct { longint addr; int len; bit err; } burst_t;
  burst_t arq[$], awq[$];
  bit     bq[$];

  int ar_bursts = 0, aw_bursts = 0, r_beats = 0, w_beats = 0;
  int r_stalls = 0, w_stalls = 0, proto_errors = 0, max_rd_outstanding = 0;
  bit rd_err_once = 0, wr_err_once = 0;
  int ready_pct = READY_PCT;   // may be changed at run time

  int     r_idx, w_idx;
  longint r_word, w_word;

  function automatic logic [DW-1:0] peek(longint byte_addr);
    longint k = byte_addr >> BSHIFT;
    return mem.exists(k) ? mem[k] : FILL;
  endfunction

  function automatic void poke(longint byte_addr, logic [DW-1:0] d);
    mem[byte_addr >> BSHIFT] = d;
  endfunction

  function automatic bit crosses_4k(longint a, int len);
    return ((a & 4095) + ((len + 1) << BSHIFT)) > 4096;
  endfunction

  function automatic bit rnd();
    return ($urandom_range(99) < ready_pct);
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      awready <= 0; wready <= 0; bvalid <= 0; arready <= 0; rvalid <= 0;
      rlast <= 0; rresp <= 0; bresp <= 0; rdata <= '0;
      r_idx = 0; w_idx = 0;
      arq.delete(); awq.delete(); bq.delete();
    end else begin
      // ---------------- read address
      if (arvalid && arready) begin
        if (crosses_4k(araddr, arlen) || arburst != 2'b01 || arsize != 3'(BSHIFT)) proto_errors++;
        arq.push_back('{addr: araddr, len: arlen, err: rd_err_once});
        rd_err_once = 0;
        ar_bursts++;
        if (arq.size() > max_rd_outstanding) max_rd_outstanding = arq.size();
      end
      arready <= rnd();
      // ---------------- read data
      if (rvalid && rready) begin
        r_beats++;
        if (rlast) begin void'(arq.pop_front()); r_idx = 0; end
        else r_idx++;
      end else if (rvalid) r_stalls++;
      if (arq.size() > 0 && rnd()) begin
        r_word = (arq[0].addr >> BSHIFT) + r_idx;
        rvalid <= 1;
        rdata  <= mem.exists(r_word) ? mem[r_word] : FILL;
        rlast  <= (r_idx == arq[0].len);
        rresp  <= arq[0].err ? 2'b10 : 2'b00;
      end else if (!(rvalid && !rready)) begin
        rvalid <= 0;
      end
      // ---------------- write address
      if (awvalid && awready) begin
        if (crosses_4k(awaddr, awlen) || awburst != 2'b01 || awsize != 3'(BSHIFT)) proto_errors++;
        awq.push_back('{addr: awaddr, len: awlen, err: wr_err_once});
        wr_err_once = 0;
        aw_bursts++;
      end
      awready <= rnd();
      // ---------------- write data
      if (wvalid && wready) begin
        w_word = (awq[0].addr >> BSHIFT) + w_idx;
        begin
          logic [DW-1:0] cur;
          cur = mem.exists(w_word) ? mem[w_word] : FILL;
          for (int b = 0; b < BYTES; b++)
            if (wstrb[b]) cur[8*b +: 8] = wdata[8*b +: 8];
          mem[w_word] = cur;
        end
        w_beats++;
        if (wlast != (w_idx == awq[0].len)) proto_errors++;
        if (w_idx == awq[0].len) begin
          bq.push_back(awq[0].err);
          void'(awq.pop_front());
          w_idx = 0;
        end else w_idx++;
      end else if (wvalid) w_stalls++;
      wready <= (awq.size() > 0) && rnd();
      // ---------------- write response
      if (bvalid && bready) bvalid <= 0;
      if ((!bvalid || bready) && bq.size() > 0 && rnd()) begin
        bvalid <= 1;
        bresp  <= bq.pop_front() ? 2'b10 : 2'b00;
      end
    end
  end
endmodule
