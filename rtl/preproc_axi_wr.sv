// preproc_axi_wr: AXI4 write engine that stores the normalized stream into a
// contiguous DDR buffer.
//
// Bursts are cut like the reads: INCR, at most BURST beats, never across a
// 4 KiB boundary, at most MAX_OUT bursts awaiting their write response. Each
// issued burst length is queued so the W channel knows where to raise WLAST;
// the address channel may run ahead of the data. Full strobes are always used
// because lengths are whole beats. The job is done when every burst has been
// answered on B. The published kernel only states an AXI master; all of this
// protocol detail is this design's choice.
//
// Interface: start is a one-cycle pulse loading base and n_beats while idle;
// base bits below one data word (six for 512 bits) are ignored, so buffers
// are word aligned.
// done pulses for one cycle after the last write response; err is set for the
// job if a BRESP was not OKAY. in_ready is only high while a W beat can leave.
// rst_n is synchronous, active low.
module preproc_axi_wr #(
  parameter int unsigned AW      = 64,
  parameter int unsigned DW      = 512,
  parameter int unsigned NW      = 32,
  parameter int unsigned BURST   = 16,
  parameter int unsigned MAX_OUT = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [AW-1:0]   base,
  input  logic [NW-1:0]   n_beats,
  output logic            busy,
  output logic            done,
  output logic            err,
  // stream in
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [DW-1:0]   in_data,
  // AXI4 write address channel
  output logic            awvalid,
  input  logic            awready,
  output logic [AW-1:0]   awaddr,
  output logic [7:0]      awlen,
  output logic [2:0]      awsize,
  output logic [1:0]      awburst,
  output logic [3:0]      awcache,
  output logic [2:0]      awprot,
  // AXI4 write data channel
  output logic            wvalid,
  input  logic            wready,
  output logic [DW-1:0]   wdata,
  output logic [DW/8-1:0] wstrb,
  output logic            wlast,
  // AXI4 write response channel
  input  logic            bvalid,
  output logic            bready,
  input  logic [1:0]      bresp
);
  localparam int unsigned BYTES  = DW / 8;
  localparam int unsigned BSHIFT = $clog2(BYTES);
  localparam int unsigned OW     = $clog2(MAX_OUT + 1);
  localparam int unsigned QW     = (MAX_OUT > 1) ? $clog2(MAX_OUT) : 1;

  logic [AW-1:0] addr_q;
  logic [NW-1:0] aw_left, to_boundary, blen;
  logic [12:0]   page_room;
  logic [OW-1:0] outstanding;   // bursts issued on AW, not yet answered on B
  logic          aw_fire, w_fire, b_fire;

  // Queue of burst lengths (AWLEN values) for the W channel.
  logic [7:0]    lenq [MAX_OUT];
  logic [QW-1:0] q_wr, q_rd;
  logic [OW-1:0] q_cnt;
  logic [7:0]    wbeat;

  assign awsize  = 3'(BSHIFT);
  assign awburst = 2'b01;
  assign awcache = 4'b0011;
  assign awprot  = 3'b000;
  assign wstrb   = '1;
  assign bready  = 1'b1;

  always_comb begin
    page_room   = 13'd4096 - {1'b0, addr_q[11:0]};
    to_boundary = NW'(page_room >> BSHIFT);
    blen = aw_left;
    if (blen > NW'(BURST)) blen = NW'(BURST);
    if (blen > to_boundary) blen = to_boundary;
  end

  assign wvalid   = busy && in_valid && (q_cnt != '0);
  assign in_ready = busy && wready && (q_cnt != '0);
  assign wdata    = in_data;
  assign wlast    = (wbeat == lenq[q_rd]);
  assign aw_fire  = awvalid && awready;
  assign w_fire   = wvalid && wready;
  assign b_fire   = bvalid && bready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      done        <= 1'b0;
      err         <= 1'b0;
      awvalid     <= 1'b0;
      awaddr      <= '0;
      awlen       <= '0;
      addr_q      <= '0;
      aw_left     <= '0;
      outstanding <= '0;
      q_wr        <= '0;
      q_rd        <= '0;
      q_cnt       <= '0;
      wbeat       <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        addr_q  <= base & ~AW'(BYTES - 1);   // low address bits ignored
        aw_left <= n_beats;
        err     <= 1'b0;
        busy    <= (n_beats != '0);
        done    <= (n_beats == '0);
      end else if (busy) begin
        // address channel; its length is queued in the same cycle
        if (aw_fire) begin
          awvalid <= 1'b0;
        end else if (!awvalid && aw_left != '0 && outstanding < OW'(MAX_OUT)) begin
          awvalid     <= 1'b1;
          awaddr      <= addr_q;
          awlen       <= 8'(blen - 1'b1);
          lenq[q_wr]  <= 8'(blen - 1'b1);
          q_wr        <= (q_wr == QW'(MAX_OUT - 1)) ? '0 : q_wr + 1'b1;
          addr_q      <= addr_q + (AW'(blen) << BSHIFT);
          aw_left     <= aw_left - blen;
        end
        // data channel
        if (w_fire) begin
          if (wlast) begin
            wbeat <= '0;
            q_rd  <= (q_rd == QW'(MAX_OUT - 1)) ? '0 : q_rd + 1'b1;
          end else begin
            wbeat <= wbeat + 1'b1;
          end
        end
        // queue occupancy: one push per AW issue, one pop per WLAST
        begin
          logic push, pop;
          push = !aw_fire && !awvalid && aw_left != '0 && outstanding < OW'(MAX_OUT);
          pop  = w_fire && wlast;
          if (push && !pop)      q_cnt <= q_cnt + 1'b1;
          else if (pop && !push) q_cnt <= q_cnt - 1'b1;
          if (push && !b_fire)      outstanding <= outstanding + 1'b1;
          else if (b_fire && !push) outstanding <= outstanding - 1'b1;
        end
        // response channel
        if (b_fire && bresp != 2'b00) err <= 1'b1;
        if (aw_left == '0 && !awvalid && q_cnt == '0 &&
            (outstanding == '0 || (outstanding == OW'(1) && b_fire))) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  a_aw_hold: assert property (@(posedge clk) disable iff (!rst_n)
    awvalid && !awready |=> awvalid && $stable(awaddr) && $stable(awlen));
  a_w_hold: assert property (@(posedge clk) disable iff (!rst_n)
    wvalid && !wready |=> wvalid && $stable(wdata) && $stable(wlast));

endmodule
