// preproc_axi_rd: AXI4 read engine that streams a contiguous buffer of raw
// pixels out of DDR.
//
// Given a 64-byte aligned base address and a length in data beats, it issues
// INCR bursts of at most BURST beats that never cross a 4 KiB boundary, keeps
// up to MAX_OUT bursts in flight and hands every returned beat to the stream
// output. RREADY is the downstream ready, so back-pressure from the datapath
// reaches the interconnect directly and no buffer is needed. The published
// kernel only states that it moves data through an AXI master; burst length,
// outstanding count, reset and the start/done protocol are this design's.
//
// Interface: start is a one-cycle pulse that loads base and n_beats while idle;
// base bits below one data word (six for 512 bits) are ignored, so buffers
// are word aligned.
// done pulses for one cycle with the last accepted beat; err is set for the job
// if any RRESP was not OKAY. rst_n is synchronous, active low.
module preproc_axi_rd #(
  parameter int unsigned AW      = 64,
  parameter int unsigned DW      = 512,
  parameter int unsigned NW      = 32,   // beat counter width
  parameter int unsigned BURST   = 16,
  parameter int unsigned MAX_OUT = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] base,
  input  logic [NW-1:0] n_beats,
  output logic          busy,
  output logic          done,
  output logic          err,
  // AXI4 read address channel
  output logic          arvalid,
  input  logic          arready,
  output logic [AW-1:0] araddr,
  output logic [7:0]    arlen,
  output logic [2:0]    arsize,
  output logic [1:0]    arburst,
  output logic [3:0]    arcache,
  output logic [2:0]    arprot,
  // AXI4 read data channel
  input  logic          rvalid,
  output logic          rready,
  input  logic [DW-1:0] rdata,
  input  logic [1:0]    rresp,
  input  logic          rlast,
  // stream out
  output logic          out_valid,
  input  logic          out_ready,
  output logic [DW-1:0] out_data
);
  localparam int unsigned BYTES   = DW / 8;
  localparam int unsigned BSHIFT  = $clog2(BYTES);
  localparam int unsigned OW      = $clog2(MAX_OUT + 1);

  logic [AW-1:0] addr_q;
  logic [NW-1:0] ar_left, r_left;
  logic [OW-1:0] outstanding;
  logic [NW-1:0] to_boundary, blen;
  logic [12:0]   page_room;
  logic          ar_fire, r_fire, r_last_beat;

  assign arsize  = 3'(BSHIFT);
  assign arburst = 2'b01;      // INCR
  assign arcache = 4'b0011;    // normal, non-cacheable, bufferable
  assign arprot  = 3'b000;

  // Beats to the next 4 KiB boundary, then the length of the next burst.
  always_comb begin
    page_room   = 13'd4096 - {1'b0, addr_q[11:0]};
    to_boundary = NW'(page_room >> BSHIFT);
    blen = ar_left;
    if (blen > NW'(BURST)) blen = NW'(BURST);
    if (blen > to_boundary) blen = to_boundary;
  end

  assign ar_fire     = arvalid && arready;
  assign rready      = busy && out_ready;
  assign out_valid   = busy && rvalid;
  assign out_data    = rdata;
  assign r_fire      = rvalid && rready;
  assign r_last_beat = r_fire && (r_left == NW'(1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      done        <= 1'b0;
      err         <= 1'b0;
      arvalid     <= 1'b0;
      ar_left     <= '0;
      r_left      <= '0;
      outstanding <= '0;
      addr_q      <= '0;
      araddr      <= '0;
      arlen       <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        addr_q  <= base & ~AW'(BYTES - 1);   // low address bits ignored
        ar_left <= n_beats;
        r_left  <= n_beats;
        err     <= 1'b0;
        busy    <= (n_beats != '0);
        done    <= (n_beats == '0);
      end else begin
        // address channel
        if (ar_fire) begin
          arvalid <= 1'b0;
        end else if (busy && !arvalid && ar_left != '0 && outstanding < OW'(MAX_OUT)) begin
          arvalid <= 1'b1;
          araddr  <= addr_q;
          arlen   <= 8'(blen - 1'b1);
          addr_q  <= addr_q + (AW'(blen) << BSHIFT);
          ar_left <= ar_left - blen;
        end
        // outstanding bursts
        if (ar_fire && !(r_fire && rlast)) outstanding <= outstanding + 1'b1;
        else if (!ar_fire && r_fire && rlast) outstanding <= outstanding - 1'b1;
        // data channel
        if (r_fire) begin
          r_left <= r_left - 1'b1;
          if (rresp != 2'b00) err <= 1'b1;
        end
        if (r_last_beat) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  a_ar_hold: assert property (@(posedge clk) disable iff (!rst_n)
    arvalid && !arready |=> arvalid && $stable(araddr) && $stable(arlen));
  a_no_4k_cross: assert property (@(posedge clk) disable iff (!rst_n)
    arvalid |-> ({1'b0, araddr[11:0]} + ((13'(arlen) + 13'd1) << BSHIFT)) <= 13'd4096);

endmodule
