// preproc_ctrl: AXI4-Lite control slave of the preprocessing kernel.
//
// The host runtime starts the kernel once per batch of subframes by writing the
// source and destination buffer addresses, the element count and the three
// normalization constants, then setting the start bit. This block holds those
// registers, freezes a copy of them into `job` when a start is accepted (so the
// host may prepare the next batch while one runs) and reports completion
// through a sticky done bit and an optional interrupt. The register map (see
// opir_pkg) and the bit behaviour resemble a typical HLS control block but are
// this design's own; the published kernel does not describe its control.
//
// CTRL bits: [0] start, write 1 to request, reads 1 until accepted;
// [1] done, sticky, cleared by reading CTRL; [2] idle; [3] error, sticky,
// cleared by reading CTRL. IER[0] enables `irq`, which is high while done is set.
//
// Timing: a write completes (BVALID) the cycle after both its address and data
// have been taken; a read returns data the cycle after ARVALID is accepted.
// `start` is a one-cycle pulse issued when a start is pending and the kernel
// is not busy. rst_n is synchronous, active low.
module preproc_ctrl
  import opir_pkg::*;
#(
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  // AXI4-Lite slave
  input  logic          awvalid,
  output logic          awready,
  input  logic [AW-1:0] awaddr,
  input  logic          wvalid,
  output logic          wready,
  input  logic [31:0]   wdata,
  input  logic [3:0]    wstrb,
  output logic          bvalid,
  input  logic          bready,
  output logic [1:0]    bresp,
  input  logic          arvalid,
  output logic          arready,
  input  logic [AW-1:0] araddr,
  output logic          rvalid,
  input  logic          rready,
  output logic [31:0]   rdata,
  output logic [1:0]    rresp,
  // kernel side
  output job_t          job,
  output logic          start,
  input  logic          busy,
  input  logic          done_in,
  input  logic          err_in,
  output logic          irq
);
  job_t          regs;
  logic          start_req, done_q, err_q, ier_q;
  logic          aw_held, w_held;
  logic [AW-1:0] aw_addr_q;
  logic [31:0]   w_data_q;
  logic [3:0]    w_strb_q;
  logic          do_write, do_read;

  assign awready  = !aw_held;
  assign wready   = !w_held;
  assign bresp    = 2'b00;
  assign rresp    = 2'b00;
  assign arready  = !rvalid;
  assign do_write = aw_held && w_held && !bvalid;
  assign do_read  = arvalid && arready;
  assign start    = start_req && !busy;
  assign irq      = ier_q && done_q;

  // Byte-strobed update of a 32-bit register image.
  function automatic logic [31:0] merge(logic [31:0] old, logic [31:0] d, logic [3:0] s);
    for (int b = 0; b < 4; b++)
      if (s[b]) old[8*b +: 8] = d[8*b +: 8];
    return old;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      aw_held   <= 1'b0;
      w_held    <= 1'b0;
      bvalid    <= 1'b0;
      rvalid    <= 1'b0;
      rdata     <= '0;
      aw_addr_q <= '0;
      w_data_q  <= '0;
      w_strb_q  <= '0;
      regs      <= '0;
      job       <= '0;
      start_req <= 1'b0;
      done_q    <= 1'b0;
      err_q     <= 1'b0;
      ier_q     <= 1'b0;
    end else begin
      // write address / data capture
      if (awvalid && awready) begin aw_held <= 1'b1; aw_addr_q <= awaddr; end
      if (wvalid && wready)   begin w_held <= 1'b1; w_data_q <= wdata; w_strb_q <= wstrb; end
      if (bvalid && bready) bvalid <= 1'b0;

      // kernel events
      if (start) begin
        start_req <= 1'b0;
        job       <= regs;
      end
      if (done_in) done_q <= 1'b1;
      if (err_in)  err_q  <= 1'b1;

      // register write
      if (do_write) begin
        aw_held <= 1'b0;
        w_held  <= 1'b0;
        bvalid  <= 1'b1;
        unique case (aw_addr_q[7:0] & 8'hFC)
          REG_CTRL:   if (w_strb_q[0] && w_data_q[0]) start_req <= 1'b1;
          REG_IER:    if (w_strb_q[0]) ier_q <= w_data_q[0];
          REG_SRC_LO: regs.src_addr[31:0]  <= merge(regs.src_addr[31:0],  w_data_q, w_strb_q);
          REG_SRC_HI: regs.src_addr[63:32] <= merge(regs.src_addr[63:32], w_data_q, w_strb_q);
          REG_DST_LO: regs.dst_addr[31:0]  <= merge(regs.dst_addr[31:0],  w_data_q, w_strb_q);
          REG_DST_HI: regs.dst_addr[63:32] <= merge(regs.dst_addr[63:32], w_data_q, w_strb_q);
          REG_NELEM:  regs.n_elem          <= merge(regs.n_elem,          w_data_q, w_strb_q);
          REG_MEAN:   regs.norm.mean       <= 16'(merge(32'(regs.norm.mean), w_data_q, w_strb_q));
          REG_INVSTD: regs.norm.inv_std    <= 24'(merge(32'(regs.norm.inv_std), w_data_q, w_strb_q));
          REG_FIXPOS: regs.norm.fix_pos    <= 4'(merge(32'(regs.norm.fix_pos), w_data_q, w_strb_q));
          default: ;
        endcase
      end

      // register read
      if (rvalid && rready) rvalid <= 1'b0;
      if (do_read) begin
        rvalid <= 1'b1;
        unique case (araddr[7:0] & 8'hFC)
          REG_CTRL: begin
            rdata  <= {28'd0, err_q, !busy && !start_req, done_q, start_req};
            done_q <= done_in;   // clear on read, unless a new done arrives now
            err_q  <= err_in;
          end
          REG_IER:    rdata <= {31'd0, ier_q};
          REG_SRC_LO: rdata <= regs.src_addr[31:0];
          REG_SRC_HI: rdata <= regs.src_addr[63:32];
          REG_DST_LO: rdata <= regs.dst_addr[31:0];
          REG_DST_HI: rdata <= regs.dst_addr[63:32];
          REG_NELEM:  rdata <= regs.n_elem;
          REG_MEAN:   rdata <= 32'(regs.norm.mean);
          REG_INVSTD: rdata <= 32'(regs.norm.inv_std);
          REG_FIXPOS: rdata <= 32'(regs.norm.fix_pos);
          default:    rdata <= '0;
        endcase
      end
    end
  end

  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n)
    bvalid && !bready |=> bvalid);
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n)
    rvalid && !rready |=> rvalid && $stable(rdata));

endmodule
