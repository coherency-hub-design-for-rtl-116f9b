// gpd: General Purpose Design module. It holds the control/status registers
// (CSRs), logs errors and reports them to the service processor, sequences
// reset, and contains the LPC slave through which the service processor
// reaches the CSRs.
//
// Errors: parity errors on the ASU's CAM and pended-transaction store,
// illegal snoop-response combinations, protocol errors and impossible replay
// requests are fatal (FATAL_STAT bits 0..4 in that order). They are logged in
// FATAL_STAT (sticky, write one to clear), the first one in FIRST_ERR, the
// port in FATAL_PORT, and drive ERR_FATAL_L low while enabled in FATAL_EN.
// CRC errors and receive-buffer overflows (both repaired by replay) and link
// retrains are correctable: CE_STAT bits 0 CRC, 1 retrain, 2 overflow; CRC
// errors and retrains are also counted per port. SP_INTR_L is low while any
// logged error is pending. Error inputs are registered once before use, as
// the error paths are not timing critical.
// Reset: por_n and wmr_n are synchronised; core_rst_n stays low for
// RST_CYCLES clocks after both are high. A warm reset (wmr_n) clears the
// core but keeps the error logs, which only a power-on reset (por_n) clears.
//
// CSR map (8-bit, offsets from the LPC window base):
//   00 ID (A5)      01 FATAL_STAT   02 FATAL_PORT   03 FIRST_ERR (bit7 valid)
//   04 CE_STAT      08-0B CRC error count, port 0-3  0C-0F retrain count
//   10 FATAL_EN     11 SCRATCH      12 CAM entries in use
//   13/14 pended transactions, low/high byte
// por_sync is a reset synchroniser: its output is the asynchronous reset of
// the log registers and is also clocked through the chain, which lint reports
// as a net used both synchronously and asynchronously; that is intended.
// The register map, bit assignment and reset length are this design's own;
// PLL, clock and JTAG functions of the block are not modelled.
module gpd
  import zmb_pkg::*;
#(
  parameter int unsigned RST_CYCLES = 16,
  parameter logic [15:0] LPC_BASE   = 16'h0800
) (
  input  logic                 clk,
  input  logic                 por_n,
  input  logic                 wmr_n,
  output logic                 core_rst_n,
  // service processor
  input  logic                 lframe_n,
  input  logic [3:0]           lad_in,
  output logic [3:0]           lad_out,
  output logic                 lad_oe,
  output logic                 err_fatal_n,
  output logic                 sp_intr_n,
  // error sources
  input  logic                 cam_perr,
  input  logic                 pend_perr,
  input  logic [NPORTS-1:0]    snoop_err,
  input  logic [NPORTS-1:0]    proto_err,
  input  logic [NPORTS-1:0]    overflow,
  input  logic [NPORTS-1:0]    replay_err,
  input  logic [NPORTS-1:0]    crc_err,
  input  logic [NPORTS-1:0]    retrain,
  input  logic [CAM_IDX_W:0]   cam_used,
  input  logic [PEND_IDX_W:0]  pend_count
);
  // ---------------- reset sequencing ----------------
  logic [1:0] por_sync, wmr_sync;
  logic       log_rst_n;
  logic [7:0] rst_cnt;

  always_ff @(posedge clk or negedge por_n)
    if (!por_n) por_sync <= '0;
    else        por_sync <= {por_sync[0], 1'b1};
  assign log_rst_n = por_sync[1];

  always_ff @(posedge clk or negedge por_n)
    if (!por_n) wmr_sync <= '0;
    else        wmr_sync <= {wmr_sync[0], wmr_n};

  always_ff @(posedge clk or negedge log_rst_n) begin
    if (!log_rst_n) begin
      rst_cnt    <= '0;
      core_rst_n <= 1'b0;
    end else if (!wmr_sync[1]) begin
      rst_cnt    <= '0;
      core_rst_n <= 1'b0;
    end else if (rst_cnt != 8'(RST_CYCLES)) begin
      rst_cnt    <= rst_cnt + 8'd1;
    end else begin
      core_rst_n <= 1'b1;
    end
  end

  // ---------------- LPC slave ----------------
  logic       csr_wr, csr_rd;
  logic [7:0] csr_addr, csr_wdata, csr_rdata;

  lpc_slave #(.BASE(LPC_BASE)) u_lpc (
    .clk, .rst_n(log_rst_n), .lframe_n, .lad_in, .lad_out, .lad_oe,
    .csr_wr, .csr_rd, .csr_addr, .csr_wdata, .csr_rdata);

  // ---------------- error registers ----------------
  logic [4:0]        fat_in;
  logic [2:0]        ce_in;
  logic [NPORTS-1:0] fport_in, crc_q, rtr_q;
  logic [7:0]        fatal_stat, fatal_port, first_err, ce_stat, fatal_en, scratch;
  logic [7:0]        crc_cnt [NPORTS];
  logic [7:0]        rtr_cnt [NPORTS];

  always_ff @(posedge clk or negedge log_rst_n) begin
    if (!log_rst_n) begin
      fat_in <= '0; ce_in <= '0; fport_in <= '0; crc_q <= '0; rtr_q <= '0;
    end else begin
      fat_in   <= {|replay_err, |proto_err, |snoop_err, pend_perr, cam_perr};
      ce_in    <= {|overflow, |retrain, |crc_err};
      fport_in <= replay_err | proto_err | snoop_err;
      crc_q    <= crc_err;
      rtr_q    <= retrain;
    end
  end

  // write-one-to-clear view of the sticky registers
  logic [7:0] fs, cs, fp;
  always_comb begin
    fs = fatal_stat;
    cs = ce_stat;
    fp = fatal_port;
    if (csr_wr && csr_addr == 8'h01) fs = fs & ~csr_wdata;
    if (csr_wr && csr_addr == 8'h02) fp = fp & ~csr_wdata;
    if (csr_wr && csr_addr == 8'h04) cs = cs & ~csr_wdata;
  end

  always_ff @(posedge clk or negedge log_rst_n) begin
    if (!log_rst_n) begin
      fatal_stat <= '0; fatal_port <= '0; first_err <= '0; ce_stat <= '0;
      fatal_en <= 8'h1F; scratch <= '0;
      for (int p = 0; p < NPORTS; p++) begin
        crc_cnt[p] <= '0;
        rtr_cnt[p] <= '0;
      end
    end else begin
      if (csr_wr && csr_addr == 8'h03) first_err <= '0;
      if (csr_wr && csr_addr == 8'h10) fatal_en <= csr_wdata;
      if (csr_wr && csr_addr == 8'h11) scratch  <= csr_wdata;
      if (fat_in != '0 && !first_err[7]) begin
        for (int b = 4; b >= 0; b--)
          if (fat_in[b]) first_err <= {1'b1, 4'b0, 3'(b)};
      end
      fatal_stat <= fs | {3'b0, fat_in};
      fatal_port <= fp | {4'b0, fport_in};
      ce_stat    <= cs | {5'b0, ce_in};
      for (int p = 0; p < NPORTS; p++) begin
        if (crc_q[p] && crc_cnt[p] != 8'hFF) crc_cnt[p] <= crc_cnt[p] + 8'd1;
        if (rtr_q[p] && rtr_cnt[p] != 8'hFF) rtr_cnt[p] <= rtr_cnt[p] + 8'd1;
        if (csr_wr && csr_addr == 8'(8 + p))  crc_cnt[p] <= '0;
        if (csr_wr && csr_addr == 8'(12 + p)) rtr_cnt[p] <= '0;
      end
    end
  end

  always_comb begin
    csr_rdata = '0;
    case (csr_addr)
      8'h00: csr_rdata = 8'hA5;
      8'h01: csr_rdata = fatal_stat;
      8'h02: csr_rdata = fatal_port;
      8'h03: csr_rdata = first_err;
      8'h04: csr_rdata = ce_stat;
      8'h08, 8'h09, 8'h0A, 8'h0B: csr_rdata = crc_cnt[csr_addr[1:0]];
      8'h0C, 8'h0D, 8'h0E, 8'h0F: csr_rdata = rtr_cnt[csr_addr[1:0]];
      8'h10: csr_rdata = fatal_en;
      8'h11: csr_rdata = scratch;
      8'h12: csr_rdata = 8'(cam_used);
      8'h13: csr_rdata = pend_count[7:0];
      8'h14: csr_rdata = 8'(pend_count[PEND_IDX_W:8]);
      default: csr_rdata = '0;
    endcase
  end

  always_ff @(posedge clk or negedge log_rst_n) begin
    if (!log_rst_n) begin
      err_fatal_n <= 1'b1;
      sp_intr_n   <= 1'b1;
    end else begin
      err_fatal_n <= !(|(fatal_stat & fatal_en));
      sp_intr_n   <= !(|fatal_stat || |ce_stat);
    end
  end
endmodule
