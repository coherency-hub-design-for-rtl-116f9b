// lpc_slave: Low Pin Count slave through which the service processor reads and
// writes the hub's 8-bit control/status registers.
//
// It decodes LPC I/O read and I/O write cycles: START (LAD=0000 with LFRAME#
// low), cycle type (0000 read, 0010 write), four address nibbles (most
// significant first), for a write two data nibbles (least significant
// first), two turn-around clocks, then the slave drives SYNC=0000, for a read
// two data nibbles, and 1111 for one turn-around clock before releasing LAD.
// Cycles outside the BASE..BASE+255 window and other cycle types are ignored;
// LFRAME# low at any time restarts decoding. The register port is csr_*: a
// write pulses csr_wr with the data; a read samples csr_rdata while SYNC is
// driven. LAD is split into lad_in / lad_out / lad_oe. The cycle format is
// the LPC standard's; the address window and a single clock shared with the
// core are this design's choices.
module lpc_slave #(
  parameter logic [15:0] BASE = 16'h0800
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        lframe_n,
  input  logic [3:0]  lad_in,
  output logic [3:0]  lad_out,
  output logic        lad_oe,
  output logic        csr_wr,
  output logic        csr_rd,
  output logic [7:0]  csr_addr,
  output logic [7:0]  csr_wdata,
  input  logic [7:0]  csr_rdata
);
  typedef enum logic [3:0] {
    S_IDLE, S_CYC, S_ADDR, S_WDATA, S_HTAR, S_SYNC, S_RDATA, S_STAR, S_SFLOAT
  } state_e;

  state_e      st_q;
  logic        wr_q;
  logic [1:0]  n_q;
  logic [15:0] addr_q;
  logic [7:0]  data_q;
  logic        hit;

  assign hit = (addr_q[15:8] == BASE[15:8]);
  assign csr_addr  = addr_q[7:0];
  assign csr_wdata = data_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= S_IDLE; wr_q <= 1'b0; n_q <= '0; addr_q <= '0; data_q <= '0;
      csr_wr <= 1'b0; csr_rd <= 1'b0;
    end else begin
      csr_wr <= 1'b0;
      csr_rd <= 1'b0;
      if (!lframe_n) begin
        st_q <= (lad_in == 4'b0000) ? S_CYC : S_IDLE;
      end else begin
        case (st_q)
          S_IDLE: ;
          S_CYC: begin
            n_q <= '0;
            if (lad_in[3:2] == 2'b00 && lad_in[0] == 1'b0 && lad_in[1] == 1'b0) begin
              wr_q <= 1'b0; st_q <= S_ADDR;
            end else if (lad_in[3:2] == 2'b00 && lad_in[1] == 1'b1) begin
              wr_q <= 1'b1; st_q <= S_ADDR;
            end else st_q <= S_IDLE;
          end
          S_ADDR: begin
            addr_q <= {addr_q[11:0], lad_in};
            n_q    <= n_q + 2'd1;
            if (n_q == 2'd3) begin
              n_q  <= '0;
              st_q <= wr_q ? S_WDATA : S_HTAR;
            end
          end
          S_WDATA: begin
            if (n_q == 2'd0) data_q[3:0] <= lad_in;
            else             data_q[7:4] <= lad_in;
            n_q <= n_q + 2'd1;
            if (n_q == 2'd1) begin
              n_q  <= '0;
              st_q <= S_HTAR;
            end
          end
          S_HTAR: begin
            n_q <= n_q + 2'd1;
            if (n_q == 2'd1) begin
              n_q  <= '0;
              st_q <= hit ? S_SYNC : S_IDLE;
            end
          end
          S_SYNC: begin
            if (wr_q) begin
              csr_wr <= 1'b1;
              st_q   <= S_STAR;
            end else begin
              csr_rd <= 1'b1;
              data_q <= csr_rdata;
              st_q   <= S_RDATA;
            end
          end
          S_RDATA: begin
            n_q <= n_q + 2'd1;
            if (n_q == 2'd1) begin
              n_q  <= '0;
              st_q <= S_STAR;
            end
          end
          S_STAR:   st_q <= S_SFLOAT;
          S_SFLOAT: st_q <= S_IDLE;
          default:  st_q <= S_IDLE;
        endcase
      end
    end
  end

  always_comb begin
    lad_oe  = 1'b0;
    lad_out = 4'b1111;
    case (st_q)
      S_SYNC:  begin lad_oe = 1'b1; lad_out = 4'b0000; end
      S_RDATA: begin lad_oe = 1'b1; lad_out = (n_q == 2'd0) ? data_q[3:0] : data_q[7:4]; end
      S_STAR:  begin lad_oe = 1'b1; lad_out = 4'b1111; end
      default: ;
    endcase
  end
endmodule
