// qos_ni_target: target network interface in front of a memory bank.
//
// Receives request packets, performs the access on its memory port and
// returns a response packet to the requester with the same QoS level as
// the request, so a prioritised processor/memory pair is prioritised in
// both directions (this design's reading of the published intent).
// A read answers with a header and one data flit, a write with a
// header-only acknowledge. Header-only OPEN/CLOSE packets whose
// full-duplex flag is set are echoed back to their source with the same
// code, which reserves or releases the return path; others are absorbed.
//
// Memory port: mem_en/mem_we/mem_addr/mem_wdata, read data on mem_rdata one
// cycle after a read. mem_wdata is the incoming data flit itself, with
// no register in between. The word address is taken from bits [MEM_AW+1:2] of
// the address flit. One request is served at a time. Network side uses
// valid/ready. rst_n is synchronous, active low.
module qos_ni_target
  import qos_noc_pkg::*;
#(
  parameter logic [EP_W-1:0] MY_ID  = 5'd1,
  parameter int unsigned     MEM_AW = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rx_valid,
  input  flit_t             rx_flit,
  output logic              rx_ready,
  output logic              tx_valid,
  output flit_t             tx_flit,
  input  logic              tx_ready,
  output logic              mem_en,
  output logic              mem_we,
  output logic [MEM_AW-1:0] mem_addr,
  output logic [31:0]       mem_wdata,
  input  logic [31:0]       mem_rdata
);
  typedef enum logic [2:0] {
    T_IDLE, T_ADDR, T_DATA, T_RD, T_RDW, T_RESP_HDR, T_RESP_DATA, T_ECHO
  } state_e;

  state_e           state;
  logic [EP_W-1:0]  src_q;
  logic [QOS_W-1:0] qos_q;
  logic             is_wr_q;
  logic [MEM_AW-1:0] addr_q;
  logic [31:0]      rdata_q;

  header_t rx_hdr;
  assign rx_hdr = header_t'(rx_flit.data);
  wire rx_fire = rx_valid && rx_ready;
  wire tx_fire = tx_valid && tx_ready;

  assign rx_ready  = (state == T_IDLE) || (state == T_ADDR) || (state == T_DATA);
  assign mem_en    = (state == T_RD) || ((state == T_DATA) && rx_valid);
  assign mem_we    = (state == T_DATA);
  assign mem_addr  = addr_q;
  assign mem_wdata = rx_flit.data;

  always_comb begin
    tx_valid = 1'b0;
    tx_flit  = '0;
    unique case (state)
      T_RESP_HDR: begin
        tx_valid     = 1'b1;
        tx_flit.head = 1'b1;
        tx_flit.tail = is_wr_q;
        tx_flit.data = make_header(qos_q, src_q, MY_ID, is_wr_q ? CMD_WR_RESP : CMD_RD_RESP, 1'b0);
      end
      T_RESP_DATA: begin
        tx_valid     = 1'b1;
        tx_flit.tail = 1'b1;
        tx_flit.data = rdata_q;
      end
      T_ECHO: begin
        tx_valid     = 1'b1;
        tx_flit.head = 1'b1;
        tx_flit.tail = 1'b1;
        tx_flit.data = make_header(qos_q, src_q, MY_ID, CMD_WR_RESP, 1'b0);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= T_IDLE;
      src_q   <= '0;
      qos_q   <= '0;
      is_wr_q <= 1'b0;
      addr_q  <= '0;
      rdata_q <= '0;
    end else begin
      unique case (state)
        T_IDLE: if (rx_fire && rx_flit.head) begin
          src_q   <= rx_hdr.src;
          qos_q   <= rx_hdr.qos;
          is_wr_q <= (rx_hdr.cmd == CMD_WR_REQ);
          if (is_circuit_code(rx_hdr.qos)) begin
            if (rx_hdr.full_duplex) state <= T_ECHO;
          end else if (!rx_flit.tail) begin
            state <= T_ADDR;
          end
        end
        T_ADDR: if (rx_fire) begin
          addr_q <= rx_flit.data[MEM_AW+1:2];
          state  <= is_wr_q ? T_DATA : T_RD;
        end
        T_DATA:      if (rx_fire) state <= T_RESP_HDR;
        T_RD:        state <= T_RDW;
        T_RDW: begin
          rdata_q <= mem_rdata;
          state   <= T_RESP_HDR;
        end
        T_RESP_HDR:  if (tx_fire) state <= is_wr_q ? T_IDLE : T_RESP_DATA;
        T_RESP_DATA: if (tx_fire) state <= T_IDLE;
        T_ECHO:      if (tx_fire) state <= T_IDLE;
        default:     state <= T_IDLE;
      endcase
    end
  end
endmodule
