// qos_ni_initiator: initiator network interface with QoS support.
//
// Sits between a processor and its switch. It holds a set of memory-mapped
// configuration registers and turns processor reads and writes into
// network packets whose header carries the QoS level programmed for the
// target. Programming a level first and then issuing ordinary transfers is
// the two-phase use the published design describes.
//
// Processor side: an AMBA 2.0 AHB slave port for single 32-bit transfers.
// A transfer is taken in its address phase (hsel, htrans NONSEQ or SEQ,
// hready high); hwdata is read in the following data phase, which the NI
// stretches with hreadyout low until the transfer is finished. hrdata is
// valid while hreadyout is high at the end of a read. hresp is always OKAY.
// Burst transfers are served as a series of single transfers; hsize is not
// decoded (word transfers only). These restrictions are this design's.
// Address map (this design's choice):
//   addr[31]=1  NI registers, word index addr[7:2]:
//               0..31  priority level (3 bits) used for target endpoint n
//               32     channel control: data[4:0] target, data[8] full
//                      duplex, data[9] 1=open / 0=close. A write sends a
//                      header-only OPEN or CLOSE packet ("fake" transaction);
//                      a full-duplex one completes when the target's echo
//                      has arrived, so the return path is reserved as well.
//   addr[31]=0  network access: addr[28:24] target endpoint.
// Packets: read = header + address flit; write = header + address + data.
// Each transfer waits for its response packet (one outstanding transfer).
// Network side: tx_* and rx_* use valid/ready. rst_n is synchronous,
// active low, and clears the priority registers to level 0.
module qos_ni_initiator
  import qos_noc_pkg::*;
#(
  parameter logic [EP_W-1:0] MY_ID = '0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hsel,
  input  logic [31:0] haddr,
  input  logic        hwrite,
  input  logic [1:0]  htrans,
  input  logic [31:0] hwdata,
  input  logic        hready,
  output logic        hreadyout,
  output logic [31:0] hrdata,
  output logic        hresp,
  output logic        tx_valid,
  output flit_t       tx_flit,
  input  logic        tx_ready,
  input  logic        rx_valid,
  input  flit_t       rx_flit,
  output logic        rx_ready
);
  typedef enum logic [3:0] {
    S_IDLE, S_DPH, S_HDR, S_ADDR, S_DATA, S_WAIT, S_RDATA, S_CTRL, S_ECHO, S_DONE
  } state_e;

  state_e           state;
  logic [2:0]       prio_reg [NUM_EP];
  logic [31:0]      chan_reg;
  logic             we_q;
  logic [31:0]      addr_q, wdata_q;
  logic [EP_W-1:0]  dst_q;
  logic [QOS_W-1:0] qos_q;
  logic             fd_q;

  wire tx_fire = tx_valid && tx_ready;
  wire rx_fire = rx_valid && rx_ready;
  header_t rx_hdr;
  assign rx_hdr = header_t'(rx_flit.data);

  // an AHB address phase addressed to this NI
  wire ahb_start = hsel && htrans[1] && hready;

  assign hreadyout = (state == S_IDLE) || (state == S_DONE);
  assign hresp     = 1'b0;
  assign rx_ready = (state == S_WAIT) || (state == S_RDATA) || (state == S_ECHO);

  always_comb begin
    tx_valid = 1'b0;
    tx_flit  = '0;
    unique case (state)
      S_HDR: begin
        tx_valid     = 1'b1;
        tx_flit.head = 1'b1;
        tx_flit.data = make_header(qos_q, dst_q, MY_ID, we_q ? CMD_WR_REQ : CMD_RD_REQ, 1'b0);
      end
      S_ADDR: begin
        tx_valid     = 1'b1;
        tx_flit.tail = !we_q;
        tx_flit.data = addr_q;
      end
      S_DATA: begin
        tx_valid     = 1'b1;
        tx_flit.tail = 1'b1;
        tx_flit.data = wdata_q;
      end
      S_CTRL: begin
        tx_valid     = 1'b1;
        tx_flit.head = 1'b1;
        tx_flit.tail = 1'b1;
        tx_flit.data = make_header(qos_q, dst_q, MY_ID, CMD_WR_REQ, fd_q);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      chan_reg  <= '0;
      hrdata <= '0;
      we_q      <= 1'b0;
      addr_q    <= '0;
      wdata_q   <= '0;
      dst_q     <= '0;
      qos_q     <= '0;
      fd_q      <= 1'b0;
      for (int n = 0; n < NUM_EP; n++) prio_reg[n] <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (ahb_start) begin
          we_q   <= hwrite;
          addr_q <= haddr;
          state  <= S_DPH;
        end
        S_DPH: begin
          if (addr_q[31]) begin
            if (addr_q[7:2] < 6'(NUM_EP)) begin
              if (we_q) prio_reg[addr_q[6:2]] <= hwdata[2:0];
              else      hrdata <= {29'b0, prio_reg[addr_q[6:2]]};
              state <= S_DONE;
            end else if (addr_q[7:2] == 6'(NUM_EP)) begin
              if (we_q) begin
                chan_reg <= hwdata;
                dst_q    <= hwdata[EP_W-1:0];
                fd_q     <= hwdata[8];
                qos_q    <= hwdata[9] ? ENC_QOS_OPEN_CHANNEL : ENC_QOS_CLOSE_CHANNEL;
                state    <= S_CTRL;
              end else begin
                hrdata <= chan_reg;
                state  <= S_DONE;
              end
            end else begin
              hrdata <= '0;
              state  <= S_DONE;
            end
          end else begin
            wdata_q <= hwdata;
            dst_q   <= addr_q[24 +: EP_W];
            qos_q   <= {1'b0, prio_reg[addr_q[24 +: EP_W]]};
            state   <= S_HDR;
          end
        end
        S_HDR:   if (tx_fire) state <= S_ADDR;
        S_ADDR:  if (tx_fire) state <= we_q ? S_DATA : S_WAIT;
        S_DATA:  if (tx_fire) state <= S_WAIT;
        S_WAIT:  if (rx_fire && rx_flit.head) begin
          if (rx_hdr.cmd == CMD_RD_RESP) state <= S_RDATA;
          else if (rx_flit.tail)         state <= S_DONE;
        end
        S_RDATA: if (rx_fire) begin
          hrdata <= rx_flit.data;
          state     <= S_DONE;
        end
        S_CTRL:  if (tx_fire) state <= fd_q ? S_ECHO : S_DONE;
        S_ECHO:  if (rx_fire && rx_flit.head && is_circuit_code(rx_hdr.qos)) state <= S_DONE;
        S_DONE: begin
          // hreadyout is high: a new address phase may overlap this cycle
          if (ahb_start) begin
            we_q   <= hwrite;
            addr_q <= haddr;
            state  <= S_DPH;
          end else begin
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  tx_hold: assert property (@(posedge clk) disable iff (!rst_n) (tx_valid && !tx_ready) |=> tx_valid && $stable(tx_flit));
endmodule
