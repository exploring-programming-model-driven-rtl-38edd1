// qos_mpsoc_top: 4x4 mesh network-on-chip multiprocessor platform with
// runtime-programmable QoS.
//
// Sixteen qos_switch instances S0..S15 form a 4x4 mesh; switch s sits in
// column s/4 and row s%4 (S0-S3 is the left column, top to bottom). Each
// switch has two local ports. The attachment of devices follows the
// published floor plan:
//   processor switches S1,S2,S5,S6,S9,S10,S13,S14: L0 = initiator NI of
//     ARM0..ARM7 (its AHB slave port brought out as ahb_* ports),
//     L1 = private L2 bank PM0..PM7 (target NI + memory);
//   memory switches S0,S3,S4,S7,S8,S11,S12,S15: L0 = shared L2 bank
//     SM0..SM7 (target NI + memory), L1 = the device link dev_*[j] of
//     Video1, I/O2, USB, Video2, MemCtrl, DMA, I/O1, BaseBand.
// Endpoint ID = {switch number, local port}, so SM j has ID 2*s and the
// device next to it 2*s+1. A processor reaches endpoint e at address
// {3'b000, e, 24-bit offset}; its NI registers live at addr[31]=1 (see
// qos_ni_initiator). Every neighbour link of the full mesh is present and
// XY routing is used; both are this design's choices.
//
// ahb_* ports: one AHB slave port per processor NI, index k = ARMk;
// ahb_hready is the bus HREADY seen by the NI (tie it to ahb_hreadyout when
// the NI is the only slave on that processor's bus); ahb_hresp is always
// OKAY, since the NIs report no errors.
// dev_* ports: raw flit links (valid/ready) of the eight devices whose
// logic is outside this design. rst_n is synchronous, active low.
module qos_mpsoc_top
  import qos_noc_pkg::*;
#(
  parameter int unsigned NUM_LEVELS = 8,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned MEM_AW     = 10,
  parameter bit          ARB_RR     = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  ahb_hsel,
  input  logic [31:0] ahb_haddr  [8],
  input  logic [7:0]  ahb_hwrite,
  input  logic [1:0]  ahb_htrans [8],
  input  logic [31:0] ahb_hwdata [8],
  input  logic [7:0]  ahb_hready,
  output logic [7:0]  ahb_hreadyout,
  output logic [31:0] ahb_hrdata [8],
  output logic [7:0]  ahb_hresp,
  input  logic [7:0]  dev_in_valid,
  input  flit_t       dev_in_flit [8],
  output logic [7:0]  dev_in_ready,
  output logic [7:0]  dev_out_valid,
  output flit_t       dev_out_flit [8],
  input  logic [7:0]  dev_out_ready
);
  localparam int unsigned NSW = MESH_DIM * MESH_DIM;

  logic [NPORTS-1:0] sw_in_valid  [NSW];
  flit_t             sw_in_flit   [NSW][NPORTS];
  logic [NPORTS-1:0] sw_in_ready  [NSW];
  logic [NPORTS-1:0] sw_out_valid [NSW];
  flit_t             sw_out_flit  [NSW][NPORTS];
  logic [NPORTS-1:0] sw_out_ready [NSW];

  // Switches and mesh links
  for (genvar s = 0; s < NSW; s++) begin : g_sw
    localparam int unsigned X = s / MESH_DIM;
    localparam int unsigned Y = s % MESH_DIM;

    qos_switch #(.SW_X(X), .SW_Y(Y), .NUM_LEVELS(NUM_LEVELS), .FIFO_DEPTH(FIFO_DEPTH),
                 .ARB_RR(ARB_RR)) u_sw (
      .clk(clk), .rst_n(rst_n),
      .in_valid(sw_in_valid[s]), .in_flit(sw_in_flit[s]), .in_ready(sw_in_ready[s]),
      .out_valid(sw_out_valid[s]), .out_flit(sw_out_flit[s]), .out_ready(sw_out_ready[s]));

    for (genvar p = 0; p < 4; p++) begin : g_dir
      // neighbour in direction p and the port on which it faces us
      localparam int NX = (p == P_E) ? X + 1 : (p == P_W) ? X - 1 : X;
      localparam int NY = (p == P_S) ? Y + 1 : (p == P_N) ? Y - 1 : Y;
      localparam int unsigned OPP = (p + 2) % 4;
      if (NX >= 0 && NX < MESH_DIM && NY >= 0 && NY < MESH_DIM) begin : g_link
        localparam int unsigned NS = NX * MESH_DIM + NY;
        assign sw_in_valid[s][p]  = sw_out_valid[NS][OPP];
        assign sw_in_flit[s][p]   = sw_out_flit[NS][OPP];
        assign sw_out_ready[s][p] = sw_in_ready[NS][OPP];
      end else begin : g_edge
        assign sw_in_valid[s][p]  = 1'b0;
        assign sw_in_flit[s][p]   = '0;
        assign sw_out_ready[s][p] = 1'b1;
      end
    end
  end

  // Processor tiles: initiator NI of ARMk and private bank PMk
  for (genvar k = 0; k < 8; k++) begin : g_arm
    localparam int unsigned S = (k / 2) * MESH_DIM + 1 + (k % 2);
    logic              m_en, m_we;
    logic [MEM_AW-1:0] m_addr;
    logic [31:0]       m_wdata, m_rdata;

    qos_ni_initiator #(.MY_ID(EP_W'(2 * S))) u_ni (
      .clk(clk), .rst_n(rst_n),
      .hsel(ahb_hsel[k]), .haddr(ahb_haddr[k]), .hwrite(ahb_hwrite[k]), .htrans(ahb_htrans[k]),
      .hwdata(ahb_hwdata[k]), .hready(ahb_hready[k]), .hreadyout(ahb_hreadyout[k]),
      .hrdata(ahb_hrdata[k]), .hresp(ahb_hresp[k]),
      .tx_valid(sw_in_valid[S][P_L0]), .tx_flit(sw_in_flit[S][P_L0]), .tx_ready(sw_in_ready[S][P_L0]),
      .rx_valid(sw_out_valid[S][P_L0]), .rx_flit(sw_out_flit[S][P_L0]), .rx_ready(sw_out_ready[S][P_L0]));

    qos_ni_target #(.MY_ID(EP_W'(2 * S + 1)), .MEM_AW(MEM_AW)) u_pm_ni (
      .clk(clk), .rst_n(rst_n),
      .rx_valid(sw_out_valid[S][P_L1]), .rx_flit(sw_out_flit[S][P_L1]), .rx_ready(sw_out_ready[S][P_L1]),
      .tx_valid(sw_in_valid[S][P_L1]), .tx_flit(sw_in_flit[S][P_L1]), .tx_ready(sw_in_ready[S][P_L1]),
      .mem_en(m_en), .mem_we(m_we), .mem_addr(m_addr), .mem_wdata(m_wdata), .mem_rdata(m_rdata));

    shared_memory #(.AW(MEM_AW), .DW(32)) u_pm (
      .clk(clk), .en(m_en), .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata(m_rdata));
  end

  // Memory tiles: shared bank SMj and the link of device j
  for (genvar j = 0; j < 8; j++) begin : g_sm
    localparam int unsigned S = (j / 2) * MESH_DIM + (j % 2) * 3;
    logic              m_en, m_we;
    logic [MEM_AW-1:0] m_addr;
    logic [31:0]       m_wdata, m_rdata;

    qos_ni_target #(.MY_ID(EP_W'(2 * S)), .MEM_AW(MEM_AW)) u_sm_ni (
      .clk(clk), .rst_n(rst_n),
      .rx_valid(sw_out_valid[S][P_L0]), .rx_flit(sw_out_flit[S][P_L0]), .rx_ready(sw_out_ready[S][P_L0]),
      .tx_valid(sw_in_valid[S][P_L0]), .tx_flit(sw_in_flit[S][P_L0]), .tx_ready(sw_in_ready[S][P_L0]),
      .mem_en(m_en), .mem_we(m_we), .mem_addr(m_addr), .mem_wdata(m_wdata), .mem_rdata(m_rdata));

    shared_memory #(.AW(MEM_AW), .DW(32)) u_sm (
      .clk(clk), .en(m_en), .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata(m_rdata));

    assign sw_in_valid[S][P_L1]  = dev_in_valid[j];
    assign sw_in_flit[S][P_L1]   = dev_in_flit[j];
    assign dev_in_ready[j]       = sw_in_ready[S][P_L1];
    assign dev_out_valid[j]      = sw_out_valid[S][P_L1];
    assign dev_out_flit[j]       = sw_out_flit[S][P_L1];
    assign sw_out_ready[S][P_L1] = dev_out_ready[j];
  end
endmodule
