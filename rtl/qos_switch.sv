// qos_switch: six-port wormhole switch with QoS allocators.
//
// Ports are N, E, S, W (mesh neighbours) and two local ports L0, L1 for the
// devices attached to the switch. Every input has a flit_fifo buffer. The
// head flit at a buffer head is routed with XY dimension-ordered routing
// (this design's choice; the published design does not state its routing),
// and the chosen output is remembered until the packet's tail flit leaves.
// Every output has a qos_allocator that arbitrates by QoS level, honours
// reserved circuits and drives the output multiplexer.
//
// Timing: a flit written into an input buffer can leave on the next cycle,
// so an uncontended hop costs one cycle. Links use valid/ready; in_ready is
// "buffer not full". SW_X/SW_Y are the switch's column and row in the mesh.
// rst_n is synchronous, active low.
module qos_switch
  import qos_noc_pkg::*;
#(
  parameter int unsigned SW_X       = 0,
  parameter int unsigned SW_Y       = 0,
  parameter int unsigned NUM_LEVELS = 8,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter bit          ARB_RR     = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPORTS-1:0] in_valid,
  input  flit_t             in_flit  [NPORTS],
  output logic [NPORTS-1:0] in_ready,
  output logic [NPORTS-1:0] out_valid,
  output flit_t             out_flit [NPORTS],
  input  logic [NPORTS-1:0] out_ready
);
  logic [NPORTS-1:0] buf_valid, buf_pop;
  flit_t             buf_flit  [NPORTS];
  logic [2:0]        route_q   [NPORTS];
  logic [2:0]        route     [NPORTS];
  logic [NPORTS-1:0] req       [NPORTS];   // req[o][i]
  logic [NPORTS-1:0] gnt       [NPORTS];   // gnt[o][i]
  logic [NPORTS-1:0] qos_channel [NPORTS];

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    flit_fifo #(.W(FLIT_W), .DEPTH(FIFO_DEPTH)) u_buf (
      .clk(clk), .rst_n(rst_n),
      .in_valid(in_valid[i]), .in_data(in_flit[i]), .in_ready(in_ready[i]),
      .out_valid(buf_valid[i]), .out_data(buf_flit[i]), .out_ready(buf_pop[i]));

    always_comb begin
      header_t h;
      h = header_t'(buf_flit[i].data);
      route[i] = buf_flit[i].head ? xy_route(h.dst, SW_X, SW_Y) : route_q[i];
    end

    always_ff @(posedge clk) begin
      if (!rst_n) route_q[i] <= '0;
      else if (buf_pop[i] && buf_flit[i].head) route_q[i] <= route[i];
    end
  end

  always_comb begin
    for (int o = 0; o < NPORTS; o++)
      for (int i = 0; i < NPORTS; i++)
        req[o][i] = buf_valid[i] && (int'(route[i]) == o);
    for (int i = 0; i < NPORTS; i++) begin
      buf_pop[i] = 1'b0;
      for (int o = 0; o < NPORTS; o++) buf_pop[i] |= gnt[o][i];
    end
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    qos_allocator #(.N(NPORTS), .NUM_LEVELS(NUM_LEVELS), .ARB_RR(ARB_RR)) u_alloc (
      .clk(clk), .rst_n(rst_n), .flit_in(buf_flit), .ctrl_in(req[o]), .ctrl_out(gnt[o]),
      .flit_out(out_flit[o]), .out_valid(out_valid[o]), .out_ready(out_ready[o]),
      .qos_channel(qos_channel[o]));
  end
endmodule
