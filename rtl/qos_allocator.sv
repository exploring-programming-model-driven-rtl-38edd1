// qos_allocator: QoS allocator/arbiter of one switch output, with its
// output flit multiplexer.
//
// Structure follows the published block diagram: a QoS detector parses the
// header of every requesting input, the QoS channel flip-flops remember an
// established circuit, the arbitration tree sorts requests by priority
// level, and a priority-encoder grant generator picks the input; its
// one-hot selection drives the multiplexer onto flit_out.
//
// Wormhole lock (this design's addition, needed by wormhole switching):
// once a head flit that is not also a tail is forwarded, the output stays
// with that input until its tail flit has gone, and arbitration is idle.
//
// Interface: ctrl_in[i] means input i has a flit at its buffer head routed
// to this output. out_valid/out_ready is the handshake to the downstream
// buffer. ctrl_out[i] is high in the cycle input i's flit moves, and is
// used as that buffer's pop. Everything is combinational from requests to
// grant; the lock, the round-robin pointer and the channel bits change on
// the clock edge where a flit moves. rst_n is synchronous, active low.
module qos_allocator
  import qos_noc_pkg::*;
#(
  parameter int unsigned N          = 6,
  parameter int unsigned NUM_LEVELS = 8,
  parameter bit          ARB_RR     = 1'b1,
  localparam int unsigned LW        = (NUM_LEVELS > 1) ? $clog2(NUM_LEVELS) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  flit_t        flit_in [N],
  input  logic [N-1:0] ctrl_in,
  output logic [N-1:0] ctrl_out,
  output flit_t        flit_out,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [N-1:0] qos_channel
);
  logic [LW-1:0] qos_priority  [N];
  logic [N-1:0]  open_circuit, close_circuit;
  logic [N-1:0]  pass_priority [NUM_LEVELS];
  logic [N-1:0]  selection, sel, head_req;
  logic          locked;
  logic [N-1:0]  owner;
  logic          fire;

  always_comb
    for (int i = 0; i < N; i++) head_req[i] = ctrl_in[i] && flit_in[i].head;

  qos_detector #(.N(N), .NUM_LEVELS(NUM_LEVELS)) u_detector (
    .flit_in(flit_in), .ctrl_in(ctrl_in), .qos_priority(qos_priority),
    .open_circuit(open_circuit), .close_circuit(close_circuit));

  arbitration_tree #(.N(N), .NUM_LEVELS(NUM_LEVELS)) u_tree (
    .ctrl_in(head_req), .qos_priority(qos_priority), .pass_priority(pass_priority));

  priority_grant_encoder #(.N(N), .NUM_LEVELS(NUM_LEVELS), .ARB_RR(ARB_RR)) u_grant (
    .clk(clk), .rst_n(rst_n), .pass_priority(pass_priority), .qos_channel(qos_channel),
    .advance(fire && !locked), .selection(selection));

  qos_channel_ff #(.N(N)) u_channel (
    .clk(clk), .rst_n(rst_n), .open_circuit(open_circuit), .close_circuit(close_circuit),
    .grant_fire(locked ? '0 : ctrl_out), .qos_channel(qos_channel));

  assign sel       = locked ? (owner & ctrl_in) : selection;
  assign out_valid = (sel != '0);
  assign ctrl_out  = out_ready ? sel : '0;
  assign fire      = out_valid && out_ready;

  // Output multiplexer
  always_comb begin
    flit_out = '0;
    for (int i = 0; i < N; i++)
      if (sel[i]) flit_out = flit_in[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      locked <= 1'b0;
      owner  <= '0;
    end else if (fire) begin
      locked <= !flit_out.tail;
      if (!locked) owner <= sel;
    end
  end

  grant_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ctrl_out));
  head_first:   assert property (@(posedge clk) disable iff (!rst_n) (fire && !locked) |-> flit_out.head);
endmodule
