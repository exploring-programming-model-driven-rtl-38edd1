// qos_channel_ff: QoS channel flip-flops of one output port.
//
// One bit per input: '1' while that input holds a reserved circuit through
// this output, '0' otherwise. The bit is set in the clock edge where an
// OPEN head flit from that input is forwarded (grant_fire) and cleared when
// its CLOSE head flit is forwarded. Following the published design, the
// allocator lets only the owner of an established circuit through.
// Writing on the forwarding edge, rather than on first sight, is this
// design's choice. rst_n is synchronous, active low.
module qos_channel_ff #(
  parameter int unsigned N = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] open_circuit,
  input  logic [N-1:0] close_circuit,
  input  logic [N-1:0] grant_fire,
  output logic [N-1:0] qos_channel
);
  always_ff @(posedge clk) begin
    if (!rst_n) qos_channel <= '0;
    else begin
      for (int i = 0; i < N; i++) begin
        if (grant_fire[i] && open_circuit[i])       qos_channel[i] <= 1'b1;
        else if (grant_fire[i] && close_circuit[i]) qos_channel[i] <= 1'b0;
      end
    end
  end
endmodule
