// qos_detector: QoS tag detector of the allocator.
//
// For every input whose buffer head is a requesting head flit, the 4-bit
// QoS field of the header is decoded. Priority codes 0-7 give the
// arbitration level; with fewer than eight levels the top log2(NUM_LEVELS)
// bits of the 3-bit priority are kept (the published design gives no
// mapping for 2 or 4 levels; this is this design's choice). The circuit
// codes raise open_circuit or close_circuit for that input and arbitrate at
// the highest level (also this design's choice). Codes outside the
// published table are treated as level 0. Purely combinational.
module qos_detector
  import qos_noc_pkg::*;
#(
  parameter int unsigned N          = 6,
  parameter int unsigned NUM_LEVELS = 8,
  localparam int unsigned LW        = (NUM_LEVELS > 1) ? $clog2(NUM_LEVELS) : 1
) (
  input  flit_t           flit_in      [N],
  input  logic  [N-1:0]   ctrl_in,
  output logic  [LW-1:0]  qos_priority [N],
  output logic  [N-1:0]   open_circuit,
  output logic  [N-1:0]   close_circuit
);
  localparam int unsigned SHIFT = (NUM_LEVELS > 1) ? 3 - $clog2(NUM_LEVELS) : 3;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      header_t h;
      logic    hd;
      logic [2:0] p;
      h  = header_t'(flit_in[i].data);
      hd = ctrl_in[i] && flit_in[i].head;
      open_circuit[i]  = hd && (h.qos == ENC_QOS_OPEN_CHANNEL);
      close_circuit[i] = hd && (h.qos == ENC_QOS_CLOSE_CHANNEL);
      if (is_circuit_code(h.qos)) p = 3'b111;
      else if (h.qos[3])          p = 3'b000;
      else                        p = h.qos[2:0];
      qos_priority[i] = (NUM_LEVELS > 1) ? LW'(p >> SHIFT) : '0;
    end
  end
endmodule
