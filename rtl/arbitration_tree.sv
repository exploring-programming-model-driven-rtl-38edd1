// arbitration_tree: splits the requests of an output port by priority level.
//
// pass_priority[m] is the set of requesting inputs whose QoS level is m,
// so the grant generator can look at the levels from the highest down. The
// published design names an extended arbitration tree with outputs
// pass_priority_0..M but not its insides; a per-level request mask is the
// simplest logic that does this. Purely combinational.
module arbitration_tree #(
  parameter int unsigned N          = 6,
  parameter int unsigned NUM_LEVELS = 8,
  localparam int unsigned LW        = (NUM_LEVELS > 1) ? $clog2(NUM_LEVELS) : 1
) (
  input  logic [N-1:0]  ctrl_in,
  input  logic [LW-1:0] qos_priority  [N],
  output logic [N-1:0]  pass_priority [NUM_LEVELS]
);
  always_comb begin
    for (int m = 0; m < NUM_LEVELS; m++)
      for (int i = 0; i < N; i++)
        pass_priority[m][i] = ctrl_in[i] && (int'(qos_priority[i]) == m);
  end
endmodule
