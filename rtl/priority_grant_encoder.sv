// priority_grant_encoder: grant generator of one output port.
//
// While any QoS channel bit is set, only the circuit owner can be selected,
// whatever its level: all other flows are blocked until the circuit is torn
// down. Otherwise the highest priority level that has a request wins, and
// inside that level the input is picked round robin (ARB_RR=1) or by fixed
// priority, lowest index first (ARB_RR=0); both best-effort policies are
// the ones the published switch offers, round robin as default is this
// design's choice. selection is one-hot or zero and combinational. The
// round-robin pointer moves past the selected input in a clock edge where
// advance is high (a packet's head flit was forwarded). rst_n is
// synchronous, active low.
module priority_grant_encoder #(
  parameter int unsigned N          = 6,
  parameter int unsigned NUM_LEVELS = 8,
  parameter bit          ARB_RR     = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] pass_priority [NUM_LEVELS],
  input  logic [N-1:0] qos_channel,
  input  logic         advance,
  output logic [N-1:0] selection
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] rr_ptr;
  logic [N-1:0]  cand;
  logic [IW-1:0] sel_idx;
  logic          found;

  always_comb begin
    cand = '0;
    if (qos_channel != '0) begin
      for (int m = 0; m < NUM_LEVELS; m++) cand |= pass_priority[m] & qos_channel;
    end else begin
      for (int m = 0; m < NUM_LEVELS; m++)
        if (pass_priority[m] != '0) cand = pass_priority[m];
    end
    found   = 1'b0;
    sel_idx = '0;
    for (int k = 0; k < N; k++) begin
      int idx;
      idx = ARB_RR ? ((int'(rr_ptr) + k) % N) : k;
      if (!found && cand[idx]) begin
        found   = 1'b1;
        sel_idx = IW'(idx);
      end
    end
    selection = '0;
    if (found) selection[sel_idx] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) rr_ptr <= '0;
    else if (advance && found) rr_ptr <= (int'(sel_idx) == N-1) ? '0 : sel_idx + 1'b1;
  end

  sel_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(selection));
endmodule
