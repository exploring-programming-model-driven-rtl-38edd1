// tb_switch_levels: the switch built with 2, 4 and 8 priority levels, the
// three configurations whose cost the original design compares.
//
// Three qos_switch instances (NUM_LEVELS = 2, 4, 8) get the same directed
// traffic. They use fixed-priority tie breaking, so that inside one level
// input N (index 0) always beats input E. In every test a low-priority
// packet at N and a higher-priority one at E, both for L0, arrive in the
// same cycle; the one that leaves L0 first is checked. With fewer levels
// a code keeps its top bits, so codes that differ only in low bits share
// a level and N goes first.
//   codes 2 vs 3: E first with 8 levels; same level with 4 and 2
//   codes 1 vs 3: E first with 8 and 4 levels; same level with 2
//   codes 3 vs 4: E first in all three
module tb_switch_levels;
  import qos_noc_pkg::*;
  localparam int NP = 6;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic [NP-1:0] in_valid [3], in_ready [3], out_valid [3], out_ready [3];
  flit_t in_flit [3][NP];
  flit_t out_flit [3][NP];

  qos_switch #(.SW_X(1), .SW_Y(1), .NUM_LEVELS(2), .ARB_RR(1'b0)) u_l2 (.clk, .rst_n, .in_valid(in_valid[0]), .in_flit(in_flit[0]),
    .in_ready(in_ready[0]), .out_valid(out_valid[0]), .out_flit(out_flit[0]), .out_ready(out_ready[0]));
  qos_switch #(.SW_X(1), .SW_Y(1), .NUM_LEVELS(4), .ARB_RR(1'b0)) u_l4 (.clk, .rst_n, .in_valid(in_valid[1]), .in_flit(in_flit[1]),
    .in_ready(in_ready[1]), .out_valid(out_valid[1]), .out_flit(out_flit[1]), .out_ready(out_ready[1]));
  qos_switch #(.SW_X(1), .SW_Y(1), .NUM_LEVELS(8), .ARB_RR(1'b0)) u_l8 (.clk, .rst_n, .in_valid(in_valid[2]), .in_flit(in_flit[2]),
    .in_ready(in_ready[2]), .out_valid(out_valid[2]), .out_flit(out_flit[2]), .out_ready(out_ready[2]));

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // in one cycle, a single-flit packet at N and one at E per instance, both
  // to endpoint 10 (L0 of this switch)
  task automatic inject2(logic [3:0] qn, int tn, logic [3:0] qe, int te);
    @(posedge clk);
    #1;
    for (int s = 0; s < 3; s++) begin
      in_valid[s][P_N] = 1'b1;
      in_flit[s][P_N]  = '{head: 1'b1, tail: 1'b1, data: 32'(make_header(qn, 5'd10, 5'd0, CMD_WR_REQ, 1'b0)) | 32'(tn)};
      in_valid[s][P_E] = 1'b1;
      in_flit[s][P_E]  = '{head: 1'b1, tail: 1'b1, data: 32'(make_header(qe, 5'd10, 5'd1, CMD_WR_REQ, 1'b0)) | 32'(te)};
    end
    @(posedge clk);
    #1;
    for (int s = 0; s < 3; s++) begin
      check(in_ready[s][P_N] && in_ready[s][P_E], "both packets accepted");
      in_valid[s][P_N] = 1'b0;
      in_valid[s][P_E] = 1'b0;
    end
  endtask

  // release L0 and return, per instance, the tag that leaves first
  task automatic first_out(output int tag [3]);
    int seen [3];
    for (int s = 0; s < 3; s++) begin seen[s] = 0; out_ready[s][4] = 1'b1; end
    for (int c = 0; c < 10; c++) begin
      @(posedge clk);
      for (int s = 0; s < 3; s++)
        if (out_valid[s][4] && seen[s] == 0) begin
          seen[s] = 1;
          tag[s] = int'(out_flit[s][4].data[7:0]);
        end
      #1;
    end
    for (int s = 0; s < 3; s++) begin
      check(seen[s] == 1, "a packet came out");
      out_ready[s][4] = 1'b0;
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tag [3];
    for (int s = 0; s < 3; s++) begin
      in_valid[s] = '0;
      out_ready[s] = '1;
      out_ready[s][4] = 1'b0;
      for (int p = 0; p < NP; p++) in_flit[s][p] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // codes 2 (N) and 3 (E)
    inject2(4'd2, 11, 4'd3, 12);
    first_out(tag);
    check(tag[0] == 11, "2 levels: codes 2 and 3 share a level, N first");
    check(tag[1] == 11, "4 levels: codes 2 and 3 share a level, N first");
    check(tag[2] == 12, "8 levels: code 3 beats code 2");
    // codes 1 (N) and 3 (E)
    inject2(4'd1, 21, 4'd3, 22);
    first_out(tag);
    check(tag[0] == 21, "2 levels: codes 1 and 3 share a level, N first");
    check(tag[1] == 22, "4 levels: code 3 beats code 1");
    check(tag[2] == 22, "8 levels: code 3 beats code 1");
    // codes 3 (N) and 4 (E)
    inject2(4'd3, 31, 4'd4, 32);
    first_out(tag);
    check(tag[0] == 32, "2 levels: code 4 beats code 3");
    check(tag[1] == 32, "4 levels: code 4 beats code 3");
    check(tag[2] == 32, "8 levels: code 4 beats code 3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
